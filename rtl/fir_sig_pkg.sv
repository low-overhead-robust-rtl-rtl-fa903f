// fir_sig_pkg: types and constants shared by the signature-embedded FIR core.
//
// The core computes an 8-tap FIR sum on a datapath of two adders (A1, A2) and
// two multipliers (M1, M2) over nine control steps. Every operation of the
// scheduled data-flow graph is bound to one functional unit and owns one input
// "leg" on that unit's operand multiplexers and one output leg on its result
// de-multiplexer; the leg number is the operation's rank, by control step,
// among the operations bound to that unit. The schedule and binding below are
// the document's (23 operations, cs1..cs9); the leg numbering, the control
// word layout and the data width are this design's choices.
package fir_sig_pkg;

  // Datapath word width. Sixteen bits makes the core's pin count
  // (8 inputs + 1 output of 16 bits, plus a clock) equal the 145 pins reported
  // for the FPGA implementation; the document does not state the width itself.
  localparam int unsigned DATA_W = 16;

  // Number of taps (primary inputs IN1..IN8) and control steps.
  localparam int unsigned TAPS   = 8;
  localparam int unsigned NSTEPS = 9;

  // Functional units, in the order used to apply signature digits
  // (resource order A1, A2, M1, M2).
  typedef enum logic [1:0] {FU_A1 = 2'd0, FU_A2 = 2'd1, FU_M1 = 2'd2, FU_M2 = 2'd3} fu_id_e;
  localparam int unsigned NFU = 4;

  // Operation performed by a functional unit.
  typedef enum logic {OP_ADD = 1'b0, OP_MUL = 1'b1} fu_op_e;

  // Multiplexer size (and de-multiplexer size) of each unit: the number of
  // operations bound to it, rounded up to a power of two.
  localparam int unsigned N_A1 = 16;  // 9 operations
  localparam int unsigned N_A2 = 8;   // 6 operations
  localparam int unsigned N_M  = 4;   // 4 operations each
  localparam int unsigned LEGW = 4;   // select width wide enough for 16 legs

  // Control word of one functional-unit slice.
  typedef struct packed {
    logic [LEGW-1:0] sel;   // operand multiplexer select (Sel_*)
    logic            lstr;  // operand latch strobe (Lstr_*)
    logic            en;    // functional unit enable (En_*)
    logic            ostr;  // result latch strobe (Ostr_*)
    logic [LEGW-1:0] dsel;  // result de-multiplexer select (DSel_*)
  } fu_ctrl_t;

  // Control word of one group of intermediate registers.
  typedef struct packed {
    logic [1:0] wsel;  // logical register written (Sel_R*)
    logic       str;   // write strobe (Str_R*)
    logic [1:0] rsel;  // logical register read (DSel_R*)
  } reg_ctrl_t;

  // One entry of the schedule: is the unit busy in a step, and with which leg.
  typedef struct packed {
    logic            act;
    logic [LEGW-1:0] leg;
  } slot_t;

  // Binding of the scheduled DFG: which leg each unit runs in control step
  // s (1..9).
  //   A1: op1(cs1) op3(cs2) op17..op23(cs3..cs9)      -> legs 0..8
  //   A2: op2(cs1) op4(cs2) op5..op8(cs3..cs6)         -> legs 0..5
  //   M1: op9(cs2) op11(cs3) op13(cs4) op15(cs6)       -> legs 0..3
  //   M2: op10(cs2) op12(cs3) op14(cs5) op16(cs7)      -> legs 0..3
  function automatic slot_t schedule(input fu_id_e fu, input int unsigned step);
    slot_t s;
    s = '0;
    unique case (fu)
      FU_A1: if (step >= 1 && step <= 9) s = '{act: 1'b1, leg: LEGW'(step - 1)};
      FU_A2: if (step >= 1 && step <= 6) s = '{act: 1'b1, leg: LEGW'(step - 1)};
      FU_M1: unique case (step)
               2: s = '{act: 1'b1, leg: LEGW'(0)};
               3: s = '{act: 1'b1, leg: LEGW'(1)};
               4: s = '{act: 1'b1, leg: LEGW'(2)};
               6: s = '{act: 1'b1, leg: LEGW'(3)};
               default: s = '0;
             endcase
      FU_M2: unique case (step)
               2: s = '{act: 1'b1, leg: LEGW'(0)};
               3: s = '{act: 1'b1, leg: LEGW'(1)};
               5: s = '{act: 1'b1, leg: LEGW'(2)};
               7: s = '{act: 1'b1, leg: LEGW'(3)};
               default: s = '0;
             endcase
      default: s = '0;
    endcase
    return s;
  endfunction

  // Intermediate registers. Group A holds Reg1 (op12) and Reg2 (op13);
  // group B holds Reg3 (op14), Reg4 (op15) and Reg5 (op16). A value produced
  // in step s is written in step s+1 and read by A1 in step s+2.
  //   write: Reg1 cs4, Reg2 cs5, Reg3 cs6, Reg4 cs7, Reg5 cs8
  //   read : Reg1 cs5, Reg2 cs6, Reg3 cs7, Reg4 cs8, Reg5 cs9
  typedef struct packed {
    logic       act;
    logic [1:0] idx;
  } rslot_t;

  function automatic rslot_t reg_write(input logic grp_b, input int unsigned step);
    rslot_t r;
    r = '0;
    if (!grp_b) begin
      if (step == 4 || step == 5) r = '{act: 1'b1, idx: 2'(step - 4)};
    end else begin
      if (step >= 6 && step <= 8) r = '{act: 1'b1, idx: 2'(step - 6)};
    end
    return r;
  endfunction

  function automatic rslot_t reg_read(input logic grp_b, input int unsigned step);
    rslot_t r;
    r = '0;
    if (!grp_b) begin
      if (step == 5 || step == 6) r = '{act: 1'b1, idx: 2'(step - 5)};
    end else begin
      if (step >= 7 && step <= 9) r = '{act: 1'b1, idx: 2'(step - 7)};
    end
    return r;
  endfunction

  // Default per-tap constants. The DFG draws one primary input per pre-add
  // node (op1..op8) and one data input per multiply node (op9..op16); the
  // second operand of each is a per-tap constant held in the core.
  typedef logic [TAPS-1:0][DATA_W-1:0] tap_vec_t;
  localparam tap_vec_t PRE_K_DEF = {16'd8, 16'd7, 16'd6, 16'd5, 16'd4, 16'd3, 16'd2, 16'd1};
  localparam tap_vec_t COEF_DEF  = {16'd3, 16'hFFFB, 16'd7, 16'd11, 16'd11, 16'd7, 16'hFFFB, 16'd3};


endpackage
