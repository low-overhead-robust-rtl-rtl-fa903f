// reg_group: a group of intermediate registers that hold products between
// the step that makes them and the step in which adder A1 uses them, with
// the sharing that an omega digit of the signature imposes.
//
// NREG logical registers (Reg1..Reg2 or Reg3..Reg5 of the schedule) live in
// control steps that do not overlap in their use. With SHARED = 0 each is a
// register of its own, written from d[i] when ctrl.str is high and
// ctrl.wsel = i, and q[i] always shows it. With SHARED = 1 (an omega digit)
// all of them are one physical register: a write multiplexer (Sel_R) picks
// d[ctrl.wsel], the register loads it on ctrl.str (Str_R), and a read
// de-multiplexer (DSel_R) sends the content to q[ctrl.rsel], with zero on the
// other outputs. Multiplexer and de-multiplexer have the next power-of-two
// size (2:1 and 1:2 for two registers, 4:1 and 1:4 for three), as in the
// document's signature datapath. Timing: a write lands at the clock edge
// ending the cycle with str = 1; the value is readable from the next cycle.
// With three shared registers the fourth output of the 1:4 read
// de-multiplexer has no reader, which lint reports as unused bits.
module reg_group #(
  parameter int unsigned NREG   = 3,
  parameter int unsigned W      = 16,
  parameter bit          SHARED = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  fir_sig_pkg::reg_ctrl_t ctrl,
  input  logic [NREG-1:0][W-1:0] d,
  output logic [NREG-1:0][W-1:0] q
);
  localparam int unsigned NP = (NREG <= 2) ? 2 : 4;  // shared mux / demux size
  localparam int unsigned SW = $clog2(NP);

  if (SHARED) begin : g_shared
    logic [NP-1:0][W-1:0] d_ext, q_ext;
    logic [W-1:0]         wdata, phys;

    always_comb begin
      d_ext           = '0;
      d_ext[NREG-1:0] = d;
    end

    mux_n #(.N(NP), .W(W)) u_wmux (.d(d_ext), .sel(ctrl.wsel[SW-1:0]), .y(wdata));
    strobe_latch #(.W(W)) u_reg (.clk(clk), .rst_n(rst_n), .str(ctrl.str), .d(wdata), .q(phys));
    demux_n #(.N(NP), .W(W)) u_rdmx (.d(phys), .sel(ctrl.rsel[SW-1:0]), .y(q_ext));

    assign q = q_ext[NREG-1:0];
  end else begin : g_separate
    for (genvar i = 0; i < int'(NREG); i++) begin : g_reg
      strobe_latch #(.W(W)) u_reg (
        .clk(clk), .rst_n(rst_n),
        .str(ctrl.str && (ctrl.wsel == 2'(i))),
        .d(d[i]), .q(q[i])
      );
    end
  end

  a_wsel_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 ctrl.str |-> (int'(ctrl.wsel) < int'(NREG)));
endmodule
