// fu_slice: one functional unit of the FIR datapath with everything the
// binding puts around it: two operand multiplexers, two operand latches, the
// adder or multiplier, a result latch and a result de-multiplexer.
//
// Each operation bound to the unit owns leg i of both operand multiplexers
// (its left and right operand) and leg i of the de-multiplexer (where its
// result goes). A control step takes two clock cycles:
//   load cycle    : ctrl.sel = i and ctrl.lstr = 1; the operand latches take
//                   in_l[i] and in_r[i] at the clock edge;
//   execute cycle : ctrl.en = 1 and ctrl.ostr = 1; the unit works on the
//                   latched operands and the result latch takes its output.
// The de-multiplexer is steered by ctrl.dsel and is combinational from the
// result latch, so out[j] carries the latched result while dsel = j and is
// zero otherwise. SPLIT_L, SPLIT_R and SPLIT_D select the flat or the
// signature (broken-up) form of the two multiplexers and the
// de-multiplexer. The structure follows the document's datapath figures;
// the two-cycle step is this design's reading of the Lstr/En/Ostr strobes.
module fu_slice
  import fir_sig_pkg::*;
#(
  parameter fu_op_e      OP      = OP_ADD,
  parameter int unsigned N       = 16,
  parameter int unsigned W       = 16,
  parameter bit          SPLIT_L = 1'b1,
  parameter bit          SPLIT_R = 1'b1,
  parameter bit          SPLIT_D = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  fu_ctrl_t            ctrl,
  input  logic [N-1:0][W-1:0] in_l,
  input  logic [N-1:0][W-1:0] in_r,
  output logic [N-1:0][W-1:0] out
);
  localparam int unsigned SW = $clog2(N);

  logic [W-1:0] mux_l, mux_r, opnd_l, opnd_r, fu_y, res_q;
  logic [SW-1:0] sel, dsel;

  assign sel  = ctrl.sel[SW-1:0];
  assign dsel = ctrl.dsel[SW-1:0];

  sig_mux #(.N(N), .W(W), .SPLIT(SPLIT_L)) u_mux_l (.d(in_l), .sel(sel), .y(mux_l));
  sig_mux #(.N(N), .W(W), .SPLIT(SPLIT_R)) u_mux_r (.d(in_r), .sel(sel), .y(mux_r));

  strobe_latch #(.W(W)) u_lat_l (.clk(clk), .rst_n(rst_n), .str(ctrl.lstr), .d(mux_l), .q(opnd_l));
  strobe_latch #(.W(W)) u_lat_r (.clk(clk), .rst_n(rst_n), .str(ctrl.lstr), .d(mux_r), .q(opnd_r));

  func_unit #(.OP(OP), .W(W)) u_fu (.en(ctrl.en), .a(opnd_l), .b(opnd_r), .y(fu_y));

  strobe_latch #(.W(W)) u_lat_o (.clk(clk), .rst_n(rst_n), .str(ctrl.ostr), .d(fu_y), .q(res_q));

  sig_demux #(.N(N), .W(W), .SPLIT(SPLIT_D)) u_dmx (.d(res_q), .sel(dsel), .y(out));

  // A result is only latched in a step's execute cycle, never together with
  // a new operand load.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.lstr && ctrl.ostr));
  a_en_ostr:    assert property (@(posedge clk) disable iff (!rst_n) ctrl.ostr |-> ctrl.en);
endmodule
