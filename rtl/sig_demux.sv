// sig_demux: 1:N result de-multiplexer that can carry one phi digit of the
// owner's signature.
//
// With SPLIT = 0 it is a single 1:N de-multiplexer. With SPLIT = 1 (a phi
// digit assigned to it) it is broken into the next hierarchical size: a 1:2
// de-multiplexer steered by sel[MSB] feeds two 1:N/2 de-multiplexers steered
// by sel[MSB-1:0]. Outputs that are not selected are zero in both forms, so
// the function is unchanged. The breakup rule and the select split follow the
// document; the zero value on idle outputs is this design's choice. The
// module is combinational.
// Interface: d of W bits, sel of $clog2(N) bits, y[N] of W bits.
module sig_demux #(
  parameter int unsigned N     = 16,
  parameter int unsigned W     = 16,
  parameter bit          SPLIT = 1'b1
) (
  input  logic [W-1:0]          d,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [N-1:0][W-1:0]   y
);
  localparam int unsigned SW = $clog2(N);

  if (SPLIT) begin : g_split
    if (N < 4) begin : g_bad
      $error("sig_demux: a split de-multiplexer needs N >= 4");
    end
    logic [1:0][W-1:0] half;

    demux_n #(.N(2),   .W(W)) u_top (.d(d), .sel(sel[SW-1]), .y(half));
    demux_n #(.N(N/2), .W(W)) u_lo (.d(half[0]), .sel(sel[SW-2:0]), .y(y[N/2-1:0]));
    demux_n #(.N(N/2), .W(W)) u_hi (.d(half[1]), .sel(sel[SW-2:0]), .y(y[N-1:N/2]));
  end else begin : g_flat
    demux_n #(.N(N), .W(W)) u_flat (.d(d), .sel(sel), .y(y));
  end
endmodule
