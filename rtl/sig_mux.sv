// sig_mux: N:1 operand multiplexer that can carry one theta digit of the
// owner's signature.
//
// With SPLIT = 0 it is a single N:1 multiplexer, as in an unprotected
// datapath. With SPLIT = 1 (a theta digit assigned to this multiplexer) it is
// broken into the next hierarchical size: two N/2:1 multiplexers select
// within the low and the high half of the inputs using sel[MSB-1:0], and a
// 2:1 multiplexer picks between them with sel[MSB]. Both forms give the same
// function, so the digit is visible only in the structure. The breakup rule
// and the bit split of the select follow the document; the module is
// combinational.
// Interface: d[N] of W bits, sel of $clog2(N) bits, y of W bits.
module sig_mux #(
  parameter int unsigned N     = 16,
  parameter int unsigned W     = 16,
  parameter bit          SPLIT = 1'b1
) (
  input  logic [N-1:0][W-1:0]   d,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [W-1:0]          y
);
  localparam int unsigned SW = $clog2(N);

  if (SPLIT) begin : g_split
    if (N < 4) begin : g_bad
      $error("sig_mux: a split multiplexer needs N >= 4");
    end
    logic [1:0][W-1:0] half;

    mux_n #(.N(N/2), .W(W)) u_lo (.d(d[N/2-1:0]), .sel(sel[SW-2:0]), .y(half[0]));
    mux_n #(.N(N/2), .W(W)) u_hi (.d(d[N-1:N/2]), .sel(sel[SW-2:0]), .y(half[1]));
    mux_n #(.N(2),   .W(W)) u_top (.d(half), .sel(sel[SW-1]), .y(y));
  end else begin : g_flat
    mux_n #(.N(N), .W(W)) u_flat (.d(d), .sel(sel), .y(y));
  end
endmodule
