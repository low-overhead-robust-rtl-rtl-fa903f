// demux_n: plain 1:N de-multiplexer, the leaf cell from which the signature
// de-multiplexer trees are built. Combinational; output sel carries d and
// every other output is zero.
// Interface: d is one W-bit word, sel is $clog2(N) bits, y is N words.
module demux_n #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]          d,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [N-1:0][W-1:0]   y
);
  always_comb begin
    y      = '0;
    y[sel] = d;
  end
endmodule
