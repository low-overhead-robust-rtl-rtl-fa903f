// mux_n: plain N:1 multiplexer, the leaf cell from which the signature
// multiplexer trees are built. Combinational; y = d[sel].
// Interface: d is N words of W bits, sel is $clog2(N) bits.
module mux_n #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0]   d,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [W-1:0]          y
);
  always_comb y = d[sel];
endmodule
