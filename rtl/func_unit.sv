// func_unit: one functional unit of the FIR datapath, an adder (A1, A2) or a
// multiplier (M1, M2), selected by the OP parameter.
//
// The result is the low W bits of a + b or a * b (two's-complement
// wrap-around, the same for signed and unsigned operands). When en is low the
// output is forced to zero so that the unit's result does not toggle outside
// the control steps in which it is scheduled. Combinational; the result latch
// that follows it samples y in the step's execute cycle. The unit types and
// the enable signal come from the document; the width, wrap-around and
// zero-when-disabled behaviour are this design's choices.
module func_unit
  import fir_sig_pkg::*;
#(
  parameter fu_op_e      OP = OP_ADD,
  parameter int unsigned W  = 16
) (
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    if (!en)               y = '0;
    else if (OP == OP_MUL) y = W'(a * b);
    else                   y = W'(a + b);
  end
endmodule
