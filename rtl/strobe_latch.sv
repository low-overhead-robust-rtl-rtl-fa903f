// strobe_latch: the operand and result storage placed before and after each
// functional unit (the "Latch" boxes strobed by Lstr_* and Ostr_*).
//
// The document names these latches and their strobes but not their circuit.
// Here each is an edge-triggered register with a load strobe: on a rising
// clock edge with str = 1 it takes d, otherwise it holds. A synchronous,
// active-low reset clears it so that nothing downstream ever reads an
// unknown value. Using flip-flops rather than level-sensitive latches keeps
// the core single-clock and free of timing loops; this is a choice of this
// design. Timing: q shows d one clock after the strobe.
module strobe_latch #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         str,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)   q <= '0;
    else if (str) q <= d;
  end
endmodule
