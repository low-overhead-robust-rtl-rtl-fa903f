// tb_fu_slice: self-checking test of one functional-unit slice. Two slices
// are tested side by side: the default adder slice (16 legs, split
// multiplexers and de-multiplexer) and a flat 4-leg multiplier slice. Each
// trial loads the operands of a random leg in a load cycle, scrambles the
// inputs, executes in the next cycle and then checks that the result
// appears on the de-multiplexer output chosen by dsel and nowhere else,
// and that it is held while the unit idles.
module tb_fu_slice;
  import fir_sig_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  fu_ctrl_t ca, cm;
  logic [15:0][W-1:0] al, ar, ao;
  logic [3:0][W-1:0]  ml, mr, mo;
  int checks = 0, failures = 0;

  fu_slice dut_add (.clk, .rst_n, .ctrl(ca), .in_l(al), .in_r(ar), .out(ao));
  fu_slice #(.OP(OP_MUL), .N(4), .W(W), .SPLIT_L(1'b0), .SPLIT_R(1'b0), .SPLIT_D(1'b0))
    dut_mul (.clk, .rst_n, .ctrl(cm), .in_l(ml), .in_r(mr), .out(mo));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic scramble();
    for (int i = 0; i < 16; i++) begin al[i] = W'($urandom); ar[i] = W'($urandom); end
    for (int i = 0; i < 4; i++)  begin ml[i] = W'($urandom); mr[i] = W'($urandom); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ca = '0; cm = '0;
    scramble();
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int unsigned la, lm, ea, em, pa, pm;
      la = $urandom % 16; lm = $urandom % 4;
      // load cycle
      @(negedge clk);
      scramble();
      ca = '0; cm = '0;
      ca.sel = LEGW'(la); ca.lstr = 1'b1;
      cm.sel = LEGW'(lm); cm.lstr = 1'b1;
      ea = (32'(al[la]) + 32'(ar[la])) & 32'hFFFF;
      em = (32'(ml[lm]) * 32'(mr[lm])) & 32'hFFFF;
      // execute cycle, with new values on the inputs
      @(negedge clk);
      scramble();
      ca = '0; cm = '0;
      ca.en = 1'b1; ca.ostr = 1'b1;
      cm.en = 1'b1; cm.ostr = 1'b1;
      // idle cycles: read the result through the de-multiplexer
      for (int k = 0; k < 2; k++) begin
        @(negedge clk);
        scramble();
        ca = '0; cm = '0;
        pa = $urandom % 16; pm = $urandom % 4;
        ca.dsel = LEGW'(pa); cm.dsel = LEGW'(pm);
        #1;
        for (int o = 0; o < 16; o++)
          check(ao[o], (o == int'(pa)) ? W'(ea) : '0, $sformatf("add leg %0d out %0d", la, o));
        for (int o = 0; o < 4; o++)
          check(mo[o], (o == int'(pm)) ? W'(em) : '0, $sformatf("mul leg %0d out %0d", lm, o));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
