// tb_strobe_latch: self-checking test of the strobed storage element:
// synchronous reset to zero, load on strobe, hold without it. A model
// register kept by the testbench gives the expected value every cycle.
module tb_strobe_latch;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, str = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  strobe_latch dut (.clk, .rst_n, .str, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(posedge clk); @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      str = ($urandom % 3) == 0;
      d   = W'($urandom);
      if (c == 300) rst_n = 0;
      if (c == 302) rst_n = 1;
      @(posedge clk);
      if (!rst_n)   model = '0;
      else if (str) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h (str=%b)", c, q, model, str);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
