// tb_reg_group: self-checking test of the intermediate register groups.
// A shared three-register group (one physical register behind a 4:1 write
// multiplexer and a 1:4 read de-multiplexer), a shared two-register group
// and a separate three-register group run the write/read pattern of the FIR
// schedule (write register i, read it in the next cycle while the next one
// is written) plus random writes; a model kept by the testbench gives the
// expected outputs.
module tb_reg_group;
  import fir_sig_pkg::*;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  reg_ctrl_t c3, c2;
  logic [2:0][W-1:0] d3, qs3, qf3;
  logic [1:0][W-1:0] d2, qs2;
  logic [W-1:0] phys3, phys2;          // model of the shared registers
  logic [2:0][W-1:0] sep3;             // model of the separate registers
  int checks = 0, failures = 0;

  reg_group                                   dut_s3 (.clk, .rst_n, .ctrl(c3), .d(d3), .q(qs3));
  reg_group #(.NREG(3), .W(W), .SHARED(1'b0)) dut_f3 (.clk, .rst_n, .ctrl(c3), .d(d3), .q(qf3));
  reg_group #(.NREG(2), .W(W), .SHARED(1'b1)) dut_s2 (.clk, .rst_n, .ctrl(c2), .d(d2), .q(qs2));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c3 = '0; c2 = '0; d3 = '0; d2 = '0;
    phys3 = '0; phys2 = '0; sep3 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) d3[i] = W'($urandom);
      for (int i = 0; i < 2; i++) d2[i] = W'($urandom);
      if (t < 500) begin
        // schedule-like pattern: write i in this cycle, read i-1
        c3.wsel = 2'(t % 3);  c3.str = 1'b1;  c3.rsel = 2'((t + 2) % 3);
        c2.wsel = 2'(t % 2);  c2.str = 1'b1;  c2.rsel = 2'((t + 1) % 2);
      end else begin
        c3.wsel = 2'($urandom % 3); c3.str = 1'($urandom); c3.rsel = 2'($urandom % 3);
        c2.wsel = 2'($urandom % 2); c2.str = 1'($urandom); c2.rsel = 2'($urandom % 2);
      end
      #1;
      // outputs before the clock edge show the stored values
      for (int o = 0; o < 3; o++) begin
        check(qs3[o], (o == int'(c3.rsel)) ? phys3 : '0, $sformatf("shared3 t=%0d q[%0d]", t, o));
        check(qf3[o], sep3[o], $sformatf("separate3 t=%0d q[%0d]", t, o));
      end
      for (int o = 0; o < 2; o++)
        check(qs2[o], (o == int'(c2.rsel)) ? phys2 : '0, $sformatf("shared2 t=%0d q[%0d]", t, o));
      @(posedge clk);
      if (c3.str) begin phys3 = d3[c3.wsel]; sep3[c3.wsel] = d3[c3.wsel]; end
      if (c2.str) phys2 = d2[c2.wsel];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
