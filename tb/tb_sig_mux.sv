// tb_sig_mux: self-checking test of the signature multiplexer. Flat and
// split forms of 16:1, 8:1 and 4:1 multiplexers get random data and every
// select value; each output is compared with the input word the select
// names, picked out by the testbench itself.
module tb_sig_mux;
  localparam int W = 16;
  logic [15:0][W-1:0] d16;
  logic [7:0][W-1:0]  d8;
  logic [3:0][W-1:0]  d4;
  logic [3:0] s16;
  logic [2:0] s8;
  logic [1:0] s4;
  logic [W-1:0] y16s, y16f, y8s, y8f, y4s, y4f;
  int checks = 0, failures = 0;

  sig_mux                                 u16s (.d(d16), .sel(s16), .y(y16s));
  sig_mux #(.N(16), .W(W), .SPLIT(1'b0))  u16f (.d(d16), .sel(s16), .y(y16f));
  sig_mux #(.N(8),  .W(W), .SPLIT(1'b1))  u8s  (.d(d8),  .sel(s8),  .y(y8s));
  sig_mux #(.N(8),  .W(W), .SPLIT(1'b0))  u8f  (.d(d8),  .sel(s8),  .y(y8f));
  sig_mux #(.N(4),  .W(W), .SPLIT(1'b1))  u4s  (.d(d4),  .sel(s4),  .y(y4s));
  sig_mux #(.N(4),  .W(W), .SPLIT(1'b0))  u4f  (.d(d4),  .sel(s4),  .y(y4f));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 16; i++) d16[i] = W'($urandom);
      for (int i = 0; i < 8; i++)  d8[i]  = W'($urandom);
      for (int i = 0; i < 4; i++)  d4[i]  = W'($urandom);
      for (int s = 0; s < 16; s++) begin
        logic [W-1:0] e16, e8, e4;
        s16 = 4'(s); s8 = 3'(s); s4 = 2'(s);
        e16 = d16[s]; e8 = d8[s % 8]; e4 = d4[s % 4];
        #1;
        check(y16s, e16, $sformatf("16:1 split sel=%0d", s));
        check(y16f, e16, $sformatf("16:1 flat sel=%0d", s));
        check(y8s,  e8,  $sformatf("8:1 split sel=%0d", s % 8));
        check(y8f,  e8,  $sformatf("8:1 flat sel=%0d", s % 8));
        check(y4s,  e4,  $sformatf("4:1 split sel=%0d", s % 4));
        check(y4f,  e4,  $sformatf("4:1 flat sel=%0d", s % 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
