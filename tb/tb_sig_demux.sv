// tb_sig_demux: self-checking test of the signature de-multiplexer. Flat
// and split forms of 1:16, 1:8 and 1:4 de-multiplexers get random data and
// every select value; the selected output must carry the data and every
// other output must be zero.
module tb_sig_demux;
  localparam int W = 16;
  logic [W-1:0] d;
  logic [3:0] s16;
  logic [2:0] s8;
  logic [1:0] s4;
  logic [15:0][W-1:0] y16s, y16f;
  logic [7:0][W-1:0]  y8s, y8f;
  logic [3:0][W-1:0]  y4s, y4f;
  int checks = 0, failures = 0;

  sig_demux                                u16s (.d(d), .sel(s16), .y(y16s));
  sig_demux #(.N(16), .W(W), .SPLIT(1'b0)) u16f (.d(d), .sel(s16), .y(y16f));
  sig_demux #(.N(8),  .W(W), .SPLIT(1'b1)) u8s  (.d(d), .sel(s8),  .y(y8s));
  sig_demux #(.N(8),  .W(W), .SPLIT(1'b0)) u8f  (.d(d), .sel(s8),  .y(y8f));
  sig_demux #(.N(4),  .W(W), .SPLIT(1'b1)) u4s  (.d(d), .sel(s4),  .y(y4s));
  sig_demux #(.N(4),  .W(W), .SPLIT(1'b0)) u4f  (.d(d), .sel(s4),  .y(y4f));

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
    for (int rep = 0; rep < 10; rep++) begin
      for (int s = 0; s < 16; s++) begin
        d = W'($urandom) | 16'h0001;  // never zero, so a routed word is visible
        s16 = 4'(s); s8 = 3'(s); s4 = 2'(s);
        #1;
        for (int o = 0; o < 16; o++) begin
          check(y16s[o], (o == s) ? d : '0, $sformatf("1:16 split sel=%0d out=%0d", s, o));
          check(y16f[o], (o == s) ? d : '0, $sformatf("1:16 flat sel=%0d out=%0d", s, o));
        end
        for (int o = 0; o < 8; o++) begin
          check(y8s[o], (o == s % 8) ? d : '0, $sformatf("1:8 split sel=%0d out=%0d", s % 8, o));
          check(y8f[o], (o == s % 8) ? d : '0, $sformatf("1:8 flat sel=%0d out=%0d", s % 8, o));
        end
        for (int o = 0; o < 4; o++) begin
          check(y4s[o], (o == s % 4) ? d : '0, $sformatf("1:4 split sel=%0d out=%0d", s % 4, o));
          check(y4f[o], (o == s % 4) ? d : '0, $sformatf("1:4 flat sel=%0d out=%0d", s % 4, o));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
