// tb_fir_sig_variants: runs the FIR core under the other signatures whose
// sizes the design is evaluated with, all fed the same random samples:
//   theta theta phi                          (3 digits, the minimum signature)
//   theta x4 phi x2                          (6 digits)
//   theta x4 phi x2 omega x2                 (8 digits)
//   no signature                             (the unprotected structure)
//   theta x8 phi x4 omega x2 with other taps (14 digits, non-default constants)
// Every core must give the reference result with the 20-cycle latency: the
// signature changes only the structure, never the function.
module tb_fir_sig_variants;
  import fir_sig_pkg::*;
  localparam int W = 16;
  localparam int NV = 5;
  localparam int RUNS = 100;
  localparam tap_vec_t K2 = {16'd100, 16'hFF00, 16'd0, 16'd9, 16'd31, 16'd1, 16'd77, 16'd5};
  localparam tap_vec_t C2 = {16'h8001, 16'd2, 16'd13, 16'hFFFF, 16'd257, 16'd3, 16'd19, 16'd1};

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0][W-1:0] x;
  logic [NV-1:0][W-1:0] y;
  logic [NV-1:0] y_valid, busy;
  int checks = 0, failures = 0;

  fir_sig_core #(.THETA(2), .PHI(1), .OMEGA(0)) u_min (.clk, .rst_n, .start, .x, .y(y[0]), .y_valid(y_valid[0]), .busy(busy[0]));
  fir_sig_core #(.THETA(4), .PHI(2), .OMEGA(0)) u_s6  (.clk, .rst_n, .start, .x, .y(y[1]), .y_valid(y_valid[1]), .busy(busy[1]));
  fir_sig_core #(.THETA(4), .PHI(2), .OMEGA(2)) u_s8  (.clk, .rst_n, .start, .x, .y(y[2]), .y_valid(y_valid[2]), .busy(busy[2]));
  fir_sig_core #(.THETA(0), .PHI(0), .OMEGA(0)) u_nos (.clk, .rst_n, .start, .x, .y(y[3]), .y_valid(y_valid[3]), .busy(busy[3]));
  fir_sig_core #(.PRE_K(K2), .COEF(C2))         u_k2  (.clk, .rst_n, .start, .x, .y(y[4]), .y_valid(y_valid[4]), .busy(busy[4]));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] ref_fir(input logic [7:0][W-1:0] xs, input tap_vec_t k,
                                           input tap_vec_t c);
    int unsigned acc;
    acc = 0;
    for (int i = 0; i < 8; i++) acc += ((32'(xs[i]) + 32'(k[i])) & 32'hFFFF) * 32'(c[i]);
    return W'(acc);
  endfunction

  initial begin
    repeat (RUNS * 30 + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      logic [W-1:0] e1, e2;
      int lat;
      repeat ($urandom % 3) @(negedge clk);
      for (int k = 0; k < 8; k++) x[k] = W'($urandom);
      e1 = ref_fir(x, PRE_K_DEF, COEF_DEF);
      e2 = ref_fir(x, K2, C2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (y_valid == '0 && lat < 40) begin
        @(negedge clk);
        lat++;
      end
      check(lat, 20, $sformatf("run %0d latency", r));
      for (int v = 0; v < NV; v++) begin
        check(int'(y_valid[v]), 1, $sformatf("run %0d core %0d valid", r, v));
        check(int'(y[v]), int'((v == 4) ? e2 : e1), $sformatf("run %0d core %0d y", r, v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
