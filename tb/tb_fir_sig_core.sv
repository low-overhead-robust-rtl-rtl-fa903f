// tb_fir_sig_core: end-to-end test of the signature-embedded FIR core at its
// default parameters (the full 14-digit signature: all eight multiplexers
// and all four de-multiplexers broken up, both register groups shared).
//
// It feeds random sample sets, some back to back and some after idle gaps,
// and checks for each: y against sum_k (IN_k + K_k) * C_k computed here
// modulo 2^16; the latency of exactly 20 cycles from start to y_valid; a
// single-cycle y_valid; busy; and that y holds between results. It also
// counts how often the structures the signature adds are exercised: the
// 2:1 stage of a split multiplexer picking the upper half, the 1:2 stage of
// a split de-multiplexer routing to the upper half, and a shared register
// being rewritten with a later product. Each count must be non-zero.
module tb_fir_sig_core;
  import fir_sig_pkg::*;
  localparam int W = 16;
  localparam int RUNS = 200;
  localparam int LATENCY = 20;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0][W-1:0] x;
  logic [W-1:0] y, y_last;
  logic y_valid, busy;
  int checks = 0, failures = 0;
  int n_mux_hi = 0, n_dmx_hi = 0, n_share_a = 0, n_share_b = 0, n_back2back = 0;

  fir_sig_core u_dut (.clk, .rst_n, .start, .x, .y, .y_valid, .busy);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  function automatic logic [W-1:0] ref_fir(input logic [7:0][W-1:0] xs);
    int unsigned acc;
    acc = 0;
    for (int k = 0; k < 8; k++)
      acc += ((32'(xs[k]) + 32'(PRE_K_DEF[k])) & 32'hFFFF) * 32'(COEF_DEF[k]);
    return W'(acc);
  endfunction

  // Mechanism counters, sampled on the clock.
  always @(posedge clk) if (rst_n) begin
    if (u_dut.fu_ctrl[FU_A1].lstr && u_dut.fu_ctrl[FU_A1].sel[3]) n_mux_hi++;
    if (u_dut.fu_ctrl[FU_A2].lstr && u_dut.fu_ctrl[FU_A2].sel[2]) n_mux_hi++;
    if (u_dut.fu_ctrl[FU_M1].lstr && u_dut.fu_ctrl[FU_M1].sel[1]) n_mux_hi++;
    if (u_dut.fu_ctrl[FU_M2].lstr && u_dut.fu_ctrl[FU_M2].sel[1]) n_mux_hi++;
    if (u_dut.out_stb && u_dut.fu_ctrl[FU_A1].dsel[3]) n_dmx_hi++;
    if (u_dut.reg_ctrl[0].str && u_dut.reg_ctrl[0].wsel != 2'd0) n_share_a++;
    if (u_dut.reg_ctrl[1].str && u_dut.reg_ctrl[1].wsel != 2'd0) n_share_b++;
  end

  // y may only change together with y_valid.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (!y_valid) begin
      checks++;
      if (y !== y_last) begin failures++; $display("FAIL y changed without y_valid"); end
    end
    y_last = y;
  end

  initial begin
    repeat (RUNS * 30 + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    y_last = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < RUNS; r++) begin
      logic [W-1:0] exp;
      int lat;
      bit b2b;
      b2b = (r % 3 == 2);
      if (!b2b) repeat ($urandom % 4) @(negedge clk);
      else n_back2back++;
      check(int'(busy), 0, "busy before start");
      for (int k = 0; k < 8; k++)
        x[k] = (r == 0) ? 16'hFFFF : (r == 1) ? 16'h0000 : W'($urandom);
      exp = ref_fir(x);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!y_valid && lat < 40) begin
        check(int'(busy), (lat < LATENCY) ? 1 : 0, $sformatf("run %0d busy at %0d", r, lat));
        @(negedge clk);
        lat++;
      end
      check(lat, LATENCY, $sformatf("run %0d latency", r));
      check(int'(y), int'(exp), $sformatf("run %0d y", r));
      if (!b2b) begin
        @(negedge clk);
        check(int'(y_valid), 0, $sformatf("run %0d y_valid width", r));
      end
    end
    check(int'(n_mux_hi > 0), 1, "split mux upper half used");
    check(int'(n_dmx_hi > 0), 1, "split demux upper half used");
    check(int'(n_share_a > 0), 1, "shared Reg1/Reg2 reused");
    check(int'(n_share_b > 0), 1, "shared Reg3/Reg4/Reg5 reused");
    check(int'(n_back2back > 0), 1, "back-to-back start");
    $display("mechanisms: mux_hi=%0d demux_hi=%0d share_A=%0d share_B=%0d back2back=%0d",
             n_mux_hi, n_dmx_hi, n_share_a, n_share_b, n_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
