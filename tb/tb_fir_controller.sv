// tb_fir_controller: self-checking test of the FIR sequencer. The testbench
// holds its own copy of the schedule (the step and leg of every operation of
// A1, A2, M1, M2 and the write/read steps of Reg1..Reg5) and, over several
// runs separated by idle gaps, checks every control output in every cycle:
// operand loads in the first cycle of a step, enable and result strobe in
// the second, the de-multiplexer selects that follow the last result of
// each unit, the register strobes and selects, the output strobe in the
// 19th cycle after start and busy.
module tb_fir_controller;
  import fir_sig_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  fu_ctrl_t  [3:0] fc;
  reg_ctrl_t [1:0] rc;
  logic out_stb, busy;
  int checks = 0, failures = 0;

  // step -> leg (-1: unit idle), per unit A1, A2, M1, M2
  int leg_tab [4][10];
  // write / read steps of Reg1..Reg5
  int wr_step [5] = '{4, 5, 6, 7, 8};
  int rd_step [5] = '{5, 6, 7, 8, 9};
  int exp_dsel [4];

  fir_controller dut (.clk, .rst_n, .start, .fu_ctrl(fc), .reg_ctrl(rc), .out_stb, .busy);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_idle(input string where);
    for (int f = 0; f < 4; f++) begin
      check(int'(fc[f].lstr), 0, $sformatf("%s lstr fu%0d", where, f));
      check(int'(fc[f].ostr), 0, $sformatf("%s ostr fu%0d", where, f));
      check(int'(fc[f].en),   0, $sformatf("%s en fu%0d", where, f));
    end
    check(int'(rc[0].str), 0, {where, " str A"});
    check(int'(rc[1].str), 0, {where, " str B"});
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 4; f++) for (int s = 0; s < 10; s++) leg_tab[f][s] = -1;
    for (int s = 1; s <= 9; s++) leg_tab[0][s] = s - 1;           // A1: op1 op3 op17..op23
    for (int s = 1; s <= 6; s++) leg_tab[1][s] = s - 1;           // A2: op2 op4 op5..op8
    leg_tab[2][2] = 0; leg_tab[2][3] = 1; leg_tab[2][4] = 2; leg_tab[2][6] = 3;  // M1
    leg_tab[3][2] = 0; leg_tab[3][3] = 1; leg_tab[3][5] = 2; leg_tab[3][7] = 3;  // M2
    for (int f = 0; f < 4; f++) exp_dsel[f] = 0;

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int gap;
      gap = 1 + $urandom % 4;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        check(int'(busy), 0, "idle busy");
        check(int'(out_stb), 0, "idle out_stb");
        check_idle("idle");
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int c = 1; c <= 19; c++) begin
        int s, ph;
        s  = (c + 1) / 2;          // control step
        ph = (c + 1) % 2;          // 0: load cycle, 1: execute cycle
        check(int'(busy), 1, $sformatf("run%0d c%0d busy", run, c));
        check(int'(out_stb), (c == 19) ? 1 : 0, $sformatf("run%0d c%0d out_stb", run, c));
        if (c == 19) begin
          check_idle("out");
          check(int'(fc[0].dsel), 8, "out A1 dsel");
        end else begin
          for (int f = 0; f < 4; f++) begin
            int l;
            l = leg_tab[f][s];
            check(int'(fc[f].lstr), (ph == 0 && l >= 0) ? 1 : 0, $sformatf("c%0d fu%0d lstr", c, f));
            check(int'(fc[f].en),   (ph == 1 && l >= 0) ? 1 : 0, $sformatf("c%0d fu%0d en", c, f));
            check(int'(fc[f].ostr), (ph == 1 && l >= 0) ? 1 : 0, $sformatf("c%0d fu%0d ostr", c, f));
            if (ph == 0 && l >= 0) check(int'(fc[f].sel), l, $sformatf("c%0d fu%0d sel", c, f));
            check(int'(fc[f].dsel), exp_dsel[f], $sformatf("c%0d fu%0d dsel", c, f));
          end
          // register groups: A = Reg1, Reg2; B = Reg3..Reg5
          begin
            int wa, wb, ra, rb;
            wa = -1; wb = -1; ra = -1; rb = -1;
            for (int r = 0; r < 2; r++) begin
              if (wr_step[r] == s) wa = r;
              if (rd_step[r] == s) ra = r;
            end
            for (int r = 2; r < 5; r++) begin
              if (wr_step[r] == s) wb = r - 2;
              if (rd_step[r] == s) rb = r - 2;
            end
            check(int'(rc[0].str), (ph == 1 && wa >= 0) ? 1 : 0, $sformatf("c%0d str A", c));
            check(int'(rc[1].str), (ph == 1 && wb >= 0) ? 1 : 0, $sformatf("c%0d str B", c));
            if (wa >= 0) check(int'(rc[0].wsel), wa, $sformatf("c%0d wsel A", c));
            if (wb >= 0) check(int'(rc[1].wsel), wb, $sformatf("c%0d wsel B", c));
            if (ra >= 0) check(int'(rc[0].rsel), ra, $sformatf("c%0d rsel A", c));
            if (rb >= 0) check(int'(rc[1].rsel), rb, $sformatf("c%0d rsel B", c));
          end
          if (ph == 1)
            for (int f = 0; f < 4; f++) if (leg_tab[f][s] >= 0) exp_dsel[f] = leg_tab[f][s];
        end
        @(negedge clk);
      end
      check(int'(busy), 0, "busy after out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
