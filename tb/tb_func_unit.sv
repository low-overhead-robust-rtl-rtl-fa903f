// tb_func_unit: self-checking test of the adder and multiplier units:
// random operands, results compared with the low 16 bits of the sum or
// product computed in 32 bits by the testbench, and zero output when the
// unit is not enabled.
module tb_func_unit;
  import fir_sig_pkg::*;
  localparam int W = 16;
  logic en;
  logic [W-1:0] a, b, y_add, y_mul;
  int checks = 0, failures = 0;

  func_unit                            u_add (.en, .a, .b, .y(y_add));
  func_unit #(.OP(OP_MUL), .W(W))      u_mul (.en, .a, .b, .y(y_mul));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, got, exp);
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
    for (int i = 0; i < 1000; i++) begin
      int unsigned ua, ub, s, p;
      en = (i % 5) != 0;
      a  = (i < 4) ? 16'hFFFF : W'($urandom);
      b  = (i < 4) ? W'(i)    : W'($urandom);
      ua = a; ub = b;
      s  = ua + ub;
      p  = ua * ub;
      #1;
      check(y_add, en ? s[15:0] : 16'h0, "add");
      check(y_mul, en ? p[15:0] : 16'h0, "mul");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
