// fir_sig_core: 8-tap FIR filter core whose register-transfer structure
// carries the owner's signature.
//
// Function: y = sum over k = 1..8 of (IN_k + PRE_K_k) * COEF_k, modulo 2^16.
// The data-flow graph has 8 pre-additions (op1..op8), 8 multiplications
// (op9..op16) and a chain of 7 accumulating additions (op17..op23). It runs
// on two adders (A1, A2) and two multipliers (M1, M2) in nine control steps,
// with the binding and step of every operation taken from the document.
// Products that wait more than one step sit in intermediate registers
// Reg1..Reg5.
//
// Signature: the owner's signature is a string of theta, phi and omega
// digits. The THETA-th first multiplexers, in the order A1 left, A1 right,
// A2 left, A2 right, M1 left, M1 right, M2 left, M2 right, are built as two
// half-size multiplexers plus a 2:1; the PHI first de-multiplexers (A1, A2,
// M1, M2) as a 1:2 plus two half-size ones; the first omega digit merges
// Reg1 and Reg2 into one register and the second merges Reg3, Reg4 and Reg5.
// The defaults THETA = 8, PHI = 4, OMEGA = 2 are the 14-digit signature of
// the document's example; THETA = 2, PHI = 1, OMEGA = 0 is its minimum
// signature and all zero is the unprotected datapath. The signature changes
// the structure only: y is the same for every setting.
//
// Interface: pulse start while busy is low with the eight samples on x
// (x[k-1] is IN_k); keep x steady while busy is high. y_valid is high for one
// cycle with the result on y, 20 cycles after the cycle in which start was
// seen (9 control steps of 2 cycles, one output cycle, one capture). The
// per-tap constants PRE_K and COEF, the 16-bit width, the start/busy/valid
// handshake and the output register are this design's choices.
// Legs 9..15 of A1 and 6..7 of A2 carry no operation: their multiplexer
// inputs are tied to zero and their de-multiplexer outputs are left unread,
// which lint reports as unused bits.
module fir_sig_core
  import fir_sig_pkg::*;
#(
  parameter int unsigned THETA = 8,
  parameter int unsigned PHI   = 4,
  parameter int unsigned OMEGA = 2,
  parameter tap_vec_t    PRE_K = PRE_K_DEF,
  parameter tap_vec_t    COEF  = COEF_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [TAPS-1:0][DATA_W-1:0] x,
  output logic [DATA_W-1:0]           y,
  output logic                   y_valid,
  output logic                   busy
);
  if (THETA > 8 || PHI > 4 || OMEGA > 2) begin : g_bad_size
    $error("fir_sig_core: at most 8 theta, 4 phi and 2 omega digits fit this datapath");
  end
  if (THETA != 2 * PHI) begin : g_bad_ratio
    $error("fir_sig_core: a signature holds twice as many theta digits as phi digits");
  end

  fu_ctrl_t  [NFU-1:0] fu_ctrl;
  reg_ctrl_t [1:0]     reg_ctrl;
  logic                out_stb;

  logic [N_A1-1:0][DATA_W-1:0] a1_l, a1_r, a1_o;
  logic [N_A2-1:0][DATA_W-1:0] a2_l, a2_r, a2_o;
  logic [N_M-1:0][DATA_W-1:0]  m1_l, m1_r, m1_o;
  logic [N_M-1:0][DATA_W-1:0]  m2_l, m2_r, m2_o;
  logic [1:0][DATA_W-1:0]      rga_d, rga_q;   // Reg1, Reg2
  logic [2:0][DATA_W-1:0]      rgb_d, rgb_q;   // Reg3, Reg4, Reg5

  fir_controller u_ctrl (
    .clk, .rst_n, .start,
    .fu_ctrl(fu_ctrl), .reg_ctrl(reg_ctrl), .out_stb(out_stb), .busy(busy)
  );

  // ---- operand wiring: leg i of a unit belongs to its i-th operation ----
  always_comb begin
    a1_l = '0;
    a1_r = '0;
    // op1 = IN1 + K1, op3 = IN3 + K3
    a1_l[0] = x[0];        a1_r[0] = PRE_K[0];
    a1_l[1] = x[2];        a1_r[1] = PRE_K[2];
    // op17 = op9 + op10, op18 = op17 + op11
    a1_l[2] = m1_o[0];     a1_r[2] = m2_o[0];
    a1_l[3] = a1_o[2];     a1_r[3] = m1_o[1];
    // op19..op23 = previous sum + Reg1..Reg5
    a1_l[4] = a1_o[3];     a1_r[4] = rga_q[0];
    a1_l[5] = a1_o[4];     a1_r[5] = rga_q[1];
    a1_l[6] = a1_o[5];     a1_r[6] = rgb_q[0];
    a1_l[7] = a1_o[6];     a1_r[7] = rgb_q[1];
    a1_l[8] = a1_o[7];     a1_r[8] = rgb_q[2];

    // op2, op4, op5, op6, op7, op8 = IN_k + K_k
    a2_l = '0;
    a2_r = '0;
    a2_l[0] = x[1];  a2_r[0] = PRE_K[1];
    a2_l[1] = x[3];  a2_r[1] = PRE_K[3];
    a2_l[2] = x[4];  a2_r[2] = PRE_K[4];
    a2_l[3] = x[5];  a2_r[3] = PRE_K[5];
    a2_l[4] = x[6];  a2_r[4] = PRE_K[6];
    a2_l[5] = x[7];  a2_r[5] = PRE_K[7];

    // M1: op9 = op1*C1, op11 = op3*C3, op13 = op5*C5, op15 = op7*C7
    m1_l = {a2_o[4], a2_o[2], a1_o[1], a1_o[0]};
    m1_r = {COEF[6], COEF[4], COEF[2], COEF[0]};
    // M2: op10 = op2*C2, op12 = op4*C4, op14 = op6*C6, op16 = op8*C8
    m2_l = {a2_o[5], a2_o[3], a2_o[1], a2_o[0]};
    m2_r = {COEF[7], COEF[5], COEF[3], COEF[1]};

    // Reg1 <- op12, Reg2 <- op13; Reg3 <- op14, Reg4 <- op15, Reg5 <- op16
    rga_d = {m1_o[2], m2_o[1]};
    rgb_d = {m2_o[3], m1_o[3], m2_o[2]};
  end

  fu_slice #(.OP(OP_ADD), .N(N_A1), .W(DATA_W),
             .SPLIT_L(THETA > 0), .SPLIT_R(THETA > 1), .SPLIT_D(PHI > 0)) u_a1 (
    .clk, .rst_n, .ctrl(fu_ctrl[FU_A1]), .in_l(a1_l), .in_r(a1_r), .out(a1_o));

  fu_slice #(.OP(OP_ADD), .N(N_A2), .W(DATA_W),
             .SPLIT_L(THETA > 2), .SPLIT_R(THETA > 3), .SPLIT_D(PHI > 1)) u_a2 (
    .clk, .rst_n, .ctrl(fu_ctrl[FU_A2]), .in_l(a2_l), .in_r(a2_r), .out(a2_o));

  fu_slice #(.OP(OP_MUL), .N(N_M), .W(DATA_W),
             .SPLIT_L(THETA > 4), .SPLIT_R(THETA > 5), .SPLIT_D(PHI > 2)) u_m1 (
    .clk, .rst_n, .ctrl(fu_ctrl[FU_M1]), .in_l(m1_l), .in_r(m1_r), .out(m1_o));

  fu_slice #(.OP(OP_MUL), .N(N_M), .W(DATA_W),
             .SPLIT_L(THETA > 6), .SPLIT_R(THETA > 7), .SPLIT_D(PHI > 3)) u_m2 (
    .clk, .rst_n, .ctrl(fu_ctrl[FU_M2]), .in_l(m2_l), .in_r(m2_r), .out(m2_o));

  reg_group #(.NREG(2), .W(DATA_W), .SHARED(OMEGA > 0)) u_rga (
    .clk, .rst_n, .ctrl(reg_ctrl[0]), .d(rga_d), .q(rga_q));

  reg_group #(.NREG(3), .W(DATA_W), .SHARED(OMEGA > 1)) u_rgb (
    .clk, .rst_n, .ctrl(reg_ctrl[1]), .d(rgb_d), .q(rgb_q));

  // OUT leg of A1's de-multiplexer (op23) captured into the output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= out_stb;
      if (out_stb) y <= a1_o[8];
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
