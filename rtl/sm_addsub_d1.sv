// sm_addsub_d1: four-bit reversible signed-magnitude adder/subtractor,
// design I (two's complement subtraction with HNG gates).
//
// Operands are sign plus three-bit magnitude (-7..+7); c_fs selects A + B (0)
// or A - B (1). The result is S_s, E, S2..S0: a sign and a four-bit magnitude,
// so every sum or difference of two operands in range is exact and E = 1
// flags that the magnitude exceeded 7 (overflow of a three-bit result).
//
// How it works, following the signed-magnitude flowchart:
//  * rca_hng3 decodes Ctrl = A_s ^ B_s ^ C_F/S and forms {E, S} = A + B
//    (Ctrl = 0) or A + ~B + 1 (Ctrl = 1). In the second case E = 1 means
//    A >= B and E = 0 means A < B. A Feynman gate with a 0 input turns the
//    Ctrl line it passes on into two, one for F2 and one for K.
//  * S0 is copied by a Feynman gate and S1, S2 by an HNFG gate. One copy goes
//    to the two's complement gate (giving 2'S = -S mod 8), the other through
//    the zero detector zero_det_pg (F(A=B) = 1 when S = 0).
//  * Sign: a double Feynman gate gives two copies of A_s and its complement.
//    A Fredkin gate selects S_s* = 0 when S = 0, else A_s. Fredkin F1, driven
//    by E, selects S_s* (E = 1) or ~A_s (E = 0); Fredkin F2, driven by Ctrl,
//    selects A_s for a magnitude addition or the F1 output for a subtraction.
//  * K = Ctrl & ~E (Feynman gate with a 1 input, then a Peres gate). Fredkin
//    gates F4..F6, driven by K, pass S or replace it by its two's complement
//    when A < B. Fredkin F3 passes E only when Ctrl = 0, so E is the carry of
//    an addition and 0 after a subtraction.
// The netlist has 26 reversible gates (NOT gates not counted), 17 constant
// inputs and 21 garbage outputs on g[20:0] = g1..g21. Line-for-line it follows
// the published gate diagram; where that diagram does not show which data
// input of a Fredkin gate or which output of a gate is garbage, the choice
// made here is the one that gives the flowchart's function. The Ctrl fan-out
// gate sits after the ripple adder rather than before it, so that the adder
// is the stand-alone three-bit circuit with its own four constant inputs;
// gate, constant and garbage counts are unchanged.
// Purely combinational: no clock, no reset.
module sm_addsub_d1 (
  input  logic       c_fs,
  input  logic       a_s,
  input  logic [2:0] a,
  input  logic       b_s,
  input  logic [2:0] b,
  output logic       s_s,
  output logic       e,
  output logic [2:0] s,
  output logic [20:0] g
);
  logic       as_l;
  logic       ctrl0;
  logic [1:0] ctrl;
  logic [2:0] sr;                 // raw magnitude from the ripple
  logic       er;                 // raw carry
  logic       s0a, s0b, s1a, s1b, s2a, s2b;
  logic [2:0] t;                  // two's complement of sr
  logic [2:0] sz;                 // sr after the zero detector
  logic       f_eq;               // F(A=B)
  logic       as_a, as_b, as_n;   // A_s copies and complement
  logic       ss_star, f1o;
  logic       e1, e_n, e2;
  logic       ctrl_c, k, k1, k2;

  rca_hng3 u_rca (.c_fs(c_fs), .a_s(a_s), .b_s(b_s), .a(a), .b(b),
                  .a_s_out(as_l), .ctrl(ctrl0), .s(sr), .e(er), .g(g[6:0]));

  // Second Ctrl line for the sign and correction logic.
  fg_gate   u_fg_ctrl (.a(ctrl0), .b(1'b0), .p(ctrl[0]), .q(ctrl[1]));

  // Fan-out of the raw result.
  fg_gate   u_fg_s0 (.a(sr[0]), .b(1'b0), .p(s0a), .q(s0b));
  hnfg_gate u_hnfg  (.a(sr[1]), .b(1'b0), .c(sr[2]), .d(1'b0),
                     .p(s1a), .q(s1b), .r(s2a), .s(s2b));

  tcg_gate    u_tcg (.a(s0a), .b(s1a), .c(s2a), .p(t[0]), .q(t[1]), .r(t[2]));
  zero_det_pg u_zd  (.s({s2b, s1b, s0b}), .s_out(sz), .f(f_eq), .g(g[8:7]));

  // Sign selection.
  f2g_gate u_f2g (.a(as_l), .b(1'b0), .c(1'b1), .p(as_a), .q(as_b), .r(as_n));
  frg_gate u_mux (.a(f_eq), .b(as_b), .c(1'b0), .p(g[10]), .q(ss_star), .r(g[11]));
  fg_gate  u_fg_e (.a(er), .b(1'b1), .p(e1), .q(e_n));
  frg_gate u_f1  (.a(e1), .b(as_n), .c(ss_star), .p(e2), .q(f1o), .r(g[12]));
  frg_gate u_f2  (.a(ctrl[0]), .b(as_a), .c(f1o), .p(g[13]), .q(s_s), .r(g[14]));

  // K = Ctrl & ~E selects the two's complement of S.
  pg_gate  u_pg_k (.a(ctrl[1]), .b(e_n), .c(1'b0), .p(ctrl_c), .q(g[9]), .r(k));

  // Carry out only for a magnitude addition.
  frg_gate u_f3 (.a(ctrl_c), .b(e2), .c(1'b0), .p(g[15]), .q(e), .r(g[16]));

  // Result correction.
  frg_gate u_f4 (.a(k),  .b(sz[2]), .c(t[2]), .p(k1),    .q(s[2]), .r(g[17]));
  frg_gate u_f5 (.a(k1), .b(sz[1]), .c(t[1]), .p(k2),    .q(s[1]), .r(g[18]));
  frg_gate u_f6 (.a(k2), .b(sz[0]), .c(t[0]), .p(g[19]), .q(s[0]), .r(g[20]));
endmodule
