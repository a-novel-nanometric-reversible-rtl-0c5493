// sm_addsub_d2: four-bit reversible signed-magnitude adder/subtractor,
// design II (direct subtraction with ADD/SUB gates).
//
// Same interface and result format as design I: operands are sign plus
// three-bit magnitude, c_fs selects A + B (0) or A - B (1), the result is
// S_s, E, S2..S0 with E the fourth magnitude bit of an addition.
//
// How it differs from design I:
//  * ctrl_gen gives Ctrl = A_s ^ B_s ^ C_F/S; rca_asg3 computes A + B with
//    carry E (Ctrl = 0) or A - B with borrow E (Ctrl = 1), so after a
//    subtraction E = 1 now means A < B and E = 0 means A >= B.
//  * Hence the multiplexer F1 takes its data inputs the other way round:
//    S_s* (0 if S = 0, else A_s) when E = 0 and ~A_s when E = 1.
//  * The correction control is K = ~(Ctrl & E), made by a Feynman gate with a
//    0 input, a Peres gate and a NOT. Fredkin gates F4..F6 pass S when K = 1
//    and the two's complement of S (from the two's complement gate) when
//    K = 0, i.e. only for a subtraction that borrowed.
//  * F3 passes E only for a magnitude addition, as in design I.
// The zero detector, the two's complement gate, the result fan-out and the
// sign path are as in design I. 23 reversible gates, 17 constant inputs and
// 21 garbage outputs on g[20:0] = g1..g21. Fredkin data-input order and the
// choice of garbage outputs follow the function where the gate diagram does
// not show them. Purely combinational: no clock, no reset.
module sm_addsub_d2 (
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
  logic       as_l, ctrl;
  logic [1:0] ctrl2;
  logic [2:0] sr;
  logic       er;
  logic       s0a, s0b, s1a, s1b, s2a, s2b;
  logic [2:0] t;
  logic [2:0] sz;
  logic       f_eq;
  logic       as_a, as_b, as_n;
  logic       ss_star, f1o;
  logic       e1, e1c, e2;
  logic       ctrl_c, k_n, k, k1, k2;

  ctrl_gen u_ctrl (.a_s(a_s), .b_s(b_s), .c_fs(c_fs),
                   .a_s_out(as_l), .g1(g[0]), .ctrl(ctrl));
  rca_asg3 u_rca  (.ctrl(ctrl), .a(a), .b(b),
                   .ctrl_out(ctrl2), .s(sr), .e(er), .g(g[6:1]));

  fg_gate   u_fg_s0 (.a(sr[0]), .b(1'b0), .p(s0a), .q(s0b));
  hnfg_gate u_hnfg  (.a(sr[1]), .b(1'b0), .c(sr[2]), .d(1'b0),
                     .p(s1a), .q(s1b), .r(s2a), .s(s2b));

  tcg_gate    u_tcg (.a(s0a), .b(s1a), .c(s2a), .p(t[0]), .q(t[1]), .r(t[2]));
  zero_det_pg u_zd  (.s({s2b, s1b, s0b}), .s_out(sz), .f(f_eq), .g(g[8:7]));

  // Sign selection, F1 inputs swapped with respect to design I.
  f2g_gate u_f2g (.a(as_l), .b(1'b0), .c(1'b1), .p(as_a), .q(as_b), .r(as_n));
  frg_gate u_mux (.a(f_eq), .b(as_b), .c(1'b0), .p(g[10]), .q(ss_star), .r(g[11]));
  fg_gate  u_fg_e (.a(er), .b(1'b0), .p(e1), .q(e1c));
  frg_gate u_f1  (.a(e1), .b(ss_star), .c(as_n), .p(e2), .q(f1o), .r(g[12]));
  frg_gate u_f2  (.a(ctrl2[0]), .b(as_a), .c(f1o), .p(g[13]), .q(s_s), .r(g[14]));

  // K = ~(Ctrl & E).
  pg_gate  u_pg_k (.a(ctrl2[1]), .b(e1c), .c(1'b0), .p(ctrl_c), .q(g[9]), .r(k_n));
  assign k = ~k_n;

  frg_gate u_f3 (.a(ctrl_c), .b(e2), .c(1'b0), .p(g[15]), .q(e), .r(g[16]));

  // Result correction: S for K = 1, its two's complement for K = 0.
  frg_gate u_f4 (.a(k),  .b(t[2]), .c(sz[2]), .p(k1),    .q(s[2]), .r(g[17]));
  frg_gate u_f5 (.a(k1), .b(t[1]), .c(sz[1]), .p(k2),    .q(s[1]), .r(g[18]));
  frg_gate u_f6 (.a(k2), .b(t[0]), .c(sz[0]), .p(g[19]), .q(s[0]), .r(g[20]));
endmodule
