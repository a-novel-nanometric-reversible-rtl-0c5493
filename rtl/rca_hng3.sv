// rca_hng3: three-bit reversible two's complement adder/subtractor built from
// HNG full adders, with its own operation decoder.
//
// ctrl_gen turns the two signs and the operation into Ctrl. When Ctrl = 0 the
// circuit computes {E, S} = A + B; when Ctrl = 1 it computes A + ~B + 1, the
// two's complement subtraction of the magnitudes, in which E = 1 means A >= B.
// A Feynman gate copies Ctrl onto a 0 line to make the carry-in. Then one
// Feynman gate per bit XORs Ctrl into B (B passes unchanged for an addition,
// inverted for a subtraction) and passes Ctrl on to the next. Three HNG gates
// with D = 0 form the ripple; each gives sum bit S_i and the next carry.
//
// Nine gates, four constant inputs (carry-in and three HNG D inputs) and nine
// lines besides S and E: A_s (a_s_out), A_s ^ B_s (g[0]), Ctrl after the last
// B gate (ctrl) and the two pass-through outputs of each HNG (g[6:1]). Used
// alone, all nine are garbage; the signed-magnitude design I reuses A_s and
// Ctrl, so they are ports of their own.
// Purely combinational; delay is the three-stage carry ripple.
module rca_hng3 (
  input  logic       c_fs,
  input  logic       a_s,
  input  logic       b_s,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic       a_s_out,
  output logic       ctrl,
  output logic [2:0] s,
  output logic       e,
  output logic [6:0] g
);
  logic       ctrl0, ctrl_c;
  logic [2:0] ctrl_b;  // Ctrl after each B gate
  logic [2:0] bx;     // B XOR Ctrl
  logic [3:0] c;      // carry chain, c[0] = carry-in

  ctrl_gen u_ctrl (.a_s(a_s), .b_s(b_s), .c_fs(c_fs),
                   .a_s_out(a_s_out), .g1(g[0]), .ctrl(ctrl0));

  // Carry-in = Ctrl.
  fg_gate u_fg_cin (.a(ctrl0), .b(1'b0), .p(ctrl_c), .q(c[0]));

  // Conditional inversion of B, Ctrl passed along the chain.
  fg_gate u_fg_b0 (.a(ctrl_c),    .b(b[0]), .p(ctrl_b[0]), .q(bx[0]));
  fg_gate u_fg_b1 (.a(ctrl_b[0]), .b(b[1]), .p(ctrl_b[1]), .q(bx[1]));
  fg_gate u_fg_b2 (.a(ctrl_b[1]), .b(b[2]), .p(ctrl_b[2]), .q(bx[2]));

  assign ctrl = ctrl_b[2];

  for (genvar i = 0; i < 3; i++) begin : g_bit
    hng_gate u_hng (.a(bx[i]), .b(a[i]), .c(c[i]), .d(1'b0),
                    .p(g[1+2*i]), .q(g[2+2*i]), .r(s[i]), .s(c[i+1]));
  end

  assign e = c[3];
endmodule
