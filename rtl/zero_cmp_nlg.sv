// zero_cmp_nlg: stand-alone reversible comparator of a three-bit number with
// zero. Each bit S_i goes through an NLG gate with a 0 input, whose Q output
// is XNOR(S_i, 0) = ~S_i. A Peres gate with a 0 input ANDs ~S0 and ~S1, a
// second Peres gate ANDs that with ~S2, giving F(A=B) = 1 exactly when S = 0.
// Five gates, five constant inputs, seven garbage outputs g[6:0] = g1..g7:
// the three NLG pass-throughs, then the P and Q outputs of each Peres gate.
// Purely combinational. The gate structure and counts are the published
// ones; F is the AND of the complemented bits, which is what a comparison
// with zero needs, and the Peres input order is this design's choice.
module zero_cmp_nlg (
  input  logic [2:0] s,
  output logic       f,
  output logic [6:0] g
);
  logic [2:0] n;   // complemented bits
  logic       nz01;

  for (genvar i = 0; i < 3; i++) begin : g_inv
    nlg_gate u_nlg (.a(s[i]), .b(1'b0), .p(g[i]), .q(n[i]));
  end

  pg_gate u_pg_0 (.a(n[0]), .b(n[1]), .c(1'b0), .p(g[3]), .q(g[4]), .r(nz01));
  pg_gate u_pg_1 (.a(nz01), .b(n[2]), .c(1'b0), .p(g[5]), .q(g[6]), .r(f));
endmodule
