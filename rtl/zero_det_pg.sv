// zero_det_pg: three-bit zero detector used inside both adder/subtractors.
// F(A=B) = ~S2 & ~S1 & ~S0 tells, after a magnitude subtraction with no
// borrow, that the operands were equal, so the result sign can be forced
// positive. S0 and S2 are inverted by NOT gates; S1 is inverted by a Feynman
// gate with a 1 input, which also passes S1 on. A Peres gate with a 0 input
// ANDs ~S0 and ~S1, a second one ANDs that with ~S2. The complemented S0 and
// S2 lines leaving the Peres gates are inverted back, so all three bits come
// out again on s_out for the result multiplexers. Garbage g[1:0] holds g8, g9
// (the A ^ B outputs of the Peres gates). Constant inputs: three.
// Purely combinational. The gates follow the published adder circuits; the
// order of the two inputs of each Peres gate is this design's choice (the
// AND output does not depend on it).
module zero_det_pg (
  input  logic [2:0] s,
  output logic [2:0] s_out,
  output logic       f,
  output logic [1:0] g
);
  logic n0, n1, n2, nz01, p8, p9;

  assign n0 = ~s[0];
  assign n2 = ~s[2];

  fg_gate u_fg_s1 (.a(s[1]), .b(1'b1), .p(s_out[1]), .q(n1));
  pg_gate u_pg_8  (.a(n0), .b(n1),   .c(1'b0), .p(p8), .q(g[0]), .r(nz01));
  pg_gate u_pg_9  (.a(n2), .b(nz01), .c(1'b0), .p(p9), .q(g[1]), .r(f));

  assign s_out[0] = ~p8;
  assign s_out[2] = ~p9;
endmodule
