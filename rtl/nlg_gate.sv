// nlg_gate: NLG gate, 2x2 reversible.
// P = A, Q = (~A & ~B) ^ (A & B), i.e. the XNOR of A and B. With B = 0, Q is
// the complement of A, which the zero comparator uses to invert each result
// bit. Equivalent to a Feynman gate followed by a NOT on Q. Purely
// combinational. The equations are the published ones.
module nlg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = (~a & ~b) ^ (a & b);
endmodule
