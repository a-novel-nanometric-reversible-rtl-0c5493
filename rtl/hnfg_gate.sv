// hnfg_gate: HNFG gate, 4x4 reversible; two independent Feynman gates.
// P = A, Q = A ^ B, R = C, S = C ^ D. With B = D = 0 it copies A and C, which
// is how the adders fan out result bits S1 and S2. Purely combinational.
// Standard definition of the gate; the design uses it by name.
module hnfg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = c;
  assign s = c ^ d;
endmodule
