// f2g_gate: double Feynman gate, 3x3 reversible.
// P = A, Q = A ^ B, R = A ^ C: A is XORed onto both other lines. With B = 0
// and C = 0 it makes two copies of A; with B = 0 and C = 1 it makes a copy
// and a complement. Purely combinational. Standard definition of the gate;
// the design uses it by name.
module f2g_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
