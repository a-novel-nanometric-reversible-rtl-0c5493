// hng_gate: HNG gate, 4x4 reversible full adder.
// P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D = 0, R is the sum and S the carry of A + B + C; P and Q are garbage.
// Purely combinational. Standard definition of the gate; the design uses it
// by name as the cell of its ripple adder/subtractor.
module hng_gate (
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
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
