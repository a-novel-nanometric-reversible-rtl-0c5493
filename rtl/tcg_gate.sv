// tcg_gate: the two's complement gate, a 3x3 reversible one-through gate.
// P = A, Q = A ^ B, R = A ^ B ^ C ^ (A & B).
// Since A ^ B ^ (A & B) = A | B, R = (A | B) ^ C. Fed with a three-bit value
// A = S0, B = S1, C = S2 the outputs are the two's complement of S: bit 0 is
// unchanged, bit 1 flips when bit 0 is set, bit 2 flips when either lower bit
// is set. The gate is its own inverse. Purely combinational. The equations
// and the use on S0..S2 are the published ones; nothing here is a choice.
module tcg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ b ^ c ^ (a & b);
endmodule
