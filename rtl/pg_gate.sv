// pg_gate: Peres gate, 3x3 reversible.
// P = A, Q = A ^ B, R = (A & B) ^ C. With C = 0 the R output is the AND of A
// and B, which is how the zero detectors and the K control signal use it.
// Purely combinational. Standard definition of the gate; the design uses it
// by name.
module pg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
