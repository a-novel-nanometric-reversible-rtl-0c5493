// frg_gate: Fredkin gate (controlled swap), 3x3 reversible.
// P = A; when A = 0, Q = B and R = C; when A = 1 the two data lines are
// swapped, Q = C and R = B. Q therefore acts as a 2:1 multiplexer with A as
// select (B for A = 0, C for A = 1) and R carries the other input as garbage.
// Purely combinational. Standard definition of the gate; the design uses it
// by name, as a multiplexer for the sign bit and for the final result.
module frg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & b);
endmodule
