// addsub_gate: ADD/SUB gate, 4x4 reversible full adder / full subtractor.
// P = A ^ B ^ C (sum or difference), R = A, S = F ^ B. Q is the carry of
// A + B + C when F = 0 (AB ^ AC ^ BC) and the borrow of A - B - C when F = 1
// (~A B ^ ~A C ^ BC). Both cases are written here as one expression with A
// replaced by A ^ F, which is this design's way of combining the two
// printed per-mode equations. Purely combinational.
module addsub_gate (
  input  logic f,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic af;
  assign af = a ^ f;
  assign p  = a ^ b ^ c;
  assign q  = (af & b) ^ (af & c) ^ (b & c);
  assign r  = a;
  assign s  = f ^ b;
endmodule
