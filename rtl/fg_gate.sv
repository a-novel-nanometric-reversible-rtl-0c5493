// fg_gate: Feynman gate (controlled NOT), the basic 2x2 reversible gate.
// P = A, Q = A ^ B. With B tied to 0 it copies A (reversible fan-out); with
// B tied to 1 it gives the complement of A on Q. Purely combinational.
// The function is the standard definition of the gate from the reversible
// logic literature; the design uses it by name.
module fg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
