// ctrl_gen: operation decoder of the signed-magnitude adder/subtractor.
// Magnitudes are added when the signs agree in an addition or differ in a
// subtraction, and subtracted otherwise, so the magnitude operation is
// Ctrl = A_s ^ B_s ^ C_F/S (0: add magnitudes, 1: subtract them).
// Two cascaded Feynman gates compute it: the first puts A_s ^ B_s on the B_s
// line and passes A_s on, the second XORs that onto the C_F/S line.
// Inputs a_s, b_s, c_fs; outputs a_s_out (A_s, reused by the sign logic),
// g1 (A_s ^ B_s, garbage) and ctrl. Purely combinational, no constant inputs.
// The two-gate structure is the published one; bringing A_s out as a port
// (it is garbage when the decoder is used alone) is this design's choice.
module ctrl_gen (
  input  logic a_s,
  input  logic b_s,
  input  logic c_fs,
  output logic a_s_out,
  output logic g1,
  output logic ctrl
);
  logic sx;  // A_s ^ B_s

  fg_gate u_fg_signs (.a(a_s), .b(b_s),  .p(a_s_out), .q(sx));
  fg_gate u_fg_op    (.a(sx),  .b(c_fs), .p(g1),      .q(ctrl));
endmodule
