// sm_addsub_top: the two reversible four-bit signed-magnitude
// adder/subtractors and the stand-alone zero comparator, side by side.
//
// Design I (sm_addsub_d1) subtracts magnitudes by two's complement with HNG
// full adders; design II (sm_addsub_d2) uses ADD/SUB full adder/subtractor
// gates. Both compute the same function and are alternatives: design I has
// the lower quantum cost, design II fewer gates. Each has its own operand
// port (rev_pkg::sm_op_t), result port (rev_pkg::sm_res_t) and garbage
// vector. The NLG/Peres zero comparator (zero_cmp_nlg) is a circuit on its
// own with its own ports; inside the adders a different Feynman/Peres
// comparator is used. Everything is combinational: results are valid one
// propagation delay after the operands change.
module sm_addsub_top
  import rev_pkg::*;
(
  input  sm_op_t                   d1_in,
  output sm_res_t                  d1_out,
  output logic [SM_GARB-1:0]       d1_garbage,
  input  sm_op_t                   d2_in,
  output sm_res_t                  d2_out,
  output logic [SM_GARB-1:0]       d2_garbage,
  input  logic [MAG_W-1:0]         zc_s,
  output logic                     zc_f,
  output logic [ZC_GARB-1:0]       zc_garbage
);
  sm_addsub_d1 u_design1 (
    .c_fs(d1_in.c_fs), .a_s(d1_in.a_s), .a(d1_in.a), .b_s(d1_in.b_s), .b(d1_in.b),
    .s_s(d1_out.s_s), .e(d1_out.e), .s(d1_out.s), .g(d1_garbage));

  sm_addsub_d2 u_design2 (
    .c_fs(d2_in.c_fs), .a_s(d2_in.a_s), .a(d2_in.a), .b_s(d2_in.b_s), .b(d2_in.b),
    .s_s(d2_out.s_s), .e(d2_out.e), .s(d2_out.s), .g(d2_garbage));

  zero_cmp_nlg u_zero_cmp (.s(zc_s), .f(zc_f), .g(zc_garbage));
endmodule
