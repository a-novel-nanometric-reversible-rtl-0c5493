// rca_asg3: three-bit reversible ripple adder/subtractor built from ADD/SUB
// gates.
//
// The operation line ctrl (0: add, 1: subtract) is fanned out by two double
// Feynman gates with 0 inputs into five lines. Three of them drive the F
// inputs of the ADD/SUB gates, which then act as full adders (ctrl = 0) or
// full subtractors (ctrl = 1); the other two leave on ctrl_out[1:0] for later
// logic. The carry/borrow input of bit 0 is the constant 0. The result is
// S = A + B with carry E, or S = A - B (modulo 8) with borrow E, so in a
// subtraction E = 1 means A < B. Garbage g[5:0] holds g2..g7, the R (= A) and
// S (= F ^ B) outputs of the three ADD/SUB gates. Constant inputs: five.
// Purely combinational; delay is the three-stage carry/borrow ripple.
// Gates and constants follow the published design II circuit; which F2G
// output feeds which ADD/SUB gate is this design's choice.
module rca_asg3 (
  input  logic       ctrl,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [1:0] ctrl_out,
  output logic [2:0] s,
  output logic       e,
  output logic [5:0] g
);
  logic       ctrl_p;
  logic [2:0] f;      // Ctrl copies for the three ADD/SUB gates
  logic [3:0] c;      // carry/borrow chain

  f2g_gate u_f2g_0 (.a(ctrl),   .b(1'b0), .c(1'b0), .p(ctrl_p), .q(f[0]), .r(f[1]));
  f2g_gate u_f2g_1 (.a(ctrl_p), .b(1'b0), .c(1'b0), .p(f[2]), .q(ctrl_out[0]), .r(ctrl_out[1]));

  assign c[0] = 1'b0;

  for (genvar i = 0; i < 3; i++) begin : g_bit
    addsub_gate u_as (.f(f[i]), .a(a[i]), .b(b[i]), .c(c[i]),
                      .p(s[i]), .q(c[i+1]), .r(g[2*i]), .s(g[2*i+1]));
  end

  assign e = c[3];
endmodule
