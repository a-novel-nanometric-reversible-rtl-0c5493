// tb_sm_addsub_top: end-to-end testbench of the top level at its default
// (and only) configuration.
//
// Every one of the 512 operations (operation select, two signs, two
// magnitudes) is applied to design I and, in a different order, to design II,
// while the zero comparator sees a third sequence. Both results must match
// the signed-magnitude algorithm, and the
// comparator must flag exactly the zero inputs. The mechanisms of the design
// are counted and each must occur at least once: magnitude addition, carry
// into E (the overflow of a three-bit magnitude), magnitude subtraction with
// |A| > |B|, the forced positive sign for |A| = |B|, the two's complement
// correction for |A| < |B|, and both answers of the zero comparator.
module tb_sm_addsub_top;
  import rev_pkg::*;
  import sm_ref_pkg::*;

  sm_op_t             d1_in, d2_in;
  sm_res_t            d1_out, d2_out, want;
  logic [SM_GARB-1:0] d1_garbage, d2_garbage;
  logic [MAG_W-1:0]   zc_s;
  logic               zc_f;
  logic [ZC_GARB-1:0] zc_garbage;
  int checks = 0, failures = 0;
  int n_add = 0, n_carry = 0, n_gt = 0, n_eq = 0, n_twos = 0, n_zero = 0, n_nonzero = 0;

  sm_addsub_top dut (.d1_in(d1_in), .d1_out(d1_out), .d1_garbage(d1_garbage),
                     .d2_in(d2_in), .d2_out(d2_out), .d2_garbage(d2_garbage),
                     .zc_s(zc_s), .zc_f(zc_f), .zc_garbage(zc_garbage));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      d1_in = sm_op_t'(9'(v));
      d2_in = sm_op_t'(9'(v * 5 + 3));   // another permutation of all 512
      zc_s  = 3'(v / 3);
      #1;
      want = sm_ref(d1_in);
      checks += 3;
      if (d1_out !== want) begin failures++; $display("FAIL design I op=%b got %b want %b", d1_in, d1_out, want); end
      if (d2_out !== sm_ref(d2_in)) begin failures++; $display("FAIL design II op=%b got %b", d2_in, d2_out); end
      checks++;
      if (zc_f !== (zc_s == 0)) begin failures++; $display("FAIL zero comparator s=%0d", zc_s); end
      // Mechanism counters (design I; design II sees the same set of
      // operations in another order).
      if ((d1_in.a_s != d1_in.b_s) == d1_in.c_fs) begin
        n_add++;
        if (d1_out.e) n_carry++;
      end else if (d1_in.a > d1_in.b) n_gt++;
      else if (d1_in.a == d1_in.b) begin
        if (d1_in.a_s && !d1_out.s_s) n_eq++;   // sign forced to +
      end else if (d1_out.s == 3'(int'(d1_in.b) - int'(d1_in.a))) n_twos++;
      if (zc_f) n_zero++; else n_nonzero++;
    end
    checks += 7;
    if (n_add == 0)     failures++;
    if (n_carry == 0)   failures++;
    if (n_gt == 0)      failures++;
    if (n_eq == 0)      failures++;
    if (n_twos == 0)    failures++;
    if (n_zero == 0)    failures++;
    if (n_nonzero == 0) failures++;
    $display("mechanisms: add=%0d carry=%0d a_gt_b=%0d a_eq_b_sign_fix=%0d twos_complement=%0d zero=%0d nonzero=%0d",
             n_add, n_carry, n_gt, n_eq, n_twos, n_zero, n_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
