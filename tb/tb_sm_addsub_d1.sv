// tb_sm_addsub_d1: exhaustive self-checking testbench for the reversible
// signed-magnitude adder/subtractor, design I (HNG gates, two's complement subtraction).
//
// All 512 combinations of operation, signs and magnitudes are applied. Each
// result is compared with the signed-magnitude algorithm (sm_ref_pkg) and,
// as an integer, with the true sum or difference. It also checks that no
// operation without a negative-zero operand returns -0, that no two inputs
// give the same 26-bit pattern of result and garbage lines (the circuit is
// reversible once its constant inputs are fixed), and one published
// simulation point: As=1 A=2 Bs=1 B=6 C_F/S=0 gives S_s=1 E=1 S=0 (-2 + -6 = -8).
// The paths of the algorithm (magnitude add with and without carry,
// |A| > |B|, |A| = |B|, |A| < |B|) are counted and each must occur.
module tb_sm_addsub_d1;
  import rev_pkg::*;
  import sm_ref_pkg::*;

  sm_op_t  op;
  sm_res_t res, want;
  logic [SM_GARB-1:0] g;
  logic [SM_GARB+4:0] pattern [512];
  int checks = 0, failures = 0;
  int n_add = 0, n_ovf = 0, n_gt = 0, n_eq = 0, n_lt = 0;

  sm_addsub_d1 dut (.c_fs(op.c_fs), .a_s(op.a_s), .a(op.a), .b_s(op.b_s), .b(op.b),
                     .s_s(res.s_s), .e(res.e), .s(res.s), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      op = sm_op_t'(9'(v));
      #1;
      want = sm_ref(op);
      pattern[v] = {res, g};
      if ((op.a_s != op.b_s) == op.c_fs) begin
        n_add++;
        if (res.e) n_ovf++;
      end else if (op.a > op.b)  n_gt++;
      else if (op.a == op.b)     n_eq++;
      else                       n_lt++;
      checks += 2;
      if (res !== want) begin
        failures++;
        $display("FAIL op=%b got %b expected %b", op, res, want);
      end
      if (!value_ok(op, res)) begin
        failures++;
        $display("FAIL op=%b value", op);
      end
      if (!(op.a_s && op.a == 0) && !(op.b_s && op.b == 0)) begin
        checks++;
        if (res.s_s && {res.e, res.s} == 0) begin
          failures++;
          $display("FAIL op=%b negative zero", op);
        end
      end
    end
    // Reversibility: all 512 output patterns distinct.
    for (int i = 0; i < 512; i++)
      for (int j = i + 1; j < 512; j++)
        if (pattern[i] == pattern[j]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same outputs", i, j);
        end
    checks++;
    // Published simulation point.
    op = {1'b0, 1'b1, 3'd2, 1'b1, 3'd6};
    #1;
    checks++;
    if (res !== {1'b1, 1'b1, 3'd0}) begin
      failures++;
      $display("FAIL published point got %b", res);
    end
    checks += 5;
    if (n_add == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_gt == 0)  failures++;
    if (n_eq == 0)  failures++;
    if (n_lt == 0)  failures++;
    $display("paths: add=%0d overflow=%0d gt=%0d eq=%0d lt=%0d", n_add, n_ovf, n_gt, n_eq, n_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
