// sm_ref_pkg: reference model of four-bit signed-magnitude addition and
// subtraction for the testbenches, written from the algorithm and not from
// any circuit.
//
// The magnitudes are added when the operand signs agree for an addition or
// differ for a subtraction; the result then takes the sign of A and a
// four-bit magnitude. Otherwise the smaller magnitude is subtracted from the
// larger: sign of A if |A| > |B|, the complement of A's sign if |A| < |B|,
// and +0 when they are equal. The value check converts both operands and the
// result to integers.
package sm_ref_pkg;
  import rev_pkg::*;

  // Result of the signed-magnitude algorithm.
  function automatic sm_res_t sm_ref(sm_op_t op);
    sm_res_t res;
    int      mag;
    bit      magnitude_sub;
    magnitude_sub = ((op.a_s != op.b_s) != op.c_fs);
    if (!magnitude_sub) begin
      mag     = int'(op.a) + int'(op.b);
      res.s_s = op.a_s;
    end else if (op.a > op.b) begin
      mag     = int'(op.a) - int'(op.b);
      res.s_s = op.a_s;
    end else if (op.a == op.b) begin
      mag     = 0;
      res.s_s = 1'b0;
    end else begin
      mag     = int'(op.b) - int'(op.a);
      res.s_s = !op.a_s;
    end
    res.e = mag[3];
    res.s = mag[2:0];
    return res;
  endfunction

  // Integer value of a signed-magnitude number.
  function automatic int sm_value(logic sign, int mag);
    return sign ? -mag : mag;
  endfunction

  // 1 when res is the integer sum or difference of the two operands.
  function automatic bit value_ok(sm_op_t op, sm_res_t res);
    int va, vb, want;
    va   = sm_value(op.a_s, int'(op.a));
    vb   = sm_value(op.b_s, int'(op.b));
    want = op.c_fs ? va - vb : va + vb;
    return sm_value(res.s_s, int'({res.e, res.s})) == want;
  endfunction
endpackage
