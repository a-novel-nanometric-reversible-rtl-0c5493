// tb_zero_cmp_nlg: exhaustive testbench for the NLG/Peres zero comparator.
// For all eight values of S it checks F(A=B) = 1 only for S = 0, and that the
// first three garbage outputs return S (so no two inputs give the same
// output pattern).
module tb_zero_cmp_nlg;
  logic [2:0] s;
  logic       f;
  logic [6:0] g;
  int checks = 0, failures = 0;

  zero_cmp_nlg dut (.s(s), .f(f), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      s = 3'(v);
      #1;
      checks += 2;
      if (f !== (v == 0))   begin failures++; $display("FAIL s=%0d f=%b", v, f); end
      if (g[2:0] !== s)     begin failures++; $display("FAIL s=%0d g=%b", v, g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
