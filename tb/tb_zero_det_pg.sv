// tb_zero_det_pg: exhaustive testbench for the Feynman/Peres zero detector.
// For all eight values of S it checks F(A=B) = 1 only for S = 0 and that S is
// passed on unchanged.
module tb_zero_det_pg;
  logic [2:0] s, s_out;
  logic       f;
  logic [1:0] g;
  int checks = 0, failures = 0;

  zero_det_pg dut (.s(s), .s_out(s_out), .f(f), .g(g));

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
      if (f !== (v == 0)) begin failures++; $display("FAIL s=%0d f=%b", v, f); end
      if (s_out !== s)    begin failures++; $display("FAIL s=%0d s_out=%0d", v, s_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
