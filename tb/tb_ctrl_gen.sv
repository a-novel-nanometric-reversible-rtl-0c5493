// tb_ctrl_gen: exhaustive testbench for the operation decoder. For all eight
// combinations of A_s, B_s and C_F/S it checks that ctrl is 1 exactly when an
// odd number of them is 1 (magnitudes subtracted), that A_s is passed on and
// that the garbage output is A_s ^ B_s.
module tb_ctrl_gen;
  logic a_s, b_s, c_fs, a_s_out, g1, ctrl;
  int checks = 0, failures = 0;

  ctrl_gen dut (.a_s(a_s), .b_s(b_s), .c_fs(c_fs), .a_s_out(a_s_out), .g1(g1), .ctrl(ctrl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a_s, b_s, c_fs} = 3'(v);
      #1;
      ones = int'(a_s) + int'(b_s) + int'(c_fs);
      checks += 3;
      if (ctrl !== ones[0]) begin failures++; $display("FAIL %b ctrl=%b", 3'(v), ctrl); end
      if (a_s_out !== a_s)  begin failures++; $display("FAIL %b a_s_out", 3'(v)); end
      if (g1 !== (a_s != b_s)) begin failures++; $display("FAIL %b g1", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
