// tb_rca_hng3: exhaustive testbench for the HNG ripple adder/subtractor with
// its decoder. For all 512 input patterns it checks {E, S} against A + B when
// the magnitudes are added and against A + (7 - B) + 1 (two's complement
// subtraction, E = 1 meaning A >= B) when they are subtracted, that the Ctrl
// output carries the decoded operation, that A_s is passed on and that the
// decoder garbage is A_s ^ B_s.
module tb_rca_hng3;
  logic       c_fs, a_s, b_s, a_s_out, e;
  logic [2:0] a, b, s;
  logic       ctrl;
  logic [6:0] g;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;

  rca_hng3 dut (.c_fs(c_fs), .a_s(a_s), .b_s(b_s), .a(a), .b(b),
                .a_s_out(a_s_out), .ctrl(ctrl), .s(s), .e(e), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      bit sub;
      int want;
      {c_fs, a_s, b_s, a, b} = 9'(v);
      #1;
      sub  = ((a_s != b_s) != c_fs);
      want = sub ? int'(a) + (7 - int'(b)) + 1 : int'(a) + int'(b);
      if (sub) n_sub++; else n_add++;
      checks += 5;
      if (g[0] !== (a_s != b_s)) begin failures++; $display("FAIL in=%b g1", 9'(v)); end
      if ({e, s} !== want[3:0]) begin
        failures++;
        $display("FAIL in=%b got %b expected %b", 9'(v), {e, s}, want[3:0]);
      end
      if (sub && (e !== (a >= b))) begin failures++; $display("FAIL in=%b E not A>=B", 9'(v)); end
      if (ctrl !== sub) begin failures++; $display("FAIL in=%b ctrl=%b", 9'(v), ctrl); end
      if (a_s_out !== a_s) begin failures++; $display("FAIL in=%b a_s_out", 9'(v)); end
    end
    checks++;
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
