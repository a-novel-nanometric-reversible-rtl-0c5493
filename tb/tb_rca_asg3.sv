// tb_rca_asg3: exhaustive testbench for the ADD/SUB-gate ripple
// adder/subtractor. For all 128 patterns of ctrl, A and B it checks
// {E, S} = A + B for ctrl = 0 and S = (A - B) mod 8 with E = borrow (A < B)
// for ctrl = 1, and that both spare Ctrl outputs equal ctrl.
module tb_rca_asg3;
  logic       ctrl, e;
  logic [2:0] a, b, s;
  logic [1:0] ctrl_out;
  logic [5:0] g;
  int checks = 0, failures = 0;

  rca_asg3 dut (.ctrl(ctrl), .a(a), .b(b), .ctrl_out(ctrl_out), .s(s), .e(e), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int want_s;
      bit want_e;
      {ctrl, a, b} = 7'(v);
      #1;
      if (!ctrl) begin
        want_s = (int'(a) + int'(b)) % 8;
        want_e = (int'(a) + int'(b)) > 7;
      end else begin
        want_s = (int'(a) - int'(b) + 8) % 8;
        want_e = (a < b);
      end
      checks += 3;
      if (s !== 3'(want_s)) begin failures++; $display("FAIL in=%b s=%0d want %0d", 7'(v), s, want_s); end
      if (e !== want_e)     begin failures++; $display("FAIL in=%b e=%b", 7'(v), e); end
      if (ctrl_out !== {ctrl, ctrl}) begin failures++; $display("FAIL in=%b ctrl_out", 7'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
