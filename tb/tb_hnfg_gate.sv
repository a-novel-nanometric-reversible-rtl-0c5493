// tb_hnfg_gate: exhaustive self-checking testbench for the HNFG gate.
// Applies all 16 input patterns, compares every output with a reference
// written independently of the gate, and checks that no two input patterns
// give the same output pattern (the gate must be reversible). A watchdog
// ends the run with a failure if it does not finish.
module tb_hnfg_gate;
  logic a, b, c, d;
  logic p, q, r, s;
  logic exp_p, exp_q, exp_r, exp_s;
  logic [1:0] sum;
  logic [2:0] diff;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  hnfg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    sum = '0;
    diff = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      exp_p = a; exp_q = (a != b); exp_r = c; exp_s = (c != d);
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL in=%b p=%b expected %b", 4'(v), p, exp_p);
      end
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL in=%b q=%b expected %b", 4'(v), q, exp_q);
      end
      checks++;
      if (r !== exp_r) begin
        failures++;
        $display("FAIL in=%b r=%b expected %b", 4'(v), r, exp_r);
      end
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL in=%b s=%b expected %b", 4'(v), s, exp_s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL in=%b repeats an output pattern", 4'(v));
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
