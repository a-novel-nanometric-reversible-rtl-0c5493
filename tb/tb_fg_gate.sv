// tb_fg_gate: exhaustive self-checking testbench for the Feynman gate.
// Applies all 4 input patterns, compares every output with a reference
// written independently of the gate, and checks that no two input patterns
// give the same output pattern (the gate must be reversible). A watchdog
// ends the run with a failure if it does not finish.
module tb_fg_gate;
  logic a, b;
  logic p, q;
  logic exp_p, exp_q;
  logic [1:0] sum;
  logic [2:0] diff;
  logic [3:0] seen;
  int checks = 0, failures = 0;

  fg_gate dut (.a(a), .b(b), .p(p), .q(q));

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
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      exp_p = a; exp_q = (a != b);
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL in=%b p=%b expected %b", 2'(v), p, exp_p);
      end
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL in=%b q=%b expected %b", 2'(v), q, exp_q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL in=%b repeats an output pattern", 2'(v));
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
