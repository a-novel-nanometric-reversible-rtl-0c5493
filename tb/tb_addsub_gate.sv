// tb_addsub_gate: exhaustive self-checking testbench for the ADD/SUB gate: full adder for f = 0, full subtractor (borrow on Q) for f = 1.
// Applies all 16 input patterns, compares every output with a reference
// written independently of the gate, and checks that no two input patterns
// give the same output pattern (the gate must be reversible). A watchdog
// ends the run with a failure if it does not finish.
module tb_addsub_gate;
  logic f, a, b, c;
  logic p, q, r, s;
  logic exp_p, exp_q, exp_r, exp_s;
  logic [1:0] sum;
  logic [2:0] diff;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  addsub_gate dut (.f(f), .a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .s(s));

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
      {f, a, b, c} = 4'(v);
      #1;
      if (!f) begin sum = 2'(a) + 2'(b) + 2'(c); exp_p = sum[0]; exp_q = sum[1]; end
      else begin diff = 3'(a) - 3'(b) - 3'(c); exp_p = diff[0]; exp_q = diff[2]; end
      exp_r = a; exp_s = (f != b);
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
