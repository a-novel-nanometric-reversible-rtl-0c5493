// tb_tcg_gate: exhaustive self-checking testbench for the two's complement gate, against its published truth table.
// Applies all 8 input patterns, compares every output with a reference
// written independently of the gate, and checks that no two input patterns
// give the same output pattern (the gate must be reversible). A watchdog
// ends the run with a failure if it does not finish.
module tb_tcg_gate;
  logic a, b, c;
  logic p, q, r;
  logic exp_p, exp_q, exp_r;
  logic [1:0] sum;
  logic [2:0] diff;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  tcg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      case ({c, b, a})
        3'b000: {exp_r, exp_q, exp_p} = 3'b000;
        3'b001: {exp_r, exp_q, exp_p} = 3'b111;
        3'b010: {exp_r, exp_q, exp_p} = 3'b110;
        3'b011: {exp_r, exp_q, exp_p} = 3'b101;
        3'b100: {exp_r, exp_q, exp_p} = 3'b100;
        3'b101: {exp_r, exp_q, exp_p} = 3'b011;
        3'b110: {exp_r, exp_q, exp_p} = 3'b010;
        default: {exp_r, exp_q, exp_p} = 3'b001;
      endcase
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL in=%b p=%b expected %b", 3'(v), p, exp_p);
      end
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL in=%b q=%b expected %b", 3'(v), q, exp_q);
      end
      checks++;
      if (r !== exp_r) begin
        failures++;
        $display("FAIL in=%b r=%b expected %b", 3'(v), r, exp_r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL in=%b repeats an output pattern", 3'(v));
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
