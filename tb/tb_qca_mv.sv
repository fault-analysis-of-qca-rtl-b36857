// tb_qca_mv: exhaustive check of the faultable majority voter.
// All 32 combinations of the three inputs and two fault inputs are applied.
// The expected output is worked out by counting ones: fault free the output
// is 1 when at least two inputs are 1; stuck-at-B (fault0=0, fault1=1)
// copies B; the centre-cell fault (fault0=1) counts A', B and C'.
module tb_qca_mv;

  logic a, b, c, fault0, fault1, f;
  int checks = 0, failures = 0;

  qca_mv dut (.a, .b, .c, .fault0, .fault1, .f);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic exp_f;
    for (int v = 0; v < 32; v++) begin
      {fault0, fault1, a, b, c} = 5'(v);
      #1;
      if (fault0)      ones = int'(!a) + int'(b) + int'(!c);
      else             ones = int'(a) + int'(b) + int'(c);
      if (!fault0 && fault1) exp_f = b;
      else                   exp_f = (ones >= 2);
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL fault0=%b fault1=%b a=%b b=%b c=%b: f=%b expected %b",
                 fault0, fault1, a, b, c, f, exp_f);
      end
    end
    // As AND gate (one input 0) and OR gate (one input 1), fault free.
    fault0 = 0; fault1 = 0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      c = 1'b0; #1; checks++; if (f !== (a & b)) failures++;
      c = 1'b1; #1; checks++; if (f !== (a | b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
