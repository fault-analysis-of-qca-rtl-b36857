// tb_qca_inv: exhaustive check of the faultable inverter: fault free it
// complements its input, with the stuck-at-A fault it passes the input.
module tb_qca_inv;

  logic a, fault, y;
  int checks = 0, failures = 0;

  qca_inv dut (.a, .fault, .y);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {fault, a} = 2'(v);
      #1;
      checks++;
      if (y !== (fault ? a : !a)) begin
        failures++;
        $display("FAIL fault=%b a=%b y=%b", fault, a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
