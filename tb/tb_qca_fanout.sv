// tb_qca_fanout: exhaustive check of the faultable fanout: branch f2 always
// carries the input; branch f1 carries it fault free and its complement
// under the stuck-at-A' fault.
module tb_qca_fanout;

  logic a, fault, f1, f2;
  int checks = 0, failures = 0;

  qca_fanout dut (.a, .fault, .f1, .f2);

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
      checks += 2;
      if (f1 !== (fault ? !a : a)) begin
        failures++;
        $display("FAIL f1: fault=%b a=%b f1=%b", fault, a, f1);
      end
      if (f2 !== a) begin
        failures++;
        $display("FAIL f2: fault=%b a=%b f2=%b", fault, a, f2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
