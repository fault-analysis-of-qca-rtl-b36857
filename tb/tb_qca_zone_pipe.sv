// tb_qca_zone_pipe: checks the clock-zone chain at 1, 4, 5 and 8 stages.
// The quarter count is generated here.  A new random value is offered every
// quarter; the chain must take one only in quarter 0, and the last stage of
// an N-stage chain must show that value exactly N-1 edges after it was
// taken (readable N edges after), not earlier, and hold it for a period.
module tb_qca_zone_pipe;

  logic       clk = 1'b0, rst_n;
  logic [1:0] quarter;
  logic       d;
  logic [3:0] q;
  int checks = 0, failures = 0;
  int edge_n = 0;
  int unsigned LEN [4] = '{1, 4, 5, 8};
  logic taken [int];   // value taken at edge number (quarter 0 edges)

  qca_zone_pipe #(.STAGES(1)) dut1 (.clk, .rst_n, .quarter, .d, .q(q[0]));
  qca_zone_pipe               dut4 (.clk, .rst_n, .quarter, .d, .q(q[1]));
  qca_zone_pipe #(.STAGES(5)) dut5 (.clk, .rst_n, .quarter, .d, .q(q[2]));
  qca_zone_pipe #(.STAGES(8)) dut8 (.clk, .rst_n, .quarter, .d, .q(q[3]));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (!rst_n) quarter <= 2'd0;
    else        quarter <= quarter + 2'd1;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    d = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      // d is stable across edge number edge_n + 1
      if (quarter == 2'd0) taken[edge_n + 1] = d;
      @(posedge clk);
      edge_n++;
      @(negedge clk);
      d = 1'($urandom);
      // After edge e the N-stage output holds the value taken at the
      // latest quarter-0 edge s with s + N - 1 <= e, or the reset value 0.
      for (int k = 0; k < 4; k++) begin
        int s;
        logic exp_q;
        s = edge_n - int'(LEN[k]) + 1;
        while (s > 0 && !taken.exists(s)) s--;
        exp_q = (s > 0) ? taken[s] : 1'b0;
        checks++;
        if (q[k] !== exp_q) begin
          failures++;
          $display("FAIL %0d stages, edge %0d: q=%b expected %b", LEN[k], edge_n, q[k], exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
