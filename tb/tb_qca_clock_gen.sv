// tb_qca_clock_gen: checks the four-phase clock model.  After reset the
// quarter counter must start at 0 and step 0,1,2,3,0,...; zone 0 must go
// switch, hold, release, relax; every zone k must show the phase zone 0 had
// k quarters earlier; and in every quarter exactly one zone switches.
module tb_qca_clock_gen;
  import hdlq_pkg::*;

  logic       clk = 1'b0, rst_n;
  logic [1:0] quarter;
  qca_phase_t zone_phase [QCA_ZONES];
  int checks = 0, failures = 0;
  qca_phase_t hist [$];   // zone 0 phase, newest first

  qca_clock_gen dut (.clk, .rst_n, .quarter, .zone_phase);

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_switch;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (quarter !== 2'd0) begin failures++; $display("FAIL reset quarter=%0d", quarter); end
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      // Zone 0 follows switch, hold, release, relax from reset on.
      checks++;
      if (zone_phase[0] !== qca_phase_t'(t % 4)) begin
        failures++;
        $display("FAIL t=%0d zone0 phase %s", t, zone_phase[0].name());
      end
      checks++;
      if (quarter !== 2'(t % 4)) begin failures++; $display("FAIL t=%0d quarter=%0d", t, quarter); end
      hist.push_front(zone_phase[0]);
      n_switch = 0;
      for (int k = 0; k < QCA_ZONES; k++) begin
        if (zone_phase[k] == PH_SWITCH) n_switch++;
        if (t >= k) begin
          checks++;
          if (zone_phase[k] !== hist[k]) begin
            failures++;
            $display("FAIL t=%0d zone %0d phase %s, zone 0 had %s %0d quarters ago",
                     t, k, zone_phase[k].name(), hist[k].name(), k);
          end
        end
      end
      checks++;
      if (n_switch != 1) begin failures++; $display("FAIL t=%0d %0d zones switching", t, n_switch); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
