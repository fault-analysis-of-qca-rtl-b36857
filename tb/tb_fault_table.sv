// tb_fault_table: single-fault analysis of the clocked half adder, run
// as a fault dictionary.
//
// Each of the 18 single device faults (stuck-at-B and Maj(A',B,C') of
// MV1..MV4, stuck-at-A of INV1/INV2, stuck-at-A' of the fanouts' f1 branches
// and of the six L-shaped wires) is injected in turn through
// qca_half_adder_top, and every input vector is applied for one QCA clock
// cycle.  sum is read two and carry one QCA clock cycle (8 and 4 quarters)
// after the inputs were taken.  The results are printed as a table of
// faulty (fault-free) output values with the vectors that detect each fault,
// and compared with truth tables derived by hand from the circuit.  While a
// value travels to sum, the next one (inverted inputs and faults) already
// enters the zone chain, so the pipelining is exercised too.  Finally the
// smallest set of input vectors that detects every fault is searched; it
// must have three vectors (00 is needed for MV1/MV2, 10 for MV3/MV4, and
// one of 01/11 for INV1).
module tb_fault_table;
  import hdlq_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in1 = 1'b0, in2 = 1'b0, sum, carry;
  ha_fault_t  faults = '0;
  logic [1:0] quarter;
  qca_phase_t zone_phase [QCA_ZONES];
  int checks = 0, failures = 0;

  qca_half_adder_top dut (.clk, .rst_n, .in1, .in2, .faults, .quarter, .zone_phase, .sum, .carry);

  always #5 clk = ~clk;

  typedef struct {
    string      name;
    ha_fault_t  f;
    logic [3:0] sum_tt;    // indexed by {in1, in2}
    logic [3:0] carry_tt;
  } case_t;
  case_t cases[$];

  function automatic ha_fault_t mv_f(int idx, bit f0, bit f1);
    ha_fault_t r = '0;
    r.mv_fault0[idx] = f0;
    r.mv_fault1[idx] = f1;
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector at a quarter-0 edge; return sum after 8 edges and
  // carry after 4 edges, checking both are steady from then to edge 11.
  task automatic apply(input ha_fault_t f, input logic [1:0] v,
                       output logic s, output logic k);
    while (quarter != 2'd0) @(negedge clk);
    faults = f;
    {in1, in2} = v;
    repeat (4) @(negedge clk);           // carry reaches the output
    k = carry;
    // Scramble the inputs; the taken value must still come through.
    {in1, in2} = ~v;
    faults = ~f;
    repeat (4) @(negedge clk);           // sum reaches the output
    s = sum;
    faults = f;
  endtask

  initial begin
    logic [3:0] s_tt, k_tt, detect, union_v;
    logic s, k;
    string line;
    cases.push_back('{"fault free",          '0,            4'b0110, 4'b1000});
    cases.push_back('{"MV1 s_a_B",           mv_f(0,0,1),   4'b0111, 4'b1000});
    cases.push_back('{"MV1 Maj(A',B,C')",    mv_f(0,1,0),   4'b0111, 4'b1000});
    cases.push_back('{"MV2 s_a_B",           mv_f(1,0,1),   4'b0111, 4'b1000});
    cases.push_back('{"MV2 Maj(A',B,C')",    mv_f(1,1,0),   4'b0111, 4'b1000});
    cases.push_back('{"MV3 s_a_B",           mv_f(2,0,1),   4'b0010, 4'b1000});
    cases.push_back('{"MV3 Maj(A',B,C')",    mv_f(2,1,0),   4'b0010, 4'b1000});
    cases.push_back('{"MV4 s_a_B",           mv_f(3,0,1),   4'b0110, 4'b1100});
    cases.push_back('{"MV4 Maj(A',B,C')",    mv_f(3,1,0),   4'b0110, 4'b1101});
    begin
      ha_fault_t f;
      f = '0; f.inv_fault[0] = 1'b1;    cases.push_back('{"INV1 s_a_A",     f, 4'b1100, 4'b1000});
      f = '0; f.inv_fault[1] = 1'b1;    cases.push_back('{"INV2 s_a_A",     f, 4'b1010, 4'b1000});
      f = '0; f.fanout_fault[0] = 1'b1; cases.push_back('{"Fanout1 s_a_A'", f, 4'b1100, 4'b1000});
      f = '0; f.fanout_fault[1] = 1'b1; cases.push_back('{"Fanout2 s_a_A'", f, 4'b0101, 4'b1000});
      f = '0; f.lwire_fault[0] = 1'b1;  cases.push_back('{"LSW1 s_a_A'",    f, 4'b0011, 4'b1000});
      f = '0; f.lwire_fault[1] = 1'b1;  cases.push_back('{"LSW2 s_a_A'",    f, 4'b1010, 4'b1000});
      f = '0; f.lwire_fault[2] = 1'b1;  cases.push_back('{"LSW3 s_a_A'",    f, 4'b0101, 4'b1000});
      f = '0; f.lwire_fault[3] = 1'b1;  cases.push_back('{"LSW4 s_a_A'",    f, 4'b0011, 4'b1000});
      f = '0; f.lwire_fault[4] = 1'b1;  cases.push_back('{"LSW5 s_a_A'",    f, 4'b1101, 4'b1000});
      f = '0; f.lwire_fault[5] = 1'b1;  cases.push_back('{"LSW6 s_a_A'",    f, 4'b1011, 4'b1000});
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    $display("fault               in1,in2:   00    01    10    11   (sum carry, faulty(fault-free))");
    union_v = '0;
    foreach (cases[i]) begin
      line = "";
      detect = '0;
      for (int v = 0; v < 4; v++) begin
        apply(cases[i].f, 2'(v), s, k);
        s_tt[v] = s;
        k_tt[v] = k;
        line = {line, $sformatf("  %b%b(%b%b)", s, k, cases[0].sum_tt[v], cases[0].carry_tt[v])};
        checks += 2;
        if (s !== cases[i].sum_tt[v] || k !== cases[i].carry_tt[v]) begin
          failures++;
          $display("FAIL %s vector %0d%0d: sum=%b carry=%b, expected %b %b", cases[i].name,
                   v[1], v[0], s, k, cases[i].sum_tt[v], cases[i].carry_tt[v]);
        end
        if (s !== cases[0].sum_tt[v] || k !== cases[0].carry_tt[v]) detect[v] = 1'b1;
      end
      $display("%-18s %s   detected by %b", cases[i].name, line, detect);
      if (i > 0) begin
        checks++;
        if (detect == '0) begin
          failures++;
          $display("FAIL %s is not detected", cases[i].name);
        end
      end
    end

    // Greedy test set: the smallest set of vectors detecting all faults.
    begin
      int best = 5;
      logic [3:0] best_set = '0;
      for (int set = 1; set < 16; set++) begin
        automatic bit all = 1'b1;
        for (int i = 1; i < cases.size(); i++) begin
          automatic logic [3:0] d = '0;
          for (int v = 0; v < 4; v++)
            if (cases[i].sum_tt[v] != cases[0].sum_tt[v] ||
                cases[i].carry_tt[v] != cases[0].carry_tt[v]) d[v] = 1'b1;
          if ((d & 4'(set)) == '0) all = 0;
        end
        if (all && $countones(set) < best) begin best = $countones(set); best_set = 4'(set); end
      end
      $display("smallest complete test set: %0d vectors (bit v set = vector {in1,in2}=v): %b",
               best, best_set);
      checks++;
      if (best != 3) begin failures++; $display("FAIL expected a three-vector test set"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
