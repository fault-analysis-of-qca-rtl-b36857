// tb_qca_half_adder_top: end-to-end test of the clocked, fault-injectable
// QCA half adder at its default parameters (sum after 2, carry after 1 QCA
// clock cycles).
//
// Every quarter period the inputs and the fault vector are changed at
// random; only the values present at a quarter-0 edge may enter the
// circuit.  The fault vector is fault free or one single device fault,
// drawn from a list with hand-derived truth tables of sum and carry.  At
// every edge sum and carry are compared with the value taken 4*cycles-1
// edges earlier (or the reset value 0 before that), so a value that comes
// a quarter too early or too late fails.  A reset is applied in the middle
// of the run.  Counted mechanisms: each fault class injected and seen at an
// output, every zone phase, sum and carry changes at the expected edge, and
// the reset; one that never happens counts as a failure.
module tb_qca_half_adder_top;
  import hdlq_pkg::*;

  localparam int SUM_EDGES   = 4 * 2;
  localparam int CARRY_EDGES = 4 * 1;
  localparam int N_QUARTERS  = 4000;

  logic       clk = 1'b0, rst_n, in1, in2, sum, carry;
  ha_fault_t  faults;
  logic [1:0] quarter;
  qca_phase_t zone_phase [QCA_ZONES];
  int checks = 0, failures = 0;

  qca_half_adder_top dut (.clk, .rst_n, .in1, .in2, .faults, .quarter, .zone_phase, .sum, .carry);

  always #5 clk = ~clk;

  // Fault list: fault vector, class, truth tables indexed by {in1,in2}.
  typedef enum int {C_FREE, C_MV_SAB, C_MV_MAJ, C_INV, C_FANOUT, C_LWIRE, C_NUM} fclass_t;
  typedef struct {
    ha_fault_t  f;
    fclass_t    cls;
    logic [3:0] sum_tt;
    logic [3:0] carry_tt;
  } case_t;
  case_t cases[$];

  function automatic ha_fault_t bit_f(int pos);
    logic [$bits(ha_fault_t)-1:0] v = '0;
    v[pos] = 1'b1;
    return ha_fault_t'(v);
  endfunction

  // Positions of the fields inside the packed ha_fault_t
  localparam int P_LW = 0, P_FO = 6, P_INV = 8, P_F1 = 10, P_F0 = 14;

  function automatic void add(ha_fault_t f, fclass_t c, logic [3:0] s, logic [3:0] k);
    cases.push_back('{f, c, s, k});
  endfunction

  // Values taken into the zone chains, by the edge that took them.
  logic tk_sum [int];
  logic tk_carry [int];
  int   tk_case [int];
  logic [1:0] tk_in [int];
  int   edge_n = 0;

  int seen_class [C_NUM];
  int seen_phase [4];
  int sum_changes = 0, carry_changes = 0, resets = 0;

  function automatic logic expect_out(ref logic tk [int], input int e, input int n);
    int s = e - n + 1;
    while (s > 0 && !tk.exists(s)) s--;
    return (s > 0) ? tk[s] : 1'b0;
  endfunction

  initial begin
    #(N_QUARTERS * 10 + 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_sum, prev_carry;
    int ci;
    add('0,                        C_FREE,   4'b0110, 4'b1000);
    add(bit_f(P_F1 + 0),           C_MV_SAB, 4'b0111, 4'b1000);
    add(bit_f(P_F0 + 0),           C_MV_MAJ, 4'b0111, 4'b1000);
    add(bit_f(P_F1 + 1),           C_MV_SAB, 4'b0111, 4'b1000);
    add(bit_f(P_F0 + 1),           C_MV_MAJ, 4'b0111, 4'b1000);
    add(bit_f(P_F1 + 2),           C_MV_SAB, 4'b0010, 4'b1000);
    add(bit_f(P_F0 + 2),           C_MV_MAJ, 4'b0010, 4'b1000);
    add(bit_f(P_F1 + 3),           C_MV_SAB, 4'b0110, 4'b1100);
    add(bit_f(P_F0 + 3),           C_MV_MAJ, 4'b0110, 4'b1101);
    add(bit_f(P_INV + 0),          C_INV,    4'b1100, 4'b1000);
    add(bit_f(P_INV + 1),          C_INV,    4'b1010, 4'b1000);
    add(bit_f(P_FO + 0),           C_FANOUT, 4'b1100, 4'b1000);
    add(bit_f(P_FO + 1),           C_FANOUT, 4'b0101, 4'b1000);
    add(bit_f(P_LW + 0),           C_LWIRE,  4'b0011, 4'b1000);
    add(bit_f(P_LW + 1),           C_LWIRE,  4'b1010, 4'b1000);
    add(bit_f(P_LW + 2),           C_LWIRE,  4'b0101, 4'b1000);
    add(bit_f(P_LW + 3),           C_LWIRE,  4'b0011, 4'b1000);
    add(bit_f(P_LW + 4),           C_LWIRE,  4'b1101, 4'b1000);
    add(bit_f(P_LW + 5),           C_LWIRE,  4'b1011, 4'b1000);

    // The field positions used above must match the package layout.
    checks++;
    if (bit_f(P_F1 + 2).mv_fault1 != 4'b0100 || bit_f(P_LW + 5).lwire_fault != 6'b100000 ||
        bit_f(P_FO + 1).fanout_fault != 2'b10 || bit_f(P_INV).inv_fault != 2'b01 ||
        bit_f(P_F0 + 3).mv_fault0 != 4'b1000) begin
      failures++;
      $display("FAIL fault field positions");
    end

    rst_n = 1'b0;
    in1 = 1'b0; in2 = 1'b0; faults = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    prev_sum = 1'b0; prev_carry = 1'b0;

    for (int t = 0; t < N_QUARTERS; t++) begin
      // Mid-run reset for two edges.
      if (t == N_QUARTERS / 2) begin
        rst_n = 1'b0;
        repeat (2) @(posedge clk);
        @(negedge clk);
        rst_n = 1'b1;
        tk_sum.delete(); tk_carry.delete(); tk_case.delete(); tk_in.delete();
        edge_n = 0;
        resets++;
        checks += 3;
        if (quarter !== 2'd0) begin failures++; $display("FAIL quarter after reset"); end
        if (sum !== 1'b0 || carry !== 1'b0) begin failures++; $display("FAIL outputs after reset"); end
        if (zone_phase[0] !== PH_SWITCH) begin failures++; $display("FAIL phase after reset"); end
        prev_sum = 1'b0; prev_carry = 1'b0;
      end

      // New stimulus every quarter.
      ci = ($urandom % 3 == 0) ? 0 : 1 + int'($urandom % (cases.size() - 1));
      faults = cases[ci].f;
      {in1, in2} = 2'($urandom);
      if (quarter == 2'd0) begin
        tk_sum[edge_n + 1]   = cases[ci].sum_tt[{in1, in2}];
        tk_carry[edge_n + 1] = cases[ci].carry_tt[{in1, in2}];
        tk_case[edge_n + 1]  = ci;
        tk_in[edge_n + 1]    = {in1, in2};
      end
      seen_phase[zone_phase[0]]++;
      checks++;
      if (zone_phase[0] !== qca_phase_t'(quarter)) begin
        failures++;
        $display("FAIL zone 0 phase %s in quarter %0d", zone_phase[0].name(), quarter);
      end

      @(posedge clk);
      edge_n++;
      @(negedge clk);

      checks += 2;
      if (sum !== expect_out(tk_sum, edge_n, SUM_EDGES)) begin
        failures++;
        $display("FAIL edge %0d: sum=%b expected %b", edge_n, sum, expect_out(tk_sum, edge_n, SUM_EDGES));
      end
      if (carry !== expect_out(tk_carry, edge_n, CARRY_EDGES)) begin
        failures++;
        $display("FAIL edge %0d: carry=%b expected %b", edge_n, carry, expect_out(tk_carry, edge_n, CARRY_EDGES));
      end
      if (sum !== prev_sum) sum_changes++;
      if (carry !== prev_carry) carry_changes++;
      prev_sum = sum; prev_carry = carry;

      // A fault class counts as observed when a value taken under it
      // arrives at an output and differs from the fault-free value.
      begin
        automatic int ss = edge_n - SUM_EDGES + 1;
        automatic int sc = edge_n - CARRY_EDGES + 1;
        if (tk_case.exists(ss)) begin
          if (tk_case[ss] == 0) seen_class[C_FREE]++;
          else if (sum !== cases[0].sum_tt[tk_in[ss]]) seen_class[cases[tk_case[ss]].cls]++;
        end
        if (tk_case.exists(sc) && tk_case[sc] != 0 &&
            carry !== cases[0].carry_tt[tk_in[sc]])
          seen_class[cases[tk_case[sc]].cls]++;
      end
    end

    for (int c = 0; c < C_NUM; c++) begin
      checks++;
      if (seen_class[c] == 0) begin
        failures++;
        $display("FAIL fault class %s never observed at an output", fclass_t'(c));
      end
      $display("fault class %-9s observed %0d times", fclass_t'(c), seen_class[c]);
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (seen_phase[p] == 0) begin failures++; $display("FAIL phase %0d never seen", p); end
    end
    checks += 3;
    if (sum_changes == 0)   begin failures++; $display("FAIL sum never changed"); end
    if (carry_changes == 0) begin failures++; $display("FAIL carry never changed"); end
    if (resets == 0)        begin failures++; $display("FAIL no reset"); end
    $display("sum changes %0d, carry changes %0d, resets %0d", sum_changes, carry_changes, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
