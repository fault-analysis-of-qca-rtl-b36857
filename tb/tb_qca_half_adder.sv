// tb_qca_half_adder: single-fault analysis of the QCA half adder netlist.
//
// For the fault-free circuit and for each single device fault (both fault
// encodings of every majority voter, the 11 encoding included, plus every
// inverter, fanout and L-shaped wire fault) all four input vectors are
// applied and sum and carry compared with truth tables derived by hand from
// the circuit equations.  A truth table is written as 4 bits indexed by
// {in1, in2}.  The testbench also checks the fault properties the circuit
// is known for: MV1 stuck-at-B turns sum for In1=In2=0 from 0 into 1, faults
// in MV4 change only carry, every other fault changes only sum, and every
// single fault is detected by at least one input vector.
module tb_qca_half_adder;
  import hdlq_pkg::*;

  logic      in1, in2, sum, carry;
  ha_fault_t faults;
  int checks = 0, failures = 0;

  qca_half_adder dut (.in1, .in2, .faults, .sum, .carry);

  typedef struct {
    string      name;
    ha_fault_t  f;
    logic [3:0] sum_tt;
    logic [3:0] carry_tt;
  } case_t;

  localparam logic [3:0] XOR_TT = 4'b0110;
  localparam logic [3:0] AND_TT = 4'b1000;

  function automatic ha_fault_t mv_f(int idx, bit f0, bit f1);
    ha_fault_t r = '0;
    r.mv_fault0[idx] = f0;
    r.mv_fault1[idx] = f1;
    return r;
  endfunction

  function automatic ha_fault_t one_f(string kind, int idx);
    ha_fault_t r = '0;
    case (kind)
      "inv":    r.inv_fault[idx]    = 1'b1;
      "fanout": r.fanout_fault[idx] = 1'b1;
      default:  r.lwire_fault[idx]  = 1'b1;
    endcase
    return r;
  endfunction

  case_t cases[$];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] got_sum, got_carry;
    // Expected truth tables ({in1,in2} = 3,2,1,0 from left to right).
    cases.push_back('{"fault free",      '0,                XOR_TT,  AND_TT});
    cases.push_back('{"MV1 s_a_B",       mv_f(0, 0, 1),     4'b0111, AND_TT}); // In1'+In2'
    cases.push_back('{"MV1 Maj(A',B,C')",mv_f(0, 1, 0),     4'b0111, AND_TT});
    cases.push_back('{"MV1 fault 11",    mv_f(0, 1, 1),     4'b0111, AND_TT});
    cases.push_back('{"MV2 s_a_B",       mv_f(1, 0, 1),     4'b0111, AND_TT});
    cases.push_back('{"MV2 Maj(A',B,C')",mv_f(1, 1, 0),     4'b0111, AND_TT});
    cases.push_back('{"MV2 fault 11",    mv_f(1, 1, 1),     4'b0111, AND_TT});
    cases.push_back('{"MV3 s_a_B",       mv_f(2, 0, 1),     4'b0010, AND_TT}); // In1'In2
    cases.push_back('{"MV3 Maj(A',B,C')",mv_f(2, 1, 0),     4'b0010, AND_TT});
    cases.push_back('{"MV3 fault 11",    mv_f(2, 1, 1),     4'b0010, AND_TT});
    cases.push_back('{"MV4 s_a_B",       mv_f(3, 0, 1),     XOR_TT,  4'b1100}); // In1
    cases.push_back('{"MV4 Maj(A',B,C')",mv_f(3, 1, 0),     XOR_TT,  4'b1101}); // In1+In2'
    cases.push_back('{"MV4 fault 11",    mv_f(3, 1, 1),     XOR_TT,  4'b1101});
    cases.push_back('{"INV1 s_a_A",      one_f("inv", 0),   4'b1100, AND_TT}); // In1
    cases.push_back('{"INV2 s_a_A",      one_f("inv", 1),   4'b1010, AND_TT}); // In2
    cases.push_back('{"Fanout1 s_a_A'",  one_f("fanout",0), 4'b1100, AND_TT}); // In1
    cases.push_back('{"Fanout2 s_a_A'",  one_f("fanout",1), 4'b0101, AND_TT}); // In2'
    cases.push_back('{"LSW1 s_a_A'",     one_f("lw", 0),    4'b0011, AND_TT}); // In1'
    cases.push_back('{"LSW2 s_a_A'",     one_f("lw", 1),    4'b1010, AND_TT}); // In2
    cases.push_back('{"LSW3 s_a_A'",     one_f("lw", 2),    4'b0101, AND_TT}); // In2'
    cases.push_back('{"LSW4 s_a_A'",     one_f("lw", 3),    4'b0011, AND_TT}); // In1'
    cases.push_back('{"LSW5 s_a_A'",     one_f("lw", 4),    4'b1101, AND_TT}); // In1+In2'
    cases.push_back('{"LSW6 s_a_A'",     one_f("lw", 5),    4'b1011, AND_TT}); // In1'+In2

    foreach (cases[i]) begin
      faults = cases[i].f;
      for (int v = 0; v < 4; v++) begin
        {in1, in2} = 2'(v);
        #1;
        got_sum[v]   = sum;
        got_carry[v] = carry;
        checks += 2;
        if (sum !== cases[i].sum_tt[v]) begin
          failures++;
          $display("FAIL %s in1=%b in2=%b: sum=%b expected %b",
                   cases[i].name, in1, in2, sum, cases[i].sum_tt[v]);
        end
        if (carry !== cases[i].carry_tt[v]) begin
          failures++;
          $display("FAIL %s in1=%b in2=%b: carry=%b expected %b",
                   cases[i].name, in1, in2, carry, cases[i].carry_tt[v]);
        end
      end
      if (i > 0) begin
        // Every single fault is visible at a primary output for some vector.
        checks++;
        if (got_sum == XOR_TT && got_carry == AND_TT) begin
          failures++;
          $display("FAIL %s is not detected by any input vector", cases[i].name);
        end
        // Faults in MV4 touch only carry; all others touch only sum.
        checks++;
        if (cases[i].f.mv_fault0[3] || cases[i].f.mv_fault1[3]) begin
          if (got_sum != XOR_TT) begin
            failures++;
            $display("FAIL %s changed sum", cases[i].name);
          end
        end else if (got_carry != AND_TT) begin
          failures++;
          $display("FAIL %s changed carry", cases[i].name);
        end
      end
    end

    // The worked example: MV1 stuck-at-B, In1 = In2 = 0 gives sum 1, not 0.
    faults = mv_f(0, 0, 1);
    {in1, in2} = 2'b00;
    #1;
    checks++;
    if (sum !== 1'b1) begin
      failures++;
      $display("FAIL MV1 s_a_B with In1=In2=0: sum=%b expected 1", sum);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
