// qca_half_adder_top: clocked, fault-injectable QCA half adder.
//
// The logic-level half adder (qca_half_adder) is combined with a model of
// the four-phase QCA clock (qca_clock_gen).  The inputs are taken by clock
// zone 0 in quarter 0 and travel through the clock zones of the layout, so
// that carry appears CARRY_CYCLES QCA clock cycles and sum SUM_CYCLES cycles
// after the inputs are sampled (1 and 2 cycles in the published layout).
// Which device lies in which zone is not known, so the zone stages are
// placed behind the combinational netlist (qca_zone_pipe, four stages per
// cycle); the logic values and the latencies are the same either way.
//
// Timing: one clk edge is one quarter of a QCA clock period.  Inputs and
// faults are sampled on the edge at which `quarter` reads 0; sum is valid
// from 4*SUM_CYCLES edges later and carry from 4*CARRY_CYCLES edges later,
// each held for four edges.  rst_n is synchronous and active low.
module qca_half_adder_top
  import hdlq_pkg::*;
#(
  parameter int unsigned SUM_CYCLES   = 2,
  parameter int unsigned CARRY_CYCLES = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in1,
  input  logic       in2,
  input  ha_fault_t  faults,
  output logic [1:0] quarter,
  output qca_phase_t zone_phase [QCA_ZONES],
  output logic       sum,
  output logic       carry
);

  logic sum_logic, carry_logic;

  qca_clock_gen u_clock (
    .clk, .rst_n, .quarter, .zone_phase
  );

  qca_half_adder u_ha (
    .in1, .in2, .faults, .sum(sum_logic), .carry(carry_logic)
  );

  qca_zone_pipe #(.STAGES(QCA_ZONES * SUM_CYCLES)) u_sum_zones (
    .clk, .rst_n, .quarter, .d(sum_logic), .q(sum)
  );

  qca_zone_pipe #(.STAGES(QCA_ZONES * CARRY_CYCLES)) u_carry_zones (
    .clk, .rst_n, .quarter, .d(carry_logic), .q(carry)
  );

endmodule
