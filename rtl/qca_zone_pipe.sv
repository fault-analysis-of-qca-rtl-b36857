// qca_zone_pipe: a signal carried through a chain of QCA clock zones.
//
// Stage i of the chain belongs to clock zone (i mod 4).  In the quarter in
// which that zone switches (quarter == i mod 4, from qca_clock_gen) the stage
// takes the value of the stage before it (stage 0 takes d); in the other
// three quarters it keeps its value, as a zone holds its polarization and
// its neighbours copy it.  A value sampled by stage 0 in quarter 0 thus
// reaches the last stage STAGES-1 quarters later and is readable at q from
// STAGES edges after it was sampled; four stages make one QCA clock cycle
// of latency.  The output keeps the value for a full period.  The stage
// count is a parameter of this design (default one clock cycle); stages
// reset to 0 (polarization -1), also a choice of this design.
module qca_zone_pipe
  import hdlq_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] quarter,
  input  logic       d,
  output logic       q
);

  logic [STAGES-1:0] stage;
  logic [STAGES:0]   chain;   // chain[i] is what stage i copies

  assign chain = {stage, d};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage <= '0;
    end else begin
      for (int unsigned i = 0; i < STAGES; i++) begin
        if (quarter == 2'(i % QCA_ZONES))
          stage[i] <= chain[i];
      end
    end
  end

  assign q = stage[STAGES-1];

  initial assert (STAGES >= 1) else $fatal(1, "qca_zone_pipe needs at least one stage");

endmodule
