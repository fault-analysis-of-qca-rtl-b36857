// qca_clock_gen: four-phase QCA clock reduced to its phase sequence.
//
// A QCA circuit is clocked by four clock signals of equal frequency, each a
// quarter period behind the previous one; every clock zone runs through the
// phases switch, hold, release and relax.  Here one edge of clk is one
// quarter period: a 2-bit counter `quarter` counts the quarters, and zone k
// is in its switch phase when quarter == k, in hold one quarter later, then
// release, then relax.  A new value therefore moves on by one zone per
// quarter and by all four zones per QCA clock cycle.  The analogue barrier
// waveforms themselves are not modelled.  Synchronous active-low reset to
// quarter 0 is a choice of this design.
module qca_clock_gen
  import hdlq_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] quarter,
  output qca_phase_t zone_phase [QCA_ZONES]
);

  always_ff @(posedge clk) begin
    if (!rst_n) quarter <= 2'd0;
    else        quarter <= quarter + 2'd1;
  end

  // Zone k lags zone 0 by k quarters.
  always_comb begin
    for (int k = 0; k < QCA_ZONES; k++)
      zone_phase[k] = qca_phase_t'(quarter - 2'(k));
  end

endmodule
