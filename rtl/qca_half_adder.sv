// qca_half_adder: logic-level netlist of a QCA half adder built from
// fault-injectable QCA devices.
//
// The circuit is deliberately not minimal: it uses every basic QCA device
// (2 fanouts, 2 inverters, 6 L-shaped wires, 4 majority voters and a
// crossover) so that each device's faults can be studied in place.
//   sum   = MV3 = OR (MV1, MV2),  MV1 = AND(In1', In2),  MV2 = AND(In1, In2')
//   carry = MV4 = AND(In1, In2)
// AND and OR are majority voters with one input tied to 0 or 1.
// Signal flow:
//   In1 -> Fanout1 -f1 (fanout11)-> INV1 -> MV1.B
//                  -f2 (fanout12)-> MV4.B, and -> LSW1 -> LSW4 -> MV2.A
//   In2 -> Fanout2 -f1 (fanout22)-> LSW3 -> MV1.C
//                  -f2 (fanout21)-> MV4.C, and -> LSW2 -> INV2 -> MV2.B
//   MV1 -> LSW5 -> MV3.B,  MV2 -> LSW6 -> MV3.C,  MV3.A = 1, MV1.A = 0,
//   MV2.C = 0, MV4.A = 0.
// The In1 path LSW1 -> LSW4 crosses the In2 paths on a coplanar crossover;
// the crossover carries both signals unchanged and has no fault, so it needs
// no logic here.  The device list, the gate functions and the B inputs of
// MV1 and MV4 follow the published circuit; which branch of each fanout is
// the faultable f1 and the A/C letters of the voters are choices consistent
// with the published fault effects (fanout faults change sum only).
// `faults` holds every device's fault-injection inputs; all zero is fault
// free.  Purely combinational; the clock-zone latency of the QCA layout is
// added by qca_half_adder_top.
module qca_half_adder
  import hdlq_pkg::*;
(
  input  logic      in1,
  input  logic      in2,
  input  ha_fault_t faults,
  output logic      sum,
  output logic      carry
);

  logic fanout11, fanout12, fanout21, fanout22;
  logic inv1out, inv2out;
  logic lsw1out, lsw2out, lsw3out, lsw4out, lsw5out, lsw6out;
  logic mv1out, mv2out;

  // Input fanouts
  qca_fanout u_fanout1 (.a(in1), .fault(faults.fanout_fault[0]), .f1(fanout11), .f2(fanout12));
  qca_fanout u_fanout2 (.a(in2), .fault(faults.fanout_fault[1]), .f1(fanout22), .f2(fanout21));

  // In1' for MV1
  qca_inv   u_inv1  (.a(fanout11), .fault(faults.inv_fault[0]),   .y(inv1out));
  // In2 for MV1
  qca_lwire u_lsw3  (.a(fanout22), .fault(faults.lwire_fault[2]), .y(lsw3out));
  // In2' for MV2
  qca_lwire u_lsw2  (.a(fanout21), .fault(faults.lwire_fault[1]), .y(lsw2out));
  qca_inv   u_inv2  (.a(lsw2out),  .fault(faults.inv_fault[1]),   .y(inv2out));
  // In1 for MV2 (through the crossover)
  qca_lwire u_lsw1  (.a(fanout12), .fault(faults.lwire_fault[0]), .y(lsw1out));
  qca_lwire u_lsw4  (.a(lsw1out),  .fault(faults.lwire_fault[3]), .y(lsw4out));

  // MV1 = In1' In2, MV2 = In1 In2'
  qca_mv u_mv1 (.a(1'b0), .b(inv1out), .c(lsw3out),
                .fault0(faults.mv_fault0[0]), .fault1(faults.mv_fault1[0]), .f(mv1out));
  qca_mv u_mv2 (.a(lsw4out), .b(inv2out), .c(1'b0),
                .fault0(faults.mv_fault0[1]), .fault1(faults.mv_fault1[1]), .f(mv2out));

  qca_lwire u_lsw5  (.a(mv1out), .fault(faults.lwire_fault[4]), .y(lsw5out));
  qca_lwire u_lsw6  (.a(mv2out), .fault(faults.lwire_fault[5]), .y(lsw6out));

  // sum = MV1 + MV2
  qca_mv u_mv3 (.a(1'b1), .b(lsw5out), .c(lsw6out),
                .fault0(faults.mv_fault0[2]), .fault1(faults.mv_fault1[2]), .f(sum));
  // carry = In1 In2
  qca_mv u_mv4 (.a(1'b0), .b(fanout12), .c(fanout21),
                .fault0(faults.mv_fault0[3]), .fault1(faults.mv_fault1[3]), .f(carry));

endmodule
