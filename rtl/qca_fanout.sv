// qca_fanout: two-branch QCA fanout with fault injection.
//
// Fault free (fault=0) both branches f1 and f2 carry the input.  A missing
// cell where branch f1 leaves the stem inverts that branch only
// (stuck-at-A' on f1, fault=1); f2 is not affected.  Which branch is f1 is a
// choice of the circuit that instantiates the fanout.  Purely combinational.
module qca_fanout (
  input  logic a,
  input  logic fault,
  output logic f1,
  output logic f2
);

  assign f1 = a ^ fault;
  assign f2 = a;

endmodule
