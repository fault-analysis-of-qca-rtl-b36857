// qca_lwire: L-shaped QCA wire with fault injection.
//
// Fault free (fault=0) the wire carries its input unchanged around the
// corner.  The fault that a single missing cell causes in such a wire is
// stuck-at-A': the signal arrives inverted (fault=1: output is the
// complement of the input).  Purely combinational.
module qca_lwire (
  input  logic a,
  input  logic fault,
  output logic y
);

  assign y = a ^ fault;

endmodule
