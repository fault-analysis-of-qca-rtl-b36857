// qca_inv: QCA inverter with fault injection.
//
// Fault free (fault=0) the output is the complement of the input; the
// robust inverter layout splits the input wire in two and inverts at the
// point where the branches meet.  The fault a single missing cell causes
// in it is stuck-at-A: the signal passes uninverted (fault=1: output equals
// input).
// Purely combinational.
module qca_inv (
  input  logic a,
  input  logic fault,
  output logic y
);

  assign y = fault ? a : ~a;

endmodule
