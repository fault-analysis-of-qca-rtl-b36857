// qca_mv: QCA majority voter with fault injection.
//
// Fault free, the output is the majority of the three inputs,
// F = AB + BC + AC; with one input tied to 0 it is an AND gate, tied to 1 an
// OR gate.  Two auxiliary inputs inject the faults that a single missing cell
// causes in the voter's layout:
//   fault0=0, fault1=0 : fault free, Maj(A, B, C)
//   fault0=0, fault1=1 : stuck-at-B (cell next to input A or C missing)
//   fault0=1           : Maj(A', B, C') (centre device cell missing)
// The fault encoding for 00, 01 and 10 follows the HDLQ voter model; the
// encoding 11 is given two readings by different descriptions of that model,
// and both are covered here by letting fault0=1 alone select Maj(A',B,C').
// Purely combinational, no clock.
module qca_mv (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic fault0,
  input  logic fault1,
  output logic f
);

  logic ma, mc;

  always_comb begin
    // The centre-cell fault inverts the two outer inputs of the voter.
    ma = fault0 ? ~a : a;
    mc = fault0 ? ~c : c;
    if (!fault0 && fault1) f = b;
    else                   f = (ma & b) | (b & mc) | (ma & mc);
  end

endmodule
