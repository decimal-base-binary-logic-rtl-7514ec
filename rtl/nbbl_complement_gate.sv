// nbbl_complement_gate: n-1's complement "gate" of n-base binary logic, with
// the NORM/COMP output selection of the DBBL register chip.
//
// In the 1-out-of-n code the (n-1)'s complement needs no logic: input line x^i
// is simply wired to output line x^((n-1)-i) (for base 10, the 9's complement).
// This block puts that crossing of wires beside the straight connection and
// selects between them with two select lines: norm passes the digit as it is,
// comp passes its complement. With both low the output is all zero (no digit);
// with both high the two are ORed, which is not a valid code and is the
// user's to avoid.
//
// Timing: combinational, one AND-OR level. The crossing follows the document;
// the AND-OR selection is this design's choice, as the document shows only
// the two select pins.
module nbbl_complement_gate
  import nbbl_pkg::*;
#(
  parameter int unsigned N = DBBL_BASE
) (
  input  logic [N-1:0] x,     // digit in
  input  logic         norm,  // select the digit itself
  input  logic         comp,  // select its (N-1)'s complement
  output logic [N-1:0] q      // selected digit
);

  logic [N-1:0] crossed;

  // Line i goes to line (N-1)-i.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      crossed[N-1-i] = x[i];
    end
  end

  assign q = ({N{norm}} & x) | ({N{comp}} & crossed);

endmodule
