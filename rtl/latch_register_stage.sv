// latch_register_stage: n-base binary logic storage stage made of n D latches
// on one common clock (the document's base-4 example).
//
// Each line x^i of the one-hot input digit goes to its own D latch and each
// latch drives the output line x^i of the same name. While clk is high the
// latches are transparent and the output follows the input; when clk falls
// they hold the digit present at that moment.
//
// The latches are intended: this is the one clocked storage stage of the
// document and it is built from level-sensitive latches, so the latch the
// tools report for q is the design. There is no reset (the document shows
// none); the first digit is loaded by holding clk high.
module latch_register_stage #(
  parameter int unsigned N = 4
) (
  input  logic         clk,   // common latch enable, transparent when high
  input  logic [N-1:0] d,     // digit in, one-hot
  output logic [N-1:0] q      // digit held
);

  always_latch begin
    if (clk) q = d;
  end

endmodule
