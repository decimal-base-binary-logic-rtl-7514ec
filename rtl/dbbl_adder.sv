// dbbl_adder: a multi-digit decimal-base binary logic adder (the "6 digit DBBL
// adder" chip), built as a row of nbbl_adder_stage digits.
//
// Each digit is N one-hot lines; digit 0 is the least significant. The carry
// ripples from stage to stage on its two lines c^0/c^1, so a 6-digit adder has
// 6*20 digit inputs, 6*10 sum outputs, and the pairs c_in^0/c_in^1 and
// c_out^0/c_out^1: 184 signal pins. The input carry doubles as the "pre-carry"
// used for subtraction: feed the minuend on x, the 9's complement of the
// subtrahend on y and a carry of one.
//
// Timing: combinational. The worst path is the carry through all DIGITS
// stages, two gate levels per stage. The ripple organisation is the one the
// document compares against binary adders; a two-level whole-word adder is
// mentioned there as a faster alternative and is not built here.
module dbbl_adder
  import nbbl_pkg::*;
#(
  parameter int unsigned N      = DBBL_BASE,
  parameter int unsigned DIGITS = DBBL_DIGITS
) (
  input  logic [DIGITS-1:0][N-1:0] x,     // augend word
  input  logic [DIGITS-1:0][N-1:0] y,     // addend word
  input  nbbl_carry_t              cin,   // carry (pre-carry) into digit 0
  output logic [DIGITS-1:0][N-1:0] s,     // sum word
  output nbbl_carry_t              cout   // carry out of the top digit
);

  nbbl_carry_t carry [DIGITS+1];

  assign carry[0] = cin;

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    nbbl_adder_stage #(.N(N)) u_stage (
      .x   (x[d]),
      .y   (y[d]),
      .cin (carry[d]),
      .s   (s[d]),
      .cout(carry[d+1])
    );
  end

  assign cout = carry[DIGITS];

endmodule
