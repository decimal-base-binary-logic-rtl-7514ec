// nbbl_adder_stage: one digit of an n-base binary logic adder (Fig. "DBBL adder
// stage"), purely combinational.
//
// Inputs are the augend x and addend y, each on N one-hot lines, and the input
// carry on the two lines c^0/c^1. Outputs are the sum digit on N one-hot lines
// and the output carry on c^0/c^1. For N = 10 the stage is a decoder of 22
// inputs and 12 outputs.
//
// How it works: every output line is a two-level AND-OR (sum of products). For
// each combination of augend value a, addend value b and carry value c there is
// one three-input AND term x^a.y^b.c^c; the term is ORed into sum line
// s^((a+b+c) mod N) and into carry line c^1 if a+b+c >= N, else c^0. Without
// an input carry this is the document's equation
// s^0 = x^0y^0 + x^1y^9 + x^2y^8 + ... + x^9y^1. Since one term per valid
// input combination is true, a valid input gives exactly one high sum line and
// one high carry line; an all-zero input (idle stage) gives all-zero outputs.
//
// Timing: no clock; two gate levels from any input to any output. The AND-OR
// structure follows the document; the N*N*2 term enumeration is the direct
// reading of its equations.
module nbbl_adder_stage
  import nbbl_pkg::*;
#(
  parameter int unsigned N = DBBL_BASE
) (
  input  logic [N-1:0] x,     // augend digit, line x^i = bit i
  input  logic [N-1:0] y,     // addend digit
  input  nbbl_carry_t  cin,   // carry from the next less significant stage
  output logic [N-1:0] s,     // sum digit
  output nbbl_carry_t  cout   // carry to the next more significant stage
);

  always_comb begin
    logic term;
    int unsigned total;
    s    = '0;
    cout = CARRY_NONE;
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        for (int unsigned c = 0; c < 2; c++) begin
          term  = x[a] & y[b] & ((c == 1) ? cin.c1 : cin.c0);
          total = a + b + c;
          if (total >= N) begin
            s[total-N] = s[total-N] | term;
            cout.c1    = cout.c1 | term;
          end else begin
            s[total]   = s[total] | term;
            cout.c0    = cout.c0 | term;
          end
        end
      end
    end
  end

endmodule
