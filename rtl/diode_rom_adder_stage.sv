// diode_rom_adder_stage: carry-less n-base binary logic adder stage organised as
// a diode read-only-memory array (the document's base-3 example).
//
// Inputs are two one-hot digits x and y; output is the one-hot digit
// s = (x + y) mod N, with no carry in or out. The array has one horizontal
// product line for every pair (a, b): a diode AND of x^a and y^b. Each product
// line drives, through one diode, the output line s^((a+b) mod N); the output
// lines are diode ORs. For N = 3 the rows give, for example,
// s^0 = x^0y^0 + x^1y^2 + x^2y^1. With all inputs low every output is low.
//
// Timing: combinational, one AND level and one OR level. The row/column
// structure follows the document; the parameter N generalises its base-3
// drawing, as the document says the circuit extends to larger bases.
module diode_rom_adder_stage #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] x,   // augend digit, one-hot
  input  logic [N-1:0] y,   // addend digit, one-hot
  output logic [N-1:0] s    // sum digit (x + y) mod N, one-hot
);

  // Product (row) lines, row a*N+b is x^a AND y^b.
  logic [N*N-1:0] row;

  always_comb begin
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        row[a*N+b] = x[a] & y[b];
      end
    end
  end

  // Column (output) lines: OR of the rows whose pair sums to k modulo N.
  always_comb begin
    s = '0;
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        s[(a+b)%N] = s[(a+b)%N] | row[a*N+b];
      end
    end
  end

endmodule
