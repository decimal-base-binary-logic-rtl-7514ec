// braid_rom_adder_stage: carry-less n-base binary logic adder stage organised as
// a braid-transformer read-only memory (the document's base-3 example).
//
// Inputs are two one-hot digits x and y; output is the one-hot digit
// s = (x + y) mod N, with no carry in or out.
//
// How it works: there is one transformer core for each input pair (a, b), N*N
// in all. Every input line threads every core except that x^a and y^b go
// around core (a, b): each core is "bypassed" by exactly one pair. A core
// gives an output whenever a current-carrying line threads it, so for input
// pair (a, b) core (a, b) is the only quiet one. The N cores whose pairs sum to
// k modulo N feed one NLEQ (not-logical-equivalence) gate, whose output is 0
// exactly when all its inputs are the same. Hence s^k is 1 only in the group
// that holds the quiet core. With all inputs low every core is quiet, all NLEQ
// inputs agree and every output is 0. For N = 3 the cores, left to right, are
// bypassed by x^0y^0, x^1y^2, x^2y^1 (feeding s^0), x^0y^1, x^1y^0, x^2y^2
// (s^1) and x^0y^2, x^1y^1, x^2y^0 (s^2).
//
// Timing: combinational. A transformer answers to a change of current, not to
// a level; this model treats a core's output as the level "some threading line
// is high", which is its logic function once the inputs have settled. The
// transients and negative swings of the real windings are not modelled.
module braid_rom_adder_stage #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] x,   // augend digit, one-hot
  input  logic [N-1:0] y,   // addend digit, one-hot
  output logic [N-1:0] s    // sum digit (x + y) mod N, one-hot
);

  // core[a*N+b]: core bypassed by x^a and y^b.
  logic [N*N-1:0] core;
  // Inputs of the NLEQ gate for sum k: nleq_in[k][j] is its j-th core.
  logic [N-1:0][N-1:0] nleq_in;

  always_comb begin
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        core[a*N+b] = |(x & ~(N'(1) << a)) | |(y & ~(N'(1) << b));
      end
    end
  end

  // Core (a, b) is the b-th input of the gate for sum (a+b) mod N: for each
  // sum there is exactly one b per a.
  always_comb begin
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        nleq_in[(a+b)%N][a] = core[a*N+b];
      end
    end
  end

  // NLEQ: 0 iff all inputs are the same.
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      s[k] = (|nleq_in[k]) & ~(&nleq_in[k]);
    end
  end

endmodule
