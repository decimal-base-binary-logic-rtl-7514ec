// scr_steering_adder_stage: behavioural model of the SCR steering-array adder
// stage of n-base binary logic, drawn in the document for base 3, without
// carries.
//
// In the real array the high augend line x^a supplies the current, and the
// addend line y^b fires the thyristor that steers that current onto sum line
// s^((a+b) mod N). With y^0 the current goes straight down to s^a; adding
// 1 + 1, for example, the y^1 input shifts the current of x^1 over to s^2. The
// loads on the sum lines are left to the circuit being driven, such as an SCR
// storage stage.
//
// Model: only the steering, at the logic level: s^k is high when some x^a and
// y^b with (a+b) mod N = k are both high. With no input high, nothing is
// steered and every sum line is low. The document gives no switching times,
// gate currents or holding behaviour for the array, so none is modelled; in
// particular a fired SCR is not kept on after its gate line falls.
//
// Timing: no clock, zero delay.
module scr_steering_adder_stage #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] x,   // augend lines x^a, the current source
  input  logic [N-1:0] y,   // addend lines y^b, the steering gates
  output logic [N-1:0] s    // sum lines s^k
);

  always_comb begin
    s = '0;
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        // Gate y^b steers the current of x^a b lines over.
        if (y[b]) s[(a+b)%N] = s[(a+b)%N] | x[a];
      end
    end
  end

endmodule
