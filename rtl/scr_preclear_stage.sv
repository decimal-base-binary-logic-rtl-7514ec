// scr_preclear_stage: behavioural model (not synthesizable hardware) of the
// transistor pre-clear SCR storage stage of n-base binary logic, drawn in the
// document for base 2 with two-transistor SCR equivalents.
//
// In the real stage every rising gate line is differentiated (390 pF with
// 180 ohm) into a short positive spike that turns on two "pull up"
// transistors; they pull all SCR cathodes up to the anode level, which shunts
// every SCR off. When the spike has died away only the SCR whose gate is still
// high turns on and stays on. The measured time from the input edge to the old
// SCR's output reaching its off level is about 11.5 us.
//
// Model: x_out[i] is 1 while SCR i conducts or its cathode is pulled up. On a
// rising edge of gate line i every output goes high (the pull-up), and
// TURN_OFF_NS later (default 11.5 us, the measured value) only x_out[i] stays
// high. Power-up state: all off. The gate lines must not switch faster than
// the turn-off time.
module scr_preclear_stage #(
  parameter int unsigned N           = 2,
  parameter int unsigned TURN_OFF_NS = 11500
) (
  input  logic [N-1:0] x_in,   // gate lines x^i_IN
  output logic [N-1:0] x_out   // cathode outputs x^i_OUT
);

  logic [N-1:0] x_in_last;

  initial begin
    x_out     = '0;
    x_in_last = '0;
  end

  // A rising gate line pulls every cathode up; after the pulse only the
  // gated SCR conducts.
  always @(x_in) begin
    for (int i = 0; i < N; i++) begin
      if (x_in[i] && !x_in_last[i]) begin
        x_out <= '1;
        x_out <= #(TURN_OFF_NS * 1ns) N'(1) << i;
      end
    end
    x_in_last = x_in;
  end

endmodule
