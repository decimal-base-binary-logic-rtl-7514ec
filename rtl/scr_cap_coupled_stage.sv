// scr_cap_coupled_stage: behavioural model (not synthesizable hardware) of the
// capacitive-coupled SCR storage stage for base-2 n-base binary logic.
//
// The real stage has two SCRs with 200 ohm cathode loads on a -10.75 V supply,
// 750 ohm gate resistors and a 0.1 uF capacitor between the two cathodes. When
// the off SCR is fired, its cathode jumps and the charged capacitor pushes the
// other SCR's cathode above its anode, turning it off. The measured turn-off,
// from the input change to the SCR being off, is about 80 us, set by the RC
// time constant; meanwhile the output of the SCR turning off overshoots above
// the normal logic 1 level.
//
// Model: x_out[i] is 1 while SCR i conducts or is still turning off. A rising
// gate line of an SCR that is off turns it on at once and turns the other SCR
// off TURN_OFF_NS later (default 80 us, the measured value). A rising gate of
// the SCR already on changes nothing. Power-up state: both off. The gate lines
// must not switch faster than the turn-off time, as in the real circuit; the
// analog overshoot is not modelled.
module scr_cap_coupled_stage #(
  parameter int unsigned TURN_OFF_NS = 80000
) (
  input  logic [1:0] x_in,    // gate lines x^0_IN, x^1_IN
  output logic [1:0] x_out    // outputs x^0_OUT, x^1_OUT, high when conducting
);

  logic [1:0] x_in_last;

  initial begin
    x_out     = '0;
    x_in_last = '0;
  end

  // Fire on a rising gate line; the other SCR is commutated off later.
  always @(x_in) begin
    for (int i = 0; i < 2; i++) begin
      if (x_in[i] && !x_in_last[i] && !x_out[i]) begin
        x_out[i]   <= 1'b1;
        x_out[1-i] <= #(TURN_OFF_NS * 1ns) 1'b0;
      end
    end
    x_in_last = x_in;
  end

endmodule
