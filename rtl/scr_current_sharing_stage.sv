// scr_current_sharing_stage: behavioural model (not synthesizable hardware) of
// the "current sharing" (current robbing) SCR storage stage of n-base binary
// logic, drawn in the document for base 2.
//
// The real stage is N thyristors whose anodes share one supply resistor, each
// with a load resistor at its cathode, which is also its output. The resistor
// values leave current for only one conducting SCR: when a second SCR is fired
// through its gate, it robs the first of current until that one drops below
// its holding current and turns off. The stage therefore stores the last gate
// line that was high, as a one-hot output.
//
// Model: x_out is the set of conducting SCRs. Whenever exactly one gate line
// is high, that SCR conducts and all others are off; with no gate high the
// state is kept. At power-up no SCR conducts (x_out all zero) until a gate is
// fired. The document gives no switching times for this stage, so the model
// has none. The model holds its state without a clock, so tools report a
// latch on x_out: that storage is the stage's function. Not modelled: the matched, ideal SCR characteristics the circuit
// depends on, and what happens with two gates high at once (here: no change).
module scr_current_sharing_stage #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] x_in,   // gate lines x^i_IN, one high to store digit i
  output logic [N-1:0] x_out   // cathode outputs x^i_OUT, high when SCR i conducts
);

  initial x_out = '0;

  always @(x_in) begin
    if (x_in != '0 && (x_in & (x_in - 1'b1)) == '0) x_out = x_in;
  end

endmodule
