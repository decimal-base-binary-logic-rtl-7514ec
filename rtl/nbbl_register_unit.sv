// nbbl_register_unit: one-digit n-base binary logic storage unit.
//
// It has N set lines x^0..x^(N-1) in and N lines x^0..x^(N-1) out, labelled
// alike: putting a 1 on input line x^i makes output line x^i the one high
// output, and it stays so after the input returns to all zeros.
//
// How it works: as in the document's base-3 example, there is one S-R flip-flop
// per line. Flip-flop i is set by its own input line and reset by the OR of all
// the other input lines, so loading a new digit sets its own flip-flop and
// clears the one that held the old digit. An all-zero input touches nothing.
//
// Timing and reset, which are this design's choices: the document draws the
// unit unclocked; here the flip-flops are sampled on the rising clock edge, so a
// digit presented for one cycle is held from the next cycle on. Should two
// input lines be high at once (not a valid code), set wins over reset for both.
// The active-low synchronous reset loads digit 0 (line x^0 high), so the unit
// always holds a valid one-hot code.
module nbbl_register_unit
  import nbbl_pkg::*;
#(
  parameter int unsigned N = DBBL_BASE
) (
  input  logic         clk,
  input  logic         rst_n,  // synchronous, active low: stores digit 0
  input  logic [N-1:0] d,      // set lines, one-hot to load, all zero to hold
  output logic [N-1:0] q       // stored digit, one-hot
);

  logic [N-1:0] set_line;
  logic [N-1:0] reset_line;

  // S of flip-flop i is line i; R is the OR of every other input line.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      set_line[i]   = d[i];
      reset_line[i] = |(d & ~(N'(1) << i));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= N'(1);
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (set_line[i])        q[i] <= 1'b1;
        else if (reset_line[i]) q[i] <= 1'b0;
      end
    end
  end

endmodule
