// dbbl_register: a multi-digit decimal-base binary logic storage register (the
// "6 digit DBBL register" chip) with NORM/COMP output selection.
//
// DIGITS storage units of N lines each take the word in on N*DIGITS set lines
// and give it out on N*DIGITS lines, through one complement gate per digit. The
// NORM line selects the stored word, the COMP line its (N-1)'s complement, as
// the register must deliver to the adder to subtract. For 6 decimal digits the
// chip has 60 inputs, 60 outputs and the 2 select lines: 122 signal pins.
//
// Timing: a word presented on the set lines is stored at the rising clock edge
// and appears on the outputs after it; digits whose set lines are all zero keep
// their value, so single digits can be loaded alone. The output selection is
// combinational. The clock and the synchronous reset (all digits 0) are this
// design's choices; the document leaves clocks out of its pin count.
module dbbl_register
  import nbbl_pkg::*;
#(
  parameter int unsigned N      = DBBL_BASE,
  parameter int unsigned DIGITS = DBBL_DIGITS
) (
  input  logic                     clk,
  input  logic                     rst_n,  // synchronous, active low: all digits 0
  input  logic [DIGITS-1:0][N-1:0] d,      // set lines, digit 0 least significant
  input  logic                     norm,   // output the stored word
  input  logic                     comp,   // output its (N-1)'s complement
  output logic [DIGITS-1:0][N-1:0] q       // selected output word
);

  logic [DIGITS-1:0][N-1:0] stored;

  for (genvar g = 0; g < DIGITS; g++) begin : g_digit
    nbbl_register_unit #(.N(N)) u_unit (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (d[g]),
      .q    (stored[g])
    );

    nbbl_complement_gate #(.N(N)) u_sel (
      .x   (stored[g]),
      .norm(norm),
      .comp(comp),
      .q   (q[g])
    );
  end

endmodule
