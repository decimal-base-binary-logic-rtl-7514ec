// dbbl_top: a 6-digit decimal-base binary logic (DBBL) arithmetic datapath,
// with the document's other n-base binary logic realizations beside it.
//
// Decimal datapath: two DBBL registers X and Y hold the operands, one-hot per
// digit. X feeds the adder through its normal outputs, Y through its NORM/COMP
// selection, and the input carry of the adder is the pre-carry. Adding is
// X + Y with pre-carry 0; subtracting is X + 9's complement(Y) + 1, i.e. Y
// selected with comp and pre-carry 1 (a carry out then means X >= Y, and no
// carry out leaves the 10's complement of Y - X, whose 9's complement read
// through S's COMP selection is Y - X - 1). While s_load is high the sum
// word is gated onto the set lines of result register S, which stores it at
// the next rising clock; with s_load low S holds. S has its own NORM/COMP
// selection so a result can be read back complemented.
//
// Side by side, with their own ports: the base-3 carry-less adder stage as a
// diode ROM, as a braid-transformer ROM and (behavioural model) as an SCR
// steering array, all three fed the same digits, the
// base-4 latch storage stage, and behavioural models of the three base-2 SCR
// storage stages (current sharing, capacitive coupled, transistor pre-clear).
// The SCR storage models hold delays and initial states that synthesis
// ignores; everything else in this module is synthesizable.
//
// Timing: X, Y and S load on the rising edge of clk; the adder path
// (X/Y outputs -> 6 ripple stages -> S set lines) is combinational within one
// cycle. Reset (synchronous, active low) puts 0 in every digit. The register ->
// adder -> register arrangement and the subtraction method follow the
// document; the s_load gate, the clock and the reset are this design's.
module dbbl_top
  import nbbl_pkg::*;
#(
  parameter int unsigned N      = DBBL_BASE,
  parameter int unsigned DIGITS = DBBL_DIGITS,
  parameter int unsigned ROM_N  = 3,   // base of the ROM adder stages
  parameter int unsigned LATCH_N = 4   // base of the latch storage stage
) (
  input  logic                     clk,
  input  logic                     rst_n,

  // Decimal datapath.
  input  logic [DIGITS-1:0][N-1:0] x_set,    // set lines of register X
  input  logic [DIGITS-1:0][N-1:0] y_set,    // set lines of register Y
  input  logic                     y_norm,   // adder gets Y
  input  logic                     y_comp,   // adder gets 9's complement of Y
  input  nbbl_carry_t              pre_carry,// adder input carry
  input  logic                     s_load,   // store the sum in S at the next edge
  input  logic                     s_norm,   // S outputs its word
  input  logic                     s_comp,   // S outputs its complement
  output logic [DIGITS-1:0][N-1:0] x_q,      // register X, normal outputs
  output logic [DIGITS-1:0][N-1:0] sum,      // adder sum (combinational)
  output nbbl_carry_t              carry_out,// adder carry out
  output logic [DIGITS-1:0][N-1:0] s_q,      // register S, selected outputs

  // Base-3 carry-less adder stages, all fed rom_x and rom_y.
  input  logic [ROM_N-1:0]         rom_x,
  input  logic [ROM_N-1:0]         rom_y,
  output logic [ROM_N-1:0]         diode_s,
  output logic [ROM_N-1:0]         braid_s,
  output logic [ROM_N-1:0]         scr_steer_s,

  // Base-4 latch storage stage.
  input  logic                     latch_clk,
  input  logic [LATCH_N-1:0]       latch_d,
  output logic [LATCH_N-1:0]       latch_q,

  // Base-2 SCR storage stage models: gate lines in, cathode outputs out.
  input  logic [1:0]               scr_cs_in,
  output logic [1:0]               scr_cs_out,
  input  logic [1:0]               scr_cc_in,
  output logic [1:0]               scr_cc_out,
  input  logic [1:0]               scr_pc_in,
  output logic [1:0]               scr_pc_out
);

  logic [DIGITS-1:0][N-1:0] y_to_adder;
  logic [DIGITS-1:0][N-1:0] s_set;

  dbbl_register #(.N(N), .DIGITS(DIGITS)) u_reg_x (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (x_set),
    .norm (1'b1),
    .comp (1'b0),
    .q    (x_q)
  );

  dbbl_register #(.N(N), .DIGITS(DIGITS)) u_reg_y (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (y_set),
    .norm (y_norm),
    .comp (y_comp),
    .q    (y_to_adder)
  );

  dbbl_adder #(.N(N), .DIGITS(DIGITS)) u_adder (
    .x   (x_q),
    .y   (y_to_adder),
    .cin (pre_carry),
    .s   (sum),
    .cout(carry_out)
  );

  assign s_set = s_load ? sum : '0;

  dbbl_register #(.N(N), .DIGITS(DIGITS)) u_reg_s (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (s_set),
    .norm (s_norm),
    .comp (s_comp),
    .q    (s_q)
  );

  diode_rom_adder_stage #(.N(ROM_N)) u_diode_rom (
    .x(rom_x),
    .y(rom_y),
    .s(diode_s)
  );

  braid_rom_adder_stage #(.N(ROM_N)) u_braid_rom (
    .x(rom_x),
    .y(rom_y),
    .s(braid_s)
  );

  scr_steering_adder_stage #(.N(ROM_N)) u_scr_steer (
    .x(rom_x),
    .y(rom_y),
    .s(scr_steer_s)
  );

  latch_register_stage #(.N(LATCH_N)) u_latch (
    .clk(latch_clk),
    .d  (latch_d),
    .q  (latch_q)
  );

  scr_current_sharing_stage #(.N(2)) u_scr_cs (
    .x_in (scr_cs_in),
    .x_out(scr_cs_out)
  );

  scr_cap_coupled_stage u_scr_cc (
    .x_in (scr_cc_in),
    .x_out(scr_cc_out)
  );

  scr_preclear_stage #(.N(2)) u_scr_pc (
    .x_in (scr_pc_in),
    .x_out(scr_pc_out)
  );

endmodule
