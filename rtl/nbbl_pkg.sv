// nbbl_pkg: types and constants shared by the n-base binary logic (NBBL) blocks.
//
// In NBBL a base-n digit travels on n binary lines x^0..x^(n-1), exactly one of
// which is high ("1-out-of-n" code). A carry travels on two lines c^0 and c^1,
// again with exactly one high. Bit i of a digit vector is line x^i. The main
// configuration is decimal (DBBL): base 10, and a 6-digit word, which holds
// about the same range as a 20-bit binary word (10^d = 2^b gives d/b = 1/3.33).
// An all-zero digit vector is "no digit": it drives nothing and a storage
// unit that receives it keeps its contents.
package nbbl_pkg;

  // Base and word length of the decimal configuration.
  localparam int unsigned DBBL_BASE   = 10;
  localparam int unsigned DBBL_DIGITS = 6;

  // One decimal digit on its ten lines.
  typedef logic [DBBL_BASE-1:0] dbbl_digit_t;

  // A carry on its two lines, c^1 (carry is one) and c^0 (carry is zero).
  typedef struct packed {
    logic c1;
    logic c0;
  } nbbl_carry_t;

  localparam nbbl_carry_t CARRY_ZERO = '{c1: 1'b0, c0: 1'b1};
  localparam nbbl_carry_t CARRY_ONE  = '{c1: 1'b1, c0: 1'b0};
  localparam nbbl_carry_t CARRY_NONE = '{c1: 1'b0, c0: 1'b0};

endpackage
