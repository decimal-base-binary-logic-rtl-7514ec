// tb_nbbl_util_pkg: testbench helpers for the decimal (base 10, 6 digit)
// configuration. They convert between integers and one-hot digit lines with
// plain integer arithmetic, independently of the design, so that testbenches
// can work out expected values on their own.
package tb_nbbl_util_pkg;

  localparam int unsigned TB_N      = 10;
  localparam int unsigned TB_DIGITS = 6;
  localparam int unsigned TB_MOD    = 1000000;  // 10^TB_DIGITS

  typedef logic [TB_N-1:0]               tb_digit_t;
  typedef logic [TB_DIGITS-1:0][TB_N-1:0] tb_word_t;

  // Digit value v (0..9) on its ten lines.
  function automatic tb_digit_t enc_digit(int unsigned v);
    tb_digit_t d = '0;
    d[v] = 1'b1;
    return d;
  endfunction

  // Value of a one-hot digit, or -1 if the lines are not exactly one-hot.
  function automatic int dec_digit(tb_digit_t d);
    int hits = 0;
    int val  = -1;
    for (int i = 0; i < TB_N; i++) begin
      if (d[i]) begin
        hits++;
        val = i;
      end
    end
    return (hits == 1) ? val : -1;
  endfunction

  // Integer 0..999999 as six one-hot digits, digit 0 least significant.
  function automatic tb_word_t enc_word(int unsigned v);
    tb_word_t w;
    for (int i = 0; i < TB_DIGITS; i++) begin
      w[i] = enc_digit(v % 10);
      v    = v / 10;
    end
    return w;
  endfunction

  // Value of a word, or -1 if any digit is not one-hot.
  function automatic int dec_word(tb_word_t w);
    int val = 0;
    for (int i = TB_DIGITS - 1; i >= 0; i--) begin
      int d = dec_digit(w[i]);
      if (d < 0) return -1;
      val = val * 10 + d;
    end
    return val;
  endfunction

  // Digit-by-digit 9's complement worked out arithmetically.
  function automatic int unsigned nines(int unsigned v);
    return (TB_MOD - 1) - v;
  endfunction

endpackage
