// tb_dbbl_top: end-to-end test of the decimal datapath at its default size
// (6 digits, base 10) plus the base-3 ROM adder stages and the base-4 latch
// stage beside it.
//
// Each operation loads X and Y through their set lines, selects Y or its
// 9's complement with the pre-carry, stores the sum in S and reads S back
// through NORM and COMP. Expected values come from integer arithmetic. Every
// mechanism of the design is counted and must occur at least once: addition,
// a carry rippling across a digit boundary, a carry out of the top digit,
// subtraction with a non-negative result, subtraction with a negative result
// (left in 10's complement form and read back through S's COMP selection), S holding while
// s_load is low, a single-digit load of X, the three base-3 adder stages, and the
// latch stage being transparent and holding. Latency is checked too: S shows
// the sum exactly one clock edge after s_load. Finally the three SCR storage
// stage models are switched: each must store the fired gate line, and the
// capacitive-coupled and pre-clear stages must turn the old SCR off after
// about 80 us and 11.5 us.
module tb_dbbl_top;
  import nbbl_pkg::*;
  import tb_nbbl_util_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  tb_word_t    x_set, y_set, x_q, sum, s_q;
  logic        y_norm, y_comp, s_load, s_norm, s_comp;
  nbbl_carry_t pre_carry, carry_out;
  logic [2:0]  rom_x, rom_y, diode_s, braid_s, scr_steer_s;
  logic        latch_clk;
  logic [3:0]  latch_d, latch_q, latch_held;
  logic [1:0]  scr_cs_in, scr_cs_out, scr_cc_in, scr_cc_out, scr_pc_in, scr_pc_out;

  int checks = 0, failures = 0;
  int n_add = 0, n_ripple = 0, n_overflow = 0, n_sub_pos = 0, n_sub_neg = 0;
  int n_hold = 0, n_digit_load = 0, n_rom = 0, n_latch_open = 0, n_latch_hold = 0;
  int n_scr_cs = 0, n_scr_cc = 0, n_scr_pc = 0;

  dbbl_top dut (
    .clk(clk), .rst_n(rst_n),
    .x_set(x_set), .y_set(y_set), .y_norm(y_norm), .y_comp(y_comp),
    .pre_carry(pre_carry), .s_load(s_load), .s_norm(s_norm), .s_comp(s_comp),
    .x_q(x_q), .sum(sum), .carry_out(carry_out), .s_q(s_q),
    .rom_x(rom_x), .rom_y(rom_y), .diode_s(diode_s), .braid_s(braid_s), .scr_steer_s(scr_steer_s),
    .latch_clk(latch_clk), .latch_d(latch_d), .latch_q(latch_q),
    .scr_cs_in(scr_cs_in), .scr_cs_out(scr_cs_out),
    .scr_cc_in(scr_cc_in), .scr_cc_out(scr_cc_out),
    .scr_pc_in(scr_pc_in), .scr_pc_out(scr_pc_out)
  );

  always #(5ns) clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // True if adding a, b and carry c makes a carry leave a digit below the top.
  function automatic bit ripples(int unsigned a, int unsigned b, int unsigned c);
    for (int i = 0; i < TB_DIGITS - 1; i++) begin
      c = ((a % 10) + (b % 10) + c) / 10;
      if (c != 0) return 1'b1;
      a /= 10;
      b /= 10;
    end
    return 1'b0;
  endfunction

  // Present both operands for one clock; they are stored at that edge.
  task automatic load_xy(int unsigned a, int unsigned b);
    x_set = enc_word(a);
    y_set = enc_word(b);
    @(posedge clk);
    #1;
    x_set = '0;
    y_set = '0;
    expect_eq(dec_word(x_q), a, "X after load");
  endtask

  // Run one operation: sub=0 computes a + b + c, sub=1 computes a - b.
  task automatic operate(int unsigned a, int unsigned b, bit sub, bit c);
    int unsigned total;
    load_xy(a, b);
    y_norm    = !sub;
    y_comp    = sub;
    pre_carry = (sub || c) ? CARRY_ONE : CARRY_ZERO;
    s_load    = 1'b1;
    #1;
    if (!sub) begin
      total = a + b + c;
      expect_eq(dec_word(sum), total % TB_MOD, "sum");
      expect_eq(carry_out.c1, total >= TB_MOD, "carry out (add)");
      expect_eq(carry_out.c0, total < TB_MOD, "no carry out (add)");
      n_add++;
      if (total >= TB_MOD) n_overflow++;
      if (ripples(a, b, c)) n_ripple++;
    end else begin
      expect_eq(carry_out.c1, a >= b, "carry out (sub)");
      if (ripples(a, nines(b), 1)) n_ripple++;
    end
    // S must still show its old value until the edge.
    s_norm = 1'b1; s_comp = 1'b0;
    @(posedge clk);
    #1;
    s_load = 1'b0;
    if (!sub) begin
      expect_eq(dec_word(s_q), (a + b + c) % TB_MOD, "S after add");
    end else if (a >= b) begin
      expect_eq(dec_word(s_q), a - b, "S after sub");
      n_sub_pos++;
    end else begin
      // No end carry: S holds the 10's complement of b - a, so its COMP
      // selection (the 9's complement) gives the magnitude less one.
      expect_eq(dec_word(s_q), TB_MOD - (b - a), "S after negative sub");
      s_norm = 1'b0; s_comp = 1'b1;
      #1;
      expect_eq(dec_word(s_q), b - a - 1, "COMP of negative result");
      s_norm = 1'b1; s_comp = 1'b0;
      n_sub_neg++;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    x_set = '0; y_set = '0; y_norm = 1'b1; y_comp = 1'b0;
    pre_carry = CARRY_ZERO; s_load = 1'b0; s_norm = 1'b1; s_comp = 1'b0;
    rom_x = '0; rom_y = '0; latch_clk = 1'b0; latch_d = 4'b0001;
    scr_cs_in = '0; scr_cc_in = '0; scr_pc_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    expect_eq(dec_word(s_q), 0, "S after reset");
    expect_eq(dec_word(x_q), 0, "X after reset");

    // Directed operations.
    operate(9, 3, 0, 1);             // the 9 + 3 + 1 example: 13
    operate(999999, 1, 0, 0);        // ripple through all digits, carry out
    operate(13, 9, 1, 0);
    operate(9, 13, 1, 0);
    operate(0, 0, 1, 0);
    // Random operations.
    for (int i = 0; i < 300; i++) begin
      operate($urandom % TB_MOD, $urandom % TB_MOD, $urandom % 2, $urandom % 2);
    end

    // S holds while s_load is low, even when X changes.
    begin
      int held;
      held = dec_word(s_q);
      load_xy(111111, 222222);
      @(posedge clk);
      #1;
      expect_eq(dec_word(s_q), held, "S hold");
      n_hold++;
    end

    // Load one digit of X: digit 3 becomes 7, the rest stays 111111.
    x_set[3] = enc_digit(7);
    @(posedge clk);
    #1;
    x_set = '0;
    expect_eq(dec_word(x_q), 117111, "X single digit load");
    n_digit_load++;

    // Base-3 ROM adder stages.
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        rom_x = 3'b001 << a;
        rom_y = 3'b001 << b;
        #1;
        expect_eq(int'(diode_s), 1 << ((a + b) % 3), "diode ROM");
        expect_eq(int'(braid_s), 1 << ((a + b) % 3), "braid ROM");
        expect_eq(int'(scr_steer_s), 1 << ((a + b) % 3), "SCR steering array");
        n_rom++;
      end
    end

    // Base-4 latch stage.
    for (int i = 0; i < 20; i++) begin
      latch_clk = 1'b1;
      latch_d   = 4'b0001 << ($urandom % 4);
      #1;
      expect_eq(int'(latch_q), int'(latch_d), "latch transparent");
      n_latch_open++;
      latch_held = latch_d;
      latch_clk  = 1'b0;
      #1;
      latch_d = 4'b0001 << ($urandom % 4);
      #1;
      expect_eq(int'(latch_q), int'(latch_held), "latch hold");
      n_latch_hold++;
      @(posedge clk);
    end

    // SCR storage stage models, started together with complementary gates.
    scr_cs_in = 2'b01; scr_cc_in = 2'b01; scr_pc_in = 2'b01;
    #(100us);
    expect_eq(int'(scr_cs_out), 1, "current sharing stores 0");
    expect_eq(int'(scr_cc_out), 1, "cap coupled stores 0");
    expect_eq(int'(scr_pc_out), 1, "pre-clear stores 0");
    scr_cs_in = 2'b10; scr_cc_in = 2'b10; scr_pc_in = 2'b10;
    #(1ns);
    expect_eq(int'(scr_cs_out), 2, "current sharing switches at once");
    expect_eq(int'(scr_cc_out), 3, "cap coupled: new SCR on, old turning off");
    expect_eq(int'(scr_pc_out), 3, "pre-clear pull-up");
    #(12us);
    expect_eq(int'(scr_pc_out), 2, "pre-clear: old SCR off after 11.5 us");
    n_scr_pc++;
    expect_eq(int'(scr_cc_out), 3, "cap coupled: old SCR still turning off");
    #(70us);
    expect_eq(int'(scr_cc_out), 2, "cap coupled: old SCR off after 80 us");
    n_scr_cc++;
    scr_cs_in = 2'b00;
    #(1us);
    expect_eq(int'(scr_cs_out), 2, "current sharing holds 1");
    n_scr_cs++;

    $display("mechanisms: add=%0d ripple=%0d overflow=%0d sub_pos=%0d sub_neg=%0d hold=%0d digit_load=%0d rom=%0d latch_open=%0d latch_hold=%0d scr_cs=%0d scr_cc=%0d scr_pc=%0d",
             n_add, n_ripple, n_overflow, n_sub_pos, n_sub_neg, n_hold, n_digit_load,
             n_rom, n_latch_open, n_latch_hold, n_scr_cs, n_scr_cc, n_scr_pc);
    checks++;
    if (n_add == 0 || n_ripple == 0 || n_overflow == 0 || n_sub_pos == 0 ||
        n_sub_neg == 0 || n_hold == 0 || n_digit_load == 0 || n_rom == 0 ||
        n_latch_open == 0 || n_latch_hold == 0 || n_scr_cs == 0 ||
        n_scr_cc == 0 || n_scr_pc == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
