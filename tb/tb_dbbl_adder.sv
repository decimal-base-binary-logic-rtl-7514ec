// tb_dbbl_adder: checks the 6-digit DBBL adder against integer arithmetic.
// Random and corner-case operands (all nines, carries that ripple through
// every digit) are added with a pre-carry of 0 and 1, and subtraction is
// checked as x + 9's complement(y) + 1: a carry out means x >= y and the sum is
// x - y; otherwise the sum is the 10's complement of y - x, 10^6 - (y - x).
module tb_dbbl_adder;
  import nbbl_pkg::*;
  import tb_nbbl_util_pkg::*;

  logic        clk = 1'b0;
  tb_word_t    x, y, s;
  nbbl_carry_t cin, cout;
  int checks = 0, failures = 0;

  dbbl_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_check(int unsigned a, int unsigned b, int unsigned c);
    int unsigned total = a + b + c;
    x   = enc_word(a);
    y   = enc_word(b);
    cin = c ? '{c1: 1'b1, c0: 1'b0} : '{c1: 1'b0, c0: 1'b1};
    @(posedge clk);
    checks++;
    if (dec_word(s) != int'(total % TB_MOD) ||
        cout.c1 != (total >= TB_MOD) || cout.c0 != (total < TB_MOD)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: s=%0d cout=%b", a, b, c, dec_word(s), cout);
    end
  endtask

  task automatic sub_check(int unsigned a, int unsigned b);
    x   = enc_word(a);
    y   = enc_word(nines(b));
    cin = '{c1: 1'b1, c0: 1'b0};
    @(posedge clk);
    checks++;
    if (a >= b) begin
      if (!cout.c1 || dec_word(s) != int'(a - b)) begin
        failures++;
        $display("FAIL %0d-%0d: s=%0d cout=%b", a, b, dec_word(s), cout);
      end
    end else begin
      if (!cout.c0 || dec_word(s) != int'(TB_MOD - (b - a))) begin
        failures++;
        $display("FAIL %0d-%0d (negative): s=%0d cout=%b", a, b, dec_word(s), cout);
      end
    end
  endtask

  initial begin
    add_check(0, 0, 0);
    add_check(999999, 1, 0);
    add_check(999999, 0, 1);
    add_check(999999, 999999, 1);
    add_check(123456, 876543, 1);
    add_check(500000, 500000, 0);
    add_check(9, 1, 0);
    for (int i = 0; i < 2000; i++) begin
      add_check($urandom % TB_MOD, $urandom % TB_MOD, $urandom % 2);
    end
    sub_check(13, 9);
    sub_check(9, 13);
    sub_check(100000, 1);
    sub_check(42, 42);
    for (int i = 0; i < 1000; i++) begin
      sub_check($urandom % TB_MOD, $urandom % TB_MOD);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
