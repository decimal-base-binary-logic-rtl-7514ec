// tb_nbbl_register_unit: checks the one-digit storage unit. After reset it
// must hold digit 0. Random digits are then presented for one clock each and
// must appear one edge later; between loads the set lines are all zero for a
// random number of cycles and the digit must be held. A reference model keeps
// the last loaded value.
module tb_nbbl_register_unit;
  import tb_nbbl_util_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n;
  tb_digit_t d, q;
  int        expected;
  int checks = 0, failures = 0;

  nbbl_register_unit dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (dec_digit(q) != expected) begin
      failures++;
      $display("FAIL %s: expected %0d, q=%b", what, expected, q);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = '0;
    repeat (2) @(posedge clk);
    #1;
    expected = 0;
    check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      int v;
      v = $urandom % 10;
      d = enc_digit(v);
      @(posedge clk);
      #1;
      expected = v;
      check("load");
      d = '0;
      repeat ($urandom % 4) begin
        @(posedge clk);
        #1;
        check("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
