// tb_nbbl_adder_stage: exhaustive check of one decimal adder stage. Every
// augend, addend and carry value (200 cases) is applied and the one-hot sum and
// carry are compared with (a + b + c) mod 10 and (a + b + c) / 10. An idle
// stage (all lines low) must drive all outputs low. A watchdog ends the run.
module tb_nbbl_adder_stage;
  import nbbl_pkg::*;
  import tb_nbbl_util_pkg::*;

  logic        clk = 1'b0;
  tb_digit_t   x, y, s;
  nbbl_carry_t cin, cout;
  int checks = 0, failures = 0;

  nbbl_adder_stage dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 10; a++) begin
      for (int b = 0; b < 10; b++) begin
        for (int c = 0; c < 2; c++) begin
          x   = enc_digit(a);
          y   = enc_digit(b);
          cin = c ? '{c1: 1'b1, c0: 1'b0} : '{c1: 1'b0, c0: 1'b1};
          @(posedge clk);
          checks++;
          if (dec_digit(s) != (a + b + c) % 10 ||
              cout.c1 != ((a + b + c) >= 10) || cout.c0 != ((a + b + c) < 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: s=%b cout=%b", a, b, c, s, cout);
          end
        end
      end
    end
    x = '0; y = '0; cin = '{c1: 1'b0, c0: 1'b0};
    @(posedge clk);
    checks++;
    if (s != '0 || cout != '{c1: 1'b0, c0: 1'b0}) begin
      failures++;
      $display("FAIL idle stage drives s=%b cout=%b", s, cout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
