// tb_nbbl_complement_gate: applies every decimal digit with each setting of
// the NORM/COMP select lines. NORM must give the digit, COMP its 9's
// complement 9 - v, neither must give no digit at all.
module tb_nbbl_complement_gate;
  import tb_nbbl_util_pkg::*;

  logic      clk = 1'b0;
  tb_digit_t x, q;
  logic      norm, comp;
  int checks = 0, failures = 0;

  nbbl_complement_gate dut (.x(x), .norm(norm), .comp(comp), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 10; v++) begin
      x = enc_digit(v);
      norm = 1'b1; comp = 1'b0;
      @(posedge clk);
      checks++;
      if (dec_digit(q) != v) begin failures++; $display("FAIL norm %0d: %b", v, q); end
      norm = 1'b0; comp = 1'b1;
      @(posedge clk);
      checks++;
      if (dec_digit(q) != 9 - v) begin failures++; $display("FAIL comp %0d: %b", v, q); end
      norm = 1'b0; comp = 1'b0;
      @(posedge clk);
      checks++;
      if (q != '0) begin failures++; $display("FAIL none %0d: %b", v, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
