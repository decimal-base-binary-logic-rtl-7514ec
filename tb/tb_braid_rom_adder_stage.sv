// tb_braid_rom_adder_stage: all nine input pairs of the base-3 braid-transformer ROM stage
// must give the one-hot sum (a + b) mod 3, and an idle stage (no input line
// high) must give no output line high.
module tb_braid_rom_adder_stage;
  logic       clk = 1'b0;
  logic [2:0] x, y, s;
  int checks = 0, failures = 0;

  braid_rom_adder_stage dut (.x(x), .y(y), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 3; a++) begin
      for (int b = 0; b < 3; b++) begin
        x = 3'b001 << a;
        y = 3'b001 << b;
        @(posedge clk);
        checks++;
        if (s != (3'b001 << ((a + b) % 3))) begin
          failures++;
          $display("FAIL %0d+%0d: s=%b", a, b, s);
        end
      end
    end
    x = '0; y = '0;
    @(posedge clk);
    checks++;
    if (s != '0) begin failures++; $display("FAIL idle: s=%b", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
