// tb_scr_preclear_stage: checks the transistor pre-clear SCR stage model with
// complementary gate levels, as in its measured waveforms. A rising gate line
// pulls every output up at once; 11 us later both are still up, 12 us later
// only the gated SCR is on (turn-off about 11.5 us).
module tb_scr_preclear_stage;
  logic       clk = 1'b0;
  logic [1:0] x_in, x_out;
  int checks = 0, failures = 0;

  scr_preclear_stage dut (.x_in(x_in), .x_out(x_out));

  always #(500ns) clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic [1:0] want, string what);
    checks++;
    if (x_out != want) begin
      failures++;
      $display("FAIL %s: x_out=%b want %b at %t", what, x_out, want, $time);
    end
  endtask

  initial begin
    x_in = 2'b00;
    #(1us);
    expect_out(2'b00, "power-up");
    for (int i = 0; i < 8; i++) begin
      x_in = (i % 2 == 0) ? 2'b01 : 2'b10;
      #(1ns);
      expect_out(2'b11, "pull-up");
      #(11us);
      expect_out(2'b11, "still pulled up");
      #(1us);
      expect_out(x_in, "gated SCR alone on");
      #(30us);
      expect_out(x_in, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
