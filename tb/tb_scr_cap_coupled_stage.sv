// tb_scr_cap_coupled_stage: checks the capacitive-coupled SCR stage model with
// complementary gate levels, as in its measured waveforms. A newly fired SCR
// must be on at once; the SCR it replaces must still be on 79 us later and
// off 81 us later (turn-off about 80 us). A rising gate of the SCR already on
// must change nothing.
module tb_scr_cap_coupled_stage;
  logic       clk = 1'b0;
  logic [1:0] x_in, x_out;
  int checks = 0, failures = 0;

  scr_cap_coupled_stage dut (.x_in(x_in), .x_out(x_out));

  always #(500ns) clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    x_in = 2'b01;
    #(1ns);
    expect_out(2'b01, "first fire");
    #(100us);
    for (int i = 0; i < 4; i++) begin
      x_in = 2'b10;
      #(1ns);
      expect_out(2'b11, "SCR 1 on at once");
      #(79us);
      expect_out(2'b11, "SCR 0 still turning off");
      #(2us);
      expect_out(2'b10, "SCR 0 off");
      #(20us);
      x_in = 2'b00;
      #(10us);
      x_in = 2'b10;               // rising gate of the SCR already on
      #(100us);
      expect_out(2'b10, "no change");
      x_in = 2'b01;
      #(1ns);
      expect_out(2'b11, "SCR 0 on at once");
      #(79us);
      expect_out(2'b11, "SCR 1 still turning off");
      #(2us);
      expect_out(2'b01, "SCR 1 off");
      #(20us);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
