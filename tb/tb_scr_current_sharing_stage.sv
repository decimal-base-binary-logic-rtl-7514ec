// tb_scr_current_sharing_stage: checks the current-sharing SCR stage model.
// Nothing conducts at power-up; firing a gate makes that SCR the only one on;
// the state is kept with the gates low and when two gates are high at once.
module tb_scr_current_sharing_stage;
  logic       clk = 1'b0;
  logic [1:0] x_in, x_out;
  int checks = 0, failures = 0;

  scr_current_sharing_stage dut (.x_in(x_in), .x_out(x_out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [1:0] gates, logic [1:0] want, string what);
    x_in = gates;
    @(posedge clk);
    checks++;
    if (x_out != want) begin
      failures++;
      $display("FAIL %s: x_in=%b x_out=%b want %b", what, gates, x_out, want);
    end
  endtask

  initial begin
    x_in = 2'b00;
    @(posedge clk);
    checks++;
    if (x_out != 2'b00) begin failures++; $display("FAIL power-up: %b", x_out); end
    for (int i = 0; i < 20; i++) begin
      apply(2'b01, 2'b01, "fire 0");
      apply(2'b00, 2'b01, "hold 0");
      apply(2'b11, 2'b01, "two gates, hold 0");
      apply(2'b10, 2'b10, "fire 1");
      apply(2'b00, 2'b10, "hold 1");
      apply(2'b11, 2'b10, "two gates, hold 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
