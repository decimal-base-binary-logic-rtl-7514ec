// tb_latch_register_stage: checks the base-4 latch stage. While the latch
// clock is high the output must follow every input digit at once; after the
// clock falls the output must keep the digit present at the fall, whatever
// the input does.
module tb_latch_register_stage;
  logic       clk = 1'b0;   // testbench timing clock
  logic       en;           // latch clock of the stage
  logic [3:0] d, q;
  logic [3:0] held;
  int checks = 0, failures = 0;

  latch_register_stage dut (.clk(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; d = 4'b0001;
    for (int i = 0; i < 200; i++) begin
      en = 1'b1;
      repeat (2) begin
        d = 4'b0001 << ($urandom % 4);
        #1;
        checks++;
        if (q != d) begin failures++; $display("FAIL transparent: d=%b q=%b", d, q); end
      end
      held = d;
      en   = 1'b0;
      #1;
      repeat (3) begin
        d = 4'b0001 << ($urandom % 4);
        #1;
        checks++;
        if (q != held) begin failures++; $display("FAIL hold: held=%b q=%b", held, q); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
