// tb_dbbl_register: checks the 6-digit register. After reset every digit is 0.
// Random whole words are loaded and read through NORM and through COMP
// (expected 999999 - value); single digits are loaded with the other digits'
// set lines at zero and must replace only that digit; with no select line high
// the outputs are all zero. Loads show one clock edge after the set lines.
module tb_dbbl_register;
  import tb_nbbl_util_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n, norm, comp;
  tb_word_t d, q;
  int unsigned model;
  int checks = 0, failures = 0;

  dbbl_register dut (.clk(clk), .rst_n(rst_n), .d(d), .norm(norm), .comp(comp), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(string what);
    norm = 1'b1; comp = 1'b0;
    #1;
    checks++;
    if (dec_word(q) != int'(model)) begin
      failures++;
      $display("FAIL %s norm: expected %0d got %0d", what, model, dec_word(q));
    end
    norm = 1'b0; comp = 1'b1;
    #1;
    checks++;
    if (dec_word(q) != int'(nines(model))) begin
      failures++;
      $display("FAIL %s comp: expected %0d got %0d", what, nines(model), dec_word(q));
    end
    norm = 1'b0; comp = 1'b0;
    #1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL %s: no select but q=%h", what, q);
    end
  endtask

  initial begin
    rst_n = 1'b0; d = '0; norm = 1'b1; comp = 1'b0;
    repeat (2) @(posedge clk);
    model = 0;
    read_check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int unsigned v;
      v = $urandom % TB_MOD;
      d = enc_word(v);
      @(posedge clk);
      #1;
      d = '0;
      model = v;
      read_check("word load");
      @(posedge clk);
      read_check("hold");
      // Load one digit only.
      begin
        int unsigned pos, dig, p10;
        pos = $urandom % TB_DIGITS;
        dig = $urandom % 10;
        p10 = 1;
        repeat (pos) p10 *= 10;
        d[pos] = enc_digit(dig);
        @(posedge clk);
        #1;
        d = '0;
        model = model - ((model / p10) % 10) * p10 + dig * p10;
        read_check("digit load");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
