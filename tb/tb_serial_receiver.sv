// tb_serial_receiver: self-checking test of the serial command receiver.
// Random 24-bit words are sent MSB first with gaps between bits and
// latched alternately into word 1 and word 2; each holding register must
// show the word last sent to it and keep it while the other word is being
// shifted in. Watchdog included.
module tb_serial_receiver;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_valid = 1'b0, bit_in = 1'b0, word_load = 1'b0, word_sel = 1'b0;
  logic [23:0] word1, word2, exp1 = '0, exp2 = '0;
  int checks = 0, failures = 0;

  serial_receiver dut (.*);

  always #5 clk = ~clk;

  task automatic send_word(logic [23:0] w, logic sel);
    for (int i = 23; i >= 0; i--) begin
      bit_in = w[i]; bit_valid = 1'b1;
      @(negedge clk);
      bit_valid = 1'b0; bit_in = 1'($urandom);
      repeat ($urandom % 3) @(negedge clk);
      checks++;
      if (word1 !== exp1 || word2 !== exp2) begin
        failures++; if (failures < 5) $display("FAIL holding registers changed while shifting");
      end
    end
    word_sel = sel; word_load = 1'b1;
    @(negedge clk);
    word_load = 1'b0;
    if (sel) exp2 = w; else exp1 = w;
    checks++;
    if (word1 !== exp1 || word2 !== exp2) begin
      failures++;
      if (failures < 5) $display("FAIL word%0d=%h/%h expected %h/%h", sel + 1, word1, word2, exp1, exp2);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 200; k++) send_word(24'($urandom), 1'(k % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
