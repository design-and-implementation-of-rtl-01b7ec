// tb_lvds_deserializer: drives random bits on the 12 lanes, changing them on
// the rising edge of the bit clock, and compares every packed word with one
// built here bit by bit from the placement rule
//   word[f*120 + c*10 + 9 - b] = bit b of lane c in frame f, word[255:240] = 0.
// It also checks that a word appears exactly 20 falling edges after the
// first bit of the word, and that dropping STROBE in mid-word discards the
// partial word.
module tb_lvds_deserializer;
  import ddr2_pkg::*;

  logic clk = 0, rst = 1, strobe = 0;
  logic [LANES-1:0] lanes = '0;
  logic valid;
  logic [WORD_W-1:0] word;
  always #5 clk = ~clk;

  lvds_deserializer dut (.lvds_clk(clk), .rst(rst), .strobe_i(strobe), .lanes_i(lanes),
                         .word_valid_o(valid), .word_o(word));

  int checks = 0, failures = 0;
  logic [WORD_W-1:0] expq[$];
  int words_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one word: 20 bits per lane, first bit on the first falling edge
  task automatic send_word(input bit abort_at_10);
    logic [WORD_W-1:0] exp;
    exp = '0;
    for (int t = 0; t < 20; t++) begin
      @(posedge clk);
      strobe <= 1'b1;
      for (int c = 0; c < LANES; c++) begin
        logic bv;
        bv = 1'($urandom);
        lanes[c] <= bv;
        exp[(t / 10) * 120 + c * 10 + 9 - (t % 10)] = bv;
      end
      if (abort_at_10 && t == 10) begin
        @(posedge clk); strobe <= 1'b0;
        return;
      end
      if (t == 19) expq.push_back(exp);
    end
  endtask

  // Compare on the falling edge after the one that produced the word
  int edges_since = 0;
  always @(negedge clk) begin
    if (valid && !rst) begin
      words_seen++;
      check(expq.size() != 0, "unexpected word");
      if (expq.size() != 0) begin
        logic [WORD_W-1:0] e;
        e = expq.pop_front();
        check(word == e, $sformatf("word %0d mismatch", words_seen));
        check(word[255:240] == '0, "padding");
      end
    end
  end

  initial begin
    repeat (400 * 25) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    // latency: first bit sampled at falling edge 1, word valid after edge 20
    fork
      send_word(0);
      begin
        @(posedge strobe); t0 = 0;
        while (!valid) begin @(negedge clk); t0++; end
        // valid is set by the 20th falling edge and observed at the 21st
        check(t0 == 21, $sformatf("word after %0d falling edges", t0));
      end
    join_any
    for (int i = 0; i < 40; i++) send_word(0);   // back-to-back words
    @(posedge clk); strobe <= 0;
    repeat (5) @(posedge clk);
    send_word(1);                                 // partial word, dropped
    repeat (5) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      send_word(0);
      if (i % 5 == 4) begin @(posedge clk); strobe <= 0; repeat (3) @(posedge clk); end
    end
    @(posedge clk); strobe <= 0;
    repeat (5) @(posedge clk);
    check(words_seen == 61, $sformatf("words seen %0d", words_seen));
    check(expq.size() == 0, "words missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
