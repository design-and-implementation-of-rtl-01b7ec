// tb_detector_simulator: receives the source's lanes here, sampling on the
// falling edge of its bit clock while STROBE is high, rebuilds each word
// with the placement rule word[f*120 + c*10 + 9 - b] = bit b of lane c in
// frame f, and checks that word n holds 4n, 4n+1, 4n+2, 4n+3 in its 64-bit
// fields with zero padding. Also checks that the bit clock runs at half the
// input clock, that each line is LINE_WORDS words (x 20 bits) long, that
// lines are separated by at least GAP_BITS bit periods, and that nothing is
// sent while disabled.
module tb_detector_simulator;
  localparam int unsigned LW = 3, GAP = 4;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;

  logic lclk, strobe;
  logic [11:0] lanes;
  logic [31:0] nsent;

  detector_simulator #(.LINE_WORDS(LW), .GAP_BITS(GAP)) dut (
    .clk(clk), .rst(rst), .enable_i(en), .lvds_clk_o(lclk), .strobe_o(strobe),
    .lanes_o(lanes), .words_sent_o(nsent));

  int checks = 0, failures = 0;
  int t = 0, n_words = 0, line_bits = 0, gap_bits = 0, n_lines = 0;
  logic [255:0] w = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge lclk) if (!rst) begin
    if (strobe) begin
      if (line_bits == 0 && n_lines > 0) check(gap_bits >= GAP, $sformatf("gap %0d", gap_bits));
      gap_bits = 0;
      for (int c = 0; c < 12; c++) w[(t / 10) * 120 + c * 10 + 9 - (t % 10)] = lanes[c];
      line_bits++;
      if (++t == 20) begin
        t = 0;
        for (int k = 0; k < 4; k++) begin
          logic [63:0] e;
          e = 64'(4 * n_words + k);
          if (k == 3) e[63:48] = '0;
          check(w[k*64 +: 64] == e, $sformatf("word %0d field %0d = %h", n_words, k, w[k*64 +: 64]));
        end
        check(w[255:240] == '0, "padding");
        n_words++;
      end
    end else begin
      if (line_bits != 0) begin
        check(line_bits == LW * 20, $sformatf("line of %0d bits", line_bits));
        n_lines++;
      end
      check(t == 0, "line ended inside a word");
      line_bits = 0;
      gap_bits++;
    end
  end

  // bit clock toggles on every input clock edge
  logic last_l;
  always @(posedge clk) begin
    if (!rst && cyc_ok) check(lclk != last_l, "bit clock = clk / 2");
    last_l <= lclk;
  end
  bit cyc_ok = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    cyc_ok = 1;
    repeat (100) @(posedge clk);
    check(n_words == 0 && nsent == 0, "silent while disabled");
    en <= 1;
    wait (n_words == 5 * LW);
    en <= 0;
    repeat (400) @(posedge clk);
    check(n_words == 5 * LW || n_words == 6 * LW, $sformatf("%0d words", n_words));
    check(32'(n_words) == nsent, "sent counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
