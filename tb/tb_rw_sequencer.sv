// tb_rw_sequencer: plays the write transaction, read transaction, FIFO_UART
// and UART around the sequencer. Checks that nothing happens before start,
// that writing stays enabled until VOLUME words are stored and the writer is
// idle, that the address generator is cleared at start and at the switch to
// reading, that DDR_READ_START is raised only with FIFO_UART empty and no
// block in progress, with block sizes min(BLOCK, words left) (8, 8, 4 for
// VOLUME 20 and BLOCK 8), and that done follows once the UART is idle.
// A second start runs the whole sequence again; a third is cut short by
// read_req, which must stop writing at the end of the burst in progress and
// read back exactly the words written.
module tb_rw_sequencer;
  localparam int unsigned VOLUME = 20, BLOCK = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, rreq = 0, wdone, go = 0, wbusy,  wen, aclr, rbusy = 0, rdone = 0;
  logic oempty = 1, ubusy = 0, rstart, done;
  logic [$clog2(BLOCK):0] rcount;
  logic [1:0] phase;
  logic [31:0] blocks;

  rw_sequencer #(.VOLUME(VOLUME), .BLOCK(BLOCK)) dut (
    .clk(clk), .rst(rst), .start_i(start), .read_req_i(rreq), .phy_init_done_i(1'b1),
    .wr_word_done_i(wdone), .wr_busy_i(wbusy), .write_en_o(wen), .addr_clear_o(aclr),
    .rd_busy_i(rbusy), .rd_done_i(rdone), .ofifo_empty_i(oempty), .uart_busy_i(ubusy),
    .read_start_o(rstart), .read_count_o(rcount), .phase_o(phase), .done_o(done),
    .blocks_o(blocks));

  int checks = 0, failures = 0;
  int n_written = 0, n_clr = 0, n_rstart = 0, sizes[$], held = 0;
  int rd_timer = 0, fifo_words = 0, drain_timer = 0, burst_left = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign wdone = burst_left != 0 && go;
  assign wbusy = burst_left != 0;

  // environment models
  always @(posedge clk) if (!rst) begin
    // writer: bursts of 4 words, at random clocks, started while enabled
    go <= ($urandom_range(2) == 0);
    if (burst_left == 0 && wen) burst_left <= 4;
    else if (wdone) begin
      n_written++;
      burst_left <= burst_left - 1;
    end
    if (aclr) n_clr++;
    // reader: block completes after 10 clocks, words land in FIFO_UART
    rdone <= 1'b0;
    if (rstart) begin
      check(oempty && !rbusy, "DDR_READ_START with FIFO_UART not empty or reader busy");
      check(phase == 2'd2, "read start outside read phase");
      sizes.push_back(int'(rcount));
      n_rstart++;
      rbusy <= 1'b1; rd_timer = 10;
    end else if (rd_timer != 0) begin
      rd_timer--;
      if (rd_timer == 0) begin
        rbusy <= 1'b0; rdone <= 1'b1;
        fifo_words = sizes[$];
        oempty <= 1'b0;
      end
    end
    // UART drains a word every 6 clocks
    if (fifo_words != 0) begin
      ubusy <= 1'b1;
      if (++drain_timer == 6) begin
        drain_timer = 0; fifo_words--;
        if (fifo_words == 0) begin oempty <= 1'b1; ubusy <= 1'b0; end
      end
    end
  end

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
    repeat (20) @(posedge clk);
    check(!wen && n_written == 0 && phase == 0, "idle before start");
    for (int run = 0; run < 2; run++) begin
      sizes.delete(); n_rstart = 0; n_written = 0; n_clr = 0;
      start <= 1; @(posedge clk); start <= 0;
      repeat (2) @(posedge clk);
      check(wen && phase == 1 && n_clr == 1, "write phase with address cleared");
      wait (phase == 2);
      check(n_written == VOLUME && n_clr == 2, $sformatf("switch after %0d words", n_written));
      wait (done);
      check(n_rstart == 3 && sizes.size() == 3, $sformatf("%0d read blocks", n_rstart));
      if (sizes.size() == 3)
        check(sizes[0] == 8 && sizes[1] == 8 && sizes[2] == 4,
              $sformatf("block sizes %0d %0d %0d", sizes[0], sizes[1], sizes[2]));
      check(oempty && !ubusy && !wen, "done with everything sent");
      repeat (5) @(posedge clk);
    end
    check(blocks == 6, "block counter");
    // early read request: writing stops after the burst in progress and
    // exactly the words written are read back
    begin
      int sum;
      sizes.delete(); n_rstart = 0; n_written = 0; n_clr = 0;
      start <= 1; @(posedge clk); start <= 0;
      wait (n_written == 6);
      rreq <= 1; @(posedge clk); rreq <= 0;
      wait (phase == 2);
      check(n_written == 8, $sformatf("early stop after %0d words", n_written));
      wait (done);
      sum = 0;
      foreach (sizes[i]) sum += sizes[i];
      check(sum == n_written && n_rstart == 1, $sformatf("read back %0d of %0d words", sum, n_written));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
