// tb_async_fifo: writes and reads random words from two unrelated clocks
// with random gaps, and checks order and contents against a queue kept
// here, that the FIFO never accepts a word while full nor delivers one while
// empty, that it reports full after DEPTH writes with no reads, that rdata
// arrives exactly one read-clock after the read, that RDPOS counts the
// words read modulo DEPTH, and that the reader's fill level settles at the
// number of words held. Runs at DEPTH = 16 to reach full and wrap often.
module tb_async_fifo;
  localparam int unsigned W = 256, D = 16;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #3 wclk = ~wclk;
  always #5 rclk = ~rclk;

  logic wr_en = 0, rd_en = 0, full, empty, rvalid;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(D)-1:0] wrpos, rdpos;
  logic [$clog2(D):0] level;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wclk(wclk), .wrst(wrst), .wr_en_i(wr_en), .wdata_i(wdata), .full_o(full), .wrpos_o(wrpos),
    .rclk(rclk), .rrst(rrst), .rd_en_i(rd_en), .rdata_o(rdata), .rvalid_o(rvalid),
    .empty_o(empty), .rdpos_o(rdpos), .rd_level_o(level));

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_wr = 0, n_rd = 0, n_full = 0;
  bit rd_pending = 0;
  int wr_pct = 50, rd_pct = 50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // writer
  always @(posedge wclk) if (!wrst) begin
    if (wr_en && !full) begin q.push_back(wdata); n_wr++; end
    if (full) n_full++;
    wr_en <= ($urandom_range(99) < wr_pct);
    wdata <= rnd_word();
  end

  // reader
  always @(posedge rclk) if (!rrst) begin
    check(rvalid == rd_pending, "rvalid one cycle after the read");
    if (rvalid) begin
      logic [W-1:0] e;
      check(q.size() != 0, "read beyond written data");
      e = q.pop_front();
      check(rdata == e, $sformatf("word %0d", n_rd));
      n_rd++;
      check(rdpos == $clog2(D)'(n_rd), "RDPOS");
    end
    rd_pending = rd_en && !empty;
    rd_en <= ($urandom_range(99) < rd_pct);
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge rclk);
    wrst = 0; rrst = 0;
    // fill with no reads: must report full after D words
    wr_pct = 100; rd_pct = 0;
    repeat (3 * D) @(posedge wclk);
    check(full, "full after DEPTH writes");
    check(n_wr == D, $sformatf("accepted %0d words while filling", n_wr));
    repeat (4) @(posedge rclk);
    check(level == ($clog2(D)+1)'(D), $sformatf("reader level %0d", level));
    // random traffic
    wr_pct = 50; rd_pct = 70;
    repeat (3000) @(posedge rclk);
    wr_pct = 90; rd_pct = 30;
    repeat (3000) @(posedge rclk);
    wr_pct = 0; rd_pct = 100;
    repeat (100) @(posedge rclk);
    check(empty && q.size() == 0, "drained");
    check(level == 0, "level zero when drained");
    check(n_wr > 500 && n_rd == n_wr, $sformatf("words %0d written %0d read", n_wr, n_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
