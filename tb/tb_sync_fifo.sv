// tb_sync_fifo: random writes and reads on one clock, checked against a
// queue: order and contents, exact level, full after DEPTH words, empty
// when drained, read data one cycle after the read. DEPTH = 8.
module tb_sync_fifo;
  localparam int unsigned W = 256, D = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0, full, empty, rvalid;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(D):0] level;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .wr_en_i(wr_en), .wdata_i(wdata), .full_o(full),
    .rd_en_i(rd_en), .rdata_o(rdata), .rvalid_o(rvalid), .empty_o(empty), .level_o(level));

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_wr = 0, n_rd = 0, n_full = 0;
  bit rd_pending = 0;
  int wr_pct = 50, rd_pct = 50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_issued = 0;

  always @(posedge clk) if (!rst) begin
    check(rvalid == rd_pending, "rvalid one cycle after the read");
    if (rvalid) begin
      logic [W-1:0] e;
      e = q.pop_front();
      check(rdata == e, $sformatf("word %0d", n_rd));
      n_rd++;
    end
    if (wr_en) begin q.push_back(wdata); n_wr++; end
    rd_pending = rd_en;
    if (rd_en) n_issued++;
  end

  // stimulus on the falling edge, from the current flags: never a write
  // while full nor a read while empty
  always @(negedge clk) if (!rst) begin
    check(int'(level) == n_wr - n_issued, $sformatf("level %0d", level));
    check(full == (level == D) && empty == (level == 0), "flags");
    if (full) n_full++;
    wr_en <= ($urandom_range(99) < wr_pct) && !full;
    rd_en <= ($urandom_range(99) < rd_pct) && !empty;
    for (int i = 0; i < W / 32; i++) wdata[i*32 +: 32] <= $urandom;
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
    rst = 0;
    wr_pct = 100; rd_pct = 0;
    repeat (3 * D) @(posedge clk);
    check(full && n_wr == D, $sformatf("full after %0d writes", n_wr));
    wr_pct = 50; rd_pct = 60;
    repeat (4000) @(posedge clk);
    wr_pct = 0; rd_pct = 100;
    repeat (40) @(posedge clk);
    check(empty && q.size() == 0 && n_rd == n_wr && n_full > 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
