// tb_ddr2_read_transaction: starts read blocks of several sizes and plays
// the controller here: every read command is answered some clocks later by
// two 128-bit beats whose contents are a function of the address (location
// a holds a * 0x9E3779B97F4A7C15). Checks that each block issues exactly
// count commands at consecutive addresses (step 4), respects app_af_afull,
// joins the beats low half first into words written to the output FIFO in
// order, and pulses done once, after the last word.
module tb_ddr2_read_transaction;
  import ddr2_pkg::*;
  localparam int unsigned MAXN = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, af_afull = 0, af_wren, rdv = 0, wr_en, busy, done, addr_inc;
  logic [$clog2(MAXN):0] count = '0;
  logic [30:0] addr, af_addr;
  logic [2:0] af_cmd;
  logic [127:0] rd = '0;
  logic [WORD_W-1:0] wdata;
  logic [31:0] nread;
  int unsigned addr_cnt = 0;

  assign addr = 31'(addr_cnt);

  ddr2_read_transaction #(.MAXN(MAXN)) dut (
    .clk(clk), .rst(rst), .start_i(start), .count_i(count),
    .addr_i(addr), .addr_inc_o(addr_inc),
    .app_af_afull_i(af_afull), .app_af_wren_o(af_wren), .app_af_cmd_o(af_cmd),
    .app_af_addr_o(af_addr), .rd_data_valid_i(rdv), .rd_data_i(rd),
    .fifo_wr_en_o(wr_en), .fifo_wdata_o(wdata), .fifo_full_i(1'b0),
    .busy_o(busy), .done_o(done), .words_read_o(nread));

  function automatic logic [63:0] mem(input longint unsigned a);
    return 64'(a) * 64'h9E37_79B9_7F4A_7C15;
  endfunction

  int checks = 0, failures = 0;
  int n_cmd = 0, n_words = 0, n_done = 0, cyc = 0;
  longint unsigned pend_addr[$];
  int pend_t[$];
  logic [127:0] beatq[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (af_wren) begin
        check(!af_afull, "command while app_af_afull");
        check(af_cmd == 3'b001 && af_addr == 31'(4 * n_cmd), $sformatf("read command %0d", n_cmd));
        pend_addr.push_back(longint'(af_addr));
        pend_t.push_back(cyc + 4 + $urandom_range(3));
        n_cmd++;
      end
      if (addr_inc) addr_cnt <= addr_cnt + 4;
      if (pend_t.size() != 0 && pend_t[0] <= cyc) begin
        longint unsigned a;
        a = pend_addr.pop_front();
        void'(pend_t.pop_front());
        beatq.push_back({mem(a + 1), mem(a)});
        beatq.push_back({mem(a + 3), mem(a + 2)});
      end
      rdv <= 1'b0;
      if (beatq.size() != 0 && $urandom_range(3) != 0) begin
        rdv <= 1'b1;
        rd  <= beatq.pop_front();
      end
      if (wr_en) begin
        longint unsigned a;
        a = 4 * n_words;
        check(wdata == {mem(a + 3), mem(a + 2), mem(a + 1), mem(a)}, $sformatf("word %0d", n_words));
        n_words++;
      end
      if (done) n_done++;
      af_afull <= ($urandom_range(3) == 0);
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
    int total;
    total = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int b = 0; b < 5; b++) begin
      int n;
      n = (b == 1) ? 1 : (b == 2) ? 5 : (b == 4) ? 3 : 8;
      start <= 1; count <= ($clog2(MAXN)+1)'(n);
      @(posedge clk);
      start <= 0;
      total += n;
      // done comes with the write of the last word of the block
      while (!done) begin
        @(posedge clk);
        #1;
        if (!done) check(n_words < total, "done before the last word");
      end
      @(posedge clk);
      #1;
      check(n_words == total, $sformatf("block %0d: %0d words, expected %0d", b, n_words, total));
      check(n_cmd == total && n_done == b + 1 && !busy, $sformatf("block %0d commands/done", b));
      repeat (3) @(posedge clk);
    end
    check(nread == 32'(total), "word counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
