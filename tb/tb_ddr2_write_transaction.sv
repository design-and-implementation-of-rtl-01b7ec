// tb_ddr2_write_transaction: drives the write transaction from a FIFO model
// (one-cycle read latency, level and RDPOS as the input FIFO gives them) and
// captures the controller commands and data beats it issues. Checks:
//   * no burst begins below 90% fill (14 of 16 words), one begins at it;
//   * a burst reads the FIFO from RDPOS 0 to the last location and stops;
//   * the writer waits while the FIFO is empty in mid-burst;
//   * every word gives one write command at the next address (step 4) and
//     two data beats, low half first, with the word's contents;
//   * with no back-pressure a full burst of 16 words takes exactly 32
//     clocks of data beats (two per word);
//   * app_af_afull / app_wdf_afull hold the writer back without loss;
//   * nothing starts while writing is disabled.
module tb_ddr2_write_transaction;
  import ddr2_pkg::*;
  localparam int unsigned D = 16, THR = (D * 9) / 10;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic enable = 0, init_done = 1;
  logic [$clog2(D):0] level;
  logic [$clog2(D)-1:0] rdpos = '0;
  logic empty, rvalid = 0, rd_en;
  logic [WORD_W-1:0] rdata = '0;
  logic [30:0] addr;
  logic addr_inc;
  logic af_afull = 0, wdf_afull = 0, af_wren, wdf_wren;
  logic [2:0] af_cmd;
  logic [30:0] af_addr;
  logic [127:0] wdf_data;
  logic [15:0] mask;
  logic busy, bstart, bdone, st_empty, st_afull, wdone;
  logic [31:0] nwritten;

  ddr2_write_transaction #(.DEPTH(D)) dut (
    .clk(clk), .rst(rst), .enable_i(enable), .phy_init_done_i(init_done),
    .fifo_level_i(level), .fifo_rdpos_i(rdpos), .fifo_empty_i(empty),
    .fifo_rdata_i(rdata), .fifo_rvalid_i(rvalid), .fifo_rd_en_o(rd_en),
    .addr_i(addr), .addr_inc_o(addr_inc),
    .app_af_afull_i(af_afull), .app_wdf_afull_i(wdf_afull),
    .app_af_wren_o(af_wren), .app_af_cmd_o(af_cmd), .app_af_addr_o(af_addr),
    .app_wdf_wren_o(wdf_wren), .app_wdf_data_o(wdf_data), .app_wdf_mask_data_o(mask),
    .busy_o(busy), .burst_start_o(bstart), .burst_done_o(bdone),
    .stall_empty_o(st_empty), .stall_afull_o(st_afull), .word_done_o(wdone),
    .words_written_o(nwritten));

  int checks = 0, failures = 0;
  logic [WORD_W-1:0] fifo[$];
  logic [WORD_W-1:0] sent[$];      // words read, in order
  logic [127:0] beats[$];
  int n_cmd = 0, n_beats = 0, n_bursts = 0, n_done = 0, n_st_empty = 0, n_st_afull = 0;
  int unsigned addr_cnt = 0;
  int first_beat_t = -1, last_beat_t = -1, cyc = 0;
  bit rand_afull = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign level = ($clog2(D)+1)'(fifo.size());
  assign empty = fifo.size() == 0;
  assign addr  = 31'(addr_cnt);

  always @(posedge clk) begin
    cyc++;
    rvalid <= 1'b0;
    if (!rst) begin
      if (rd_en) begin
        logic [WORD_W-1:0] w;
        check(!empty, "read while empty");
        w = fifo.pop_front();
        rdata  <= w;
        rvalid <= 1'b1;
        sent.push_back(w);
        rdpos  <= rdpos + 1'b1;
      end
      if (af_wren) begin
        check(!af_afull, "command while app_af_afull");
        check(af_cmd == 3'b000 && af_addr == 31'(4 * n_cmd), $sformatf("command %0d", n_cmd));
        n_cmd++;
      end
      if (wdf_wren) begin
        check(!wdf_afull, "data while app_wdf_afull");
        beats.push_back(wdf_data);
        if (first_beat_t < 0) first_beat_t = cyc;
        last_beat_t = cyc;
        n_beats++;
        if (beats.size() == 2) begin
          logic [WORD_W-1:0] e;
          e = sent.pop_front();
          check({beats[1], beats[0]} == e, $sformatf("word %0d data", n_beats / 2 - 1));
          beats.delete();
        end
      end
      if (addr_inc) addr_cnt <= addr_cnt + 4;
      if (bstart) n_bursts++;
      if (bdone)  n_done++;
      if (st_empty) n_st_empty++;
      if (st_afull) n_st_afull++;
      if (rand_afull) begin
        af_afull  <= ($urandom_range(2) == 0);
        wdf_afull <= ($urandom_range(3) == 0);
      end else begin
        af_afull <= 0; wdf_afull <= 0;
      end
    end
  end

  task automatic push(input int n);
    repeat (n) begin
      logic [WORD_W-1:0] w;
      for (int j = 0; j < WORD_W / 32; j++) w[j*32 +: 32] = $urandom;
      fifo.push_back(w);
      @(posedge clk);
    end
  endtask

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
    enable <= 1;
    // below threshold: nothing happens
    push(THR - 1);
    repeat (40) @(posedge clk);
    check(n_bursts == 0 && n_cmd == 0, "no burst below 90%");
    // reach 90%: burst starts; the last words arrive slowly
    push(1);
    repeat (3) @(posedge clk);
    check(n_bursts == 1 && busy, "burst at 90%");
    repeat (30) @(posedge clk);
    check(n_st_empty > 0, "writer waits on empty FIFO");
    push(1); repeat (20) @(posedge clk);
    push(1); repeat (20) @(posedge clk);
    check(n_done == 1 && !busy && n_cmd == D && rdpos == 0, $sformatf("burst 1 done: %0d words", n_cmd));
    // extra words beyond the wrap stay in the FIFO until the next 90%
    push(3); repeat (40) @(posedge clk);
    check(n_cmd == D && fifo.size() == 3, "stops at RDPOS = FIFOCAP");
    // full FIFO, no back-pressure: 2 clocks per word
    first_beat_t = -1;
    push(D - 3);
    wait (n_done == 2);
    check(last_beat_t - first_beat_t + 1 == 2 * D,
          $sformatf("burst of %0d words in %0d clocks", D, last_beat_t - first_beat_t + 1));
    // back-pressure
    rand_afull = 1;
    push(D);
    wait (n_done == 3);
    repeat (5) @(posedge clk);
    check(n_st_afull > 0 && n_cmd == 3 * D && nwritten == 3 * D, "burst under back-pressure");
    rand_afull = 0;
    // disabled: no burst
    enable <= 0;
    push(D);
    repeat (50) @(posedge clk);
    check(n_bursts == 3 && n_cmd == 3 * D, "no burst while disabled");
    enable <= 1;
    wait (n_done == 4);
    repeat (5) @(posedge clk);
    check(n_cmd == 4 * D && sent.size() == 0 && n_beats == 8 * D, "all words written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
