// tb_ddr2_capture_top: end-to-end test of the capture-to-DDR2-to-RS232 path.
//
// The design's test source drives the 12 lanes from its own clock, unrelated
// to the controller clock, looped back into the capture inputs. A behavioural DDR2 controller model with random
// back-pressure stores the data. The test starts one acquisition, waits for
// it to finish, and then checks:
//   * every stored 64-bit location holds its own location number (the
//     source's pattern), with the 16 padding bits zero;
//   * the RS232 line, decoded here bit by bit, carries every word in order,
//     each 64-bit field most significant byte first;
//   * write commands step the address by 4 and reads start again at 0;
//   * the design reaches each of its mechanisms at least once: 90% burst
//     trigger, writer waiting on an empty FIFO, controller back-pressure,
//     bank/row change of the address, write-to-read switch, repeated
//     DDR_READ_START, input FIFO overflow once the write phase is over;
//   * a second acquisition ended early by read_req stops after the burst in
//     progress and reads back exactly the words it wrote.
// Sizes are reduced (FIFOs of 16 and 8 words, 48 words, fast UART) to keep
// the run short.
module tb_ddr2_capture_top;
  import ddr2_pkg::*;

  localparam int unsigned IN_DEPTH  = 16;
  localparam int unsigned OUT_DEPTH = 8;
  localparam int unsigned VOLUME    = 48;
  localparam int unsigned CPB       = 4;
  localparam int unsigned C_W       = 4;   // 16 columns: 4 words per row
  localparam int unsigned R_W       = 2;

  logic gclk = 0, clk = 0;
  logic grst = 1, rst = 1, lvds_rst = 1;
  always #3.5 gclk = ~gclk;   // source clock
  always #2.5 clk  = ~clk;    // controller clock

  logic             src_en, start, rreq = 0;
  logic             lvds_clk, strobe;
  logic [LANES-1:0] lanes;
  logic [31:0]      words_sent;


  logic phy_init_done, af_afull, wdf_afull, af_wren, wdf_wren, rdv;
  logic [2:0] af_cmd;
  logic [30:0] af_addr;
  logic [127:0] wdf_data, rd_data;
  logic [15:0] wdf_mask;
  logic txd, done, rd_start, burst_start, st_empty, st_afull, wrap;
  logic [1:0] phase;
  logic [31:0] wwr, wrd, wcap, wdrop;

  mig_ddr2_model #(.STALL_PCT(15)) u_mig (
    .clk(clk), .rst(rst), .phy_init_done(phy_init_done),
    .app_af_wren(af_wren), .app_af_cmd(af_cmd), .app_af_addr(af_addr),
    .app_af_afull(af_afull), .app_wdf_wren(wdf_wren), .app_wdf_data(wdf_data),
    .app_wdf_mask_data(wdf_mask), .app_wdf_afull(wdf_afull),
    .rd_data_valid(rdv), .rd_data_fifo_out(rd_data));

  ddr2_capture_top #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .VOLUME(VOLUME),
                     .CLKS_PER_BIT(CPB), .R_W(R_W), .C_W(C_W),
                     .LINE_WORDS(5), .GAP_BITS(3)) dut (
    .src_clk(gclk), .src_rst(grst), .src_enable_i(src_en), .src_lvds_clk_o(lvds_clk),
    .src_strobe_o(strobe), .src_lanes_o(lanes), .src_words_sent_o(words_sent),
    .lvds_clk(lvds_clk), .lvds_rst(lvds_rst), .lvds_strobe_i(strobe), .lvds_lanes_i(lanes),
    .clk(clk), .rst(rst), .start_i(start), .read_req_i(rreq),
    .phy_init_done_i(phy_init_done), .app_af_afull_i(af_afull), .app_wdf_afull_i(wdf_afull),
    .app_af_wren_o(af_wren), .app_af_cmd_o(af_cmd), .app_af_addr_o(af_addr),
    .app_wdf_wren_o(wdf_wren), .app_wdf_data_o(wdf_data), .app_wdf_mask_data_o(wdf_mask),
    .rd_data_valid_i(rdv), .rd_data_fifo_out_i(rd_data),
    .uart_txd_o(txd), .phase_o(phase), .done_o(done), .ddr_read_start_o(rd_start),
    .wr_burst_start_o(burst_start), .wr_stall_empty_o(st_empty), .wr_stall_afull_o(st_afull),
    .words_written_o(wwr), .words_read_o(wrd), .addr_wrap_o(wrap),
    .words_captured_o(wcap), .words_dropped_o(wdrop));

  int checks = 0, failures = 0;
  int n_burst = 0, n_st_empty = 0, n_st_afull = 0, n_rd_start = 0, n_switch = 0;
  int n_rreq = 0;
  int n_bank_chg = 0, n_row_chg = 0, n_wcmd = 0, n_rcmd = 0;
  logic [30:0] last_waddr, last_raddr;
  logic [1:0]  last_phase;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- monitors on the controller clock ----
  always @(posedge clk) if (!rst) begin
    if (burst_start) n_burst++;
    if (st_empty)    n_st_empty++;
    if (st_afull)    n_st_afull++;
    if (rd_start)    n_rd_start++;
    if (phase == 2'd2 && last_phase == 2'd1) n_switch++;
    last_phase <= phase;
    if (af_wren) begin
      if (af_cmd == 3'b000) begin
        check(af_addr == 31'(4 * n_wcmd), $sformatf("write %0d address %0h", n_wcmd, af_addr));
        if (n_wcmd > 0 && af_addr[C_W +: R_W] != last_waddr[C_W +: R_W]) n_row_chg++;
        if (n_wcmd > 0 && af_addr[C_W+R_W +: 2] != last_waddr[C_W+R_W +: 2]) n_bank_chg++;
        last_waddr <= af_addr;
        n_wcmd++;
      end else begin
        check(af_addr == 31'(4 * n_rcmd), $sformatf("read %0d address %0h", n_rcmd, af_addr));
        last_raddr <= af_addr;
        n_rcmd++;
      end
    end
  end

  // ---- RS232 receiver (8N1, CPB clocks per bit) ----
  int n_bytes = 0;
  logic [255:0] rx_word;
  int rx_words = 0;
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (txd == 1'b0) begin
        repeat (CPB / 2) @(posedge clk);
        check(txd == 1'b0, "start bit");
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[i] = txd;
        end
        repeat (CPB) @(posedge clk);
        check(txd == 1'b1, "stop bit");
        // byte k of a word: field k/8, byte 7-k%8 of the field
        rx_word[((n_bytes % 32) / 8) * 64 + (7 - n_bytes % 8) * 8 +: 8] = b;
        n_bytes++;
        if (n_bytes % 32 == 0) begin
          // the word read back must be what DDR2 holds at its location
          for (int k = 0; k < 4; k++)
            check(rx_word[k*64 +: 64] == u_mig.peek(longint'(4 * rx_words + k)),
                  $sformatf("uart word %0d field %0d = %h", rx_words, k, rx_word[k*64 +: 64]));
          rx_words++;
        end
      end
    end
  end

  // ---- watchdog ----
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_en = 0; start = 0;
    repeat (10) @(posedge gclk);
    grst = 0;                    // the source bit clock starts running
    repeat (8) @(posedge lvds_clk);
    lvds_rst = 0;
    @(posedge clk); rst = 0;
    wait (phy_init_done);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    src_en = 1;
    wait (done);
    repeat (CPB * 12) @(posedge clk);
    // memory contents
    for (int loc = 0; loc < 4 * VOLUME; loc++) begin
      logic [63:0] exp;
      exp = 64'(loc);
      if (loc % 4 == 3) exp[63:48] = '0;
      check(u_mig.peek(longint'(loc)) == exp, $sformatf("ddr location %0d", loc));
    end
    check(n_wcmd == VOLUME, $sformatf("write commands %0d", n_wcmd));
    check(n_rcmd == VOLUME, $sformatf("read commands %0d", n_rcmd));
    check(wwr == VOLUME && wrd == VOLUME, "word counters");
    check(rx_words == VOLUME, $sformatf("uart words %0d", rx_words));
    check(n_bytes == 32 * VOLUME, "uart bytes");
    check(n_burst == VOLUME / IN_DEPTH, $sformatf("90%% bursts %0d", n_burst));
    check(n_rd_start == VOLUME / OUT_DEPTH, $sformatf("DDR_READ_START %0d", n_rd_start));
    check(n_st_empty > 0, "writer waited on empty input FIFO");
    check(n_st_afull > 0, "controller back-pressure seen");
    check(n_row_chg > 0 && n_bank_chg > 0, "row and bank changes");
    check(n_switch == 1, "write-to-read switch");
    check(wdrop > 0, "input FIFO overflow after the write phase");
    // second acquisition, cut short by an external read request
    begin
      int w0;
      w0 = wwr;
      n_wcmd = 0; n_rcmd = 0; rx_words = 0; n_bytes = 0; n_rd_start = 0;
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      wait (wwr >= w0 + IN_DEPTH + 2);
      @(posedge clk); rreq <= 1;
      @(posedge clk); rreq <= 0;
      n_rreq++;
      wait (done);
      repeat (CPB * 12) @(posedge clk);
      check(wwr - w0 == 2 * IN_DEPTH, $sformatf("early stop after %0d words", wwr - w0));
      check(n_wcmd == 2 * IN_DEPTH && n_rcmd == 2 * IN_DEPTH, "read back all words written");
      check(rx_words == 2 * IN_DEPTH, $sformatf("uart words after early stop %0d", rx_words));
      check(n_rd_start == 2 * IN_DEPTH / OUT_DEPTH, "read blocks after early stop");
    end
    check(n_rreq == 1, "external read request");
    $display("mechanisms: read_req=%0d", n_rreq);
    $display("mechanisms: bursts=%0d empty_stall=%0d afull_stall=%0d read_start=%0d row_chg=%0d bank_chg=%0d switch=%0d dropped=%0d",
             n_burst, n_st_empty, n_st_afull, n_rd_start, n_row_chg, n_bank_chg, n_switch, wdrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
