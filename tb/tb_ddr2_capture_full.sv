// tb_ddr2_capture_full: the design at its default sizes (1024-word FIFOs,
// 200 Mbit = 819200 words, 4 banks x 8K rows x 512 columns, 115200 baud at
// 200 MHz), with the built-in test source looped back into the capture
// inputs and a behavioural DDR2 controller model.
//
// It runs one acquisition through the whole write phase: 800 fills of the
// input FIFO to 90%, each drained into DDR2, and checks that all 3,276,800
// 64-bit locations hold their own location number. It then follows the read
// phase through its first DDR_READ_START: the first block of 1024 words must
// arrive in FIFO_UART from location 0 onwards, and the first two words sent
// on the RS232 line are decoded and checked. Reading back all 200 Mbit at
// 115200 baud would take about 38 minutes of real time and is not simulated.
module tb_ddr2_capture_full;
  import ddr2_pkg::*;

  localparam int unsigned VOLUME = 819200;
  localparam int unsigned CPB    = 1736;
  localparam int unsigned DEPTH  = 1024;

  logic gclk = 0, clk = 0;
  logic grst = 1, rst = 1, lvds_rst = 1;
  always #2 gclk = ~gclk;     // source clock, 1.25 x the controller clock
  always #2.5 clk = ~clk;     // controller clock

  logic             src_en, start;
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

  mig_ddr2_model #(.STALL_PCT(3)) u_mig (
    .clk(clk), .rst(rst), .phy_init_done(phy_init_done),
    .app_af_wren(af_wren), .app_af_cmd(af_cmd), .app_af_addr(af_addr),
    .app_af_afull(af_afull), .app_wdf_wren(wdf_wren), .app_wdf_data(wdf_data),
    .app_wdf_mask_data(wdf_mask), .app_wdf_afull(wdf_afull),
    .rd_data_valid(rdv), .rd_data_fifo_out(rd_data));

  ddr2_capture_top dut (
    .src_clk(gclk), .src_rst(grst), .src_enable_i(src_en), .src_lvds_clk_o(lvds_clk),
    .src_strobe_o(strobe), .src_lanes_o(lanes), .src_words_sent_o(words_sent),
    .lvds_clk(lvds_clk), .lvds_rst(lvds_rst), .lvds_strobe_i(strobe), .lvds_lanes_i(lanes),
    .clk(clk), .rst(rst), .start_i(start), .read_req_i(1'b0),
    .phy_init_done_i(phy_init_done), .app_af_afull_i(af_afull), .app_wdf_afull_i(wdf_afull),
    .app_af_wren_o(af_wren), .app_af_cmd_o(af_cmd), .app_af_addr_o(af_addr),
    .app_wdf_wren_o(wdf_wren), .app_wdf_data_o(wdf_data), .app_wdf_mask_data_o(wdf_mask),
    .rd_data_valid_i(rdv), .rd_data_fifo_out_i(rd_data),
    .uart_txd_o(txd), .phase_o(phase), .done_o(done), .ddr_read_start_o(rd_start),
    .wr_burst_start_o(burst_start), .wr_stall_empty_o(st_empty), .wr_stall_afull_o(st_afull),
    .words_written_o(wwr), .words_read_o(wrd), .addr_wrap_o(wrap),
    .words_captured_o(wcap), .words_dropped_o(wdrop));

  int checks = 0, failures = 0;
  int n_burst = 0, n_rd_start = 0, n_wcmd = 0, n_rcmd = 0, bad_waddr = 0, bad_raddr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (burst_start) n_burst++;
    if (rd_start)    n_rd_start++;
    if (af_wren) begin
      if (af_cmd == 3'b000) begin
        if (af_addr != 31'(4 * n_wcmd)) bad_waddr++;
        n_wcmd++;
      end else begin
        if (af_addr != 31'(4 * n_rcmd)) bad_raddr++;
        n_rcmd++;
      end
    end
  end

  // RS232 receiver for the first two words
  int n_bytes = 0, rx_words = 0;
  logic [255:0] rx_word;
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
        rx_word[((n_bytes % 32) / 8) * 64 + (7 - n_bytes % 8) * 8 +: 8] = b;
        n_bytes++;
        if (n_bytes % 32 == 0) begin
          for (int k = 0; k < 4; k++)
            check(rx_word[k*64 +: 64] == 64'(4 * rx_words + k),
                  $sformatf("uart word %0d field %0d = %h", rx_words, k, rx_word[k*64 +: 64]));
          rx_words++;
        end
      end
    end
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    src_en = 0; start = 0;
    repeat (10) @(posedge gclk);
    grst = 0;
    repeat (8) @(posedge lvds_clk);
    lvds_rst = 0;
    @(posedge clk); rst = 0;
    wait (phy_init_done);
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    src_en = 1;
    // write phase
    wait (phase == 2'd2);
    check(n_wcmd == VOLUME && wwr == VOLUME, $sformatf("write commands %0d", n_wcmd));
    check(bad_waddr == 0, "write addresses step by 4 from 0");
    check(n_burst == VOLUME / DEPTH, $sformatf("%0d bursts at 90%% fill", n_burst));
    repeat (20) @(posedge clk);
    bad = 0;
    for (int loc = 0; loc < 4 * VOLUME; loc++) begin
      logic [63:0] exp;
      exp = 64'(loc);
      if (loc % 4 == 3) exp[63:48] = '0;
      if (u_mig.peek(longint'(loc)) != exp) begin
        if (bad < 5) $display("FAIL: ddr location %0d = %h", loc, u_mig.peek(longint'(loc)));
        bad++;
      end
    end
    check(bad == 0, $sformatf("%0d of %0d DDR2 locations wrong", bad, 4 * VOLUME));
    check(wcap >= VOLUME, "captured words");
    // read phase: first block
    wait (wrd == DEPTH);
    check(n_rd_start == 1 && n_rcmd == DEPTH && bad_raddr == 0, "first read block of 1024 words");
    wait (rx_words == 2);
    check(n_rd_start == 1, "no second DDR_READ_START while FIFO_UART holds data");
    $display("full size: %0d words written in %0d bursts, first read block of %0d words, %0d UART words checked, %0d source words dropped after the write phase",
             n_wcmd, n_burst, wrd, rx_words, wdrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
