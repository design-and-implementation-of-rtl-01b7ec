// ddr2_capture_top: high-speed 12-lane data capture into DDR2 memory with
// read-back over RS232.
//
// A sensor (or its simulator) sends 12 serial lanes with a bit clock and a
// STROBE. The design packs every 20 bits per lane into a 256-bit word
// (lvds_deserializer), buffers the words in a 256 x 1024 dual-clock input
// FIFO, and, each time that FIFO reaches 90% fill, drains it in one burst
// into DDR2 through the vendor DDR2 controller's user interface
// (ddr2_write_transaction). A shared address generator walks the memory four
// 64-bit columns per word. After a fixed volume has been stored, the
// sequencer (rw_sequencer) switches to reading: each time the 256 x 1024
// output FIFO (FIFO_UART) is empty it raises DDR_READ_START, the read
// transaction refills it from DDR2, and word_to_uart/uart_tx send the words
// to a PC at RS232 speed. An external read_req_i ends the write phase early
// (at the end of the burst in progress) and reads back what was stored.
//
// Clock domains: lvds_clk (source bit clock; capture and FIFO write side)
// and clk (the DDR2 controller user clock; everything else). Each has its
// own synchronous, active-high reset; both must be applied together.
//
// The test source of the experimental setup (detector_simulator, which runs
// on a separate FPGA in place of the image sensor) stands beside the capture
// logic with its own ports, src_*; it is not connected to it inside this
// module. Connect src_lvds_clk_o/src_strobe_o/src_lanes_o to lvds_clk,
// lvds_strobe_i, lvds_lanes_i outside, as the cable between the boards does,
// or leave src_enable_i low.
//
// Not included: the DDR2 controller itself and the memory device (their user
// interface is brought out as app_* ports, following the vendor controller's
// naming), and the differential input buffers (lvds_* ports are their
// single-ended outputs).
//
// Block structure, FIFO sizes, the 90% trigger, the shared address generator
// and the block-wise read-back follow the source description; the clocking,
// handshakes and status outputs are this design's choices.
module ddr2_capture_top
  import ddr2_pkg::*;
#(
  parameter int unsigned IN_DEPTH     = 1024,
  parameter int unsigned OUT_DEPTH    = 1024,
  parameter int unsigned VOLUME       = 819200,   // 200 Mbit in 256-bit words
  parameter int unsigned CLKS_PER_BIT = 1736,     // 115200 baud at 200 MHz
  parameter int unsigned B_W          = BANK_W,
  parameter int unsigned R_W          = ROW_W,
  parameter int unsigned C_W          = COL_W,
  parameter int unsigned LINE_WORDS   = 64,       // test source line length
  parameter int unsigned GAP_BITS     = 4         // test source line gap
) (
  // test source (separate FPGA in the experimental setup)
  input  logic                    src_clk,
  input  logic                    src_rst,
  input  logic                    src_enable_i,
  output logic                    src_lvds_clk_o,
  output logic                    src_strobe_o,
  output logic [LANES-1:0]        src_lanes_o,
  output logic [31:0]             src_words_sent_o,
  // source (LVDS receiver outputs)
  input  logic                    lvds_clk,
  input  logic                    lvds_rst,
  input  logic                    lvds_strobe_i,
  input  logic [LANES-1:0]        lvds_lanes_i,
  // controller clock domain
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start_i,          // begin an acquisition
  input  logic                    read_req_i,       // stop writing, read back now
  // DDR2 controller user interface
  input  logic                    phy_init_done_i,
  input  logic                    app_af_afull_i,
  input  logic                    app_wdf_afull_i,
  output logic                    app_af_wren_o,
  output logic [2:0]              app_af_cmd_o,
  output logic [APP_ADDR_W-1:0]   app_af_addr_o,
  output logic                    app_wdf_wren_o,
  output logic [APP_DATA_W-1:0]   app_wdf_data_o,
  output logic [APP_DATA_W/8-1:0] app_wdf_mask_data_o,
  input  logic                    rd_data_valid_i,
  input  logic [APP_DATA_W-1:0]   rd_data_fifo_out_i,
  // RS232
  output logic                    uart_txd_o,
  // status, clk domain
  output logic [1:0]              phase_o,          // 0 idle, 1 write, 2 read, 3 done
  output logic                    done_o,
  output logic                    ddr_read_start_o, // DDR_READ_START
  output logic                    wr_burst_start_o, // input FIFO reached 90%
  output logic                    wr_stall_empty_o,
  output logic                    wr_stall_afull_o,
  output logic [31:0]             words_written_o,
  output logic [31:0]             words_read_o,
  output logic                    addr_wrap_o,
  // status, lvds_clk domain
  output logic [31:0]             words_captured_o,
  output logic [31:0]             words_dropped_o   // input FIFO full
);

  // ---------------- test source ----------------
  detector_simulator #(.LINE_WORDS(LINE_WORDS), .GAP_BITS(GAP_BITS)) u_src (
    .clk          (src_clk),
    .rst          (src_rst),
    .enable_i     (src_enable_i),
    .lvds_clk_o   (src_lvds_clk_o),
    .strobe_o     (src_strobe_o),
    .lanes_o      (src_lanes_o),
    .words_sent_o (src_words_sent_o)
  );

  // ---------------- capture (lvds_clk) ----------------
  logic               cap_valid;
  logic [WORD_W-1:0]  cap_word;
  logic               in_full;
  logic [$clog2(IN_DEPTH)-1:0] in_wrpos;

  lvds_deserializer u_deser (
    .lvds_clk     (lvds_clk),
    .rst          (lvds_rst),
    .strobe_i     (lvds_strobe_i),
    .lanes_i      (lvds_lanes_i),
    .word_valid_o (cap_valid),
    .word_o       (cap_word)
  );

  always_ff @(posedge lvds_clk) begin
    if (lvds_rst) begin
      words_captured_o <= '0;
      words_dropped_o  <= '0;
    end else if (cap_valid) begin
      if (in_full) words_dropped_o  <= words_dropped_o + 1'b1;
      else         words_captured_o <= words_captured_o + 1'b1;
    end
  end

  // ---------------- input FIFO ----------------
  logic                          in_rd_en, in_rvalid, in_empty;
  logic [WORD_W-1:0]             in_rdata;
  logic [$clog2(IN_DEPTH)-1:0]   in_rdpos;
  logic [$clog2(IN_DEPTH):0]     in_level;

  async_fifo #(.WIDTH(WORD_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .wclk       (lvds_clk),
    .wrst       (lvds_rst),
    .wr_en_i    (cap_valid),
    .wdata_i    (cap_word),
    .full_o     (in_full),
    .wrpos_o    (in_wrpos),
    .rclk       (clk),
    .rrst       (rst),
    .rd_en_i    (in_rd_en),
    .rdata_o    (in_rdata),
    .rvalid_o   (in_rvalid),
    .empty_o    (in_empty),
    .rdpos_o    (in_rdpos),
    .rd_level_o (in_level)
  );

  // ---------------- sequencer ----------------
  logic                          write_en, addr_clear, rd_start, rd_busy, rd_done;
  logic                          wr_busy, wr_word_done, ofifo_empty, uart_busy;
  logic [$clog2(OUT_DEPTH):0]    rd_count;

  rw_sequencer #(.VOLUME(VOLUME), .BLOCK(OUT_DEPTH)) u_seq (
    .clk             (clk),
    .rst             (rst),
    .start_i         (start_i),
    .read_req_i      (read_req_i),
    .phy_init_done_i (phy_init_done_i),
    .wr_word_done_i  (wr_word_done),
    .wr_busy_i       (wr_busy),
    .write_en_o      (write_en),
    .addr_clear_o    (addr_clear),
    .rd_busy_i       (rd_busy),
    .rd_done_i       (rd_done),
    .ofifo_empty_i   (ofifo_empty),
    .uart_busy_i     (uart_busy),
    .read_start_o    (rd_start),
    .read_count_o    (rd_count),
    .phase_o         (phase_o),
    .done_o          (done_o),
    .blocks_o        ()
  );

  assign ddr_read_start_o = rd_start;

  // ---------------- address generator ----------------
  logic                  wr_addr_inc, rd_addr_inc;
  logic [APP_ADDR_W-1:0] addr;

  address_generator #(.B_W(B_W), .R_W(R_W), .C_W(C_W)) u_addr (
    .clk        (clk),
    .rst        (rst),
    .clear_i    (addr_clear),
    .inc_i      (wr_addr_inc || rd_addr_inc),
    .app_addr_o (addr),
    .bank_o     (),
    .row_o      (),
    .col_o      (),
    .wrap_o     (addr_wrap_o)
  );

  // ---------------- write transaction ----------------
  logic                  wr_af_wren;
  logic [2:0]            wr_af_cmd;
  logic [APP_ADDR_W-1:0] wr_af_addr;

  ddr2_write_transaction #(.DEPTH(IN_DEPTH)) u_wr (
    .clk                 (clk),
    .rst                 (rst),
    .enable_i            (write_en),
    .phy_init_done_i     (phy_init_done_i),
    .fifo_level_i        (in_level),
    .fifo_rdpos_i        (in_rdpos),
    .fifo_empty_i        (in_empty),
    .fifo_rdata_i        (in_rdata),
    .fifo_rvalid_i       (in_rvalid),
    .fifo_rd_en_o        (in_rd_en),
    .addr_i              (addr),
    .addr_inc_o          (wr_addr_inc),
    .app_af_afull_i      (app_af_afull_i),
    .app_wdf_afull_i     (app_wdf_afull_i),
    .app_af_wren_o       (wr_af_wren),
    .app_af_cmd_o        (wr_af_cmd),
    .app_af_addr_o       (wr_af_addr),
    .app_wdf_wren_o      (app_wdf_wren_o),
    .app_wdf_data_o      (app_wdf_data_o),
    .app_wdf_mask_data_o (app_wdf_mask_data_o),
    .busy_o              (wr_busy),
    .burst_start_o       (wr_burst_start_o),
    .burst_done_o        (),
    .stall_empty_o       (wr_stall_empty_o),
    .stall_afull_o       (wr_stall_afull_o),
    .word_done_o         (wr_word_done),
    .words_written_o     (words_written_o)
  );

  // ---------------- read transaction ----------------
  logic                  rd_af_wren;
  logic [2:0]            rd_af_cmd;
  logic [APP_ADDR_W-1:0] rd_af_addr;
  logic                  of_wr_en, of_full;
  logic [WORD_W-1:0]     of_wdata;

  ddr2_read_transaction #(.MAXN(OUT_DEPTH)) u_rd (
    .clk             (clk),
    .rst             (rst),
    .start_i         (rd_start),
    .count_i         (rd_count),
    .addr_i          (addr),
    .addr_inc_o      (rd_addr_inc),
    .app_af_afull_i  (app_af_afull_i),
    .app_af_wren_o   (rd_af_wren),
    .app_af_cmd_o    (rd_af_cmd),
    .app_af_addr_o   (rd_af_addr),
    .rd_data_valid_i (rd_data_valid_i),
    .rd_data_i       (rd_data_fifo_out_i),
    .fifo_wr_en_o    (of_wr_en),
    .fifo_wdata_o    (of_wdata),
    .fifo_full_i     (of_full),
    .busy_o          (rd_busy),
    .done_o          (rd_done),
    .words_read_o    (words_read_o)
  );

  // Only one transaction drives the command bus at a time
  always_comb begin
    if (rd_af_wren) begin
      app_af_wren_o = 1'b1;
      app_af_cmd_o  = rd_af_cmd;
      app_af_addr_o = rd_af_addr;
    end else begin
      app_af_wren_o = wr_af_wren;
      app_af_cmd_o  = wr_af_cmd;
      app_af_addr_o = wr_af_addr;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (!(rd_af_wren && wr_af_wren))
      else $error("ddr2_capture_top: read and write commands collide");
  end

  // ---------------- FIFO_UART and RS232 ----------------
  logic              of_rd_en, of_rvalid;
  logic [WORD_W-1:0] of_rdata;
  logic [7:0]        tx_byte;
  logic              tx_valid, tx_ready;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk      (clk),
    .rst      (rst),
    .wr_en_i  (of_wr_en),
    .wdata_i  (of_wdata),
    .full_o   (of_full),
    .rd_en_i  (of_rd_en),
    .rdata_o  (of_rdata),
    .rvalid_o (of_rvalid),
    .empty_o  (ofifo_empty),
    .level_o  ()
  );

  word_to_uart u_w2u (
    .clk           (clk),
    .rst           (rst),
    .fifo_empty_i  (ofifo_empty),
    .fifo_rdata_i  (of_rdata),
    .fifo_rvalid_i (of_rvalid),
    .fifo_rd_en_o  (of_rd_en),
    .byte_o        (tx_byte),
    .byte_valid_o  (tx_valid),
    .byte_ready_i  (tx_ready),
    .busy_o        (uart_busy)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk     (clk),
    .rst     (rst),
    .data_i  (tx_byte),
    .valid_i (tx_valid),
    .ready_o (tx_ready),
    .tx_o    (uart_txd_o)
  );

endmodule
