// ddr2_read_transaction: reads one block of words from DDR2 into FIFO_UART.
//
// On a start_i pulse (DDR_READ_START) it issues count_i read commands to the
// DDR2 controller, one per 256-bit word, at consecutive addresses from the
// shared address generator, as fast as app_af_afull_i allows. Read data
// returns from the controller in order as 128-bit beats flagged by
// rd_data_valid_i, low half first; each pair of beats is joined into one word
// and written into the output FIFO. The controller cannot be stalled on the
// read data path, so the caller must ask for no more words than the output
// FIFO has room for; the sequencer starts a block only when that FIFO is
// empty and asks for at most its depth. done_o pulses once the last word of
// the block is in the FIFO.
//
// Reading in blocks that refill FIFO_UART each time it runs empty follows the
// source description; the handshake, beat order and counters are this
// design's choices. Reset is synchronous and active high.
module ddr2_read_transaction
  import ddr2_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned DW    = APP_DATA_W,
  parameter int unsigned AW    = APP_ADDR_W,
  parameter int unsigned MAXN  = 1024,          // largest block
  parameter int unsigned CNT_W = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start_i,        // DDR_READ_START pulse
  input  logic [$clog2(MAXN):0]  count_i,        // words in this block, 1..MAXN
  // address generator
  input  logic [AW-1:0]          addr_i,
  output logic                   addr_inc_o,
  // DDR2 controller user interface
  input  logic                   app_af_afull_i,
  output logic                   app_af_wren_o,
  output logic [2:0]             app_af_cmd_o,
  output logic [AW-1:0]          app_af_addr_o,
  input  logic                   rd_data_valid_i,
  input  logic [DW-1:0]          rd_data_i,
  // output FIFO, write side
  output logic                   fifo_wr_en_o,
  output logic [W-1:0]           fifo_wdata_o,
  input  logic                   fifo_full_i,
  // status
  output logic                   busy_o,
  output logic                   done_o,         // pulse
  output logic [CNT_W-1:0]       words_read_o
);

  localparam int unsigned CW = $clog2(MAXN) + 1;

  initial begin
    assert (W == 2 * DW) else $error("ddr2_read_transaction expects two beats per word");
  end

  logic          active;
  logic [CW-1:0] to_issue, to_receive;
  logic          half;               // a low half is waiting for its high half
  logic [DW-1:0] low;

  assign app_af_wren_o = active && to_issue != '0 && !app_af_afull_i;
  assign app_af_cmd_o  = CMD_READ;
  assign app_af_addr_o = addr_i;
  assign addr_inc_o    = app_af_wren_o;
  assign busy_o        = active;

  always_ff @(posedge clk) begin
    if (rst) begin
      active       <= 1'b0;
      to_issue     <= '0;
      to_receive   <= '0;
      half         <= 1'b0;
      low          <= '0;
      fifo_wr_en_o <= 1'b0;
      fifo_wdata_o <= '0;
      done_o       <= 1'b0;
      words_read_o <= '0;
    end else begin
      fifo_wr_en_o <= 1'b0;
      done_o       <= 1'b0;
      if (start_i && !active && count_i != '0) begin
        active     <= 1'b1;
        to_issue   <= count_i;
        to_receive <= count_i;
      end
      if (app_af_wren_o) to_issue <= to_issue - 1'b1;
      if (active && rd_data_valid_i) begin
        if (!half) begin
          low  <= rd_data_i;
          half <= 1'b1;
        end else begin
          half         <= 1'b0;
          fifo_wr_en_o <= 1'b1;
          fifo_wdata_o <= {rd_data_i, low};
          words_read_o <= words_read_o + 1'b1;
          to_receive   <= to_receive - 1'b1;
          if (to_receive == CW'(1)) begin
            active <= 1'b0;
            done_o <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(fifo_wr_en_o && fifo_full_i)) else $error("ddr2_read_transaction: FIFO_UART overflow");
      assert (!(start_i && count_i > CW'(MAXN))) else $error("ddr2_read_transaction: block too large");
    end
  end

endmodule
