// ddr2_write_transaction: drains the input FIFO into DDR2 write commands.
//
// The input FIFO is filled by the capture logic. While writing is enabled,
// this block waits until the FIFO holds THRESH words (90% of its capacity),
// then starts a burst: it reads the FIFO from RDPOS = 0 up to the last
// location (RDPOS reaching FIFOCAP), and for every 256-bit word issues one
// write command to the DDR2 controller together with two 128-bit data beats
// (low half first). After the word at the last FIFO location has been
// written the burst ends and the block waits for the next 90% fill; capture
// keeps filling the FIFO throughout, so the writer never has to wait for a
// word in steady state unless it is faster than the source (which it is: it
// then stalls on an empty FIFO until the next word arrives).
//
// Pipelining: a current-word register and a one-word skid register hide the
// one-cycle FIFO read latency, so with no back-pressure a word leaves every
// two clocks (command + beat 0, then beat 1). app_af_afull_i stalls beat 0,
// app_wdf_afull_i stalls either beat.
//
// Controller user interface (vendor DDR2 controller style): a command is
// accepted on a cycle with app_af_wren_o high; a data beat on a cycle with
// app_wdf_wren_o high. addr_inc_o tells the shared address generator to
// advance; addr_i is its current address.
//
// The 90% trigger, the RDPOS 0..FIFOCAP burst and the shared address
// generator follow the source description's write flowchart. The skid
// register, the beat order and the stall outputs are this design's choices.
// Reset is synchronous and active high.
module ddr2_write_transaction
  import ddr2_pkg::*;
#(
  parameter int unsigned W      = WORD_W,
  parameter int unsigned DW     = APP_DATA_W,
  parameter int unsigned AW     = APP_ADDR_W,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned THRESH = (DEPTH * 9) / 10,
  parameter int unsigned CNT_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable_i,      // sequencer: write phase
  input  logic                     phy_init_done_i,
  // input FIFO, read side
  input  logic [$clog2(DEPTH):0]   fifo_level_i,
  input  logic [$clog2(DEPTH)-1:0] fifo_rdpos_i,
  input  logic                     fifo_empty_i,
  input  logic [W-1:0]             fifo_rdata_i,
  input  logic                     fifo_rvalid_i,
  output logic                     fifo_rd_en_o,
  // address generator
  input  logic [AW-1:0]            addr_i,
  output logic                     addr_inc_o,
  // DDR2 controller user interface
  input  logic                     app_af_afull_i,
  input  logic                     app_wdf_afull_i,
  output logic                     app_af_wren_o,
  output logic [2:0]               app_af_cmd_o,
  output logic [AW-1:0]            app_af_addr_o,
  output logic                     app_wdf_wren_o,
  output logic [DW-1:0]            app_wdf_data_o,
  output logic [DW/8-1:0]          app_wdf_mask_data_o,
  // status
  output logic                     busy_o,          // a burst is in progress
  output logic                     burst_start_o,   // pulse
  output logic                     burst_done_o,    // pulse
  output logic                     stall_empty_o,   // waiting for a word
  output logic                     stall_afull_o,   // controller back-pressure
  output logic                     word_done_o,     // pulse: a word was written
  output logic [CNT_W-1:0]         words_written_o
);

  localparam int unsigned NB = W / DW;   // beats per word

  initial begin
    assert (NB == 2 && (W != WORD_W || NB == BEATS)) else $error("ddr2_write_transaction expects two beats per word");
    assert (THRESH >= 1 && THRESH <= DEPTH) else $error("THRESH out of range");
  end

  logic         active;
  logic         reads_done;       // the word at the last FIFO location was read
  logic         beat;             // 0: command + low half, 1: high half
  logic         cur_valid, nxt_valid;
  logic [W-1:0] cur, nxt;
  logic         fire0, fire1;
  logic [1:0]   occupancy;

  assign fire0 = cur_valid && !beat && !app_af_afull_i && !app_wdf_afull_i;
  assign fire1 = cur_valid &&  beat && !app_wdf_afull_i;

  assign occupancy    = 2'(cur_valid) + 2'(nxt_valid) + 2'(fifo_rvalid_i);
  assign fifo_rd_en_o = active && !reads_done && !fifo_empty_i && occupancy < 2'd2;

  assign app_af_wren_o       = fire0;
  assign app_af_cmd_o        = CMD_WRITE;
  assign app_af_addr_o       = addr_i;
  assign addr_inc_o          = fire0;
  assign app_wdf_wren_o      = fire0 || fire1;
  assign app_wdf_data_o      = beat ? cur[W-1 -: DW] : cur[DW-1:0];
  assign app_wdf_mask_data_o = '0;

  assign busy_o        = active;
  assign word_done_o   = fire1;
  assign stall_empty_o = active && !reads_done && fifo_empty_i && !cur_valid && !nxt_valid
                         && !fifo_rvalid_i;
  assign stall_afull_o = cur_valid && !(beat ? fire1 : fire0);

  always_ff @(posedge clk) begin
    if (rst) begin
      active          <= 1'b0;
      reads_done      <= 1'b0;
      beat            <= 1'b0;
      cur_valid       <= 1'b0;
      nxt_valid       <= 1'b0;
      cur             <= '0;
      nxt             <= '0;
      burst_start_o   <= 1'b0;
      burst_done_o    <= 1'b0;
      words_written_o <= '0;
    end else begin
      burst_start_o <= 1'b0;
      burst_done_o  <= 1'b0;

      // Start a burst at 90% fill
      if (!active && enable_i && phy_init_done_i &&
          fifo_level_i >= ($clog2(DEPTH)+1)'(THRESH)) begin
        active        <= 1'b1;
        reads_done    <= 1'b0;
        burst_start_o <= 1'b1;
      end

      // The read of the last FIFO location ends the burst's reads
      if (fifo_rd_en_o && fifo_rdpos_i == $clog2(DEPTH)'(DEPTH - 1))
        reads_done <= 1'b1;

      // Beat sequencing
      if (fire0) beat <= 1'b1;
      if (fire1) begin
        beat            <= 1'b0;
        words_written_o <= words_written_o + 1'b1;
      end

      // Word registers
      if (fire1) begin
        if (nxt_valid) begin
          cur       <= nxt;
          cur_valid <= 1'b1;
          if (fifo_rvalid_i) nxt <= fifo_rdata_i;
          nxt_valid <= fifo_rvalid_i;
        end else if (fifo_rvalid_i) begin
          cur       <= fifo_rdata_i;
          cur_valid <= 1'b1;
        end else begin
          cur_valid <= 1'b0;
        end
      end else if (fifo_rvalid_i) begin
        if (!cur_valid) begin
          cur       <= fifo_rdata_i;
          cur_valid <= 1'b1;
        end else begin
          nxt       <= fifo_rdata_i;
          nxt_valid <= 1'b1;
        end
      end

      // End of burst: all reads done and every word written
      if (active && reads_done && !fifo_rvalid_i && !nxt_valid &&
          (!cur_valid || (fire1 && !nxt_valid))) begin
        active       <= 1'b0;
        reads_done   <= 1'b0;
        burst_done_o <= 1'b1;
      end
    end
  end

  // A word lands only where there is room for it.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(fifo_rvalid_i && cur_valid && nxt_valid && !fire1))
      else $error("ddr2_write_transaction: word register overrun");
  end

endmodule
