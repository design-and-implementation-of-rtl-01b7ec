// rw_sequencer: sequences one acquisition: write a fixed volume, then read
// it back block by block.
//
// start_i (an external request) begins the write phase: the address
// generator is cleared and the write transaction is enabled. Every word the
// write transaction stores is counted; when VOLUME words are in DDR2 and the
// writer is idle, writing stops, the address generator is cleared again and
// the read phase begins. In the read phase DDR_READ_START (read_start_o) is
// raised for one clock whenever FIFO_UART is empty and no read block is in
// progress, asking for min(BLOCK, words left) words. When every word has
// been read and the UART side has gone idle, the sequencer reports done_o
// and waits for the next start_i.
//
// read_req_i (an external request) ends the write phase early: no further
// burst is started, the burst in progress completes, and the read phase then
// returns every word written so far. In the regular case the read phase also
// returns all words written, which is VOLUME when VOLUME is a whole number
// of input FIFO loads.
//
// Writing a fixed volume before reading, and reissuing DDR_READ_START each
// time FIFO_UART runs empty until all data is read, follow the source
// description. VOLUME defaults to 200 Mbit (819200 words of 256 bits); it
// should be a multiple of the input FIFO depth, since the writer moves whole
// FIFO loads. Reset is synchronous and active high.
module rw_sequencer #(
  parameter int unsigned VOLUME = 819200,   // words of 256 bits
  parameter int unsigned BLOCK  = 1024,     // FIFO_UART depth
  parameter int unsigned CNT_W  = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start_i,
  input  logic                   read_req_i,       // end writing early
  input  logic                   phy_init_done_i,
  // write side
  input  logic                   wr_word_done_i,   // pulse per stored word
  input  logic                   wr_busy_i,
  output logic                   write_en_o,
  // address generator
  output logic                   addr_clear_o,
  // read side
  input  logic                   rd_busy_i,
  input  logic                   rd_done_i,
  input  logic                   ofifo_empty_i,
  input  logic                   uart_busy_i,
  output logic                   read_start_o,     // DDR_READ_START
  output logic [$clog2(BLOCK):0] read_count_o,
  // status
  output logic [1:0]             phase_o,          // 0 idle, 1 write, 2 read, 3 done
  output logic                   done_o,
  output logic [CNT_W-1:0]       blocks_o          // read blocks issued
);

  initial begin
    assert (VOLUME >= 1 && BLOCK >= 1) else $error("VOLUME and BLOCK must be positive");
  end

  typedef enum logic [2:0] {P_IDLE, P_WRITE, P_SWITCH, P_READ_WAIT, P_READ_BUSY, P_DONE} phase_e;
  phase_e           phase;
  logic [CNT_W-1:0] written, left;
  logic             req_seen;

  assign write_en_o = phase == P_WRITE && written < CNT_W'(VOLUME) && !req_seen;
  assign done_o     = phase == P_DONE;

  always_comb begin
    unique case (phase)
      P_IDLE:                              phase_o = 2'd0;
      P_WRITE, P_SWITCH:                   phase_o = 2'd1;
      P_READ_WAIT, P_READ_BUSY:            phase_o = 2'd2;
      default:                             phase_o = 2'd3;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase        <= P_IDLE;
      written      <= '0;
      left         <= '0;
      req_seen     <= 1'b0;
      addr_clear_o <= 1'b0;
      read_start_o <= 1'b0;
      read_count_o <= '0;
      blocks_o     <= '0;
    end else begin
      addr_clear_o <= 1'b0;
      read_start_o <= 1'b0;
      if (wr_word_done_i) written <= written + 1'b1;
      unique case (phase)
        P_IDLE, P_DONE:
          if (start_i && phy_init_done_i) begin
            phase        <= P_WRITE;
            written      <= '0;
            req_seen     <= 1'b0;
            addr_clear_o <= 1'b1;
          end
        P_WRITE: begin
          if (read_req_i) req_seen <= 1'b1;
          if ((written >= CNT_W'(VOLUME) || req_seen) && !wr_busy_i && !wr_word_done_i) begin
            phase        <= P_SWITCH;
            addr_clear_o <= 1'b1;
            left         <= written;
          end
        end
        P_SWITCH:
          phase <= P_READ_WAIT;
        P_READ_WAIT:
          if (left == '0) begin
            if (ofifo_empty_i && !uart_busy_i) phase <= P_DONE;
          end else if (ofifo_empty_i && !rd_busy_i) begin
            read_start_o <= 1'b1;
            read_count_o <= (left > CNT_W'(BLOCK)) ? ($clog2(BLOCK)+1)'(BLOCK)
                                                   : ($clog2(BLOCK)+1)'(left);
            left         <= (left > CNT_W'(BLOCK)) ? left - CNT_W'(BLOCK) : '0;
            blocks_o     <= blocks_o + 1'b1;
            phase        <= P_READ_BUSY;
          end
        P_READ_BUSY:
          if (rd_done_i) phase <= P_READ_WAIT;
        default: phase <= P_IDLE;
      endcase
    end
  end

endmodule
