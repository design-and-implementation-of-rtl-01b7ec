// word_to_uart: unloads FIFO_UART one 256-bit word at a time and sends it as
// 32 bytes through the RS232 transmitter.
//
// When the transmitter side is idle and the FIFO is not empty, one word is
// read (one-cycle read latency) and held. Its bytes are then offered to
// uart_tx in order of increasing memory location: the four 64-bit fields
// word[63:0], word[127:64], word[191:128], word[255:192], each most
// significant byte first, so a byte-wise hex dump shows every 64-bit
// location as one 16-digit number. busy_o is high while a word is being sent.
//
// Sending the DDR2 read data from FIFO_UART over the UART at low speed
// follows the source description; the byte order is this design's choice.
// Reset is synchronous and active high.
module word_to_uart
  import ddr2_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst,
  // FIFO_UART read side
  input  logic         fifo_empty_i,
  input  logic [W-1:0] fifo_rdata_i,
  input  logic         fifo_rvalid_i,
  output logic         fifo_rd_en_o,
  // byte stream to uart_tx
  output logic [7:0]   byte_o,
  output logic         byte_valid_o,
  input  logic         byte_ready_i,
  output logic         busy_o
);

  localparam int unsigned NBYTES = W / 8;
  localparam int unsigned BI_W   = $clog2(NBYTES);

  initial begin
    assert (W % 64 == 0) else $error("word must be a whole number of 64-bit fields");
  end

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_SEND} state_e;
  state_e         state;
  logic [W-1:0]   word;
  logic [BI_W-1:0] idx;

  // byte idx: field idx/8, byte 7 - idx%8 inside the field
  assign byte_o       = word[{idx[BI_W-1:3], ~idx[2:0]} * 8 +: 8];
  assign byte_valid_o = state == S_SEND;
  assign fifo_rd_en_o = state == S_IDLE && !fifo_empty_i;
  assign busy_o       = state != S_IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      word  <= '0;
      idx   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (fifo_rd_en_o) state <= S_FETCH;
        S_FETCH: if (fifo_rvalid_i) begin
                   word  <= fifo_rdata_i;
                   idx   <= '0;
                   state <= S_SEND;
                 end
        S_SEND:  if (byte_ready_i) begin
                   idx <= idx + 1'b1;
                   if (idx == BI_W'(NBYTES - 1)) state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
