// sync_fifo: single-clock FIFO, used as the 256 x 1024 output buffer
// (FIFO_UART) between DDR2 read data and the RS232 transmitter.
//
// DEPTH words of WIDTH bits in an array addressed by binary write and read
// positions one bit wider than the address, so full and empty are exact and
// the fill level is their difference.
//
// Write: wr_en_i with wdata_i on a rising edge while !full_o.
// Read : rd_en_i while !empty_o; rdata_o holds the word on the next cycle,
//        flagged by rvalid_o (one-cycle latency, block RAM style).
//
// The 256 x 1024 size follows the source description; the rest is this
// design's choice. Reset is synchronous and active high.
module sync_fifo #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en_i,
  input  logic [WIDTH-1:0]       wdata_i,
  output logic                   full_o,
  input  logic                   rd_en_i,
  output logic [WIDTH-1:0]       rdata_o,
  output logic                   rvalid_o,
  output logic                   empty_o,
  output logic [$clog2(DEPTH):0] level_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign level_o = wptr - rptr;
  assign full_o  = level_o == (AW+1)'(DEPTH);
  assign empty_o = level_o == '0;
  assign do_wr   = wr_en_i && !full_o;
  assign do_rd   = rd_en_i && !empty_o;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wdata_i;
    if (do_rd) rdata_o <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      rvalid_o <= 1'b0;
    end else begin
      rvalid_o <= do_rd;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // A write into a full FIFO or a read from an empty one loses data.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(wr_en_i && full_o))  else $error("sync_fifo: write while full");
      assert (!(rd_en_i && empty_o)) else $error("sync_fifo: read while empty");
    end
  end

endmodule
