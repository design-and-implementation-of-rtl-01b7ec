// async_fifo: dual-clock FIFO, used as the 256 x 1024 input buffer.
//
// Captured words arrive in the source bit-clock domain and leave in the
// DDR2 controller clock domain. The buffer is an array of DEPTH words with
// binary write/read positions (WRPOS/RDPOS) one bit wider than the address;
// the positions cross domains as Gray code through two-flop synchronisers.
// Full is evaluated in the write domain, empty and the fill level in the read
// domain, both from the synchronised opposite pointer, so they are
// conservative (a word may appear a few cycles late, never early).
//
// Write: wr_en_i with wdata_i on a rising wclk edge while !full_o.
// Read : rd_en_i on a rising rclk edge while !empty_o; rdata_o holds the
//        word on the following cycle, flagged by rvalid_o (one-cycle latency,
//        as a block RAM read port has).
// rdpos_o is RDPOS modulo DEPTH, rd_level_o the fill level seen by the
// reader, wrpos_o WRPOS modulo DEPTH.
//
// The 256 x 1024 size, the WRPOS/RDPOS naming and full/empty flags follow
// the source description; the dual-clock Gray-code structure is this
// design's choice for crossing from the source clock to the controller
// clock. Resets are synchronous, active high, one per domain, and must both
// be applied before use.
module async_fifo #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 1024
) (
  // write domain
  input  logic                     wclk,
  input  logic                     wrst,
  input  logic                     wr_en_i,
  input  logic [WIDTH-1:0]         wdata_i,
  output logic                     full_o,
  output logic [$clog2(DEPTH)-1:0] wrpos_o,
  // read domain
  input  logic                     rclk,
  input  logic                     rrst,
  input  logic                     rd_en_i,
  output logic [WIDTH-1:0]         rdata_o,
  output logic                     rvalid_o,
  output logic                     empty_o,
  output logic [$clog2(DEPTH)-1:0] rdpos_o,
  output logic [$clog2(DEPTH):0]   rd_level_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");
  end

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr, wptr_gray;          // write domain
  logic [AW:0] rptr, rptr_gray;          // read domain

  // ---------------- write domain ----------------
  logic [AW:0] rptr_gray_s1, rptr_gray_s2;
  logic [AW:0] rptr_w;

  assign rptr_w  = gray2bin(rptr_gray_s2);
  assign full_o  = (wptr[AW] != rptr_w[AW]) && (wptr[AW-1:0] == rptr_w[AW-1:0]);
  assign wrpos_o = wptr[AW-1:0];

  always_ff @(posedge wclk) begin
    if (wr_en_i && !full_o) mem[wptr[AW-1:0]] <= wdata_i;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr         <= '0;
      wptr_gray    <= '0;
      rptr_gray_s1 <= '0;
      rptr_gray_s2 <= '0;
    end else begin
      rptr_gray_s1 <= rptr_gray;
      rptr_gray_s2 <= rptr_gray_s1;
      if (wr_en_i && !full_o) begin
        wptr      <= wptr + 1'b1;
        wptr_gray <= bin2gray(wptr + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic [AW:0] wptr_gray_s1, wptr_gray_s2;
  logic [AW:0] wptr_r;

  assign wptr_r     = gray2bin(wptr_gray_s2);
  assign empty_o    = (wptr_r == rptr);
  assign rd_level_o = wptr_r - rptr;
  assign rdpos_o    = rptr[AW-1:0];

  always_ff @(posedge rclk) begin
    if (rd_en_i && !empty_o) rdata_o <= mem[rptr[AW-1:0]];
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rptr         <= '0;
      rptr_gray    <= '0;
      wptr_gray_s1 <= '0;
      wptr_gray_s2 <= '0;
      rvalid_o     <= 1'b0;
    end else begin
      wptr_gray_s1 <= wptr_gray;
      wptr_gray_s2 <= wptr_gray_s1;
      rvalid_o     <= rd_en_i && !empty_o;
      if (rd_en_i && !empty_o) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

endmodule
