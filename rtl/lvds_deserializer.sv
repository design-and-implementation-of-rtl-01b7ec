// lvds_deserializer: 12-lane serial capture and word packing.
//
// The data source drives 12 serial lanes, a bit clock and a STROBE (line
// active) signal. Every falling edge of the bit clock while STROBE is high,
// one bit of each lane is shifted into a per-lane shift register and the bit
// offset (BITOFFSET) advances. After FRAMES x FRAME_BITS = 20 bits per lane,
// the two 12 x 10-bit frames are rearranged into one 256-bit word:
//
//   word[f*120 + c*10 + 9 - b] = bit b (b = 0 first) of lane c in frame f
//   word[255:240]              = 0 (padding)
//
// so each 10-bit lane sample sits MSB-first in its own field, frame 0 in the
// low half. word_o and word_valid_o are registered on the falling edge; the
// valid pulse lasts one bit-clock period, so a consumer on the rising edge of
// the same clock sees it exactly once. When STROBE drops, the bit offset
// returns to 0 and a partially received word is discarded.
//
// Sampling on the falling edge, 10 bits per lane per frame, two frames per
// word and zero padding follow the source description. The bit placement
// inside the word, MSB-first order and the treatment of STROBE as a level
// are this design's choices. Reset is synchronous and active high.
module lvds_deserializer
  import ddr2_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned F_BITS  = FRAME_BITS,
  parameter int unsigned N_FRM   = FRAMES,
  parameter int unsigned W       = WORD_W
) (
  input  logic               lvds_clk,   // source bit clock
  input  logic               rst,        // synchronous, active high
  input  logic               strobe_i,   // line active
  input  logic [N_LANES-1:0] lanes_i,    // one bit per lane
  output logic               word_valid_o,
  output logic [W-1:0]       word_o
);

  localparam int unsigned SR_W  = F_BITS * N_FRM;        // bits per lane per word
  localparam int unsigned OFS_W = $clog2(SR_W + 1);

  initial begin
    assert (N_LANES * SR_W <= W) else $error("capture word too small");
    if (W == WORD_W && N_LANES * SR_W == DATA_BITS)
      assert (W - N_LANES * SR_W == PAD_BITS) else $error("padding width");
  end

  logic [SR_W-1:0]  sr   [N_LANES];   // per-lane shift registers
  logic [SR_W-1:0]  sr_n [N_LANES];   // after the current bit
  logic [OFS_W-1:0] bitoffset;
  logic [W-1:0]     packed_w;

  always_comb begin
    for (int c = 0; c < N_LANES; c++)
      sr_n[c] = {sr[c][SR_W-2:0], lanes_i[c]};
  end

  // Rearrange: lane c, frame f -> bits [f*N_LANES*F_BITS + c*F_BITS +: F_BITS]
  always_comb begin
    packed_w = '0;
    for (int f = 0; f < N_FRM; f++)
      for (int c = 0; c < N_LANES; c++)
        packed_w[f*N_LANES*F_BITS + c*F_BITS +: F_BITS] =
          sr_n[c][(N_FRM-1-f)*F_BITS +: F_BITS];
  end

  always_ff @(negedge lvds_clk) begin
    if (rst) begin
      bitoffset    <= '0;
      word_valid_o <= 1'b0;
      word_o       <= '0;
      for (int c = 0; c < N_LANES; c++) sr[c] <= '0;
    end else begin
      word_valid_o <= 1'b0;
      if (strobe_i) begin
        for (int c = 0; c < N_LANES; c++) sr[c] <= sr_n[c];
        if (bitoffset == OFS_W'(SR_W - 1)) begin
          bitoffset    <= '0;
          word_o       <= packed_w;
          word_valid_o <= 1'b1;
        end else begin
          bitoffset <= bitoffset + 1'b1;
        end
      end else begin
        bitoffset <= '0;
      end
    end
  end

endmodule
