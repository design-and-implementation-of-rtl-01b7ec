// detector_simulator: test data source standing in for a 12-channel CMOS
// image sensor.
//
// It drives a bit clock, a STROBE line-active signal and 12 serial lanes.
// The bit clock lvds_clk_o is clk divided by two; lanes and STROBE change
// together with its rising edge, so they are stable at the falling edge
// where the receiver samples them. While enable_i is high the source sends
// lines of LINE_WORDS capture words with STROBE high, separated by GAP_BITS
// bit periods with STROBE low. Each capture word is 20 bits per lane.
//
// Test pattern: capture word n carries, once the receiver has packed it,
// the 64-bit values 4n, 4n+1, 4n+2, 4n+3 in its four 64-bit fields (the top
// 16 bits of the last field are the zero padding), so after storage in DDR2
// every 64-bit location holds its own location number. To get there the
// source serialises the inverse of the receiver's packing: bit b (b = 0
// first) of lane c in frame f is word bit f*120 + c*10 + 9 - b.
//
// A data generator with 12 lanes, clock and strobe, and a location-equals-
// value pattern, follow the source description; line length, gap and clock
// ratio are this design's choices. Reset is synchronous and active high.
module detector_simulator
  import ddr2_pkg::*;
#(
  parameter int unsigned LINE_WORDS = 64,
  parameter int unsigned GAP_BITS   = 4,
  parameter int unsigned N_LANES    = LANES,
  parameter int unsigned F_BITS     = FRAME_BITS,
  parameter int unsigned N_FRM      = FRAMES,
  parameter int unsigned W          = WORD_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable_i,
  output logic               lvds_clk_o,
  output logic               strobe_o,
  output logic [N_LANES-1:0] lanes_o,
  output logic [31:0]        words_sent_o
);

  localparam int unsigned SR_W  = F_BITS * N_FRM;   // 20 bits per lane per word
  localparam int unsigned T_W   = $clog2(SR_W);
  localparam int unsigned LW_W  = $clog2(LINE_WORDS + 1);
  localparam int unsigned G_W   = $clog2(GAP_BITS + 1);
  localparam int unsigned NF    = W / MEM_W;        // 64-bit fields per word

  logic [W-1:0]  pattern;
  logic [31:0]   word_n;
  logic [T_W-1:0] t;          // bit offset inside the word
  logic [LW_W-1:0] wcount;    // words sent in this line
  logic [G_W-1:0]  gap;
  logic          in_line;
  logic          rise;        // lvds_clk_o goes high at this edge

  // Word n: fields 4n .. 4n+3, padding forced to zero
  always_comb begin
    pattern = '0;
    for (int k = 0; k < NF; k++)
      pattern[k*MEM_W +: MEM_W] = MEM_W'(word_n) * MEM_W'(NF) + MEM_W'(k);
    pattern[W-1:N_LANES*SR_W] = '0;
  end

  assign rise = !lvds_clk_o;

  always_ff @(posedge clk) begin
    if (rst) begin
      lvds_clk_o   <= 1'b0;
      strobe_o     <= 1'b0;
      lanes_o      <= '0;
      word_n       <= '0;
      words_sent_o <= '0;
      t            <= '0;
      wcount       <= '0;
      gap          <= '0;
      in_line      <= 1'b0;
    end else begin
      lvds_clk_o <= !lvds_clk_o;
      if (rise) begin
        if (in_line) begin
          // drive bit t of every lane
          strobe_o <= 1'b1;
          for (int c = 0; c < N_LANES; c++)
            lanes_o[c] <= pattern[(int'(t) / F_BITS) * N_LANES * F_BITS + c * F_BITS
                                  + F_BITS - 1 - (int'(t) % F_BITS)];
          if (t == T_W'(SR_W - 1)) begin
            t            <= '0;
            word_n       <= word_n + 1'b1;
            words_sent_o <= words_sent_o + 1'b1;
            if (wcount == LW_W'(LINE_WORDS - 1)) begin
              wcount  <= '0;
              in_line <= 1'b0;
              gap     <= G_W'(GAP_BITS);
            end else begin
              wcount <= wcount + 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end else begin
          strobe_o <= 1'b0;
          lanes_o  <= '0;
          if (gap != '0) gap <= gap - 1'b1;
          else if (enable_i) in_line <= 1'b1;
        end
      end
    end
  end

endmodule
