// ddr2_pkg: constants shared by the 12-lane DDR2 capture design.
//
// The capture word is 256 bits: two frames of 12 lanes x 10 bits (240 bits)
// with 16 zero bits of padding on top. The external memory is a 128 MB DDR2
// part with a 64-bit data path, organised as 4 banks x 8K rows x 512 columns;
// one 256-bit word occupies four consecutive 64-bit columns (a burst of 4).
// These numbers follow the source description. The controller command codes
// and the 128-bit user data width are those of the FPGA vendor's DDR2
// controller user interface for a 64-bit memory, and are this design's choice.
package ddr2_pkg;

  // Capture format
  localparam int unsigned LANES        = 12;   // LVDS data lanes
  localparam int unsigned FRAME_BITS   = 10;   // bits per lane per frame
  localparam int unsigned FRAMES       = 2;    // frames packed per word
  localparam int unsigned WORD_W       = 256;  // FIFO / DDR2 burst word
  localparam int unsigned DATA_BITS    = LANES * FRAME_BITS * FRAMES; // 240
  localparam int unsigned PAD_BITS     = WORD_W - DATA_BITS;          // 16

  // DDR2 organisation (64-bit memory word)
  localparam int unsigned MEM_W        = 64;
  localparam int unsigned BANK_W       = 2;    // BA0..BA1 : 4 banks
  localparam int unsigned ROW_W        = 13;   // A0..A12  : 8K rows
  localparam int unsigned COL_W        = 9;    // A0..A8   : 512 columns
  localparam int unsigned BURST_LEN    = WORD_W / MEM_W;  // 4 columns per word

  // Controller user interface
  localparam int unsigned APP_ADDR_W   = 31;
  localparam int unsigned APP_DATA_W   = 128;  // two 64-bit beats per clock
  localparam int unsigned BEATS        = WORD_W / APP_DATA_W;  // 2

  typedef enum logic [2:0] {
    CMD_WRITE = 3'b000,
    CMD_READ  = 3'b001
  } app_cmd_e;

endpackage
