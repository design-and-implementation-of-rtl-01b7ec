// address_generator: common DDR2 address generator for writes and reads.
//
// One counter serves both the write and the read transaction. It counts
// 64-bit memory locations and advances by BURST (4) on every accepted
// command, because each 256-bit word fills four consecutive columns. The
// count is split, from the least significant end, into column, row and bank
// fields, and placed on the controller's address bus as
//   app_addr_o = {zero fill, bank, row, column}.
// clear_i returns the counter to location 0 (used when switching from
// writing to reading); inc_i advances it. Both take effect on the next
// rising edge, clear_i first. wrap_o pulses for one cycle when the last
// burst of the memory has been addressed and the counter rolls over.
//
// The field widths (4 banks, 8K rows, 512 columns), the shared generator and
// the step of 4 follow the source description. The field order inside the
// address and the linear bank/row/column walk are this design's choices.
// Reset is synchronous and active high.
module address_generator
  import ddr2_pkg::*;
#(
  parameter int unsigned B_W    = BANK_W,
  parameter int unsigned R_W    = ROW_W,
  parameter int unsigned C_W    = COL_W,
  parameter int unsigned BURST  = BURST_LEN,
  parameter int unsigned ADDR_W = APP_ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear_i,
  input  logic              inc_i,
  output logic [ADDR_W-1:0] app_addr_o,
  output logic [B_W-1:0]    bank_o,
  output logic [R_W-1:0]    row_o,
  output logic [C_W-1:0]    col_o,
  output logic              wrap_o
);

  localparam int unsigned LOC_W = B_W + R_W + C_W;

  initial begin
    assert (LOC_W <= ADDR_W) else $error("address fields exceed the address bus");
    assert (BURST == (1 << $clog2(BURST))) else $error("BURST must be a power of two");
  end

  logic [LOC_W-1:0] loc;       // current 64-bit location
  logic [LOC_W:0]   loc_next;

  assign loc_next = {1'b0, loc} + (LOC_W+1)'(BURST);

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      loc    <= '0;
      wrap_o <= 1'b0;
    end else begin
      wrap_o <= 1'b0;
      if (inc_i) begin
        loc    <= loc_next[LOC_W-1:0];
        wrap_o <= loc_next[LOC_W];
      end
    end
  end

  assign col_o      = loc[C_W-1:0];
  assign row_o      = loc[C_W +: R_W];
  assign bank_o     = loc[C_W+R_W +: B_W];
  assign app_addr_o = ADDR_W'({bank_o, row_o, col_o});

endmodule
