// uart_tx: RS232 serial transmitter, 8 data bits, no parity, one stop bit.
//
// A byte offered on data_i with valid_i while ready_o is high is accepted on
// that rising edge. The line (tx_o, idle high) then carries a start bit (0),
// the eight data bits LSB first and a stop bit (1), each CLKS_PER_BIT clocks
// long. ready_o rises once the stop bit has been on the line for
// CLKS_PER_BIT clocks; a byte accepted then begins its start bit right after
// that edge, so back-to-back bytes start 10 x CLKS_PER_BIT + 1 clocks apart.
//
// The source description names only an RS232 UART link to a PC. Frame format,
// baud rate (115200 from a 200 MHz clock, CLKS_PER_BIT = 1736) and the
// handshake are this design's choices. Reset is synchronous and active high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 1736
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data_i,
  input  logic       valid_i,
  output logic       ready_o,
  output logic       tx_o
);

  localparam int unsigned DIV_W = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]       shreg;     // {stop, data[7:0], start}
  logic [3:0]       bits_left;
  logic [DIV_W-1:0] div;

  assign ready_o = bits_left == '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      div       <= '0;
      tx_o      <= 1'b1;
    end else if (ready_o) begin
      tx_o <= 1'b1;
      if (valid_i) begin
        shreg     <= {1'b1, data_i, 1'b0};
        bits_left <= 4'd10;
        div       <= DIV_W'(CLKS_PER_BIT - 1);
        tx_o      <= 1'b0;                 // start bit begins now
      end
    end else begin
      if (div == '0) begin
        div       <= DIV_W'(CLKS_PER_BIT - 1);
        bits_left <= bits_left - 1'b1;
        shreg     <= {1'b1, shreg[9:1]};
        tx_o      <= (bits_left == 4'd1) ? 1'b1 : shreg[1];
      end else begin
        div <= div - 1'b1;
      end
    end
  end

endmodule
