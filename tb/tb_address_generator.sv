// tb_address_generator: advances the shared address generator with random
// gaps and clears, and checks after every step that the controller address
// is {bank, row, column} of a location counted here independently, that each
// step adds 4 columns (one 256-bit word = four 64-bit columns), that column,
// row and bank carry into each other in that order, and that the counter
// wraps to 0 with a wrap pulse after the last burst. Also checks the
// full-size field widths: 4 banks, 8K rows, 512 columns.
module tb_address_generator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // reduced fields so that every carry and the wrap happen quickly
  localparam int unsigned BW = 2, RW = 3, CW = 4;
  logic clear = 0, inc = 0, wrap;
  logic [30:0] addr;
  logic [BW-1:0] bank;
  logic [RW-1:0] row;
  logic [CW-1:0] col;

  address_generator #(.B_W(BW), .R_W(RW), .C_W(CW)) dut (
    .clk(clk), .rst(rst), .clear_i(clear), .inc_i(inc),
    .app_addr_o(addr), .bank_o(bank), .row_o(row), .col_o(col), .wrap_o(wrap));

  // full-size instance: fields of the 128 MB part
  logic [30:0] addr_f;
  logic [1:0]  bank_f;
  logic [12:0] row_f;
  logic [8:0]  col_f;
  logic        wrap_f;
  logic        inc_f = 0;
  address_generator dut_full (
    .clk(clk), .rst(rst), .clear_i(1'b0), .inc_i(inc_f),
    .app_addr_o(addr_f), .bank_o(bank_f), .row_o(row_f), .col_o(col_f), .wrap_o(wrap_f));

  int checks = 0, failures = 0;
  int unsigned loc = 0;       // 64-bit location, reference
  int wraps = 0, bank_steps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    total = 1 << (BW + RW + CW);
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(addr == 0, "address 0 after reset");
    for (int i = 0; i < 3 * total / 4 + 50; i++) begin
      bit do_inc, do_clr, wrapped;
      do_inc = ($urandom_range(3) != 0);
      do_clr = (i == total / 4 + 20);
      inc   <= do_inc;
      clear <= do_clr;
      @(posedge clk);
      wrapped = 0;
      if (do_clr) loc = 0;
      else if (do_inc) begin
        loc = loc + 4;
        if (loc == total) begin loc = 0; wrapped = 1; wraps++; end
        if (loc % (1 << (CW + RW)) == 0) bank_steps++;
      end
      #1;
      check(col == CW'(loc) && row == RW'(loc >> CW) && bank == BW'(loc >> (CW + RW)),
            $sformatf("fields at location %0d", loc));
      check(addr == 31'(loc), $sformatf("address %0h, expected %0h", addr, loc));
      check(wrap == wrapped, "wrap pulse");
    end
    inc <= 0; clear <= 0;
    check(wraps >= 1 && bank_steps >= 3, $sformatf("wraps %0d bank steps %0d", wraps, bank_steps));
    // full size: 128 increments move one row (512 columns / 4)
    repeat (128) begin inc_f <= 1; @(posedge clk); end
    inc_f <= 0; @(posedge clk); #1;
    check(col_f == 0 && row_f == 1 && bank_f == 0 && addr_f == 31'(512),
          $sformatf("full size after one row: bank %0d row %0d col %0d", bank_f, row_f, col_f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
