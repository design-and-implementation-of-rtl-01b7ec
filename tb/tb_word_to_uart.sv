// tb_word_to_uart: feeds random 256-bit words through a FIFO model with
// one-cycle read latency, accepts bytes with a randomly stalling ready, and
// checks that each word comes out as 32 bytes: 64-bit field 0 first, each
// field most significant byte first; that no word is read before the
// previous one is fully sent; and that busy drops when all is sent.
module tb_word_to_uart;
  localparam int unsigned W = 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic empty, rvalid = 0, rd_en, bvalid, bready = 0, busy;
  logic [W-1:0] rdata = '0;
  logic [7:0] b;

  word_to_uart dut (.clk(clk), .rst(rst), .fifo_empty_i(empty), .fifo_rdata_i(rdata),
                    .fifo_rvalid_i(rvalid), .fifo_rd_en_o(rd_en), .byte_o(b),
                    .byte_valid_o(bvalid), .byte_ready_i(bready), .busy_o(busy));

  int checks = 0, failures = 0;
  logic [W-1:0] fifo[$];
  logic [7:0]   expb[$];
  int n_bytes = 0, n_reads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign empty = fifo.size() == 0;

  always @(posedge clk) begin
    rvalid <= 1'b0;
    if (!rst && rd_en) begin
      logic [W-1:0] w;
      check(!empty, "read while empty");
      check(expb.size() == 0, "word read before the previous one was sent");
      w = fifo.pop_front();
      rdata  <= w;
      rvalid <= 1'b1;
      n_reads++;
      for (int f = 0; f < 4; f++)
        for (int k = 7; k >= 0; k--) expb.push_back(w[f*64 + k*8 +: 8]);
    end
    if (!rst && bvalid && bready) begin
      check(expb.size() != 0 && b == expb[0], $sformatf("byte %0d = %h", n_bytes, b));
      if (expb.size() != 0) void'(expb.pop_front());
      n_bytes++;
    end
    bready <= ($urandom_range(3) == 0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 20; i++) begin
      logic [W-1:0] w;
      for (int j = 0; j < W / 32; j++) w[j*32 +: 32] = $urandom;
      fifo.push_back(w);
      if (i % 7 == 0) repeat (150) @(posedge clk);
    end
    wait (fifo.size() == 0);
    repeat (5) @(posedge clk);
    wait (!busy);
    repeat (5) @(posedge clk);
    check(n_reads == 20 && n_bytes == 20 * 32 && expb.size() == 0,
          $sformatf("reads %0d bytes %0d", n_reads, n_bytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
