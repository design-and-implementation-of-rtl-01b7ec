// tb_uart_tx: sends random bytes, back to back and with gaps, and decodes
// the line here: start bit low, eight data bits LSB first, stop bit high,
// each held for exactly CLKS_PER_BIT clocks (the line is checked on every
// clock of every bit), and ready returns 10 x CLKS_PER_BIT clocks after a
// byte is accepted. CLKS_PER_BIT = 5.
module tb_uart_tx;
  localparam int unsigned CPB = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] data = '0;
  logic valid = 0, ready, tx;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .data_i(data), .valid_i(valid),
                                     .ready_o(ready), .tx_o(tx));

  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  int n_rx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // line checker: after a falling edge of tx, every clock of each bit
  initial begin
    @(negedge rst);
    forever begin
      @(posedge clk); #1;
      if (tx == 1'b0) begin
        logic [9:0] frame;
        for (int b = 0; b < 10; b++) begin
          logic v;
          v = tx;
          for (int k = 0; k < CPB; k++) begin
            check(tx == v, $sformatf("bit %0d not held for %0d clocks", b, CPB));
            if (!(b == 9 && k == CPB - 1)) begin @(posedge clk); #1; end
          end
          frame[b] = v;
        end
        check(frame[0] == 1'b0 && frame[9] == 1'b1, "start/stop bits");
        check(sent.size() != 0 && frame[8:1] == sent[0], $sformatf("byte %0d", n_rx));
        if (sent.size() != 0) void'(sent.pop_front());
        n_rx++;
      end
    end
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
    @(posedge clk);
    check(tx == 1'b1 && ready, "idle line high and ready");
    for (int i = 0; i < 60; i++) begin
      int t;
      logic [7:0] b;
      b = 8'($urandom);
      while (!ready) @(posedge clk);
      data <= b; valid <= 1;
      sent.push_back(b);
      @(posedge clk);
      valid <= 0;
      t = 0;
      #1;
      while (!ready) begin @(posedge clk); #1; t++; end
      check(t == 10 * CPB, $sformatf("byte time %0d clocks", t));
      if (i % 3 == 0) repeat ($urandom_range(7)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check(n_rx == 60 && sent.size() == 0, $sformatf("received %0d bytes", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
