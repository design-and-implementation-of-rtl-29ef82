// tb_uart_tx: sends random bytes with random gaps through the transmitter
// (8 clocks per bit) and decodes the line by sampling mid-bit. Checks each
// received byte, the start and stop bits, that tx_ready is low for exactly
// 10 bit times per byte, and that the line idles high.
module tb_uart_tx;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CPB = 8;
  logic clk = 0, rst = 1;
  logic [7:0] tx_data = '0;
  logic tx_valid = 0, tx_ready, txd;
  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .tx_data(tx_data), .tx_valid(tx_valid),
    .tx_ready(tx_ready), .txd(txd));

  byte unsigned sent [$];
  int received = 0;

  // receiver: waits for a falling edge, then samples mid-bit
  initial begin
    byte unsigned b;
    wait (!rst);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      #1 check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        #1 b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      #1 check(txd == 1, "stop bit");
      check(sent.size() > 0 && b == sent[0], $sformatf("byte %0d got %h", received, b));
      if (sent.size() > 0) void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    int busy;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    #1 check(txd == 1 && tx_ready == 1, "idle high and ready after reset");
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      tx_data  = 8'($urandom);
      tx_valid = 1;
      @(posedge clk); #1;
      check(tx_ready == 0, "busy after accept");
      sent.push_back(tx_data);
      @(negedge clk);
      tx_valid = 0;
      tx_data  = 8'($urandom);
      busy = 1;
      while (!tx_ready) begin
        @(posedge clk); #1;
        if (!tx_ready) busy++;
      end
      check(busy == 10 * CPB, $sformatf("frame length %0d clocks", busy));
      repeat ($urandom_range(0, 20)) begin
        @(posedge clk); #1 check(txd == 1, "idle line high");
      end
    end
    repeat (2 * CPB) @(posedge clk);
    check(received == 40, $sformatf("received %0d bytes", received));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
