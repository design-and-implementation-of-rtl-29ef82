// tb_reset_sync: checks that rst rises immediately (between clock edges)
// when arst_n falls, and falls only on the second rising clock edge after
// arst_n is released.
module tb_reset_sync;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0, arst_n = 1, rst;
  always #5 clk = ~clk;
  reset_sync dut (.clk(clk), .arst_n(arst_n), .rst(rst));

  initial begin
    #2;
    for (int r = 0; r < 5; r++) begin
      arst_n = 0;
      #3 check(rst == 1, "asserted asynchronously");
      repeat (3) @(posedge clk);
      #2 arst_n = 1;
      @(posedge clk); #1 check(rst == 1, "still held after one edge");
      @(posedge clk); #1 check(rst == 0, "released after two edges");
      repeat (r + 2) @(posedge clk);
      #1 check(rst == 0, "stays released");
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
