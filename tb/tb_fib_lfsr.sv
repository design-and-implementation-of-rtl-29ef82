// tb_fib_lfsr: checks the dither LFSR against the reference shift register
// for a full period, that the period is exactly 65535 (maximal length, every
// non-zero state once), that the dither word is the low 14 bits as a signed
// number, and that the mean of the dither over a period is near zero.
module tb_fib_lfsr;
  import ddsm_ref_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;
  logic signed [13:0] dither;
  logic [15:0]        state;

  fib_lfsr #(.SEED(16'h1234)) dut (.clk(clk), .rst(rst), .en(en), .dither(dither), .state(state));

  bit seen [65536];

  initial begin
    lfsr_ref m;
    longint  sum;
    int      distinct, period;
    m = new(16'h1234);
    repeat (2) @(posedge clk);
    #1 check(state == 16'h1234, "reset loads the seed");
    @(negedge clk) rst = 0; en = 1;
    sum = 0; distinct = 0; period = 0;
    for (int t = 0; t < 65535; t++) begin
      check(state == m.st, $sformatf("step %0d state %h exp %h", t, state, m.st));
      check(int'(dither) == m.dither(), "dither word");
      if (!seen[state]) distinct++;
      seen[state] = 1;
      sum += longint'(dither);
      m.advance();
      @(posedge clk); #1;
    end
    check(state == 16'h1234, "period 65535");
    check(distinct == 65535 && !seen[0], "all non-zero states visited");
    check(sum < 65535 * 64 && sum > -65535 * 64, $sformatf("dither mean %0d", sum / 65535));
    @(negedge clk) en = 0;
    @(posedge clk); #1;
    check(state == 16'h1234, "hold without en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
