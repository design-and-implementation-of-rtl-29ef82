// tb_sine_lut: checks the LUT sinusoid for three amplitudes: each word
// against floor(AMP * round(2^15 cos(2 pi 0.2 n)) / 2^15), within one LSB of
// AMP * cos(2 pi 0.2 n), period 5, hold while en is low, and restart at
// phase 0 after reset.
module tb_sine_lut;
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
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;

  localparam int AMPS [3] = '{16384, 32767, 5000};
  logic signed [15:0] xo [3];

  for (genvar a = 0; a < 3; a++) begin : g_a
    sine_lut #(.AMP(AMPS[a])) dut (.clk(clk), .rst(rst), .en(en), .x(xo[a]));
  end

  initial begin
    int n;
    real ideal;
    logic signed [15:0] held [3];
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    n = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk) en = (t % 9 != 4);
      held = xo;
      @(posedge clk); #1;
      for (int a = 0; a < 3; a++) begin
        if (en) begin
          ideal = real'(AMPS[a]) * $cos(2.0 * 3.14159265358979 * 0.2 * n);
          check(int'(xo[a]) == sine_ref(AMPS[a], n),
                $sformatf("amp %0d n %0d got %0d exp %0d", AMPS[a], n, xo[a], sine_ref(AMPS[a], n)));
          check(real'(xo[a]) - ideal < 1.5 && ideal - real'(xo[a]) < 1.5, "within one LSB");
        end else begin
          check(xo[a] == held[a], "hold without en");
        end
      end
      if (en) n++;
      if (t == 150) begin
        @(negedge clk) begin rst = 1; en = 0; end
        @(posedge clk); #1;
        for (int a = 0; a < 3; a++) check(xo[a] == 0, "reset clears x");
        @(negedge clk) rst = 0;
        n = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
