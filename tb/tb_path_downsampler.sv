// tb_path_downsampler: feeds a counting word stream, with gaps in in_valid,
// into downsamplers of 1, 2 and 4 paths. Checks that each par_valid pulse
// carries words Nm..Nm+N-1 in slots 0..N-1, comes one clock after the last
// word of the group, and that pulses are exactly one clock long.
module tb_path_downsampler;
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

  logic clk = 0, rst = 1, in_valid = 0;
  logic [29:0] in_word = '0;
  always #5 clk = ~clk;

  int groups [3];

  for (genvar p = 0; p < 3; p++) begin : g_p
    localparam int N = 1 << p;
    logic [29:0] par [N];
    logic        par_valid;
    path_downsampler #(.NPATHS(N), .W(30)) dut (.clk(clk), .rst(rst), .in_valid(in_valid),
      .in_word(in_word), .par(par), .par_valid(par_valid));

    int  sent;
    bit  expect_valid;
    initial begin
      sent = 0; groups[p] = 0; expect_valid = 0;
      forever begin
        @(posedge clk);
        if (!rst) begin
          #1;
          check(par_valid == expect_valid, $sformatf("N%0d par_valid timing", N));
          if (par_valid)
            for (int j = 0; j < N; j++)
              check(int'(par[j]) == (groups[p] * N + j) * 3 + 7,
                    $sformatf("N%0d group %0d slot %0d got %0d", N, groups[p], j, par[j]));
          if (par_valid) groups[p]++;
        end
      end
    end
    always @(negedge clk) begin
      if (!rst) begin
        // in_valid/in_word for the coming edge were set at this negedge by the driver
        #2;
        expect_valid = in_valid && ((sent % N) == N - 1);
        if (in_valid) sent++;
      end
    end
  end

  initial begin
    int w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    w = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_word  = 30'(w * 3 + 7);
      if (in_valid) w++;
    end
    @(negedge clk) in_valid = 0;
    repeat (2) @(posedge clk);
    check(groups[0] == w && groups[1] == w / 2 && groups[2] == w / 4, "group counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
