// tb_path_upsampler: loads random N-bit words every N clocks into
// upsamplers of 1, 2 and 4 paths and checks that the serial output presents
// bit 0 in the clock after the load and bits 1..N-1 in the following clocks.
module tb_path_upsampler;
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

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  for (genvar p = 0; p < 3; p++) begin : g_p
    localparam int N = 1 << p;
    logic         load;
    logic [N-1:0] bits_in;
    logic         bit_out, bit_valid;
    path_upsampler #(.NPATHS(N)) dut (.clk(clk), .rst(rst), .load(load), .bits_in(bits_in),
      .bit_out(bit_out), .bit_valid(bit_valid));

    initial begin
      logic [N-1:0] word;
      load = 0; bits_in = '0;
      wait (!rst);
      @(negedge clk);
      check(bit_valid == 0, "not valid before first load");
      for (int g = 0; g < 100; g++) begin
        word = N'($urandom);
        load = 1; bits_in = word;
        @(negedge clk);
        load = 0; bits_in = ~word;
        for (int j = 0; j < N; j++) begin
          check(bit_out == word[j] && bit_valid, $sformatf("N%0d group %0d bit %0d", N, g, j));
          if (j == N - 1) begin
            load = 1; bits_in = word;   // next load overlaps the last bit
          end else begin
            @(negedge clk);
          end
        end
        load = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (450) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
