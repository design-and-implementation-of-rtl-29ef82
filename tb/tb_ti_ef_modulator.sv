// tb_ti_ef_modulator: runs the modulator with 1, 2 and 4 paths for each of
// the four coefficient sets (12 instances) on the same 0.2-frequency input
// stream with LFSR dither, enables arriving at random. Checks:
//  * every output bit against the single-path integer reference, sample by
//    sample (the time-interleaved forms must give the single-path stream);
//  * y_valid one clock after en, and no state change without en;
//  * as a sigma-delta modulator: the output's component at 0.2 equals the
//    input amplitude within 3 %, and the error y - x has its spectrum notched
//    around 0.2 (at least 25 dB below its level at 0.45).
module tb_ti_ef_modulator;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  localparam int NSAMP = 4000;   // samples per instance (multiple of 4)
  localparam int AMPL  = 16384;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // common input stream
  int xs [NSAMP];
  int ds [NSAMP];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // power of sequence e at normalised frequency f (squared DFT magnitude / N^2)
  function automatic real tone_pow(real e [NSAMP], real f);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NSAMP; n++) begin
      re += e[n] * $cos(2.0 * 3.14159265358979 * f * n);
      im += e[n] * $sin(2.0 * 3.14159265358979 * f * n);
    end
    return (re * re + im * im) / (real'(NSAMP) * real'(NSAMP));
  endfunction

  int done_count = 0;

  for (genvar f = 0; f < 4; f++) begin : g_f
    for (genvar p = 0; p < 3; p++) begin : g_p
      localparam int N = 1 << p;
      logic                       en;
      logic signed [IN_W-1:0]     x [N];
      logic signed [DITHER_W-1:0] d [N];
      logic [N-1:0]               y;
      logic                       y_valid;

      ti_ef_modulator #(.NPATHS(N), .FILTER(filter_e'(f))) dut (
        .clk(clk), .rst(rst), .en(en), .dither_en(1'b1), .x(x), .dither(d),
        .y(y), .y_valid(y_valid));

      initial begin
        ef_ref m;
        int    idx;
        bit    ey;
        real   e [NSAMP];
        real   sig, notch, far;
        logic [N-1:0] y_prev;
        m  = new(f);
        en = 0;
        idx = 0;
        foreach (x[j]) begin x[j] = '0; d[j] = '0; end
        wait (!rst);
        while (idx < NSAMP) begin
          @(negedge clk);
          en = ($urandom_range(0, 3) != 0);
          for (int j = 0; j < N; j++) begin
            x[j] = IN_W'(xs[idx + j]);
            d[j] = DITHER_W'(ds[idx + j]);
          end
          y_prev = y;
          @(posedge clk); #1;
          check(y_valid == en, "y_valid one clock after en");
          if (en) begin
            for (int j = 0; j < N; j++) begin
              ey = m.step(xs[idx + j], ds[idx + j], 1'b1);
              check(y[j] == ey, $sformatf("f%0d N%0d sample %0d got %0b exp %0b",
                                          f, N, idx + j, y[j], ey));
              e[idx + j] = (y[j] ? 1.0 : -1.0) - real'(xs[idx + j]) / 32768.0;
            end
            idx += N;
          end else begin
            check(y == y_prev, "outputs hold without en");
          end
        end
        // spectral checks
        sig = 0.0;
        for (int n = 0; n < NSAMP; n++)
          sig += (e[n] + real'(xs[n]) / 32768.0) * $cos(2.0 * 3.14159265358979 * 0.2 * n);
        sig = 2.0 * sig / real'(NSAMP);
        check(sig > 0.97 * AMPL / 32768.0 && sig < 1.03 * AMPL / 32768.0,
              $sformatf("f%0d N%0d signal amplitude %f", f, N, sig));
        notch = tone_pow(e, 0.2 + 1.0 / 400.0) + tone_pow(e, 0.2 - 1.0 / 400.0);
        far   = tone_pow(e, 0.45) + tone_pow(e, 0.45 + 1.0 / 400.0);
        check(notch * 316.0 < far, $sformatf("f%0d N%0d notch %g far %g", f, N, notch, far));
        done_count++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lfsr_ref l;
    l = new(16'hACE1);
    for (int n = 0; n < NSAMP; n++) begin
      xs[n] = sine_ref(AMPL, n);
      ds[n] = l.dither();
      l.advance();
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done_count == 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
