// tb_snr_workload: the evaluation workload of the modulator: in-band SNR
// against input amplitude. Runs the 4-path modulator for each of the four
// coefficient sets on a 20480-sample 0.2 sinusoid (so 0.2 falls exactly on
// a DFT bin and no window is needed) at -40, -30, -20, -12 and -6 dB of
// full scale without dither, and at -6 dB with dither, and measures the in-band
// signal-to-noise ratio for signal bands of 0.5/OSR centred on 0.2 with
// OSR = 64, 128 and 256 (the effective oversampling ratios of the 1-, 2- and
// 4-path evaluations). The output bits are also checked against the
// single-path reference model.
// Checks (sanity bounds chosen here, not published figures): at -6 dB the
// SNR at OSR 64 is above 40 dB, not lower at a higher OSR, and at least 6 dB
// higher at OSR 256 than at OSR 64; without dither the SNR at OSR 64 rises
// by at least 25 dB from -40 dB to -6 dB input. The measured values are
// printed.
module tb_snr_workload;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  localparam int NS   = 20480;
  localparam int NP   = 4;
  localparam int NCOND = 6;
  // amplitudes in 2^-15 units: -40, -30, -20, -12, -6 dBFS, then -6 dBFS dithered
  localparam int AMPS [NCOND] = '{328, 1036, 3277, 8231, 16423, 16423};
  localparam bit DITH [NCOND] = '{0, 0, 0, 0, 0, 1};

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  real cos_t [NS];
  real sin_t [NS];
  int  ds [NS];
  int  done_count = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power in DFT bin k of the +-1 sequence y
  function automatic real bin_pow(bit y [NS], int k);
    real re = 0.0, im = 0.0;
    int  idx = 0;
    for (int n = 0; n < NS; n++) begin
      re += y[n] ? cos_t[idx] : -cos_t[idx];
      im += y[n] ? sin_t[idx] : -sin_t[idx];
      idx += k;
      if (idx >= NS) idx -= NS;
    end
    return re * re + im * im;
  endfunction

  for (genvar f = 0; f < 4; f++) begin : g_f
    logic                       en, rst_i, den;
    logic signed [IN_W-1:0]     x [NP];
    logic signed [DITHER_W-1:0] d [NP];
    logic [NP-1:0]              y;
    logic                       y_valid;

    ti_ef_modulator #(.NPATHS(NP), .FILTER(filter_e'(f))) dut (
      .clk(clk), .rst(rst_i), .en(en), .dither_en(den), .x(x), .dither(d),
      .y(y), .y_valid(y_valid));

    initial begin
      ef_ref m;
      bit    ys [NS];
      bit    ey;
      int    mism, xn;
      real   sig, noise, snr [3], snr64 [NCOND];
      int    kc, half;
      en = 0; rst_i = 1; den = 0;
      foreach (x[j]) begin x[j] = '0; d[j] = '0; end
      wait (!rst);
      for (int c = 0; c < NCOND; c++) begin
        // reset the modulator between conditions
        @(negedge clk);
        rst_i = 1; en = 0; den = DITH[c];
        @(negedge clk);
        rst_i = 0;
        m = new(f);
        mism = 0;
        for (int g = 0; g < NS / NP; g++) begin
          @(negedge clk);
          en = 1;
          for (int j = 0; j < NP; j++) begin
            x[j] = IN_W'(sine_ref(AMPS[c], g * NP + j));
            d[j] = DITHER_W'(ds[g * NP + j]);
          end
          @(posedge clk); #1;
          for (int j = 0; j < NP; j++) begin
            ys[g * NP + j] = y[j];
            xn = sine_ref(AMPS[c], g * NP + j);
            ey = m.step(xn, ds[g * NP + j], DITH[c]);
            if (ey != y[j]) mism++;
          end
        end
        en = 0;
        check(mism == 0, $sformatf("set %0d cond %0d: %0d bits differ from the reference", f, c, mism));
        kc  = NS / 5;                 // bin of 0.2
        sig = bin_pow(ys, kc);
        for (int o = 0; o < 3; o++) begin
          half  = NS / (4 * (64 << o));   // half band width in bins
          noise = 0.0;
          for (int k = kc - half; k <= kc + half; k++)
            if (k != kc) noise += bin_pow(ys, k);
          snr[o] = 10.0 * $log10(sig / noise);
        end
        snr64[c] = snr[0];
        $display("set %0d (%s) amp %5.1f dBFS dither %0d: SNR %5.1f dB @OSR64  %5.1f dB @OSR128  %5.1f dB @OSR256",
                 f, filter_e'(f) == BUTTERWORTH ? "Butterworth" : filter_e'(f) == CHEBYSHEV ? "Chebyshev" :
                 filter_e'(f) == INV_CHEBYSHEV ? "inverse Chebyshev" : "elliptical",
                 20.0 * $log10(real'(AMPS[c]) / 32768.0), DITH[c], snr[0], snr[1], snr[2]);
        if (c >= NCOND - 2) begin
          check(snr[0] > 40.0, $sformatf("set %0d cond %0d SNR at OSR 64 %f", f, c, snr[0]));
          check(snr[1] >= snr[0] && snr[2] >= snr[1], "SNR grows with OSR");
          check(snr[2] >= snr[0] + 6.0, "SNR at OSR 256 at least 6 dB above OSR 64");
        end
      end
      check(snr64[4] >= snr64[0] + 25.0, $sformatf("set %0d SNR rises with amplitude: %f -> %f", f, snr64[0], snr64[4]));
      done_count++;
    end
  end

  initial begin
    lfsr_ref l;
    l = new(16'hACE1);
    for (int n = 0; n < NS; n++) begin
      cos_t[n] = $cos(2.0 * 3.14159265358979 * real'(n) / real'(NS));
      sin_t[n] = $sin(2.0 * 3.14159265358979 * real'(n) / real'(NS));
      ds[n] = l.dither();
      l.advance();
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done_count == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
