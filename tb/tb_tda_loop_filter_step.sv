// tb_tda_loop_filter_step: checks one loop-filter step against the integer
// reference for random states and inputs, for all four coefficient sets, and
// checks the impulse response of the filter, run with registers held here,
// against a floating-point evaluation of
// H(z) = sum Kk z^-k / (1 + sum Lk z^-k) (tolerance for truncation error).
module tb_tda_loop_filter_step;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  int checks = 0, failures = 0;

  coef_set_t          coef;
  logic signed [17:0] state_q [ORDER];
  logic signed [17:0] state_d [ORDER];
  logic signed [17:0] s_in, r_out;

  tda_loop_filter_step dut (.coef(coef), .state_q(state_q), .s_in(s_in),
                            .r_out(r_out), .state_d(state_d));

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

  initial begin
    longint exp_d;
    real    kf [4], lf [4], xs [0:63], ys [0:63], acc;
    for (int f = 0; f < 4; f++) begin
      coef = coef_of(filter_e'(f));
      // random single steps
      for (int t = 0; t < 500; t++) begin
        foreach (state_q[i]) state_q[i] = 18'($urandom_range(0, 32'h3FFFF));
        s_in = 18'($urandom_range(0, 32'h3FFFF));
        #1;
        check(r_out == state_q[0], "r_out is the last delayer");
        for (int i = 0; i < 4; i++) begin
          exp_d = wrap18(((i < 3) ? longint'(state_q[(i+1)%4]) : 0)
                         + wrap18(mul_q15(longint'(KTAB[f][i]), longint'(s_in)))
                         - wrap18(mul_q15(longint'(LTAB[f][i]), longint'(state_q[0]))));
          check(longint'(state_d[i]) == exp_d,
                $sformatf("filter %0d state %0d: got %0d exp %0d", f, i, state_d[i], exp_d));
        end
      end
      // impulse response, input 0.25 at n = 0
      foreach (state_q[i]) state_q[i] = '0;
      for (int i = 0; i < 4; i++) begin
        kf[i] = real'(KTAB[f][i]) / 32768.0;
        lf[i] = real'(LTAB[f][i]) / 32768.0;
      end
      for (int n = 0; n < 64; n++) xs[n] = (n == 0) ? 0.25 : 0.0;
      for (int n = 0; n < 64; n++) begin
        acc = 0.0;
        for (int k = 1; k <= 4; k++)
          if (n - k >= 0) acc += kf[k-1] * xs[n-k] - lf[k-1] * ys[n-k];
        ys[n] = acc;
      end
      for (int n = 0; n < 64; n++) begin
        s_in = (n == 0) ? 18'sd8192 : 18'sd0;
        #1;
        check((real'(r_out) / 32768.0 - ys[n]) < 0.003 && (ys[n] - real'(r_out) / 32768.0) < 0.003,
              $sformatf("filter %0d impulse n=%0d got %f exp %f", f, n, real'(r_out)/32768.0, ys[n]));
        state_q = state_d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
