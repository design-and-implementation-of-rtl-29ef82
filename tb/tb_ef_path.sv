// tb_ef_path: checks one error-feedback modulator sample against the integer
// reference for random inputs, dither and states, for all four coefficient
// sets, with and without dither. Also checks the EF identities directly:
// v = x - r, y = sign(v + dither), s = y - v.
module tb_ef_path;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  int checks = 0, failures = 0;

  coef_set_t                  coef;
  logic signed [IN_W-1:0]     x;
  logic signed [DITHER_W-1:0] dither;
  logic                       dither_en;
  logic signed [17:0]         state_q [ORDER];
  logic signed [17:0]         state_d [ORDER];
  logic signed [17:0]         v, s;
  logic                       y;

  ef_path dut (.coef(coef), .x(x), .dither(dither), .dither_en(dither_en),
               .state_q(state_q), .y(y), .v(v), .s(s), .state_d(state_d));

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
    ef_ref  m;
    bit     ey;
    longint q;
    for (int f = 0; f < 4; f++) begin
      coef = coef_of(filter_e'(f));
      m = new(f);
      for (int t = 0; t < 1000; t++) begin
        // states within +-2 (the operating range), sometimes near zero
        foreach (state_q[i]) begin
          state_q[i] = 18'(signed'($urandom_range(0, 131072)) - 65536);
          m.a[i]     = longint'(state_q[i]);
        end
        x         = IN_W'($urandom);
        dither    = DITHER_W'($urandom);
        dither_en = 1'($urandom);
        if (t % 7 == 0) begin   // force the quantiser input close to zero
          state_q[0] = 18'(x);
          m.a[0]     = longint'(state_q[0]);
        end
        #1;
        ey = m.step(int'(x), int'(dither), dither_en);
        check(y == ey, $sformatf("f%0d y got %0b exp %0b", f, y, ey));
        check(longint'(v) == m.last_v && longint'(v) == longint'(x) - longint'(state_q[0]),
              $sformatf("f%0d v", f));
        q = longint'(v) + (dither_en ? longint'(dither) : 0);
        check(y == (q >= 0), "quantiser sign");
        check(longint'(s) == (y ? 32768 : -32768) - longint'(v), "s = y - v");
        for (int i = 0; i < 4; i++)
          check(longint'(state_d[i]) == m.a[i],
                $sformatf("f%0d state %0d got %0d exp %0d", f, i, state_d[i], m.a[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
