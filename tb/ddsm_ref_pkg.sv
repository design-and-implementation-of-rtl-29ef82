// ddsm_ref_pkg: reference models used by the testbenches, written in plain
// integer arithmetic independently of the RTL.
//
//  * coefficient table of the four band-stop noise transfer functions
//    (integers = coefficient * 2^15)
//  * ef_ref: sample-by-sample model of the single-path 4th-order
//    error-feedback modulator with 18-bit (s.2.15) wrap-around words and
//    products truncated to 15 fractional bits
//  * lfsr_ref: the 16-bit Fibonacci dither generator
//  * sine_ref: the LUT sinusoid at normalised frequency 0.2
package ddsm_ref_pkg;

  // rows: Butterworth, Chebyshev, inverse Chebyshev, elliptical
  localparam int KTAB [4][4] = '{'{1799, -6878,  5103,  -5335},
                                 '{1329, -5072,  3713,  -3850},
                                 '{7613, -28672, 18513, -17634},
                                 '{1329, -5072,  3713,  -3850}};
  localparam int LTAB [4][4] = '{'{-38785, 71223, -35481, 27433},
                                 '{-39255, 73030, -36870, 28918},
                                 '{-32890, 49370, -21991, 15134},
                                 '{-39255, 73030, -36871, 28918}};

  function automatic longint wrap18(longint v);
    longint m;
    m = v & 64'h3FFFF;
    if (m >= 64'h20000) m = m - 64'h40000;
    return m;
  endfunction

  function automatic longint mul_q15(longint c, longint d);
    longint p;
    p = c * d;
    // floor division by 2^15
    if (p >= 0) return p / 32768;
    return -((-p + 32767) / 32768);
  endfunction

  class ef_ref;
    int     filt;
    longint a [4];
    longint last_v, last_s;

    function new(int f);
      filt = f;
      foreach (a[i]) a[i] = 0;
    endfunction

    // one sample; returns the output bit (1 = +1)
    function bit step(int x, int d, bit den);
      longint r, v, q, s, nxt;
      longint na [4];
      bit     y;
      r = a[0];
      v = wrap18(longint'(x) - r);
      q = v + (den ? longint'(d) : 0);
      y = (q >= 0);
      s = wrap18((y ? 32768 : -32768) - v);
      for (int i = 0; i < 4; i++) begin
        nxt   = (i < 3) ? a[i+1] : 0;
        na[i] = wrap18(nxt + wrap18(mul_q15(longint'(KTAB[filt][i]), s)) - wrap18(mul_q15(longint'(LTAB[filt][i]), r)));
      end
      a      = na;
      last_v = v;
      last_s = s;
      return y;
    endfunction
  endclass

  class lfsr_ref;
    bit [15:0] st;
    function new(bit [15:0] seed);
      st = seed;
    endfunction
    function int dither();
      int d;
      d = int'(st[13:0]);
      if (d >= 8192) d -= 16384;
      return d;
    endfunction
    function void advance();
      st = {st[14:0], st[15] ^ st[13] ^ st[12] ^ st[10]};
    endfunction
  endclass

  // LUT word n: floor(amp * round(2^15 cos(2 pi 0.2 n)) / 2^15)
  function automatic int sine_ref(int amp, int n);
    real    c;
    longint ci;
    c  = $cos(2.0 * 3.14159265358979 * 0.2 * real'(n % 5));
    ci = longint'($floor(c * 32768.0 + 0.5));
    return int'(mul_q15(longint'(amp), ci));
  endfunction

endpackage
