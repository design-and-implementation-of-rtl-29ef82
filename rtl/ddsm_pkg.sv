// ddsm_pkg: types, word formats and loop-filter coefficients shared by the
// time-interleaved digital sigma-delta modulator.
//
// Number format: all modulator data are two's-complement fixed point with
// FRAC_W = 15 fractional bits ("sD.15": sign, D integer bits, 15 fraction
// bits). The input sinusoid is s.15 (16 bits). Internal loop signals use
// LOOP_W = 18 bits (s.2.15, range [-4, 4)), the width of an 18x18 multiplier
// operand; at an input amplitude of 0.5 the largest internal value in
// simulation is about 2.0 (about 2.2 at 0.75), so the loop does not wrap in
// normal operation.
//
// The four coefficient sets are the integer (x 2^15) values of the loop filter
// H(z) = (K1 z^-1 + K2 z^-2 + K3 z^-3 + K4 z^-4) / (1 + L1 z^-1 + ... + L4 z^-4)
// for a 4th-order band-stop noise transfer function NTF(z) = 1 - H(z)
// centred on the normalised frequency 0.2. The resulting NTF numerator
// 1 + (L1-K1) z^-1 + ... + (L4-K4) z^-4 is the palindromic double notch
// (1 - 2cos(0.4 pi) z^-1 + z^-2)^2, which is how the index-to-delay mapping
// (Kk and Lk act after k delays) is fixed. The elliptical set equals the
// Chebyshev one except for L3 (-36871 instead of -36870), as published.
package ddsm_pkg;

  localparam int FRAC_W   = 15;  // fractional bits of every fixed-point word
  localparam int IN_W     = 16;  // input sinusoid, s.15
  localparam int LOOP_W   = 18;  // loop signals, s.2.15
  localparam int COEF_W   = 18;  // coefficients, s.2.15
  localparam int DITHER_W = 14;  // dither word taken from the LFSR
  localparam int ORDER    = 4;   // modulator order

  typedef enum logic [1:0] {
    BUTTERWORTH   = 2'd0,
    CHEBYSHEV     = 2'd1,
    INV_CHEBYSHEV = 2'd2,
    ELLIPTICAL    = 2'd3
  } filter_e;

  typedef logic signed [COEF_W-1:0] coef_t;

  // k[i] is K(i+1), l[i] is L(i+1): both act after i+1 delays.
  typedef struct packed {
    coef_t [ORDER-1:0] k;
    coef_t [ORDER-1:0] l;
  } coef_set_t;

  function automatic coef_set_t make_set(coef_t k1, coef_t k2, coef_t k3, coef_t k4,
                                         coef_t l1, coef_t l2, coef_t l3, coef_t l4);
    coef_set_t c;
    c.k[0] = k1; c.k[1] = k2; c.k[2] = k3; c.k[3] = k4;
    c.l[0] = l1; c.l[1] = l2; c.l[2] = l3; c.l[3] = l4;
    return c;
  endfunction

  function automatic coef_set_t coef_of(filter_e f);
    case (f)
      BUTTERWORTH:   return make_set(1799, -6878,  5103,  -5335, -38785, 71223, -35481, 27433);
      CHEBYSHEV:     return make_set(1329, -5072,  3713,  -3850, -39255, 73030, -36870, 28918);
      INV_CHEBYSHEV: return make_set(7613, -28672, 18513, -17634, -32890, 49370, -21991, 15134);
      default:       return make_set(1329, -5072,  3713,  -3850, -39255, 73030, -36871, 28918);
    endcase
  endfunction

endpackage
