// tda_loop_filter_step: one time step of the 4th-order loop filter H(z) of
// the error-feedback modulator, in the time-delay-and-accumulate (TDA) form:
// a chain of four adders, each followed by a one-sample delayer, with the
// filter input scaled by Kk and the filter output scaled by Lk entering the
// adder that lies k delays before the output:
//
//   r[n]        = a1[n-1]                      (filter output)
//   ak[n]       = a(k+1)[n-1] + Kk*s[n] - Lk*r[n],   a5 = 0
//
// so that H(z) = sum Kk z^-k / (1 + sum Lk z^-k). Only the adders and
// multipliers are here; the delay registers belong to the caller, which is
// what lets the time-interleaved modulator chain several steps per clock.
// Purely combinational.
//
// Each product is a COEF_W x DATA_W multiply reduced to FRAC_W fractional bits
// by an arithmetic right shift (truncation toward minus infinity); sums wrap
// at DATA_W bits. The structure and the coefficients follow the published
// design; the truncation rule and the wrap-around are this design's choice.
//
// Ports: coef (K and L set), state_q[i] = a(i+1)[n-1], s_in = s[n];
// r_out = r[n], state_d[i] = a(i+1)[n].
module tda_loop_filter_step
  import ddsm_pkg::*;
#(
  parameter int DATA_W = ddsm_pkg::LOOP_W
) (
  input  coef_set_t                 coef,
  input  logic signed [DATA_W-1:0]  state_q [ORDER],
  input  logic signed [DATA_W-1:0]  s_in,
  output logic signed [DATA_W-1:0]  r_out,
  output logic signed [DATA_W-1:0]  state_d [ORDER]
);

  localparam int PROD_W = COEF_W + DATA_W;

  logic signed [PROD_W-1:0] k_prod [ORDER];
  logic signed [PROD_W-1:0] l_prod [ORDER];
  logic signed [DATA_W+1:0] node   [ORDER];

  assign r_out = state_q[0];

  always_comb begin
    for (int i = 0; i < ORDER; i++) begin
      k_prod[i] = (PROD_W'(signed'(coef.k[i])) * PROD_W'(s_in)) >>> FRAC_W;
      l_prod[i] = (PROD_W'(signed'(coef.l[i])) * PROD_W'(state_q[0])) >>> FRAC_W;
      node[i]   = (DATA_W+2)'(signed'(k_prod[i][DATA_W-1:0]))
                - (DATA_W+2)'(signed'(l_prod[i][DATA_W-1:0]));
      if (i < ORDER-1)
        node[i] = node[i] + (DATA_W+2)'(state_q[(i+1) % ORDER]);
      state_d[i] = node[i][DATA_W-1:0];
    end
  end

endmodule
