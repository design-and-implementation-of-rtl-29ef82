// ef_path: one sample of the 4th-order error-feedback (EF) sigma-delta
// modulator, i.e. one path of the time-interleaved modulator.
//
//   v = x - r              (input minus loop-filter output)
//   y = +1 if v + dither >= 0, else -1     (single-bit quantiser)
//   s = y - v              (quantisation error, fed to the loop filter)
//
// With r = H(z) s this gives Y = X + (1 - H(z)) S: unity signal transfer and
// the band-stop noise transfer function NTF = 1 - H. The loop filter step
// (tda_loop_filter_step) is applied to s and returns the next delayer
// contents. Purely combinational: the caller owns the four delay registers.
//
// The EF structure follows the published block diagram. Where the dither
// enters is this design's choice: it is added at the quantiser input only,
// so it leaves v untouched and is itself shaped by the NTF.
//
// Ports: x (s.15 input sample), dither (DITHER_W-bit two's complement, in
// units of 2^-15), dither_en, coef, state_q/state_d (delayers before/after
// this sample), y (1 = +1, 0 = -1), v and s (internal nodes, for observation).
module ef_path
  import ddsm_pkg::*;
#(
  parameter int DATA_W = ddsm_pkg::LOOP_W
) (
  input  coef_set_t                  coef,
  input  logic signed [IN_W-1:0]     x,
  input  logic signed [DITHER_W-1:0] dither,
  input  logic                       dither_en,
  input  logic signed [DATA_W-1:0]   state_q [ORDER],
  output logic                       y,
  output logic signed [DATA_W-1:0]   v,
  output logic signed [DATA_W-1:0]   s,
  output logic signed [DATA_W-1:0]   state_d [ORDER]
);

  localparam logic signed [DATA_W-1:0] ONE = DATA_W'(1) <<< FRAC_W;

  logic signed [DATA_W-1:0] r;
  logic signed [DATA_W:0]   q_in;

  always_comb begin
    v    = DATA_W'(x) - r;
    q_in = (DATA_W+1)'(v) + (dither_en ? (DATA_W+1)'(dither) : '0);
    y    = ~q_in[DATA_W];
    s    = (y ? ONE : -ONE) - v;
  end

  tda_loop_filter_step #(.DATA_W(DATA_W)) u_filter (
    .coef    (coef),
    .state_q (state_q),
    .s_in    (s),
    .r_out   (r),
    .state_d (state_d)
  );

endmodule
