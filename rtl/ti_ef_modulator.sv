// ti_ef_modulator: N-path time-interleaved error-feedback sigma-delta
// modulator (N = NPATHS; N = 1 is the single-path prototype).
//
// The time-interleaved form is built with the node-equation method: the
// modulator's time-domain node equations are written for N consecutive
// samples n = Nm, Nm+1, ..., Nm+N-1 and evaluated side by side. Path j
// computes sample Nm+j; every z^-1 of the single-path loop filter becomes a
// connection from path j-1 to path j in the same cycle, and from path N-1 to
// path 0 through the four shared delay registers, which are clocked once per
// N input samples. Each path therefore needs its own 8 multipliers (8*N in
// all) while the registers run at 1/N of the sample rate. The output bit
// stream is identical, sample for sample, to that of the single-path
// modulator with the same arithmetic.
//
// Timing: when en is high, x[j]/dither[j] hold samples Nm+j; one clock later
// y[j] holds their output bits and y_valid pulses for one cycle. en comes
// from the path-rate divider (every N clocks of the sample clock).
//
// The method and the path counts 1, 2 and 4 follow the published design;
// a single clock with an enable in place of a separate path clock is this
// design's choice. rst clears the delay registers and outputs. Each path's
// v and s nodes are brought to local signals only for observation in
// simulation; lint reports them as unused, and synthesis removes them.
module ti_ef_modulator
  import ddsm_pkg::*;
#(
  parameter int      NPATHS = 4,
  parameter filter_e FILTER = INV_CHEBYSHEV,
  parameter int      DATA_W = ddsm_pkg::LOOP_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic                       dither_en,
  input  logic signed [IN_W-1:0]     x      [NPATHS],
  input  logic signed [DITHER_W-1:0] dither [NPATHS],
  output logic        [NPATHS-1:0]   y,
  output logic                       y_valid
);

  localparam coef_set_t COEF = coef_of(FILTER);

  logic signed [DATA_W-1:0] state_q    [ORDER];  // shared delay registers
  logic signed [DATA_W-1:0] state_next [ORDER];  // delayers after the last path
  logic        [NPATHS-1:0] y_d;

  for (genvar j = 0; j < NPATHS; j++) begin : g_path
    logic signed [DATA_W-1:0] st_in  [ORDER];   // delayers before sample Nm+j
    logic signed [DATA_W-1:0] st_out [ORDER];   // delayers after sample Nm+j
    logic signed [DATA_W-1:0] v_j, s_j;         // internal nodes, observation only

    if (j == 0) begin : g_first
      assign st_in = state_q;
    end else begin : g_next
      assign st_in = g_path[j-1].st_out;
    end

    ef_path #(.DATA_W(DATA_W)) u_path (
      .coef      (COEF),
      .x         (x[j]),
      .dither    (dither[j]),
      .dither_en (dither_en),
      .state_q   (st_in),
      .y         (y_d[j]),
      .v         (v_j),
      .s         (s_j),
      .state_d   (st_out)
    );
  end

  assign state_next = g_path[NPATHS-1].st_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= '{default: '0};
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        state_q <= state_next;
        y       <= y_d;
      end
    end
  end

endmodule
