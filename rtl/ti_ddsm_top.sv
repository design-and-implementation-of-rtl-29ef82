// ti_ddsm_top: complete time-interleaved, variable centre-frequency digital
// sigma-delta modulator test system, as run on an FPGA at a 66 MHz sample
// clock.
//
//   sine_lut ─┐                                   ┌─> ds_out (1 bit/clock)
//             ├─> path_downsampler ─> ti_ef_modulator ─> path_upsampler ─┤
//   fib_lfsr ─┘     (N words/path clock)   (N paths)                      └─> bit_capture ─> uart_tx ─> uart_txd
//
// The LUT supplies a 16-bit sinusoid at normalised frequency 0.2 and the
// LFSR a 14-bit dither word, one of each per clock. The downsampler groups N
// consecutive pairs and issues the path-rate enable; the N-path modulator
// turns them into N output bits per path clock; the upsampler restores the
// full-rate single-bit stream on ds_out. A capture_start pulse records
// CAPTURE_BITS consecutive output bits and sends them, packed LSB-first into
// bytes, over the RS232 line uart_txd. reset_sync turns the asynchronous
// active-low arst_n into the synchronous reset of everything else.
//
// Timing: one input sample and one output bit per clock. Every sample
// leaves ds_out N + 2 clocks after it was on the LUT output register
// (N - j clocks in the downsampler for sample Nm+j, one in the modulator
// register, then j + 1 in the upsampler).
//
// Parameters: NPATHS (1, 2 or 4 in the published design; default 4),
// FILTER (Butterworth, Chebyshev, inverse Chebyshev or elliptical NTF),
// AMP (sinusoid amplitude, 2^-15 units), CAPTURE_BITS, CLKS_PER_BIT (baud
// divider), LFSR_SEED. The chain of blocks follows the published design;
// the capture buffer, the serial settings and the defaults of AMP,
// CAPTURE_BITS and the seed are this design's choice.
module ti_ddsm_top
  import ddsm_pkg::*;
#(
  parameter int          NPATHS       = 4,
  parameter filter_e     FILTER       = INV_CHEBYSHEV,
  parameter int          AMP          = 16384,
  parameter int          CAPTURE_BITS = 65536,
  parameter int          CLKS_PER_BIT = 573,
  parameter logic [15:0] LFSR_SEED    = 16'hACE1
) (
  input  logic clk,            // 66 MHz sample clock
  input  logic arst_n,         // asynchronous reset request, active low
  input  logic dither_en,      // add LFSR dither at the quantiser input
  input  logic capture_start,  // start recording the output stream
  output logic ds_out,         // modulator output bit stream (1 = +1)
  output logic ds_valid,       // ds_out carries modulator output
  output logic uart_txd,       // RS232 transmit data (logic level)
  output logic capture_busy,   // a record is being captured or sent
  output logic capture_done    // one-clock pulse after the last byte
);

  localparam int W = IN_W + DITHER_W;

  logic rst;
  logic src_en;
  logic signed [IN_W-1:0]     x;
  logic signed [DITHER_W-1:0] d;
  logic [15:0]                lfsr_state;
  logic                       pair_valid;
  logic [W-1:0]               par [NPATHS];
  logic                       par_valid;
  logic signed [IN_W-1:0]     x_par [NPATHS];
  logic signed [DITHER_W-1:0] d_par [NPATHS];
  logic [NPATHS-1:0]          y;
  logic                       y_valid;
  logic [7:0]                 tx_data;
  logic                       tx_valid, tx_ready;
  logic                       capturing, sending;

  reset_sync u_reset (
    .clk    (clk),
    .arst_n (arst_n),
    .rst    (rst)
  );

  // the sources run on every clock once out of reset
  always_ff @(posedge clk) begin
    if (rst) begin
      src_en     <= 1'b0;
      pair_valid <= 1'b0;
    end else begin
      src_en     <= 1'b1;
      pair_valid <= src_en;   // the LUT output is registered
    end
  end

  sine_lut #(.AMP(AMP)) u_lut (
    .clk (clk),
    .rst (rst),
    .en  (src_en),
    .x   (x)
  );

  // the LFSR state is read together with the LUT word it is paired with
  fib_lfsr #(.SEED(LFSR_SEED)) u_lfsr (
    .clk    (clk),
    .rst    (rst),
    .en     (pair_valid),
    .dither (d),
    .state  (lfsr_state)
  );

  path_downsampler #(.NPATHS(NPATHS), .W(W)) u_down (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (pair_valid),
    .in_word   ({x, d}),
    .par       (par),
    .par_valid (par_valid)
  );

  for (genvar j = 0; j < NPATHS; j++) begin : g_split
    assign x_par[j] = signed'(par[j][W-1:DITHER_W]);
    assign d_par[j] = signed'(par[j][DITHER_W-1:0]);
  end

  ti_ef_modulator #(.NPATHS(NPATHS), .FILTER(FILTER)) u_mod (
    .clk       (clk),
    .rst       (rst),
    .en        (par_valid),
    .dither_en (dither_en),
    .x         (x_par),
    .dither    (d_par),
    .y         (y),
    .y_valid   (y_valid)
  );

  path_upsampler #(.NPATHS(NPATHS)) u_up (
    .clk       (clk),
    .rst       (rst),
    .load      (y_valid),
    .bits_in   (y),
    .bit_out   (ds_out),
    .bit_valid (ds_valid)
  );

  bit_capture #(.CAPTURE_BITS(CAPTURE_BITS)) u_capture (
    .clk       (clk),
    .rst       (rst),
    .start     (capture_start),
    .bit_in    (ds_out),
    .bit_valid (ds_valid),
    .tx_data   (tx_data),
    .tx_valid  (tx_valid),
    .tx_ready  (tx_ready),
    .capturing (capturing),
    .sending   (sending),
    .done      (capture_done)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk      (clk),
    .rst      (rst),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready),
    .txd      (uart_txd)
  );

  assign capture_busy = capturing || sending;

  // lfsr_state is only observed in simulation
  logic unused_ok;
  assign unused_ok = ^lfsr_state;

endmodule
