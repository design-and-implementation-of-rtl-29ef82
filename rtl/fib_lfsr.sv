// fib_lfsr: 16-bit Fibonacci linear feedback shift register used as the
// dither source of the modulator.
//
// Each enabled clock the register shifts left by one; the new bit 0 is the
// XOR of bits 15, 13, 12 and 10 (polynomial x^16 + x^14 + x^13 + x^11 + 1,
// maximal length, period 65535). The dither word is the low 14 bits of the
// register read as a two's-complement number, i.e. a value in
// [-2^13, 2^13) units of 2^-15 (about +-0.25 of full scale); keeping 14 of
// the 16 bits lowers the injected noise power.
//
// A 16-bit Fibonacci LFSR with a 14-bit output follows the published design;
// the feedback taps, which 14 bits are used and the seed are this design's
// choice. rst loads SEED (must be non-zero); dither follows state with no
// extra register.
module fib_lfsr
  import ddsm_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  output logic signed [DITHER_W-1:0] dither,
  output logic [15:0]                state
);

  logic feedback;

  assign feedback = state[15] ^ state[13] ^ state[12] ^ state[10];
  assign dither   = signed'(state[DITHER_W-1:0]);

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= {state[14:0], feedback};
  end

  initial assert (SEED != 16'h0) else $error("fib_lfsr: SEED must be non-zero");

endmodule
