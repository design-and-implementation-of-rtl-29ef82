// sine_lut: look-up-table source of the test sinusoid
//   x[n] = AMP * cos(2*pi*0.2*n)      (s.15, 16 bits)
// at the normalised frequency 0.2 (26.4 MHz at a 66 MHz sample clock).
// At 0.2 the sequence repeats every 5 samples, so the table holds 5 words.
// Each word is AMP * C[p] / 2^15 rounded toward minus infinity, with
// C = round(2^15 * cos(2*pi*p/5)) = {32768, 10126, -26510, -26510, 10126}.
//
// One sample per clock while en is high; x is registered (one clock of
// latency from en). rst restarts the phase at 0 and clears x. The frequency
// and the 16-bit word follow the published set-up; the amplitude AMP
// (default 0.5 of full scale) is this design's choice.
module sine_lut
  import ddsm_pkg::*;
#(
  parameter int AMP = 16384   // peak amplitude in units of 2^-15, 0..32767
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  output logic signed [IN_W-1:0] x
);

  localparam int PERIOD = 5;
  localparam int C [PERIOD] = '{32768, 10126, -26510, -26510, 10126};

  function automatic logic signed [IN_W-1:0] entry(logic [2:0] p);
    longint prod;
    prod = longint'(AMP) * longint'(C[p]);
    return IN_W'(prod >>> FRAC_W);
  endfunction

  logic [2:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      x     <= '0;
    end else if (en) begin
      x     <= entry(phase);
      phase <= (phase == 3'(PERIOD-1)) ? '0 : phase + 3'd1;
    end
  end

endmodule
