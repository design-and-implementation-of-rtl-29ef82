// path_downsampler: serial-to-parallel converter at the input of the
// time-interleaved modulator (the downsampler of each path).
//
// A full-rate word arrives on every clock with in_valid high. A phase counter
// 0..NPATHS-1 steers word Nm+j into slot j; when the last slot is filled the
// NPATHS words appear together on par (par[j] = word Nm+j) and par_valid
// pulses for one clock. par_valid is thus the path-rate enable: one pulse
// every NPATHS sample clocks, the 33 MHz (N = 2) or 16.5 MHz (N = 4) path
// clock of a 66 MHz design expressed as a clock enable.
//
// Latency: par_valid rises one clock after the last word of the group is
// presented. rst restarts the phase at slot 0. The block is named but not
// detailed in the published design; this is the simplest form.
module path_downsampler #(
  parameter int NPATHS = 4,
  parameter int W      = 30
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_word,
  output logic [W-1:0] par [NPATHS],
  output logic         par_valid
);

  localparam int PW = (NPATHS > 1) ? $clog2(NPATHS) : 1;

  logic [PW-1:0] phase;
  logic [W-1:0]  slot [NPATHS];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      par_valid <= 1'b0;
      slot      <= '{default: '0};
      par       <= '{default: '0};
    end else begin
      par_valid <= 1'b0;
      if (in_valid) begin
        slot[phase] <= in_word;
        if (int'(phase) == NPATHS-1) begin
          phase     <= '0;
          par_valid <= 1'b1;
          for (int j = 0; j < NPATHS-1; j++) par[j] <= slot[j];
          par[NPATHS-1] <= in_word;
        end else begin
          phase <= phase + PW'(1);
        end
      end
    end
  end

endmodule
