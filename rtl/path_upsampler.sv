// path_upsampler: parallel-to-serial converter at the output of the
// time-interleaved modulator (the upsamplers of the paths and the output
// combiner).
//
// When load is high the NPATHS output bits of one path-clock cycle are taken
// in; bit 0 (sample Nm) appears on bit_out in the next clock and bits 1..N-1
// follow on the next N-1 clocks, restoring the full-rate single-bit stream.
// load is expected every NPATHS clocks. bit_valid is high from the first load
// on. rst clears the register. Named but not detailed in the published
// design; this is the simplest form.
module path_upsampler #(
  parameter int NPATHS = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [NPATHS-1:0] bits_in,
  output logic              bit_out,
  output logic              bit_valid
);

  logic [NPATHS-1:0] shreg;

  assign bit_out = shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bit_valid <= 1'b0;
    end else if (load) begin
      shreg     <= bits_in;
      bit_valid <= 1'b1;
    end else begin
      shreg     <= shreg >> 1;
    end
  end

endmodule
