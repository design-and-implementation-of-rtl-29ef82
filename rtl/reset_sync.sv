// reset_sync: reset circuitry of the design. An active-low asynchronous
// reset request (push button or power-on) asserts rst at once; its release
// is passed through STAGES flip-flops so that rst falls synchronously to clk.
// rst is active high. Named in the published design; the form is this
// design's choice.
module reset_sync #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst
);

  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sync <= '1;
    else         sync <= {sync[STAGES-2:0], 1'b0};
  end

  assign rst = sync[STAGES-1];

endmodule
