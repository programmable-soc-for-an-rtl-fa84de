// reset_sync: clean system reset from a raw external reset.
//
// The raw active-low reset asserts the output at once (asynchronously) and
// releases it only after STAGES rising clock edges with the raw reset
// inactive, so that every register in the system leaves reset in the same
// clock cycle. rst is active high.
// From the document: a clock-and-reset block that supplies a clean reset to
// all other modules. The synchroniser and its depth are this design's
// choice.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic reset_n_in,
  output logic rst
);

  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge reset_n_in) begin
    if (!reset_n_in) sync <= '1;
    else             sync <= {sync[STAGES-2:0], 1'b0};
  end

  assign rst = sync[STAGES-1];

endmodule
