// sync_ff: multi-flop synchronizer for a signal entering the clk domain.
//
// The first flop may go metastable when d changes close to a clk edge; the following flops
// give it a full clock period to settle before anything uses it, which is how the bridge
// keeps metastability from spreading (its MTBF = 1 / (fclk * fdata * X) grows steeply with
// the settling time). A bus must only be passed through here if at most one bit changes at
// a time, as with the FIFO's Gray pointers. The number of stages (two) is this design's
// choice. Interface: d is sampled on the rising clk edge; q follows d after STAGES edges.
// rst_n is asynchronous, active low, and clears all stages.
module sync_ff #(
  parameter int unsigned W      = 5,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];

  initial assert (STAGES >= 2) else $error("sync_ff needs at least two stages");

endmodule
