// branch_predictor: two-bit saturating-counter branch prediction.
//
// A table of ENTRIES two-bit counters indexed by the low bits of the branch's word
// address. The IF stage looks up the counter of a fetched branch combinationally
// (lookup_pc -> predict_taken: taken when the counter is 2 or 3). When the branch is
// resolved in EX, an update on a clock edge with step_en high moves its counter one step
// towards the actual outcome, saturating at 0 and 3. The two-bit scheme comes from the
// processor description; the table organisation, its size and the reset value (1, weakly
// not taken) are this design's choices.
module branch_predictor #(
  parameter int unsigned W       = 32,
  parameter int unsigned ENTRIES = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_en,
  input  logic [W-1:0] lookup_pc,
  output logic         predict_taken,
  input  logic         update,
  input  logic [W-1:0] update_pc,
  input  logic         taken
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [1:0] counters [ENTRIES];
  logic [IDX_W-1:0] lidx, uidx;

  assign lidx          = IDX_W'(lookup_pc % ENTRIES);
  assign uidx          = IDX_W'(update_pc % ENTRIES);
  assign predict_taken = counters[lidx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) counters[i] <= 2'd1;
    end else if (step_en && update) begin
      if (taken && counters[uidx] != 2'd3)       counters[uidx] <= counters[uidx] + 2'd1;
      else if (!taken && counters[uidx] != 2'd0) counters[uidx] <= counters[uidx] - 2'd1;
    end
  end

endmodule
