// pc_queue: the two-register queue that backs up the program counter for branches.
//
// When IF fetches a branch it follows the predicted path and pushes the address of the
// other path (the fall-through address when predicting taken, the target when predicting
// not taken). When the oldest branch reaches EX it is resolved and its entry popped; on a
// misprediction the core loads the popped value (head) into the PC and flushes the queue,
// since every younger branch was on the wrong path. All changes take effect on a clock
// edge with step_en high. A pop and a push in the same step are allowed, which is what
// lets two registers cover the at most three branches between IF and EX. The two-register
// queue and its use follow the processor description; the flush on misprediction is this
// design's choice.
module pc_queue #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step_en,
  input  logic         push,
  input  logic [W-1:0] push_pc,
  input  logic         pop,
  input  logic         flush,
  output logic [W-1:0] head,
  output logic         empty
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [W-1:0]     q [DEPTH];
  logic [CNT_W-1:0] count;
  logic [CNT_W-1:0] after_pop;

  assign head      = q[0];
  assign empty     = (count == '0);
  assign after_pop = (pop && !empty) ? count - 1'b1 : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (step_en) begin
      if (flush) begin
        count <= '0;
      end else begin
        if (pop && !empty) begin
          for (int i = 0; i < DEPTH - 1; i++) q[i] <= q[i+1];
        end
        if (push) q[after_pop[$clog2(DEPTH)-1:0]] <= push_pc;
        count <= after_pop + CNT_W'(push);
      end
    end
  end

  // The pipeline never holds more unresolved branches than the queue has registers.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (step_en && push && !flush) |-> (after_pop < CNT_W'(DEPTH)))
    else $error("pc_queue overflow");

endmodule
