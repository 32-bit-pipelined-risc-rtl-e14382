// stage_buffer: one inter-stage buffer of the pipeline.
//
// A register of any packed type T. On a clock edge with step_en high it loads d, or
// clears to all zeros when flush is high, which is a NOP (the all-zero instruction, no
// register write) in every buffer of this core. With hold high it keeps its contents
// (used to freeze the IF buffer during a load-use interlock). The four buffers between
// IF, ID, EX, MEM and WR, each holding a stage's results together with its instruction,
// follow the processor description; flush-to-NOP and hold are this design's mechanism.
module stage_buffer #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step_en,
  input  logic flush,
  input  logic hold,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= '0;
    else if (step_en && flush) q <= '0;
    else if (step_en && !hold) q <= d;
  end

endmodule
