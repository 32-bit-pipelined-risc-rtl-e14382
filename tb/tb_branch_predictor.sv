// tb_branch_predictor: random branch outcomes at random addresses; a model keeps one
// two-bit saturating counter per table entry (reset to weakly not taken) and the
// prediction for a random lookup address must match it after every update.
module tb_branch_predictor;
  logic clk = 0, rst_n = 0, step_en = 0, update = 0, taken = 0, predict_taken;
  logic [31:0] lookup_pc = 0, update_pc = 0;
  int model [16];
  int checks = 0, failures = 0;

  branch_predictor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      update = ($urandom % 3) != 0; step_en = ($urandom % 5) != 0;
      update_pc = $urandom % 40;
      taken = (update_pc % 3 == 0) ? ($urandom % 8 != 0) : ($urandom % 2);
      if (update && step_en) begin
        if (taken && model[update_pc % 16] < 3) model[update_pc % 16]++;
        if (!taken && model[update_pc % 16] > 0) model[update_pc % 16]--;
      end
      @(negedge clk);
      update = 0;
      lookup_pc = $urandom % 40;
      #1;
      checks++;
      if (predict_taken !== (model[lookup_pc % 16] >= 2)) begin
        failures++;
        if (failures < 10) $display("pc %0d: predict %b, counter %0d", lookup_pc, predict_taken,
                                    model[lookup_pc % 16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
