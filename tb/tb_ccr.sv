// tb_ccr: drives random update requests into the condition code register and compares
// it with a model written from the update rules (interrupt entry, RTI reload, SM, TCB,
// ALU flags, in that priority), checking that nothing changes without step_en.
module tb_ccr;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, step_en = 0;
  logic flags_latch = 0, set_mask = 0, mask_val = 0, test = 0, restore = 0, int_enter = 0;
  alu_flags_t flags = '0;
  logic [2:0] test_sel = 0;
  logic [6:0] restore_val = 0, ccr_q, model;
  int checks = 0, failures = 0;

  ccr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (ccr_q !== 0) failures++;
    for (int n = 0; n < 3000; n++) begin
      int sel;
      sel = $urandom % 6;
      flags_latch = sel == 0; set_mask = sel == 1; test = sel == 2; restore = sel == 3;
      int_enter = sel == 4;
      if ($urandom % 8 == 0) begin flags_latch = 1; test = 1; end   // priority case
      flags = 4'($urandom); mask_val = $urandom; test_sel = 3'($urandom);
      restore_val = 7'($urandom);
      step_en = ($urandom % 4) != 0;
      if (step_en) begin
        if (int_enter) model[6] = 1;
        else if (restore) model = restore_val;
        else if (set_mask) model[6] = mask_val;
        else if (test) model[5] = (test_sel == 7) ? 1'b0 : model[test_sel];
        else if (flags_latch) begin
          model[0] = flags.c; model[1] = flags.v; model[2] = flags.z; model[3] = flags.n;
          model[4] = flags.n ^ flags.v;
        end
      end
      @(negedge clk);
      checks++;
      if (ccr_q !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: ccr %b expected %b", n, ccr_q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
