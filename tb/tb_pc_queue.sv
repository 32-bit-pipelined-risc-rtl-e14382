// tb_pc_queue: random push, pop and flush requests within the queue's capacity,
// compared with a SystemVerilog queue: head and empty must match after every step.
module tb_pc_queue;
  logic clk = 0, rst_n = 0, step_en = 0, push = 0, pop = 0, flush = 0, empty;
  logic [31:0] push_pc = 0, head;
  logic [31:0] model [$];
  int checks = 0, failures = 0;

  pc_queue dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      step_en = ($urandom % 4) != 0;
      pop = ($urandom % 2) && model.size() > 0;
      push = ($urandom % 2) && (model.size() - (pop ? 1 : 0)) < 2;
      flush = ($urandom % 16) == 0;
      push_pc = $urandom;
      if (step_en) begin
        if (flush) model.delete();
        else begin
          if (pop) void'(model.pop_front());
          if (push) model.push_back(push_pc);
        end
      end
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || (model.size() > 0 && head !== model[0])) begin
        failures++;
        if (failures < 10) $display("step %0d: head %h empty %b, model size %0d head %h", n,
                                    head, empty, model.size(), model.size() ? model[0] : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
