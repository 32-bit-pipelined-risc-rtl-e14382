// tb_stage_buffer: an inter-stage buffer of a packed struct type; random load, flush
// (to all zeros) and hold requests with and without step_en, checked against a model.
module tb_stage_buffer;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, step_en = 0, flush = 0, hold = 0;
  if_buf_t d, q, model;
  int checks = 0, failures = 0;

  stage_buffer #(.T(if_buf_t)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; model = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      step_en = $urandom; flush = ($urandom % 4) == 0; hold = ($urandom % 4) == 0;
      d = {$urandom, $urandom, 2'($urandom)};
      if (step_en) begin
        if (flush) model = '0;
        else if (!hold) model = d;
      end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: q %h expected %h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
