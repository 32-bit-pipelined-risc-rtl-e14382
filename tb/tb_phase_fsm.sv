// tb_phase_fsm: after reset no phase is active for one clock, then P1, P2, P3 repeat,
// exactly one at a time, so a pipeline step lasts three clocks; a reset in the middle
// restarts the sequence.
module tb_phase_fsm;
  logic clk = 0, rst_n = 0, ph1, ph2, ph3;
  int checks = 0, failures = 0;

  phase_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ph(logic [2:0] e);
    checks++;
    if ({ph3, ph2, ph1} !== e) begin
      failures++;
      $display("t=%0t phases %b%b%b expected %b", $time, ph3, ph2, ph1, e);
    end
  endtask

  initial begin
    for (int r = 0; r < 3; r++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      expect_ph(3'b000);
      rst_n = 1;                    // the next edge leaves the reset state for P1
      for (int n = 0; n < 30 + r; n++) begin
        @(negedge clk);
        expect_ph(3'b001 << (n % 3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
