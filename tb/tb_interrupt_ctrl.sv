// tb_interrupt_ctrl: checks when an interrupt is accepted (request bit 31, mask low,
// a fetch this step, no control-flow instruction fetched or in ID, controller idle), the
// sign-extended interrupt address, the acknowledge pulse, the four-step drain, the
// writes of the backed-up PC to register 80h and of the CCR to register C0h in the two
// following steps, the mask request in the second, and the return to idle.
module tb_interrupt_ctrl;
  import risc_pkg::*;

  logic clk = 0, rst_n = 0, step_en = 0;
  logic [31:0] int_vector = 0, pc_next_seq = 0, int_addr, rf_wdata, backup1_pc;
  logic [6:0] ccr = 0;
  logic fetch = 0, int_ack, int_take, int_busy, int_enter, rf_we;
  logic [5:0] fetched_op = 0, id_op = 0;
  logic [7:0] rf_waddr;
  int checks = 0, failures = 0;
  int acks = 0;

  interrupt_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && int_ack) acks++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  // one pipeline step of three clocks, step_en in the last
  task automatic step();
    @(negedge clk); @(negedge clk); step_en = 1;
    @(negedge clk); step_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // no request
    fetch = 1; fetched_op = OP_ADD; #1;
    chk(int_take, 0, "no request");
    int_vector = {1'b1, 31'h4000_0010};
    ccr[CC_IM] = 1; #1;
    chk(int_take, 0, "masked");
    ccr[CC_IM] = 0; fetch = 0; #1;
    chk(int_take, 0, "stalled");
    fetch = 1; fetched_op = OP_BR; #1;
    chk(int_take, 0, "branch fetched");
    fetched_op = OP_ADD; id_op = OP_BR; #1;
    chk(int_take, 0, "branch in ID");
    id_op = OP_NOP; #1;
    chk(int_take, 1, "accepted");
    chk(int_addr, 32'hC000_0010, "sign-extended address");
    pc_next_seq = 32'd1234; ccr = 7'h2B;
    step();
    chk(int_ack, 1, "ack pulse");
    chk(backup1_pc, 1234, "backup1_pc");
    for (int s = 0; s < 4; s++) begin
      chk(int_busy, 1, "busy while draining"); chk(rf_we, 0, "no write while draining");
      chk(int_take, 0, "no second acceptance");
      step();
    end
    chk(rf_we, 1, "save PC"); chk(rf_waddr, 8'h80, "PC address"); chk(rf_wdata, 1234, "PC data");
    chk(int_enter, 0, "mask later");
    step();
    chk(rf_we, 1, "save CCR"); chk(rf_waddr, 8'hC0, "CCR address"); chk(rf_wdata, 32'h2B, "CCR data");
    chk(int_enter, 1, "mask on entry");
    step();
    chk(int_busy, 0, "idle again"); chk(rf_we, 0, "no write when idle");
    chk(acks, 1, "single ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
