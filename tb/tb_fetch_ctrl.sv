// tb_fetch_ctrl: drives the IF control step by step (three clocks per step) with a
// program memory and hand-set conditions from the later stages, and checks the PC, the
// word passed to the IF buffer and the fetch request: sequential fetch, JMP, a branch
// predicted not taken then mispredicted (PC restored from the backup queue), predictor
// training to taken, each stall cause (LW/SW in MEM, JAL in flight, JR/RTS/RTI in ID,
// interrupt busy), the load-use hold and the jump to an interrupt address.
module tb_fetch_ctrl;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  logic clk = 0, rst_n = 0, ph2 = 0, step_en = 0;
  logic fetch, if_hold, stall_mem, stall_jal, stall_jr, pred_taken;
  logic [31:0] pc, mem_rdata, ir, pc_next_seq, id_target = 0, ex_branch_pc = 0, int_addr = 0;
  logic [5:0] id_op = 0, ex_op = 0, mem_op = 0;
  logic load_use = 0, ex_branch = 0, ex_taken = 0, mispredict = 0, int_busy = 0, int_take = 0;
  if_buf_t if_d;
  logic [31:0] prog [int];
  int checks = 0, failures = 0;
  logic s_fetch;
  if_buf_t s_if;

  fetch_ctrl dut (.*);
  always #5 clk = ~clk;
  assign mem_rdata = prog.exists(int'(pc)) ? prog[int'(pc)] : 32'd0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pipeline step: P1, P2 (ir loads), P3 (outputs sampled, registers update).
  task automatic step();
    @(negedge clk); ph2 = 1;
    @(negedge clk); ph2 = 0; step_en = 1;
    #1 s_fetch = fetch; s_if = if_d;
    @(negedge clk); step_en = 0;
    id_op = 0; ex_op = 0; mem_op = 0; load_use = 0; ex_branch = 0; ex_taken = 0;
    mispredict = 0; int_busy = 0; int_take = 0;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    prog[0] = r2(OP_ADD, 1, 2);
    prog[1] = jmp(10);
    prog[10] = br(CC_Z, 1, 20);
    prog[11] = r2(OP_SUB, 1, 2);
    prog[20] = r2(OP_OR, 3, 4);
    prog[21] = br(CC_Z, 1, 40);
    prog[40] = ldi(5, 1);
    repeat (2) @(negedge clk);
    rst_n = 1;

    step();                                   // fetch ADD at 0
    chk(s_fetch, 1, "fetch");
    chk(s_if.instr, prog[0], "IF word 0"); chk(s_if.pc, 0, "IF pc 0"); chk(pc, 1, "pc+1");
    step();                                   // JMP 10
    chk(pc, 10, "jump target");
    step();                                   // BR at 10, predicted not taken
    chk(s_if.pred_taken, 0, "weakly not taken"); chk(pc, 11, "fall through");
    step();                                   // SUB at 11 fetched on the predicted path
    chk(s_if.instr, prog[11], "wrong-path fetch");
    mispredict = 1; ex_branch = 1; ex_taken = 1; ex_branch_pc = 10;
    step();                                   // branch resolves taken in EX
    chk(s_fetch, 0, "no fetch on mispredict"); chk(s_if.instr, 0, "NOP on mispredict");
    chk(pc, 20, "PC from backup queue");
    step();                                   // OR at 20
    chk(pc, 21, "after recovery");
    // train the counter of address 21: two taken outcomes
    ex_branch = 1; ex_taken = 1; ex_branch_pc = 21;
    step();                                   // BR at 21 fetched, still predicted not taken
    chk(s_if.pred_taken, 0, "counter 1 -> not taken"); chk(pc, 22, "fall through 21");
    ex_branch = 1; ex_taken = 0; ex_branch_pc = 21;   // pops the entry of 21
    step();
    // reset the walk: use the interrupt path to return to 21
    int_take = 1; int_addr = 21;
    step();
    chk(pc, 21, "interrupt address loaded");
    ex_branch = 1; ex_taken = 1; ex_branch_pc = 21;
    step();                                   // fetch BR 21 (counter 2 after this update)
    chk(pc, 22, "not taken while counter 1");
    ex_branch = 1; ex_taken = 1; ex_branch_pc = 21;
    int_take = 1; int_addr = 21;
    step();
    ex_branch = 1; ex_taken = 1; ex_branch_pc = 21;
    step();                                   // BR 21 now predicted taken
    chk(s_if.pred_taken, 1, "trained to taken"); chk(pc, 40, "predicted target");
    // stalls
    mem_op = OP_LW; step();
    chk(s_fetch, 0, "LW stall"); chk(s_if.instr, 0, "LW NOP"); chk(pc, 40, "LW hold");
    ex_op = OP_JAL; step();
    chk(s_fetch, 0, "JAL stall"); chk(pc, 40, "JAL hold");
    int_busy = 1; step();
    chk(s_fetch, 0, "interrupt stall");
    load_use = 1; step();
    chk(s_fetch, 0, "load-use no fetch"); chk(pc, 40, "load-use hold");
    id_op = OP_JR; id_target = 32'd77; step();
    chk(s_fetch, 0, "JR stall"); chk(pc, 77, "JR target"); chk(s_if.restore_ccr, 0, "JR no reload");
    id_op = OP_RTI; id_target = 32'd40; step();
    chk(s_if.restore_ccr, 1, "RTI reload flag"); chk(pc, 40, "RTI target");
    step();
    chk(s_fetch, 1, "fetch resumes"); chk(s_if.instr, prog[40], "LDI fetched"); chk(pc, 41, "pc 41");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
