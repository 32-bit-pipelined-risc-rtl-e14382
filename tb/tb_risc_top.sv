// tb_risc_top: end-to-end test of the pipelined processor at its default sizes.
//
// Three programs are loaded through the host port and run to completion (a store to
// word 200). After each, the 256 registers and the touched memory words are compared
// with a non-pipelined reference model of the instruction set (risc_asm_pkg::iss).
//   1. a directed program: forwarding from EX and MEM, a load-use interlock, LW/SW
//      structural stalls, TCB, correctly and wrongly predicted branches, JAL/RTS, JR,
//      SM, RTI with its CCR reload, all ALU operations;
//   2. bubble sort of 10 random words, checked against a sorted copy; the cycle count is
//      printed and must lie within bounds worked out from the pipeline timing;
//   3. a counting loop interrupted twice; the service routine counts interrupts and
//      returns with RTI; the loop result must be unaffected.
// Each pipeline mechanism is counted while the programs run; one that never happened
// counts as a failure.
module tb_risc_top;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  localparam int DONE = 200;

  logic        clk = 0;
  logic        rst_n = 0;
  logic [31:0] int_vector = '0;
  logic        int_ack;
  logic        host_we = 0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata;

  int checks = 0, failures = 0;
  longint cycles = 0;

  risc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #(2_000_000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_fwd_ex, n_fwd_mem, n_load_use, n_stall_mem, n_stall_jal, n_stall_jr;
  int n_pred_ok_taken, n_mispredict, n_rti_restore, n_int_take, n_sm, n_tcb, n_int_save;

  always @(posedge clk) if (rst_n && dut.u_cpu.ph3) begin
    if (dut.u_cpu.if_q.instr != 0 && (dut.u_cpu.fwd_dst_ex || dut.u_cpu.fwd_src_ex)
        && !dut.u_cpu.load_use) n_fwd_ex++;
    if (dut.u_cpu.if_q.instr != 0 && (dut.u_cpu.fwd_dst_mem || dut.u_cpu.fwd_src_mem))
      n_fwd_mem++;
    if (dut.u_cpu.load_use) n_load_use++;
    if (dut.u_cpu.stall_mem) n_stall_mem++;
    if (dut.u_cpu.stall_jal) n_stall_jal++;
    if (dut.u_cpu.stall_jr) n_stall_jr++;
    if (dut.u_cpu.ex_branch && dut.u_cpu.ex_taken && !dut.u_cpu.mispredict) n_pred_ok_taken++;
    if (dut.u_cpu.mispredict) n_mispredict++;
    if (dut.u_cpu.id_q.restore_ccr) n_rti_restore++;
    if (dut.u_cpu.int_take) n_int_take++;
    if (dut.u_cpu.int_enter) n_int_save++;
    if (dut.u_cpu.ex_op == OP_SM) n_sm++;
    if (dut.u_cpu.ex_op == OP_TCB) n_tcb++;
  end

  // ------------------------------------------------------------ helpers
  logic [31:0] prog [int];
  iss model;

  function automatic void put(int addr, logic [31:0] w);
    prog[addr] = w;
  endfunction

  task automatic load_and_reset();
    rst_n = 0;
    model = new();
    @(negedge clk);
    foreach (prog[a]) begin
      host_we = 1; host_addr = 16'(a); host_wdata = prog[a];
      model.mem[a] = prog[a];
      @(negedge clk);
    end
    host_we = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // Runs the model to the DONE store, and the design until it stores to DONE.
  task automatic run(string name, int max_cycles, output longint used);
    longint start = cycles;
    int guard = 0;
    while (model.step() != DONE && guard < 1_000_000) guard++;
    while (!(dut.u_cpu.mem_we && dut.u_cpu.mem_addr == DONE) && cycles - start < max_cycles)
      @(posedge clk);
    used = cycles - start;
    checks++;
    if (cycles - start >= max_cycles) begin
      failures++;
      $display("%s: did not finish in %0d cycles", name, max_cycles);
    end
    repeat (12) @(posedge clk);   // let the older instructions write back
  endtask

  task automatic compare_state(string name, int lo, int hi);
    int bad = 0;
    for (int r = 0; r < 256; r++) begin
      checks++;
      if (dut.u_cpu.u_rf.regs[r] !== model.regs[r]) begin
        failures++; bad++;
        if (bad < 8) $display("%s: r%0d = %h, expected %h", name, r,
                              dut.u_cpu.u_rf.regs[r], model.regs[r]);
      end
    end
    for (int a = lo; a <= hi; a++) begin
      host_addr = 16'(a);
      #1;
      checks++;
      if (host_rdata !== model.rd_mem(a)) begin
        failures++; bad++;
        $display("%s: mem[%0d] = %h, expected %h", name, a, host_rdata, model.rd_mem(a));
      end
    end
  endtask

  // ------------------------------------------------------------ programs
  task automatic program_directed();
    prog.delete();
    put(0,  ldi(1, 5));
    put(1,  ldi(2, 7));
    put(2,  r2(OP_ADD, 1, 2));        // r2 from EX, r1 from MEM
    put(3,  ldi(3, 100));
    put(4,  r2(OP_SW, 1, 3));
    put(5,  r2(OP_LW, 4, 3));
    put(6,  r2(OP_ADD, 4, 4));        // load-use
    put(7,  r2(OP_CMP, 4, 1));
    put(8,  tcb(CC_L));               // T <= L = 0
    put(9,  br(CC_T, 0, 11));         // taken, predicted not taken
    put(10, ldi(5, 999));
    put(11, jal(20));
    put(12, r2(OP_MOVE, 6, 1));
    put(13, jmp(30));
    put(20, ldi(7, 77));
    put(21, sm(1));
    put(22, sm(0));
    put(23, ldi(12, 3));
    put(24, r2(OP_SHL, 7, 12));
    put(25, rts());
    put(30, ldi(8, 4));
    put(31, ldi(9, 1));
    put(32, r2(OP_SUB, 8, 9));
    put(33, br(CC_Z, 0, 32));
    put(34, ldi(10, 40));
    put(35, jr(10));
    put(36, ldi(5, 555));
    put(40, ldi(13, 60));
    put(41, r2(OP_MOVE, 8'h80, 13));
    put(42, ldi(14, 7'h15));
    put(43, r2(OP_MOVE, 8'hC0, 14));
    put(44, rti());
    put(45, ldi(5, 444));
    put(60, tcb(CC_Z));
    put(61, br(CC_T, 1, 63));
    put(62, ldi(5, 333));
    put(63, r2(OP_XOR, 1, 2));
    put(64, r2(OP_OR, 1, 4));
    put(65, r2(OP_NOT, 15, 1));
    put(66, r2(OP_SAR, 15, 9));
    put(67, r2(OP_AND, 15, 1));
    put(68, r2(OP_SHR, 4, 9));
    put(69, ldi(16, -5));
    put(70, ldi(17, 101));
    put(71, r2(OP_SW, 16, 17));
    put(72, r2(OP_SW, 15, 3));
    put(73, ldi(18, DONE));
    put(74, r2(OP_SW, 18, 18));
    put(75, jmp(75));
  endtask

  int sort_data [10];

  task automatic program_bubble();
    prog.delete();
    put(0,  ldi(1, 500));
    put(1,  ldi(2, 9));
    put(2,  ldi(10, 1));
    put(3,  r2(OP_MOVE, 3, 1));
    put(4,  r2(OP_MOVE, 4, 2));
    put(5,  r2(OP_LW, 5, 3));
    put(6,  r2(OP_MOVE, 7, 3));
    put(7,  r2(OP_ADD, 7, 10));
    put(8,  r2(OP_LW, 6, 7));
    put(9,  r2(OP_CMP, 6, 5));
    put(10, br(CC_L, 0, 13));
    put(11, r2(OP_SW, 6, 3));
    put(12, r2(OP_SW, 5, 7));
    put(13, r2(OP_MOVE, 3, 7));
    put(14, r2(OP_SUB, 4, 10));
    put(15, br(CC_Z, 0, 5));
    put(16, r2(OP_SUB, 2, 10));
    put(17, br(CC_Z, 0, 3));
    put(18, ldi(18, DONE));
    put(19, r2(OP_SW, 18, 18));
    put(20, jmp(20));
    foreach (sort_data[i]) begin
      sort_data[i] = int'($urandom_range(0, 2000)) - 1000;
      put(500 + i, 32'(sort_data[i]));
    end
  endtask

  task automatic program_interrupt();
    prog.delete();
    put(0,   ldi(1, 0));
    put(1,   ldi(2, 1));
    put(2,   ldi(3, 30));
    put(3,   r2(OP_ADD, 1, 2));
    put(4,   r2(OP_SUB, 3, 2));
    put(5,   br(CC_Z, 0, 3));
    put(6,   ldi(20, 300));
    put(7,   r2(OP_SW, 1, 20));
    put(8,   ldi(18, DONE));
    put(9,   r2(OP_SW, 18, 18));
    put(10,  jmp(10));
    put(100, ldi(41, 1));
    put(101, r2(OP_ADD, 40, 41));
    put(102, rti());
  endtask

  // ------------------------------------------------------------ main
  longint used;
  int sorted [10];

  initial begin
    // 1. directed program
    program_directed();
    load_and_reset();
    run("directed", 20000, used);
    compare_state("directed", 100, 101);

    // 2. bubble sort
    program_bubble();
    load_and_reset();
    run("bubble", 200000, used);
    compare_state("bubble", 500, 509);
    sorted = sort_data;
    for (int i = 1; i < 10; i++)      // insertion sort, signed
      for (int j = i; j > 0 && sorted[j-1] > sorted[j]; j--) begin
        int t;
        t = sorted[j]; sorted[j] = sorted[j-1]; sorted[j-1] = t;
      end
    for (int i = 0; i < 10; i++) begin
      host_addr = 16'(500 + i);
      #1;
      checks++;
      if ($signed(host_rdata) != sorted[i]) begin
        failures++;
        $display("bubble: element %0d = %0d, expected %0d", i, $signed(host_rdata), sorted[i]);
      end
    end
    // Every instruction takes at least one step of three clocks; none takes more than
    // five steps (a JAL or a mispredicted branch plus a store).
    checks++;
    $display("bubble sort of 10 words: %0d instructions, %0d clock cycles (%0d steps)",
             model.executed, used, used / 3);
    if (used < 3 * longint'(model.executed) || used > 15 * longint'(model.executed)) begin
      failures++;
      $display("bubble: cycle count outside bounds");
    end

    // 3. interrupts
    program_interrupt();
    load_and_reset();
    fork
      begin
        repeat (60) @(posedge clk);
        int_vector = {1'b1, 31'd100};
        @(posedge clk iff int_ack);
        int_vector = '0;
        repeat (150) @(posedge clk);
        int_vector = {1'b1, 31'd100};
        @(posedge clk iff int_ack);
        int_vector = '0;
      end
    join_none
    begin
      longint start;
      start = cycles;
      while (!(dut.u_cpu.mem_we && dut.u_cpu.mem_addr == DONE) && cycles - start < 50000)
        @(posedge clk);
      repeat (12) @(posedge clk);
    end
    checks += 4;
    if (dut.u_cpu.u_rf.regs[1] != 30) begin
      failures++; $display("interrupt: r1 = %0d, expected 30", dut.u_cpu.u_rf.regs[1]);
    end
    if (dut.u_cpu.u_rf.regs[40] != 2) begin
      failures++; $display("interrupt: service count %0d, expected 2", dut.u_cpu.u_rf.regs[40]);
    end
    host_addr = 16'd300;
    #1;
    if (host_rdata != 30) begin
      failures++; $display("interrupt: mem[300] = %0d, expected 30", host_rdata);
    end
    if (dut.u_cpu.u_rf.regs[8'h80] < 3 || dut.u_cpu.u_rf.regs[8'h80] > 6) begin
      failures++; $display("interrupt: saved PC %0d outside the loop", dut.u_cpu.u_rf.regs[8'h80]);
    end

    // mechanisms
    begin
      int counts [string];
      counts["forward from EX"]          = n_fwd_ex;
      counts["forward from MEM"]         = n_fwd_mem;
      counts["load-use interlock"]       = n_load_use;
      counts["LW/SW structural stall"]   = n_stall_mem;
      counts["JAL stall"]                = n_stall_jal;
      counts["JR/RTS/RTI stall"]         = n_stall_jr;
      counts["taken branch predicted"]   = n_pred_ok_taken;
      counts["misprediction"]            = n_mispredict;
      counts["CCR reload after RTI"]     = n_rti_restore;
      counts["interrupt accepted"]       = n_int_take;
      counts["interrupt state saved"]    = n_int_save;
      counts["SM"]                       = n_sm;
      counts["TCB"]                      = n_tcb;
      foreach (counts[k]) begin
        checks++;
        $display("  %-24s %0d", k, counts[k]);
        if (counts[k] == 0) begin
          failures++;
          $display("mechanism never exercised: %s", k);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
