// tb_risc_cpu: the core with a memory model written here (one port, read latch loaded
// on a clock with mem_en, like the design's memory).
//   1. timing: eight independent LDIs; the first register-file write must come in the
//      fifth pipeline step (IF, ID, EX, MEM, WR) and the following ones one step, three
//      clocks, apart;
//   2. a random straight-line program of 400 ALU, LDI, MOVE, LW and SW instructions over
//      a few registers, so that back-to-back dependences, forwarding and load-use cases
//      are dense; registers and memory are compared with the reference model.
module tb_risc_cpu;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  localparam int DONE = 200;

  logic clk = 0, rst_n = 0;
  logic mem_en, mem_we, int_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata, int_vector = 0;
  logic [31:0] mem [int];
  int checks = 0, failures = 0;

  risc_cpu dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (mem_en) begin
    mem_rdata <= mem.exists(int'(mem_addr[15:0])) ? mem[int'(mem_addr[15:0])] : 32'd0;
    if (mem_we) mem[int'(mem_addr[15:0])] = mem_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iss model;

  task automatic start(logic [31:0] prog [int]);
    rst_n = 0;
    mem.delete();
    model = new();
    foreach (prog[a]) begin mem[a] = prog[a]; model.mem[a] = prog[a]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  logic [31:0] p [int];
  int steps, write_steps [$];
  int bad;
  opcode_e alu_ops [10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT,
                            OP_SHL, OP_SHR, OP_SAR, OP_CMP};
  int n_mem_stalls = 0;

  initial begin
    // ---------------------------------------------------------------- 1. timing
    for (int i = 0; i < 8; i++) p[i] = ldi(i + 1, 100 + i);
    p[8] = jmp(8);
    start(p);
    steps = 0;
    while (write_steps.size() < 8 && steps < 100) begin
      @(posedge clk);
      if (dut.ph1 && dut.rf_we) write_steps.push_back(steps);
      if (dut.ph3) steps++;
    end
    checks++;
    if (write_steps.size() != 8 || write_steps[0] != 4) begin
      failures++;
      $display("first write after %0d completed steps, expected 4", write_steps[0]);
    end
    for (int i = 1; i < write_steps.size(); i++) begin
      checks++;
      if (write_steps[i] - write_steps[i-1] != 1) begin
        failures++;
        $display("write %0d came %0d steps after the previous", i, write_steps[i] - write_steps[i-1]);
      end
    end
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.u_rf.regs[i + 1] != 100 + i) failures++;
    end

    // ---------------------------------------------------------------- 2. random program
    p.delete();
    for (int i = 0; i < 4; i++) p[i] = ldi(20 + i, 1000 + i);   // address registers
    for (int i = 4; i < 404; i++) begin
      int k, d, s;
      k = $urandom % 10;
      d = 1 + $urandom % 4;
      s = 1 + $urandom % 4;
      case (k)
        0, 1, 2, 3: p[i] = r2(alu_ops[$urandom % 10], d, s);
        4:          p[i] = ldi(d, int'($urandom % 262144) - 131072);
        5:          p[i] = r2(OP_MOVE, d, s);
        6, 7:       p[i] = r2(OP_LW, d, 20 + $urandom % 4);
        default:    p[i] = r2(OP_SW, d, 20 + $urandom % 4);
      endcase
    end
    p[404] = ldi(18, DONE);
    p[405] = r2(OP_SW, 18, 18);
    p[406] = jmp(406);
    start(p);
    while (model.step() != DONE) ;
    steps = 0;
    while (!(mem_we && mem_addr == DONE) && steps < 5000) begin
      @(posedge clk);
      if (dut.ph3) steps++;
      if (dut.ph3 && dut.stall_mem) n_mem_stalls++;
    end
    repeat (12) @(posedge clk);
    checks++;
    if (steps >= 5000) begin failures++; $display("random program did not finish"); end
    bad = 0;
    for (int r = 0; r < 256; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== model.regs[r]) begin
        failures++; bad++;
        if (bad < 6) $display("r%0d = %h expected %h", r, dut.u_rf.regs[r], model.regs[r]);
      end
    end
    for (int a = 1000; a < 1004; a++) begin
      checks++;
      if ((mem.exists(a) ? mem[a] : 0) !== model.rd_mem(a)) begin
        failures++;
        $display("mem[%0d] differs", a);
      end
    end
    checks++;
    if (dut.ccr_q !== model.ccr) begin
      failures++;
      $display("ccr %b expected %b", dut.ccr_q, model.ccr);
    end
    $display("random program: %0d instructions in %0d steps, %0d memory stalls", model.executed, steps, n_mem_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
