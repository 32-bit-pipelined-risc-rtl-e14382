// tb_bubble_sort: the bubble-sort workload on the full-size processor. The same
// 21-instruction program sorts, in place, a 64-word array of random signed words and then
// a 64-word array in descending order (the worst case: every comparison swaps). Each
// result is checked against a sorted copy, the executed instruction count against the
// reference model, and the clock count is printed together with its share of stall steps.
module tb_bubble_sort;
  import risc_pkg::*;
  import risc_asm_pkg::*;

  localparam int DONE = 200;
  localparam int BASE = 500;
  localparam int N    = 64;

  logic        clk = 0, rst_n = 0;
  logic [31:0] int_vector = '0;
  logic        int_ack;
  logic        host_we = 0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  longint cycles = 0;

  risc_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #(20_000_000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [int];
  int data [N], sorted [N];
  iss model;

  task automatic sort_run(string name);
    longint start, used;
    int t;
    prog.delete();
    prog[0]  = ldi(1, BASE);
    prog[1]  = ldi(2, N - 1);
    prog[2]  = ldi(10, 1);
    prog[3]  = r2(OP_MOVE, 3, 1);
    prog[4]  = r2(OP_MOVE, 4, 2);
    prog[5]  = r2(OP_LW, 5, 3);
    prog[6]  = r2(OP_MOVE, 7, 3);
    prog[7]  = r2(OP_ADD, 7, 10);
    prog[8]  = r2(OP_LW, 6, 7);
    prog[9]  = r2(OP_CMP, 6, 5);
    prog[10] = br(CC_L, 0, 13);
    prog[11] = r2(OP_SW, 6, 3);
    prog[12] = r2(OP_SW, 5, 7);
    prog[13] = r2(OP_MOVE, 3, 7);
    prog[14] = r2(OP_SUB, 4, 10);
    prog[15] = br(CC_Z, 0, 5);
    prog[16] = r2(OP_SUB, 2, 10);
    prog[17] = br(CC_Z, 0, 3);
    prog[18] = ldi(18, DONE);
    prog[19] = r2(OP_SW, 18, 18);
    prog[20] = jmp(20);
    foreach (data[i]) prog[BASE + i] = 32'(data[i]);

    rst_n = 0;
    model = new();
    @(negedge clk);
    foreach (prog[a]) begin
      host_we = 1; host_addr = 16'(a); host_wdata = prog[a]; model.mem[a] = prog[a];
      @(negedge clk);
    end
    host_we = 0;
    while (model.step() != DONE) ;
    @(negedge clk);
    rst_n = 1;
    start = cycles;
    while (!(dut.u_cpu.mem_we && dut.u_cpu.mem_addr == DONE) && cycles - start < 5_000_000)
      @(posedge clk);
    used = cycles - start;
    repeat (12) @(posedge clk);

    sorted = data;
    for (int i = 1; i < N; i++)
      for (int j = i; j > 0 && sorted[j-1] > sorted[j]; j--) begin
        t = sorted[j]; sorted[j] = sorted[j-1]; sorted[j-1] = t;
      end
    for (int i = 0; i < N; i++) begin
      host_addr = 16'(BASE + i);
      #1;
      checks++;
      if ($signed(host_rdata) != sorted[i]) begin
        failures++;
        if (failures < 8) $display("%s: element %0d = %0d, expected %0d", name, i,
                                   $signed(host_rdata), sorted[i]);
      end
    end
    // one instruction per step at best; a stall-free run would take 3 clocks each
    checks++;
    if (used < 3 * longint'(model.executed) || used > 15 * longint'(model.executed)) begin
      failures++;
      $display("%s: %0d clocks for %0d instructions is out of bounds", name, used, model.executed);
    end
    $display("%s: %0d words, %0d instructions, %0d clocks = %0d steps (%0.2f steps per instruction)",
             name, N, model.executed, used, used / 3, real'(used) / 3.0 / real'(model.executed));
  endtask

  initial begin
    foreach (data[i]) data[i] = int'($urandom_range(0, 200000)) - 100000;
    sort_run("random");
    foreach (data[i]) data[i] = N - i;
    sort_run("descending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
