// tb_regfile: writes random words to random registers in phase P1 and reads them back
// through both registered read ports in P2, checking the read sees a write of the same
// step, that writes outside P1 and reads outside P2 have no effect, and reset to zero.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  logic wen_phase = 0, we = 0, ren_phase = 0;
  logic [7:0] waddr = 0, raddr_d = 0, raddr_s = 0;
  logic [31:0] wdata = 0, dst_q, src_q;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reset contents
    for (int i = 0; i < 256; i += 17) begin
      raddr_d = 8'(i); raddr_s = 8'(255 - i); ren_phase = 1;
      @(negedge clk);
      chk(dst_q, 0, "reset d"); chk(src_q, 0, "reset s");
    end
    ren_phase = 0;
    for (int n = 0; n < 600; n++) begin
      // P1: write (sometimes with we low)
      waddr = 8'($urandom); wdata = $urandom; we = ($urandom % 4) != 0; wen_phase = 1;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      wen_phase = 0;
      // a write request outside P1 must be ignored
      we = 1; waddr = 8'($urandom); wdata = $urandom;
      // P2: read, one port on the register just written
      ren_phase = 1; raddr_d = (n % 2) ? waddr : 8'($urandom); raddr_s = 8'($urandom);
      @(negedge clk);
      ren_phase = 0; we = 0;
      chk(dst_q, model[raddr_d], "read d"); chk(src_q, model[raddr_s], "read s");
      // outputs must hold outside P2
      raddr_d = raddr_d + 1;
      @(negedge clk);
      chk(dst_q, model[raddr_d - 8'd1], "hold d");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
