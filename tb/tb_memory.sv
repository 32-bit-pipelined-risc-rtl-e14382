// tb_memory: random writes and reads through the processor port (read latch updated
// only when en is high, old data on a write) and the host port, against a model array.
module tb_memory;
  logic clk = 0, en = 0, we = 0, host_we = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, host_wdata = 0, host_rdata;
  logic [15:0] host_addr = 0;
  logic [31:0] model [int];
  logic [31:0] exp_rdata;
  int checks = 0, failures = 0;

  memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] m(int a);
    return model.exists(a) ? model[a] : 32'hDEAD_0000 + 32'(a);
  endfunction

  initial begin
    // fill a window through the host port
    for (int a = 0; a < 64; a++) begin
      host_we = 1; host_addr = 16'(a); host_wdata = 32'hDEAD_0000 + 32'(a);
      @(negedge clk);
    end
    host_we = 0;
    en = 1; we = 0; addr = 0; exp_rdata = m(0);
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      en = ($urandom % 4) != 0; we = $urandom;
      addr = {$urandom, 6'($urandom)} & 32'h0001_003F;   // bit 16 is above the memory
      wdata = $urandom;
      if (en) exp_rdata = m(int'(addr[5:0]));
      @(negedge clk);
      if (en && we) model[int'(addr[5:0])] = wdata;
      checks++;
      if (rdata !== exp_rdata) begin
        failures++;
        if (failures < 10) $display("rdata %h expected %h", rdata, exp_rdata);
      end
      host_addr = 16'($urandom % 64);
      #1;
      checks++;
      if (host_rdata !== m(int'(host_addr))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
