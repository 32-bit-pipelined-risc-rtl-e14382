// tb_forward_unit: random register addresses chosen from a small set so that matches
// are frequent; each operand must come from EX before MEM before the register file.
module tb_forward_unit;
  logic [7:0] raddr_d, raddr_s, ex_waddr, mem_waddr;
  logic [31:0] rf_dst, rf_src, ex_wdata, mem_wdata, dst_data, src_data;
  logic ex_we, mem_we, fwd_dst_ex, fwd_dst_mem, fwd_src_ex, fwd_src_mem;
  int checks = 0, failures = 0;

  forward_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(logic [7:0] a, logic [31:0] rf);
    if (ex_we && ex_waddr == a) return ex_wdata;
    if (mem_we && mem_waddr == a) return mem_wdata;
    return rf;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      raddr_d = 8'($urandom % 4); raddr_s = 8'($urandom % 4);
      ex_waddr = 8'($urandom % 4); mem_waddr = 8'($urandom % 4);
      ex_we = $urandom; mem_we = $urandom;
      rf_dst = $urandom; rf_src = $urandom; ex_wdata = $urandom; mem_wdata = $urandom;
      #1;
      checks += 2;
      if (dst_data !== pick(raddr_d, rf_dst)) failures++;
      if (src_data !== pick(raddr_s, rf_src)) failures++;
      checks++;
      if (fwd_dst_ex !== (ex_we && ex_waddr == raddr_d)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
