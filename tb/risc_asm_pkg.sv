// risc_asm_pkg: instruction encoders for test programs, plus a reference model of the
// instruction set (one instruction at a time, no pipeline) used to work out expected
// register and memory contents independently of the pipelined core.
package risc_asm_pkg;
  import risc_pkg::*;

  function automatic logic [31:0] r2(opcode_e op, int rd, int rs);
    return {op, 8'(rd), 8'(rs), 10'd0};
  endfunction
  function automatic logic [31:0] ldi(int rd, int imm);
    return {OP_LDI, 8'(rd), 18'(imm)};
  endfunction
  function automatic logic [31:0] jmp(int target);
    return {OP_JMP, 26'(target)};
  endfunction
  function automatic logic [31:0] jal(int target);
    return {OP_JAL, 26'(target)};
  endfunction
  // branch to target when CCR[bit] == val
  function automatic logic [31:0] br(int bit_sel, bit val, int target);
    return {OP_BR, 3'(bit_sel), val, 22'(target)};
  endfunction
  function automatic logic [31:0] jr(int rs);
    return {OP_JR, 8'd0, 8'(rs), 10'd0};
  endfunction
  function automatic logic [31:0] rts();
    return {OP_RTS, 26'd0};
  endfunction
  function automatic logic [31:0] rti();
    return {OP_RTI, 26'd0};
  endfunction
  function automatic logic [31:0] sm(bit val);
    return {OP_SM, 25'd0, val};
  endfunction
  function automatic logic [31:0] tcb(int bit_sel);
    return {OP_TCB, 23'd0, 3'(bit_sel)};
  endfunction
  function automatic logic [31:0] nop();
    return 32'd0;
  endfunction

  // Architectural state of the reference model.
  class iss;
    logic [31:0] regs [256];
    logic [31:0] mem  [int];
    logic [6:0]  ccr;
    logic [31:0] pc;
    int unsigned executed;

    function new();
      foreach (regs[i]) regs[i] = '0;
      ccr = '0;
      pc = '0;
      executed = 0;
    endfunction

    function logic [31:0] rd_mem(logic [31:0] a);
      logic [31:0] k = a & 32'hFFFF;
      return mem.exists(int'(k)) ? mem[int'(k)] : 32'd0;
    endfunction

    // Executes one instruction; returns the word address stored to, or -1.
    function int step();
      logic [31:0] ins = rd_mem(pc);
      logic [5:0]  op  = ins[31:26];
      int          d   = int'(ins[25:18]);
      int          s   = int'(ins[17:10]);
      logic [31:0] a   = regs[d], b = regs[s], y;
      logic [32:0] sum;
      logic        c = 0, v = 0;
      int          stored = -1;
      logic [31:0] npc = pc + 1;
      logic [4:0]  sh = b[4:0];
      bit          alu = 1;
      executed++;
      case (op)
        OP_ADD: begin sum = {1'b0,a} + {1'b0,b}; y = sum[31:0]; c = sum[32];
                      v = (a[31]==b[31]) && (y[31]!=a[31]); end
        OP_SUB, OP_CMP: begin sum = {1'b0,a} + {1'b0,~b} + 33'd1; y = sum[31:0]; c = sum[32];
                      v = (a[31]!=b[31]) && (y[31]!=a[31]); end
        OP_AND: y = a & b;
        OP_OR:  y = a | b;
        OP_XOR: y = a ^ b;
        OP_NOT: y = ~b;
        OP_SHL: begin y = a << sh; c = (sh != 0) ? a[32-sh] : 0; end
        OP_SHR: begin y = a >> sh; c = (sh != 0) ? a[sh-1] : 0; end
        OP_SAR: begin y = $signed(a) >>> sh; c = (sh != 0) ? a[sh-1] : 0; end
        default: alu = 0;
      endcase
      if (alu) begin
        ccr[0] = c; ccr[1] = v; ccr[2] = (y == 0); ccr[3] = y[31]; ccr[4] = y[31] ^ v;
        if (op != OP_CMP) regs[d] = y;
      end
      case (op)
        OP_LW:   regs[d] = rd_mem(b);
        OP_SW:   begin mem[int'(b & 32'hFFFF)] = a; stored = int'(b); end
        OP_MOVE: regs[d] = b;
        OP_LDI:  regs[d] = {{14{ins[17]}}, ins[17:0]};
        OP_BR:   if ((ins[25:23] < 7 ? ccr[ins[25:23]] : 1'b0) == ins[22])
                   npc = {{10{ins[21]}}, ins[21:0]};
        OP_JMP:  npc = {{6{ins[25]}}, ins[25:0]};
        OP_JAL:  begin regs[8'hE0] = pc + 1; npc = {{6{ins[25]}}, ins[25:0]}; end
        OP_JR:   npc = b;
        OP_RTS:  npc = regs[8'hE0];
        OP_RTI:  begin npc = regs[8'h80]; ccr = regs[8'hC0][6:0]; end
        OP_SM:   ccr[6] = ins[0];
        OP_TCB:  ccr[5] = (ins[2:0] < 7) ? ccr[ins[2:0]] : 1'b0;
        default: ;
      endcase
      pc = npc;
      return stored;
    endfunction
  endclass

endpackage
