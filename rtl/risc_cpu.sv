// risc_cpu: the 32-bit five-stage pipelined RISC processor core.
//
// Stages IF, ID, EX, MEM and WR are separated by four inter-stage buffers. A four-state
// machine (phase_fsm) makes every pipeline step three clocks long: P1 memory access and
// register-file write, P2 register-file read, P3 all buffers, PC and CCR advance.
//   IF   fetch_ctrl: fetch, PC refresh, two-bit branch prediction, PC backup queue,
//        stalls (NOP insertion) for LW/SW, JAL, JR/RTS/RTI, mispredictions, interrupts.
//   ID   read the dest (rd) and source (rs) operands from the 256-word register file into
//        two registers, then the forwarding selectors pick the newest value. RTS reads
//        register E0h, RTI register 80h, and the NOP following RTI register C0h.
//   EX   ALU control (operation select, CCR latch), branch resolution against the CCR
//        (misprediction flushes IF and ID and restores the PC from the queue), SM and TCB,
//        CCR reload by the NOP after RTI, JAL return address, LW/SW address and data.
//   MEM  LW and SW use the single memory port in P1; IF does not fetch in that step.
//   WR   the register file is written in P1 with ALU, MOVE, LDI, LW and JAL results.
// A load-use interlock (the instruction in ID needs the word a LW in EX is about to
// load) holds IF and ID for one step; this design adds it, the rest of the stage
// behaviour follows the processor description. Memory is external: mem_en requests an
// access in P1 (mem_we for a store) and the word read is expected in mem_rdata from the
// next clock on. int_vector[31] requests an interrupt at the address in bits 30..0.
// The stall, prediction and forwarding status signals (stall_*, pred_taken, fwd_*) and
// the interrupt controller's backup1_pc drive nothing here; they are kept as named
// observation points for test benches, which is why lint reports them as unused.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned BP_ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            mem_en,
  output logic            mem_we,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata,
  input  logic [XLEN-1:0] mem_rdata,
  input  logic [XLEN-1:0] int_vector,
  output logic            int_ack
);

  // ---------------------------------------------------------------- control phases
  logic ph1, ph2, ph3;
  phase_fsm u_phase (.clk, .rst_n, .ph1, .ph2, .ph3);

  // ---------------------------------------------------------------- buffers
  if_buf_t  if_d, if_q;
  id_buf_t  id_d, id_q;
  ex_buf_t  ex_d, ex_q;
  mem_buf_t mem_d, mem_q;
  logic     if_hold;

  // ---------------------------------------------------------------- shared signals
  logic [5:0]         id_op, ex_op, mem_op;
  logic [XLEN-1:0]    id_target;
  logic               load_use, mispredict, ex_branch, ex_taken;
  logic               fetch;
  logic [XLEN-1:0]    pc, ir, pc_next_seq;
  logic               int_take, int_busy, int_enter;
  logic [XLEN-1:0]    int_addr;
  logic               int_rf_we;
  logic [RADDR_W-1:0] int_rf_waddr;
  logic [XLEN-1:0]    int_rf_wdata;
  logic [CCR_W-1:0]   ccr_q;
  logic               stall_mem, stall_jal, stall_jr, pred_taken;

  assign id_op  = opcode_of(if_q.instr);
  assign ex_op  = opcode_of(id_q.instr);
  assign mem_op = ex_q.opcode;

  // ---------------------------------------------------------------- IF
  fetch_ctrl #(.BP_ENTRIES(BP_ENTRIES)) u_fetch (
    .clk, .rst_n, .ph2, .step_en (ph3),
    .fetch, .pc, .mem_rdata,
    .id_op, .id_target, .ex_op, .mem_op,
    .load_use,
    .ex_branch, .ex_branch_pc (id_q.pc), .ex_taken, .mispredict,
    .int_busy, .int_take, .int_addr,
    .ir, .pc_next_seq,
    .if_d, .if_hold,
    .stall_mem, .stall_jal, .stall_jr, .pred_taken
  );

  stage_buffer #(.T(if_buf_t)) u_if_buf (
    .clk, .rst_n, .step_en (ph3), .flush (1'b0), .hold (if_hold), .d (if_d), .q (if_q)
  );

  // ---------------------------------------------------------------- ID
  logic [RADDR_W-1:0] raddr_d, raddr_s;
  logic [XLEN-1:0]    rf_dst, rf_src, dst_data, src_data;
  logic               rf_we;
  logic [RADDR_W-1:0] rf_waddr;
  logic [XLEN-1:0]    rf_wdata;
  logic               ex_we;
  logic [XLEN-1:0]    mem_result;
  logic               fwd_dst_ex, fwd_dst_mem, fwd_src_ex, fwd_src_mem;
  logic               id_uses_regs;

  always_comb begin
    unique case (id_op)
      OP_RTS:  raddr_d = REG_LINK;
      OP_RTI:  raddr_d = REG_PC_SAVE;
      default: raddr_d = rd_of(if_q.instr);
    endcase
    raddr_s = if_q.restore_ccr ? REG_CCR_SAVE : rs_of(if_q.instr);
  end

  // WR stage write, or the interrupt control saving PC and CCR (pipeline empty then).
  assign rf_we    = int_rf_we || mem_q.wr_en;
  assign rf_waddr = int_rf_we ? int_rf_waddr : mem_q.wr_addr;
  assign rf_wdata = int_rf_we ? int_rf_wdata : mem_q.wr_data;

  regfile #(.W(XLEN), .ADDR_W(RADDR_W)) u_rf (
    .clk, .rst_n,
    .wen_phase (ph1), .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata),
    .ren_phase (ph2), .raddr_d, .raddr_s, .dst_q (rf_dst), .src_q (rf_src)
  );

  assign mem_result = (mem_op == OP_LW) ? mem_rdata : ex_q.result;

  forward_unit #(.W(XLEN), .ADDR_W(RADDR_W)) u_fwd (
    .raddr_d, .raddr_s, .rf_dst, .rf_src,
    .ex_we, .ex_waddr (ex_d.wr_addr), .ex_wdata (ex_d.result),
    .mem_we (ex_q.wr_en), .mem_waddr (ex_q.wr_addr), .mem_wdata (mem_result),
    .dst_data, .src_data,
    .fwd_dst_ex, .fwd_dst_mem, .fwd_src_ex, .fwd_src_mem
  );

  assign id_target    = (id_op == OP_JR) ? src_data : dst_data;
  assign id_uses_regs = (id_op != OP_NOP) || if_q.restore_ccr;
  assign load_use     = (ex_op == OP_LW) && id_uses_regs &&
                        (rd_of(id_q.instr) == raddr_d || rd_of(id_q.instr) == raddr_s);

  always_comb begin
    id_d.instr       = if_q.instr;
    id_d.pc          = if_q.pc;
    id_d.pred_taken  = if_q.pred_taken;
    id_d.restore_ccr = if_q.restore_ccr;
    id_d.dst_data    = dst_data;
    id_d.src_data    = src_data;
  end

  stage_buffer #(.T(id_buf_t)) u_id_buf (
    .clk, .rst_n, .step_en (ph3), .flush (load_use || mispredict), .hold (1'b0),
    .d (id_d), .q (id_q)
  );

  // ---------------------------------------------------------------- EX
  alu_op_e    alu_op;
  logic [XLEN-1:0] alu_y;
  alu_flags_t alu_flags;
  logic       cond_bit;

  always_comb begin
    unique case (ex_op)
      OP_ADD:          alu_op = ALU_ADD;
      OP_SUB, OP_CMP:  alu_op = ALU_SUB;
      OP_AND:          alu_op = ALU_AND;
      OP_OR:           alu_op = ALU_OR;
      OP_XOR:          alu_op = ALU_XOR;
      OP_NOT:          alu_op = ALU_NOT;
      OP_SHL:          alu_op = ALU_SHL;
      OP_SHR:          alu_op = ALU_SHR;
      OP_SAR:          alu_op = ALU_SAR;
      default:         alu_op = ALU_PASS;
    endcase
  end

  alu #(.W(XLEN)) u_alu (
    .op (alu_op), .a (id_q.dst_data), .b (id_q.src_data), .y (alu_y), .flags (alu_flags)
  );

  ccr u_ccr (
    .clk, .rst_n, .step_en (ph3),
    .flags_latch (is_alu(ex_op)), .flags (alu_flags),
    .set_mask (ex_op == OP_SM), .mask_val (id_q.instr[0]),
    .test (ex_op == OP_TCB), .test_sel (id_q.instr[2:0]),
    .restore (id_q.restore_ccr), .restore_val (id_q.src_data[CCR_W-1:0]),
    .int_enter,
    .ccr_q
  );

  assign cond_bit   = (id_q.instr[25:23] < 3'(CCR_W)) ? ccr_q[id_q.instr[25:23]] : 1'b0;
  assign ex_branch  = (ex_op == OP_BR);
  assign ex_taken   = ex_branch && (cond_bit == id_q.instr[22]);
  assign mispredict = ex_branch && (ex_taken != id_q.pred_taken);
  assign ex_we      = ex_d.wr_en;

  always_comb begin
    ex_d.opcode  = ex_op;
    ex_d.wr_en   = writes_rd(ex_op) || (ex_op == OP_JAL);
    ex_d.wr_addr = (ex_op == OP_JAL) ? REG_LINK : rd_of(id_q.instr);
    ex_d.addr    = id_q.src_data;
    unique case (ex_op)
      OP_LDI:  ex_d.result = ldi_value(id_q.instr);
      OP_JAL:  ex_d.result = id_q.pc + 1'b1;
      OP_SW:   ex_d.result = id_q.dst_data;
      default: ex_d.result = alu_y;
    endcase
  end

  stage_buffer #(.T(ex_buf_t)) u_ex_buf (
    .clk, .rst_n, .step_en (ph3), .flush (1'b0), .hold (1'b0), .d (ex_d), .q (ex_q)
  );

  // ---------------------------------------------------------------- MEM
  assign mem_en    = ph1 && (fetch || is_mem(mem_op));
  assign mem_we    = ph1 && (mem_op == OP_SW);
  assign mem_addr  = is_mem(mem_op) ? ex_q.addr : pc;
  assign mem_wdata = ex_q.result;

  always_comb begin
    mem_d.wr_en   = ex_q.wr_en;
    mem_d.wr_addr = ex_q.wr_addr;
    mem_d.wr_data = mem_result;
  end

  stage_buffer #(.T(mem_buf_t)) u_mem_buf (
    .clk, .rst_n, .step_en (ph3), .flush (1'b0), .hold (1'b0), .d (mem_d), .q (mem_q)
  );

  // ---------------------------------------------------------------- interrupts
  interrupt_ctrl u_int (
    .clk, .rst_n, .step_en (ph3),
    .int_vector, .int_ack,
    .ccr (ccr_q), .fetch, .fetched_op (opcode_of(ir)), .id_op,
    .pc_next_seq,
    .int_take, .int_addr, .int_busy, .int_enter,
    .rf_we (int_rf_we), .rf_waddr (int_rf_waddr), .rf_wdata (int_rf_wdata),
    .backup1_pc ()
  );

  // The interrupt control only writes the register file once the pipeline is empty.
  assert property (@(posedge clk) disable iff (!rst_n) ph1 |-> !(int_rf_we && mem_q.wr_en))
    else $error("risc_cpu: register-file write conflict");

  // Fetch and a LW/SW never use the memory in the same step.
  assert property (@(posedge clk) disable iff (!rst_n) !(fetch && is_mem(mem_op)))
    else $error("risc_cpu: memory port conflict");

endmodule
