// fetch_ctrl: the IF stage control, with the program counter, the instruction register,
// the two-bit branch predictor and the PC backup queue.
//
// Each pipeline step it either fetches or stalls. To fetch, it requests the word at PC
// from memory in P1 (fetch high), copies the memory's read latch into the instruction
// register in P2, and at the end of P3 passes the instruction (with its PC and its
// prediction) to the IF inter-stage buffer and refreshes the PC:
//   JMP, JAL  PC <= sign-extended jump address, at once
//   BR        PC <= predicted path; the other path is pushed into the backup queue
//   other     PC <= PC + 1, or the interrupt address when the interrupt control
//             accepts an interrupt after this fetch (int_take)
// It stalls, fetching nothing and passing a NOP to the IF buffer, while:
//   - a LW/SW is in MEM (one shared memory, structural hazard),
//   - a JAL is in ID, EX or MEM (the return address reaches the register file in WR),
//   - a JR, RTS or RTI is in ID; the target read there (id_target) is loaded into the
//     PC, and the NOP after RTI is flagged to reload the CCR in EX,
//   - a branch in EX was mispredicted; the PC is reloaded from the backup queue,
//   - the interrupt control is draining the pipeline or saving state.
// During a load-use interlock (load_use) the PC and the IF buffer hold their values.
// These rules follow the processor description, except the load-use interlock, which
// this design adds because its forwarding cannot supply a word still being loaded.
// All registers change on a clock edge with step_en (phase P3) high; ir loads in P2.
module fetch_ctrl
  import risc_pkg::*;
#(
  parameter int unsigned BP_ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ph2,
  input  logic            step_en,
  // memory
  output logic            fetch,        // this step fetches: memory request in P1
  output logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] mem_rdata,
  // later stages
  input  logic [5:0]      id_op,        // opcode of the instruction in ID
  input  logic [XLEN-1:0] id_target,    // register value read for JR/RTS/RTI in ID
  input  logic [5:0]      ex_op,        // opcode in EX
  input  logic [5:0]      mem_op,       // opcode in MEM
  input  logic            load_use,
  input  logic            ex_branch,    // a branch is being resolved in EX
  input  logic [XLEN-1:0] ex_branch_pc,
  input  logic            ex_taken,
  input  logic            mispredict,
  // interrupt control
  input  logic            int_busy,
  input  logic            int_take,
  input  logic [XLEN-1:0] int_addr,
  output logic [XLEN-1:0] ir,
  output logic [XLEN-1:0] pc_next_seq,
  // IF inter-stage buffer
  output if_buf_t         if_d,
  output logic            if_hold,
  // status, for observation
  output logic            stall_mem,
  output logic            stall_jal,
  output logic            stall_jr,
  output logic            pred_taken
);

  logic [XLEN-1:0] pc_d;
  logic [XLEN-1:0] q_head;
  logic            q_empty;
  logic [5:0]      ir_op;
  logic            id_jr;

  assign ir_op       = opcode_of(ir);
  assign pc_next_seq = pc + 1'b1;
  assign id_jr       = id_op inside {OP_JR, OP_RTS, OP_RTI};
  assign stall_mem   = is_mem(mem_op);
  assign stall_jal   = (id_op == OP_JAL) || (ex_op == OP_JAL) || (mem_op == OP_JAL);
  assign stall_jr    = id_jr;
  assign fetch       = !(mispredict || load_use || id_jr || stall_mem || stall_jal || int_busy);
  assign if_hold     = load_use && !mispredict;

  branch_predictor #(.W(XLEN), .ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n, .step_en,
    .lookup_pc     (pc),
    .predict_taken (pred_taken),
    .update        (ex_branch),
    .update_pc     (ex_branch_pc),
    .taken         (ex_taken)
  );

  pc_queue #(.W(XLEN), .DEPTH(2)) u_queue (
    .clk, .rst_n, .step_en,
    .push    (fetch && ir_op == OP_BR),
    .push_pc (pred_taken ? pc_next_seq : branch_target(ir)),
    .pop     (ex_branch),
    .flush   (mispredict),
    .head    (q_head),
    .empty   (q_empty)
  );

  always_comb begin
    pc_d = pc;
    if_d = '0;
    if (mispredict) begin
      pc_d = q_head;
    end else if (load_use) begin
      pc_d = pc;
    end else if (id_jr) begin
      pc_d             = id_target;
      if_d.pc          = pc;
      if_d.restore_ccr = (id_op == OP_RTI);
    end else if (fetch) begin
      if_d.instr      = ir;
      if_d.pc         = pc;
      if_d.pred_taken = (ir_op == OP_BR) && pred_taken;
      if (int_take)                        pc_d = int_addr;
      else if (ir_op inside {OP_JMP, OP_JAL}) pc_d = jump_target(ir);
      else if (ir_op == OP_BR)             pc_d = pred_taken ? branch_target(ir) : pc_next_seq;
      else                                 pc_d = pc_next_seq;
    end else begin
      if_d.pc = pc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      ir <= '0;
    end else begin
      if (ph2 && fetch) ir <= mem_rdata;
      if (step_en)      pc <= pc_d;
    end
  end

  // A misprediction always has its backup address in the queue.
  assert property (@(posedge clk) disable iff (!rst_n) (step_en && mispredict) |-> !q_empty)
    else $error("fetch_ctrl: misprediction with empty backup queue");

endmodule
