// risc_pkg: types and constants shared by the 32-bit five-stage pipelined RISC core.
//
// The pipeline (IF, ID, EX, MEM, WR), the 256-word register file with 8-bit register
// addresses, the fixed register addresses used by RTS (E0h), RTI (80h) and the saved
// condition codes (C0h), the 7-bit condition code register, the interrupt vector whose
// bit 31 requests an interrupt, and the instruction classes (ALU, load/store, branch,
// jump, condition code) follow the processor description. The binary instruction
// encoding, the opcode values, the list of ALU operations and the bit order inside the
// condition code register are this design's own choices; the instruction words are:
//
//   [31:26] opcode
//   [25:18] rd   destination register (first operand, "destination data")
//   [17:10] rs   source register      (second operand, "source data")
//   LDI  : [17:0]  18-bit immediate, sign-extended
//   JMP/JAL : [25:0] absolute word address, sign-extended
//   BR   : [25:23] CCR bit tested, [22] value that makes the branch taken,
//          [21:0] absolute word address, sign-extended
//   JR   : rs holds the target address
//   SM   : [0] new interrupt-mask value
//   TCB  : [2:0] CCR bit copied into the test bit
//
// The all-zero word is NOP, so a cleared pipeline buffer holds a NOP.
package risc_pkg;

  localparam int unsigned XLEN      = 32;  // data and address width
  localparam int unsigned RADDR_W   = 8;   // register address width (256 registers)
  localparam int unsigned CCR_W     = 7;   // condition code register width

  localparam logic [RADDR_W-1:0] REG_PC_SAVE  = 8'h80; // RTI reads the return PC here
  localparam logic [RADDR_W-1:0] REG_CCR_SAVE = 8'hC0; // RTI reads the saved CCR here
  localparam logic [RADDR_W-1:0] REG_LINK     = 8'hE0; // JAL writes, RTS reads

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00,
    OP_ADD  = 6'h01,
    OP_SUB  = 6'h02,
    OP_AND  = 6'h03,
    OP_OR   = 6'h04,
    OP_XOR  = 6'h05,
    OP_NOT  = 6'h06,
    OP_SHL  = 6'h07,
    OP_SHR  = 6'h08,
    OP_SAR  = 6'h09,
    OP_CMP  = 6'h0A,
    OP_LW   = 6'h10,
    OP_SW   = 6'h11,
    OP_MOVE = 6'h12,
    OP_LDI  = 6'h13,
    OP_BR   = 6'h18,
    OP_JMP  = 6'h20,
    OP_JAL  = 6'h21,
    OP_JR   = 6'h22,
    OP_RTS  = 6'h23,
    OP_RTI  = 6'h24,
    OP_SM   = 6'h28,
    OP_TCB  = 6'h29
  } opcode_e;

  // ALU operation select, driven by the EX (ALU) control.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOT  = 4'd5,
    ALU_SHL  = 4'd6,
    ALU_SHR  = 4'd7,
    ALU_SAR  = 4'd8,
    ALU_PASS = 4'd9   // passes operand B (MOVE)
  } alu_op_e;

  // Condition code register bit positions.
  localparam int unsigned CC_C  = 0;  // carry (no borrow for SUB/CMP)
  localparam int unsigned CC_V  = 1;  // signed overflow
  localparam int unsigned CC_Z  = 2;  // zero
  localparam int unsigned CC_N  = 3;  // negative
  localparam int unsigned CC_L  = 4;  // signed less-than, N xor V
  localparam int unsigned CC_T  = 5;  // test bit, written by TCB
  localparam int unsigned CC_IM = 6;  // interrupt mask, 1 = interrupts masked

  typedef struct packed {
    logic n, z, v, c;
  } alu_flags_t;

  // IF inter-stage buffer: the fetched instruction and where it came from.
  typedef struct packed {
    logic [XLEN-1:0] instr;
    logic [XLEN-1:0] pc;
    logic            pred_taken;   // branch predicted taken in IF
    logic            restore_ccr;  // the NOP that follows RTI: reload CCR in EX
  } if_buf_t;

  // ID inter-stage buffer: instruction plus its two (forwarded) operands.
  typedef struct packed {
    logic [XLEN-1:0] instr;
    logic [XLEN-1:0] pc;
    logic            pred_taken;
    logic            restore_ccr;
    logic [XLEN-1:0] dst_data;     // value of register rd
    logic [XLEN-1:0] src_data;     // value of register rs
  } id_buf_t;

  // EX inter-stage buffer: result to write back and the memory request.
  typedef struct packed {
    logic [5:0]         opcode;
    logic               wr_en;
    logic [RADDR_W-1:0] wr_addr;
    logic [XLEN-1:0]    result;    // ALU/MOVE/LDI result, JAL link, SW data
    logic [XLEN-1:0]    addr;      // LW/SW word address
  } ex_buf_t;

  // MEM inter-stage buffer: what the WR stage writes into the register file.
  typedef struct packed {
    logic               wr_en;
    logic [RADDR_W-1:0] wr_addr;
    logic [XLEN-1:0]    wr_data;
  } mem_buf_t;

  function automatic logic [5:0] opcode_of(logic [XLEN-1:0] instr);
    return instr[31:26];
  endfunction

  function automatic logic [RADDR_W-1:0] rd_of(logic [XLEN-1:0] instr);
    return instr[25:18];
  endfunction

  function automatic logic [RADDR_W-1:0] rs_of(logic [XLEN-1:0] instr);
    return instr[17:10];
  endfunction

  function automatic logic [XLEN-1:0] jump_target(logic [XLEN-1:0] instr);
    return {{(XLEN-26){instr[25]}}, instr[25:0]};
  endfunction

  function automatic logic [XLEN-1:0] branch_target(logic [XLEN-1:0] instr);
    return {{(XLEN-22){instr[21]}}, instr[21:0]};
  endfunction

  function automatic logic [XLEN-1:0] ldi_value(logic [XLEN-1:0] instr);
    return {{(XLEN-18){instr[17]}}, instr[17:0]};
  endfunction

  // ALU instructions: rd <= rd op rs, condition codes latched.
  function automatic logic is_alu(logic [5:0] op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT,
                      OP_SHL, OP_SHR, OP_SAR, OP_CMP};
  endfunction

  // Instructions that write register rd (JAL writes REG_LINK instead).
  function automatic logic writes_rd(logic [5:0] op);
    return (is_alu(op) && op != OP_CMP) || op inside {OP_LW, OP_MOVE, OP_LDI};
  endfunction

  function automatic logic is_mem(logic [5:0] op);
    return op inside {OP_LW, OP_SW};
  endfunction

endpackage
