// interrupt_ctrl: accepts interrupts and saves the processor state.
//
// An interrupt is requested by bit 31 of the 32-bit interrupt vector. It is checked after
// each fetch and accepted (int_take, for one pipeline step) only when the pipeline did
// fetch (it is not stalled), the interrupt-mask bit of the CCR is low, and neither the
// fetched instruction nor the one in ID changes the flow of control. The fetched
// instruction is the last one before the service routine. On acceptance backup1_pc takes
// the address following it, the fetch control loads the PC with vector bits 30..0
// sign-extended (int_addr), and int_ack pulses for one clock to tell the requester.
// The controller then keeps the fetch control stalled (int_busy) for four steps while the
// last instruction passes ID, EX, MEM and WR, writes backup1_pc into register 80h in the
// next step and the CCR into register C0h in the step after (through the register-file
// write port, phase P1), masks interrupts, and lets fetching resume. RTI undoes this.
// Following the processor description: the bit-31 request, the mask check, the no-stall
// condition, letting the last instruction finish, backup1_pc, the sign-extended address
// and saving PC and CCR into the register file at the addresses RTI reads. This design's
// choices: the control-flow exclusion (so that backup1_pc is never a predicted address),
// the fixed drain count, int_ack, and setting the mask on entry.
module interrupt_ctrl
  import risc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step_en,
  input  logic [XLEN-1:0]    int_vector,
  output logic               int_ack,
  input  logic [CCR_W-1:0]   ccr,
  input  logic               fetch,        // the pipeline fetches this step
  input  logic [5:0]         fetched_op,
  input  logic [5:0]         id_op,
  input  logic [XLEN-1:0]    pc_next_seq,
  output logic               int_take,
  output logic [XLEN-1:0]    int_addr,
  output logic               int_busy,
  output logic               int_enter,    // set the CCR mask at the end of this step
  output logic               rf_we,        // register-file write request for this step
  output logic [RADDR_W-1:0] rf_waddr,
  output logic [XLEN-1:0]    rf_wdata,
  output logic [XLEN-1:0]    backup1_pc
);

  typedef enum logic [1:0] {I_IDLE, I_DRAIN, I_SAVE_PC, I_SAVE_CCR} istate_e;

  localparam int unsigned DRAIN_STEPS = 4;

  istate_e    state;
  logic [2:0] drain_cnt;
  logic       ctrl_flow;

  assign ctrl_flow = fetched_op inside {OP_BR, OP_JMP, OP_JAL, OP_JR, OP_RTS, OP_RTI}
                     || id_op == OP_BR;
  assign int_take  = (state == I_IDLE) && int_vector[XLEN-1] && !ccr[CC_IM]
                     && fetch && !ctrl_flow;
  assign int_addr  = {int_vector[XLEN-2], int_vector[XLEN-2:0]};
  assign int_busy  = (state != I_IDLE);
  assign int_enter = (state == I_SAVE_CCR);
  assign rf_we     = (state == I_SAVE_PC) || (state == I_SAVE_CCR);
  assign rf_waddr  = (state == I_SAVE_PC) ? REG_PC_SAVE : REG_CCR_SAVE;
  assign rf_wdata  = (state == I_SAVE_PC) ? backup1_pc : XLEN'(ccr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= I_IDLE;
      drain_cnt  <= '0;
      backup1_pc <= '0;
      int_ack    <= 1'b0;
    end else begin
      int_ack <= step_en && int_take;
      if (step_en) begin
        unique case (state)
          I_IDLE: if (int_take) begin
            state      <= I_DRAIN;
            drain_cnt  <= 3'(DRAIN_STEPS - 1);
            backup1_pc <= pc_next_seq;
          end
          I_DRAIN: begin
            if (drain_cnt == '0) state <= I_SAVE_PC;
            else                 drain_cnt <= drain_cnt - 1'b1;
          end
          I_SAVE_PC:  state <= I_SAVE_CCR;
          I_SAVE_CCR: state <= I_IDLE;
          default:    state <= I_IDLE;
        endcase
      end
    end
  end

endmodule
