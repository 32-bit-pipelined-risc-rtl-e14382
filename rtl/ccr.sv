// ccr: the 7-bit condition code register.
//
// Bits: 0 C, 1 V, 2 Z, 3 N (latched from the ALU), 4 L (signed less-than, N xor V),
// 5 T (test bit), 6 IM (interrupt mask, interrupts are accepted only while IM is low).
// All updates happen on a clock edge with step_en high (the last clock of a pipeline
// step) and are mutually exclusive in the core; the priority below only matters if a
// caller raises several at once:
//   int_enter   : IM <= 1 (the interrupt control entering a service routine)
//   restore     : CCR <= restore_val (the NOP after RTI, reloading the saved CCR)
//   set_mask    : IM <= mask_val (SM instruction)
//   test        : T <= CCR[test_sel] (TCB instruction)
//   flags_latch : C, V, Z, N, L <= ALU flags (ALU instructions)
// The register width of seven bits, the interrupt-mask bit, the test bit and the SM, TCB
// and RTI behaviour follow the processor description; which flags occupy the other five
// bits, their order, and masking interrupts on entry are this design's choices.
// Reset clears every bit, so interrupts are enabled after reset.
module ccr
  import risc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step_en,
  input  logic             flags_latch,
  input  alu_flags_t       flags,
  input  logic             set_mask,
  input  logic             mask_val,
  input  logic             test,
  input  logic [2:0]       test_sel,
  input  logic             restore,
  input  logic [CCR_W-1:0] restore_val,
  input  logic             int_enter,
  output logic [CCR_W-1:0] ccr_q
);

  logic [CCR_W-1:0] ccr_d;

  always_comb begin
    ccr_d = ccr_q;
    if (int_enter) begin
      ccr_d[CC_IM] = 1'b1;
    end else if (restore) begin
      ccr_d = restore_val;
    end else if (set_mask) begin
      ccr_d[CC_IM] = mask_val;
    end else if (test) begin
      ccr_d[CC_T] = (test_sel < 3'(CCR_W)) ? ccr_q[test_sel] : 1'b0;
    end else if (flags_latch) begin
      ccr_d[CC_C] = flags.c;
      ccr_d[CC_V] = flags.v;
      ccr_d[CC_Z] = flags.z;
      ccr_d[CC_N] = flags.n;
      ccr_d[CC_L] = flags.n ^ flags.v;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ccr_q <= '0;
    else if (step_en) ccr_q <= ccr_d;
  end

endmodule
