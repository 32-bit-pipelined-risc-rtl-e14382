// phase_fsm: the four-state control state machine that paces the pipeline.
//
// States RESET, P1, P2, P3. RESET is the state after reset; the machine then cycles
// P1 -> P2 -> P3 -> P1 for ever, so every pipeline step lasts three clock cycles and all
// five stages complete together at the end of P3. The core uses the phases as follows:
//   P1  memory access (instruction fetch or LW/SW) and register-file write by WR
//   P2  register-file read into the two operand registers
//   P3  every inter-stage buffer, the PC, the CCR and the predictor update (step_en)
// A four-state machine starting in a reset state and a three-clock stage time follow the
// processor description; what happens in which phase is this design's choice.
module phase_fsm (
  input  logic clk,
  input  logic rst_n,
  output logic ph1,
  output logic ph2,
  output logic ph3
);

  typedef enum logic [1:0] {S_RESET, S_P1, S_P2, S_P3} state_e;

  state_e state, next;

  always_comb begin
    unique case (state)
      S_RESET: next = S_P1;
      S_P1:    next = S_P2;
      S_P2:    next = S_P3;
      S_P3:    next = S_P1;
      default: next = S_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_RESET;
    else        state <= next;
  end

  assign ph1 = (state == S_P1);
  assign ph2 = (state == S_P2);
  assign ph3 = (state == S_P3);

endmodule
