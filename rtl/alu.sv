// alu: the 32-bit arithmetic and logic unit of the EX stage.
//
// Purely combinational. It computes y = a op b for the operation chosen by the ALU
// control (op) and returns the N, Z, V, C flags that the condition code register latches
// for ALU instructions. a is the destination-register operand and b the source-register
// operand of a two-address instruction (rd <= rd op rs). The processor description names
// the ALU as the computing unit for ALU instructions; the operation list, the flag
// definitions (C is the carry out of ADD and "no borrow" for SUB, C and V are cleared by
// the logic operations, C is the last bit shifted out) and the use of only b[4:0] as a
// shift amount are this design's choices.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e         op,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic [W-1:0]    y,
  output alu_flags_t      flags
);

  localparam int unsigned SH_W = $clog2(W);

  logic [W:0]      sum;
  logic [SH_W-1:0] sh;

  assign sh = b[SH_W-1:0];

  always_comb begin
    sum     = '0;
    y       = '0;
    flags.c = 1'b0;
    flags.v = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum     = {1'b0, a} + {1'b0, b};
        y       = sum[W-1:0];
        flags.c = sum[W];
        flags.v = (a[W-1] == b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        sum     = {1'b0, a} + {1'b0, ~b} + {{W{1'b0}}, 1'b1};
        y       = sum[W-1:0];
        flags.c = sum[W];
        flags.v = (a[W-1] != b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOT:  y = ~b;
      ALU_SHL: begin
        y       = a << sh;
        flags.c = (sh != 0) ? a[W - int'(sh)] : 1'b0;
      end
      ALU_SHR: begin
        y       = a >> sh;
        flags.c = (sh != 0) ? a[int'(sh) - 1] : 1'b0;
      end
      ALU_SAR: begin
        y       = $signed(a) >>> sh;
        flags.c = (sh != 0) ? a[int'(sh) - 1] : 1'b0;
      end
      ALU_PASS: y = b;
      default:  y = '0;
    endcase
    flags.n = y[W-1];
    flags.z = (y == '0);
  end

endmodule
