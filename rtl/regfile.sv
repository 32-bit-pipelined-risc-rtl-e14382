// regfile: the register file, 256 words of 32 bits addressed by 8-bit register numbers.
//
// One write port and two read ports. A write request (we, waddr, wdata) is latched on the
// rising clock edge while wen_phase is high; in the core that is the first clock of every
// pipeline step, when the WR stage (or the interrupt control) writes. The two read ports
// are registered: on a clock with ren_phase high the words at raddr_d and raddr_s are
// copied into dst_q and src_q, the two registers that hold the fetched operands before the
// ID selectors. A read in a later clock of the same step therefore sees the write of that
// step. The size (256 words, 8-bit addresses) follows the processor description; the
// phase-enabled write and registered reads are this design's reading of its "latch for
// write requests" and of the two operand registers. Registers reset to zero.
module regfile #(
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wen_phase,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [W-1:0]      wdata,
  input  logic              ren_phase,
  input  logic [ADDR_W-1:0] raddr_d,
  input  logic [ADDR_W-1:0] raddr_s,
  output logic [W-1:0]      dst_q,
  output logic [W-1:0]      src_q
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (wen_phase && we) begin
      regs[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst_q <= '0;
      src_q <= '0;
    end else if (ren_phase) begin
      dst_q <= regs[raddr_d];
      src_q <= regs[raddr_s];
    end
  end

endmodule
