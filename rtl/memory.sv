// memory: the word-addressed memory the processor runs from, for simulation.
//
// DEPTH words of W bits, one port shared by instruction fetch and LW/SW. On a rising
// clock edge with en high it writes wdata to addr when we is high, and copies the word at
// addr into the read latch rdata (the old word on a write). The address is taken modulo
// DEPTH. A second port (host_*) lets a test bench or loader write and read words while
// the processor is held in reset; it has priority over the processor port. The processor
// description uses such a memory with a read and a write latch only to simulate the
// processor; the depth of 65,536 words (the address space of the 16-bit processor this
// design grew from), the host port and the read-during-write behaviour are this design's
// choices. The array is not reset.
module memory #(
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [W-1:0]      addr,
  input  logic [W-1:0]      wdata,
  output logic [W-1:0]      rdata,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [W-1:0]      host_wdata,
  output logic [W-1:0]      host_rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) begin
      mem[host_addr] <= host_wdata;
    end else if (en && we) begin
      mem[addr[ADDR_W-1:0]] <= wdata;
    end
    if (en) rdata <= mem[addr[ADDR_W-1:0]];
  end

  assign host_rdata = mem[host_addr];

endmodule
