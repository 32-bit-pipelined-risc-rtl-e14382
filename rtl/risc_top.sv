// risc_top: the 32-bit pipelined RISC processor with the memory it runs from.
//
// risc_cpu and a single-port word-addressed memory, shared by instruction fetch and
// LW/SW. Programs and data are placed in memory through the host port while rst_n is low
// and read back the same way; int_vector[31] requests an interrupt to the address in
// int_vector[30:0] (sign-extended), acknowledged by a one-clock int_ack pulse. Every
// pipeline step takes three clocks. MEM_ADDR_W sets the memory size (2**MEM_ADDR_W
// words), BP_ENTRIES the number of two-bit predictor counters; both sizes are this
// design's choices.
module risc_top
  import risc_pkg::*;
#(
  parameter int unsigned MEM_ADDR_W = 16,
  parameter int unsigned BP_ENTRIES = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [XLEN-1:0]       int_vector,
  output logic                  int_ack,
  input  logic                  host_we,
  input  logic [MEM_ADDR_W-1:0] host_addr,
  input  logic [XLEN-1:0]       host_wdata,
  output logic [XLEN-1:0]       host_rdata
);

  logic            mem_en, mem_we;
  logic [XLEN-1:0] mem_addr, mem_wdata, mem_rdata;

  risc_cpu #(.BP_ENTRIES(BP_ENTRIES)) u_cpu (
    .clk, .rst_n,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .int_vector, .int_ack
  );

  memory #(.W(XLEN), .ADDR_W(MEM_ADDR_W)) u_mem (
    .clk,
    .en (mem_en), .we (mem_we), .addr (mem_addr), .wdata (mem_wdata), .rdata (mem_rdata),
    .host_we, .host_addr, .host_wdata, .host_rdata
  );

endmodule
