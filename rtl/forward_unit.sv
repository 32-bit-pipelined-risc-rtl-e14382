// forward_unit: the two operand selectors in front of the ID inter-stage buffer.
//
// Combinational. For each of the two operands fetched from the register file (the
// destination-register value and the source-register value of the instruction in ID) it
// picks the newest copy of that register: the result being produced this step by the
// instruction in EX, else the result held by the instruction in MEM (for LW, the word
// just read from memory), else the register file value. The WR stage writes the register
// file before ID reads it in the same step, so WR needs no path. fwd_* report which
// operand took which path. That the selectors implement operand forwarding by choosing
// between the fetched operands and in-flight results follows the processor description;
// the exact set of sources and their priority are this design's choices.
module forward_unit #(
  parameter int unsigned W      = 32,
  parameter int unsigned ADDR_W = 8
) (
  input  logic [ADDR_W-1:0] raddr_d,
  input  logic [ADDR_W-1:0] raddr_s,
  input  logic [W-1:0]      rf_dst,
  input  logic [W-1:0]      rf_src,
  input  logic              ex_we,
  input  logic [ADDR_W-1:0] ex_waddr,
  input  logic [W-1:0]      ex_wdata,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_waddr,
  input  logic [W-1:0]      mem_wdata,
  output logic [W-1:0]      dst_data,
  output logic [W-1:0]      src_data,
  output logic              fwd_dst_ex,
  output logic              fwd_dst_mem,
  output logic              fwd_src_ex,
  output logic              fwd_src_mem
);

  always_comb begin
    fwd_dst_ex  = ex_we  && (ex_waddr  == raddr_d);
    fwd_dst_mem = !fwd_dst_ex && mem_we && (mem_waddr == raddr_d);
    fwd_src_ex  = ex_we  && (ex_waddr  == raddr_s);
    fwd_src_mem = !fwd_src_ex && mem_we && (mem_waddr == raddr_s);

    dst_data = fwd_dst_ex ? ex_wdata : fwd_dst_mem ? mem_wdata : rf_dst;
    src_data = fwd_src_ex ? ex_wdata : fwd_src_mem ? mem_wdata : rf_src;
  end

endmodule
