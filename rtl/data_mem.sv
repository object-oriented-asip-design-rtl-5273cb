// data_mem: data memory holding object attributes.
//
// Objects that do not live in the register file are stored here, one
// 32-bit field per word; a derived object keeps its inherited fields
// first and its own after them. Port A is driven by the OO-ASIP's OMU
// (physical address, data and control bus), port B by the rest of the
// system. Each port does one read or write per cycle with the read word
// available the cycle after the address (synchronous SRAM behaviour).
// If both ports write one word in the same cycle, port A wins. The memory
// itself comes from the design's block diagram; size, ports and timing
// are this implementation's choices. The array is not reset.
module data_mem
  import ooasip_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  word_t             a_wdata,
  output word_t             a_rdata,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  word_t             b_wdata,
  output word_t             b_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
