// reg_file: object register file inside the OO-ASIP.
//
// Holds the fields of objects that the address mapping table places in
// registers instead of data memory (fast, small storage). Port A is the
// OMU's: one read or write per cycle, read data registered (available the
// cycle after the address). Port B lets the system load or inspect object
// state. When both ports write the same word in one cycle, port A wins.
// The register file and its link to the OMU follow the design's block
// diagram; the size, two ports and timing are this implementation's
// choices. Reset clears all registers.
module reg_file
  import ooasip_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A (OMU)
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  word_t             a_wdata,
  output word_t             a_rdata,
  // port B (system)
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  word_t             b_wdata,
  output word_t             b_rdata
);

  word_t regs_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs_q[i] <= '0;
      a_rdata <= '0;
      b_rdata <= '0;
    end else begin
      if (b_en && b_we) regs_q[b_addr] <= b_wdata;
      if (a_en && a_we) regs_q[a_addr] <= a_wdata;
      if (a_en) a_rdata <= regs_q[a_addr];
      if (b_en) b_rdata <= regs_q[b_addr];
    end
  end

endmodule
