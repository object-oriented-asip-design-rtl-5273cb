// instr_mem: instruction memory of the OO-ASIP.
//
// Byte-wide memory holding the software: JVM-subset bytecode whose
// method-call instructions name hardware or software methods. The MIU
// executes one instruction per clock and needs the opcode byte and the
// following operand byte together, so there are two combinational read
// ports (opcode at pc, operand at pc+1, wrapping). A synchronous write
// port loads the program (in a product this would be flash/ROM). Its
// existence and role come from the design; the byte width follows the
// JVM, the size and ports are this implementation's choices.
module instr_mem
  import ooasip_pkg::*;
#(
  parameter int unsigned DEPTH = 2**PC_W
) (
  input  logic       clk,
  input  pc_t        rd_addr0,
  output logic [7:0] rd_data0,
  input  pc_t        rd_addr1,
  output logic [7:0] rd_data1,
  input  logic       wr_en,
  input  pc_t        wr_addr,
  input  logic [7:0] wr_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data0 = mem[rd_addr0];
  assign rd_data1 = mem[rd_addr1];

endmodule
