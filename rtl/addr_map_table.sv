// addr_map_table: the OMU's address mapping table.
//
// Maps an object identifier to where the object's fields are stored:
// in the OO-ASIP register file (in_rf = 1) or in external data memory
// (in_rf = 0), starting at word address 'base'. Field i of the object is
// at base + i. The OMU reads it combinationally in the cycle it grants an
// access; it is rewritten, like the OTT and VMT, when objects are
// allocated or freed. Reset marks every object unmapped. That the OMU
// holds such a table, and that allocation updates it, follows the design
// description; the entry format is this implementation's choice.
module addr_map_table
  import ooasip_pkg::*;
#(
  parameter int unsigned NUM_OBJ = 2**OID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  oid_t       rd_oid,
  output map_entry_t rd_entry,
  input  logic       wr_en,
  input  oid_t       wr_oid,
  input  map_entry_t wr_entry
);

  map_entry_t table_q [NUM_OBJ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_OBJ; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_oid] <= wr_entry;
    end
  end

  assign rd_entry = table_q[rd_oid];

endmodule
