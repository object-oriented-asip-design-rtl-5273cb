// ott: Object Type Table of the OO-ASIP.
//
// Maps every object identifier to the class it currently belongs to
// (oid -> cid). The MIU reads it on every method call to bind the call
// dynamically; it is rewritten when objects are allocated or freed.
// One combinational read port (the lookup happens in the MIU's dispatch
// cycle) and one synchronous write port. Reset clears every entry to
// "not allocated". Keeping the table inside the processor rather than as
// a tag in object storage, and its role, follow the design description;
// the size (16 objects), the valid bit and the port timing are this
// implementation's choices.
module ott
  import ooasip_pkg::*;
#(
  parameter int unsigned NUM_OBJ = 2**OID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  // lookup
  input  oid_t       rd_oid,
  output ott_entry_t rd_entry,
  // update on (de)allocation
  input  logic       wr_en,
  input  oid_t       wr_oid,
  input  ott_entry_t wr_entry
);

  ott_entry_t table_q [NUM_OBJ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_OBJ; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_oid] <= wr_entry;
    end
  end

  assign rd_entry = table_q[rd_oid];

endmodule
