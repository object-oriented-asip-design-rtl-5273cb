// vmt: Virtual Method Table of the OO-ASIP.
//
// A matrix with one row per class and one column per public method id.
// Each entry names the implementation of that method for that class:
// either a hardware functional unit (ishw = 1, fuid = FU number) or the
// start address of a software routine (ishw = 0, fuid = address). A
// derived class's row repeats its parent's except where it overrides or
// introduces methods. Rewriting an entry replaces a hardware method by a
// software one (or back) without touching the hardware.
// One combinational read port (used in the MIU's dispatch cycle), one
// synchronous write port; reset marks all entries invalid. The mapping
// (cid, mid) -> (ishw, FUid) follows the design description; sizes and
// the valid bit are this implementation's choices.
module vmt
  import ooasip_pkg::*;
#(
  parameter int unsigned NUM_CLASS = 2**CID_W,
  parameter int unsigned NUM_MID   = 2**MID_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cid_t       rd_cid,
  input  mid_t       rd_mid,
  output vmt_entry_t rd_entry,
  input  logic       wr_en,
  input  cid_t       wr_cid,
  input  mid_t       wr_mid,
  input  vmt_entry_t wr_entry
);

  vmt_entry_t table_q [NUM_CLASS][NUM_MID];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CLASS; c++)
        for (int m = 0; m < NUM_MID; m++) table_q[c][m] <= '0;
    end else if (wr_en) begin
      table_q[wr_cid][wr_mid] <= wr_entry;
    end
  end

  assign rd_entry = table_q[rd_cid][rd_mid];

endmodule
