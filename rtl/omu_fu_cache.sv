// omu_fu_cache: one FU's private field cache inside the OMU.
//
// Every FU's requests pass through its own small cache before they reach
// the OMU arbiter. The cache holds recently read object fields, tagged by
// (oid, field index). A plain read (lock = 0) that hits is answered in the
// same cycle (ack combinational with the request), without arbitration and
// without touching the register file or data memory. Everything else goes
// to the arbiter unchanged: misses, writes (write-through), and locked
// reads, which must win the OMU to take the lock. A read answered by the
// arbiter fills an entry (round-robin replacement). arb_req carries the
// FU's request fields unchanged; only its req bit is gated by a hit.
//
// Coherency is kept by update snooping: when any FU's write completes, the
// OMU broadcasts (oid, idx, data) to all caches and every entry holding
// that field takes the new value, so no cache ever returns a value older
// than the last completed write. 'flush' invalidates everything; the OMU
// raises it when the mapping table changes and the system raises it when
// it writes object storage directly. Two objects mapped to overlapping
// storage would alias unseen, since tags are (oid, idx), not addresses.
//
// That the OMU has per-FU caches and keeps them coherent follows the
// design description; size, tags, policy and protocol are this design's.
module omu_fu_cache
  import ooasip_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // FU side
  input  omu_req_t fu_req,
  output omu_rsp_t fu_rsp,
  // arbiter side
  output omu_req_t arb_req,
  input  omu_rsp_t arb_rsp,
  // coherency
  input  logic     snoop_we,
  input  oid_t     snoop_oid,
  input  fidx_t    snoop_idx,
  input  word_t    snoop_data,
  input  logic     flush,
  // statistics
  output logic     hit
);

  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic  valid;
    oid_t  oid;
    fidx_t idx;
    word_t data;
  } line_t;

  line_t          line_q [ENTRIES];
  logic [EW-1:0]  victim_q;
  logic           lookup_hit;
  word_t          lookup_data;

  always_comb begin
    lookup_hit  = 1'b0;
    lookup_data = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (line_q[i].valid && line_q[i].oid == fu_req.oid && line_q[i].idx == fu_req.idx) begin
        lookup_hit  = 1'b1;
        lookup_data = line_q[i].data;
      end
    end
  end

  assign hit = fu_req.req && !fu_req.we && !fu_req.lock && lookup_hit && !flush;

  always_comb begin
    arb_req     = fu_req;
    arb_req.req = fu_req.req && !hit;
    if (hit) begin
      fu_rsp = '{ack: 1'b1, err: 1'b0, rdata: lookup_data};
    end else begin
      fu_rsp = arb_rsp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) line_q[i] <= '0;
      victim_q <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) line_q[i].valid <= 1'b0;
    end else begin
      // snooped writes update every copy (own writes included)
      if (snoop_we) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (line_q[i].valid && line_q[i].oid == snoop_oid && line_q[i].idx == snoop_idx)
            line_q[i].data <= snoop_data;
        end
      end
      // fill on a read answered by the arbiter (no write completes in that cycle)
      if (arb_rsp.ack && !arb_rsp.err && !fu_req.we && !lookup_hit) begin
        line_q[victim_q] <= '{valid: 1'b1, oid: fu_req.oid, idx: fu_req.idx, data: arb_rsp.rdata};
        victim_q <= (int'(victim_q) == ENTRIES - 1) ? '0 : victim_q + 1'b1;
      end
    end
  end

endmodule
