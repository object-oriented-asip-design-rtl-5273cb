// omu: Object Management Unit of the OO-ASIP.
//
// Functional units never address storage directly: they ask the OMU for
// field 'idx' of object 'oid'. The OMU arbitrates between the FUs (all
// share the object storage), looks the object up in its address mapping
// table, and turns the request into a physical access to the register
// file or the data memory at base + idx. It also offers the locking the
// FUs need for atomic updates: a granted request with lock = 1 keeps the
// OMU reserved for that FU, so nobody else is granted until the same FU
// makes an access with lock = 0 (its last access of the atomic sequence).
// Whether to lock is the FU designer's choice; the OMU does not check for
// races.
//
// Timing: an access that misses the FU's cache takes two cycles. In the
// grant cycle the winner's request drives the storage port; in the next
// cycle the OMU pulses ack to that FU, with the read word. A cache hit is
// acked in the request's own cycle. An FU holds req and its fields until
// ack.
// An access to an unmapped object is not performed and is acked with
// err = 1. Arbitration among unlocked requesters is round robin.
//
// From the design: the OMU's place between FUs and storage, its mapping
// table, shared-resource synchronisation and the locking facility. This
// implementation's choices: the handshake, round robin, two-cycle timing.
// Each FU's requests first pass its private cache (omu_fu_cache): plain
// reads that hit are answered at once without arbitration. Completed
// writes are broadcast to all caches (update snooping) so they stay
// coherent; a mapping-table write or the flush input clears them all.
module omu
  import ooasip_pkg::*;
#(
  parameter int unsigned N_FU     = NUM_FU,
  parameter int unsigned RF_AW    = 4,
  parameter int unsigned DMEM_AW  = 8,
  parameter int unsigned CACHE_ENTRIES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  omu_req_t         fu_req [N_FU],
  output omu_rsp_t         fu_rsp [N_FU],
  // mapping table update (object allocation)
  input  logic             map_wr_en,
  input  oid_t             map_wr_oid,
  input  map_entry_t       map_wr_entry,
  // register file port
  output logic             rf_en,
  output logic             rf_we,
  output logic [RF_AW-1:0] rf_addr,
  output word_t            rf_wdata,
  input  word_t            rf_rdata,
  // data memory port
  output logic               dm_en,
  output logic               dm_we,
  output logic [DMEM_AW-1:0] dm_addr,
  output word_t              dm_wdata,
  input  word_t              dm_rdata,
  // cache control: invalidate every FU cache (storage written directly)
  input  logic             flush,
  // observation
  output logic             locked,
  output logic [N_FU-1:0]  cache_hit
);

  localparam int unsigned SEL_W = (N_FU > 1) ? $clog2(N_FU) : 1;

  typedef enum logic {S_GRANT, S_RESP} state_e;

  state_e             state_q;
  logic [SEL_W-1:0]   sel_q, rr_q, owner_q;
  logic               lock_q;
  logic               err_q, in_rf_q;
  logic               we_q;
  oid_t               oid_q;
  fidx_t              idx_q;
  word_t              wdata_q;
  omu_req_t           creq [N_FU];   // requests after the FU caches
  omu_rsp_t           crsp [N_FU];
  logic               snoop_we;

  logic               grant;
  logic [SEL_W-1:0]   win;
  omu_req_t           wreq;
  oid_t               map_rd_oid;
  map_entry_t         map_rd;
  logic [7:0]         paddr;

  addr_map_table #(.NUM_OBJ(2**OID_W)) u_map (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_oid  (map_rd_oid),
    .rd_entry(map_rd),
    .wr_en   (map_wr_en),
    .wr_oid  (map_wr_oid),
    .wr_entry(map_wr_entry)
  );

  // Per-FU caches in front of the arbiter; completed writes are snooped.
  assign snoop_we = (state_q == S_RESP) && we_q && !err_q;

  for (genvar i = 0; i < N_FU; i++) begin : g_cache
    omu_fu_cache #(.ENTRIES(CACHE_ENTRIES)) u_cache (
      .clk       (clk),
      .rst_n     (rst_n),
      .fu_req    (fu_req[i]),
      .fu_rsp    (fu_rsp[i]),
      .arb_req   (creq[i]),
      .arb_rsp   (crsp[i]),
      .snoop_we  (snoop_we),
      .snoop_oid (oid_q),
      .snoop_idx (idx_q),
      .snoop_data(wdata_q),
      .flush     (flush || map_wr_en),
      .hit       (cache_hit[i])
    );
  end

  // Arbitration: the lock owner only, else round robin from rr_q.
  always_comb begin
    int unsigned j;
    j     = 0;
    grant = 1'b0;
    win   = '0;
    if (state_q == S_GRANT) begin
      if (lock_q) begin
        grant = creq[owner_q].req;
        win   = owner_q;
      end else begin
        for (int k = N_FU - 1; k >= 0; k--) begin
          j = (int'(rr_q) + k) % N_FU;
          if (creq[j].req) begin
            grant = 1'b1;
            win   = SEL_W'(j);
          end
        end
      end
    end
  end

  assign wreq       = creq[win];
  assign map_rd_oid = wreq.oid;
  assign paddr      = map_rd.base + 8'(wreq.idx);

  always_comb begin
    rf_en    = grant && map_rd.valid && map_rd.in_rf;
    dm_en    = grant && map_rd.valid && !map_rd.in_rf;
    rf_we    = wreq.we;
    dm_we    = wreq.we;
    rf_addr  = paddr[RF_AW-1:0];
    dm_addr  = DMEM_AW'(paddr);
    rf_wdata = wreq.wdata;
    dm_wdata = wreq.wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_GRANT;
      sel_q   <= '0;
      rr_q    <= '0;
      owner_q <= '0;
      lock_q  <= 1'b0;
      err_q   <= 1'b0;
      in_rf_q <= 1'b0;
      we_q    <= 1'b0;
      oid_q   <= '0;
      idx_q   <= '0;
      wdata_q <= '0;
    end else begin
      case (state_q)
        S_GRANT: if (grant) begin
          state_q <= S_RESP;
          sel_q   <= win;
          err_q   <= !map_rd.valid;
          in_rf_q <= map_rd.in_rf;
          we_q    <= wreq.we;
          oid_q   <= wreq.oid;
          idx_q   <= wreq.idx;
          wdata_q <= wreq.wdata;
          lock_q  <= wreq.lock && map_rd.valid;
          owner_q <= win;
          rr_q    <= (int'(win) == N_FU - 1) ? '0 : win + 1'b1;
        end
        S_RESP: state_q <= S_GRANT;
        default: state_q <= S_GRANT;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < N_FU; i++) begin
      crsp[i].ack   = (state_q == S_RESP) && (int'(sel_q) == i);
      crsp[i].err   = err_q;
      crsp[i].rdata = in_rf_q ? rf_rdata : dm_rdata;
    end
  end

  assign locked = lock_q;

  // Handshake rules: an ack only answers a pending request, and a request
  // stays up (unchanged) until it is acknowledged.
  for (genvar i = 0; i < N_FU; i++) begin : g_chk
    a_ack_has_req : assert property (@(posedge clk) disable iff (!rst_n)
      fu_rsp[i].ack |-> fu_req[i].req);
    a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
      (fu_req[i].req && !fu_rsp[i].ack) |=> (fu_req[i].req && $stable(fu_req[i].oid)
                                             && $stable(fu_req[i].idx) && $stable(fu_req[i].we)));
  end

endmodule
