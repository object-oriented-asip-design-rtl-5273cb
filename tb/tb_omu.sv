// tb_omu: self-checking test of the Object Management Unit.
// Three requester processes (standing in for FUs) hammer the OMU at once
// with random reads, writes and locked read-modify-write increments on
// objects mapped to the register file, to data memory, and unmapped. The
// OMU drives the real register file and data memory. Checked: read data
// against a reference store, the physical placement of fields (read back
// through the memories' second ports), err on unmapped objects, no grant
// to anyone else while a lock is held, every increment kept (atomicity),
// every requester served, the two-cycle latency of a miss, the
// same-cycle answer of a cache hit, coherency of a cached copy after
// another requester writes, and invalidation by flush.
module tb_omu;
  import ooasip_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  omu_req_t fu_req [N];
  omu_rsp_t fu_rsp [N];
  logic map_wr_en;
  oid_t map_wr_oid;
  map_entry_t map_wr_entry;
  logic rf_en, rf_we, dm_en, dm_we, locked, flush;
  logic [N-1:0] cache_hit;
  logic db_we;
  word_t db_wdata;
  int n_hits = 0;
  logic [3:0] rf_addr;
  logic [7:0] dm_addr;
  word_t rf_wdata, rf_rdata, dm_wdata, dm_rdata;
  logic rb_en, db_en;
  logic [3:0] rb_addr;
  logic [7:0] db_addr;
  word_t rb_rdata, db_rdata;
  int checks = 0, failures = 0;
  word_t ref_s [16][4];
  map_entry_t map_ref [16];
  int incs [16][4];
  int served [N];
  int lock_owner = -1;
  int lock_blocks = 0;

  omu dut (.*);
  reg_file u_rf (.clk, .rst_n, .a_en(rf_en), .a_we(rf_we), .a_addr(rf_addr), .a_wdata(rf_wdata),
                 .a_rdata(rf_rdata), .b_en(rb_en), .b_we(1'b0), .b_addr(rb_addr),
                 .b_wdata('0), .b_rdata(rb_rdata));
  data_mem u_dm (.clk, .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_wdata(dm_wdata),
                 .a_rdata(dm_rdata), .b_en(db_en), .b_we(db_we), .b_addr(db_addr),
                 .b_wdata(db_wdata), .b_rdata(db_rdata));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Lock monitor: while requester k holds the lock nobody else is acked.
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (cache_hit[i]) n_hits++;
    for (int i = 0; i < N; i++) if (fu_rsp[i].ack && !cache_hit[i]) begin
      if (lock_owner >= 0 && lock_owner != i) begin
        failures++; $display("FAIL ack to %0d while %0d holds the lock", i, lock_owner);
      end
      if (!fu_rsp[i].err) lock_owner = fu_req[i].lock ? i : -1;
    end
    if (lock_owner >= 0)
      for (int i = 0; i < N; i++) if (i != lock_owner && fu_req[i].req) lock_blocks++;
  end

  // One access; returns read data and err, checks latency when alone.
  task automatic access(input int k, input logic we, lock, input oid_t o, input fidx_t idx,
                        input word_t wd, output word_t rd, output logic err);
    int cyc = 0;
    @(negedge clk);
    fu_req[k] = '{req: 1'b1, lock: lock, we: we, oid: o, idx: idx, wdata: wd};
    do begin @(posedge clk); #1; cyc++; end while (!fu_rsp[k].ack);
    rd = fu_rsp[k].rdata; err = fu_rsp[k].err;
    served[k]++;
    @(posedge clk);            // ack is consumed at this edge, like an FU
    fu_req[k].req = 1'b0;
  endtask

  task automatic requester(input int k, input int n_ops);
    word_t rd, nv;
    logic err;
    oid_t o;
    fidx_t idx;
    for (int n = 0; n < n_ops; n++) begin
      o = oid_t'($urandom);
      idx = fidx_t'($urandom % 4);
      case ($urandom % 3)
        0: begin   // plain read
          access(k, 1'b0, 1'b0, o, idx, '0, rd, err);
          check(err == !map_ref[o].valid, $sformatf("err flag oid %0d", o));
          if (!err) check(rd == ref_s[o][idx], $sformatf("read %0d.%0d got %h exp %h", o, idx, rd, ref_s[o][idx]));
        end
        1: begin   // plain write
          nv = $urandom;
          access(k, 1'b1, 1'b0, o, idx, nv, rd, err);
          check(err == !map_ref[o].valid, "err flag on write");
          if (!err) begin ref_s[o][idx] = nv; incs[o][idx] = 0; end
        end
        default: begin   // atomic increment, shared field 0 of objects 0..3 and 8..9
          o = ($urandom % 2) ? oid_t'($urandom % 4) : oid_t'(8 + $urandom % 2);
          access(k, 1'b0, 1'b1, o, 0, '0, rd, err);
          access(k, 1'b1, 1'b0, o, 0, rd + 1, nv, err);
          ref_s[o][0] = ref_s[o][0] + 1;
        end
      endcase
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t rd;
    logic err;
    int t0;
    for (int i = 0; i < N; i++) begin fu_req[i] = '0; served[i] = 0; end
    flush = 0; db_we = 0; db_wdata = '0;
    map_wr_en = 0; map_wr_oid = '0; map_wr_entry = '0; rb_en = 0; db_en = 0; rb_addr = '0; db_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // objects 0..7 in data memory at 16*i+3, 8..11 in the register file at 4*(i-8), 12..15 unmapped
    for (int i = 0; i < 16; i++) begin
      map_ref[i] = (i < 8)  ? '{valid: 1'b1, in_rf: 1'b0, base: 8'(16 * i + 3)} :
                   (i < 12) ? '{valid: 1'b1, in_rf: 1'b1, base: 8'(4 * (i - 8))} : '0;
      @(negedge clk); map_wr_en = 1; map_wr_oid = oid_t'(i); map_wr_entry = map_ref[i];
    end
    @(negedge clk); map_wr_en = 0;
    // initialise every mapped field through the OMU, checking the latency
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 4; j++) begin
        ref_s[i][j] = $urandom;
        t0 = 0;
        fork
          begin access(0, 1'b1, 1'b0, oid_t'(i), fidx_t'(j), ref_s[i][j], rd, err); end
          begin @(negedge clk); while (!fu_rsp[0].ack) begin @(posedge clk); #1; t0++; end end
        join
        check(t0 == 1, $sformatf("latency %0d", t0));
      end
    // placement: read the memories behind the OMU's back
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        if (i < 8) begin db_en = 1; db_addr = 8'(16 * i + 3 + j); end
        else begin rb_en = 1; rb_addr = 4'(4 * (i - 8) + j); end
        @(negedge clk); db_en = 0; rb_en = 0;
        check(((i < 8) ? db_rdata : rb_rdata) == ref_s[i][j], $sformatf("placement %0d.%0d", i, j));
      end
    fork
      requester(0, 300);
      requester(1, 300);
      requester(2, 300);
    join
    // final contents
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 4; j++) begin
        access(0, 1'b0, 1'b0, oid_t'(i), fidx_t'(j), '0, rd, err);
        check(rd == ref_s[i][j], $sformatf("final %0d.%0d got %h exp %h", i, j, rd, ref_s[i][j]));
      end
    // cache: a repeated plain read hits and is acked in its own cycle
    access(0, 1'b0, 1'b0, 5, 2, '0, rd, err);
    @(negedge clk);
    fu_req[0] = '{req: 1'b1, lock: 1'b0, we: 1'b0, oid: 5, idx: 2, wdata: '0};
    #1 check(fu_rsp[0].ack && cache_hit[0] && fu_rsp[0].rdata == ref_s[5][2], "read hit acked at once");
    @(posedge clk); fu_req[0].req = 1'b0;
    // coherency: another requester's write updates the cached copy
    access(1, 1'b1, 1'b0, 5, 2, 32'hc0ffee01, rd, err);
    ref_s[5][2] = 32'hc0ffee01;
    @(negedge clk);
    fu_req[0] = '{req: 1'b1, lock: 1'b0, we: 1'b0, oid: 5, idx: 2, wdata: '0};
    #1 check(fu_rsp[0].ack && cache_hit[0] && fu_rsp[0].rdata == 32'hc0ffee01, "cached copy updated by another FU's write");
    @(posedge clk); fu_req[0].req = 1'b0;
    // flush: storage written behind the OMU's back, caches flushed, next read misses
    @(negedge clk); db_en = 1; db_we = 1; db_addr = 8'(16 * 5 + 3 + 2); db_wdata = 32'h5eed5eed; flush = 1;
    @(negedge clk); db_en = 0; db_we = 0; flush = 0;
    ref_s[5][2] = 32'h5eed5eed;
    @(negedge clk);
    fu_req[0] = '{req: 1'b1, lock: 1'b0, we: 1'b0, oid: 5, idx: 2, wdata: '0};
    #1 check(!fu_rsp[0].ack && !cache_hit[0], "miss after flush");
    @(posedge clk); #1 check(fu_rsp[0].ack && fu_rsp[0].rdata == 32'h5eed5eed, "new value after flush");
    @(posedge clk); fu_req[0].req = 1'b0;
    check(n_hits > 0, "cache hits happened");
    $display("cache hits %0d", n_hits);
    for (int i = 0; i < N; i++) check(served[i] >= 300, $sformatf("requester %0d served", i));
    check(lock_blocks > 0, "lock held off another requester at least once");
    $display("lock blocked other requesters %0d times", lock_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
