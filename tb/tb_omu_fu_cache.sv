// tb_omu_fu_cache: self-checking test of one FU's field cache.
// The testbench drives the FU side with random plain reads, locked reads
// and writes on a few fields, plays the arbiter behind the cache (answers
// one cycle after a forwarded request from a reference store) and also
// injects snooped writes from other FUs and flushes. Checked: every answer
// equals the reference store, hits are answered in the request's cycle
// and never forwarded, writes and locked reads are always forwarded, and
// hits do happen.
module tb_omu_fu_cache;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  omu_req_t fu_req, arb_req;
  omu_rsp_t fu_rsp, arb_rsp;
  logic snoop_we, flush, hit;
  oid_t snoop_oid;
  fidx_t snoop_idx;
  word_t snoop_data;
  int checks = 0, failures = 0, hits = 0, fwd = 0;
  word_t ref_s [4][4];

  omu_fu_cache dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // arbiter model: ack one cycle after a forwarded request; a write is
  // applied and snooped back to the cache in its ack cycle, like the OMU.
  logic busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin busy <= 0; arb_rsp <= '0; end
    else begin
      arb_rsp.ack <= 1'b0;
      if (arb_req.req && !busy && !arb_rsp.ack) begin
        busy <= 1;
        arb_rsp.ack <= 1'b1;
        arb_rsp.rdata <= ref_s[arb_req.oid[1:0]][arb_req.idx[1:0]];
        if (arb_req.we) ref_s[arb_req.oid[1:0]][arb_req.idx[1:0]] <= arb_req.wdata;
      end else busy <= 0;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp;
    logic lk, we;
    oid_t o;
    fidx_t x;
    int cyc;
    fu_req = '0; snoop_we = 0; snoop_oid = '0; snoop_idx = '0; snoop_data = '0; flush = 0;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) ref_s[i][j] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case ($urandom % 10)
        0: begin   // another FU's write, snooped
          o = oid_t'($urandom % 4); x = fidx_t'($urandom % 4);
          snoop_oid = o; snoop_idx = x; snoop_data = $urandom; snoop_we = 1;
          ref_s[o][x] = snoop_data;
          @(negedge clk); snoop_we = 0;
        end
        1: begin flush = 1; @(negedge clk); flush = 0; end
        default: begin
          we = ($urandom % 4 == 0); lk = !we && ($urandom % 4 == 0);
          o = oid_t'($urandom % 4); x = fidx_t'($urandom % 4);
          fu_req = '{req: 1'b1, lock: lk, we: we, oid: o, idx: x, wdata: $urandom};
          exp = ref_s[o][x];
          #1;
          if (fu_rsp.ack) begin
            hits++;
            check(!we && !lk && hit && !arb_req.req, "only plain reads hit, and are not forwarded");
            check(fu_rsp.rdata == exp, $sformatf("hit data %h exp %h", fu_rsp.rdata, exp));
            @(posedge clk);
          end else begin
            fwd++;
            check(arb_req.req && arb_req == fu_req, "miss forwarded unchanged");
            cyc = 0;
            while (!fu_rsp.ack && cyc < 10) begin @(posedge clk); #1; cyc++; end
            check(fu_rsp.ack && cyc == 1, "forwarded access answered");
            if (!we) check(fu_rsp.rdata == exp, $sformatf("miss data %h exp %h", fu_rsp.rdata, exp));
            // own write completes: snoop it into the cache as the OMU would
            if (we) begin snoop_we = 1; snoop_oid = o; snoop_idx = x; snoop_data = fu_req.wdata; end
            @(posedge clk);
            #1 snoop_we = 0;
          end
          fu_req.req = 1'b0;
        end
      endcase
    end
    check(hits > 100, $sformatf("hits happened (%0d)", hits));
    $display("hits %0d forwarded %0d", hits, fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
