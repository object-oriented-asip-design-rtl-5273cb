// tb_fu_b_f: self-checking test of the B::f() functional unit.
// The testbench plays the MIU (four-phase START/DONE) and the OMU (a field
// store indexed by oid and field number that acks each request one cycle
// after it appears, like the real OMU). For random objects it checks that
// field 0 is increased by the int argument, that no other field changes, that the read is
// locked and the write unlocked, and the START-to-DONE latency.
module tb_fu_b_f;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fu_cmd_t cmd;
  fu_sts_t sts;
  omu_req_t omu_req;
  omu_rsp_t omu_rsp;
  int checks = 0, failures = 0;
  word_t store [16][16];
  localparam int LATENCY = 5;   // cycles from START to DONE with 1-cycle acks

  fu_b_f dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // OMU model: ack one cycle after a request is seen.
  logic pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 0; omu_rsp <= '0;
    end else begin
      omu_rsp.ack <= 1'b0;
      if (omu_req.req && !pend && !omu_rsp.ack) begin
        pend <= 1;
        if (omu_req.we) store[omu_req.oid][omu_req.idx] <= omu_req.wdata;
        omu_rsp.rdata <= store[omu_req.oid][omu_req.idx];
        omu_rsp.ack <= 1'b1;
        // B::f must lock its read and release with its write.
        checks++;
        if (omu_req.lock == omu_req.we || omu_req.idx != 0) begin
          failures++; $display("FAIL access lock=%0b we=%0b idx=%0d", omu_req.lock, omu_req.we, omu_req.idx);
        end
      end else pend <= 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t snap [16][16];
    oid_t o;
    word_t arg;
    int cyc;
    cmd = '0;
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) store[i][j] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sts.status == ST_RESET && !sts.call_req, "idle status");
    for (int n = 0; n < 50; n++) begin
      o = oid_t'($urandom);
      snap = store;
      @(negedge clk);
      cmd.command = CMD_START; cmd.oid = o; arg = $urandom; cmd.arg = arg;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (sts.status != ST_DONE && cyc < 100);
      check(cyc == LATENCY, $sformatf("latency %0d", cyc));
      check(sts.call_req == 0, "no call");
      cmd.command = CMD_IDLE; cmd.oid = oid_t'($urandom);
      @(negedge clk); @(negedge clk);
      check(sts.status == ST_RESET, "back to reset");
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          check(store[i][j] == ((i == int'(o) && j == 0) ? snap[i][j] + arg : snap[i][j]),
                $sformatf("field %0d.%0d", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
