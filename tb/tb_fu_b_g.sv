// tb_fu_b_g: self-checking test of the B::g() functional unit.
// The testbench plays the OMU (one-cycle acks on a field store) and the
// MIU: it gives START, answers the FU's method-call request after a random
// delay with a one-cycle call_ack, and drops START after DONE. Checks:
// field 1 incremented and nothing else changed, plain read of field 0
// then locked read / unlocked write of field 1, the call names f() on the
// same object with field 0 plus the new field-1 value, DONE never comes before call_ack, and the cycle count.
module tb_fu_b_g;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fu_cmd_t cmd;
  fu_sts_t sts;
  omu_req_t omu_req;
  omu_rsp_t omu_rsp;
  int checks = 0, failures = 0;
  word_t store [16][16];

  fu_b_g dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

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
        checks++;
        if (omu_req.idx == 0 ? (omu_req.lock || omu_req.we) : (omu_req.lock == omu_req.we || omu_req.idx != 1)) begin
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
    int cyc, dly;
    cmd = '0;
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) store[i][j] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      o = oid_t'($urandom);
      snap = store;
      dly = 1 + int'($urandom % 6);
      @(negedge clk);
      cmd.command = CMD_START; cmd.oid = o; cmd.arg = $urandom;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!sts.call_req && cyc < 100);
      check(cyc == 7, $sformatf("call after %0d cycles", cyc));
      check(sts.call_mid == MID_F && sts.call_oid == o && sts.call_arg == snap[o][0] + snap[o][1] + 1, "call operands");
      check(sts.status == ST_STARTED, "started while calling");
      repeat (dly) begin
        @(negedge clk);
        check(sts.status != ST_DONE && sts.call_req, "waits for call_ack");
      end
      cmd.call_ack = 1; @(negedge clk); cmd.call_ack = 0;
      check(!sts.call_req, "call dropped after ack");
      @(negedge clk);
      check(sts.status == ST_DONE, "done after ack");
      cmd.command = CMD_IDLE;
      @(negedge clk); @(negedge clk);
      check(sts.status == ST_RESET, "back to reset");
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          check(store[i][j] == ((i == int'(o) && j == 1) ? snap[i][j] + 1 : snap[i][j]),
                $sformatf("field %0d.%0d", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
