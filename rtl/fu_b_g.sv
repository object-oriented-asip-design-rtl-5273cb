// fu_b_g: functional unit implementing method B::g().
//
// g() is introduced by class B. The design names this FU but does not
// give its body; it is used here to exercise the FU's "instruction" port,
// through which a hardware method calls another method via the MIU. The
// body chosen is: field 0 is read (a plain, cacheable read), field 1 (B's
// own attribute, after the inherited field 0) is incremented atomically,
// then f() is invoked on the same object with the sum of the field-0 value
// and the new field-1 value as argument. That call is dynamically bound by
// the MIU like any other: to B::f in hardware, or to a software routine
// if the VMT has been rewritten to override it.
//
// MIU side: status RESET while idle; on command START it latches the oid,
// reports STARTED, does its OMU accesses, then raises call_req with
// (call_mid, call_oid, call_arg) and holds it until the MIU pulses
// call_ack (the called method finished). It then reports DONE until START
// is dropped. OMU side: unlocked read of field 0, then locked read and
// unlocked write of field 1. With one-cycle OMU acks the call request
// appears 7 cycles after START; a cache hit on field 0 saves one cycle.
module fu_b_g
  import ooasip_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  fu_cmd_t  cmd,
  output fu_sts_t  sts,
  output omu_req_t omu_req,
  input  omu_rsp_t omu_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_PEEK, S_READ, S_WRITE, S_CALL, S_DONE} state_e;

  state_e state_q;
  oid_t   oid_q;
  word_t  data_q;
  word_t  peek_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      oid_q   <= '0;
      data_q  <= '0;
      peek_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE:  if (cmd.command == CMD_START) begin
                   oid_q   <= cmd.oid;
                   state_q <= S_PEEK;
                 end
        S_PEEK:  if (omu_rsp.ack) begin
                   peek_q  <= omu_rsp.rdata;
                   state_q <= S_READ;
                 end
        S_READ:  if (omu_rsp.ack) begin
                   data_q  <= omu_rsp.rdata + 32'd1;
                   state_q <= S_WRITE;
                 end
        S_WRITE: if (omu_rsp.ack) state_q <= S_CALL;
        S_CALL:  if (cmd.call_ack) state_q <= S_DONE;
        S_DONE:  if (cmd.command != CMD_START) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    omu_req       = '0;
    omu_req.oid   = oid_q;
    omu_req.idx   = (state_q == S_PEEK) ? fidx_t'(0) : fidx_t'(1);
    omu_req.wdata = data_q;
    omu_req.req   = (state_q == S_PEEK) || (state_q == S_READ) || (state_q == S_WRITE);
    omu_req.we    = (state_q == S_WRITE);
    omu_req.lock  = (state_q == S_READ);
  end

  always_comb begin
    sts          = '0;
    sts.call_req = (state_q == S_CALL);
    sts.call_mid = MID_F;
    sts.call_oid = oid_q;
    sts.call_arg = data_q + peek_q;
    unique case (state_q)
      S_IDLE:  sts.status = ST_RESET;
      S_DONE:  sts.status = ST_DONE;
      default: sts.status = ST_STARTED;
    endcase
  end

  a_call_ack_only_when_calling : assert property (@(posedge clk) disable iff (!rst_n)
    cmd.call_ack |-> (state_q == S_CALL));

endmodule
