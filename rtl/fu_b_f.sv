// fu_b_f: functional unit implementing method B::f().
//
// Class B derives from A and overrides f(); both share one method id, so
// the MIU's dynamic binding (OTT + VMT) sends f() on a class-B object here
// and f() on a class-A object to A::f. The design names this FU but does
// not give its body; here B::f(int v) adds its int argument to field 0
// of the object (A::f adds 1), so that the two are told apart and the
// int argument of the FU template is used.
//
// MIU side: status RESET while idle; on command START the FU latches oid
// and argument, reports STARTED, does the method, reports DONE until START
// is dropped, then returns to RESET. It calls no other method, so its
// call outputs are constant 0, as is the field index of its requests.
// OMU side: locked read of field 0, then unlocked write of field 0 + arg
// (atomic update). DONE is seen 5 cycles after START is first presented.
module fu_b_f
  import ooasip_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  fu_cmd_t  cmd,
  output fu_sts_t  sts,
  output omu_req_t omu_req,
  input  omu_rsp_t omu_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_DONE} state_e;

  state_e state_q;
  oid_t   oid_q;
  word_t  arg_q;
  word_t  data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      oid_q   <= '0;
      arg_q   <= '0;
      data_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE:  if (cmd.command == CMD_START) begin
                   oid_q   <= cmd.oid;
                   arg_q   <= cmd.arg;
                   state_q <= S_READ;
                 end
        S_READ:  if (omu_rsp.ack) begin
                   data_q  <= omu_rsp.rdata + arg_q;
                   state_q <= S_WRITE;
                 end
        S_WRITE: if (omu_rsp.ack) state_q <= S_DONE;
        S_DONE:  if (cmd.command != CMD_START) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    omu_req       = '0;
    omu_req.oid   = oid_q;
    omu_req.idx   = '0;
    omu_req.wdata = data_q;
    omu_req.req   = (state_q == S_READ) || (state_q == S_WRITE);
    omu_req.we    = (state_q == S_WRITE);
    omu_req.lock  = (state_q == S_READ);
  end

  always_comb begin
    sts = '0;
    unique case (state_q)
      S_IDLE:  sts.status = ST_RESET;
      S_DONE:  sts.status = ST_DONE;
      default: sts.status = ST_STARTED;
    endcase
  end

endmodule
