// fu_a_f: functional unit implementing method A::f().
//
// Every public method of the hardware class library is one FU. A::f()
// is the design's sample method: it increments the first 32-bit field
// (field 0) of the object it is invoked on. The FU reaches the object's
// fields only through the OMU, as (oid, field index) requests.
//
// MIU side: while idle the FU reports status RESET. When the MIU presents
// command START with an oid, the FU latches the oid, reports STARTED,
// performs the method, then reports DONE until the MIU drops START, and
// returns to RESET. A::f() calls no other method: call_req and the call
// operands are constant 0, as is the field index of its OMU requests.
// OMU side: a read of field 0 with lock = 1, then a write of the
// incremented value with lock = 0, so the increment is atomic even if
// another FU works on the same object. With the OMU's two-cycle accesses
// DONE is seen 5 cycles after START is first presented.
// The method body and the START/RESET/STARTED/DONE protocol follow the
// design; the lock use and the exact handshakes are this design's choice.
module fu_a_f
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
  word_t  data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      oid_q   <= '0;
      data_q  <= '0;
    end else begin
      case (state_q)
        S_IDLE:  if (cmd.command == CMD_START) begin
                   oid_q   <= cmd.oid;
                   state_q <= S_READ;
                 end
        S_READ:  if (omu_rsp.ack) begin
                   data_q  <= omu_rsp.rdata + 32'd1;
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
