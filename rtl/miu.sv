// miu: Method Invocation Unit of the OO-ASIP.
//
// The MIU is the OO-ASIP's instruction engine. It fetches bytecode of a
// small JVM subset from the instruction memory and runs an operand stack.
// Plain instructions (constants, add, subtract, compare-and-branch, goto,
// jsr, pop, dup) execute in one clock each. The method-call instruction,
// invokevirtual <mid>, takes the object id from the top of the stack and
// binds the call dynamically: the OTT gives the object's class, the VMT
// maps (class, mid) to an implementation. A hardware implementation is a
// functional unit (FU): the MIU gives it START with the oid and the word
// below the oid on the stack as its int argument, and stalls until the
// FU reports DONE. A software implementation is a routine in the
// instruction memory: the MIU pushes the return address and a copy of the
// oid and jumps to it (branch-and-link); 'return' pops both and resumes.
// After either kind of call the oid stays on the stack. Methods that
// exist only in software need no binding: jsr <offset> is a plain
// subroutine call. Its return address is kept in the MIU's call frame,
// not on the operand stack, so the subroutine may consume its arguments
// and leave results there; its 'return' resumes after the jsr.
//
// An FU may itself call a method through its call (instruction) port.
// While the MIU waits for that FU it binds the call the same way. A
// hardware target is started and the caller is remembered on a small
// nesting stack; when the target is DONE the caller gets call_ack. A
// software target gets a frame of argument, oid, return address, oid
// pushed on the operand stack and runs; its 'return' acks the calling FU
// and the MIU goes back to waiting for it. Starting an FU that is already
// busy (a recursive call through hardware) raises an exception.
//
// The main program ends when 'return' is executed with no call frame open
// (halted = 1). An unsupported opcode, a missing OTT/VMT entry, a stack
// overflow or underflow, or hardware recursion stops the MIU with
// exception = 1 and a code.
//
// Timing: one instruction per cycle while running (run = 1); an
// invokevirtual bound to hardware stalls until the FU is DONE and
// execution resumes the cycle after. Tables and instruction memory are
// read combinationally in the execute cycle.
//
// From the design: the fetch/dispatch loop, the JVM subset with
// invokevirtual, the OTT/VMT binding, the hw/sw dispatch with the
// return-address and oid push, the FU handshake and the FU call port, no
// recursion through hardware, a plain subroutine call for software-only
// methods. This implementation's choices: jsr with a one-byte offset and
// 'return' as its return, a stack counted in elements, iadd with the JVM
// meaning (two operands popped, the sum pushed), which further opcodes
// exist, the 'return' frame layout, the halt rule, the exception codes,
// the nesting bookkeeping.
module miu
  import ooasip_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16,
  parameter int unsigned FRAME_DEPTH = 8,
  parameter int unsigned N_FU        = NUM_FU
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  // instruction memory
  output pc_t        imem_addr0,
  input  logic [7:0] imem_data0,
  output pc_t        imem_addr1,
  input  logic [7:0] imem_data1,
  // OTT and VMT lookups
  output oid_t       ott_oid,
  input  ott_entry_t ott_entry,
  output cid_t       vmt_cid,
  output mid_t       vmt_mid,
  input  vmt_entry_t vmt_entry,
  // functional units
  output fu_cmd_t    fu_cmd [N_FU],
  input  fu_sts_t    fu_sts [N_FU],
  // status
  output logic       halted,
  output logic       exception,
  output logic [2:0] exc_code,
  output pc_t        pc,
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_count,
  output word_t      stack_top
);

  localparam int unsigned SP_W  = $clog2(STACK_DEPTH + 1);
  localparam int unsigned FP_W  = $clog2(FRAME_DEPTH + 1);
  localparam int unsigned SI_W  = $clog2(STACK_DEPTH);
  localparam int unsigned FI_W  = $clog2(FRAME_DEPTH);
  localparam int unsigned NP_W  = $clog2(N_FU + 1);
  localparam int unsigned FUS_W = (N_FU > 1) ? $clog2(N_FU) : 1;

  typedef enum logic [1:0] {S_RUN, S_WAIT, S_HALT, S_EXC} state_e;

  typedef enum logic [2:0] {
    EXC_NONE      = 3'd0,
    EXC_OPCODE    = 3'd1,
    EXC_STACK     = 3'd2,
    EXC_BIND      = 3'd3,
    EXC_RECURSION = 3'd4,
    EXC_FRAME     = 3'd5
  } exc_e;

  // Call frame of a software method: who called it.
  typedef struct packed {
    logic             from_fu;  // called through an FU's call port
    logic             sub;      // plain subroutine call (jsr)
    pc_t              ret;      // its return address (jsr frames only)
    logic [FUS_W-1:0] fu;       // the calling FU
    logic [NP_W-1:0]  base;     // nesting level at which that FU waits
  } frame_t;

  state_e            state_q;
  exc_e              exc_q;
  pc_t               pc_q;
  word_t             stk_q [STACK_DEPTH];
  logic [SP_W-1:0]   cnt_q;
  frame_t            frm_q [FRAME_DEPTH];
  logic [FP_W-1:0]   fdepth_q;
  logic [FUS_W-1:0]  nest_q [N_FU];
  logic [NP_W-1:0]   ndepth_q, base_q;
  logic [FUS_W-1:0]  cur_q;
  logic [N_FU-1:0]   start_q, ack_q;
  oid_t              fu_oid_q [N_FU];
  word_t             fu_arg_q [N_FU];

  // ---------------------------------------------------------------- decode
  opcode_e    op;
  word_t      tos, nos;
  pc_t        pc1, pc2, br_tgt;
  word_t      imm;
  logic       fu_call;       // the current FU asks for a method call
  fu_sts_t    cur_sts;
  oid_t       call_oid;
  word_t      call_arg;

  assign imem_addr0 = pc_q;
  assign imem_addr1 = pc_q + 8'd1;
  assign op         = opcode_e'(imem_data0);
  assign pc1        = pc_q + 8'd1;
  assign pc2        = pc_q + 8'd2;
  assign br_tgt     = pc1 + imem_data1;               // offset relative to the operand byte
  assign imm        = {{24{imem_data1[7]}}, imem_data1};
  assign tos        = (cnt_q >= SP_W'(1)) ? stk_q[SI_W'(cnt_q - SP_W'(1))] : '0;
  assign nos        = (cnt_q >= SP_W'(2)) ? stk_q[SI_W'(cnt_q - SP_W'(2))] : '0;
  assign cur_sts    = fu_sts[cur_q];
  assign fu_call    = (state_q == S_WAIT) && cur_sts.call_req && !ack_q[cur_q]
                      && (cur_sts.status != ST_DONE);

  // Binding lookups: the FU's call while waiting, else the program's.
  always_comb begin
    if (state_q == S_WAIT) begin
      call_oid = cur_sts.call_oid;
      call_arg = cur_sts.call_arg;
      vmt_mid  = cur_sts.call_mid;
    end else begin
      call_oid = tos[OID_W-1:0];
      call_arg = nos;
      vmt_mid  = imem_data1[MID_W-1:0];
    end
  end
  assign ott_oid = call_oid;
  assign vmt_cid = ott_entry.cid;

  logic bind_ok, bind_hw, hw_busy;
  logic [FUS_W-1:0] bind_fu;
  assign bind_ok = ott_entry.valid && vmt_entry.valid
                   && (!vmt_entry.ishw || (int'(vmt_entry.fuid) < N_FU));
  assign bind_hw = vmt_entry.ishw;
  assign bind_fu = FUS_W'(vmt_entry.fuid);
  assign hw_busy = start_q[bind_fu];

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_RUN;
      exc_q    <= EXC_NONE;
      pc_q     <= '0;
      cnt_q    <= '0;
      fdepth_q <= '0;
      ndepth_q <= '0;
      base_q   <= '0;
      cur_q    <= '0;
      start_q  <= '0;
      ack_q    <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stk_q[i] <= '0;
      for (int i = 0; i < FRAME_DEPTH; i++) frm_q[i] <= '0;
      for (int i = 0; i < N_FU; i++) begin
        nest_q[i]   <= '0;
        fu_oid_q[i] <= '0;
        fu_arg_q[i] <= '0;
      end
    end else begin
      ack_q <= '0;
      unique case (state_q)
        // ---------------------------------------------------------- run
        S_RUN: if (run) begin
          unique case (op)
            OP_NOP: pc_q <= pc1;
            OP_ICONST_M1, OP_ICONST_0, OP_ICONST_1, OP_ICONST_2,
            OP_ICONST_3, OP_ICONST_4, OP_ICONST_5, OP_BIPUSH, OP_DUP: begin
              if (int'(cnt_q) >= STACK_DEPTH || (op == OP_DUP && cnt_q == '0)) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else begin
                stk_q[SI_W'(cnt_q)] <= (op == OP_BIPUSH) ? imm :
                                (op == OP_DUP)    ? tos :
                                WORD_W'(signed'(int'(imem_data0) - int'(OP_ICONST_0)));
                cnt_q <= cnt_q + SP_W'(1);
                pc_q  <= (op == OP_BIPUSH) ? pc2 : pc1;
              end
            end
            OP_POP: begin
              if (cnt_q == '0) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else begin
                cnt_q <= cnt_q - SP_W'(1);
                pc_q  <= pc1;
              end
            end
            OP_IADD, OP_ISUB: begin
              if (cnt_q < SP_W'(2)) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else begin
                stk_q[SI_W'(cnt_q - SP_W'(2))] <= (op == OP_IADD) ? nos + tos : nos - tos;
                cnt_q <= cnt_q - SP_W'(1);
                pc_q  <= pc1;
              end
            end
            OP_IF_ICMPEQ, OP_IF_ICMPNE: begin
              if (cnt_q < SP_W'(2)) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else begin
                cnt_q <= cnt_q - SP_W'(2);
                pc_q  <= ((nos == tos) == (op == OP_IF_ICMPEQ)) ? br_tgt : pc2;
              end
            end
            OP_GOTO: pc_q <= br_tgt;
            OP_JSR: begin
              if (int'(fdepth_q) >= FRAME_DEPTH) begin
                state_q <= S_EXC; exc_q <= EXC_FRAME;
              end else begin
                frm_q[FI_W'(fdepth_q)] <= '{from_fu: 1'b0, sub: 1'b1, ret: pc2, fu: '0, base: '0};
                fdepth_q               <= fdepth_q + FP_W'(1);
                pc_q                   <= br_tgt;
              end
            end
            OP_RETURN: begin
              if (fdepth_q == '0) begin
                state_q <= S_HALT;                      // main() returned
              end else begin
                frame_t fr;
                fr = frm_q[FI_W'(fdepth_q - FP_W'(1))];
                fdepth_q <= fdepth_q - FP_W'(1);
                if (fr.from_fu) begin
                  if (cnt_q < SP_W'(4)) begin
                    state_q <= S_EXC; exc_q <= EXC_STACK;
                  end else begin
                    pc_q      <= pc_t'(stk_q[SI_W'(cnt_q - SP_W'(2))]);
                    cnt_q     <= cnt_q - SP_W'(4);
                    cur_q     <= fr.fu;
                    base_q    <= fr.base;
                    ack_q[fr.fu] <= 1'b1;
                    state_q   <= S_WAIT;
                  end
                end else if (fr.sub) begin
                  pc_q <= fr.ret;
                end else begin
                  if (cnt_q < SP_W'(2)) begin
                    state_q <= S_EXC; exc_q <= EXC_STACK;
                  end else begin
                    pc_q  <= pc_t'(stk_q[SI_W'(cnt_q - SP_W'(2))]);
                    cnt_q <= cnt_q - SP_W'(2);
                  end
                end
              end
            end
            OP_INVOKEVIRTUAL: begin
              if (cnt_q == '0) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else if (!bind_ok) begin
                state_q <= S_EXC; exc_q <= EXC_BIND;
              end else if (bind_hw) begin
                if (hw_busy) begin
                  state_q <= S_EXC; exc_q <= EXC_RECURSION;
                end else begin
                  start_q[bind_fu]  <= 1'b1;
                  fu_oid_q[bind_fu] <= call_oid;
                  fu_arg_q[bind_fu] <= call_arg;
                  cur_q   <= bind_fu;
                  base_q  <= ndepth_q;
                  pc_q    <= pc2;
                  state_q <= S_WAIT;
                end
              end else begin
                if (int'(cnt_q) + 2 > STACK_DEPTH) begin
                  state_q <= S_EXC; exc_q <= EXC_STACK;
                end else if (int'(fdepth_q) >= FRAME_DEPTH) begin
                  state_q <= S_EXC; exc_q <= EXC_FRAME;
                end else begin
                  stk_q[SI_W'(cnt_q)]            <= WORD_W'(pc2);
                  stk_q[SI_W'(cnt_q + SP_W'(1))] <= WORD_W'(call_oid);
                  cnt_q    <= cnt_q + SP_W'(2);
                  frm_q[FI_W'(fdepth_q)] <= '{from_fu: 1'b0, sub: 1'b0, ret: '0, fu: '0, base: '0};
                  fdepth_q <= fdepth_q + FP_W'(1);
                  pc_q     <= vmt_entry.fuid;
                end
              end
            end
            default: begin
              state_q <= S_EXC; exc_q <= EXC_OPCODE;
            end
          endcase
        end
        // --------------------------------------------------------- wait
        S_WAIT: begin
          if (cur_sts.status == ST_DONE && start_q[cur_q]) begin
            start_q[cur_q] <= 1'b0;
            if (ndepth_q == base_q) begin
              state_q <= S_RUN;
            end else begin
              cur_q    <= nest_q[FUS_W'(ndepth_q - NP_W'(1))];
              ndepth_q <= ndepth_q - NP_W'(1);
              ack_q[nest_q[FUS_W'(ndepth_q - NP_W'(1))]] <= 1'b1;
            end
          end else if (fu_call) begin
            if (!bind_ok) begin
              state_q <= S_EXC; exc_q <= EXC_BIND;
            end else if (bind_hw) begin
              if (hw_busy || int'(ndepth_q) >= N_FU) begin
                state_q <= S_EXC; exc_q <= EXC_RECURSION;
              end else begin
                nest_q[FUS_W'(ndepth_q)] <= cur_q;
                ndepth_q          <= ndepth_q + NP_W'(1);
                start_q[bind_fu]  <= 1'b1;
                fu_oid_q[bind_fu] <= call_oid;
                fu_arg_q[bind_fu] <= call_arg;
                cur_q             <= bind_fu;
              end
            end else begin
              if (int'(cnt_q) + 4 > STACK_DEPTH) begin
                state_q <= S_EXC; exc_q <= EXC_STACK;
              end else if (int'(fdepth_q) >= FRAME_DEPTH) begin
                state_q <= S_EXC; exc_q <= EXC_FRAME;
              end else begin
                stk_q[SI_W'(cnt_q)]            <= call_arg;
                stk_q[SI_W'(cnt_q + SP_W'(1))] <= WORD_W'(call_oid);
                stk_q[SI_W'(cnt_q + SP_W'(2))] <= WORD_W'(pc_q);
                stk_q[SI_W'(cnt_q + SP_W'(3))] <= WORD_W'(call_oid);
                cnt_q    <= cnt_q + SP_W'(4);
                frm_q[FI_W'(fdepth_q)] <= '{from_fu: 1'b1, sub: 1'b0, ret: '0, fu: cur_q, base: base_q};
                fdepth_q <= fdepth_q + FP_W'(1);
                pc_q     <= vmt_entry.fuid;
                state_q  <= S_RUN;
              end
            end
          end
        end
        S_HALT: ;
        S_EXC:  ;
        default: state_q <= S_EXC;
      endcase
    end
  end

  // ------------------------------------------------------------ outputs
  always_comb begin
    for (int i = 0; i < N_FU; i++) begin
      fu_cmd[i].command  = start_q[i] ? CMD_START : CMD_IDLE;
      fu_cmd[i].oid      = fu_oid_q[i];
      fu_cmd[i].arg      = fu_arg_q[i];
      fu_cmd[i].call_ack = ack_q[i];
    end
  end

  assign halted      = (state_q == S_HALT);
  assign exception   = (state_q == S_EXC);
  assign exc_code    = exc_q;
  assign pc          = pc_q;
  assign stack_count = cnt_q;
  assign stack_top   = tos;

  // FU handshake: START is held until the FU reports DONE.
  for (genvar i = 0; i < N_FU; i++) begin : g_chk
    a_start_held : assert property (@(posedge clk) disable iff (!rst_n)
      (start_q[i] && fu_sts[i].status != ST_DONE) |=> start_q[i]);
  end

endmodule
