// tb_miu: self-checking test of the Method Invocation Unit.
//
// The MIU runs with the real instruction memory, OTT and VMT; the three
// functional units are replaced by models that log each invocation (FU,
// oid, argument), stay busy a fixed number of cycles, and, for the B::g
// slot, call f() on their object through the call port. Small bytecode
// programs are loaded and run to completion:
//   1. arithmetic, dup/pop, taken and untaken branches, a count-down loop:
//      final stack, and one instruction per cycle.
//   2. dynamic binding: f() on a class-A and a class-B object reaches
//      different FUs with the right oid and argument; g() on a B object
//      calls f() from hardware (nested hardware call); the MIU stalls
//      while an FU works.
//   3. B::f overridden by a software routine: f() from the program becomes
//      a branch-and-link and return; g()'s call from hardware runs the
//      software routine and then resumes the waiting FU.
//   4. exceptions: unbound method, unsupported opcode, hardware recursion.
//   5. plain subroutine calls (jsr), nested, whose body works on the
//      caller's stack values: result and cycle count.
module tb_miu;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  pc_t ia0, ia1, iw_addr;
  logic [7:0] id0, id1, iw_data;
  logic iw_en;
  oid_t ott_oid, ow_oid;
  ott_entry_t ott_e, ow_e;
  logic ow_en;
  cid_t vmt_cid, vw_cid;
  mid_t vmt_mid, vw_mid;
  vmt_entry_t vmt_e, vw_e;
  logic vw_en;
  fu_cmd_t fu_cmd [NUM_FU];
  fu_sts_t fu_sts [NUM_FU];
  logic halted, exception;
  logic [2:0] exc_code;
  pc_t pc;
  logic [4:0] stack_count;
  word_t stack_top;

  int checks = 0, failures = 0;

  instr_mem u_imem (.clk, .rd_addr0(ia0), .rd_data0(id0), .rd_addr1(ia1), .rd_data1(id1),
                    .wr_en(iw_en), .wr_addr(iw_addr), .wr_data(iw_data));
  ott u_ott (.clk, .rst_n, .rd_oid(ott_oid), .rd_entry(ott_e), .wr_en(ow_en), .wr_oid(ow_oid), .wr_entry(ow_e));
  vmt u_vmt (.clk, .rst_n, .rd_cid(vmt_cid), .rd_mid(vmt_mid), .rd_entry(vmt_e),
             .wr_en(vw_en), .wr_cid(vw_cid), .wr_mid(vw_mid), .wr_entry(vw_e));
  miu dut (.clk, .rst_n, .run, .imem_addr0(ia0), .imem_data0(id0), .imem_addr1(ia1), .imem_data1(id1),
           .ott_oid, .ott_entry(ott_e), .vmt_cid, .vmt_mid, .vmt_entry(vmt_e),
           .fu_cmd, .fu_sts, .halted, .exception, .exc_code, .pc, .stack_count, .stack_top);

  // ------------------------------------------------------------ FU models
  localparam int BUSY [NUM_FU] = '{3, 4, 2};
  typedef struct { int fu; int oid; word_t arg; } call_t;
  call_t log_q [$];
  int stall_cycles = 0;

  for (genvar i = 0; i < NUM_FU; i++) begin : g_fu
    typedef enum {M_IDLE, M_BUSY, M_CALL, M_DONE} mst_e;
    mst_e st;
    int cnt;
    oid_t oid;
    word_t arg;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st <= M_IDLE; cnt <= 0; oid <= '0; arg <= '0;
      end else begin
        case (st)
          M_IDLE: if (fu_cmd[i].command == CMD_START) begin
            st <= M_BUSY; cnt <= BUSY[i]; oid <= fu_cmd[i].oid; arg <= fu_cmd[i].arg;
            log_q.push_back('{i, int'(fu_cmd[i].oid), fu_cmd[i].arg});
          end
          M_BUSY: if (cnt > 1) cnt <= cnt - 1; else st <= (i == int'(FU_B_G)) ? M_CALL : M_DONE;
          M_CALL: if (fu_cmd[i].call_ack) st <= M_DONE;
          M_DONE: if (fu_cmd[i].command != CMD_START) st <= M_IDLE;
          default: st <= M_IDLE;
        endcase
      end
    end
    always_comb begin
      fu_sts[i] = '0;
      fu_sts[i].status   = (st == M_IDLE) ? ST_RESET : (st == M_DONE) ? ST_DONE : ST_STARTED;
      fu_sts[i].call_req = (st == M_CALL);
      fu_sts[i].call_mid = MID_F;
      fu_sts[i].call_oid = oid;
      fu_sts[i].call_arg = arg + 1;
    end
  end

  // Count cycles in which the MIU holds its pc while some FU is working.
  pc_t pc_prev;
  always @(posedge clk) begin
    if (rst_n && run && !halted && !exception && pc == pc_prev &&
        (fu_cmd[0].command == CMD_START || fu_cmd[1].command == CMD_START || fu_cmd[2].command == CMD_START))
      stall_cycles++;
    pc_prev <= pc;
  end

  // ------------------------------------------------------------- helpers
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_reset();
    run = 0; rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    log_q.delete();
  endtask

  task automatic load(input logic [7:0] prog [], input int at);
    foreach (prog[i]) begin
      @(negedge clk); iw_en = 1; iw_addr = pc_t'(at + i); iw_data = prog[i];
    end
    @(negedge clk); iw_en = 0;
  endtask

  task automatic set_ott(input int oid, input cid_t cid);
    @(negedge clk); ow_en = 1; ow_oid = oid_t'(oid); ow_e = '{valid: 1'b1, cid: cid};
    @(negedge clk); ow_en = 0;
  endtask

  task automatic set_vmt(input cid_t cid, input mid_t mid, input logic ishw, input int fuid);
    @(negedge clk); vw_en = 1; vw_cid = cid; vw_mid = mid; vw_e = '{valid: 1'b1, ishw: ishw, fuid: pc_t'(fuid)};
    @(negedge clk); vw_en = 0;
  endtask

  task automatic standard_tables();
    set_ott(1, CID_A); set_ott(2, CID_B); set_ott(3, CID_B);
    set_vmt(CID_A, MID_F, 1, FU_A_F);
    set_vmt(CID_B, MID_F, 1, FU_B_F);
    set_vmt(CID_B, MID_G, 1, FU_B_G);
  endtask

  task automatic go(output int cycles);
    cycles = 0;
    @(negedge clk); run = 1;
    while (!halted && !exception && cycles < 2000) begin @(negedge clk); cycles++; end
    run = 0;
  endtask

  task automatic expect_call(input int fu, input int oid, input word_t arg);
    call_t c;
    if (log_q.size() == 0) begin
      checks++; failures++; $display("FAIL missing call to FU %0d", fu);
    end else begin
      c = log_q.pop_front();
      check(c.fu == fu && c.oid == oid && c.arg == arg,
            $sformatf("call FU %0d oid %0d arg %0d, expected FU %0d oid %0d arg %0d", c.fu, c.oid, c.arg, fu, oid, arg));
    end
  endtask

  localparam logic [7:0] NOP = 8'h00, IC0 = 8'h03, IC1 = 8'h04, IC2 = 8'h05, IC3 = 8'h06,
                         BIP = 8'h10, POP = 8'h57, DUP = 8'h59, ADD = 8'h60, SUB = 8'h64,
                         IFEQ = 8'h9f, IFNE = 8'ha0, GOTO = 8'ha7, JSR = 8'ha8, RET = 8'hb1, INV = 8'hb6;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, stalls0;
    iw_en = 0; iw_addr = '0; iw_data = '0; ow_en = 0; ow_oid = '0; ow_e = '0;
    vw_en = 0; vw_cid = '0; vw_mid = '0; vw_e = '0;
    pc_prev = '0;

    // ---- 1. arithmetic and control flow ---------------------------------
    do_reset();
    // 0: bipush 40; 2: iconst_2; 3: iadd; 4: dup; 5: bipush 42; 7: if_icmpeq +3 (-> 11)
    // 9: bipush 99 (skipped); 11: bipush 5
    // loop 13: iconst_1; 14: isub; 15: dup; 16: iconst_0; 17: if_icmpne -5 (-> 13)
    // 19: pop; 20: iconst_3; 21: iconst_2; 22: isub; 23: iadd; 24: return
    load('{BIP, 8'd40, IC2, ADD, DUP, BIP, 8'd42, IFEQ, 8'd3, BIP, 8'd99, BIP, 8'd5,
           IC1, SUB, DUP, IC0, IFNE, 8'hfb, POP, IC3, IC2, SUB, ADD, RET}, 0);
    go(cyc);
    check(halted && !exception, "program 1 halts");
    check(stack_count == 1 && stack_top == 43, $sformatf("program 1 result %0d (count %0d)", stack_top, stack_count));
    // instructions: 7 before the loop, 5 x 5 in the loop, then pop..return 6
    check(cyc == 7 + 25 + 6, $sformatf("program 1 cycles %0d", cyc));

    // ---- 2. dynamic binding to hardware ---------------------------------
    do_reset();
    standard_tables();
    // bipush 7; iconst_1; invokevirtual f (A::f on oid 1); pop; pop
    // bipush 9; iconst_2; invokevirtual f (B::f on oid 2); pop; pop
    // bipush 5; iconst_2; invokevirtual g (B::g on oid 2 -> calls f in hw); pop; pop; return
    load('{BIP, 8'd7, IC1, INV, 8'(MID_F), POP, POP,
           BIP, 8'd9, IC2, INV, 8'(MID_F), POP, POP,
           BIP, 8'd5, IC2, INV, 8'(MID_G), POP, POP, RET}, 0);
    stalls0 = stall_cycles;
    go(cyc);
    check(halted && !exception, "program 2 halts");
    check(stack_count == 0, "program 2 stack empty");
    expect_call(FU_A_F, 1, 7);
    expect_call(FU_B_F, 2, 9);
    expect_call(FU_B_G, 2, 5);
    expect_call(FU_B_F, 2, 6);       // B::g's own call f(arg + 1)
    check(log_q.size() == 0, "no extra calls in program 2");
    check(stall_cycles - stalls0 >= BUSY[0] + BUSY[1] + BUSY[2] + BUSY[1],
          $sformatf("MIU stalled %0d cycles for the FUs", stall_cycles - stalls0));

    // ---- 3. hardware method overridden by software ------------------------
    do_reset();
    standard_tables();
    set_vmt(CID_B, MID_F, 0, 8'h40);   // B::f now a software routine at 0x40
    // 0: bipush 9; iconst_3; invokevirtual f (software); pop; pop
    // 7: bipush 4; iconst_3; invokevirtual g (hw, which calls f -> software); pop; pop; return
    load('{BIP, 8'd9, IC3, INV, 8'(MID_F), POP, POP,
           BIP, 8'd4, IC3, INV, 8'(MID_G), POP, POP, RET}, 0);
    // software B::f at 0x40: stack on entry [.. arg, oid, ret, oid]; adds arg to a
    // marker and discards it: bipush 100; pop; return
    load('{BIP, 8'd100, POP, RET}, 8'h40);
    go(cyc);
    check(halted && !exception, "program 3 halts");
    check(stack_count == 0, $sformatf("program 3 stack empty (%0d)", stack_count));
    expect_call(FU_B_G, 3, 4);
    check(log_q.size() == 0, "software f() started no FU");
    // instructions: 5 + 3 (sw routine) + 1 (inv g) ... exact count: program
    // 0..6 (5 instr + 3 routine) then 7..14 (6 instr + 3 routine) plus FU time
    check(cyc > 17, $sformatf("program 3 cycles %0d", cyc));

    // ---- 4. exceptions ------------------------------------------------------
    do_reset();
    standard_tables();
    load('{IC1, INV, 8'(MID_G), RET}, 0);          // g() on a class-A object: unbound
    go(cyc);
    check(exception && exc_code == 3'd3, $sformatf("unbound method exception (%0d)", exc_code));

    do_reset();
    load('{IC1, 8'hca, RET}, 0);                    // unsupported opcode
    go(cyc);
    check(exception && exc_code == 3'd1 && pc == 1, "unsupported opcode exception");

    do_reset();
    standard_tables();
    set_vmt(CID_B, MID_F, 1, FU_B_G);              // f bound to g's FU: g calls itself
    load('{IC2, INV, 8'(MID_G), RET}, 0);
    go(cyc);
    check(exception && exc_code == 3'd4, $sformatf("hardware recursion exception (%0d)", exc_code));

    // ---- 5. plain subroutine calls -------------------------------------------
    do_reset();
    // 0: bipush 20; 2: bipush 5; 4: jsr +6 (-> 11); 6: iconst_1; 7: iadd; 8: return (halt)
    // 11: isub; 12: jsr +3 (-> 16); 14: return      (sub: a - b, then double it)
    // 16: dup; 17: iadd; 18: return                   (inner sub: x + x)
    load('{BIP, 8'd20, BIP, 8'd5, JSR, 8'd6, IC1, ADD, RET, NOP, NOP,
           SUB, JSR, 8'd3, RET, NOP, DUP, ADD, RET}, 0);
    go(cyc);
    check(halted && !exception, "program 5 halts");
    check(stack_count == 1 && stack_top == 31, $sformatf("program 5 result %0d (count %0d)", stack_top, stack_count));
    check(cyc == 12, $sformatf("program 5 cycles %0d", cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
