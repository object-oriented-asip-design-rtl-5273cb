// tb_ooasip_top: end-to-end test of the OO-ASIP at its default sizes.
//
// Four objects are allocated: oid 1 (class A) and oid 2 (class B) in data
// memory, oid 3 (class B) and oid 4 (class A) in the register file. The
// testbench fills the OTT, VMT and address mapping table, writes the
// objects' fields through the memories' system ports, loads bytecode and
// runs it. Phase 1 calls f() and g() in hardware, including g()'s own
// call of f() and a loop of f() calls; g() runs twice on one object, so
// its second read of field 0 is a cache hit that must return the value
// B::f wrote in between (kept current by the OMU's cache snooping). Phase 2 rewrites the VMT so that
// B::f is a software routine (which itself calls A::f in hardware), and
// repeats f() and g() on class-B objects: software calling hardware and
// hardware calling software calling other hardware. Phase 3 calls a method
// the class does not have and expects the binding exception. Phase 4
// models a method added after manufacture: the testbench itself plays a
// new FU (C::f, which triples field 0) on the spare FU port, re-types
// object 1 as class C, binds (C, f) to the spare FU number in the VMT,
// and calls f() on object 1; the program then reaches B::f(oid 2) from
// a plain subroutine (jsr). After each
// phase every field is read back and compared with values worked out here.
// Each mechanism (hardware dispatch to each FU, software dispatch, call
// from an FU, MIU stall, locked OMU access, register-file and memory
// accesses, FU cache hit, taken branch, subroutine call, dispatch to the
// spare FU port, halt, exception) is counted and must occur.
module tb_ooasip_top;
  import ooasip_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  logic imem_wr_en, ott_wr_en, vmt_wr_en, map_wr_en, dm_en, dm_we, rf_en, rf_we;
  pc_t imem_wr_addr;
  logic [7:0] imem_wr_data;
  oid_t ott_wr_oid, map_wr_oid;
  ott_entry_t ott_wr_entry;
  cid_t vmt_wr_cid;
  mid_t vmt_wr_mid;
  vmt_entry_t vmt_wr_entry;
  map_entry_t map_wr_entry;
  logic [7:0] dm_addr;
  logic [3:0] rf_addr;
  word_t dm_wdata, dm_rdata, rf_wdata, rf_rdata, stack_top;
  logic halted, exception;
  logic [2:0] exc_code;
  pc_t pc;
  logic [4:0] stack_count;
  logic omu_locked;
  logic [NUM_FU:0] cache_hit;
  fu_cmd_t  ext_fu_cmd [1];
  fu_sts_t  ext_fu_sts [1];
  omu_req_t ext_omu_req [1];
  omu_rsp_t ext_omu_rsp [1];

  int checks = 0, failures = 0;

  ooasip_top dut (.*);

  // ----------------------------------------------------- mechanism counters
  int n_hw [NUM_FU];
  int n_sw_call = 0, n_fu_call = 0, n_stall = 0, n_lock = 0, n_rf = 0, n_dm = 0, n_hit = 0;
  logic [NUM_FU-1:0] start_prev;
  logic [3:0] fdepth_prev;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NUM_FU; i++) begin
      if (dut.fu_cmd[i].command == CMD_START && !start_prev[i]) n_hw[i]++;
      start_prev[i] <= (dut.fu_cmd[i].command == CMD_START);
    end
    if (dut.u_miu.fdepth_q > fdepth_prev) n_sw_call++;
    fdepth_prev <= dut.u_miu.fdepth_q;
    for (int i = 0; i < NUM_FU; i++) if (dut.fu_cmd[i].call_ack) n_fu_call++;
    if (dut.u_miu.state_q == 2'd1) n_stall++;
    if (dut.u_omu.grant && dut.u_omu.wreq.lock) n_lock++;
    if (dut.o_rf_en) n_rf++;
    if (dut.o_dm_en) n_dm++;
    if (|cache_hit) n_hit++;
  end
  // The FU on the spare port: C::f triples field 0 of its object (locked
  // read, then write), with the same four-phase handshake as the built-in FUs.
  typedef enum logic [1:0] {X_IDLE, X_READ, X_WRITE, X_DONE} xst_e;
  xst_e  x_st;
  oid_t  x_oid;
  word_t x_val;
  int    n_ext = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin x_st <= X_IDLE; x_oid <= '0; x_val <= '0; end
    else case (x_st)
      X_IDLE:  if (ext_fu_cmd[0].command == CMD_START) begin x_oid <= ext_fu_cmd[0].oid; x_st <= X_READ; n_ext++; end
      X_READ:  if (ext_omu_rsp[0].ack) begin x_val <= 3 * ext_omu_rsp[0].rdata; x_st <= X_WRITE; end
      X_WRITE: if (ext_omu_rsp[0].ack) x_st <= X_DONE;
      X_DONE:  if (ext_fu_cmd[0].command != CMD_START) x_st <= X_IDLE;
      default: x_st <= X_IDLE;
    endcase
  end
  always_comb begin
    ext_fu_sts[0] = '0;
    ext_fu_sts[0].status = (x_st == X_IDLE) ? ST_RESET : (x_st == X_DONE) ? ST_DONE : ST_STARTED;
    ext_omu_req[0] = '0;
    ext_omu_req[0].req = (x_st == X_READ) || (x_st == X_WRITE);
    ext_omu_req[0].lock = (x_st == X_READ);
    ext_omu_req[0].we = (x_st == X_WRITE);
    ext_omu_req[0].oid = x_oid;
    ext_omu_req[0].wdata = x_val;
  end

  // Branch counter: a compare-branch whose next pc is not the fall-through.
  pc_t br_pc;
  logic br_pend;
  always @(posedge clk) begin
    br_pend <= rst_n && run && dut.u_miu.state_q == 2'd0 && (dut.id0 == 8'h9f || dut.id0 == 8'ha0);
    br_pc   <= pc + 8'd2;
  end
  int n_taken = 0, n_jsr = 0;
  always @(posedge clk) if (rst_n && run && dut.u_miu.state_q == 2'd0 && dut.id0 == 8'ha8) n_jsr++;  // jsr
  always @(negedge clk) if (br_pend && pc != br_pc) n_taken++;

  // ------------------------------------------------------------- helpers
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input logic [7:0] prog [], input int at);
    foreach (prog[i]) begin
      @(negedge clk); imem_wr_en = 1; imem_wr_addr = pc_t'(at + i); imem_wr_data = prog[i];
    end
    @(negedge clk); imem_wr_en = 0;
  endtask

  task automatic alloc(input int oid, input cid_t cid, input logic in_rf, input int base);
    @(negedge clk);
    ott_wr_en = 1; ott_wr_oid = oid_t'(oid); ott_wr_entry = '{valid: 1'b1, cid: cid};
    map_wr_en = 1; map_wr_oid = oid_t'(oid); map_wr_entry = '{valid: 1'b1, in_rf: in_rf, base: 8'(base)};
    @(negedge clk); ott_wr_en = 0; map_wr_en = 0;
  endtask

  task automatic bind_method(input cid_t cid, input mid_t mid, input logic ishw, input int fuid);
    @(negedge clk); vmt_wr_en = 1; vmt_wr_cid = cid; vmt_wr_mid = mid;
    vmt_wr_entry = '{valid: 1'b1, ishw: ishw, fuid: pc_t'(fuid)};
    @(negedge clk); vmt_wr_en = 0;
  endtask

  // Object layout: oid -> (in register file, base)
  function automatic logic obj_rf(input int oid); return oid >= 3; endfunction
  function automatic int obj_base(input int oid);
    case (oid) 1: return 8'h10; 2: return 8'h20; 3: return 4; default: return 0; endcase
  endfunction

  task automatic setup_tables(input logic bf_in_sw);
    rst_n = 0; run = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    alloc(1, CID_A, 0, obj_base(1));
    alloc(2, CID_B, 0, obj_base(2));
    alloc(3, CID_B, 1, obj_base(3));
    alloc(4, CID_A, 1, obj_base(4));
    bind_method(CID_A, MID_F, 1, FU_A_F);
    bind_method(CID_B, MID_F, !bf_in_sw, bf_in_sw ? 8'h60 : FU_B_F);
    bind_method(CID_B, MID_G, 1, FU_B_G);
  endtask

  task automatic write_field(input int oid, input int idx, input word_t v);
    @(negedge clk);
    if (obj_rf(oid)) begin rf_en = 1; rf_we = 1; rf_addr = 4'(obj_base(oid) + idx); rf_wdata = v; end
    else begin dm_en = 1; dm_we = 1; dm_addr = 8'(obj_base(oid) + idx); dm_wdata = v; end
    @(negedge clk); rf_en = 0; rf_we = 0; dm_en = 0; dm_we = 0;
  endtask

  task automatic check_field(input int oid, input int idx, input word_t exp, input string ph);
    word_t got;
    @(negedge clk);
    if (obj_rf(oid)) begin rf_en = 1; rf_addr = 4'(obj_base(oid) + idx); end
    else begin dm_en = 1; dm_addr = 8'(obj_base(oid) + idx); end
    @(negedge clk); rf_en = 0; dm_en = 0;
    got = obj_rf(oid) ? rf_rdata : dm_rdata;
    check(got == exp, $sformatf("%s: object %0d field %0d = %0d, expected %0d", ph, oid, idx, got, exp));
  endtask

  task automatic go(output int cycles);
    cycles = 0;
    @(negedge clk); run = 1;
    while (!halted && !exception && cycles < 5000) begin @(negedge clk); cycles++; end
    run = 0;
  endtask

  localparam logic [7:0] IC0 = 8'h03, IC1 = 8'h04, IC2 = 8'h05, IC3 = 8'h06, IC4 = 8'h07,
                         BIP = 8'h10, POP = 8'h57, DUP = 8'h59, SUB = 8'h64, IFNE = 8'ha0,
                         RET = 8'hb1, INV = 8'hb6, JSR = 8'ha8;
  localparam logic [7:0] F = 8'(MID_F), G = 8'(MID_G);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    word_t f0 [5], f1 [5];
    imem_wr_en = 0; imem_wr_addr = '0; imem_wr_data = '0;
    ott_wr_en = 0; ott_wr_oid = '0; ott_wr_entry = '0;
    vmt_wr_en = 0; vmt_wr_cid = '0; vmt_wr_mid = '0; vmt_wr_entry = '0;
    map_wr_en = 0; map_wr_oid = '0; map_wr_entry = '0;
    dm_en = 0; dm_we = 0; dm_addr = '0; dm_wdata = '0;
    rf_en = 0; rf_we = 0; rf_addr = '0; rf_wdata = '0;
    for (int i = 0; i < NUM_FU; i++) n_hw[i] = 0;
    start_prev = '0; fdepth_prev = '0;

    // ---- phase 1: all methods in hardware --------------------------------
    setup_tables(1'b0);
    f0 = '{0, 100, 200, 300, 400};
    f1 = '{0, 0, 7, 20, 0};
    for (int o = 1; o <= 4; o++) begin write_field(o, 0, f0[o]); write_field(o, 1, f1[o]); end
    load('{BIP, 8'd10, IC1, INV, F, POP, POP,          // A::f(oid 1)
           BIP, 8'd10, IC2, INV, F, POP, POP,          // B::f(oid 2, 10)
           IC0, IC3, INV, G, POP, POP,                 // B::g(oid 3) -> f(oid 3, f0 + f1 + 1)
           IC0, IC3, INV, G, POP, POP,                 // again: field 0 now hits in B::g's cache
           IC0, IC4, INV, F, POP, POP,                 // A::f(oid 4)
           BIP, 8'd5,                                  // 32: counter = 5
           IC0, IC1, INV, F, POP, POP,                 // 34: loop body A::f(oid 1)
           IC1, SUB, DUP, IC0, IFNE, 8'hf5,            // 40: back to 34 while counter != 0
           POP, RET}, 0);
    go(cyc);
    check(halted && !exception, "phase 1 halts");
    check(stack_count == 0, "phase 1 stack empty");
    f0[1] += 1 + 5;
    f0[2] += 10;
    repeat (2) begin f1[3] += 1; f0[3] += f0[3] + f1[3]; end
    f0[4] += 1;
    for (int o = 1; o <= 4; o++) begin
      check_field(o, 0, f0[o], "phase 1"); check_field(o, 1, f1[o], "phase 1");
    end
    $display("phase 1: %0d cycles", cyc);

    // ---- phase 2: B::f overridden by a software routine --------------------
    setup_tables(1'b1);
    // reset cleared the register file: reload the objects kept there
    for (int o = 3; o <= 4; o++) begin write_field(o, 0, f0[o]); write_field(o, 1, f1[o]); end
    load('{IC0, IC4, INV, F, POP, POP, RET}, 8'h60); // software B::f: A::f(oid 4)
    load('{BIP, 8'd3, IC2, INV, F, POP, POP,          // f(oid 2) -> software -> A::f(oid 4)
           IC0, IC3, INV, G, POP, POP,                 // g(oid 3) -> f -> software -> A::f(oid 4)
           RET}, 0);
    go(cyc);
    check(halted && !exception, "phase 2 halts");
    check(stack_count == 0, "phase 2 stack empty");
    f0[4] += 2;
    f1[3] += 1;
    for (int o = 1; o <= 4; o++) begin
      check_field(o, 0, f0[o], "phase 2"); check_field(o, 1, f1[o], "phase 2");
    end
    $display("phase 2: %0d cycles", cyc);

    // ---- phase 3: a method the class does not have ------------------------
    setup_tables(1'b0);
    for (int o = 3; o <= 4; o++) begin write_field(o, 0, f0[o]); write_field(o, 1, f1[o]); end
    load('{IC1, INV, G, RET}, 0);                      // g() on a class-A object
    go(cyc);
    check(exception && exc_code == 3'd3, "phase 3 binding exception");
    for (int o = 1; o <= 4; o++) check_field(o, 0, f0[o], "phase 3");

    // ---- phase 4: a method added on the spare FU port ---------------------
    setup_tables(1'b0);
    alloc(1, 2'd2, 0, obj_base(1));                    // object 1 is now of class C
    bind_method(2'd2, MID_F, 1, NUM_FU);               // C::f in the spare slot
    // main: C::f(oid 1), then a plain subroutine call (jsr) to 9: B::f(oid 2, 0)
    load('{IC0, IC1, INV, F, POP, POP, JSR, 8'd2, RET,
           IC0, IC2, INV, F, POP, POP, RET}, 0);
    go(cyc);
    check(halted && !exception, "phase 4 halts");
    f0[1] = 3 * f0[1];
    f0[2] += 0;                                        // B::f(oid 2, 0)
    for (int o = 1; o <= 2; o++) begin
      check_field(o, 0, f0[o], "phase 4"); check_field(o, 1, f1[o], "phase 4");
    end
    check(n_ext == 1, "dispatch to the spare FU port happened");
    check(n_jsr == 1, "plain subroutine call happened");

    // ---- mechanisms ------------------------------------------------------
    $display("hw dispatch A::f %0d B::f %0d B::g %0d, sw calls %0d, FU calls %0d, stall cycles %0d",
             n_hw[0], n_hw[1], n_hw[2], n_sw_call, n_fu_call, n_stall);
    $display("locked accesses %0d, register file accesses %0d, memory accesses %0d, taken branches %0d, cache hits %0d",
             n_lock, n_rf, n_dm, n_taken, n_hit);
    check(n_hw[FU_A_F] == 1 + 1 + 5 + 2, "A::f dispatch count");
    check(n_hw[FU_B_F] == 4, "B::f dispatch count");
    check(n_hw[FU_B_G] == 3, "B::g dispatch count");
    check(n_sw_call == 3, "software dispatch happened");
    check(n_fu_call == 3, "calls from an FU happened");
    check(n_stall > 0, "MIU stalled for an FU");
    check(n_lock > 0, "locked OMU access happened");
    check(n_rf > 0 && n_dm > 0, "register file and memory both used");
    check(n_taken == 4, "taken branches");
    check(n_hit == 1, "FU cache hit happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
