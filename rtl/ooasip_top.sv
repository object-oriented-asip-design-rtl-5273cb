// ooasip_top: an object-oriented ASIP with its instruction and data memory.
//
// The processor is generated from a small hardware class library: class
// A with public method f(), and class B derived from A that overrides f()
// and introduces g(). Each hardware method is one functional unit (FU_A_F,
// FU_B_F, FU_B_G). Objects are not hardware modules: their fields live in
// the register file or the data memory, and the FU of a method works on
// whichever object it is invoked on, reaching the fields through the
// Object Management Unit (OMU). The Method Invocation Unit (MIU) runs the
// software (JVM-subset bytecode) and turns each invokevirtual into a
// dynamically bound call, through the Object Type Table (oid -> class) and
// the Virtual Method Table ((class, method) -> hardware FU or software
// routine).
//
// Structure (one instance each):
//   instr_mem -> miu <-> ott, vmt
//                miu <-> fu_a_f, fu_b_f, fu_b_g   (command/status/call)
//   fu_*      <-> omu (per-FU omu_fu_cache, addr_map_table) <-> reg_file, data_mem
//
// The system side loads the program through imem_wr_*, fills the object
// tables through ott_wr_*, vmt_wr_* and map_wr_* (object allocation and
// freeing, or replacing a hardware method by software), reads or writes
// object fields through the second ports of the data memory and register
// file, and then raises run. The MIU starts at address 0 and stops with
// halted (main returned) or exception. A system write to the register
// file or data memory flushes the OMU's FU caches. omu_locked and
// cache_hit show the OMU's lock and per-FU cache hits. All state, the
// register file and the caches included, is reset by rst_n (active low,
// asynchronous); the contents of the instruction and data memories are
// not.
//
// Spare FU ports: N_EXT_FU further FU slots (numbers NUM_FU and up) are
// wired into the MIU and the OMU exactly like the built-in FUs, but their
// command/status and OMU request/response signals are brought out as
// ports (ext_*). A method unit added later outside this RTL (for example
// in on-chip programmable logic) plugs in there and is reached by a VMT
// entry naming its FU number; nothing else changes. Unused slots must
// drive ext_fu_sts and ext_omu_req to zero. The cache_hit bits of the
// spare slots follow the built-in ones.
//
// The block structure follows the design's architecture diagram, and the
// spare ports follow its note that new MIU and OMU ports can be provided
// in advance for methods added in programmable hardware; every size, the
// number of spare slots and the system-side ports are this
// implementation's choices.
module ooasip_top
  import ooasip_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16,
  parameter int unsigned FRAME_DEPTH = 8,
  parameter int unsigned RF_DEPTH    = 16,
  parameter int unsigned DMEM_DEPTH  = 256,
  parameter int unsigned N_EXT_FU    = 1     // spare FU slots, at least 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  // program load
  input  logic       imem_wr_en,
  input  pc_t        imem_wr_addr,
  input  logic [7:0] imem_wr_data,
  // object tables
  input  logic       ott_wr_en,
  input  oid_t       ott_wr_oid,
  input  ott_entry_t ott_wr_entry,
  input  logic       vmt_wr_en,
  input  cid_t       vmt_wr_cid,
  input  mid_t       vmt_wr_mid,
  input  vmt_entry_t vmt_wr_entry,
  input  logic       map_wr_en,
  input  oid_t       map_wr_oid,
  input  map_entry_t map_wr_entry,
  // system access to object storage
  input  logic       dm_en,
  input  logic       dm_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dm_addr,
  input  word_t      dm_wdata,
  output word_t      dm_rdata,
  input  logic       rf_en,
  input  logic       rf_we,
  input  logic [$clog2(RF_DEPTH)-1:0] rf_addr,
  input  word_t      rf_wdata,
  output word_t      rf_rdata,
  // status
  output logic       halted,
  output logic       exception,
  output logic [2:0] exc_code,
  output pc_t        pc,
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_count,
  output word_t      stack_top,
  output logic       omu_locked,
  output logic [NUM_FU+N_EXT_FU-1:0] cache_hit,
  // spare FU slots
  output fu_cmd_t    ext_fu_cmd  [N_EXT_FU],
  input  fu_sts_t    ext_fu_sts  [N_EXT_FU],
  input  omu_req_t   ext_omu_req [N_EXT_FU],
  output omu_rsp_t   ext_omu_rsp [N_EXT_FU]
);

  localparam int unsigned RF_AW = $clog2(RF_DEPTH);
  localparam int unsigned DM_AW = $clog2(DMEM_DEPTH);
  localparam int unsigned N_ALL = NUM_FU + N_EXT_FU;

  pc_t        ia0, ia1;
  logic [7:0] id0, id1;
  oid_t       ott_oid;
  ott_entry_t ott_e;
  cid_t       vmt_cid;
  mid_t       vmt_mid;
  vmt_entry_t vmt_e;
  fu_cmd_t    fu_cmd [N_ALL];
  fu_sts_t    fu_sts [N_ALL];
  omu_req_t   omu_req [N_ALL];
  omu_rsp_t   omu_rsp [N_ALL];
  logic       o_rf_en, o_rf_we, o_dm_en, o_dm_we;
  logic [RF_AW-1:0] o_rf_addr;
  logic [DM_AW-1:0] o_dm_addr;
  word_t      o_rf_wdata, o_rf_rdata, o_dm_wdata, o_dm_rdata;
  logic       sys_wr;

  // A direct system write to object storage invalidates the FU caches.
  assign sys_wr = (rf_en && rf_we) || (dm_en && dm_we);

  for (genvar i = 0; i < N_EXT_FU; i++) begin : g_ext
    assign ext_fu_cmd[i]          = fu_cmd[NUM_FU+i];
    assign fu_sts[NUM_FU+i]       = ext_fu_sts[i];
    assign omu_req[NUM_FU+i]      = ext_omu_req[i];
    assign ext_omu_rsp[i]         = omu_rsp[NUM_FU+i];
  end

  instr_mem u_imem (
    .clk(clk),
    .rd_addr0(ia0), .rd_data0(id0),
    .rd_addr1(ia1), .rd_data1(id1),
    .wr_en(imem_wr_en), .wr_addr(imem_wr_addr), .wr_data(imem_wr_data)
  );

  miu #(.STACK_DEPTH(STACK_DEPTH), .FRAME_DEPTH(FRAME_DEPTH), .N_FU(N_ALL)) u_miu (
    .clk(clk), .rst_n(rst_n), .run(run),
    .imem_addr0(ia0), .imem_data0(id0), .imem_addr1(ia1), .imem_data1(id1),
    .ott_oid(ott_oid), .ott_entry(ott_e),
    .vmt_cid(vmt_cid), .vmt_mid(vmt_mid), .vmt_entry(vmt_e),
    .fu_cmd(fu_cmd), .fu_sts(fu_sts),
    .halted(halted), .exception(exception), .exc_code(exc_code),
    .pc(pc), .stack_count(stack_count), .stack_top(stack_top)
  );

  ott u_ott (
    .clk(clk), .rst_n(rst_n),
    .rd_oid(ott_oid), .rd_entry(ott_e),
    .wr_en(ott_wr_en), .wr_oid(ott_wr_oid), .wr_entry(ott_wr_entry)
  );

  vmt u_vmt (
    .clk(clk), .rst_n(rst_n),
    .rd_cid(vmt_cid), .rd_mid(vmt_mid), .rd_entry(vmt_e),
    .wr_en(vmt_wr_en), .wr_cid(vmt_wr_cid), .wr_mid(vmt_wr_mid), .wr_entry(vmt_wr_entry)
  );

  fu_a_f u_fu_a_f (
    .clk(clk), .rst_n(rst_n),
    .cmd(fu_cmd[FU_A_F]), .sts(fu_sts[FU_A_F]),
    .omu_req(omu_req[FU_A_F]), .omu_rsp(omu_rsp[FU_A_F])
  );

  fu_b_f u_fu_b_f (
    .clk(clk), .rst_n(rst_n),
    .cmd(fu_cmd[FU_B_F]), .sts(fu_sts[FU_B_F]),
    .omu_req(omu_req[FU_B_F]), .omu_rsp(omu_rsp[FU_B_F])
  );

  fu_b_g u_fu_b_g (
    .clk(clk), .rst_n(rst_n),
    .cmd(fu_cmd[FU_B_G]), .sts(fu_sts[FU_B_G]),
    .omu_req(omu_req[FU_B_G]), .omu_rsp(omu_rsp[FU_B_G])
  );

  omu #(.N_FU(N_ALL), .RF_AW(RF_AW), .DMEM_AW(DM_AW)) u_omu (
    .clk(clk), .rst_n(rst_n),
    .fu_req(omu_req), .fu_rsp(omu_rsp),
    .map_wr_en(map_wr_en), .map_wr_oid(map_wr_oid), .map_wr_entry(map_wr_entry),
    .rf_en(o_rf_en), .rf_we(o_rf_we), .rf_addr(o_rf_addr),
    .rf_wdata(o_rf_wdata), .rf_rdata(o_rf_rdata),
    .dm_en(o_dm_en), .dm_we(o_dm_we), .dm_addr(o_dm_addr),
    .dm_wdata(o_dm_wdata), .dm_rdata(o_dm_rdata),
    .flush(sys_wr),
    .locked(omu_locked),
    .cache_hit(cache_hit)
  );

  reg_file #(.DEPTH(RF_DEPTH)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .a_en(o_rf_en), .a_we(o_rf_we), .a_addr(o_rf_addr),
    .a_wdata(o_rf_wdata), .a_rdata(o_rf_rdata),
    .b_en(rf_en), .b_we(rf_we), .b_addr(rf_addr),
    .b_wdata(rf_wdata), .b_rdata(rf_rdata)
  );

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk),
    .a_en(o_dm_en), .a_we(o_dm_we), .a_addr(o_dm_addr),
    .a_wdata(o_dm_wdata), .a_rdata(o_dm_rdata),
    .b_en(dm_en), .b_we(dm_we), .b_addr(dm_addr),
    .b_wdata(dm_wdata), .b_rdata(dm_rdata)
  );

endmodule
