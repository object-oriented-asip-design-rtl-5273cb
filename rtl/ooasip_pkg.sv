// ooasip_pkg: types and constants shared by the object-oriented ASIP.
//
// The OO-ASIP maps a hardware class library onto a processor: every public
// method of a hardware class becomes one functional unit (FU), objects are
// named by an object identifier (oid), their class by a class identifier
// (cid) and every first-introduced method by a method identifier (mid).
// The 32-bit data word follows the 32-bit object fields of the sample FU;
// all other widths and table sizes are choices of this implementation.
//
// Interfaces defined here:
//   fu_cmd_t / fu_sts_t   MIU <-> FU: START command with oid and one int
//                         argument; RESET/STARTED/DONE status plus the
//                         FU's own method-call request ("instruction" port).
//   omu_req_t / omu_rsp_t FU <-> OMU: field read/write by (oid, index),
//                         with a lock bit that keeps the OMU granted to the
//                         FU for atomic read-modify-write sequences.
package ooasip_pkg;

  localparam int unsigned WORD_W   = 32;  // object fields and stack words
  localparam int unsigned OID_W    = 4;   // up to 16 objects
  localparam int unsigned CID_W    = 2;   // up to 4 classes
  localparam int unsigned MID_W    = 2;   // up to 4 public methods
  localparam int unsigned FIDX_W   = 4;   // field index inside an object
  localparam int unsigned PC_W     = 8;   // 256-byte instruction memory
  localparam int unsigned FU_W     = 2;   // hardware FU number
  localparam int unsigned NUM_FU   = 3;   // A::f, B::f, B::g

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [OID_W-1:0]  oid_t;
  typedef logic [CID_W-1:0]  cid_t;
  typedef logic [MID_W-1:0]  mid_t;
  typedef logic [FIDX_W-1:0] fidx_t;
  typedef logic [PC_W-1:0]   pc_t;

  // Class and method numbering of the sample library (class B derives
  // from A, overrides f() and introduces g()). A mid is given to each
  // first-ever introduced method, so A::f and B::f share MID_F.
  localparam cid_t CID_A = 2'd0;
  localparam cid_t CID_B = 2'd1;
  localparam mid_t MID_F = 2'd0;
  localparam mid_t MID_G = 2'd1;

  // Hardware FU numbers.
  localparam logic [FU_W-1:0] FU_A_F = 2'd0;
  localparam logic [FU_W-1:0] FU_B_F = 2'd1;
  localparam logic [FU_W-1:0] FU_B_G = 2'd2;

  // JVM opcodes of the supported subset (standard JVM encodings).
  typedef enum logic [7:0] {
    OP_NOP           = 8'h00,
    OP_ICONST_M1     = 8'h02,
    OP_ICONST_0      = 8'h03,
    OP_ICONST_1      = 8'h04,
    OP_ICONST_2      = 8'h05,
    OP_ICONST_3      = 8'h06,
    OP_ICONST_4      = 8'h07,
    OP_ICONST_5      = 8'h08,
    OP_BIPUSH        = 8'h10,
    OP_POP           = 8'h57,
    OP_DUP           = 8'h59,
    OP_IADD          = 8'h60,
    OP_ISUB          = 8'h64,
    OP_IF_ICMPEQ     = 8'h9f,
    OP_IF_ICMPNE     = 8'ha0,
    OP_GOTO          = 8'ha7,
    OP_JSR           = 8'ha8,
    OP_RETURN        = 8'hb1,
    OP_INVOKEVIRTUAL = 8'hb6
  } opcode_e;

  // OTT entry: class of an object, valid while the object is allocated.
  typedef struct packed {
    logic valid;
    cid_t cid;
  } ott_entry_t;

  // VMT entry: hardware FU number or start address of a software routine.
  typedef struct packed {
    logic valid;
    logic ishw;
    pc_t  fuid;
  } vmt_entry_t;

  // Address mapping table entry: where an object's fields live.
  typedef struct packed {
    logic  valid;
    logic  in_rf;   // 1: register file, 0: data memory
    logic [7:0] base;
  } map_entry_t;

  // FU command and status (MIU side). Four-phase: the MIU holds START
  // until it sees DONE, then drops it; the FU returns to RESET.
  // The command field is two bits wide like the status; its upper bit is
  // spare and always 0.
  typedef enum logic [1:0] {CMD_IDLE = 2'd0, CMD_START = 2'd1} fu_command_e;
  typedef enum logic [1:0] {ST_RESET = 2'd0, ST_STARTED = 2'd1, ST_DONE = 2'd2} fu_status_e;

  typedef struct packed {
    fu_command_e command;
    oid_t        oid;
    word_t       arg;
    logic        call_ack;  // the method the FU called has completed
  } fu_cmd_t;

  typedef struct packed {
    fu_status_e status;
    logic       call_req;   // FU asks the MIU to invoke a method
    mid_t       call_mid;
    oid_t       call_oid;
    word_t      call_arg;
  } fu_sts_t;

  // FU <-> OMU field access.
  typedef struct packed {
    logic  req;
    logic  lock;
    logic  we;
    oid_t  oid;
    fidx_t idx;
    word_t wdata;
  } omu_req_t;

  typedef struct packed {
    logic  ack;
    logic  err;     // access to an unmapped object
    word_t rdata;
  } omu_rsp_t;

endpackage
