// sdc_pkg: types and constants shared by the superscalar dual-core (SDC) blocks.
//
// The SDC couples two five-stage ARM pipelines (CORE_A, CORE_B) through an
// instruction dispatch unit (IDU). This package holds the operation modes, the
// instruction classes used by the dispatch rules (Type0..Type4), the encoding
// chosen here for the six extended instructions, and the "resource masks" used
// for hazard checks. A resource mask has one bit per architectural register
// r0..r14 (bit 15, the PC, is never set: control flow is handled by stopping
// fetch), plus bit 16 for the status flags (NZCV) and bit 17 for data memory.
// Treating flags and memory as registers lets one RAW/WAW/WAR check cover the
// condition-code rule and the ordering of loads and stores between the cores.
//
// The extended-instruction encoding is this design's own choice (the mnemonics
// and meanings follow the architecture, the bit patterns do not come from it):
// they sit in the ARM permanently-undefined space
//   [31:28] cond (1110) | [27:20] 0x7F | [19:16] Rn | [15:12] Rd |
//   [11:8] sub-op | [7:4] 0xF | [3:0] 0
// with sub-op 0 suprs, 1 single, 2 mthd, 3 joint, 4 wait, 5 move Rd,Rn.
package sdc_pkg;

  localparam int NRES   = 18;   // r0..r15, flags, memory
  localparam int RES_FL = 16;
  localparam int RES_MEM = 17;
  localparam int NWIN   = 3;    // pipeline entries a core reports: ID, EXE, MEM

  typedef logic [NRES-1:0] resmask_t;

  // Operation modes (single, superscalar, multithreading and the two
  // rendezvous waiting states of the multithreading mode).
  typedef enum logic [2:0] {
    MODE_SINGLE     = 3'd0,
    MODE_SUPER      = 3'd1,
    MODE_MTHD       = 3'd2,
    MODE_WAIT_JOINT = 3'd3,   // one core fetched wait, waiting for joint
    MODE_WAIT_WAIT  = 3'd4    // one core fetched joint, waiting for wait
  } mode_e;

  // Instruction classes of the dispatch rules.
  typedef enum logic [2:0] {
    T0_DP    = 3'd0,   // data processing
    T1_LDST  = 3'd1,   // single register load/store
    T2_LDSTM = 3'd2,   // multiple register load/store
    T3_CTRL  = 3'd3,   // control flow, undefined, or condition not AL
    T4_OTHER = 3'd4    // SWP, MRS, MSR, multiply, SWI, coprocessor, extended
  } itype_e;

  typedef enum logic [2:0] {
    EXT_NONE   = 3'd0,
    EXT_SUPRS  = 3'd1,
    EXT_SINGLE = 3'd2,
    EXT_MTHD   = 3'd3,
    EXT_JOINT  = 3'd4,
    EXT_WAIT   = 3'd5,
    EXT_MOVE   = 3'd6
  } ext_e;

  localparam logic [7:0] EXT_MAJOR = 8'h7F;
  localparam logic [3:0] EXT_OP_SUPRS  = 4'd0;
  localparam logic [3:0] EXT_OP_SINGLE = 4'd1;
  localparam logic [3:0] EXT_OP_MTHD   = 4'd2;
  localparam logic [3:0] EXT_OP_JOINT  = 4'd3;
  localparam logic [3:0] EXT_OP_WAIT   = 4'd4;
  localparam logic [3:0] EXT_OP_MOVE   = 4'd5;

  localparam logic [3:0] COND_AL = 4'hE;

  // Result of pre-decoding one fetched instruction.
  typedef struct packed {
    itype_e      itype;
    ext_e        ext;
    logic        is_ctrl;     // may change the PC
    logic        sets_flags;  // writes NZCV
    logic        cond_al;     // condition field is AL
    resmask_t    src;
    resmask_t    dst;
  } pdec_t;

  // One instruction as handed from the IDU to a core, with its side band.
  typedef struct packed {
    logic [31:0] inst;   // ARM instruction (extended ones already re-encoded)
    logic [31:0] pc;     // its address
    logic        rsel;   // register file read:  0 = CORE_A's, 1 = CORE_B's
    logic        wsel;   // register file write: 0 = CORE_A's, 1 = CORE_B's
    logic        ctrl;   // control-flow instruction: resolution is reported
    resmask_t    src;
    resmask_t    dst;
  } disp_t;

  // One in-flight pipeline entry as seen by the IDU's hazard checks.
  typedef struct packed {
    logic     valid;
    resmask_t src;
    resmask_t dst;
  } hz_entry_t;

  // Data memory request of one core.
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;   // byte address
    logic [31:0] wdata;
  } dreq_t;

  // IDU activity, one pulse per cycle in which it happens
  typedef struct packed {
    logic dual;         // two instructions issued together
    logic single;       // one instruction issued in superscalar mode
    logic raw_both;     // I0 depends on both pipelines: nothing issued
    logic order;        // a WAW/WAR hazard with the other core held I0 back
    logic one_stalled;  // one core stalled, the other one got I0
    logic ctrl_wait;    // fetch stopped behind a control-flow instruction
    logic move;         // a move was re-encoded and sent to CORE_B
    logic ext;          // an extended instruction was consumed by the IDU
    logic switched;     // a new operation mode was taken
  } idu_ev_t;

  function automatic logic [31:0] ext_encode(logic [3:0] op, logic [3:0] rd, logic [3:0] rn);
    return {COND_AL, EXT_MAJOR, rn, rd, op, 4'hF, 4'h0};
  endfunction

  // mov Rd, Rn (register operand, no shift), the ARM form a move is turned into.
  function automatic logic [31:0] mov_encode(logic [3:0] rd, logic [3:0] rn);
    return {COND_AL, 8'h1A, 4'h0, rd, 8'h00, rn};
  endfunction

endpackage
