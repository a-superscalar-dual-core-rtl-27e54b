// sdc_core: one five-stage ARM pipeline (IF, ID, EXE, MEM, WB) of the SDC.
//
// Both CORE_A and CORE_B are instances of this module. The fetch stage is the
// IDU: an instruction handed in on `disp` is latched into the IF/ID register.
// ID reads up to three registers from the shared register-file block (the
// file chosen by the instruction's `rsel`), EXE evaluates the condition code,
// the shifter and the ALU and writes NZCV, MEM accesses the shared data memory
// through the arbiter, and WB writes the result into the file chosen by `wsel`.
// The core keeps its own forwarding unit (EX/MEM and MEM/WB to EXE) and its own
// load-use interlock; it has no path to the other core, which is why the IDU
// must never give it an instruction that depends on the other core's pipeline.
//
// Control flow is resolved in MEM: `br_valid` pulses once for each control-flow
// instruction (B, BL, BX, data processing or LDR writing the PC) with
// `br_taken` and `br_target`. The IDU stops fetching after a control-flow
// instruction until this pulse, so the core needs no flush logic.
// `accept` is low when the IF/ID register holds (load-use or memory stall); the
// IDU must not dispatch to the core then. `win` reports the ID, EXE and MEM
// entries (valid plus resource masks) for the IDU's hazard checks; the MEM
// entry only while the arbiter holds it (see below).
//
// Supported: all sixteen data-processing opcodes with immediate, immediate-
// shifted or register-shifted operands, LDR/STR/LDRB/STRB with immediate or
// shifted-register offset and LDRH/STRH/LDRSB/LDRSH with immediate or register
// offset, each pre-indexed, pre-indexed with write-back or post-indexed (the
// updated base is written through a second register-file port in WB and is
// forwarded like a result), MUL/MLA and UMULL/SMULL (single-cycle multiplier in
// EXE; the high word of a long product leaves through that second port), MRS and
// MSR on the flags, B, BL, BX, and LDM/STM in all four addressing modes with
// or without write-back (the instruction is held in IF/ID and split into one
// single-word micro-op per listed register, lowest register first; a loaded
// PC branches after the last word), and SWP/SWPB as a read micro-op that also
// captures Rm followed by a write micro-op, the read raising `dlock` so the
// arbiter lets no access of the other core in between. UMLAL/SMLAL, SWI, coprocessor
// instructions and LDM/STM with the S bit, an empty list or r15 as base are
// not executed: they pass through as no-ops and pulse `unsupported`. The ARM core itself is outside
// what the architecture description designs; this subset is this design's own.
// Reading r15 gives the instruction address + 8 in every form.
module sdc_core
  import sdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from the IDU
  input  logic        disp_valid,
  input  disp_t       disp,
  output logic        accept,
  output hz_entry_t   win [NWIN],
  output logic        busy,
  output logic        br_valid,
  output logic        br_taken,
  output logic [31:0] br_target,
  // register-file ports
  output logic        rf_rsel,
  output logic [3:0]  rf_raddr [3],
  input  logic [31:0] rf_rdata [3],
  output logic        rf_we,
  output logic        rf_wsel,
  output logic [3:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        rf_bwe,       // base write-back (same file as rf_wsel)
  output logic [3:0]  rf_bwaddr,
  output logic [31:0] rf_bwdata,
  output logic        fl_sel,
  input  logic [3:0]  fl_rdata,     // NZCV
  output logic        fl_we,
  output logic [3:0]  fl_wdata,
  // data memory (through the arbiter)
  output dreq_t       dreq,
  output logic        dlock,        // this access and the next are atomic (SWP)
  input  logic        dgnt,
  input  logic [31:0] drdata,
  // events
  output logic        retire,
  output logic        unsupported,
  output logic        ev_fwd,
  output logic        ev_loaduse,
  output logic        ev_memstall
);

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    disp_t       d;
    logic [3:0]  cond;
    logic [3:0]  opc;
    logic        s;
    logic        is_dp, is_ld, is_st, is_byte, is_b, is_bl, is_bx, unsup;
    logic        is_mul, is_half, is_sgn, hw_imm, is_mrs, is_msr;
    logic        is_long;     // UMULL/SMULL: RdHi leaves through the write-back port
    logic        is_swp;      // SWP/SWPB micro-op: read first, then write
    logic        pre, wb;     // load/store: pre-indexed, base written back
    logic        is_mop, mfirst;          // micro-op of LDM/STM, first of them
    logic [31:0] moff, mwboff;            // its address and write-back offsets
    logic        imm_op;      // DP: rotated immediate; LS: register offset when 1
    logic        reg_shift;
    logic        up;
    logic [3:0]  rd, rn, rm, rc;    // rc: Rs for DP, Rd for STR
    logic        use_rn, use_rm, use_rc;
    logic [31:0] vn, vm, vc;
    logic        we;          // writes rd
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        exec;        // condition passed
    logic        ctrl;
    logic        is_ld, is_st, is_byte, is_b, is_half, is_sgn;
    logic        wb;
    logic [3:0]  rn;
    logic [31:0] wbval;
    logic [31:0] res;         // ALU result / address / branch target
    logic [31:0] sdata;
    logic [3:0]  rd;
    logic        we, wsel, xfer;
    logic        lock;
    resmask_t    src, dst;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        we;
    logic        wsel;
    logic        xfer;
    logic [3:0]  rd;
    logic [31:0] data;
    logic        wb;
    logic [3:0]  rn;
    logic [31:0] wbval;
  } memwb_t;

  logic   ifid_valid;
  disp_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  logic stall_mem, stall_lu;

  // ---------------------------------------------------------------- ID
  logic [31:0] i;
  idex_t       id_n;

  assign i = ifid.inst;

  // LDM/STM sequencer: the instruction stays in IF/ID while its micro-ops
  // enter EXE one per cycle; `mrem` holds the registers still to transfer.
  logic        mseq;              // a sequence is under way
  logic [15:0] mrem, m_list;
  logic [3:0]  m_reg;
  logic [29:0] m_idx;             // micro-ops issued so far
  logic [29:0] m_cnt;             // registers in the list
  logic        m_last, m_hold;
  logic [31:0] m_start;           // first address relative to the base
  logic [31:0] mbase;             // base value captured by the first micro-op
  logic [31:0] mdata;             // SWP: Rm captured by the read micro-op
  logic        swp_i;

  always_comb begin
    m_list = mseq ? mrem : i[15:0];
    m_reg  = 4'd0;
    for (int k = 15; k >= 0; k--) if (m_list[k]) m_reg = 4'(k);
    swp_i  = i[27:23] == 5'b00010 && i[21:20] == 2'b00 && i[11:4] == 8'h09;
    m_last = swp_i ? mseq : (m_list & (m_list - 16'd1)) == 16'd0;
    m_cnt  = '0;
    for (int k = 0; k < 16; k++) m_cnt += 30'(i[k]);
    m_idx  = m_cnt;
    for (int k = 0; k < 16; k++) m_idx -= 30'(m_list[k]);
    unique case (i[24:23])
      2'b01:   m_start = 32'd0;                          // IA
      2'b11:   m_start = 32'd4;                          // IB
      2'b00:   m_start = 32'd4 - {m_cnt, 2'b00};         // DA
      default: m_start = -{m_cnt, 2'b00};                // DB
    endcase
  end

  always_comb begin
    id_n = '0;
    id_n.valid  = ifid_valid;
    id_n.d      = ifid;
    id_n.cond   = i[31:28];
    id_n.opc    = i[24:21];
    id_n.s      = i[20];
    id_n.rd     = i[15:12];
    id_n.rn     = i[19:16];
    id_n.rm     = i[3:0];
    id_n.imm_op = i[25];
    id_n.up     = i[23];
    if (i[31:28] == 4'hF) begin
      id_n.unsup = 1'b1;
    end else if (i[27:4] == 24'h12FFF1) begin
      id_n.is_bx = 1'b1; id_n.use_rm = 1'b1;
    end else if (i[27:22] == 6'b000000 && i[7:4] == 4'b1001) begin
      // MUL / MLA: Rd = Rm * Rs (+ Rn)
      id_n.is_mul = 1'b1;
      id_n.rd = i[19:16];
      id_n.rn = i[15:12];
      id_n.use_rn = i[21];
      id_n.use_rm = 1'b1;
      id_n.use_rc = 1'b1;
      id_n.rc = i[11:8];
      id_n.we = 1'b1;
    end else if (i[27:23] == 5'b00001 && i[7:4] == 4'b1001) begin
      // UMULL / SMULL: RdLo = low word through the result port, RdHi = high
      // word through the write-back port (named by rn, which is not read)
      if (i[21] || i[19:16] == i[15:12] || i[19:16] == 4'd15 || i[15:12] == 4'd15) begin
        id_n.unsup = 1'b1;     // accumulating forms, equal or PC destinations
      end else begin
        id_n.is_mul  = 1'b1;
        id_n.is_long = 1'b1;
        id_n.is_sgn  = i[22];
        id_n.rd      = i[15:12];
        id_n.rn      = i[19:16];
        id_n.wb      = 1'b1;
        id_n.use_rm  = 1'b1;
        id_n.use_rc  = 1'b1;
        id_n.rc      = i[11:8];
        id_n.we      = 1'b1;
      end
    end else if (swp_i) begin
      // SWP / SWPB: a read micro-op into Rd that also captures Rm, then a
      // write micro-op of the captured value to the captured address
      if (i[19:16] == 4'd15 || i[15:12] == 4'd15 || i[3:0] == 4'd15) begin
        id_n.unsup = 1'b1;
      end else begin
        id_n.is_mop  = 1'b1;
        id_n.is_swp  = 1'b1;
        id_n.mfirst  = !mseq;
        id_n.is_byte = i[22];
        id_n.is_ld   = !mseq;
        id_n.is_st   = mseq;
        id_n.we      = !mseq;
        id_n.use_rn  = !mseq;
        id_n.rc      = i[3:0];
        id_n.use_rc  = !mseq;
      end
    end else if (i[27:25] == 3'b000 && i[7] && i[4] && i[6:5] != 2'b00) begin
      // LDRH / STRH / LDRSB / LDRSH
      if ((!i[20] && i[6]) || ((!i[24] || i[21]) && i[19:16] == 4'd15)) begin
        id_n.unsup = 1'b1;
      end else begin
        id_n.is_half = i[5];
        id_n.is_byte = !i[5];
        id_n.is_sgn  = i[6];
        id_n.hw_imm  = i[22];
        id_n.pre = i[24];
        id_n.wb  = !i[24] || i[21];
        id_n.use_rn = 1'b1;
        id_n.use_rm = !i[22];
        id_n.is_ld = i[20];
        id_n.is_st = !i[20];
        id_n.we = i[20];
        id_n.use_rc = !i[20];
        id_n.rc = i[15:12];
      end
    end else if (i[27:23] == 5'b00010 && i[21:16] == 6'b001111 && i[11:0] == 12'd0 && !i[22]) begin
      id_n.is_mrs = 1'b1;      // MRS Rd, CPSR (flags only)
      id_n.we = 1'b1;
    end else if ((i[27:23] == 5'b00110 || (i[27:23] == 5'b00010 && i[7:4] == 4'd0)) &&
                 i[21:20] == 2'b10 && i[15:12] == 4'hF && !i[22]) begin
      id_n.is_msr = 1'b1;      // MSR CPSR_<fields>, Rm / #imm (flags field only)
      id_n.use_rm = !i[25];
    end else if (i[27:26] == 2'b00) begin
      if ((!i[25] && i[7:4] == 4'b1001) || (!i[25] && i[7] && i[4]) ||
          (i[24:23] == 2'b10 && !i[20]) || (i[15:12] == 4'd15 && i[20])) begin
        id_n.unsup = 1'b1;
      end else begin
        id_n.is_dp = 1'b1;
        id_n.use_rn = !(i[24:21] == 4'hD || i[24:21] == 4'hF);
        id_n.use_rm = !i[25];
        id_n.reg_shift = !i[25] && i[4];
        id_n.use_rc = id_n.reg_shift;
        id_n.rc = i[11:8];
        id_n.we = (i[24:23] != 2'b10);
      end
    end else if (i[27:26] == 2'b01) begin
      if ((i[25] && i[4]) || ((!i[24] || i[21]) && i[19:16] == 4'd15)) begin
        id_n.unsup = 1'b1;      // undefined, or write-back to the PC
      end else begin
        id_n.pre = i[24];
        id_n.wb  = !i[24] || i[21];
        id_n.use_rn = 1'b1;
        id_n.use_rm = i[25];
        id_n.is_byte = i[22];
        id_n.is_ld = i[20];
        id_n.is_st = !i[20];
        id_n.we = i[20];
        id_n.use_rc = !i[20];
        id_n.rc = i[15:12];
      end
    end else if (i[27:25] == 3'b100) begin
      // LDM / STM: one load/store micro-op per listed register, lowest first
      if (i[22] || i[15:0] == 16'd0 || i[19:16] == 4'd15) begin
        id_n.unsup = 1'b1;      // user-bank / SPSR forms, empty list, PC base
      end else begin
        id_n.is_mop = 1'b1;
        id_n.mfirst = !mseq;
        id_n.is_ld  = i[20];
        id_n.is_st  = !i[20];
        id_n.we     = i[20];
        id_n.rd     = m_reg;
        id_n.rc     = m_reg;
        id_n.use_rc = !i[20];
        id_n.use_rn = !mseq;
        id_n.wb     = i[21] && !mseq;
        id_n.moff   = m_start + {m_idx, 2'b00};
        id_n.mwboff = i[23] ? {m_cnt, 2'b00} : -{m_cnt, 2'b00};
        id_n.d.ctrl = ifid.ctrl && m_last;
      end
    end else if (i[27:25] == 3'b101) begin
      id_n.is_b = 1'b1;
      id_n.is_bl = i[24];
      id_n.we = i[24];
      id_n.rd = 4'd14;
    end else begin
      id_n.unsup = 1'b1;
    end
    if (id_n.unsup) id_n.we = 1'b0;
  end

  assign m_hold = ifid_valid && id_n.is_mop && !m_last;

  assign rf_rsel     = ifid.rsel;
  assign rf_raddr[0] = id_n.rn;
  assign rf_raddr[1] = id_n.rm;
  assign rf_raddr[2] = id_n.rc;

  function automatic logic [31:0] rdval(logic [3:0] r, logic [31:0] v, logic [31:0] pc);
    return (r == 4'd15) ? pc + 32'd8 : v;
  endfunction

  // load-use interlock: the instruction in EXE is a load of a register the
  // instruction in ID reads from the same file
  always_comb begin
    stall_lu = 1'b0;
    if (ifid_valid && idex.valid && idex.is_ld && idex.rd != 4'd15 &&
        idex.d.wsel == ifid.rsel && !(idex.d.rsel != idex.d.wsel)) begin
      if ((id_n.use_rn && id_n.rn == idex.rd) || (id_n.use_rm && id_n.rm == idex.rd) ||
          (id_n.use_rc && id_n.rc == idex.rd))
        stall_lu = 1'b1;
    end
  end

  // ---------------------------------------------------------------- EXE
  logic [31:0] fn, fm, fc;
  logic        fwd_n, fwd_m, fwd_c;

  function automatic logic can_fwd_exmem(exmem_t p, logic [3:0] r, logic rsel);
    return p.valid && p.exec && p.we && !p.is_ld && p.rd == r && r != 4'd15 &&
           p.wsel == rsel && !p.xfer;
  endfunction
  function automatic logic can_fwd_memwb(memwb_t p, logic [3:0] r, logic rsel);
    return p.valid && p.we && p.rd == r && r != 4'd15 && p.wsel == rsel && !p.xfer;
  endfunction

  // a move (reads CORE_A's file, writes CORE_B's) never forwards its result
  logic ex_xfer;
  assign ex_xfer = idex.d.rsel != idex.d.wsel;

  // the updated base of a load/store with write-back forwards like a result
  function automatic logic can_fwd_exmem_b(exmem_t p, logic [3:0] r, logic rsel);
    return p.valid && p.exec && p.wb && p.rn == r && p.wsel == rsel && !p.xfer;
  endfunction
  function automatic logic can_fwd_memwb_b(memwb_t p, logic [3:0] r, logic rsel);
    return p.valid && p.wb && p.rn == r && p.wsel == rsel && !p.xfer;
  endfunction

  // operand r with register-file value v: newest producer first
  function automatic logic [32:0] fwd(logic [3:0] r, logic [31:0] v, logic rsel,
                                      exmem_t e, memwb_t w);
    if (can_fwd_exmem_b(e, r, rsel))    return {1'b1, e.wbval};
    if (can_fwd_exmem(e, r, rsel))      return {1'b1, e.res};
    if (can_fwd_memwb_b(w, r, rsel))    return {1'b1, w.wbval};
    if (can_fwd_memwb(w, r, rsel))      return {1'b1, w.data};
    return {1'b0, v};
  endfunction

  always_comb begin
    fwd_n = 1'b0; fwd_m = 1'b0; fwd_c = 1'b0;
    fn = idex.vn; fm = idex.vm; fc = idex.vc;
    if (idex.use_rn) {fwd_n, fn} = fwd(idex.rn, idex.vn, idex.d.rsel, exmem, memwb);
    if (idex.use_rm) {fwd_m, fm} = fwd(idex.rm, idex.vm, idex.d.rsel, exmem, memwb);
    if (idex.use_rc) {fwd_c, fc} = fwd(idex.rc, idex.vc, idex.d.rsel, exmem, memwb);
  end

  // condition check
  logic fN, fZ, fC, fV, cpass;
  assign {fN, fZ, fC, fV} = fl_rdata;
  assign fl_sel = idex.d.rsel;

  always_comb begin
    unique case (idex.cond)
      4'h0: cpass = fZ;
      4'h1: cpass = !fZ;
      4'h2: cpass = fC;
      4'h3: cpass = !fC;
      4'h4: cpass = fN;
      4'h5: cpass = !fN;
      4'h6: cpass = fV;
      4'h7: cpass = !fV;
      4'h8: cpass = fC && !fZ;
      4'h9: cpass = !fC || fZ;
      4'hA: cpass = fN == fV;
      4'hB: cpass = fN != fV;
      4'hC: cpass = !fZ && (fN == fV);
      4'hD: cpass = fZ || (fN != fV);
      default: cpass = 1'b1;
    endcase
  end

  // barrel shifter: {carry, value}
  function automatic logic [32:0] shift(logic [31:0] v, logic [1:0] typ, logic [7:0] amt,
                                        logic by_reg, logic cin);
    logic [63:0] w;
    logic [4:0]  a5;
    logic [31:0] r;
    logic        c;
    a5 = amt[4:0];
    r = v; c = cin;
    if (!by_reg) begin
      unique case (typ)
        2'd0: if (a5 != 0) begin r = v << a5; c = v[5'(6'd32 - {1'b0, a5})]; end
        2'd1: if (a5 == 0) begin r = 32'd0; c = v[31]; end
              else begin r = v >> a5; c = v[a5 - 5'd1]; end
        2'd2: if (a5 == 0) begin r = {32{v[31]}}; c = v[31]; end
              else begin r = $signed(v) >>> a5; c = v[a5 - 5'd1]; end
        default:
              if (a5 == 0) begin r = {cin, v[31:1]}; c = v[0]; end
              else begin w = {v, v} >> a5; r = w[31:0]; c = v[a5 - 5'd1]; end
      endcase
    end else if (amt != 0) begin
      unique case (typ)
        2'd0: if (amt < 8'd32) begin r = v << amt; c = v[5'(6'd32 - {1'b0, a5})]; end
              else if (amt == 8'd32) begin r = 32'd0; c = v[0]; end
              else begin r = 32'd0; c = 1'b0; end
        2'd1: if (amt < 8'd32) begin r = v >> amt; c = v[a5 - 5'd1]; end
              else if (amt == 8'd32) begin r = 32'd0; c = v[31]; end
              else begin r = 32'd0; c = 1'b0; end
        2'd2: if (amt < 8'd32) begin r = $signed(v) >>> amt; c = v[a5 - 5'd1]; end
              else begin r = {32{v[31]}}; c = v[31]; end
        default:
              if (a5 == 0) begin r = v; c = v[31]; end
              else begin w = {v, v} >> a5; r = w[31:0]; c = v[a5 - 5'd1]; end
      endcase
    end
    return {c, r};
  endfunction

  logic [31:0] op_a, op_b, rn_val, imm_rot, alu_res, ls_off, ls_sum, addr, br_tgt, mul_res;
  logic [65:0] mul_long;
  logic        sh_c, res_c, res_v;
  logic [32:0] sh;
  logic [32:0] sum;
  logic [3:0]  rot2;

  always_comb begin
    rn_val  = rdval(idex.rn, fn, idex.d.pc);
    rot2    = idex.d.inst[11:8];
    imm_rot = ({24'd0, idex.d.inst[7:0]} >> {rot2, 1'b0}) |
              ({24'd0, idex.d.inst[7:0]} << (6'd32 - {1'b0, rot2, 1'b0}));
    if ((idex.is_dp || idex.is_msr) && idex.imm_op) begin
      sh = {(rot2 == 0) ? fC : imm_rot[31], imm_rot};
    end else begin
      sh = shift(rdval(idex.rm, fm, idex.d.pc), idex.d.inst[6:5],
                 idex.reg_shift ? rdval(idex.rc, fc, idex.d.pc)[7:0] : {3'd0, idex.d.inst[11:7]},
                 idex.reg_shift, fC);
    end
    op_b = sh[31:0];
    sh_c = sh[32];
    op_a = rn_val;

    sum = '0;
    res_c = sh_c;
    res_v = fV;
    alu_res = '0;
    unique case (idex.opc)
      4'h0, 4'h8: alu_res = op_a & op_b;
      4'h1, 4'h9: alu_res = op_a ^ op_b;
      4'hC:       alu_res = op_a | op_b;
      4'hD:       alu_res = op_b;
      4'hE:       alu_res = op_a & ~op_b;
      4'hF:       alu_res = ~op_b;
      default: begin
        unique case (idex.opc)
          4'h2, 4'hA: sum = {1'b0, op_a} + {1'b0, ~op_b} + 33'd1;
          4'h3:       sum = {1'b0, op_b} + {1'b0, ~op_a} + 33'd1;
          4'h4, 4'hB: sum = {1'b0, op_a} + {1'b0, op_b};
          4'h5:       sum = {1'b0, op_a} + {1'b0, op_b} + {32'd0, fC};
          4'h6:       sum = {1'b0, op_a} + {1'b0, ~op_b} + {32'd0, fC};
          default:    sum = {1'b0, op_b} + {1'b0, ~op_a} + {32'd0, fC};
        endcase
        alu_res = sum[31:0];
        res_c = sum[32];
        unique case (idex.opc)
          4'h2, 4'hA, 4'h6: res_v = (op_a[31] != op_b[31]) && (alu_res[31] != op_a[31]);
          4'h3, 4'h7:       res_v = (op_b[31] != op_a[31]) && (alu_res[31] != op_b[31]);
          default:          res_v = (op_a[31] == op_b[31]) && (alu_res[31] != op_a[31]);
        endcase
      end
    endcase

    // load/store address (pre-indexed, no write-back)
    if (idex.is_half || idex.is_sgn)
      ls_off = idex.hw_imm ? {24'd0, idex.d.inst[11:8], idex.d.inst[3:0]}
                           : rdval(idex.rm, fm, idex.d.pc);
    else
      ls_off = idex.imm_op ? op_b : {20'd0, idex.d.inst[11:0]};
    mul_long = $signed({idex.is_sgn && fm[31], fm}) * $signed({idex.is_sgn && fc[31], fc});
    if (idex.is_long)
      mul_res = mul_long[31:0];
    else
      mul_res = rdval(idex.rm, fm, idex.d.pc) * rdval(idex.rc, fc, idex.d.pc) +
                (idex.use_rn ? rn_val : 32'd0);
    if (idex.is_mop) begin
      ls_sum = rn_val + idex.mwboff;
      addr   = (idex.mfirst ? rn_val : mbase) + idex.moff;
    end else begin
      ls_sum = idex.up ? rn_val + ls_off : rn_val - ls_off;
      addr   = idex.pre ? ls_sum : rn_val;
    end
    br_tgt = idex.d.pc + 32'd8 + {{6{idex.d.inst[23]}}, idex.d.inst[23:0], 2'b00};
  end

  exmem_t ex_n;
  always_comb begin
    ex_n = '0;
    ex_n.valid = idex.valid;
    ex_n.exec  = cpass && !idex.unsup;
    ex_n.ctrl  = idex.d.ctrl;
    ex_n.is_ld = idex.is_ld;
    ex_n.is_st = idex.is_st;
    ex_n.is_byte = idex.is_byte;
    ex_n.is_half = idex.is_half;
    ex_n.wb      = idex.wb;
    ex_n.rn      = idex.rn;
    ex_n.wbval   = idex.is_long ? mul_long[63:32] : ls_sum;
    ex_n.is_sgn  = idex.is_sgn;
    ex_n.is_b  = idex.is_b;
    ex_n.rd    = idex.rd;
    ex_n.we    = idex.we;
    ex_n.wsel  = idex.d.wsel;
    ex_n.xfer  = ex_xfer;
    ex_n.src   = idex.d.src;
    ex_n.dst   = idex.d.dst;
    ex_n.sdata = (idex.is_swp && !idex.mfirst) ? mdata : rdval(idex.rc, fc, idex.d.pc);
    ex_n.lock  = idex.is_swp && idex.mfirst;
    if (idex.is_b)            ex_n.res = idex.is_bl ? idex.d.pc + 32'd4 : br_tgt;
    else if (idex.is_bx)      ex_n.res = rdval(idex.rm, fm, idex.d.pc) & ~32'd1;
    else if (idex.is_ld || idex.is_st) ex_n.res = addr;
    else if (idex.is_mul)     ex_n.res = mul_res;
    else if (idex.is_mrs)     ex_n.res = {fl_rdata, 28'd0};
    else                      ex_n.res = alu_res;
  end

  // BL resolves to the branch target in MEM but writes pc+4 to lr: keep the
  // target alongside
  logic [31:0] exmem_tgt;

  // flags: data processing with S, MUL/MLA with S (N and Z; C and V kept),
  // MSR with the flags field
  assign fl_we    = idex.valid && cpass && !stall_mem &&
                    ((idex.is_dp && idex.s && !(idex.rd == 4'd15 && idex.we)) ||
                     (idex.is_mul && idex.s) || (idex.is_msr && idex.d.inst[19]));
  always_comb begin
    if (idex.is_msr)
      fl_wdata = op_b[31:28];
    else if (idex.is_long)
      fl_wdata = {mul_long[63], mul_long[63:0] == 0, fC, fV};
    else if (idex.is_mul)
      fl_wdata = {mul_res[31], mul_res == 0, fC, fV};
    else if (idex.opc inside {4'h0, 4'h1, 4'h8, 4'h9, 4'hC, 4'hD, 4'hE, 4'hF})
      fl_wdata = {alu_res[31], alu_res == 0, sh_c, fV};
    else
      fl_wdata = {alu_res[31], alu_res == 0, res_c, res_v};
  end

  // ---------------------------------------------------------------- MEM
  logic [31:0] ld_data, ld_rot;
  logic [63:0] ld_wide;
  logic        mem_acc;

  assign mem_acc = exmem.valid && exmem.exec && (exmem.is_ld || exmem.is_st);
  always_comb begin
    dreq = '0;
    dreq.req   = mem_acc;
    dreq.we    = exmem.is_st;
    dreq.addr  = exmem.res;
    dreq.wdata = exmem.is_byte ? {4{exmem.sdata[7:0]}} :
                 exmem.is_half ? {2{exmem.sdata[15:0]}} : exmem.sdata;
    dreq.be    = exmem.is_byte ? (4'b0001 << exmem.res[1:0]) :
                 exmem.is_half ? (4'b0011 << {exmem.res[1], 1'b0}) : 4'b1111;
  end
  assign stall_mem = mem_acc && !dgnt;
  assign dlock     = exmem.lock;

  always_comb begin
    ld_wide = {drdata, drdata} >> {exmem.res[1:0], 3'b000};
    ld_rot  = ld_wide[31:0];
    if (exmem.is_byte)
      ld_data = {{24{exmem.is_sgn && ld_rot[7]}}, ld_rot[7:0]};
    else if (exmem.is_half)
      ld_data = {{16{exmem.is_sgn && ld_rot[15]}}, ld_rot[15:0]};
    else
      ld_data = ld_rot;
  end

  assign br_valid  = exmem.valid && exmem.ctrl && !stall_mem;
  assign br_taken  = exmem.exec;
  assign br_target = exmem.is_ld ? ld_data : (exmem.is_b ? exmem_tgt : exmem.res);

  // ---------------------------------------------------------------- WB
  assign rf_we    = memwb.valid && memwb.we && (memwb.rd != 4'd15 || memwb.xfer);
  assign rf_wsel  = memwb.wsel;
  assign rf_waddr = memwb.rd;
  assign rf_wdata = memwb.data;
  assign rf_bwe    = memwb.valid && memwb.wb;
  assign rf_bwaddr = memwb.rn;
  assign rf_bwdata = memwb.wbval;

  // ---------------------------------------------------------------- registers
  assign accept = !(stall_mem || stall_lu || m_hold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifid_valid <= 1'b0;
      ifid       <= '0;
      idex       <= '0;
      exmem      <= '0;
      exmem_tgt  <= '0;
      memwb      <= '0;
      mseq       <= 1'b0;
      mrem       <= '0;
      mbase      <= '0;
      mdata      <= '0;
    end else begin
      // WB
      if (stall_mem) begin
        memwb.valid <= 1'b0;
      end else begin
        memwb.valid <= exmem.valid;
        memwb.we    <= exmem.exec && exmem.we;
        memwb.wsel  <= exmem.wsel;
        memwb.xfer  <= exmem.xfer;
        memwb.rd    <= exmem.rd;
        memwb.data  <= exmem.is_ld ? ld_data : exmem.res;
        memwb.wb    <= exmem.exec && exmem.wb;
        memwb.rn    <= exmem.rn;
        memwb.wbval <= exmem.wbval;
      end
      if (stall_mem) begin
        // EXE holds: keep the operands it has already been forwarded, since
        // their producer leaves WB meanwhile
        idex.vn <= fn;
        idex.vm <= fm;
        idex.vc <= fc;
      end else begin
        exmem     <= ex_n;
        exmem_tgt <= br_tgt;
        if (idex.valid && idex.is_mop && idex.mfirst) begin
          mbase <= rn_val;
          mdata <= rdval(idex.rc, fc, idex.d.pc);
        end
        if (stall_lu) begin
          idex.valid <= 1'b0;
        end else begin
          idex <= id_n;
          idex.vn <= rf_rdata[0];
          idex.vm <= rf_rdata[1];
          idex.vc <= rf_rdata[2];
          if (m_hold) begin
            mseq <= 1'b1;
            mrem <= m_list & (m_list - 16'd1);
          end else begin
            mseq       <= 1'b0;
            ifid_valid <= disp_valid;
            ifid       <= disp;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- status
  assign win[0] = '{valid: ifid_valid, src: ifid.src, dst: ifid.dst};
  assign win[1] = '{valid: idex.valid, src: idex.d.src, dst: idex.d.dst};
  // An instruction in MEM that moves on this cycle writes back next cycle,
  // early enough for a register read in ID (write-through), and it has
  // already written its flags; it is a hazard only while the arbiter holds it.
  assign win[2] = '{valid: exmem.valid && stall_mem, src: exmem.src,
                    dst: exmem.dst & ~(NRES'(1) << RES_FL)};
  assign busy   = ifid_valid || idex.valid || exmem.valid || memwb.valid;

  assign retire      = memwb.valid;
  assign unsupported = idex.valid && idex.unsup && !stall_mem;
  assign ev_fwd      = idex.valid && (fwd_n || fwd_m || fwd_c);
  assign ev_loaduse  = stall_lu && !stall_mem;
  assign ev_memstall = stall_mem;

  // the IDU must respect `accept`
  assert property (@(posedge clk) disable iff (!rst_n) disp_valid |-> accept);

endmodule
