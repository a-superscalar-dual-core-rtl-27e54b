// sdc_predecode: IDU pre-decoder for one fetched instruction (combinational).
//
// It sorts the instruction into the five classes the dispatch rules use:
// Type0 data processing, Type1 single load/store, Type2 load/store multiple,
// Type3 control flow / undefined / condition other than AL, Type4 everything
// else (SWP, MRS, MSR, multiply, halfword transfers, SWI, coprocessor). It also
// works out which resources the instruction reads (src) and writes (dst) as
// masks over r0..r14, the flags (bit 16) and data memory (bit 17), and it
// recognises the six extended instructions. "move Rd,Rn" is re-encoded into the
// ARM "mov Rd,Rn" (reenc); every other instruction passes through unchanged.
//
// The classes, the re-encoding of move, and the idea of pre-decoding in the
// IDU follow the architecture description. The mask bookkeeping (flags and
// memory as pseudo-registers), the conservative all-ones masks for Type2 and
// Type4, and the extended-instruction bit patterns (see sdc_pkg) are this
// design's own choices. Extended instructions are reported as Type4 so they are
// never paired; an unknown sub-op of the extended space is "undefined", Type3.
module sdc_predecode
  import sdc_pkg::*;
(
  input  logic [31:0] inst,
  output pdec_t       pd,
  output logic [31:0] reenc
);

  logic [3:0] cond, rn, rd, rm, rs, opc;
  logic       s_bit, imm_op, reg_shift;

  assign cond = inst[31:28];
  assign rn   = inst[19:16];
  assign rd   = inst[15:12];
  assign rs   = inst[11:8];
  assign rm   = inst[3:0];
  assign opc  = inst[24:21];
  assign s_bit = inst[20];
  assign imm_op = inst[25];
  assign reg_shift = ~inst[25] & inst[4];

  function automatic resmask_t rbit(logic [3:0] r);
    resmask_t m;
    m = '0;
    if (r != 4'd15) m[{1'b0, r}] = 1'b1;   // the PC is not tracked
    return m;
  endfunction

  always_comb begin
    pd = '{itype: T4_OTHER, ext: EXT_NONE, is_ctrl: 1'b0, sets_flags: 1'b0,
           cond_al: (cond == COND_AL), src: '0, dst: '0};
    reenc = inst;

    if (inst[27:20] == EXT_MAJOR && inst[7:4] == 4'hF) begin
      // extended instruction space
      pd.itype = T4_OTHER;
      unique case (inst[11:8])
        EXT_OP_SUPRS:  pd.ext = EXT_SUPRS;
        EXT_OP_SINGLE: pd.ext = EXT_SINGLE;
        EXT_OP_MTHD:   pd.ext = EXT_MTHD;
        EXT_OP_JOINT:  pd.ext = EXT_JOINT;
        EXT_OP_WAIT:   pd.ext = EXT_WAIT;
        EXT_OP_MOVE: begin
          pd.ext = EXT_MOVE;
          pd.src = rbit(rn);        // read from CORE_A's file
          reenc  = mov_encode(rd, rn);  // written to CORE_B's file
        end
        default: begin
          pd.itype = T3_CTRL;       // undefined
          pd.src = '1; pd.dst = '1;
        end
      endcase
    end else if (cond == 4'hF) begin
      pd.itype = T4_OTHER;          // unconditional space
      pd.src = '1; pd.dst = '1;
    end else begin
      unique casez (inst[27:25])
        3'b00?: begin
          if (!imm_op && inst[7:4] == 4'b1001) begin
            pd.itype = T4_OTHER;    // multiply, SWP
            pd.src = '1; pd.dst = '1;
          end else if (!imm_op && inst[7] && inst[4]) begin
            pd.itype = T4_OTHER;    // halfword / signed transfers
            pd.src = '1; pd.dst = '1;
          end else if (inst[27:4] == 24'h12FFF1) begin
            pd.itype = T3_CTRL;     // BX
            pd.is_ctrl = 1'b1;
            pd.src = rbit(rm);
          end else if (opc[3:2] == 2'b10 && !s_bit) begin
            pd.itype = T4_OTHER;    // MRS, MSR
            pd.src = '1; pd.dst = '1;
          end else begin
            // data processing
            pd.itype = T0_DP;
            if (!(opc == 4'hD || opc == 4'hF)) pd.src |= rbit(rn);
            if (!imm_op) begin
              pd.src |= rbit(rm);
              if (reg_shift) pd.src |= rbit(rs);
              // RRX reads the carry flag
              if (!inst[4] && inst[6:5] == 2'b11 && inst[11:7] == 5'd0)
                pd.src[RES_FL] = 1'b1;
            end
            // ADC, SBC, RSC read carry; logical ops with S keep C from the shifter
            if (opc == 4'h5 || opc == 4'h6 || opc == 4'h7) pd.src[RES_FL] = 1'b1;
            if (opc[3:2] != 2'b10) begin
              pd.dst |= rbit(rd);
              if (rd == 4'd15) pd.is_ctrl = 1'b1;
            end
            if (s_bit) begin
              pd.sets_flags = 1'b1;
              pd.dst[RES_FL] = 1'b1;
              pd.src[RES_FL] = 1'b1;   // C or V may be kept from the old flags
            end
          end
        end
        3'b01?: begin
          if (imm_op && inst[4]) begin
            pd.itype = T3_CTRL;     // undefined
            pd.src = '1; pd.dst = '1;
          end else begin
            pd.itype = T1_LDST;
            pd.src |= rbit(rn);
            if (imm_op) pd.src |= rbit(rm);
            if (!inst[24] || inst[21]) pd.dst |= rbit(rn);   // base write-back
            if (inst[20]) begin
              pd.dst |= rbit(rd);
              pd.src[RES_MEM] = 1'b1;
              if (rd == 4'd15) pd.is_ctrl = 1'b1;
            end else begin
              pd.src |= rbit(rd);
              pd.dst[RES_MEM] = 1'b1;
            end
          end
        end
        3'b100: begin
          pd.itype = T2_LDSTM;
          pd.src = '1; pd.dst = '1;
          if (inst[20] && inst[15]) pd.is_ctrl = 1'b1;
        end
        3'b101: begin
          pd.itype = T3_CTRL;       // B, BL
          pd.is_ctrl = 1'b1;
          if (inst[24]) pd.dst |= rbit(4'd14);
        end
        default: begin
          pd.itype = T4_OTHER;      // coprocessor, SWI
          pd.src = '1; pd.dst = '1;
        end
      endcase
      if (cond != COND_AL) pd.src[RES_FL] = 1'b1;
      if (pd.is_ctrl || cond != COND_AL) pd.itype = T3_CTRL;
    end
  end

endmodule
