// sdc_asm_pkg: instruction encoders used by the testbenches to build ARM
// programs (data processing, single load/store, branches) and the extended
// instructions of the dual-core (suprs, single, mthd, joint, wait, move).
package sdc_asm_pkg;
  import sdc_pkg::*;

  localparam logic [3:0] EQ = 4'h0, NE = 4'h1, GE = 4'hA, LT = 4'hB, GT = 4'hC,
                         LE = 4'hD, AL = 4'hE;
  localparam logic [3:0] AND = 4'h0, EOR = 4'h1, SUB = 4'h2, RSB = 4'h3, ADD = 4'h4,
                         ADC = 4'h5, SBC = 4'h6, RSC = 4'h7, TST = 4'h8, TEQ = 4'h9,
                         CMP = 4'hA, CMN = 4'hB, ORR = 4'hC, MOV = 4'hD, BIC = 4'hE,
                         MVN = 4'hF;
  localparam logic [1:0] LSL = 2'd0, LSR = 2'd1, ASR = 2'd2, ROR = 2'd3;

  // data processing, immediate operand imm8 rotated right by 2*rot
  function automatic logic [31:0] dpi(logic [3:0] op, logic [3:0] rd, logic [3:0] rn,
                                      logic [7:0] imm, logic [3:0] rot = 0,
                                      logic s = 0, logic [3:0] c = AL);
    logic sb;
    sb = s | (op inside {TST, TEQ, CMP, CMN});
    return {c, 2'b00, 1'b1, op, sb, rn, rd, rot, imm};
  endfunction

  // data processing, register operand shifted by an immediate
  function automatic logic [31:0] dpr(logic [3:0] op, logic [3:0] rd, logic [3:0] rn,
                                      logic [3:0] rm, logic s = 0, logic [3:0] c = AL,
                                      logic [1:0] sh = LSL, logic [4:0] amt = 0);
    logic sb;
    sb = s | (op inside {TST, TEQ, CMP, CMN});
    return {c, 2'b00, 1'b0, op, sb, rn, rd, amt, sh, 1'b0, rm};
  endfunction

  // data processing, register operand shifted by register rs
  function automatic logic [31:0] dprs(logic [3:0] op, logic [3:0] rd, logic [3:0] rn,
                                       logic [3:0] rm, logic [1:0] sh, logic [3:0] rs,
                                       logic s = 0, logic [3:0] c = AL);
    logic sb;
    sb = s | (op inside {TST, TEQ, CMP, CMN});
    return {c, 2'b00, 1'b0, op, sb, rn, rd, rs, 1'b0, sh, 1'b1, rm};
  endfunction

  // LDR/STR rd, [rn, #+off] (pre-indexed, no write-back)
  function automatic logic [31:0] ldr(logic [3:0] rd, logic [3:0] rn, logic [11:0] off = 0,
                                      logic [3:0] c = AL, logic byt = 0);
    return {c, 3'b010, 1'b1, 1'b1, byt, 1'b0, 1'b1, rn, rd, off};
  endfunction
  function automatic logic [31:0] str(logic [3:0] rd, logic [3:0] rn, logic [11:0] off = 0,
                                      logic [3:0] c = AL, logic byt = 0);
    return {c, 3'b010, 1'b1, 1'b1, byt, 1'b0, 1'b0, rn, rd, off};
  endfunction
  // LDR/STR rd, [rn, rm, LSL #amt]
  function automatic logic [31:0] ldrr(logic [3:0] rd, logic [3:0] rn, logic [3:0] rm,
                                       logic [4:0] amt = 0);
    return {AL, 3'b011, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, rn, rd, amt, LSL, 1'b0, rm};
  endfunction
  function automatic logic [31:0] strr(logic [3:0] rd, logic [3:0] rn, logic [3:0] rm,
                                       logic [4:0] amt = 0);
    return {AL, 3'b011, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, rn, rd, amt, LSL, 1'b0, rm};
  endfunction

  // B/BL from address `at` to address `to`
  function automatic logic [31:0] br(logic [31:0] at, logic [31:0] to, logic link = 0,
                                     logic [3:0] c = AL);
    logic [31:0] off;
    off = (to - at - 32'd8) >> 2;
    return {c, 3'b101, link, off[23:0]};
  endfunction

  function automatic logic [31:0] x_suprs();  return ext_encode(EXT_OP_SUPRS, 0, 0);  endfunction
  function automatic logic [31:0] x_single(); return ext_encode(EXT_OP_SINGLE, 0, 0); endfunction
  function automatic logic [31:0] x_mthd();   return ext_encode(EXT_OP_MTHD, 0, 0);   endfunction
  function automatic logic [31:0] x_joint();  return ext_encode(EXT_OP_JOINT, 0, 0);  endfunction
  function automatic logic [31:0] x_wait();   return ext_encode(EXT_OP_WAIT, 0, 0);   endfunction
  function automatic logic [31:0] x_move(logic [3:0] rd, logic [3:0] rn);
    return ext_encode(EXT_OP_MOVE, rd, rn);
  endfunction

  localparam logic [31:0] NOP = 32'hE1A00000;   // mov r0, r0

endpackage
