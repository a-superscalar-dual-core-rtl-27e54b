// tb_sdc_core: one pipeline fed the way the IDU feeds it in single mode (one
// instruction per cycle when `accept` is high, fetch stopped after a control-
// flow instruction until it resolves). The program covers the data-processing
// opcodes, shifts, flags and conditions, loads and stores (word, byte,
// register offset), a load-use dependency, BL/return, BX and a not-taken
// branch, then MRS/MSR, MUL/MLA, UMULL/SMULL, SWP/SWPB, halfword and signed transfers, base
// write-back in every indexing mode, and a push/pop pair (STMDB sp! and
// LDMIA sp! with pc in the list); final register and memory values are
// compared with values worked out by hand.
// Timing: an instruction is written back 4 cycles after it is dispatched, and
// independent instructions retire one per cycle. The data memory grants at
// random after the timing phase, so memory stalls occur too.
module tb_sdc_core;
  import sdc_pkg::*;
  import sdc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic disp_valid;
  disp_t disp;
  logic accept, busy, br_valid, br_taken;
  hz_entry_t win [NWIN];
  logic [31:0] br_target;
  logic rf_rsel, rf_we, rf_wsel, fl_sel, fl_we;
  logic [3:0] rf_raddr [3];
  logic [31:0] rf_rdata [3];
  logic [3:0] rf_waddr, fl_rdata, fl_wdata;
  logic [31:0] rf_wdata;
  logic        rf_bwe;
  logic [3:0]  rf_bwaddr;
  logic [31:0] rf_bwdata;
  dreq_t dreq;
  logic dgnt, dlock;
  logic [31:0] drdata;
  logic retire, unsupported, ev_fwd, ev_loaduse, ev_memstall;

  sdc_core dut (.*);

  // register file (both "cores" of the block are this one core)
  logic        rsel2 [2], we2 [2], wsel2 [2], fsel2 [2], fwe2 [2], fwsel2 [2], pcwe2 [2];
  logic [3:0]  raddr2 [2][3], waddr2 [2], frd2 [2], fwd2 [2];
  logic [31:0] rdata2 [2][3], wdata2 [2], pcwd2 [2], pc2 [2];
  logic        bwe2 [2];
  logic [3:0]  bwaddr2 [2];
  logic [31:0] bwdata2 [2];
  sdc_regfile u_rf (.clk, .rst_n, .rsel(rsel2), .raddr(raddr2), .rdata(rdata2), .we(we2),
    .wsel(wsel2), .waddr(waddr2), .wdata(wdata2), .bwe(bwe2), .bwaddr(bwaddr2), .bwdata(bwdata2), .fsel(fsel2), .frdata(frd2), .fwe(fwe2),
    .fwsel(fwsel2), .fwdata(fwd2), .pc_we(pcwe2), .pc_wdata(pcwd2), .pc(pc2));
  always_comb begin
    rsel2[0] = rf_rsel; raddr2[0] = rf_raddr; rf_rdata = rdata2[0];
    we2[0] = rf_we; wsel2[0] = rf_wsel; waddr2[0] = rf_waddr; wdata2[0] = rf_wdata;
    fsel2[0] = fl_sel; fl_rdata = frd2[0]; fwe2[0] = fl_we; fwsel2[0] = fl_sel; fwd2[0] = fl_wdata;
    rsel2[1] = 0; raddr2[1] = '{default: 4'd0}; we2[1] = 0; wsel2[1] = 0; waddr2[1] = 0;
    wdata2[1] = 0; fsel2[1] = 0; fwe2[1] = 0; fwsel2[1] = 1; fwd2[1] = 0;
    bwe2[0] = rf_bwe; bwaddr2[0] = rf_bwaddr; bwdata2[0] = rf_bwdata;
    bwe2[1] = 0; bwaddr2[1] = 0; bwdata2[1] = 0;
    pcwe2[0] = 0; pcwe2[1] = 0; pcwd2[0] = 0; pcwd2[1] = 0;
  end

  // data memory with random grant
  logic [31:0] mem [256];
  logic rand_gnt;
  assign dgnt = rand_gnt;
  assign drdata = mem[dreq.addr[9:2]];
  always @(posedge clk)
    if (dreq.req && dgnt && dreq.we)
      for (int b = 0; b < 4; b++) if (dreq.be[b]) mem[dreq.addr[9:2]][8*b +: 8] <= dreq.wdata[8*b +: 8];

  always #5 clk = ~clk;

  // instruction source
  logic [31:0] prog [256];
  logic [31:0] fpc, cur;
  pdec_t pd;
  logic [31:0] reenc;
  logic pend, halted;
  sdc_predecode u_pd (.inst(cur), .pd, .reenc);
  assign cur = prog[fpc[9:2]];

  always_comb begin
    disp_valid = rst_n && !pend && !halted && accept;
    disp = '{inst: cur, pc: fpc, rsel: 1'b0, wsel: 1'b0, ctrl: pd.is_ctrl, src: pd.src, dst: pd.dst};
  end

  int cycle = 0, t_disp0 = -1, t_ret0 = -1, n_ret_early = 0, n_memstall = 0, n_lu = 0, n_fwd = 0;
  int checks = 0, failures = 0, n_unsup = 0;
  localparam logic [31:0] HALT = 32'h1F0;

  always @(posedge clk) begin
    if (!rst_n) begin
      fpc <= 0; pend <= 0; halted <= 0;
    end else begin
      cycle <= cycle + 1;
      if (br_valid) begin
        pend <= 0;
        if (br_taken) fpc <= br_target;
      end
      if (disp_valid) begin
        if (t_disp0 < 0) t_disp0 <= cycle;
        if (fpc == HALT) halted <= 1;
        else begin
          fpc <= fpc + 4;
          if (pd.is_ctrl) pend <= 1;
        end
      end
      if (retire && t_ret0 < 0) t_ret0 <= cycle;
      if (retire && cycle < t_disp0 + 12) n_ret_early++;
      n_memstall += int'(ev_memstall);
      n_lu += int'(ev_loaduse);
      n_fwd += int'(ev_fwd);
      n_unsup += int'(unsupported);
    end
  end
  always @(negedge clk) rand_gnt = (cycle < 20) ? 1'b1 : 1'($urandom);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // encodings not in the shared assembler
  function automatic logic [31:0] mul(logic [3:0] rd, logic [3:0] rm, logic [3:0] rs,
                                      logic acc = 0, logic [3:0] rn = 0, logic s = 0);
    return {AL, 6'b000000, acc, s, rd, rn, rs, 4'b1001, rm};
  endfunction
  // halfword / signed transfer, sh: 01 H, 10 SB, 11 SH
  function automatic logic [31:0] hwi(logic l, logic [3:0] rd, logic [3:0] rn, logic [1:0] sh,
                                      logic [7:0] off);
    return {AL, 3'b000, 1'b1, 1'b1, 1'b1, 1'b0, l, rn, rd, off[7:4], 1'b1, sh, 1'b1, off[3:0]};
  endfunction
  function automatic logic [31:0] hwr(logic l, logic [3:0] rd, logic [3:0] rn, logic [1:0] sh,
                                      logic [3:0] rm);
    return {AL, 3'b000, 1'b1, 1'b1, 1'b0, 1'b0, l, rn, rd, 4'b0000, 1'b1, sh, 1'b1, rm};
  endfunction
  // word load/store with base write-back (pre: pre-indexed with "!", else post-indexed)
  function automatic logic [31:0] lswb(logic l, logic [3:0] rd, logic [3:0] rn, logic [11:0] off,
                                       logic pre, logic up = 1);
    return {AL, 3'b010, pre, up, 1'b0, pre, l, rn, rd, off};
  endfunction
  function automatic logic [31:0] mrs(logic [3:0] rd);
    return {AL, 5'b00010, 1'b0, 2'b00, 4'hF, rd, 12'h000};
  endfunction
  function automatic logic [31:0] msr_f_imm(logic [7:0] imm, logic [3:0] rot);
    return {AL, 5'b00110, 1'b0, 2'b10, 4'b1000, 4'hF, rot, imm};
  endfunction

  function automatic logic [31:0] R(int r);
    return u_rf.regs[0][r];
  endfunction

  initial begin
    logic [31:0] p;
    for (int k = 0; k < 256; k++) begin prog[k] = NOP; mem[k] = 0; end
    p = 0;
    // timing: 8 independent instructions
    for (int k = 0; k < 8; k++) begin prog[p[9:2]] = dpi(MOV, 4'(k), 0, 8'(k + 1)); p += 4; end
    prog[p[9:2]] = dpi(MOV, 1, 0, 8'hFF, 4'd4); p += 4;          // r1 = 0xFF000000
    prog[p[9:2]] = dpi(MOV, 2, 0, 8'd7); p += 4;
    prog[p[9:2]] = dpr(ADD, 3, 1, 1, 1); p += 4;                  // adds: 0xFE000000, C=1
    prog[p[9:2]] = dpr(ADC, 4, 2, 2); p += 4;                     // 15
    prog[p[9:2]] = dpi(SBC, 5, 2, 8'd1); p += 4;                  // 6
    prog[p[9:2]] = dpi(RSB, 6, 2, 8'd100); p += 4;                // 93
    prog[p[9:2]] = dpr(EOR, 7, 4, 2); p += 4;                     // 8
    prog[p[9:2]] = dpr(BIC, 8, 4, 2); p += 4;                     // 8
    prog[p[9:2]] = dpr(MVN, 9, 0, 2); p += 4;                     // ~7
    prog[p[9:2]] = dpr(MOV, 10, 0, 1, 0, AL, ASR, 5'd4); p += 4;  // 0xFFF00000
    prog[p[9:2]] = dpr(MOV, 11, 0, 2, 0, AL, ROR, 5'd1); p += 4;  // 0x80000003
    prog[p[9:2]] = dpr(MOV, 12, 0, 2, 1, AL, LSR, 5'd1); p += 4;  // movs 3, C=1
    prog[p[9:2]] = dpr(MOV, 12, 0, 2, 0, AL, ROR, 5'd0); p += 4;  // rrx: 0x80000003
    prog[p[9:2]] = dpi(CMP, 0, 2, 8'd7); p += 4;                  // Z
    prog[p[9:2]] = dpi(MOV, 0, 0, 8'd1, 0, 0, EQ); p += 4;
    prog[p[9:2]] = dpi(MOV, 0, 0, 8'd2, 0, 0, NE); p += 4;        // r0 = 1
    prog[p[9:2]] = dpi(CMN, 0, 2, 8'd1); p += 4;                  // 8, not Z
    prog[p[9:2]] = dpi(ADD, 0, 0, 8'd10, 0, 0, NE); p += 4;       // 11
    prog[p[9:2]] = dpi(MOV, 13, 0, 8'h40); p += 4;
    prog[p[9:2]] = str(4, 13); p += 4;
    prog[p[9:2]] = ldr(14, 13); p += 4;
    prog[p[9:2]] = dpi(ADD, 14, 14, 8'd1); p += 4;                // 16 (load-use)
    prog[p[9:2]] = str(2, 13, 12'd5, AL, 1); p += 4;              // strb
    prog[p[9:2]] = ldr(3, 13, 12'd4); p += 4;                     // 0x700
    prog[p[9:2]] = str(14, 13, 12'd8); p += 4;
    prog[p[9:2]] = dpi(MOV, 5, 0, 8'd2); p += 4;
    prog[p[9:2]] = ldrr(5, 13, 5, 5'd2); p += 4;                  // [0x48] = 16
    prog[p[9:2]] = dprs(ADD, 6, 6, 5, LSL, 2); p += 4;            // 93 + (16 << 7) = 2141
    prog[p[9:2]] = br(p, 32'h100, 1); p += 4;                     // bl sub: r0 = 111
    prog[p[9:2]] = dpi(CMP, 0, 0, 8'd0); p += 4;
    prog[p[9:2]] = br(p, HALT, 0, EQ); p += 4;                    // not taken
    prog[p[9:2]] = br(p, p + 8); p += 4;                          // skip next
    prog[p[9:2]] = dpi(MOV, 0, 0, 8'd0); p += 4;
    prog[p[9:2]] = dpi(MOV, 1, 0, 8'h03, 4'd12); p += 4;          // 0x300 -> r1
    prog[p[9:2]] = 32'hE12FFF11; p += 4;                          // bx r1
    prog[32'h100 >> 2] = dpi(ADD, 0, 0, 8'd100);
    prog[32'h104 >> 2] = dpr(MOV, 15, 0, 14);                     // return
    p = 32'h300;
    prog[p[9:2]] = dpi(ADD, 0, 0, 8'd1); p += 4;                  // 112
    for (int k = 0; k < 4; k++) begin
      prog[p[9:2]] = str(4'(9 + k), 13, 12'(8'h50 + 4 * k)); p += 4;   // r9..r12 -> 0x90..
    end
    // status register, multiply, halfword and signed transfers
    prog[p[9:2]] = mrs(9); p += 4;                                // flags 0010
    prog[p[9:2]] = str(9, 13, 12'h30); p += 4;
    prog[p[9:2]] = msr_f_imm(8'h09, 4'd2); p += 4;                // NZCV = 1001
    prog[p[9:2]] = dpi(MOV, 10, 0, 8'd1); p += 4;
    prog[p[9:2]] = dpi(MOV, 10, 0, 8'd5, 0, 0, 4'h4); p += 4;     // movmi: taken
    prog[p[9:2]] = str(10, 13, 12'h34); p += 4;
    prog[p[9:2]] = dpi(MOV, 9, 0, 8'd200); p += 4;
    prog[p[9:2]] = dpi(MOV, 10, 0, 8'd49); p += 4;
    prog[p[9:2]] = mul(11, 9, 10); p += 4;                        // 9800
    prog[p[9:2]] = mul(12, 11, 10, 1, 9, 1); p += 4;              // mlas: 480400, NZCV 0001
    prog[p[9:2]] = str(11, 13, 12'h38); p += 4;
    prog[p[9:2]] = str(12, 13, 12'h3C); p += 4;
    prog[p[9:2]] = mrs(9); p += 4;
    prog[p[9:2]] = str(9, 13, 12'h40); p += 4;
    prog[p[9:2]] = dpi(MVN, 9, 0, 8'd0); p += 4;                  // r9 = -1
    prog[p[9:2]] = {AL, 5'b00001, 1'b1, 1'b0, 1'b0, 4'd12, 4'd11, 4'd10, 4'b1001, 4'd9};
    p += 4;                                                       // smull r11, r12, r9, r10
    prog[p[9:2]] = dpi(ADD, 12, 12, 8'd1); p += 4;                // high word forwarded: 0
    prog[p[9:2]] = str(11, 13, 12'h44); p += 4;                   // -49
    prog[p[9:2]] = str(12, 13, 12'h48); p += 4;
    prog[p[9:2]] = {AL, 5'b00001, 1'b0, 1'b0, 1'b0, 4'd12, 4'd11, 4'd10, 4'b1001, 4'd9};
    p += 4;                                                       // umull r11, r12, r9, r10
    prog[p[9:2]] = str(12, 13, 12'h4C); p += 4;                   // 48
    prog[p[9:2]] = dpi(ADD, 8, 13, 8'h4C); p += 4;                // r8 -> that word
    prog[p[9:2]] = dpi(MOV, 12, 0, 8'd77); p += 4;
    prog[p[9:2]] = {AL, 5'b00010, 1'b0, 2'b00, 4'd8, 4'd12, 8'h09, 4'd12};
    p += 4;                                                       // swp r12, r12, [r8]: 48
    prog[p[9:2]] = {AL, 5'b00010, 1'b1, 2'b00, 4'd8, 4'd11, 8'h09, 4'd12};
    p += 4;                                                       // swpb r11, r12, [r8]: 77
    prog[p[9:2]] = dpr(ADD, 12, 12, 11); p += 4;                  // 125
    prog[p[9:2]] = str(12, 13, 12'h24); p += 4;
    prog[p[9:2]] = dpi(MOV, 9, 0, 8'h02, 4'd9); p += 4;           // 0x8000
    prog[p[9:2]] = dpi(ADD, 9, 9, 8'h7F); p += 4;
    prog[p[9:2]] = hwi(0, 9, 13, 2'b01, 8'h22); p += 4;           // strh at 0x62
    prog[p[9:2]] = hwi(1, 10, 13, 2'b01, 8'h22); p += 4;          // ldrh
    prog[p[9:2]] = hwi(1, 11, 13, 2'b11, 8'h22); p += 4;          // ldrsh
    prog[p[9:2]] = dpi(MOV, 12, 0, 8'h23); p += 4;
    prog[p[9:2]] = hwr(1, 12, 13, 2'b10, 12); p += 4;             // ldrsb [0x63]
    prog[p[9:2]] = dpi(ADD, 12, 12, 8'd0); p += 4;
    prog[p[9:2]] = hwi(1, 9, 13, 2'b10, 8'h22); p += 4;           // ldrsb [0x62]
    // base write-back, and forwarding of the updated base
    prog[p[9:2]] = lswb(0, 4, 13, 12'h60, 1); p += 4;             // str r4, [r13, #0x60]!
    prog[p[9:2]] = lswb(1, 7, 13, 12'd4, 0); p += 4;              // ldr r7, [r13], #4
    prog[p[9:2]] = lswb(0, 6, 13, 12'd0, 0); p += 4;              // str r6, [r13], #0 (at 0xA4)
    prog[p[9:2]] = lswb(0, 6, 13, 12'd4, 0, 0); p += 4;           // str r6, [r13], #-4
    prog[p[9:2]] = {AL, 3'b000, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 4'd13, 4'd8, 4'd0, 4'b1011, 4'd4};
    p += 4;                                                       // ldrh r8, [r13], #4
    prog[p[9:2]] = dpr(ADD, 8, 8, 13); p += 4;                    // 15 + 0xA4
    // push and pop with load/store multiple; the pop returns through pc
    prog[p[9:2]] = dpi(ADD, 13, 13, 8'h40); p += 4;               // 0xE4
    prog[p[9:2]] = dpi(MOV, 14, 0, 8'h1F, 4'd14); p += 4;         // lr = HALT
    prog[p[9:2]] = {AL, 3'b100, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 4'd13, 16'h40D0}; p += 4;  // stmdb r13!, {r4,r6,r7,lr}
    prog[p[9:2]] = dpi(MOV, 4, 0, 8'd1); p += 4;
    prog[p[9:2]] = dpi(MOV, 6, 0, 8'd2); p += 4;
    prog[p[9:2]] = dpi(MOV, 7, 0, 8'd3); p += 4;
    prog[p[9:2]] = {AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 4'd13, 16'h80D0}; p += 4;  // ldmia r13!, {r4,r6,r7,pc}
    prog[p[9:2]] = dpi(MOV, 0, 0, 8'd0); p += 4;                  // skipped
    prog[p[9:2]] = br(p, HALT); p += 4;
    prog[HALT >> 2] = NOP;

    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (halted);
    repeat (8) @(posedge clk);
    chk("r0", R(0), 112);
    chk("r1", R(1), 32'h300);
    chk("r2", R(2), 7);
    chk("r3", R(3), 32'h700);
    chk("r4", R(4), 15);
    chk("r5", R(5), 16);
    chk("r6", R(6), 2141);
    chk("r7 (post-indexed load)", R(7), 15);
    chk("r8 (post-indexed ldrh, base forwarded)", R(8), 179);
    chk("pre-indexed store with write-back", mem[40], 15);
    chk("post-indexed stores", mem[41], 2141);
    chk("r9 (ldrsb)", R(9), 32'h7F);
    chk("r10 (ldrh)", R(10), 32'h807F);
    chk("r11 (ldrsh)", R(11), 32'hFFFF807F);
    chk("r12 (ldrsb)", R(12), 32'hFFFFFF80);
    chk("mvn", mem[36], ~32'd7);
    chk("asr", mem[37], 32'hFFF00000);
    chk("ror", mem[38], 32'h80000003);
    chk("rrx", mem[39], 32'h80000003);
    chk("mrs", mem[28], 32'h20000000);
    chk("msr flags, movmi", mem[29], 5);
    chk("mul", mem[30], 9800);
    chk("mla", mem[31], 480400);
    chk("mlas flags", mem[32], 32'h10000000);
    chk("smull low word", mem[33], 32'hFFFFFFCF);
    chk("smull high word + 1", mem[34], 0);
    chk("umull high word, then swp and swpb", mem[35], 48);
    chk("swp/swpb read values", mem[25], 125);
    chk("strh", mem[24], 32'h807F0000);
    chk("r13 (base after push and pop)", R(13), 32'hE4);
    chk("stmdb", mem[53], 15);
    chk("stmdb", mem[54], 2141);
    chk("stmdb", mem[55], 15);
    chk("stmdb", mem[56], 32'h1F0);
    chk("r14", R(14), 32'h1F0);
    chk("mem[0x44]", mem[17], 32'h700);
    chk("flags NZCV", 32'(u_rf.flags[0]), 32'b0001);
    chk("write-back 4 cycles after dispatch", 32'(t_ret0 - t_disp0), 4);
    chk("one instruction per cycle", 32'(n_ret_early), 8);
    chk("memory stalls seen", 32'(n_memstall > 0), 1);
    chk("load-use stall seen", 32'(n_lu > 0), 1);
    chk("forwarding seen", 32'(n_fwd > 0), 1);
    chk("no unsupported", 32'(n_unsup), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
