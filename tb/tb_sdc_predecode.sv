// tb_sdc_predecode: checks instruction class, resource masks, control-flow and
// flag bits, extended-instruction recognition and the move re-encoding for a
// set of hand-encoded instructions.
module tb_sdc_predecode;
  import sdc_pkg::*;
  import sdc_asm_pkg::*;

  logic [31:0] inst, reenc;
  pdec_t pd;
  int checks = 0, failures = 0;

  sdc_predecode dut (.inst, .pd, .reenc);

  function automatic resmask_t R(int a, int b = -1, int c = -1);
    resmask_t m = '0;
    m[a] = 1'b1;
    if (b >= 0) m[b] = 1'b1;
    if (c >= 0) m[c] = 1'b1;
    return m;
  endfunction

  task automatic t(string name, logic [31:0] w, itype_e ty, ext_e ex, logic ctrl,
                   logic sf, resmask_t src, resmask_t dst);
    inst = w;
    #1;
    checks++;
    if (pd.itype !== ty || pd.ext !== ex || pd.is_ctrl !== ctrl || pd.sets_flags !== sf ||
        pd.src !== src || pd.dst !== dst) begin
      failures++;
      $display("FAIL %s: type %0d ext %0d ctrl %b sf %b src %h dst %h", name, pd.itype, pd.ext,
               pd.is_ctrl, pd.sets_flags, pd.src, pd.dst);
    end
  endtask

  initial begin
    t("add r1,r2,r3", dpr(ADD, 1, 2, 3), T0_DP, EXT_NONE, 0, 0, R(2, 3), R(1));
    t("mov r4,#5", dpi(MOV, 4, 0, 8'd5), T0_DP, EXT_NONE, 0, 0, '0, R(4));
    t("subs r1,r2,#1", dpi(SUB, 1, 2, 8'd1, 0, 1), T0_DP, EXT_NONE, 0, 1, R(2, 16), R(1, 16));
    t("cmp r2,r3", dpr(CMP, 0, 2, 3), T0_DP, EXT_NONE, 0, 1, R(2, 3, 16), R(16));
    t("adc r1,r2,r3", dpr(ADC, 1, 2, 3), T0_DP, EXT_NONE, 0, 0, R(2, 3, 16), R(1));
    t("add r1,r2,r3,lsl r4", dprs(ADD, 1, 2, 3, LSL, 4), T0_DP, EXT_NONE, 0, 0, R(2, 3, 4), R(1));
    t("addgt r1,r2,r3", dpr(ADD, 1, 2, 3, 0, GT), T3_CTRL, EXT_NONE, 0, 0, R(2, 3, 16), R(1));
    t("mov pc,lr", dpr(MOV, 15, 0, 14), T3_CTRL, EXT_NONE, 1, 0, R(14), '0);
    t("ldr r1,[r2,#4]", ldr(1, 2, 4), T1_LDST, EXT_NONE, 0, 0, R(2, 17), R(1));
    t("str r1,[r2]", str(1, 2), T1_LDST, EXT_NONE, 0, 0, R(1, 2), R(17));
    t("ldr r1,[r2,r3]", ldrr(1, 2, 3), T1_LDST, EXT_NONE, 0, 0, R(2, 3, 17), R(1));
    t("ldr pc,[r2]", ldr(15, 2), T3_CTRL, EXT_NONE, 1, 0, R(2, 17), '0);
    t("b", br(0, 32'h40), T3_CTRL, EXT_NONE, 1, 0, '0, '0);
    t("bl", br(0, 32'h40, 1), T3_CTRL, EXT_NONE, 1, 0, '0, R(14));
    t("bne", br(0, 32'h40, 0, NE), T3_CTRL, EXT_NONE, 1, 0, R(16), '0);
    t("bx r3", 32'hE12FFF13, T3_CTRL, EXT_NONE, 1, 0, R(3), '0);
    t("stmfd", 32'hE92D4003, T2_LDSTM, EXT_NONE, 0, 0, '1, '1);
    t("mul", 32'hE0010392, T4_OTHER, EXT_NONE, 0, 0, '1, '1);
    t("swp", 32'hE1021093, T4_OTHER, EXT_NONE, 0, 0, '1, '1);
    t("mrs", 32'hE10F0000, T4_OTHER, EXT_NONE, 0, 0, '1, '1);
    t("swi", 32'hEF000000, T4_OTHER, EXT_NONE, 0, 0, '1, '1);
    t("suprs", x_suprs(), T4_OTHER, EXT_SUPRS, 0, 0, '0, '0);
    t("single", x_single(), T4_OTHER, EXT_SINGLE, 0, 0, '0, '0);
    t("mthd", x_mthd(), T4_OTHER, EXT_MTHD, 0, 0, '0, '0);
    t("joint", x_joint(), T4_OTHER, EXT_JOINT, 0, 0, '0, '0);
    t("wait", x_wait(), T4_OTHER, EXT_WAIT, 0, 0, '0, '0);
    t("move r3,r7", x_move(3, 7), T4_OTHER, EXT_MOVE, 0, 0, R(7), '0);
    checks++;
    if (reenc !== 32'hE1A03007) begin failures++; $display("FAIL move re-encode %h", reenc); end
    inst = dpr(ADD, 1, 2, 3); #1;
    checks++;
    if (reenc !== inst) begin failures++; $display("FAIL pass-through %h", reenc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
