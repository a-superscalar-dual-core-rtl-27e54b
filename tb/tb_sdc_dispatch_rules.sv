// tb_sdc_dispatch_rules: drives the dispatch decision with hand-made pipeline
// contents and instruction pairs and checks, for each case, how many
// instructions issue and to which core (pairs, rule 4 a/b/c, the dependency on
// both pipelines of the architecture's example, one core stalled, both
// stalled, control flow, memory ordering, move, WAW/WAR holds).
module tb_sdc_dispatch_rules;
  import sdc_pkg::*;
  import sdc_asm_pkg::*;

  logic [31:0] i0, i1, r0, r1;
  pdec_t pd0, pd1;
  hz_entry_t win_a [NWIN], win_b [NWIN];
  logic acc_a, acc_b, issue0, core0, issue1;
  logic ev_dual, ev_raw_both, ev_order, ev_one_stalled;
  int checks = 0, failures = 0;

  sdc_predecode p0 (.inst(i0), .pd(pd0), .reenc(r0));
  sdc_predecode p1 (.inst(i1), .pd(pd1), .reenc(r1));
  sdc_dispatch_rules dut (.*);

  function automatic resmask_t R(int a);
    resmask_t m = '0;
    if (a >= 0) m[a] = 1'b1;
    return m;
  endfunction

  // pipeline A holds one entry writing wa and reading ra; likewise B
  task automatic setwin(int wa, int ra, int wb, int rb);
    for (int k = 0; k < NWIN; k++) begin win_a[k] = '0; win_b[k] = '0; end
    if (wa >= 0 || ra >= 0) win_a[1] = '{valid: 1'b1, src: R(ra), dst: R(wa)};
    if (wb >= 0 || rb >= 0) win_b[2] = '{valid: 1'b1, src: R(rb), dst: R(wb)};
  endtask

  // expected: n issued (0,1,2), core of I0
  task automatic t(string name, logic [31:0] a, logic [31:0] b, logic aa, logic ab,
                   int n, logic c0);
    i0 = a; i1 = b; acc_a = aa; acc_b = ab;
    #1;
    checks++;
    if (int'(issue0) + int'(issue1) != n || (n > 0 && core0 !== c0)) begin
      failures++;
      $display("FAIL %s: issue0 %b issue1 %b core0 %b", name, issue0, issue1, core0);
    end
  endtask

  initial begin
    setwin(-1, -1, -1, -1);
    t("independent pair", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 1, 1, 2, 0);
    checks++; if (!ev_dual) begin failures++; $display("FAIL dual event"); end
    t("RAW inside pair", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 1, 6), 1, 1, 1, 0);
    t("WAW inside pair", dpr(ADD, 1, 2, 3), dpr(ADD, 1, 5, 6), 1, 1, 1, 0);
    t("load pair", ldr(1, 2), ldr(4, 5), 1, 1, 2, 0);
    t("store then load", str(1, 2), ldr(4, 5), 1, 1, 1, 0);
    t("load then store", ldr(1, 2), str(4, 5), 1, 1, 1, 0);
    t("flag setter + AL", dpi(SUB, 1, 2, 8'd1, 0, 1), dpr(ADD, 4, 5, 6), 1, 1, 2, 0);
    t("flag setter + conditional", dpi(SUB, 1, 2, 8'd1, 0, 1), dpr(ADD, 4, 5, 6, 0, GT), 1, 1, 1, 0);
    t("branch alone to A", br(0, 64), dpr(ADD, 4, 5, 6), 1, 1, 1, 0);
    t("branch, A stalled", br(0, 64), dpr(ADD, 4, 5, 6), 0, 1, 0, 0);
    t("ldm to A only", 32'hE8900003, dpr(ADD, 4, 5, 6), 0, 1, 0, 0);
    t("both stalled", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 0, 0, 0, 0);
    t("A stalled: I0 to B", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 0, 1, 1, 1);
    checks++; if (!ev_one_stalled) begin failures++; $display("FAIL one-stalled event"); end
    t("B stalled: I0 to A", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 1, 0, 1, 0);
    t("move to B", x_move(1, 2), dpr(ADD, 4, 5, 6), 1, 1, 1, 1);
    // rule 4 b: I0 depends on A only
    setwin(2, -1, -1, -1);
    t("4b pair", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 1, 1, 2, 0);
    t("4b broken", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 2, 6), 1, 1, 1, 0);
    t("A stalled, RAW on A", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 0, 1, 0, 0);
    t("move reads A's pending r2", x_move(1, 2), NOP, 1, 1, 0, 0);
    // rule 4 c: I0 depends on B only
    setwin(-1, -1, 2, -1);
    t("4c pair", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 5, 6), 1, 1, 2, 1);
    t("4c broken", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 2, 6), 1, 1, 1, 1);
    t("branch depends on B", dpr(MOV, 15, 0, 2), NOP, 1, 1, 0, 0);
    // 4 a broken: I0 free, I1 depends on a pipeline
    setwin(7, -1, -1, -1);
    t("4a broken", dpr(ADD, 1, 2, 3), dpr(ADD, 4, 7, 6), 1, 1, 1, 0);
    // the example: I0 needs CORE_A's r2 and CORE_B's r1
    setwin(2, -1, 1, -1);
    t("RAW on both pipelines", dpr(ADD, 0, 1, 2), dpr(ADD, 4, 5, 6), 1, 1, 0, 0);
    checks++; if (!ev_raw_both) begin failures++; $display("FAIL raw_both event"); end
    // WAW with A while it must go to B
    setwin(4, -1, 1, -1);
    t("WAW with the other core", dpi(ADD, 4, 1, 8'd1), NOP, 1, 1, 0, 0);
    checks++; if (!ev_order) begin failures++; $display("FAIL order event"); end
    // WAR: B still reads r5; I0 (free) goes to A but may not write r5
    setwin(-1, -1, -1, 5);
    t("WAR with B", dpr(ADD, 5, 2, 3), NOP, 1, 1, 1, 1);
    t("I1 WAR with A", dpr(ADD, 1, 2, 3), dpr(ADD, 9, 2, 3), 1, 1, 2, 0);
    setwin(-1, 9, -1, -1);
    t("I1 WAR with A blocks pair", dpr(ADD, 1, 2, 3), dpr(ADD, 9, 2, 3), 1, 1, 1, 0);
    // memory as a resource: a load in B's pipeline, a store may not go to A
    setwin(-1, -1, -1, 17);
    t("store after load in B", str(1, 2), NOP, 1, 1, 1, 1);
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
