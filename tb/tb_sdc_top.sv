// tb_sdc_top: end-to-end test of the dual-core at its default sizes.
//
// A program is assembled into instruction memory and run from reset:
//  1. intra-program multithreading: two halves of a 20-record array are
//     sorted in parallel, CORE_A's half by a call, CORE_B's after move
//     instructions set its registers and pc and mthd starts it; wait/joint
//     rejoin the threads, and superscalar mode merges the halves;
//  2. a superscalar kernel with paired issue, a dependency on both pipelines,
//     a WAW/WAR hold, flag-setting and conditional instructions, register-
//     specified shifts, byte accesses, a push/pop pair (STMDB/LDMIA) and a SWP;
//  3. a single-mode stretch left with suprs;
//  4. two more multithreaded sections, one ending through "waiting joint" and
//     one through "waiting wait".
// Results stored to data memory are compared with values computed here. Every
// mechanism (dual issue, single issue, both-pipeline RAW stall, WAW/WAR hold,
// one-core-stalled issue, control-flow wait, move, mode switches and all
// modes, forwarding, load-use stall, arbiter stall, load/store multiple held
// in CORE_A and never in CORE_B, a locked SWP access) must occur at least once.
module tb_sdc_top;
  import sdc_pkg::*;
  import sdc_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        priv [2];
  logic        imem_we = 0;
  logic [31:0] imem_addr = 0, imem_wdata = 0;
  logic        dmem_host_we = 0;
  logic [31:0] dmem_host_addr = 0, dmem_host_wdata = 0, dmem_host_rdata;
  mode_e       mode;
  idu_ev_t     idu_ev;
  logic        retire[2], ev_fwd[2], ev_loaduse[2], ev_memstall[2], unsupported[2], busy[2];

  sdc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  logic [31:0] prog [1024];
  logic [31:0] pc;
  int n_dual, n_single, n_raw_both, n_order, n_one_stalled, n_ctrl_wait, n_move, n_ext;
  int n_switch, n_fwd, n_loaduse, n_memstall, n_unsup, n_retired, n_mop_a, n_mop_b, n_lock;
  int n_mode [5];
  logic [31:0] data [20];
  logic [31:0] sorted [20];

  task automatic emit(logic [31:0] w);
    prog[pc[11:2]] = w;
    pc += 4;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%08x) expected %0d", what, got, got, exp);
    end
  endtask

  function automatic logic [31:0] rd_mem(logic [31:0] a);
    return dut.u_dmem.mem[a[11:2]];
  endfunction

  localparam logic [31:0] SORT = 32'h200, MERGE = 32'h300, TEND = 32'h3F0, THR2 = 32'h400;

  task automatic build();
    logic [31:0] l_outer, l_inner, l_loop, l_a;
    for (int k = 0; k < 1024; k++) prog[k] = NOP;
    // ---- main
    pc = 0;
    emit(dpi(MOV, 0, 0, 8'h00));             // array_1
    emit(dpi(MOV, 1, 0, 8'd10));             // num_1
    emit(dpi(MOV, 2, 0, 8'h28));             // array_2
    emit(dpi(MOV, 3, 0, 8'd10));             // num_2
    emit(dpi(MOV, 5, 0, 8'h3F, 4'd14));      // thread_end = 0x3F0
    emit(dpi(MOV, 6, 0, 8'h02, 4'd12));      // sort = 0x200
    emit(x_move(0, 2));
    emit(x_move(1, 3));
    emit(x_move(14, 5));
    emit(x_move(15, 6));
    emit(x_mthd());
    emit(br(pc, SORT, 1));
    emit(x_wait());
    emit(dpi(MOV, 0, 0, 8'h00));
    emit(dpi(MOV, 1, 0, 8'h28));
    emit(dpi(MOV, 2, 0, 8'h80));
    emit(br(pc, MERGE, 1));
    // ---- superscalar kernel, results at 0x100
    emit(dpi(MOV, 11, 0, 8'h01, 4'd12));     // r11 = 0x100
    emit(dpi(MOV, 9, 0, 8'd3));
    emit(dpi(MOV, 10, 0, 8'd5));
    emit(dpi(ADD, 4, 9, 8'd0));              // r4 = 3        (pair)
    emit(dpi(ADD, 1, 9, 8'd1));              // r1 = 4
    emit(dpi(ADD, 4, 1, 8'd1));              // r4 = 5: RAW on r1, WAW on r4
    emit(dpr(ADD, 2, 9, 10));                // r2 = 8        (pair)
    emit(dpr(ADD, 1, 10, 10));               // r1 = 10
    emit(dpr(ADD, 0, 1, 2));                 // r0 = 18: needs both pipelines
    emit(str(0, 11, 12'd0));
    emit(str(4, 11, 12'd4));
    emit(ldr(4, 11, 12'd4));                 // load-use stall in CORE_A ...
    emit(dpi(ADD, 5, 4, 8'd1));              // r5 = 6
    emit(dpi(MOV, 6, 0, 8'd9));
    emit(dpi(MOV, 12, 0, 8'd1));             // ... while CORE_B takes this
    emit(dpr(ADD, 5, 5, 6));
    emit(dpr(ADD, 5, 5, 12));                // 16
    emit(str(5, 11, 12'd36));
    emit(dpr(SUB, 6, 10, 9, 1));             // subs r6 = 2
    emit(dpi(MOV, 7, 0, 8'd1, 0, 0, GT));
    emit(dpi(MOV, 7, 0, 8'd2, 0, 0, LE));
    emit(str(7, 11, 12'd8));                 // 1
    emit(dpr(MOV, 8, 0, 10, 0, AL, LSL, 5'd4));   // 80
    emit(dprs(ADD, 8, 8, 9, LSL, 9));        // 80 + (3 << 3) = 104
    emit(str(8, 11, 12'd12));
    emit(str(10, 11, 12'd17, AL, 1));        // byte 1 of 0x110
    emit(ldr(12, 11, 12'd17, AL, 1));
    emit(dpi(ADD, 12, 12, 8'd1));            // 6
    emit(str(12, 11, 12'd20));
    emit(dpi(MOV, 13, 0, 8'h07, 4'd13));     // sp = 0x1C0
    emit(32'hE92D_0011);                     // stmdb sp!, {r0, r4}
    emit(dpi(MOV, 0, 0, 8'd0));
    emit(dpi(MOV, 4, 0, 8'd0));
    emit(32'hE8BD_0011);                     // ldmia sp!, {r0, r4}
    emit(str(0, 11, 12'd40));                // 18
    emit(str(4, 11, 12'd44));                // 5
    emit(str(13, 11, 12'd48));               // 0x1C0
    emit(dpi(ADD, 4, 11, 8'd48));
    emit(dpi(MOV, 0, 0, 8'd99));
    emit({AL, 5'b00010, 1'b0, 2'b00, 4'd4, 4'd0, 8'h09, 4'd0});   // swp r0, r0, [r4]
    emit(str(0, 11, 12'd52));                // 0x1C0
    // ---- single mode
    emit(x_single());
    emit(dpi(MOV, 3, 0, 8'd7));
    emit(dpr(ADD, 3, 3, 3));                 // 14
    emit(str(3, 11, 12'd24));
    emit(x_suprs());
    // ---- multithreading, CORE_A waits first (waiting joint)
    emit(dpi(MOV, 5, 0, 8'h3F, 4'd14));
    emit(dpi(MOV, 6, 0, 8'h01, 4'd11));      // 0x400
    emit(x_move(11, 11));
    emit(x_move(14, 5));
    emit(x_move(15, 6));
    emit(x_mthd());
    emit(x_wait());
    // ---- multithreading, CORE_B joins first (waiting wait)
    emit(dpi(MOV, 6, 0, 8'h3F, 4'd14));
    emit(x_move(15, 6));
    emit(x_mthd());
    emit(dpi(MOV, 1, 0, 8'd0));
    l_loop = pc;
    emit(dpi(ADD, 1, 1, 8'd1));
    emit(dpi(CMP, 0, 1, 8'd20));
    emit(br(pc, l_loop, 0, LT));
    emit(str(1, 11, 12'd32));                // 20
    emit(x_wait());
    emit(dpi(MOV, 0, 0, 8'hA5));
    emit(str(0, 11, 12'hFC));                // done marker
    emit(br(pc, pc));
    // ---- sort(r0 = base, r1 = n): bubble sort, returns through lr
    pc = SORT;
    emit(dpi(SUB, 1, 1, 8'd1));
    l_outer = pc;
    emit(dpi(CMP, 0, 1, 8'd0));
    emit(dpr(MOV, 15, 0, 14, 0, EQ));
    emit(dpi(MOV, 2, 0, 8'd0));
    emit(dpr(MOV, 3, 0, 0));
    l_inner = pc;
    emit(ldr(4, 3, 12'd0));
    emit(ldr(5, 3, 12'd4));
    emit(dpr(CMP, 0, 4, 5));
    emit(str(5, 3, 12'd0, GT));
    emit(str(4, 3, 12'd4, GT));
    emit(dpi(ADD, 3, 3, 8'd4));
    emit(dpi(ADD, 2, 2, 8'd1));
    emit(dpr(CMP, 0, 2, 1));
    emit(br(pc, l_inner, 0, LT));
    emit(dpi(SUB, 1, 1, 8'd1));
    emit(br(pc, l_outer));
    // ---- merge(r0 = a, r1 = b, r2 = out), 10 + 10 words
    pc = MERGE;
    emit(dpi(MOV, 7, 0, 8'd10));
    emit(dpi(MOV, 8, 0, 8'd10));
    l_loop = pc;
    emit(dpi(CMP, 0, 7, 8'd0));
    emit(br(pc, MERGE + 32'h50, 0, EQ));
    emit(dpi(CMP, 0, 8, 8'd0));
    emit(br(pc, MERGE + 32'h70, 0, EQ));
    emit(ldr(4, 0));
    emit(ldr(5, 1));
    emit(dpr(CMP, 0, 4, 5));
    emit(str(4, 2, 12'd0, LE));
    emit(dpi(ADD, 0, 0, 8'd4, 0, 0, LE));
    emit(dpi(SUB, 7, 7, 8'd1, 0, 0, LE));
    emit(str(5, 2, 12'd0, GT));
    emit(dpi(ADD, 1, 1, 8'd4, 0, 0, GT));
    emit(dpi(SUB, 8, 8, 8'd1, 0, 0, GT));
    emit(dpi(ADD, 2, 2, 8'd4));
    emit(br(pc, l_loop));
    for (int h = 0; h < 2; h++) begin
      pc = MERGE + (h == 0 ? 32'h50 : 32'h70);
      l_a = pc;
      emit(dpi(CMP, 0, (h == 0) ? 4'd8 : 4'd7, 8'd0));
      emit(dpr(MOV, 15, 0, 14, 0, EQ));
      emit(ldr(4, (h == 0) ? 4'd1 : 4'd0));
      emit(str(4, 2));
      emit(dpi(ADD, (h == 0) ? 4'd1 : 4'd0, (h == 0) ? 4'd1 : 4'd0, 8'd4));
      emit(dpi(ADD, 2, 2, 8'd4));
      emit(dpi(SUB, (h == 0) ? 4'd8 : 4'd7, (h == 0) ? 4'd8 : 4'd7, 8'd1));
      emit(br(pc, l_a));
    end
    // ---- thread_end
    pc = TEND;
    emit(x_joint());
    emit(br(pc, pc));
    // ---- second thread of CORE_B: count to 30 in steps of 3
    pc = THR2;
    emit(dpi(MOV, 1, 0, 8'd0));
    l_loop = pc;
    emit(dpi(ADD, 1, 1, 8'd3));
    emit(dpi(CMP, 0, 1, 8'd30));
    emit(br(pc, l_loop, 0, LT));
    emit(str(1, 11, 12'd28));                // 30
    emit(dpr(MOV, 15, 0, 14));
  endtask

  // event counters
  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_dual += int'(idu_ev.dual);  n_single += int'(idu_ev.single);
    n_raw_both += int'(idu_ev.raw_both);  n_order += int'(idu_ev.order);
    n_one_stalled += int'(idu_ev.one_stalled);  n_ctrl_wait += int'(idu_ev.ctrl_wait);
    n_move += int'(idu_ev.move);  n_ext += int'(idu_ev.ext);  n_switch += int'(idu_ev.switched);
    n_mode[int'(mode)]++;
    // cycles in which a load/store multiple holds IF/ID for its next word
    n_mop_a += int'(dut.g_core[0].u_core.m_hold && dut.g_core[0].u_core.accept == 1'b0);
    n_mop_b += int'(dut.g_core[1].u_core.m_hold);
    n_lock  += int'(dut.dlock[0] && dut.dgnt[0]) + int'(dut.dlock[1] && dut.dgnt[1]);
    for (int c = 0; c < 2; c++) begin
      n_fwd += int'(ev_fwd[c]);  n_loaduse += int'(ev_loaduse[c]);
      n_memstall += int'(ev_memstall[c]);  n_unsup += int'(unsupported[c]);
      n_retired += int'(retire[c]);
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    priv[0] = 1'b1; priv[1] = 1'b1;
    build();
    // data: 20 records
    for (int k = 0; k < 20; k++) data[k] = 32'($urandom_range(0, 999));
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      imem_we = 1; imem_addr = k * 4; imem_wdata = prog[k];
      @(negedge clk);
    end
    imem_we = 0;
    for (int k = 0; k < 64; k++) begin
      dmem_host_we = 1; dmem_host_addr = k * 4; dmem_host_wdata = (k < 20) ? data[k] : 0;
      @(negedge clk);
    end
    for (int k = 0; k < 256; k++) begin
      dmem_host_we = 1; dmem_host_addr = 32'h100 + k * 4; dmem_host_wdata = 0;
      @(negedge clk);
    end
    dmem_host_we = 0;
    dmem_host_addr = 32'h1FC;
    rst_n = 1;
    while (dmem_host_rdata != 32'hA5) @(posedge clk);
    repeat (10) @(posedge clk);

    // expected: each half sorted, then merged
    for (int k = 0; k < 20; k++) sorted[k] = data[k];
    sorted.sort();
    for (int k = 0; k < 20; k++) check($sformatf("merged[%0d]", k), rd_mem(32'h80 + k * 4), sorted[k]);
    begin
      logic [31:0] h1 [10], h2 [10];
      for (int k = 0; k < 10; k++) begin h1[k] = data[k]; h2[k] = data[10 + k]; end
      h1.sort(); h2.sort();
      for (int k = 0; k < 10; k++) begin
        check($sformatf("half_a[%0d]", k), rd_mem(k * 4), h1[k]);
        check($sformatf("half_b[%0d]", k), rd_mem(32'h28 + k * 4), h2[k]);
      end
    end
    check("both-pipeline RAW result", rd_mem(32'h100), 18);
    check("WAW/WAR result", rd_mem(32'h104), 5);
    check("conditional result", rd_mem(32'h108), 1);
    check("register shift result", rd_mem(32'h10C), 104);
    check("byte store", rd_mem(32'h110), 32'h0000_0500);
    check("byte load", rd_mem(32'h114), 6);
    check("single mode result", rd_mem(32'h118), 14);
    check("CORE_B thread result", rd_mem(32'h11C), 30);
    check("CORE_A thread result", rd_mem(32'h120), 20);
    check("stalled-core result", rd_mem(32'h124), 16);
    check("load/store multiple r0", rd_mem(32'h128), 18);
    check("load/store multiple r4", rd_mem(32'h12C), 5);
    check("swp written value", rd_mem(32'h130), 99);
    check("swp read value (load/store multiple write-back)", rd_mem(32'h134), 32'h1C0);
    check("locked swp access seen", n_lock, 1);
    check("final mode", 32'(mode), 32'(MODE_SUPER));
    check("no unsupported instruction", n_unsup, 0);

    $display("cycles=%0d retired=%0d IPC=%0.3f", cycles, n_retired, real'(n_retired) / cycles);
    $display("dual=%0d single=%0d raw_both=%0d order=%0d one_stalled=%0d ctrl_wait=%0d move=%0d ext=%0d switch=%0d",
             n_dual, n_single, n_raw_both, n_order, n_one_stalled, n_ctrl_wait, n_move, n_ext, n_switch);
    $display("fwd=%0d loaduse=%0d memstall=%0d ldm_stm_hold=%0d modes single=%0d super=%0d mthd=%0d wj=%0d ww=%0d",
             n_fwd, n_loaduse, n_memstall, n_mop_a, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4]);
    check("dual issue seen", 32'(n_dual > 0), 1);
    check("single issue seen", 32'(n_single > 0), 1);
    check("RAW on both pipelines seen", 32'(n_raw_both > 0), 1);
    check("WAW/WAR hold seen", 32'(n_order > 0), 1);
    check("issue beside a stalled core seen", 32'(n_one_stalled > 0), 1);
    check("control-flow wait seen", 32'(n_ctrl_wait > 0), 1);
    check("move seen", 32'(n_move == 8), 1);
    check("mode switches", 32'(n_switch), 8);
    check("forwarding seen", 32'(n_fwd > 0), 1);
    check("load-use stall seen", 32'(n_loaduse > 0), 1);
    check("arbiter stall seen", 32'(n_memstall > 0), 1);
    check("load/store multiple sequenced on CORE_A", 32'(n_mop_a > 0), 1);
    check("no load/store multiple on CORE_B", n_mop_b, 0);
    for (int m = 0; m < 5; m++) check($sformatf("mode %0d visited", m), 32'(n_mode[m] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
