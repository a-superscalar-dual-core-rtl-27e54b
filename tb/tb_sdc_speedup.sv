// tb_sdc_speedup: the same program run in single mode and in superscalar
// mode on the full dual-core, at its default sizes.
//
// Single mode issues one instruction per cycle to CORE_A, which is how a
// plain five-stage ARM pipeline runs; superscalar mode lets the dispatch
// unit pair instructions across both cores. The program (a bubble sort of
// 20 records followed by a checksum loop with independent accumulators and a
// post-indexed load) is
// assembled twice: once starting with the "single" extended instruction and
// once without it (reset leaves the machine in superscalar mode). For each
// run the testbench checks the sorted records and the checksums against
// values computed here, counts cycles and retired instructions, and checks
// that superscalar mode is faster and retires the same instructions.
// The run ends when the program stores a done marker at 0x1FC.
module tb_sdc_speedup;
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
  logic [31:0] prog [1024];
  logic [31:0] pc;
  logic [31:0] data [20];
  int cycles, retired, duals;
  int cyc_run [2][2], ret_run [2][2];

  localparam logic [31:0] SORT = 32'h200;

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

  task automatic build(bit single, bit kern);
    logic [31:0] l_outer, l_inner, l_loop;
    for (int k = 0; k < 1024; k++) prog[k] = NOP;
    pc = 0;
    if (single) emit(x_single());
    emit(dpi(MOV, 11, 0, 8'h01, 4'd12));     // r11 = 0x100
    if (kern) begin
      // pairwise average of 20 samples into 0x180.. and their sum; two
      // independent streams per iteration, as scheduled for dual issue
      emit(dpi(MOV, 0, 0, 8'h00));
      emit(dpi(MOV, 2, 0, 8'h06, 4'd13));    // 0x180
      emit(dpi(MOV, 8, 0, 8'd0));
      emit(dpi(MOV, 10, 0, 8'd0));
      emit(dpi(MOV, 9, 0, 8'd5));
      l_loop = pc;
      emit(ldr(4, 0, 12'd0));
      emit(dpi(SUB, 9, 9, 8'd1));
      emit(ldr(5, 0, 12'd4));
      emit(ldr(1, 0, 12'd8));
      emit(ldr(3, 0, 12'd12));
      emit(dpi(CMP, 0, 9, 8'd0));
      emit(dpr(ADD, 6, 4, 5));
      emit(dpr(ADD, 12, 1, 3));
      emit(dpr(MOV, 6, 0, 6, 0, AL, LSR, 5'd1));
      emit(dpr(MOV, 12, 0, 12, 0, AL, LSR, 5'd1));
      emit(str(6, 2, 12'd0));
      emit(str(12, 2, 12'd4));
      emit(dpr(ADD, 10, 10, 6));
      emit(dpr(ADD, 8, 8, 12));
      emit(dpi(ADD, 0, 0, 8'd16));
      emit(dpi(ADD, 2, 2, 8'd8));
      emit(br(pc, l_loop, 0, NE));
      emit(dpr(ADD, 10, 10, 8));
      emit(str(10, 11, 12'd4));
      emit(dpi(MOV, 0, 0, 8'hA5));
      emit(str(0, 11, 12'hFC));
      emit(br(pc, pc));
      return;
    end
    emit(dpi(MOV, 0, 0, 8'h00));
    emit(dpi(MOV, 1, 0, 8'd20));
    emit(br(pc, SORT, 1));
    // checksum: r6 = sum, r7 = xor, r8 = sum of (x << 1), r9 = count
    emit(dpi(MOV, 0, 0, 8'h00));
    emit(dpi(MOV, 6, 0, 8'd0));
    emit(dpi(MOV, 7, 0, 8'd0));
    emit(dpi(MOV, 8, 0, 8'd0));
    emit(dpi(MOV, 9, 0, 8'd20));
    l_loop = pc;
    emit({AL, 3'b010, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 4'd0, 4'd4, 12'd4});   // ldr r4, [r0], #4
    emit(dpr(ADD, 6, 6, 4));
    emit(dpr(EOR, 7, 7, 4));
    emit(dpr(ADD, 8, 8, 4, 0, AL, LSL, 5'd1));
    emit(dpi(SUB, 9, 9, 8'd1, 0, 1));
    emit(br(pc, l_loop, 0, NE));
    emit(str(6, 11, 12'd0));
    emit(str(7, 11, 12'd4));
    emit(str(8, 11, 12'd8));
    emit(dpi(MOV, 0, 0, 8'hA5));
    emit(str(0, 11, 12'hFC));
    emit(br(pc, pc));
    // sort(r0 = base, r1 = n)
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
    emit(dpi(ADD, 2, 2, 8'd1));
    emit(dpr(CMP, 0, 4, 5));
    emit(str(5, 3, 12'd0, GT));
    emit(str(4, 3, 12'd4, GT));
    emit(dpi(ADD, 3, 3, 8'd4));
    emit(dpr(CMP, 0, 2, 1));
    emit(br(pc, l_inner, 0, LT));
    emit(dpi(SUB, 1, 1, 8'd1));
    emit(br(pc, l_outer));
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    retired += int'(retire[0]) + int'(retire[1]);
    duals += int'(idu_ev.dual);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit single, bit kern);
    logic [31:0] srt [20];
    logic [31:0] s, x, s2;
    rst_n = 0;
    build(single, kern);
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      imem_we = 1; imem_addr = k * 4; imem_wdata = prog[k];
      @(negedge clk);
    end
    imem_we = 0;
    for (int k = 0; k < 128; k++) begin
      dmem_host_we = 1; dmem_host_addr = k * 4; dmem_host_wdata = (k < 20) ? data[k] : 0;
      @(negedge clk);
    end
    dmem_host_we = 0;
    dmem_host_addr = 32'h1FC;
    cycles = 0; retired = 0; duals = 0;
    rst_n = 1;
    while (dmem_host_rdata != 32'hA5) @(posedge clk);
    cyc_run[kern][single] = cycles;
    ret_run[kern][single] = retired;
    repeat (5) @(posedge clk);
    // reference
    for (int k = 0; k < 20; k++) srt[k] = data[k];
    for (int a = 0; a < 20; a++)
      for (int b = 0; b < 19 - a; b++)
        if ($signed(srt[b]) > $signed(srt[b+1])) begin
          s = srt[b]; srt[b] = srt[b+1]; srt[b+1] = s;
        end
    if (kern) begin
      s = 0; x = 0;
      for (int k = 0; k < 10; k++) begin
        s2 = (data[2*k] + data[2*k+1]) >> 1;
        check($sformatf("%s avg[%0d]", single ? "single" : "super", k), dut.u_dmem.mem[96 + k], s2);
        s += s2;
      end
      check("sum of averages", dut.u_dmem.mem[65], s);
    end else begin
      s = 0; x = 0; s2 = 0;
      for (int k = 0; k < 20; k++) begin s += srt[k]; x ^= srt[k]; s2 += srt[k] << 1; end
      for (int k = 0; k < 20; k++)
        check($sformatf("%s sorted[%0d]", single ? "single" : "super", k), dut.u_dmem.mem[k], srt[k]);
      check("sum", dut.u_dmem.mem[64], s);
      check("xor", dut.u_dmem.mem[65], x);
      check("sum2", dut.u_dmem.mem[66], s2);
    end
    checks++;
    if (single && duals != 0) begin
      failures++;
      $display("FAIL single mode paired %0d times", duals);
    end
    checks++;
    if (!single && duals == 0) begin
      failures++;
      $display("FAIL superscalar mode never paired");
    end
    $display("%s, %s mode: cycles=%0d retired=%0d IPC=%0.3f dual=%0d",
             kern ? "average kernel" : "sort+checksum ", single ? "single     " : "superscalar", cycles, retired,
             real'(retired) / real'(cycles), duals);
  endtask

  initial begin
    priv[0] = 1'b1; priv[1] = 1'b1;
    for (int k = 0; k < 20; k++) data[k] = 32'($urandom_range(0, 999));
    for (int kern = 0; kern < 2; kern++) begin
      run(1'b1, kern[0]);
      run(1'b0, kern[0]);
      // "single" is consumed by the dispatch unit, so both runs retire the same
      check("retired", 32'(ret_run[kern][0]), 32'(ret_run[kern][1]));
      $display("speedup = %0.1f%%", 100.0 * (real'(cyc_run[kern][1]) / real'(cyc_run[kern][0]) - 1.0));
    end
    // straight-line code must gain; the branch-bound sort is only reported
    checks++;
    if (!(cyc_run[1][0] < cyc_run[1][1])) begin
      failures++;
      $display("FAIL superscalar run of the average kernel not faster");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
