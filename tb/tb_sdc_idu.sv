// tb_sdc_idu: the IDU with stand-in cores (accept, busy, pipeline contents and
// branch resolution driven here), a behavioural two-port instruction memory
// and the PC registers. Checks paired fetch at pc/pc+4 and the PC advance, the
// re-encoding of move into mov for CORE_B with the CORE_A-read/CORE_B-write
// selection, the stop behind a branch and the redirect, the drained mode
// switches into single mode and back with suprs, multithreading fetch from
// two PCs with separate register files, and the wait/joint rendezvous.
module tb_sdc_idu;
  import sdc_pkg::*;
  import sdc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] iaddr_a, iaddr_b, inst_a, inst_b;
  logic [31:0] pc [2];
  logic pc_we [2];
  logic [31:0] pc_wdata [2];
  logic accept [2], busy [2], br_valid [2], br_taken [2], priv [2];
  hz_entry_t win_a [NWIN], win_b [NWIN];
  logic [31:0] br_target [2];
  logic disp_valid [2];
  disp_t disp [2];
  mode_e mode;
  idu_ev_t ev;
  int checks = 0, failures = 0;

  sdc_idu dut (.*);
  always #5 clk = ~clk;

  logic [31:0] prog [512];
  assign inst_a = prog[iaddr_a[10:2]];
  assign inst_b = prog[iaddr_b[10:2]];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pc[0] <= 0; pc[1] <= 0; end
    else for (int c = 0; c < 2; c++) if (pc_we[c]) pc[c] <= pc_wdata[c];

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (mode %0d pc %h/%h)", what, mode, pc[0], pc[1]); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    for (int k = 0; k < 512; k++) prog[k] = NOP;
    prog[0] = dpr(ADD, 1, 2, 3);
    prog[1] = dpr(ADD, 4, 5, 6);
    prog[2] = x_move(3, 7);
    prog[3] = br(12, 32'h40);
    prog[16] = x_single();             // 0x40
    prog[17] = dpr(ADD, 1, 2, 3);
    prog[18] = dpr(ADD, 4, 5, 6);
    prog[19] = x_suprs();
    prog[20] = x_mthd();               // 0x50
    prog[21] = dpr(ADD, 1, 2, 3);      // CORE_A thread
    prog[22] = x_wait();
    prog[64] = dpr(SUB, 8, 9, 10);     // CORE_B thread at 0x100
    prog[65] = x_joint();
    for (int k = 0; k < NWIN; k++) begin win_a[k] = '0; win_b[k] = '0; end
    for (int c = 0; c < 2; c++) begin
      accept[c] = 1; busy[c] = 0; br_valid[c] = 0; br_taken[c] = 0; br_target[c] = 0; priv[c] = 1;
    end
    #12 rst_n = 1;
    #1;
    // pair
    chk("superscalar after reset", mode == MODE_SUPER);
    chk("fetch pc and pc+4", iaddr_a == 0 && iaddr_b == 4);
    chk("pair dispatched", disp_valid[0] && disp_valid[1] && disp[0].inst == prog[0] &&
        disp[1].inst == prog[1] && disp[0].pc == 0 && disp[1].pc == 4);
    chk("shared file", !disp[0].rsel && !disp[1].rsel && !disp[0].wsel && !disp[1].wsel);
    chk("pc + 8", pc_we[0] && pc_wdata[0] == 8);
    step();
    // move
    chk("move to CORE_B only", !disp_valid[0] && disp_valid[1]);
    chk("move re-encoded", disp[1].inst == 32'hE1A03007);
    chk("move reads A, writes B", disp[1].rsel == 0 && disp[1].wsel == 1);
    chk("pc + 4", pc_wdata[0] == 32'hC);
    step();
    // branch
    chk("branch to CORE_A alone", disp_valid[0] && !disp_valid[1] && disp[0].ctrl);
    step();
    for (int k = 0; k < 3; k++) begin
      chk("fetch stopped behind branch", !disp_valid[0] && !disp_valid[1] && ev.ctrl_wait);
      step();
    end
    br_valid[0] = 1; br_taken[0] = 1; br_target[0] = 32'h40;
    #1;
    chk("redirect", pc_we[0] && pc_wdata[0] == 32'h40);
    step();
    br_valid[0] = 0;
    #1;
    // single
    chk("single consumed", !disp_valid[0] && !disp_valid[1] && ev.ext);
    busy[0] = 1;
    step();
    chk("hold while busy", !disp_valid[0] && !disp_valid[1] && mode == MODE_SUPER);
    step();
    busy[0] = 0;
    step();
    chk("single mode", mode == MODE_SINGLE);
    chk("one instruction to A", disp_valid[0] && !disp_valid[1] && disp[0].inst == prog[17]);
    step();
    accept[0] = 0;
    step();
    chk("nothing when A stalls", !disp_valid[0] && !disp_valid[1]);
    accept[0] = 1;
    #1;
    chk("held instruction dispatched", disp_valid[0] && disp[0].inst == prog[18]);
    step();
    chk("suprs consumed", ev.ext && !disp_valid[0]);
    step(); step();
    chk("back to superscalar", mode == MODE_SUPER);
    // multithreading
    chk("mthd consumed", ev.ext);
    pc[1] = 32'h100;
    step(); step();
    chk("multithreading", mode == MODE_MTHD);
    chk("two pcs fetched", iaddr_a == 32'h54 && iaddr_b == 32'h100);
    chk("own instructions", disp_valid[0] && disp_valid[1] && disp[0].inst == prog[21] &&
        disp[1].inst == prog[64]);
    chk("own files", !disp[0].rsel && !disp[0].wsel && disp[1].rsel && disp[1].wsel);
    accept[1] = 0;
    step();
    chk("wait from A", ev.ext && !disp_valid[1]);
    step();
    chk("waiting joint", mode == MODE_WAIT_JOINT);
    chk("A halted", !disp_valid[0]);
    accept[1] = 1;
    #1;
    chk("B continues while A waits", disp_valid[1] && disp[1].inst == prog[64]);
    step();
    chk("joint from B", ev.ext);
    step(); step();
    chk("superscalar again", mode == MODE_SUPER && iaddr_a == 32'h5C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
