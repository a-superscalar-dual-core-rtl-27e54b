// tb_sdc_mode_ctrl: walks the operation-mode state machine through every
// transition of the mode diagram, checks that switches wait for the cores to
// drain (idle), that invalid instructions and unprivileged suprs are ignored,
// and which core is halted in the rendezvous states.
module tb_sdc_mode_ctrl;
  import sdc_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  cmd_valid = 0, cmd_core = 0, cmd_priv = 0, idle = 1;
  ext_e  cmd = EXT_NONE;
  mode_e mode;
  logic  hold, switched;
  logic  halt [2];
  int checks = 0, failures = 0;

  sdc_mode_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (mode %0d hold %b)", what, mode, hold); end
  endtask

  task automatic send(ext_e c, logic core = 0, logic pv = 1);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_core = core; cmd_priv = pv;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // issue c while the cores are busy for `busy` cycles, expect mode m after
  task automatic sw(ext_e c, mode_e m, logic core = 0, logic pv = 1, int busy = 2);
    idle = 0;
    send(c, core, pv);
    chk("hold while draining", hold);
    chk("mode unchanged while draining", mode != m);
    repeat (busy) @(negedge clk);
    chk("still holding", hold);
    idle = 1;
    @(negedge clk);
    chk($sformatf("reach mode %0d", m), mode == m && !hold);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset to superscalar", mode == MODE_SUPER && !hold);
    send(EXT_SUPRS);  chk("suprs ignored in superscalar", mode == MODE_SUPER && !hold);
    send(EXT_WAIT);   chk("wait ignored in superscalar", mode == MODE_SUPER && !hold);
    sw(EXT_SINGLE, MODE_SINGLE);
    send(EXT_MTHD);   chk("mthd ignored in single", mode == MODE_SINGLE && !hold);
    send(EXT_SUPRS, 0, 0); chk("unprivileged suprs ignored", mode == MODE_SINGLE && !hold);
    sw(EXT_SUPRS, MODE_SUPER);
    sw(EXT_MTHD, MODE_MTHD);
    send(EXT_WAIT, 0);
    chk("wait -> waiting joint at once", mode == MODE_WAIT_JOINT && !hold);
    chk("CORE_A halted", halt[0] && !halt[1]);
    send(EXT_JOINT, 0);
    chk("joint from the waiting core ignored", mode == MODE_WAIT_JOINT);
    sw(EXT_JOINT, MODE_SUPER, 1);
    chk("halt released", !halt[0] && !halt[1]);
    sw(EXT_MTHD, MODE_MTHD);
    send(EXT_JOINT, 1);
    chk("joint -> waiting wait", mode == MODE_WAIT_WAIT && halt[1] && !halt[0]);
    sw(EXT_WAIT, MODE_SUPER, 0);
    sw(EXT_MTHD, MODE_MTHD);
    send(EXT_WAIT, 1);
    sw(EXT_SUPRS, MODE_SUPER, 0);       // suprs leaves waiting joint
    sw(EXT_MTHD, MODE_MTHD);
    send(EXT_JOINT, 0);
    sw(EXT_SUPRS, MODE_SUPER, 1);       // suprs leaves waiting wait
    sw(EXT_MTHD, MODE_MTHD);
    send(EXT_MOVE);   chk("move ignored in multithreading", mode == MODE_MTHD && !hold);
    sw(EXT_SUPRS, MODE_SUPER, 1);
    sw(EXT_MTHD, MODE_MTHD);
    sw(EXT_SINGLE, MODE_SINGLE, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
