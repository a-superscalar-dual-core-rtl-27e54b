// sdc_idu: Instruction Dispatched Unit of the superscalar dual-core.
//
// The IDU is the fetch stage of both cores. It reads the PCs from the register
// file block, fetches from the two-port instruction memory, pre-decodes what it
// fetched, runs the operation-mode state machine, and hands instructions to the
// cores' IF/ID registers.
//
//   superscalar: port a reads pc, port b reads pc+4. Extended instructions are
//     consumed here. Otherwise sdc_dispatch_rules decides whether zero, one or
//     two instructions issue and to which cores; both cores use CORE_A's
//     register file and flags. "move Rd,Rn" becomes "mov Rd,Rn" on CORE_B,
//     reading CORE_A's file and writing CORE_B's. pc advances by 4 per issued
//     instruction.
//   single: one instruction per cycle to CORE_A; CORE_B gets nothing.
//   multithreading (and its waiting states): port a serves CORE_A at pc_a,
//     port b serves CORE_B at pc_b, each core with its own register file.
//     A core halted by the rendezvous fetches nothing.
// After issuing a control-flow instruction to a core the IDU stops fetching
// for that core until the core reports the branch resolved (br_valid), then
// continues at the target or the next instruction. single, mthd and suprs
// stop all fetching until both cores have drained (see sdc_mode_ctrl); when
// superscalar or single mode is re-entered, fetching continues at pc_a.
// Only one extended instruction per cycle reaches the mode state machine; in
// multithreading mode CORE_A's has priority and CORE_B's is retried.
// All decisions are combinational on the current PCs and pipeline state; the
// dispatched instruction is registered in the core.
module sdc_idu
  import sdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [31:0] iaddr_a,
  output logic [31:0] iaddr_b,
  input  logic [31:0] inst_a,
  input  logic [31:0] inst_b,
  // program counters in the register file block
  input  logic [31:0] pc       [2],
  output logic        pc_we    [2],
  output logic [31:0] pc_wdata [2],
  // cores
  input  logic        accept   [2],
  input  logic        busy     [2],
  input  hz_entry_t   win_a    [NWIN],
  input  hz_entry_t   win_b    [NWIN],
  input  logic        br_valid [2],
  input  logic        br_taken [2],
  input  logic [31:0] br_target[2],
  input  logic        priv     [2],   // core in system mode (for suprs)
  output logic        disp_valid [2],
  output disp_t       disp     [2],
  // status
  output mode_e       mode,
  output idu_ev_t     ev
);

  pdec_t       pd0, pd1;
  logic [31:0] re0, re1;
  logic        issue0, core0, issue1;
  logic        ev_dual, ev_raw_both, ev_order, ev_one_stalled;
  logic        pend_br [2];
  logic        set_br  [2];
  logic        cmd_valid, cmd_core, cmd_priv;
  ext_e        cmd;
  logic        hold, switched;
  logic        halt [2];
  logic        idle;

  sdc_predecode u_pd0 (.inst(inst_a), .pd(pd0), .reenc(re0));
  sdc_predecode u_pd1 (.inst(inst_b), .pd(pd1), .reenc(re1));

  sdc_dispatch_rules u_rules (
    .pd0, .pd1, .win_a, .win_b, .acc_a(accept[0]), .acc_b(accept[1]),
    .issue0, .core0, .issue1, .ev_dual, .ev_raw_both, .ev_order, .ev_one_stalled);

  assign idle = !busy[0] && !busy[1];

  sdc_mode_ctrl u_mode (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_core, .cmd_priv, .idle,
    .mode, .hold, .halt, .switched);

  function automatic disp_t mk(logic [31:0] inst, logic [31:0] a, pdec_t p,
                               logic rs, logic ws);
    disp_t d;
    d.inst = inst; d.pc = a; d.rsel = rs; d.wsel = ws; d.ctrl = p.is_ctrl;
    d.src = p.src; d.dst = p.dst;
    return d;
  endfunction

  logic multi;
  assign multi = (mode == MODE_MTHD || mode == MODE_WAIT_JOINT || mode == MODE_WAIT_WAIT);

  always_comb begin
    iaddr_a = pc[0];
    iaddr_b = multi ? pc[1] : pc[0] + 32'd4;
    for (int c = 0; c < 2; c++) begin
      disp_valid[c] = 1'b0;
      disp[c]       = '0;
      pc_we[c]      = 1'b0;
      pc_wdata[c]   = pc[c];
      set_br[c]     = 1'b0;
    end
    cmd_valid = 1'b0; cmd = EXT_NONE; cmd_core = 1'b0; cmd_priv = 1'b0;
    ev = '0;
    ev.switched = switched;

    if (!hold) begin
      unique case (mode)
        MODE_SUPER: begin
          if (pend_br[0]) begin
            ev.ctrl_wait = 1'b1;
          end else if (pd0.ext != EXT_NONE && pd0.ext != EXT_MOVE) begin
            cmd_valid = 1'b1; cmd = pd0.ext; cmd_core = 1'b0; cmd_priv = priv[0];
            pc_we[0] = 1'b1; pc_wdata[0] = pc[0] + 32'd4;
            ev.ext = 1'b1;
          end else if (issue0) begin
            disp_valid[core0] = 1'b1;
            disp[core0] = mk(re0, pc[0], pd0, 1'b0, pd0.ext == EXT_MOVE);
            if (issue1) begin
              disp_valid[!core0] = 1'b1;
              disp[!core0] = mk(re1, pc[0] + 32'd4, pd1, 1'b0, 1'b0);
            end
            pc_we[0] = 1'b1;
            pc_wdata[0] = pc[0] + (issue1 ? 32'd8 : 32'd4);
            set_br[0] = pd0.is_ctrl;
            ev.dual = ev_dual;
            ev.single = !issue1;
            ev.move = pd0.ext == EXT_MOVE;
            ev.one_stalled = ev_one_stalled;
          end else begin
            ev.raw_both = ev_raw_both;
            ev.order = ev_order;
          end
        end
        MODE_SINGLE: begin
          if (!pend_br[0]) begin
            if (pd0.ext != EXT_NONE) begin
              cmd_valid = 1'b1; cmd = pd0.ext; cmd_core = 1'b0; cmd_priv = priv[0];
              pc_we[0] = 1'b1; pc_wdata[0] = pc[0] + 32'd4;
              ev.ext = 1'b1;
            end else if (accept[0]) begin
              disp_valid[0] = 1'b1;
              disp[0] = mk(inst_a, pc[0], pd0, 1'b0, 1'b0);
              pc_we[0] = 1'b1; pc_wdata[0] = pc[0] + 32'd4;
              set_br[0] = pd0.is_ctrl;
            end
          end else begin
            ev.ctrl_wait = 1'b1;
          end
        end
        default: begin   // multithreading and its waiting states
          for (int c = 0; c < 2; c++) begin
            if (!halt[c] && !pend_br[c]) begin
              if ((c == 0 ? pd0.ext : pd1.ext) != EXT_NONE) begin
                if (!cmd_valid) begin
                  cmd_valid = 1'b1; cmd = (c == 0) ? pd0.ext : pd1.ext;
                  cmd_core = c[0]; cmd_priv = priv[c];
                  pc_we[c] = 1'b1; pc_wdata[c] = pc[c] + 32'd4;
                  ev.ext = 1'b1;
                end
              end else if (accept[c]) begin
                disp_valid[c] = 1'b1;
                disp[c] = (c == 0) ? mk(inst_a, pc[0], pd0, 1'b0, 1'b0)
                                   : mk(inst_b, pc[1], pd1, 1'b1, 1'b1);
                pc_we[c] = 1'b1; pc_wdata[c] = pc[c] + 32'd4;
                set_br[c] = (c == 0) ? pd0.is_ctrl : pd1.is_ctrl;
              end
            end
          end
        end
      endcase
    end

    // branch resolution redirects the PC of the core that fetched it
    for (int c = 0; c < 2; c++)
      if (br_valid[c] && br_taken[c]) begin
        pc_we[c] = 1'b1; pc_wdata[c] = br_target[c];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_br[0] <= 1'b0;
      pend_br[1] <= 1'b0;
    end else begin
      for (int c = 0; c < 2; c++)
        if (br_valid[c]) pend_br[c] <= 1'b0;
        else if (set_br[c]) pend_br[c] <= 1'b1;
    end
  end

  // a control-flow instruction never goes to CORE_B outside multithreading
  assert property (@(posedge clk) disable iff (!rst_n)
    !multi && disp_valid[1] |-> !disp[1].ctrl);

endmodule
