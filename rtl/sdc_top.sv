// sdc_top: the superscalar dual-core (SDC) processor.
//
// Two five-stage ARM pipelines, CORE_A and CORE_B, share one instruction
// dispatch unit (IDU), one register-file block and one data memory. The IDU is
// the fetch stage of both: it reads two instructions per cycle from the
// two-port instruction memory and, in superscalar mode, issues up to two of
// them to the cores under its dispatch rules, so an unmodified single-thread
// ARM program runs on both pipelines at once. Extended instructions switch
// between single mode (CORE_A alone), superscalar mode and multithreading mode
// (two independent threads, each core with its own register file), and move
// register values from CORE_A's file to CORE_B's. Both cores reach the single-
// port data memory through a round-robin arbiter.
//
// Interface: the program is written through imem_we/imem_addr/imem_wdata and
// data through the host port of the data memory, both while or before rst_n
// is released. Execution starts in superscalar mode at address 0 after reset.
// priv[c] says core c is in system mode (suprs is honoured only then). The
// outputs report the mode, IDU activity (idu_ev), retired instructions per core
// and core events, for performance counting.
module sdc_top
  import sdc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        priv      [2],
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_host_we,
  input  logic [31:0] dmem_host_addr,
  input  logic [31:0] dmem_host_wdata,
  output logic [31:0] dmem_host_rdata,
  output mode_e       mode,
  output idu_ev_t     idu_ev,
  output logic        retire    [2],
  output logic        ev_fwd    [2],
  output logic        ev_loaduse[2],
  output logic        ev_memstall[2],
  output logic        unsupported[2],
  output logic        busy      [2]
);

  logic [31:0] iaddr_a, iaddr_b, inst_a, inst_b;
  logic [31:0] pc [2];
  logic        pc_we [2];
  logic [31:0] pc_wdata [2];
  logic        accept [2];
  hz_entry_t   win [2][NWIN];
  logic        br_valid [2], br_taken [2];
  logic [31:0] br_target [2];
  logic        disp_valid [2];
  disp_t       disp [2];

  logic        rf_rsel [2];
  logic [3:0]  rf_raddr [2][3];
  logic [31:0] rf_rdata [2][3];
  logic        rf_we [2], rf_wsel [2];
  logic [3:0]  rf_waddr [2];
  logic [31:0] rf_wdata [2];
  logic        rf_bwe [2];
  logic [3:0]  rf_bwaddr [2];
  logic [31:0] rf_bwdata [2];
  logic        fl_sel [2], fl_we [2];
  logic [3:0]  fl_rdata [2], fl_wdata [2];

  dreq_t       dreq [2];
  logic        dgnt [2];
  logic        dlock [2];
  logic [31:0] drdata [2];
  dreq_t       mreq;
  logic [31:0] mrdata;

  sdc_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr_a(iaddr_a), .inst_a, .addr_b(iaddr_b), .inst_b,
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_wdata));

  sdc_idu u_idu (
    .clk, .rst_n, .iaddr_a, .iaddr_b, .inst_a, .inst_b,
    .pc, .pc_we, .pc_wdata, .accept, .busy,
    .win_a(win[0]), .win_b(win[1]), .br_valid, .br_taken, .br_target, .priv,
    .disp_valid, .disp, .mode, .ev(idu_ev));

  sdc_regfile u_rf (
    .clk, .rst_n, .rsel(rf_rsel), .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .wsel(rf_wsel), .waddr(rf_waddr), .wdata(rf_wdata),
    .bwe(rf_bwe), .bwaddr(rf_bwaddr), .bwdata(rf_bwdata),
    .fsel(fl_sel), .frdata(fl_rdata), .fwe(fl_we), .fwsel(fl_sel), .fwdata(fl_wdata),
    .pc_we, .pc_wdata, .pc);

  for (genvar c = 0; c < 2; c++) begin : g_core
    sdc_core u_core (
      .clk, .rst_n,
      .disp_valid(disp_valid[c]), .disp(disp[c]), .accept(accept[c]), .win(win[c]),
      .busy(busy[c]), .br_valid(br_valid[c]), .br_taken(br_taken[c]), .br_target(br_target[c]),
      .rf_rsel(rf_rsel[c]), .rf_raddr(rf_raddr[c]), .rf_rdata(rf_rdata[c]),
      .rf_we(rf_we[c]), .rf_wsel(rf_wsel[c]), .rf_waddr(rf_waddr[c]), .rf_wdata(rf_wdata[c]),
      .rf_bwe(rf_bwe[c]), .rf_bwaddr(rf_bwaddr[c]), .rf_bwdata(rf_bwdata[c]),
      .fl_sel(fl_sel[c]), .fl_rdata(fl_rdata[c]), .fl_we(fl_we[c]), .fl_wdata(fl_wdata[c]),
      .dreq(dreq[c]), .dlock(dlock[c]), .dgnt(dgnt[c]), .drdata(drdata[c]),
      .retire(retire[c]), .unsupported(unsupported[c]), .ev_fwd(ev_fwd[c]),
      .ev_loaduse(ev_loaduse[c]), .ev_memstall(ev_memstall[c]));
  end

  sdc_dmem_arbiter u_arb (
    .clk, .rst_n, .req(dreq), .lock(dlock), .gnt(dgnt), .rdata(drdata), .mreq, .mrdata);

  sdc_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .req(mreq), .rdata(mrdata),
    .host_we(dmem_host_we), .host_addr(dmem_host_addr), .host_wdata(dmem_host_wdata),
    .host_rdata(dmem_host_rdata));

endmodule
