// sdc_regfile: the register files of CORE_A and CORE_B, their PCs and flags.
//
// Two files of r0..r14, a PC per file (pc_a, pc_b) and a NZCV flag set per
// file. Every read and write names the file it uses (sel 0 = CORE_A's,
// 1 = CORE_B's), so the same block serves all operation modes: in single and
// superscalar mode both cores read and write CORE_A's file, in multithreading
// mode each core uses its own, and a "move" reads CORE_A's file and writes
// CORE_B's. Each core has three read ports, two write ports used by its WB
// stage (the result, and the updated base register of a load/store with
// write-back; both go to the file named by wsel) and a flag read/write port
// (its EXE stage). The IDU reads both PCs and updates them
// through pc_we/pc_wdata; a WB write to r15 (only a move into CORE_B's pc does
// that) goes to the PC of the named file and wins over an IDU update.
//
// Reads are combinational and see a write of the same cycle (write-through),
// so an instruction in ID gets a value its own core is writing back in WB.
// Everything resets to zero. The dispatch rules make two writes of the two
// cores to the same register in one cycle impossible; assertions check it
// (one core writing the same register through both ports is unpredictable in
// ARM; the base write then wins).
module sdc_regfile
  import sdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rsel   [2],
  input  logic [3:0]  raddr  [2][3],
  output logic [31:0] rdata  [2][3],
  input  logic        we     [2],
  input  logic        wsel   [2],
  input  logic [3:0]  waddr  [2],
  input  logic [31:0] wdata  [2],
  input  logic        bwe    [2],   // base write-back or long-multiply high word, file wsel
  input  logic [3:0]  bwaddr [2],
  input  logic [31:0] bwdata [2],
  input  logic        fsel   [2],
  output logic [3:0]  frdata [2],
  input  logic        fwe    [2],
  input  logic        fwsel  [2],
  input  logic [3:0]  fwdata [2],
  input  logic        pc_we  [2],
  input  logic [31:0] pc_wdata [2],
  output logic [31:0] pc     [2]
);

  logic [31:0] regs  [2][15];
  logic [31:0] pcs   [2];
  logic [3:0]  flags [2];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      for (int p = 0; p < 3; p++) begin
        if (raddr[c][p] == 4'd15) rdata[c][p] = pcs[rsel[c]];
        else rdata[c][p] = regs[rsel[c]][raddr[c][p]];
        for (int w = 0; w < 2; w++) begin
          if (we[w] && wsel[w] == rsel[c] && waddr[w] == raddr[c][p])
            rdata[c][p] = wdata[w];
          if (bwe[w] && wsel[w] == rsel[c] && bwaddr[w] == raddr[c][p])
            rdata[c][p] = bwdata[w];
        end
      end
      frdata[c] = flags[fsel[c]];
      pc[c] = pcs[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 2; f++) begin
        for (int r = 0; r < 15; r++) regs[f][r] <= '0;
        pcs[f] <= '0;
        flags[f] <= '0;
      end
    end else begin
      for (int f = 0; f < 2; f++)
        if (pc_we[f]) pcs[f] <= pc_wdata[f];
      for (int w = 0; w < 2; w++) begin
        if (we[w]) begin
          if (waddr[w] == 4'd15) pcs[wsel[w]] <= wdata[w];
          else regs[wsel[w]][waddr[w]] <= wdata[w];
        end
        if (bwe[w] && bwaddr[w] != 4'd15) regs[wsel[w]][bwaddr[w]] <= bwdata[w];
        if (fwe[w]) flags[fwsel[w]] <= fwdata[w];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    !(we[0] && we[1] && wsel[0] == wsel[1] && waddr[0] == waddr[1]));
  assert property (@(posedge clk) disable iff (!rst_n)
    !(bwe[0] && bwe[1] && wsel[0] == wsel[1] && bwaddr[0] == bwaddr[1]));
  assert property (@(posedge clk) disable iff (!rst_n)
    !(we[0] && bwe[1] && wsel[0] == wsel[1] && waddr[0] == bwaddr[1]));
  assert property (@(posedge clk) disable iff (!rst_n)
    !(we[1] && bwe[0] && wsel[0] == wsel[1] && waddr[1] == bwaddr[0]));
  assert property (@(posedge clk) disable iff (!rst_n)
    !(fwe[0] && fwe[1] && fwsel[0] == fwsel[1]));

endmodule
