// sdc_dmem_arbiter: memory access arbiter in front of the shared data memory.
//
// CORE_A and CORE_B each present one request per cycle from their MEM stage.
// A lone request is granted at once. When both ask in the same cycle the core
// that was not served last time wins (round robin) and the other is refused;
// a refused core holds its request (its pipeline stalls) and is served next
// cycle. Grant and read data are combinational, so a granted access completes
// in the cycle it is made. A core whose granted access raises `lock` (the read
// of a SWP) also wins the next cycle, so its write follows with no access of
// the other core between them. The architecture only names the arbiter; the
// round-robin policy, the lock and the single-cycle timing are this design's
// choice.
module sdc_dmem_arbiter
  import sdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  dreq_t       req  [2],
  input  logic        lock [2],     // this access and the core's next are atomic
  output logic        gnt  [2],
  output logic [31:0] rdata [2],
  // memory side
  output dreq_t       mreq,
  input  logic [31:0] mrdata
);

  logic last;    // core served last time both asked
  logic pick;    // core granted this cycle
  logic held;    // a locked access was granted last cycle ...
  logic holder;  // ... to this core

  always_comb begin
    if (req[0].req && req[1].req) pick = held ? holder : !last;
    else pick = req[1].req;
    gnt[0] = req[0].req && !pick;
    gnt[1] = req[1].req && pick;
    mreq = req[pick];
    mreq.req = req[0].req || req[1].req;
    rdata[0] = mrdata;
    rdata[1] = mrdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= 1'b1;
    else if (req[0].req && req[1].req) last <= pick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held   <= 1'b0;
      holder <= 1'b0;
    end else begin
      held   <= (gnt[0] && lock[0]) || (gnt[1] && lock[1]);
      holder <= pick;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(gnt[0] && gnt[1]));

endmodule
