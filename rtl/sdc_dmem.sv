// sdc_dmem: data memory shared by the two cores.
//
// WORDS 32-bit words, byte addressed (addr[1:0] picks the byte lanes through
// the byte enables). Reads are combinational, writes take effect at the clock
// edge. A second port (host_*) lets the surroundings load and inspect the
// memory; it has priority for writes to the same word. Contents are not reset.
// The size is this design's own (the architecture gives none).
module sdc_dmem
  import sdc_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  dreq_t       req,
  output logic [31:0] rdata,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] ia, ha;

  assign ia = req.addr[AW+1:2];
  assign ha = host_addr[AW+1:2];
  assign rdata = mem[ia];
  assign host_rdata = mem[ha];

  always_ff @(posedge clk) begin
    if (req.req && req.we)
      for (int b = 0; b < 4; b++)
        if (req.be[b]) mem[ia][8*b +: 8] <= req.wdata[8*b +: 8];
    if (host_we) mem[ha] <= host_wdata;
  end

endmodule
