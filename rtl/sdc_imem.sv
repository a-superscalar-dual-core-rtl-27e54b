// sdc_imem: instruction memory with two read ports.
//
// Port a (Ia) and port b (Ib) read two words per cycle combinationally: in
// superscalar mode the IDU reads the instruction at pc on port a and the one at
// pc+4 on port b; in multithreading mode each port serves one core's own pc.
// A write port loads the program. WORDS words, byte addresses (addr[1:0] are
// ignored). The size is this design's own (the architecture gives none).
module sdc_imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr_a,
  output logic [31:0] inst_a,
  input  logic [31:0] addr_b,
  output logic [31:0] inst_b,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign inst_a = mem[addr_a[AW+1:2]];
  assign inst_b = mem[addr_b[AW+1:2]];

  always_ff @(posedge clk)
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;

endmodule
