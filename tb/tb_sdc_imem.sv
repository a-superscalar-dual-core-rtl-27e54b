// tb_sdc_imem: loads a pattern through the write port and reads it back on
// both read ports at random addresses, including the pc / pc+4 pairs the
// superscalar fetch uses.
module tb_sdc_imem;
  localparam int W = 128;
  logic        clk = 0;
  logic [31:0] addr_a, inst_a, addr_b, inst_b;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] ref_m [W];
  int checks = 0, failures = 0;

  sdc_imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    addr_a = 0; addr_b = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      load_we = 1; load_addr = k * 4; load_data = $urandom; ref_m[k] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    for (int n = 0; n < 1000; n++) begin
      addr_a = 32'($urandom_range(0, W - 2)) * 4;
      addr_b = (n % 2 == 0) ? addr_a + 4 : 32'($urandom_range(0, W - 1)) * 4;
      #1;
      checks += 2;
      if (inst_a !== ref_m[addr_a[8:2]]) begin failures++; $display("FAIL port a @%h", addr_a); end
      if (inst_b !== ref_m[addr_b[8:2]]) begin failures++; $display("FAIL port b @%h", addr_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
