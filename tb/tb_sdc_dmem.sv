// tb_sdc_dmem: random byte-enabled writes and reads through the core port and
// the host port against a reference array; checks that reads are
// combinational and writes take effect at the clock edge.
module tb_sdc_dmem;
  import sdc_pkg::*;
  localparam int W = 64;
  logic        clk = 0;
  dreq_t       req;
  logic [31:0] rdata;
  logic        host_we;
  logic [31:0] host_addr, host_wdata, host_rdata;
  logic [31:0] ref_m [W];
  int checks = 0, failures = 0;

  sdc_dmem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    req = '0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int k = 0; k < W; k++) begin
      @(negedge clk);
      host_we = 1; host_addr = k * 4; host_wdata = k * 32'h01010101;
      ref_m[k] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req.req = 1'($urandom);
      req.we = 1'($urandom);
      req.be = 4'($urandom);
      req.addr = 32'($urandom_range(0, W * 4 - 1));
      req.wdata = $urandom;
      host_addr = 32'($urandom_range(0, W - 1)) * 4;
      #1;
      chk("core read", rdata, ref_m[req.addr[7:2]]);
      chk("host read", host_rdata, ref_m[host_addr[7:2]]);
      @(posedge clk);
      if (req.req && req.we)
        for (int b = 0; b < 4; b++) if (req.be[b]) ref_m[req.addr[7:2]][8*b +: 8] = req.wdata[8*b +: 8];
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
