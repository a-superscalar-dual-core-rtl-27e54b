// tb_sdc_regfile: random reads and writes on both files through all ports,
// compared with a reference array kept here; checks write-through of same-
// cycle writes, base write-back ports, PC updates from the IDU and from a WB
// write to r15, flags, and the reset values.
module tb_sdc_regfile;
  logic        clk = 0, rst_n = 0;
  logic        rsel [2];
  logic [3:0]  raddr [2][3];
  logic [31:0] rdata [2][3];
  logic        we [2], wsel [2];
  logic [3:0]  waddr [2];
  logic [31:0] wdata [2];
  logic        bwe [2];
  logic [3:0]  bwaddr [2];
  logic [31:0] bwdata [2];
  logic        fsel [2];
  logic [3:0]  frdata [2];
  logic        fwe [2], fwsel [2];
  logic [3:0]  fwdata [2];
  logic        pc_we [2];
  logic [31:0] pc_wdata [2];
  logic [31:0] pc [2];
  int checks = 0, failures = 0;

  logic [31:0] ref_r [2][16];   // [15] is the pc
  logic [3:0]  ref_f [2];

  sdc_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      bwe[c] = 0; bwaddr[c] = 0; bwdata[c] = 0;
      we[c] = 0; fwe[c] = 0; pc_we[c] = 0; rsel[c] = 0; fsel[c] = 0;
      wsel[c] = 0; fwsel[c] = 0; waddr[c] = 0; wdata[c] = 0; fwdata[c] = 0; pc_wdata[c] = 0;
      for (int p = 0; p < 3; p++) raddr[c][p] = 0;
    end
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < 16; r++) ref_r[f][r] = 0;
      ref_f[f] = 0;
    end
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        rsel[c] = 1'($urandom);
        fsel[c] = 1'($urandom);
        for (int p = 0; p < 3; p++) raddr[c][p] = 4'($urandom);
        we[c] = 1'($urandom);
        wsel[c] = 1'($urandom);
        waddr[c] = 4'($urandom_range(0, 14));
        if (n % 50 == 7) waddr[c] = 4'd15;
        wdata[c] = $urandom;
        bwe[c] = 1'($urandom);
        bwaddr[c] = 4'($urandom_range(0, 14));
        bwdata[c] = $urandom;
        fwe[c] = 1'($urandom);
        fwsel[c] = 1'(c);
        fwdata[c] = 4'($urandom);
        pc_we[c] = ($urandom_range(0, 3) == 0);
        pc_wdata[c] = $urandom;
      end
      // never two writes to the same register (guaranteed by the dispatch)
      if (we[0] && we[1] && wsel[0] == wsel[1] && waddr[0] == waddr[1]) we[1] = 0;
      for (int c = 0; c < 2; c++) begin
        if (we[c] && waddr[c] == bwaddr[c]) bwe[c] = 0;
        if (we[1-c] && wsel[1-c] == wsel[c] && waddr[1-c] == bwaddr[c]) bwe[c] = 0;
      end
      if (bwe[0] && bwe[1] && wsel[0] == wsel[1] && bwaddr[0] == bwaddr[1]) bwe[1] = 0;
      #1;
      for (int c = 0; c < 2; c++) begin
        for (int p = 0; p < 3; p++) begin
          logic [31:0] e;
          e = ref_r[rsel[c]][raddr[c][p]];
          for (int w = 0; w < 2; w++)
            if (we[w] && wsel[w] == rsel[c] && waddr[w] == raddr[c][p]) e = wdata[w];
          for (int w = 0; w < 2; w++)
            if (bwe[w] && wsel[w] == rsel[c] && bwaddr[w] == raddr[c][p]) e = bwdata[w];
          chk($sformatf("read c%0d p%0d", c, p), rdata[c][p], e);
        end
        chk("flags", 32'(frdata[c]), 32'(ref_f[fsel[c]]));
        chk("pc", pc[c], ref_r[c][15]);
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) if (pc_we[f]) ref_r[f][15] = pc_wdata[f];
      for (int w = 0; w < 2; w++) begin
        if (we[w]) ref_r[wsel[w]][waddr[w]] = wdata[w];
        if (bwe[w]) ref_r[wsel[w]][bwaddr[w]] = bwdata[w];
        if (fwe[w]) ref_f[fwsel[w]] = fwdata[w];
      end
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
