// tb_sdc_dmem_arbiter: random requests from both cores; checks that a lone
// request is granted at once, that simultaneous requests alternate (round
// robin), that the memory sees the granted core's request, and that a refused
// core holding its request is served in the next cycle unless the other
// core's previous access was locked, in which case that core wins once more.
module tb_sdc_dmem_arbiter;
  import sdc_pkg::*;
  logic        clk = 0, rst_n = 0;
  dreq_t       req [2];
  logic        gnt [2];
  logic [31:0] rdata [2];
  dreq_t       mreq;
  logic [31:0] mrdata;
  int checks = 0, failures = 0;
  logic last_ref;
  logic waiting [2];
  logic        lock [2];
  logic hv_ref, hc_ref;

  sdc_dmem_arbiter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    req[0] = '0; req[1] = '0; mrdata = 0; last_ref = 1; waiting[0] = 0; waiting[1] = 0;
    lock[0] = 0; lock[1] = 0; hv_ref = 0; hc_ref = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        if (!waiting[c]) begin
          req[c].req = 1'($urandom);
          req[c].we = 1'($urandom);
          req[c].be = 4'($urandom);
          req[c].addr = $urandom;
          req[c].wdata = $urandom;
        end
        lock[c] = ($urandom % 4) == 0;
      end
      mrdata = $urandom;
      #1;
      begin
        logic p;
        p = (req[0].req && req[1].req) ? (hv_ref ? hc_ref : !last_ref) : req[1].req;
        chk("grant 0", gnt[0] == (req[0].req && !p));
        chk("grant 1", gnt[1] == (req[1].req && p));
        if (req[0].req || req[1].req)
          chk("memory request", mreq.req && mreq.addr == req[p].addr && mreq.we == req[p].we &&
              mreq.wdata == req[p].wdata && mreq.be == req[p].be);
        else chk("idle memory", !mreq.req);
        chk("read data", rdata[0] == mrdata && rdata[1] == mrdata);
        for (int c = 0; c < 2; c++)
          if (waiting[c] && !(hv_ref && hc_ref != 1'(c))) chk("refused core served next", gnt[c]);
          else if (waiting[c] && req[1 - c].req) chk("locked core wins again", !gnt[c]);
        if (req[0].req && req[1].req) last_ref = p;
        hv_ref = (gnt[0] && lock[0]) || (gnt[1] && lock[1]);
        hc_ref = p;
        for (int c = 0; c < 2; c++) waiting[c] = req[c].req && !gnt[c];
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
