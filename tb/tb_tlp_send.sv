// tb_tlp_send: builds each request type and compares every header DWORD with
// the value worked out by hand from the PCI Express header layout; checks
// payload placement, tag use and the stall when no tag is free.
module tb_tlp_send;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rv, rrdy, tav, alloc, tv, tr;
  txreq_t rq;
  logic [TAG_W-1:0] tag;
  req_t areq;
  tlp_t t;
  int checks = 0, failures = 0;

  tlp_send #(.REQUESTER_ID(16'h0000)) dut (
    .clk, .rst_n, .req_valid_i(rv), .req_ready_o(rrdy), .req_i(rq),
    .tag_avail_i(tav), .tag_i(tag), .alloc_o(alloc), .alloc_req_o(areq),
    .tlp_valid_o(tv), .tlp_ready_i(tr), .tlp_o(t));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic issue(input txreq_t x, input logic [TAG_W-1:0] tg, input bit exp_alloc);
    @(negedge clk);
    rq = x; rv = 1; tag = tg; tav = 1;
    #1 check(rrdy, "ready");
    check(alloc == exp_alloc, "tag allocation");
    @(negedge clk);
    rv = 0;
    check(tv, "TLP valid next cycle");
  endtask

  txreq_t x;
  initial begin
    rv = 0; tav = 1; tag = 0; tr = 1; rq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // CfgWr type 0 to 01:00.0 register 1, BE 0xF
    x = '0; x.req.kind = REQ_CFGWR; x.req.bdf = 16'h0100; x.req.reg_no = 6'd1; x.req.first_be = 4'hF;
    x.req.length = 10'd1; x.data[0] = 32'h0000_0006;
    issue(x, 5'd3, 1);
    check(t.dw[0] == 32'h4400_0001, $sformatf("CfgWr dw0 %h", t.dw[0]));
    check(t.dw[1] == 32'h0000_030F, $sformatf("CfgWr dw1 %h", t.dw[1]));
    check(t.dw[2] == 32'h0100_0004, $sformatf("CfgWr dw2 %h", t.dw[2]));
    check(t.dw[3] == 32'h0000_0006 && t.ndw == 6'd4, "CfgWr data");

    // CfgRd type 1, extended register 0x142
    x = '0; x.req.kind = REQ_CFGRD; x.req.cfg_type = 1; x.req.bdf = 16'h0208; x.req.ext_reg_no = 4'h1;
    x.req.reg_no = 6'h02; x.req.first_be = 4'b0011;
    issue(x, 5'd1, 1);
    check(t.dw[0] == 32'h0500_0001, $sformatf("CfgRd1 dw0 %h", t.dw[0]));
    check(t.dw[1] == 32'h0000_0103, $sformatf("CfgRd1 dw1 %h", t.dw[1]));
    check(t.dw[2] == 32'h0208_0108 && t.ndw == 6'd3, $sformatf("CfgRd1 dw2 %h", t.dw[2]));

    // MRd 64-bit, TC 2, attr 01, 8 DW
    x = '0; x.req.kind = REQ_MRD; x.req.ad64 = 1; x.req.tc = 3'd2; x.req.attr = 2'b01;
    x.req.length = 10'd8; x.req.first_be = 4'hE; x.req.last_be = 4'h7; x.req.addr = 64'h0000_0001_2345_6780;
    issue(x, 5'd2, 1);
    check(t.dw[0] == 32'h2020_1008, $sformatf("MRd64 dw0 %h", t.dw[0]));
    check(t.dw[1] == 32'h0000_027E, $sformatf("MRd64 dw1 %h", t.dw[1]));
    check(t.dw[2] == 32'h0000_0001 && t.dw[3] == 32'h2345_6780 && t.ndw == 6'd4, "MRd64 address");

    // MWr 32-bit, 3 DW, no tag
    x = '0; x.req.kind = REQ_MWR; x.req.length = 10'd3; x.req.first_be = 4'hF; x.req.last_be = 4'hF;
    x.req.addr = 64'h1000; x.data[0] = 32'hA; x.data[1] = 32'hB; x.data[2] = 32'hC;
    issue(x, 5'd7, 0);
    check(t.dw[0] == 32'h4000_0003 && t.dw[1] == 32'h0000_00FF && t.dw[2] == 32'h0000_1000, "MWr header");
    check(t.dw[3] == 32'hA && t.dw[4] == 32'hB && t.dw[5] == 32'hC && t.ndw == 6'd6, "MWr payload");

    // IOWr and IORd
    x = '0; x.req.kind = REQ_IOWR; x.req.addr = 64'h20; x.req.first_be = 4'h3; x.data[0] = 32'h1234;
    issue(x, 5'd0, 1);
    check(t.dw[0] == 32'h4200_0001 && t.dw[1] == 32'h0000_0003 && t.dw[2] == 32'h20 && t.dw[3] == 32'h1234, "IOWr");
    x.req.kind = REQ_IORD;
    issue(x, 5'd0, 1);
    check(t.dw[0] == 32'h0200_0001 && t.ndw == 6'd3, "IORd");

    // message routed to the root (PM_PME, code 18h): 4-DWORD header, posted
    x = '0; x.req.kind = REQ_MSG; x.req.msg_route = 3'b000; x.req.msg_code = 8'h18; x.req.tc = 3'd0;
    issue(x, 5'd0, 0);
    check(t.dw[0] == 32'h3000_0000 && t.dw[1] == 32'h0000_0018 && t.ndw == 6'd4, $sformatf("Msg header %h %h", t.dw[0], t.dw[1]));
    // ID-routed message (route 010): target ID in DWORD 2
    x.req.msg_route = 3'b010; x.req.msg_code = 8'h7E; x.req.addr = 64'h0100_0000_0000_0000;
    issue(x, 5'd0, 0);
    check(t.dw[0] == 32'h3200_0000 && t.dw[1][7:0] == 8'h7E && t.dw[2] == 32'h0100_0000 && t.dw[3] == 0, "ID-routed Msg");

    // no free tag: non-posted request waits, posted goes
    @(negedge clk);
    tav = 0; rv = 1; x.req.kind = REQ_MRD; x.req.length = 10'd1; rq = x;
    #1 check(!rrdy, "non-posted waits for a tag");
    rq.req.kind = REQ_MWR;
    #1 check(rrdy, "posted does not need a tag");
    // output held while not ready
    @(negedge clk); rv = 0; tr = 0; tav = 1;
    @(negedge clk);
    check(tv && t.dw[0][30], "output held");
    rq.req.kind = REQ_MRD; rv = 1;
    #1 check(!rrdy, "no new request while output is held");
    rv = 0; tr = 1;
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
