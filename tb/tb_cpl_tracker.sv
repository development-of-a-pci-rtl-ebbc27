// tb_cpl_tracker: allocates tags for reads and writes and feeds completions
// built in the testbench: a good CplD, a good Cpl, a wrong requester ID, a UR
// status, a wrong length, a completion for a tag never issued, and a request
// left to time out. Checks the result flags and the tag bookkeeping.
module tb_cpl_tracker;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int tos = 0;
  logic tav, alloc, cv, rv, rok, to;
  logic [TAG_W-1:0] tag;
  req_t areq, rreq;
  tlp_t c;
  logic [3:0] rerr;
  logic [2:0] outst;
  int checks = 0, failures = 0;

  cpl_tracker #(.NTAGS(4), .TIMEOUT(50), .REQUESTER_ID(16'h0000)) dut (
    .clk, .rst_n, .tag_avail_o(tav), .tag_o(tag), .alloc_i(alloc), .alloc_req_i(areq),
    .cpl_valid_i(cv), .cpl_i(c), .res_valid_o(rv), .res_ok_o(rok), .res_err_o(rerr), .res_req_o(rreq),
    .timeout_o(to), .outstanding_o(outst));

  task automatic check(input bit cnd, input string s);
    checks++;
    if (!cnd) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic take(input req_kind_e k, input int len, output logic [TAG_W-1:0] tg);
    @(negedge clk);
    areq = '0; areq.kind = k; areq.length = 10'(len); areq.first_be = 4'hF; areq.last_be = 4'hF;
    areq.host_addr = 16'(len * 3);
    tg = tag;
    alloc = 1;
    @(negedge clk);
    alloc = 0;
  endtask

  function automatic tlp_t mk(bit data, int len, logic [2:0] st, logic [11:0] bc, logic [15:0] rid, logic [TAG_W-1:0] tg);
    tlp_t t = '0;
    t.dw[0] = {1'b0, data, 1'b0, TYPE_CPL, 14'd0, data ? 10'(len) : 10'd0};
    t.dw[1] = {16'h0100, st, 1'b0, bc};
    t.dw[2] = {rid, 8'(tg), 8'h00};
    return t;
  endfunction

  task automatic deliver(input tlp_t t, input bit exp_ok, input logic [3:0] exp_err);
    @(negedge clk); c = t; cv = 1;
    @(negedge clk); cv = 0;
    check(rv && rok == exp_ok && rerr == exp_err, $sformatf("result ok=%b err=%b exp %b %b", rok, rerr, exp_ok, exp_err));
  endtask

  logic [TAG_W-1:0] t0, t1, t2, t3, t4;
  initial begin
    alloc = 0; cv = 0; c = '0; areq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    take(REQ_MRD, 8, t0);
    take(REQ_CFGWR, 1, t1);
    take(REQ_CFGRD, 1, t2);
    take(REQ_MRD, 2, t3);
    check(t0 == 0 && t1 == 1 && t2 == 2 && t3 == 3, "lowest free tags in order");
    check(!tav && outst == 4, "all tags busy");
    deliver(mk(1, 8, CPL_SC, 12'd32, 16'h0000, t0), 1, 4'b0000);
    check(rreq.kind == REQ_MRD && rreq.host_addr == 16'd24, "record of the request returned");
    check(tav && tag == 0, "tag 0 free again");
    deliver(mk(0, 0, CPL_SC, 12'd4, 16'h0000, t1), 1, 4'b0000);
    deliver(mk(1, 1, CPL_SC, 12'd4, 16'h0055, t2), 0, 4'b0001);      // wrong requester ID
    deliver(mk(1, 1, CPL_SC, 12'd8, 16'h0000, t3), 0, 4'b0010);      // wrong length
    deliver(mk(1, 1, CPL_SC, 12'd4, 16'h0000, t3), 0, 4'b1000);      // tag no longer outstanding
    take(REQ_IORD, 1, t4);
    deliver(mk(0, 0, CPL_UR, 12'd4, 16'h0000, t4), 0, 4'b0100);      // UR status
    check(outst == 0, "nothing outstanding");
    take(REQ_MRD, 1, t4);
    repeat (60) @(negedge clk);
    check(outst == 0, "timed-out request freed");
    deliver(mk(1, 1, CPL_SC, 12'd4, 16'h0000, t4), 0, 4'b1000);      // late completion
    check(tos == 1, $sformatf("one completion timeout, saw %0d", tos));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (to && rst_n) tos++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
