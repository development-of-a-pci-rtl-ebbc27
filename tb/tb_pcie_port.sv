// tb_pcie_port: one PCI Express port (the suite's root side) linked to the
// behavioural endpoint, with a small target memory behind the port.
// Requests go straight into the port's request input and results are read
// from its result output, so the host model is not involved. Checks: link
// training and DL_Active on both sides with InitFC1/InitFC2 sent for all
// three credit classes; memory write then read back (32- and 64-bit
// addresses, partial byte enables); I/O write and read; configuration write,
// read back and the read-only ID register; a type-1 configuration request
// answered with Unsupported Request; requests from the endpoint (memory
// write into the target memory, memory read of it, and an I/O request that
// this port does not support and answers with UR); every request ends in
// exactly one result; 12 requests and 2 completions sent; no replays, LCRC or DLLP errors on a clean link.
module tb_pcie_port;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic rv, rr, resv, resok, cto, ten, twe, lup, dlup, stall;
  logic [3:0] reserr, tbe;
  txreq_t rq;
  req_t resreq;
  tlp_t restlp;
  logic [1:0] tsp, dls;
  logic [15:0] taddr, sent, replays, acks, lerr, dups, derr, i1, i2, ur;
  logic [31:0] twd, trd;
  sym_t r2e, e2r;
  logic ev, er, eresv, eresok, edlup;
  txreq_t ereq;
  tlp_t erestlp;
  logic [15:0] elerr, edups, eur, msgs, emsgs;
  logic [7:0] mcode, emcode;
  logic [7:0] peek;
  logic [31:0] pmem, pio;
  int checks = 0, failures = 0;

  pcie_port #(.PORT_ID(16'h0000), .SUPPORT(3'b001), .TS1_MIN(16), .CPL_TIMEOUT(4000),
              .ADV_CPL_HDR(8'd0), .ADV_CPL_DATA(12'd0)) dut (
    .clk, .rst_n, .req_valid_i(rv), .req_ready_o(rr), .req_i(rq), .host_ready_i(1'b1),
    .res_valid_o(resv), .res_ok_o(resok), .res_err_o(reserr), .res_req_o(resreq), .res_tlp_o(restlp),
    .cpl_timeout_o(cto), .tgt_en_o(ten), .tgt_we_o(twe), .tgt_space_o(tsp), .tgt_addr_o(taddr),
    .tgt_be_o(tbe), .tgt_wdata_o(twd), .tgt_rdata_i(trd), .tx_sym_o(r2e), .rx_sym_i(e2r),
    .link_up_o(lup), .dl_up_o(dlup), .dl_state_o(dls), .fc_stall_o(stall), .tlps_sent_o(sent),
    .replays_o(replays), .acknaks_sent_o(acks), .lcrc_errs_o(lerr), .dups_o(dups), .dllp_errs_o(derr),
    .init1_sent_o(i1), .init2_sent_o(i2), .ur_sent_o(ur),
    .msgs_rcvd_o(msgs), .msg_code_o(mcode));

  ep_model #(.TS1_MIN(16)) u_ep (.clk, .rst_n, .rx_sym_i(r2e), .tx_sym_o(e2r), .mute_i(1'b0),
    .app_valid_i(ev), .app_ready_o(er), .app_i(ereq), .res_valid_o(eresv), .res_ok_o(eresok),
    .res_tlp_o(erestlp), .dl_up_o(edlup), .lcrc_errs_o(elerr), .dups_o(edups), .ur_sent_o(eur), .msgs_o(emsgs), .msg_code_o(emcode),
    .peek_addr_i(peek), .peek_mem_o(pmem), .peek_io_o(pio));

  // target memory behind the port
  logic [31:0] tmem [64];
  always_ff @(posedge clk)
    if (ten) begin
      trd <= tmem[taddr[5:0]];
      if (twe) for (int b = 0; b < 4; b++) if (tbe[b]) tmem[taddr[5:0]][8*b +: 8] <= twd[8*b +: 8];
    end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // results of this port's requests, in order
  typedef struct { logic ok; logic [3:0] err; req_t req; tlp_t tlp; } res_s;
  res_s results[$];
  tlp_t eres[$];
  logic eok[$];
  always @(posedge clk) if (rst_n) begin
    if (resv) results.push_back('{resok, reserr, resreq, restlp});
    if (eresv) begin eres.push_back(erestlp); eok.push_back(eresok); end
  end

  function automatic txreq_t mk(input req_kind_e k, input logic [63:0] addr, input int len);
    txreq_t t;
    t = '0; t.req.kind = k; t.req.addr = addr; t.req.length = 10'(len);
    t.req.first_be = 4'hF; t.req.last_be = (len > 1) ? 4'hF : 4'h0; t.req.ad64 = addr[63:32] != 0;
    return t;
  endfunction
  function automatic txreq_t cfg(input bit wr, input bit typ1, input int regn);
    txreq_t t;
    t = mk(wr ? REQ_CFGWR : REQ_CFGRD, 0, 1);
    t.req.cfg_type = typ1; t.req.reg_no = 6'(regn); t.req.bdf = 16'h0100;
    return t;
  endfunction

  task automatic send(input txreq_t t);
    @(negedge clk); rv = 1; rq = t;
    while (!rr) @(negedge clk);
    @(posedge clk); #1 rv = 0;
  endtask
  task automatic esend(input txreq_t t);
    @(negedge clk); ev = 1; ereq = t;
    while (!er) @(negedge clk);
    @(posedge clk); #1 ev = 0;
  endtask
  task automatic wait_results(input int n);
    int g;
    g = 0;
    while (results.size() < n && g < 5000) begin @(negedge clk); g++; end
    check(results.size() == n, $sformatf("%0d results, got %0d", n, results.size()));
  endtask

  initial begin
    txreq_t t;
    res_s r;
    int g;
    rv = 0; rq = '0; ev = 0; ereq = '0; peek = 0;
    for (int i = 0; i < 64; i++) tmem[i] = 32'h7700 + 32'(i);
    repeat (3) @(negedge clk);
    rst_n = 1;
    g = 0;
    while (!(dlup && edlup) && g < 5000) begin @(negedge clk); g++; end
    check(lup && dlup && edlup && dls == 2'd3, "link trained and DL_Active on both sides");
    repeat (100) @(negedge clk);
    check(i1 >= 3 && i2 >= 3, $sformatf("InitFC1 %0d and InitFC2 %0d sent", i1, i2));

    // memory write and read back, 32-bit address
    t = mk(REQ_MWR, 64'h40, 6);
    for (int i = 0; i < 6; i++) t.data[i] = 32'hC0DE0000 + 32'(i);
    send(t);
    send(mk(REQ_MRD, 64'h40, 6));
    wait_results(1);
    r = results.pop_front();
    check(r.ok && r.req.kind == REQ_MRD && r.tlp.ndw == 6'd9, "MRd completion with 6 DWORDs");
    for (int i = 0; i < 6; i++)
      if (r.tlp.dw[3 + i] != 32'hC0DE0000 + 32'(i)) begin check(0, "MRd data"); break; end
    // 64-bit address, partial byte enables: bytes 1..2 of DWORD 0x48 become AB CD
    t = mk(REQ_MWR, 64'h1_0000_0120, 1); t.req.first_be = 4'b0110; t.data[0] = 32'h11CDAB11;
    send(t);
    send(mk(REQ_MRD, 64'h1_0000_0120, 1));
    wait_results(1);
    r = results.pop_front();
    check(r.ok && r.tlp.dw[3] == 32'h00CDAB00, $sformatf("partial write, 64-bit address: %h", r.tlp.dw[3]));
    // I/O
    t = mk(REQ_IOWR, 64'h8, 1); t.data[0] = 32'h5151A0A0; send(t);
    send(mk(REQ_IORD, 64'h8, 1));
    wait_results(2);
    r = results.pop_front(); check(r.ok && r.req.kind == REQ_IOWR && r.tlp.ndw == 6'd3, "IOWr completion");
    r = results.pop_front(); check(r.ok && r.tlp.dw[3] == 32'h5151A0A0, "IORd data");
    // configuration
    t = cfg(1, 0, 5); t.data[0] = 32'h0BADF00D; send(t);
    send(cfg(0, 0, 5));
    send(cfg(0, 0, 0));
    t = cfg(1, 0, 0); t.data[0] = 32'hFFFFFFFF; send(t);
    send(cfg(0, 0, 0));
    send(cfg(0, 1, 0));
    wait_results(6);
    r = results.pop_front(); check(r.ok && r.req.kind == REQ_CFGWR, "CfgWr completion");
    r = results.pop_front(); check(r.ok && r.tlp.dw[3] == 32'h0BADF00D, "CfgRd returns written value");
    r = results.pop_front(); check(r.ok && r.tlp.dw[3] == 32'hABCD1234, "CfgRd of the ID register");
    r = results.pop_front(); check(r.ok, "CfgWr to a read-only register completes");
    r = results.pop_front(); check(r.ok && r.tlp.dw[3] == 32'hABCD1234, "ID register unchanged");
    r = results.pop_front(); check(!r.ok && r.tlp.dw[1][15:13] == CPL_UR, "type-1 request gets UR");
    check(eur == 1, "endpoint sent one UR");

    // requests from the endpoint
    t = mk(REQ_MWR, 64'h20, 3);
    for (int i = 0; i < 3; i++) t.data[i] = 32'hE1E10000 + 32'(i);
    esend(t);
    esend(mk(REQ_MRD, 64'h1C, 5));
    esend(mk(REQ_IORD, 64'h0, 1));
    g = 0;
    while (eres.size() < 2 && g < 5000) begin @(negedge clk); g++; end
    check(eres.size() == 2, "endpoint got two results");
    check(tmem[8] == 32'hE1E10000 && tmem[10] == 32'hE1E10002, "endpoint write reached target memory");
    if (eres.size() == 2) begin
      check(eok[0] && eres[0].ndw == 6'd8 && eres[0].dw[3] == 32'h7707 && eres[0].dw[4] == 32'hE1E10000 &&
            eres[0].dw[7] == 32'h770B, "endpoint read of target memory");
      check(!eok[1] && eres[1].dw[1][15:13] == CPL_UR, "unsupported I/O request answered with UR");
    end
    check(ur == 1, "port sent one UR");
    repeat (200) @(negedge clk);
    check(results.size() == 0, "no extra results");
    check(replays == 0 && lerr == 0 && elerr == 0 && derr == 0 && dups == 0, "clean link: no replay or error");
    check(sent == 16'd14, $sformatf("TLPs sent %0d", sent));
    check(!cto, "no completion timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
