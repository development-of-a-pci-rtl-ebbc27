// tb_evs_full: the verification suite at its full size, with no parameter
// changed: 1024 TS1 ordered sets before training moves on, 4 KB of host
// memory, 4 tags, the full replay and completion timeouts. The behavioural
// endpoint uses the same TS1 count. One complete pass of the suite's
// procedure is run and checked: link training, flow-control initialisation,
// configuration read of the ID register, an endpoint memory write that fills
// host memory, a configuration write from host memory with read-back and
// comparison in Config Reg, a 32-DWORD memory write and its read-back into
// another area of host memory, and an I/O write and read. The three monitors'
// counts are checked at the end.
module tb_evs_full;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready, link_up, dl_up, host_idle;
  req_t        cmd;
  sym_t        h2e, e2h;
  logic [1:0]  dl_state;
  logic [15:0] issued, cpl_ok, cpl_bad, cpl_tos, cfg_chk, cfg_mm, fc_stalls, replays, lcrc_errs, ur_sent;
  mon_counts_t mon_tx, mon_rx;
  logic [15:0] msgs_rcvd, ep_msgs;
  logic [7:0]  msg_code, ep_msg_code;
  logic [15:0] peek_addr;
  logic [31:0] peek_mem, peek_cfg;
  logic        app_valid, app_ready, ep_res_valid, ep_res_ok, ep_dl_up;
  txreq_t      app;
  tlp_t        ep_res_tlp;
  logic [15:0] ep_lcrc, ep_dups, ep_ur;
  logic [7:0]  ep_peek;
  logic [31:0] ep_mem, ep_io;
  int checks = 0, failures = 0;

  evs_top dut (
    .clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
    .tx_sym_o(h2e), .rx_sym_i(e2h),
    .link_up_o(link_up), .dl_up_o(dl_up), .dl_state_o(dl_state), .host_idle_o(host_idle),
    .issued_o(issued), .cpl_ok_o(cpl_ok), .cpl_bad_o(cpl_bad), .cpl_timeouts_o(cpl_tos),
    .cfg_checked_o(cfg_chk), .cfg_mismatches_o(cfg_mm), .fc_stall_cycles_o(fc_stalls),
    .replays_o(replays), .lcrc_errs_o(lcrc_errs), .ur_sent_o(ur_sent),
    .msgs_rcvd_o(msgs_rcvd), .msg_code_o(msg_code),
    .mon_tx_o(mon_tx), .mon_rx_o(mon_rx),
    .peek_addr_i(peek_addr), .peek_mem_o(peek_mem), .peek_cfg_o(peek_cfg));

  ep_model #(.TS1_MIN(1024)) ep (
    .clk, .rst_n, .rx_sym_i(h2e), .tx_sym_o(e2h), .mute_i(1'b0),
    .app_valid_i(app_valid), .app_ready_o(app_ready), .app_i(app),
    .res_valid_o(ep_res_valid), .res_ok_o(ep_res_ok), .res_tlp_o(ep_res_tlp),
    .dl_up_o(ep_dl_up), .lcrc_errs_o(ep_lcrc), .dups_o(ep_dups), .ur_sent_o(ep_ur),
    .msgs_o(ep_msgs), .msg_code_o(ep_msg_code),
    .peek_addr_i(ep_peek), .peek_mem_o(ep_mem), .peek_io_o(ep_io));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] pat(int i);
    return 32'hFACE_0000 ^ (32'(i) * 32'h0102_0305);
  endfunction

  function automatic req_t rq(req_kind_e k, logic [63:0] addr, int len, logic [15:0] haddr);
    req_t r;
    r = '0; r.kind = k; r.addr = addr; r.length = 10'(len); r.first_be = 4'hF;
    r.last_be = (len > 1) ? 4'hF : 4'h0; r.host_addr = haddr; r.bdf = 16'h0100;
    return r;
  endfunction

  task automatic send(input req_t r);
    @(negedge clk); cmd = r; cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk); #1 cmd_valid = 0;
  endtask

  task automatic wait_idle(input int n);
    int g;
    g = 0;
    while ((issued != 16'(n) || !host_idle || dut.u_port.u_trk.outstanding_o != 0) && g < 20000) begin
      @(negedge clk); g++;
    end
    repeat (300) @(negedge clk);
  endtask

  // host memory through the peek port (shared with the host's port A, which
  // is idle whenever this is used)
  task automatic peek(input int a, output logic [31:0] d);
    @(negedge clk); peek_addr = 16'(a);
    @(negedge clk); @(negedge clk); d = peek_mem;
  endtask

  initial begin
    req_t r;
    logic [31:0] d;
    int t0;
    bit ok;
    cmd_valid = 0; cmd = '0; app_valid = 0; app = '0; peek_addr = 0; ep_peek = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // 1) link training and 2) flow-control initialisation
    t0 = 0;
    while (!(dl_up && ep_dl_up) && t0 < 100000) begin @(negedge clk); t0++; end
    check(dl_up && ep_dl_up && link_up, "link up and DL_Active");
    check(t0 > 1024 * 16, $sformatf("full TS1 phase: %0d cycles", t0));
    repeat (100) @(negedge clk);
    check(mon_tx.ts1 >= 1024 && mon_rx.ts1 >= 1024, "at least 1024 TS1 sets each way");
    check(mon_tx.ts2 >= 16 && mon_rx.ts2 >= 16, "TS2 sets each way");
    check(mon_tx.initfc1 >= 3 && mon_tx.initfc2 >= 3 && mon_rx.initfc1 >= 3 && mon_rx.initfc2 >= 3,
          "InitFC1 and InitFC2 for all three classes both ways");
    // 3) configuration read of the ID register
    r = rq(REQ_CFGRD, 0, 1, 0); send(r);
    wait_idle(1);
    check(dut.u_cfg.shadow[0] == 32'hABCD_1234, "ID register read into Config Reg");
    // endpoint fills host memory 0x100.. (posted write to the host)
    app = '0; app.req = rq(REQ_MWR, 64'h400, 32, 0);
    for (int i = 0; i < 32; i++) app.data[i] = pat(i);
    @(negedge clk); app_valid = 1;
    while (!app_ready) @(negedge clk);
    @(posedge clk); #1 app_valid = 0;
    repeat (600) @(negedge clk);
    ok = 1;
    for (int i = 0; i < 32; i++) begin peek(16'h100 + i, d); ok &= d == pat(i); end
    check(ok, "endpoint memory write landed in host memory");
    // configuration write from host memory, read back and compared
    r = rq(REQ_CFGWR, 0, 1, 16'h101); r.reg_no = 6'd3; send(r);
    r = rq(REQ_CFGRD, 0, 1, 0); r.reg_no = 6'd3; send(r);
    wait_idle(3);
    check(ep.cfg[3] == pat(1), "configuration write reached the endpoint");
    check(cfg_chk == 1 && cfg_mm == 0 && dut.u_cfg.shadow[3] == pat(1), "Config Reg matched the read-back");
    // 4) memory write of 32 DWORDs from host memory, read back elsewhere
    send(rq(REQ_MWR, 64'h200, 32, 16'h100));
    send(rq(REQ_MRD, 64'h200, 32, 16'h180));
    wait_idle(5);
    ok = 1;
    for (int i = 0; i < 32; i++) ok &= ep.mem[128 + i] == pat(i);
    check(ok, "memory write in the endpoint");
    ok = 1;
    for (int i = 0; i < 32; i++) begin peek(16'h180 + i, d); ok &= d == pat(i); end
    check(ok, "memory read data in host memory");
    // I/O write and read
    send(rq(REQ_IOWR, 64'h14, 1, 16'h105));
    send(rq(REQ_IORD, 64'h14, 1, 16'h1C0));
    wait_idle(7);
    check(ep.io[5] == pat(5), "I/O write in the endpoint");
    peek(16'h1C0, d); check(d == pat(5), "I/O read data in host memory");
    // totals
    check(cpl_ok == 6 && cpl_bad == 0 && cpl_tos == 0, $sformatf("6 good completions, %0d/%0d/%0d", cpl_ok, cpl_bad, cpl_tos));
    check(mon_tx.cfg == 3 && mon_tx.mwr == 1 && mon_tx.mrd == 1 && mon_tx.io == 2, "monitored requests sent");
    check(mon_rx.mwr == 1 && mon_rx.cpld == 4 && mon_rx.cpl == 2, "monitored TLPs received");
    check(mon_tx.ack > 0 && mon_rx.ack > 0 && mon_tx.nak == 0 && mon_rx.nak == 0, "Ack, no Nak");
    check(mon_tx.frame_err == 0 && mon_rx.frame_err == 0 && replays == 0 && lcrc_errs == 0, "clean link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
