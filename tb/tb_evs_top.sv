// tb_evs_top: end-to-end test of the verification suite against an endpoint.
//
// The suite (evs_top) and a behavioural endpoint (ep_model) are joined
// symbol for symbol. The test follows the suite's procedure: link training,
// flow-control initialisation, configuration writes and reads, then memory and
// I/O transactions and messages in both directions. It then provokes each error mechanism:
// a corrupted TLP (Nak and replay), an unsupported configuration type and an
// unsupported I/O read to the host (UR completions), a burst of memory writes
// larger than the endpoint's posted credits (flow-control stall), and a
// stretch where the endpoint's transmitter is silenced (replay timer, duplicate
// TLPs, completion timeout and a late, unexpected completion). Expected data is
// worked out in the testbench from the patterns it wrote.
module tb_evs_top;
  import pcie_pkg::*;

  localparam int CPL_TO = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  req_t        cmd;
  sym_t        h2e, e2h, h2e_line;
  logic        link_up, dl_up, host_idle;
  logic [1:0]  dl_state;
  logic [15:0] issued, cpl_ok, cpl_bad, cpl_tos, cfg_chk, cfg_mm, fc_stalls, replays, lcrc_errs, ur_sent;
  mon_counts_t mon_tx, mon_rx;
  logic [15:0] msgs_rcvd, ep_msgs;
  logic [7:0]  msg_code, ep_msg_code;
  logic [15:0] peek_addr;
  logic [31:0] peek_mem, peek_cfg;

  logic        mute, app_valid, app_ready, ep_res_valid, ep_res_ok, ep_dl_up;
  txreq_t      app;
  tlp_t        ep_res_tlp;
  logic [15:0] ep_lcrc, ep_dups, ep_ur;
  logic [7:0]  ep_peek;
  logic [31:0] ep_mem, ep_io;

  int checks = 0, failures = 0;
  int corrupt_armed = 0, sym_after_stp = -1, corrupted = 0;
  int ep_res_n = 0, ep_res_okn = 0;
  tlp_t ep_last;

  evs_top #(.TS1_MIN(16), .CPL_TIMEOUT(CPL_TO)) dut (
    .clk, .rst_n, .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
    .tx_sym_o(h2e), .rx_sym_i(e2h),
    .link_up_o(link_up), .dl_up_o(dl_up), .dl_state_o(dl_state), .host_idle_o(host_idle),
    .issued_o(issued), .cpl_ok_o(cpl_ok), .cpl_bad_o(cpl_bad), .cpl_timeouts_o(cpl_tos),
    .cfg_checked_o(cfg_chk), .cfg_mismatches_o(cfg_mm), .fc_stall_cycles_o(fc_stalls),
    .replays_o(replays), .lcrc_errs_o(lcrc_errs), .ur_sent_o(ur_sent),
    .msgs_rcvd_o(msgs_rcvd), .msg_code_o(msg_code),
    .mon_tx_o(mon_tx), .mon_rx_o(mon_rx),
    .peek_addr_i(peek_addr), .peek_mem_o(peek_mem), .peek_cfg_o(peek_cfg));

  ep_model #(.TS1_MIN(16)) ep (
    .clk, .rst_n, .rx_sym_i(h2e_line), .tx_sym_o(e2h), .mute_i(mute),
    .app_valid_i(app_valid), .app_ready_o(app_ready), .app_i(app),
    .res_valid_o(ep_res_valid), .res_ok_o(ep_res_ok), .res_tlp_o(ep_res_tlp),
    .dl_up_o(ep_dl_up), .lcrc_errs_o(ep_lcrc), .dups_o(ep_dups), .ur_sent_o(ep_ur),
    .msgs_o(ep_msgs), .msg_code_o(ep_msg_code),
    .peek_addr_i(ep_peek), .peek_mem_o(ep_mem), .peek_io_o(ep_io));

  // link from host to endpoint, with one-shot corruption of a TLP byte
  always_comb begin
    h2e_line = h2e;
    if (sym_after_stp == 6 && corrupt_armed != 0) h2e_line.d = h2e.d ^ 8'h5A;
  end
  always_ff @(posedge clk) begin
    if (h2e.k && h2e.d == K_STP) sym_after_stp <= 0;
    else if (sym_after_stp >= 0) sym_after_stp <= sym_after_stp + 1;
    if (sym_after_stp == 6 && corrupt_armed != 0) begin
      corrupt_armed <= 0;
      corrupted <= corrupted + 1;
    end
    if (ep_res_valid) begin
      ep_res_n <= ep_res_n + 1;
      if (ep_res_ok) ep_res_okn <= ep_res_okn + 1;
      ep_last <= ep_res_tlp;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic req_t base_req(req_kind_e k);
    req_t r = '0;
    r.kind = k;
    r.first_be = 4'hF;
    r.last_be = 4'hF;
    r.length = 10'd1;
    return r;
  endfunction

  function automatic req_t cfg_req(bit wr, bit typ1, logic [3:0] ext, logic [5:0] regn, logic [3:0] be,
                                   logic [15:0] haddr);
    req_t r = base_req(wr ? REQ_CFGWR : REQ_CFGRD);
    r.cfg_type = typ1; r.bdf = 16'h0100; r.ext_reg_no = ext; r.reg_no = regn;
    r.first_be = be; r.host_addr = haddr;
    return r;
  endfunction

  function automatic req_t mem_req(bit wr, bit ad64, logic [63:0] addr, int len, logic [3:0] fbe,
                                   logic [3:0] lbe, logic [15:0] haddr);
    req_t r = base_req(wr ? REQ_MWR : REQ_MRD);
    r.ad64 = ad64; r.addr = addr; r.length = 10'(len); r.first_be = fbe; r.last_be = lbe;
    r.host_addr = haddr;
    return r;
  endfunction

  function automatic req_t io_req(bit wr, logic [31:0] addr, logic [15:0] haddr);
    req_t r = base_req(wr ? REQ_IOWR : REQ_IORD);
    r.addr = {32'h0, addr}; r.host_addr = haddr;
    return r;
  endfunction

  // stimulus changes at the falling edge; ready is stable from then to the
  // rising edge that completes the handshake
  task automatic send(input req_t r);
    @(negedge clk);
    cmd = r;
    cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 1'b0;
  endtask

  task automatic wait_idle(input int n_issued);
    int guard = 0;
    while ((issued != 16'(n_issued) || !host_idle || dut.u_port.u_trk.outstanding_o != 0) && guard < 20000) begin
      @(posedge clk); guard++;
    end
    repeat (400) @(posedge clk);
  endtask

  task automatic ep_send(input txreq_t t);
    @(negedge clk);
    app = t;
    app_valid = 1'b1;
    while (!app_ready) @(negedge clk);
    @(posedge clk);
    #1 app_valid = 1'b0;
  endtask

  function automatic logic [31:0] pat(int i);
    return 32'h5000_0000 + 32'(i) * 32'h0001_0003;
  endfunction

  function automatic logic [31:0] peek_host(int a);
    return dut.u_mem.mem[a];
  endfunction

  int n_iss = 0;
  txreq_t t;
  logic [31:0] w;
  int ep_before;

  initial begin
    cmd_valid = 1'b0; cmd = '0; mute = 1'b0; app_valid = 1'b0; app = '0; peek_addr = '0; ep_peek = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // 1) physical link setup, 2) flow-control initialisation
    while (!(dl_up && ep_dl_up)) @(posedge clk);
    repeat (100) @(posedge clk);
    check(mon_tx.ts1 >= 16 && mon_tx.ts2 >= 8, "training ordered sets sent");
    check(mon_rx.ts1 >= 16 && mon_rx.ts2 >= 8, "training ordered sets received");
    check(mon_tx.initfc1 >= 3 && mon_tx.initfc2 >= 3, "InitFC1/InitFC2 sent");
    check(mon_rx.initfc1 >= 3 && mon_rx.initfc2 >= 3, "InitFC1/InitFC2 received");
    check(dut.u_port.u_fci.cl_hdr_o[0] == 8'd1 && dut.u_port.u_fci.cl_data_o[0] == 12'd8,
          "endpoint posted credits recorded");
    check(dut.u_port.u_fci.inf_hdr_o[2] == 1'b0, "endpoint completion credits finite");

    // 3) configuration
    send(cfg_req(0, 0, 4'd0, 6'd0, 4'hF, 16'd0)); n_iss++;          // read IDs
    send(cfg_req(1, 0, 4'd0, 6'd1, 4'hF, 16'h000)); n_iss++;        // write command reg (payload from host mem 0)
    wait_idle(n_iss);
    // host memory is still zero, so configuration register 1 was written with 0
    check(dut.u_cfg.shadow[0] == 32'hABCD_1234, "vendor/device ID read into Config Reg");
    check(ep.cfg[1] == 32'h0, "config write reached the endpoint");

    // endpoint writes a pattern into host memory (posted, Rx Cpl gen path)
    t = '0;
    t.req = mem_req(1, 0, 64'h400, 32, 4'hF, 4'hF, 16'd0);
    for (int i = 0; i < 32; i++) t.data[i] = pat(i);
    ep_send(t);
    repeat (600) @(posedge clk);
    for (int i = 0; i < 32; i++) check(peek_host(16'h100 + i) == pat(i), $sformatf("host mem %0d from endpoint MWr", i));

    // configuration write from host memory, then read back and compare
    send(cfg_req(1, 0, 4'd1, 6'd2, 4'b0011, 16'h105)); n_iss++;     // ext reg 0x42
    send(cfg_req(0, 0, 4'd1, 6'd2, 4'hF, 16'h0)); n_iss++;
    wait_idle(n_iss);
    check(ep.cfg[10'h42] == {16'h0, pat(5)[15:0]}, "partial config write in endpoint");
    check(dut.u_cfg.shadow[10'h42] == {16'h0, pat(5)[15:0]}, "config read-back in Config Reg");
    check(cfg_chk >= 1 && cfg_mm == 0, "Config Reg compared the read-back");

    // endpoint reads host memory (CplD generated by the host side)
    t = '0;
    t.req = mem_req(0, 0, 64'h408, 8, 4'hF, 4'hF, 16'd0);
    ep_before = ep_res_okn;
    ep_send(t);
    repeat (800) @(posedge clk);
    check(ep_res_okn == ep_before + 1, "endpoint MRd completed");
    for (int i = 0; i < 8; i++) check(ep_last.dw[3 + i] == pat(2 + i), $sformatf("endpoint CplD data %0d", i));

    // 4) memory transactions: three 32-DWORD writes exceed the posted credits
    for (int k = 0; k < 3; k++) begin
      send(mem_req(1, 0, 64'(k * 128), 32, 4'hF, 4'hF, 16'h100)); n_iss++;
    end
    wait_idle(n_iss);
    for (int k = 0; k < 3; k++)
      for (int i = 0; i < 32; i++) check(ep.mem[k * 32 + i] == pat(i), $sformatf("endpoint mem %0d", k * 32 + i));
    check(fc_stalls > 0, "posted credit stall seen");
    check(mon_rx.updatefc > 0, "UpdateFC DLLPs received");

    // memory reads back into host memory: 32-bit full read, 64-bit partial read
    send(mem_req(0, 0, 64'h0, 32, 4'hF, 4'hF, 16'h200)); n_iss++;
    send(mem_req(0, 1, 64'h104, 4, 4'b1100, 4'b0011, 16'h240)); n_iss++;
    wait_idle(n_iss);
    for (int i = 0; i < 32; i++) check(peek_host(16'h200 + i) == pat(i), $sformatf("MRd data %0d", i));
    for (int i = 0; i < 4; i++) check(peek_host(16'h240 + i) == pat(1 + i), $sformatf("MRd64 data %0d", i));
    check(cpl_ok == 16'(n_iss - 3), "completions checked good");   // 3 posted writes have none

    // I/O write and read
    send(io_req(1, 32'h20, 16'h106)); n_iss++;
    send(io_req(0, 32'h20, 16'h300)); n_iss++;
    wait_idle(n_iss);
    check(ep.io[8] == pat(6), "I/O write in endpoint");
    check(peek_host(16'h300) == pat(6), "I/O read into host memory");

    // unsupported: type-1 configuration read, endpoint I/O read to the host
    w = cpl_bad;
    send(cfg_req(0, 1, 4'd0, 6'd0, 4'hF, 16'h0)); n_iss++;
    wait_idle(n_iss);
    check(cpl_bad == w + 1, "type-1 configuration read answered with UR");
    check(ep_ur == 1, "endpoint sent one UR");
    t = '0;
    t.req = io_req(0, 32'h0, 16'h0);
    ep_before = ep_res_n;
    ep_send(t);
    repeat (600) @(posedge clk);
    check(ur_sent == 1 && ep_res_n == ep_before + 1 && !ep_res_ok, "host answered endpoint I/O read with UR");

    // messages both ways: host sends a local message (code 20h), endpoint
    // sends PM_PME (code 18h, routed to the root)
    begin
      req_t m;
      m = base_req(REQ_MSG); m.length = 10'd0; m.first_be = 4'h0; m.last_be = 4'h0;
      m.msg_route = 3'b100; m.msg_code = 8'h20;
      send(m); n_iss++;
      wait_idle(n_iss);
      check(ep_msgs == 1 && ep_msg_code == 8'h20 && mon_tx.msg == 1, "message received by the endpoint");
      t = '0;
      t.req = base_req(REQ_MSG); t.req.msg_route = 3'b000; t.req.msg_code = 8'h18;
      ep_send(t);
      repeat (400) @(posedge clk);
      check(msgs_rcvd == 1 && msg_code == 8'h18 && mon_rx.msg == 1, "PM_PME message received by the host side");
    end

    // corrupted TLP: endpoint Naks, host replays
    corrupt_armed = 1;
    send(mem_req(1, 0, 64'h300, 4, 4'hF, 4'hF, 16'h110)); n_iss++;
    wait_idle(n_iss);
    check(corrupted == 1 && ep_lcrc >= 1, "LCRC error detected by endpoint");
    check(mon_rx.nak >= 1 && replays >= 1, "Nak received and TLP replayed");
    for (int i = 0; i < 4; i++) check(ep.mem[192 + i] == pat(16 + i), $sformatf("replayed data %0d", i));

    // silenced endpoint: completion timeout, replays, duplicates
    w = cpl_bad;
    mute = 1'b1;
    send(cfg_req(0, 0, 4'd0, 6'd0, 4'hF, 16'h0)); n_iss++;
    repeat (CPL_TO + 1000) @(posedge clk);
    mute = 1'b0;
    repeat (6000) @(posedge clk);
    check(cpl_tos == 1, "completion timeout");
    check(ep_dups >= 1, "endpoint dropped a replayed duplicate");
    check(cpl_bad == w + 1, "late completion flagged as unexpected");
    // the link still works afterwards
    w = cpl_ok;
    send(cfg_req(0, 0, 4'd0, 6'd0, 4'hF, 16'h0)); n_iss++;
    wait_idle(n_iss);
    check(cpl_ok == w + 1, "link usable after recovery");
    check(dut.u_cfg.shadow[0] == 32'hABCD_1234, "config read after recovery");

    // mechanism counts
    $display("mechanisms: fc_stall_cycles=%0d naks=%0d replays=%0d lcrc_errs=%0d dups=%0d cpl_timeouts=%0d ur=%0d/%0d updatefc=%0d msgs=%0d/%0d",
             fc_stalls, mon_rx.nak, replays, ep_lcrc, ep_dups, cpl_tos, ur_sent, ep_ur, mon_rx.updatefc, mon_tx.msg, mon_rx.msg);
    check(fc_stalls > 0 && mon_rx.nak > 0 && replays > 0 && ep_dups > 0 && cpl_tos > 0 && ur_sent > 0 &&
          ep_ur > 0 && mon_rx.updatefc > 0 && mon_tx.updatefc > 0 && mon_tx.msg > 0 && mon_rx.msg > 0,
          "every mechanism happened");
    check(mon_tx.frame_err == 0 && mon_rx.frame_err == 0, "no framing violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
