// tb_host_model: the host model with a real host memory and configuration
// shadow, and a stand-in for the PCI Express port written in the testbench.
// Checks that nothing is issued before the link is up; that write payloads are
// copied from host memory into the request (memory, I/O and configuration
// writes, random lengths); that a configuration write records the expected
// value (checked through the later reads); that read data coming back is written to host memory at host_addr
// (memory and I/O reads), or compared in the configuration shadow
// (configuration reads, one matching and one not); that failed completions
// are counted and leave memory alone; and the issued / ok / bad counters.
module tb_host_model;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic dl_up, cmd_valid, cmd_ready, req_valid, req_ready, host_ready;
  logic res_valid, res_ok;
  logic [3:0] res_err;
  req_t cmd, res_req;
  tlp_t res_tlp;
  txreq_t req;
  logic mem_en, mem_we, cew, crw, mism, idle;
  logic [3:0] mem_be, ceb;
  logic [9:0] mem_addr, cer, crr, lk_reg;
  logic [31:0] mem_wd, mem_rd, ced, crd, lk_data;
  logic [15:0] issued, cok, cbad, checked, mismatches;
  logic b_en, b_we;
  logic [3:0] b_be;
  logic [9:0] b_addr;
  logic [31:0] b_wd, b_rd;
  int checks = 0, failures = 0;

  host_model dut (.clk, .rst_n, .dl_up_i(dl_up), .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd),
    .req_valid_o(req_valid), .req_ready_i(req_ready), .req_o(req), .host_ready_o(host_ready),
    .res_valid_i(res_valid), .res_ok_i(res_ok), .res_err_i(res_err), .res_req_i(res_req), .res_tlp_i(res_tlp),
    .mem_en_o(mem_en), .mem_we_o(mem_we), .mem_be_o(mem_be), .mem_addr_o(mem_addr), .mem_wdata_o(mem_wd),
    .mem_rdata_i(mem_rd), .cfg_exp_we_o(cew), .cfg_exp_reg_o(cer), .cfg_exp_be_o(ceb), .cfg_exp_data_o(ced),
    .cfg_rd_we_o(crw), .cfg_rd_reg_o(crr), .cfg_rd_data_o(crd), .idle_o(idle), .issued_o(issued),
    .cpl_ok_o(cok), .cpl_bad_o(cbad));
  model_mem #(.DEPTH(1024)) u_mem (.clk, .a_en_i(mem_en), .a_we_i(mem_we), .a_be_i(mem_be), .a_addr_i(mem_addr),
    .a_wdata_i(mem_wd), .a_rdata_o(mem_rd), .b_en_i(b_en), .b_we_i(b_we), .b_be_i(b_be), .b_addr_i(b_addr),
    .b_wdata_i(b_wd), .b_rdata_o(b_rd));
  config_reg u_cfg (.clk, .rst_n, .exp_we_i(cew), .exp_reg_i(cer), .exp_be_i(ceb), .exp_data_i(ced),
    .rd_we_i(crw), .rd_reg_i(crr), .rd_data_i(crd), .lk_reg_i(lk_reg), .lk_data_o(lk_data),
    .mismatch_o(mism), .checked_o(checked), .mismatches_o(mismatches));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // port stand-in: accepts requests with random back-pressure and logs them
  txreq_t got[$];
  always @(negedge clk) req_ready = rst_n && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && req_valid && req_ready) got.push_back(req);

  logic [31:0] shadow [1024];

  task automatic mem_write(input int a, input logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 1; b_be = 4'hF; b_addr = 10'(a); b_wd = d;
    @(negedge clk); b_en = 0; b_we = 0;
    shadow[a] = d;
  endtask
  task automatic mem_read(input int a, output logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 0; b_addr = 10'(a);
    @(negedge clk); b_en = 0; d = b_rd;
  endtask

  task automatic send_cmd(input req_t r);
    @(negedge clk); cmd_valid = 1; cmd = r;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk); #1 cmd_valid = 0;
  endtask

  task automatic result(input bit ok, input req_t r, input int ndata, input logic [31:0] base);
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    res_valid = 1; res_ok = ok; res_err = ok ? 4'h0 : 4'h2; res_req = r; res_tlp = '0;
    res_tlp.ndw = 6'(3 + ndata);
    for (int i = 0; i < ndata; i++) res_tlp.dw[3 + i] = base + 32'(i);
    @(posedge clk); #1 res_valid = 0;
  endtask

  function automatic req_t mk(input req_kind_e k, input int len, input int haddr);
    req_t r;
    r = '0; r.kind = k; r.length = 10'(len); r.first_be = 4'hF; r.last_be = (len > 1) ? 4'hF : 4'h0;
    r.host_addr = 16'(haddr); r.addr = 64'h1000;
    return r;
  endfunction

  task automatic wait_idle;
    int t;
    t = 0;
    do begin @(negedge clk); t++; end while (!(idle && t > 3) && t < 2000);
  endtask

  initial begin
    req_t r;
    logic [31:0] d;
    int lens[4];
    cmd_valid = 0; cmd = '0; res_valid = 0; res_ok = 0; res_err = 0; res_req = '0; res_tlp = '0;
    dl_up = 0; b_en = 0; b_we = 0; b_be = 0; b_addr = 0; b_wd = 0; lk_reg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // host memory contents
    for (int a = 0; a < 256; a++) mem_write(a, 32'hA5000000 + 32'(a * 7));
    // commands wait for the link
    lens = '{5, 1, 32, 17};
    for (int i = 0; i < 4; i++) send_cmd(mk(REQ_MWR, lens[i], 8 * i));
    r = mk(REQ_IOWR, 1, 100); send_cmd(r);
    r = mk(REQ_CFGWR, 1, 101); r.reg_no = 6'd4; r.first_be = 4'h3; send_cmd(r);
    r = mk(REQ_MRD, 8, 0); send_cmd(r);
    repeat (50) @(negedge clk);
    check(got.size() == 0 && issued == 0, "nothing issued before DL_Active");
    dl_up = 1;
    wait_idle();
    check(issued == 7 && got.size() == 7, $sformatf("7 requests issued, got %0d", got.size()));
    for (int i = 0; i < 4 && got.size() == 7; i++) begin
      bit ok;
      ok = got[i].req.kind == REQ_MWR && got[i].req.length == 10'(lens[i]);
      for (int j = 0; j < lens[i]; j++) ok &= got[i].data[j] == shadow[8 * i + j];
      check(ok, $sformatf("MWr %0d payload from host memory", i));
    end
    if (got.size() == 7) begin
      check(got[4].req.kind == REQ_IOWR && got[4].data[0] == shadow[100], "IOWr payload");
      check(got[5].req.kind == REQ_CFGWR && got[5].data[0] == shadow[101], "CfgWr payload");
      check(got[6].req.kind == REQ_MRD && got[6].data == '0, "MRd has no payload");
    end
    // completions
    result(1, mk(REQ_MRD, 8, 300), 8, 32'hD0D00000);
    result(1, mk(REQ_IORD, 1, 320), 1, 32'h10101010);
    r = mk(REQ_CFGRD, 1, 0); r.reg_no = 6'd4;
    result(1, r, 1, {16'hFFFF, shadow[101][15:0]});
    wait_idle();
    check(checked == 1 && mismatches == 0, "matching CfgRd accepted");
    lk_reg = 10'd4;
    @(negedge clk);
    check(lk_data == {16'hFFFF, shadow[101][15:0]}, "CfgRd data stored in the configuration shadow");
    result(1, r, 1, {16'hFFFF, ~shadow[101][15:0]});
    result(0, mk(REQ_MRD, 4, 330), 0, 0);
    wait_idle();
    check(checked == 2 && mismatches == 1, "differing CfgRd flagged");
    check(cok == 4 && cbad == 1, $sformatf("ok %0d bad %0d", cok, cbad));
    begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 8; j++) begin mem_read(300 + j, d); ok &= d == 32'hD0D00000 + 32'(j); end
      check(ok, "MRd data written to host memory");
      mem_read(320, d); check(d == 32'h10101010, "IORd data written to host memory");
      mem_read(308, d); check(d == 32'h0, "nothing written past the read");
      mem_read(330, d); check(d == 32'h0, "failed completion leaves memory alone");
    end
    // back-to-back results while commands are pending: both paths share port A
    for (int i = 0; i < 3; i++) begin
      send_cmd(mk(REQ_MWR, 4, 40 + 4 * i));
      result(1, mk(REQ_MRD, 4, 400 + 4 * i), 4, 32'hE0000000 + 32'(16 * i));
    end
    wait_idle();
    check(issued == 10 && got.size() == 10, "mixed traffic issued");
    for (int i = 0; i < 3 && got.size() == 10; i++) begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 4; j++) ok &= got[7 + i].data[j] == shadow[40 + 4 * i + j];
      check(ok, "mixed MWr payload");
    end
    begin
      bit ok;
      ok = 1;
      for (int j = 0; j < 12; j++) begin mem_read(400 + j, d); ok &= d == 32'hE0000000 + 32'(16 * (j / 4) + j % 4); end
      check(ok, "mixed MRd data");
    end
    check(cok == 7, "ok count");
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
