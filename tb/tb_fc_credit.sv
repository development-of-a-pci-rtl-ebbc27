// tb_fc_credit: charges TLPs against credit limits and checks the gate
// against a reference count kept in the testbench: headers and data per
// class, refusal at the limit, release when the limit grows, infinite
// credit, and the modulo test across the 8-bit counter wrap.
module tb_fc_credit;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dl_up, ok, cons, stall;
  logic [2:0][7:0] clh;
  logic [2:0][11:0] cld;
  logic [2:0] infh, infd;
  tlp_t t;
  int checks = 0, failures = 0;

  fc_credit dut (.clk, .rst_n, .dl_up_i(dl_up), .cl_hdr_i(clh), .cl_data_i(cld),
    .infinite_hdr_i(infh), .infinite_data_i(infd), .chk_tlp_i(t), .ok_o(ok), .consume_i(cons), .stall_o(stall));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic tlp_t mwr(int len);
    tlp_t x = '0;
    x.dw[0] = {1'b0, FMT_3DW_D, TYPE_MEM, 14'd0, 10'(len)};
    return x;
  endfunction
  function automatic tlp_t mrd();
    tlp_t x = '0;
    x.dw[0] = {1'b0, FMT_3DW_ND, TYPE_MEM, 14'd0, 10'd4};
    return x;
  endfunction
  function automatic tlp_t cpld(int len);
    tlp_t x = '0;
    x.dw[0] = {1'b0, FMT_3DW_D, TYPE_CPL, 14'd0, 10'(len)};
    return x;
  endfunction

  // send t if the gate allows; return whether it did
  task automatic try_send(input tlp_t x, input bit expect_ok, input string s);
    @(negedge clk); t = x; #1;
    check(ok == expect_ok, s);
    cons = ok;
    @(negedge clk); cons = 0;
  endtask

  initial begin
    dl_up = 0; cons = 0; t = '0; infh = 3'b100; infd = 3'b100;
    clh = {8'd0, 8'd2, 8'd2}; cld = {12'd0, 12'd0, 12'd8};
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(!ok, "nothing goes while the link is down");
    dl_up = 1;
    try_send(mwr(16), 1, "MWr 16 DW uses 4 of 8 data credits");
    try_send(mwr(20), 0, "MWr 20 DW needs 5, only 4 left");
    try_send(mwr(16), 1, "MWr 16 DW fits exactly, 2nd header");
    try_send(mwr(1), 0, "no posted header credit left");
    @(negedge clk); t = mwr(1); #1 check(stall, "stall flagged");
    clh[0] = 8'd3; cld[0] = 12'd9;              // UpdateFC
    try_send(mwr(4), 1, "posted again after UpdateFC");
    try_send(mrd(), 1, "MRd uses non-posted header 1");
    try_send(mrd(), 1, "MRd uses non-posted header 2");
    try_send(mrd(), 0, "non-posted headers used up");
    for (int i = 0; i < 300; i++) try_send(cpld(32), 1, "completions are infinite");
    // wrap: move the non-posted limit round the 8-bit counter
    for (int i = 0; i < 300; i++) begin
      clh[1] = 8'(clh[1] + 1);
      try_send(mrd(), 1, "non-posted across the wrap");
    end
    try_send(mrd(), 0, "limit reached after the wrap");
    dl_up = 0; @(negedge clk); dl_up = 1;
    clh[1] = 8'd1;
    try_send(mrd(), 1, "counters cleared when the link goes down");
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
