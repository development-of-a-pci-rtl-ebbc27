// tb_cpl_gen: sends memory, I/O and configuration requests to the completion
// generator, with a memory model in the testbench behind its target port, and
// checks the target accesses and every completion field (status, byte count,
// lower address, requester ID and tag, data), including Unsupported Request
// for a space the target does not serve.
module tb_cpl_gen;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rv, rr, ten, twe, cv, cr, ur;
  tlp_t rq, cpl;
  logic [1:0] tsp;
  logic [15:0] ta;
  logic [3:0] tbe;
  logic [31:0] twd, trd;
  logic [31:0] m [64];
  int checks = 0, failures = 0;

  cpl_gen #(.COMPLETER_ID(16'h0100), .SUPPORT(3'b101)) dut (
    .clk, .rst_n, .req_valid_i(rv), .req_ready_o(rr), .req_i(rq),
    .tgt_en_o(ten), .tgt_we_o(twe), .tgt_space_o(tsp), .tgt_addr_o(ta), .tgt_be_o(tbe),
    .tgt_wdata_o(twd), .tgt_rdata_i(trd), .cpl_valid_o(cv), .cpl_ready_i(cr), .cpl_o(cpl), .ur_o(ur));

  // memory space: m[0..31], configuration space: m[32..63]
  always_ff @(posedge clk) if (ten) begin
    trd <= m[(tsp == 2'd2 ? 32 : 0) + int'(ta[4:0])];
    if (twe) for (int b = 0; b < 4; b++) if (tbe[b]) m[(tsp == 2'd2 ? 32 : 0) + int'(ta[4:0])][8*b +: 8] <= twd[8*b +: 8];
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic req(input tlp_t t, input bit expect_cpl);
    int n = 0;
    @(negedge clk); rq = t; rv = 1;
    @(negedge clk); rv = 0;
    while (!cv && n < 100) begin @(negedge clk); n++; end
    check(cv == expect_cpl, "completion presence");
    @(negedge clk);
  endtask

  tlp_t t;
  int ucount = 0;
  always @(posedge clk) if (ur) ucount++;

  initial begin
    rv = 0; cr = 1; rq = '0;
    for (int i = 0; i < 64; i++) m[i] = 32'h100 + 32'(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    cr = 0;
    // MWr 4 DW at byte 0x10 (DW 4), first BE 1100, last BE 0011
    t = '0;
    t.dw[0] = {1'b0, FMT_3DW_D, TYPE_MEM, 14'd0, 10'd4};
    t.dw[1] = {16'h0000, 8'd7, 4'b0011, 4'b1100};
    t.dw[2] = 32'h10;
    t.dw[3] = 32'hAAAA_AAAA; t.dw[4] = 32'hBBBB_BBBB; t.dw[5] = 32'hCCCC_CCCC; t.dw[6] = 32'hDDDD_DDDD;
    req(t, 0);
    check(m[4] == 32'hAAAA_0104 && m[5] == 32'hBBBB_BBBB && m[6] == 32'hCCCC_CCCC && m[7] == 32'h0000_DDDD,
          "MWr with byte enables");
    // MRd 3 DW from byte 0x14, first BE 1110
    t = '0;
    t.dw[0] = {1'b0, FMT_3DW_ND, TYPE_MEM, 14'd0, 10'd3};
    t.dw[1] = {16'h0000, 8'd9, 4'b1111, 4'b1110};
    t.dw[2] = 32'h14;
    req(t, 1);
    check(cpl.dw[0] == 32'h4A00_0003 && cpl.ndw == 6'd6, $sformatf("CplD dw0 %h", cpl.dw[0]));
    check(cpl.dw[1] == {16'h0100, CPL_SC, 1'b0, 12'd11}, $sformatf("CplD dw1 %h", cpl.dw[1]));
    check(cpl.dw[2] == {16'h0000, 8'd9, 1'b0, 7'h15}, $sformatf("CplD dw2 %h", cpl.dw[2]));
    check(cpl.dw[3] == 32'hBBBB_BBBB && cpl.dw[4] == 32'hCCCC_CCCC && cpl.dw[5] == 32'h0000_DDDD, "CplD data");
    cr = 1; @(negedge clk); cr = 0;
    // CfgWr type 0 register 3, then CfgRd
    t = '0;
    t.dw[0] = {1'b0, FMT_3DW_D, TYPE_CFG0, 14'd0, 10'd1};
    t.dw[1] = {16'h0000, 8'd2, 4'b0000, 4'b1111};
    t.dw[2] = {16'h0100, 4'h0, 4'h0, 6'd3, 2'b00};
    t.dw[3] = 32'h1234_5678;
    req(t, 1);
    check(cpl.dw[0] == 32'h0A00_0000 && cpl.dw[1] == {16'h0100, CPL_SC, 1'b0, 12'd4} && cpl.ndw == 6'd3, "CfgWr Cpl");
    check(m[35] == 32'h1234_5678, "CfgWr reached configuration space");
    cr = 1; @(negedge clk); cr = 0;
    t.dw[0] = {1'b0, FMT_3DW_ND, TYPE_CFG0, 14'd0, 10'd1};
    req(t, 1);
    check(cpl.dw[0] == 32'h4A00_0001 && cpl.dw[3] == 32'h1234_5678, "CfgRd CplD");
    cr = 1; @(negedge clk); cr = 0;
    // IORd is unsupported here
    t = '0;
    t.dw[0] = {1'b0, FMT_3DW_ND, TYPE_IO, 14'd0, 10'd1};
    t.dw[1] = {16'h0000, 8'd5, 4'b0000, 4'b1111};
    req(t, 1);
    check(cpl.dw[1][15:13] == CPL_UR && cpl.dw[0][30] == 1'b0 && cpl.dw[2][15:8] == 8'd5, "UR completion");
    cr = 1; @(negedge clk); cr = 0;
    check(ucount == 1, "one UR");
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
