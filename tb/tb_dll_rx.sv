// tb_dll_rx: feeds the data link receiver with frames built here (sequence
// number, TLP, LCRC from a reference CRC-32; DLLP body and reference CRC-16)
// and checks what it passes on: good in-order TLPs with an Ack, bad LCRC and
// framing errors with a single Nak, duplicates dropped and re-acknowledged,
// a sequence number from the future Naked, and DLLPs sorted into Ack/Nak and
// flow-control DLLPs, with bad DLLPs dropped.
module tb_dll_rx;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic bv, ferr, tv, anr, ann, rxa, rxn, dv;
  lbyte_t b;
  tlp_t t;
  logic [11:0] ans, rxs;
  dllp_t d;
  logic [15:0] lerr, dups, derr;
  int checks = 0, failures = 0;

  dll_rx dut (.clk, .rst_n, .link_up_i(1'b1), .byte_valid_i(bv), .byte_i(b), .frame_err_i(ferr),
    .tlp_valid_o(tv), .tlp_o(t), .acknak_req_o(anr), .acknak_nak_o(ann), .acknak_seq_o(ans),
    .rx_ack_o(rxa), .rx_nak_o(rxn), .rx_seq_o(rxs), .dllp_valid_o(dv), .dllp_o(d),
    .lcrc_errs_o(lerr), .dups_o(dups), .dllp_errs_o(derr));

  function automatic logic [31:0] ref_crc32(logic [7:0] q[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      c ^= {24'h0, q[i]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction
  function automatic logic [15:0] ref_crc16(logic [31:0] x);
    logic [15:0] c = 16'hFFFF;
    for (int i = 31; i >= 0; i--) c = (c[15] ^ x[i]) ? ((c << 1) ^ 16'h100B) : (c << 1);
    return ~c;
  endfunction

  // outputs seen since the last clear
  int n_tlp, n_ack, n_nak, n_rack, n_rnak, n_dllp;
  logic [11:0] last_an, last_rx;
  tlp_t last_t;
  dllp_t last_d;
  always @(posedge clk) if (rst_n) begin
    if (tv) begin n_tlp++; last_t = t; end
    if (anr) begin if (ann) n_nak++; else n_ack++; last_an = ans; end
    if (rxa) begin n_rack++; last_rx = rxs; end
    if (rxn) begin n_rnak++; last_rx = rxs; end
    if (dv) begin n_dllp++; last_d = d; end
  end
  task automatic clr();
    n_tlp = 0; n_ack = 0; n_nak = 0; n_rack = 0; n_rnak = 0; n_dllp = 0;
  endtask

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic feed(input logic [7:0] q[$], input bit dllp, input int err_at);
    foreach (q[i]) begin
      @(negedge clk);
      bv = 1; b.sop = (i == 0); b.eop = (i == q.size() - 1); b.dllp = dllp; b.d = q[i];
      ferr = (i == err_at);
      if ($urandom % 3 == 0) begin @(negedge clk); bv = 0; ferr = 0; end
    end
    @(negedge clk); bv = 0; ferr = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic send_tlp(input int seq, input int ndw, input logic [31:0] base, input bit bad_crc, input int err_at);
    logic [7:0] q[$];
    logic [31:0] c;
    q.push_back({4'h0, 4'(seq >> 8)}); q.push_back(8'(seq));
    for (int i = 0; i < ndw; i++) for (int k = 3; k >= 0; k--) q.push_back(8'((base + 32'(i)) >> (8 * k)));
    c = ref_crc32(q);
    if (bad_crc) c ^= 32'h0000_0100;
    for (int k = 0; k < 4; k++) q.push_back(c[8*k +: 8]);
    feed(q, 0, err_at);
  endtask

  task automatic send_dllp(input logic [31:0] x, input bit bad);
    logic [7:0] q[$];
    logic [15:0] c = ref_crc16(x) ^ (bad ? 16'h0001 : 16'h0);
    q = {x[31:24], x[23:16], x[15:8], x[7:0], c[15:8], c[7:0]};
    feed(q, 1, -1);
  endtask

  initial begin
    bv = 0; ferr = 0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    clr(); send_tlp(0, 3, 32'h0400_0001, 0, -1);
    check(n_tlp == 1 && n_ack == 1 && last_an == 0, "TLP 0 accepted and acknowledged");
    check(last_t.ndw == 6'd3 && last_t.dw[0] == 32'h0400_0001 && last_t.dw[2] == 32'h0400_0003, "TLP 0 contents");
    clr(); send_tlp(1, 8, 32'h4000_0004, 0, -1);
    check(n_tlp == 1 && n_ack == 1 && last_an == 1 && last_t.ndw == 6'd8 && last_t.dw[7] == 32'h4000_000B, "TLP 1");
    clr(); send_tlp(2, 3, 32'h1, 1, -1);
    check(n_tlp == 0 && n_nak == 1 && last_an == 1 && lerr == 1, "bad LCRC: Nak 1");
    clr(); send_tlp(2, 3, 32'h1, 1, -1);
    check(n_tlp == 0 && n_nak == 0 && lerr == 2, "second bad LCRC: no second Nak");
    clr(); send_tlp(2, 4, 32'h0A00_0000, 0, -1);
    check(n_tlp == 1 && n_ack == 1 && last_an == 2, "TLP 2 after the Nak");
    clr(); send_tlp(1, 8, 32'h4000_0004, 0, -1);
    check(n_tlp == 0 && n_ack == 1 && last_an == 2 && dups == 1, "duplicate dropped and re-acknowledged");
    clr(); send_tlp(5, 3, 32'h1, 0, -1);
    check(n_tlp == 0 && n_nak == 1 && last_an == 2, "future sequence number Naked");
    clr(); send_tlp(3, 3, 32'h1, 0, 7);
    check(n_tlp == 0 && n_nak == 0 && lerr == 3, "framing error drops the TLP");
    clr(); send_tlp(3, 3, 32'h0500_0000, 0, -1);
    check(n_tlp == 1 && last_an == 3, "TLP 3");
    clr(); send_dllp(32'h0000_0123, 0);
    check(n_rack == 1 && last_rx == 12'h123 && n_dllp == 0, "Ack DLLP");
    clr(); send_dllp(32'h1000_0456, 0);
    check(n_rnak == 1 && last_rx == 12'h456, "Nak DLLP");
    clr(); send_dllp(32'h5000_8002, 0);
    check(n_dllp == 1 && last_d == 32'h5000_8002, "InitFC1-NP passed to flow control");
    clr(); send_dllp(32'h0000_0001, 1);
    check(n_rack == 0 && n_dllp == 0 && derr == 1, "bad DLLP CRC dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
