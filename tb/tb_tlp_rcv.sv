// tb_tlp_rcv: queues a mix of TLPs (completion, memory write, configuration
// read, a message, a TLP of reserved type) and checks that each head goes to
// the right side, waits for that side to be ready, that the message is counted
// with its code, that the reserved type is dropped, and that each removal
// releases the right credit class and data credits.
module tb_tlp_rcv;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tv, cv, cr, qv, qr, rel, ovf;
  tlp_t ti, head;
  fc_type_e rtype;
  logic [7:0] rdata;
  logic [15:0] dropped, msgs;
  logic [7:0] mcode;
  int checks = 0, failures = 0;

  tlp_rcv #(.RXQ_DEPTH(4)) dut (
    .clk, .rst_n, .tlp_valid_i(tv), .tlp_i(ti), .cpl_valid_o(cv), .cpl_ready_i(cr),
    .req_valid_o(qv), .req_ready_i(qr), .head_o(head),
    .rel_valid_o(rel), .rel_type_o(rtype), .rel_data_o(rdata), .overflow_o(ovf), .dropped_o(dropped),
    .msgs_o(msgs), .msg_code_o(mcode));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic tlp_t mk(logic [1:0] fmt, logic [4:0] typ, int len);
    tlp_t t = '0;
    t.dw[0] = {1'b0, fmt, typ, 14'd0, 10'(len)};
    return t;
  endfunction

  task automatic put(input tlp_t t);
    @(negedge clk); ti = t; tv = 1; @(negedge clk); tv = 0;
  endtask

  initial begin
    tv = 0; cr = 0; qr = 0; ti = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(mk(FMT_3DW_D, TYPE_CPL, 5));
    put(mk(FMT_3DW_D, TYPE_MEM, 9));
    put(mk(FMT_3DW_ND, TYPE_CFG0, 1));
    begin
      tlp_t m;
      m = mk(FMT_4DW_ND, 5'b10100, 0);      // message, local routing
      m.dw[1][7:0] = 8'h20;
      put(m);
    end
    // completion at the head, completion side not ready
    check(cv && !qv, "completion routed to completion side");
    check(!rel, "nothing released while waiting");
    cr = 1; #1;
    check(rel && rtype == FC_CPL && rdata == 8'd2, "Cpl release with 2 data credits");
    @(negedge clk); cr = 0;
    check(qv && !cv && head.dw[0][28:24] == TYPE_MEM, "memory write routed to request side");
    qr = 1; #1;
    check(rel && rtype == FC_P && rdata == 8'd3, "posted release, 3 data credits");
    @(negedge clk);
    check(qv && head.dw[0][28:24] == TYPE_CFG0, "configuration read next");
    #1 check(rel && rtype == FC_NP && rdata == 8'd0, "non-posted release, no data");
    @(negedge clk); qr = 0;
    check(!cv && !qv, "message not offered");
    #1 check(rel && rtype == FC_P && rdata == 8'd0, "message releases a posted header credit");
    @(negedge clk);
    check(msgs == 16'd1 && mcode == 8'h20 && dropped == 16'd0, "message counted with its code");
    put(mk(FMT_3DW_ND, 5'b00110, 1));      // reserved type
    @(negedge clk);
    check(dropped == 16'd1 && msgs == 16'd1, "reserved type dropped");
    check(!ovf, "no overflow");
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
