// tb_evs_monitor: feeds the link monitor a symbol stream built here and checks
// every counter. The stream holds TS1 and TS2 ordered sets (and one damaged
// set that must not count), each DLLP type, each TLP type, idle symbols in
// between, and three framing violations: END outside a packet, a start
// symbol inside a packet and an EDB. A second pass sends random mixes of the
// same items and compares the counts against a model kept in the testbench.
module tb_evs_monitor;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  sym_t sym;
  mon_counts_t cnt, exp_c;
  int checks = 0, failures = 0;

  evs_monitor dut (.clk, .rst_n, .sym_i(sym), .counts_o(cnt));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic put(input bit k, input logic [7:0] d);
    @(negedge clk); sym.k = k; sym.d = d;
  endtask
  task automatic idle(input int n);
    repeat (n) put(0, 8'h00);
  endtask
  task automatic os(input logic [7:0] id, input bit damage);
    put(1, K_COM);
    for (int i = 1; i < 16; i++) put(0, (damage && i == 9) ? 8'h00 : id);
  endtask
  task automatic dllp(input logic [7:0] typ);
    put(1, K_SDP); put(0, typ);
    repeat (5) put(0, 8'h5A);
    put(1, K_END);
  endtask
  // TLP frame: 2 sequence bytes, then the Fmt/Type byte, then filler
  task automatic tlp(input logic [1:0] fmt, input logic [4:0] typ, input int body);
    put(1, K_STP); put(0, 8'h00); put(0, 8'h07);
    put(0, {1'b0, fmt, typ});
    repeat (body) put(0, 8'hC3);
    put(1, K_END);
  endtask

  task automatic compare(input string tag);
    idle(2);
    check(cnt.ts1 == exp_c.ts1, $sformatf("%s ts1 %0d/%0d", tag, cnt.ts1, exp_c.ts1));
    check(cnt.ts2 == exp_c.ts2, $sformatf("%s ts2 %0d/%0d", tag, cnt.ts2, exp_c.ts2));
    check(cnt.frame_err == exp_c.frame_err, $sformatf("%s frame_err %0d/%0d", tag, cnt.frame_err, exp_c.frame_err));
    check(cnt.ack == exp_c.ack, $sformatf("%s ack", tag));
    check(cnt.nak == exp_c.nak, $sformatf("%s nak", tag));
    check(cnt.initfc1 == exp_c.initfc1, $sformatf("%s initfc1", tag));
    check(cnt.initfc2 == exp_c.initfc2, $sformatf("%s initfc2", tag));
    check(cnt.updatefc == exp_c.updatefc, $sformatf("%s updatefc", tag));
    check(cnt.mrd == exp_c.mrd, $sformatf("%s mrd", tag));
    check(cnt.mwr == exp_c.mwr, $sformatf("%s mwr", tag));
    check(cnt.io == exp_c.io, $sformatf("%s io", tag));
    check(cnt.cfg == exp_c.cfg, $sformatf("%s cfg", tag));
    check(cnt.cpl == exp_c.cpl, $sformatf("%s cpl", tag));
    check(cnt.cpld == exp_c.cpld, $sformatf("%s cpld", tag));
    check(cnt.msg == exp_c.msg, $sformatf("%s msg", tag));
  endtask

  initial begin
    sym = '0; exp_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed pass
    os(TS1_ID, 0); os(TS1_ID, 0); os(TS1_ID, 1); os(TS2_ID, 0);
    exp_c.ts1 = 2; exp_c.ts2 = 1;
    idle(3);
    dllp(DLLP_INIT1_P); dllp(DLLP_INIT1_N); dllp(DLLP_INIT1_C);
    dllp(DLLP_INIT2_P); dllp(DLLP_INIT2_N); dllp(DLLP_INIT2_C);
    dllp(DLLP_UPD_P); dllp(DLLP_ACK); dllp(DLLP_ACK); dllp(DLLP_NAK);
    exp_c.initfc1 = 3; exp_c.initfc2 = 3; exp_c.updatefc = 1; exp_c.ack = 2; exp_c.nak = 1;
    idle(2);
    tlp(FMT_3DW_ND, TYPE_MEM, 9);  tlp(FMT_4DW_ND, TYPE_MEM, 13);
    tlp(FMT_3DW_D, TYPE_MEM, 17);  tlp(FMT_3DW_ND, TYPE_IO, 9);
    tlp(FMT_3DW_D, TYPE_IO, 13);   tlp(FMT_3DW_ND, TYPE_CFG0, 9);
    tlp(FMT_3DW_D, TYPE_CFG1, 13); tlp(FMT_3DW_ND, TYPE_CPL, 9);
    tlp(FMT_3DW_D, TYPE_CPL, 13);  tlp(FMT_3DW_D, TYPE_CPL, 13);
    tlp(FMT_4DW_ND, 5'b10000, 13); tlp(FMT_4DW_ND, 5'b10100, 13);
    exp_c.msg = 2;
    exp_c.mrd = 2; exp_c.mwr = 1; exp_c.io = 2; exp_c.cfg = 2; exp_c.cpl = 1; exp_c.cpld = 2;
    compare("directed");
    // violations
    put(1, K_END);                                   // END outside a packet
    put(1, K_STP); put(0, 8'h00); put(1, K_STP);     // start inside a packet
    put(0, 8'h00); put(0, 8'h01); put(0, {3'b000, TYPE_MEM}); put(1, K_EDB);  // nullified
    exp_c.frame_err += 3; exp_c.mrd += 1;            // the TLP header was seen before EDB
    idle(2);
    compare("violations");
    // random pass
    for (int n = 0; n < 400; n++) begin
      int r;
      r = $urandom_range(0, 10);
      case (r)
        0: begin os(TS1_ID, 0); exp_c.ts1++; end
        1: begin os(TS2_ID, 0); exp_c.ts2++; end
        2: begin dllp(DLLP_ACK); exp_c.ack++; end
        3: begin dllp(DLLP_NAK); exp_c.nak++; end
        4: begin dllp(8'h40 | 8'($urandom_range(0, 2) << 4)); exp_c.initfc1++; end
        5: begin dllp(8'h80 | 8'($urandom_range(0, 2) << 4)); exp_c.updatefc++; end
        6: begin tlp($urandom_range(0, 1), TYPE_MEM, $urandom_range(9, 140)); exp_c.mrd++; end
        7: begin tlp(2'b10 | 2'($urandom_range(0, 1)), TYPE_MEM, $urandom_range(13, 140)); exp_c.mwr++; end
        8: begin tlp(FMT_3DW_D, TYPE_CPL, $urandom_range(13, 140)); exp_c.cpld++; end
        9: if ($urandom_range(0, 1) == 0) begin tlp(FMT_4DW_ND, {2'b10, 3'($urandom_range(0, 5))}, 13); exp_c.msg++; end
           else idle($urandom_range(1, 5));
        default: idle($urandom_range(1, 5));
      endcase
    end
    compare("random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
