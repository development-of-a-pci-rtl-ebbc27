// tb_phy_layer: two physical layers joined back to back. Checks the training
// sequence (TS1 sets of COM plus fifteen TS1 symbols, at least TS1_MIN of them,
// then TS2 sets, then L0 on both sides), the framing on the wlog (STP or SDP,
// the bytes, END), that the far side hands back exactly the bytes sent with
// sop/eop/DLLP marks, and that an EDB ending raises a framing error.
module tb_phy_layer;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int TSMIN = 20;
  logic atv, atr, arv, aferr, aup, btv, btr, brv, bferr, bup;
  lbyte_t atb, arb, btb, brb;
  sym_t a2b, b2a, a2b_w;
  logic [1:0] alt, blt;
  logic [15:0] atf, adf, btf, bdf;
  logic edb_next;
  int checks = 0, failures = 0;

  phy_layer #(.TS1_MIN(TSMIN)) ua (.clk, .rst_n, .tx_valid_i(atv), .tx_ready_o(atr), .tx_byte_i(atb),
    .rx_valid_o(arv), .rx_byte_o(arb), .frame_err_o(aferr), .link_up_o(aup), .tx_sym_o(a2b), .rx_sym_i(b2a),
    .ltssm_o(alt), .tlp_frames_o(atf), .dllp_frames_o(adf));
  phy_layer #(.TS1_MIN(TSMIN)) ub (.clk, .rst_n, .tx_valid_i(btv), .tx_ready_o(btr), .tx_byte_i(btb),
    .rx_valid_o(brv), .rx_byte_o(brb), .frame_err_o(bferr), .link_up_o(bup), .tx_sym_o(b2a), .rx_sym_i(a2b_w),
    .ltssm_o(blt), .tlp_frames_o(btf), .dllp_frames_o(bdf));

  // wire from A to B; can turn the next END into EDB
  always_comb begin
    a2b_w = a2b;
    if (edb_next && a2b.k && a2b.d == K_END) a2b_w.d = K_EDB;
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // wlog log and received bytes
  sym_t wlog[$];
  lbyte_t got[$];
  int ferrs = 0, ts1_syms = 0, ts2_syms = 0, bad_os = 0, pos = -1;
  bit in_ts2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (!aup) begin
      // ordered-set check on A's output during training
      if (a2b.k && a2b.d == K_COM) pos = 0;
      else if (pos >= 0) begin
        if (a2b.d == TS1_ID) ts1_syms++;
        else if (a2b.d == TS2_ID) ts2_syms++;
        else bad_os++;
        if (a2b.d == TS2_ID && ts1_syms % 15 != 0) bad_os++;
      end
    end else wlog.push_back(a2b_w);
    if (brv) got.push_back(brb);
    if (bferr) ferrs++;
  end

  task automatic frame(input bit dllp, input int n, input logic [7:0] seed);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      atv = 1; atb.sop = (i == 0); atb.eop = (i == n - 1); atb.dllp = dllp; atb.d = seed + 8'(i);
      while (!atr) @(negedge clk);
      @(posedge clk); #1;
    end
    atv = 0;
    repeat (4) @(negedge clk);
  endtask

  int t0, n0;
  initial begin
    atv = 0; btv = 0; atb = '0; btb = '0; edb_next = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t0 = 0;
    while (!(aup && bup) && t0 < 5000) begin @(negedge clk); t0++; end
    check(aup && bup, "both sides reach L0");
    check(t0 >= TSMIN * 16, $sformatf("training took %0d cycles", t0));
    check(ts1_syms >= TSMIN * 15 && ts1_syms % 15 == 0, $sformatf("whole TS1 sets sent: %0d symbols", ts1_syms));
    check(ts2_syms >= 16 * 15 && ts2_syms % 15 == 0, $sformatf("whole TS2 sets sent: %0d symbols", ts2_syms));
    check(bad_os == 0, "only TS1 then TS2 identifiers during training");
    repeat (40) @(negedge clk);
    wlog = {}; got = {};
    frame(0, 22, 8'h10);
    check(wlog.size() > 0, "symbols seen");
    begin
      int s = -1;
      foreach (wlog[i]) if (wlog[i].k && wlog[i].d == K_STP) begin s = i; break; end
      check(s >= 0 && wlog[s + 23].k && wlog[s + 23].d == K_END, "STP, 22 bytes, END on the wlog");
      for (int i = 1; i <= 22 && s >= 0; i++)
        if (wlog[s + i].k || wlog[s + i].d != 8'h10 + 8'(i - 1)) begin check(0, "wlog byte"); break; end
    end
    check(got.size() == 22, $sformatf("22 bytes received, got %0d", got.size()));
    foreach (got[i])
      if (got[i].d != 8'h10 + 8'(i) || got[i].sop != (i == 0) || got[i].eop != (i == 21) || got[i].dllp) begin
        check(0, $sformatf("received byte %0d", i)); break;
      end
    wlog = {}; got = {};
    frame(1, 6, 8'hA0);
    check(got.size() == 6 && got[0].dllp && got[0].sop && got[5].eop && got[5].d == 8'hA5, "DLLP bytes");
    begin
      bit sdp = 0;
      foreach (wlog[i]) if (wlog[i].k && wlog[i].d == K_SDP) sdp = 1;
      check(sdp, "SDP on the wlog");
    end
    check(ferrs == 0, "no framing error so far");
    edb_next = 1;
    frame(0, 10, 8'h00);
    edb_next = 0;
    check(ferrs == 1, "EDB raises a framing error");
    check(atf == 2 && adf == 1, "frame counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
