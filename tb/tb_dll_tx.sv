// tb_dll_tx: collects the frames the data link transmitter produces and checks
// them against values computed here: sequence numbers, TLP bytes, LCRC (a
// reference CRC-32 in the testbench) and the DLLP CRC-16. Then checks the
// replay buffer: an Ack frees TLPs, a Nak replays the unacknowledged ones,
// the replay timer resends when no Ack comes, a full buffer refuses TLPs, and
// Ack/Nak DLLPs go ahead of TLPs. The physical layer's ready is random.
module tb_dll_tx;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic tv, tr, anr, ann, fcv, fcr, rxa, rxn, bv, br;
  logic [11:0] ans, rxs;
  tlp_t ti;
  dllp_t fcd;
  lbyte_t b;
  logic [15:0] sent, reps, ans_sent;
  int checks = 0, failures = 0;

  dll_tx #(.RB_DEPTH(4), .REPLAY_TIMEOUT(300)) dut (
    .clk, .rst_n, .link_up_i(1'b1), .dl_up_i(1'b1),
    .tlp_valid_i(tv), .tlp_ready_o(tr), .tlp_i(ti),
    .acknak_req_i(anr), .acknak_nak_i(ann), .acknak_seq_i(ans),
    .fc_valid_i(fcv), .fc_ready_o(fcr), .fc_dllp_i(fcd),
    .rx_ack_i(rxa), .rx_nak_i(rxn), .rx_seq_i(rxs),
    .byte_valid_o(bv), .byte_ready_i(br), .byte_o(b),
    .tlps_sent_o(sent), .replays_o(reps), .acknaks_sent_o(ans_sent));

  function automatic logic [31:0] ref_crc32(logic [7:0] q[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (q[i]) begin
      c ^= {24'h0, q[i]};
      repeat (8) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction
  function automatic logic [15:0] ref_crc16(logic [31:0] d);
    logic [15:0] c = 16'hFFFF;
    for (int i = 31; i >= 0; i--) c = (c[15] ^ d[i]) ? ((c << 1) ^ 16'h100B) : (c << 1);
    return ~c;
  endfunction

  // frame capture
  typedef struct { bit dllp; logic [7:0] by[$]; } frame_t;
  frame_t frames[$];
  frame_t cur;
  always @(posedge clk) begin
    br <= ($urandom % 4) != 0;
    if (bv && br) begin
      if (b.sop) begin cur.by = {}; cur.dllp = b.dllp; end
      cur.by.push_back(b.d);
      if (b.eop) frames.push_back(cur);
    end
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic tlp_t mk(int n, logic [31:0] base);
    tlp_t t = '0;
    for (int i = 0; i < n; i++) t.dw[i] = base + 32'(i) * 32'h0101_0101;
    t.ndw = 6'(n);
    return t;
  endfunction

  task automatic put(input tlp_t t);
    @(negedge clk); ti = t; tv = 1;
    while (!tr) @(negedge clk);
    @(posedge clk); #1 tv = 0;
  endtask

  task automatic wait_frames(input int n);
    int g = 0;
    while (frames.size() < n && g < 2000) begin @(negedge clk); g++; end
  endtask

  // check a TLP frame: sequence number, body, LCRC
  task automatic check_tlp(input frame_t f, input int seq, input tlp_t t, input string s);
    logic [7:0] q[$];
    logic [31:0] c;
    int n = f.by.size();
    check(!f.dllp && n == 6 + 4 * int'(t.ndw), {s, ": length"});
    if (n < 6) return;
    check({f.by[0][3:0], f.by[1]} == 12'(seq), $sformatf("%s: seq %0d", s, {f.by[0][3:0], f.by[1]}));
    for (int i = 0; i < 4 * int'(t.ndw) && i + 2 < n; i++)
      if (f.by[2 + i] != t.dw[i / 4][8 * (3 - i % 4) +: 8]) begin check(0, {s, ": body"}); break; end
    for (int i = 0; i < n - 4; i++) q.push_back(f.by[i]);
    c = ref_crc32(q);
    check({f.by[n-1], f.by[n-2], f.by[n-3], f.by[n-4]} == c, {s, ": LCRC"});
  endtask

  task automatic check_dllp(input frame_t f, input logic [31:0] d, input string s);
    logic [15:0] c = ref_crc16(d);
    check(f.dllp && f.by.size() == 6 && {f.by[0], f.by[1], f.by[2], f.by[3]} == d &&
          {f.by[4], f.by[5]} == c, s);
  endtask

  tlp_t A, B, C, D;
  initial begin
    tv = 0; anr = 0; ann = 0; ans = 0; fcv = 0; fcd = 0; rxa = 0; rxn = 0; rxs = 0; ti = '0;
    A = mk(3, 32'h0A00_0001); B = mk(5, 32'h4B00_0010); C = mk(4, 32'h0C00_0100); D = mk(36, 32'h4D00_0000);
    repeat (3) @(negedge clk);
    rst_n = 1;
    put(A); put(B);
    wait_frames(2);
    check_tlp(frames[0], 0, A, "TLP A");
    check_tlp(frames[1], 1, B, "TLP B");
    // Ack/Nak for the receive side, and a flow-control DLLP
    @(negedge clk); anr = 1; ann = 0; ans = 12'h7AB; @(negedge clk); anr = 0;
    wait_frames(3);
    check_dllp(frames[2], 32'h0000_07AB, "Ack DLLP and CRC-16");
    @(negedge clk); fcv = 1; fcd = 32'h4000_4008;
    while (!fcr) @(negedge clk);
    @(posedge clk); #1 fcv = 0;
    wait_frames(4);
    check_dllp(frames[3], 32'h4000_4008, "InitFC1 DLLP");
    // Nak 0: A acknowledged, B sent again
    @(negedge clk); rxn = 1; rxs = 12'd0; @(negedge clk); rxn = 0;
    wait_frames(5);
    check_tlp(frames[4], 1, B, "B replayed after Nak");
    check(reps == 1, "one replay");
    @(negedge clk); rxa = 1; rxs = 12'd1; @(negedge clk); rxa = 0;
    // no Ack for C: the replay timer resends it
    put(C);
    wait_frames(6);
    check_tlp(frames[5], 2, C, "TLP C");
    wait_frames(7);
    check_tlp(frames[6], 2, C, "C replayed on timeout");
    check(reps == 2, "timer replay counted");
    @(negedge clk); rxa = 1; rxs = 12'd2; @(negedge clk); rxa = 0;
    // fill the buffer: 4 TLPs, no Ack
    for (int i = 0; i < 4; i++) put(mk(3 + i, 32'h100 * 32'(i)));
    @(negedge clk); ti = A; tv = 1; #1;
    check(!tr, "full replay buffer refuses a TLP");
    tv = 0;
    wait_frames(11);
    for (int i = 0; i < 4; i++) check_tlp(frames[7 + i], 3 + i, mk(3 + i, 32'h100 * 32'(i)), "burst");
    // Ack/Nak goes ahead: request one while acking 2 of 4
    @(negedge clk); rxa = 1; rxs = 12'd4; anr = 1; ann = 1; ans = 12'h010; @(negedge clk); rxa = 0; anr = 0;
    put(D);
    wait_frames(13);
    check_dllp(frames[11], 32'h1000_0010, "Nak DLLP ahead of the TLP");
    check_tlp(frames[12], 7, D, "largest TLP");
    check(sent == 16'd10 && ans_sent == 16'd2, $sformatf("counters %0d %0d", sent, ans_sent));
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
