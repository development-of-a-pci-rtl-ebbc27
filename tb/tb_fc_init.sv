// tb_fc_init: two flow-control initialisation blocks exchange DLLPs over a
// model channel that takes 8 cycles per DLLP. Checks the InitFC1 / InitFC2
// sequence (P, NP, Cpl in turn, InitFC1 before InitFC2), that both sides reach
// DL_Active, that each records the other's advertised credits (and infinite
// completion credit), and that freed receive buffers return credits with
// UpdateFC DLLPs that raise the partner's limits. Finally the link is brought
// up again with the partner's InitFC2 DLLPs lost, to check that a side stays in
// FC_INIT2 until it has proof (here an UpdateFC) that the partner is done.
module tb_fc_init;
  import pcie_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic link;
  logic av, ar, bv, br, a_rx_v, b_rx_v, a_up, b_up, a_rel, b_rel;
  dllp_t ad, bd, a_rx, b_rx;
  fc_type_e a_rt, b_rt;
  logic [7:0] a_rdat, b_rdat;
  logic [1:0] ast, bst;
  logic [2:0][7:0] a_clh, b_clh;
  logic [2:0][11:0] a_cld, b_cld;
  logic [2:0] a_ih, a_id, b_ih, b_id;
  logic [15:0] a_i1, a_i2, b_i1, b_i2;
  int checks = 0, failures = 0;
  int a_busy = 0, b_busy = 0;
  dllp_t a_fly, b_fly;
  logic [7:0] a_seq [$];
  logic drop_init2 = 1'b0;   // channel B -> A loses every InitFC2

  fc_init #(.ADV_P_HDR(8'd2), .ADV_P_DATA(12'd16), .ADV_NP_HDR(8'd2), .ADV_NP_DATA(12'd2),
            .ADV_CPL_HDR(8'd0), .ADV_CPL_DATA(12'd0)) ua (
    .clk, .rst_n, .link_up_i(link), .rx_dllp_valid_i(a_rx_v), .rx_dllp_i(a_rx), .rx_tlp_i(1'b0),
    .dllp_valid_o(av), .dllp_ready_i(ar), .dllp_o(ad),
    .rel_valid_i(a_rel), .rel_type_i(a_rt), .rel_data_i(a_rdat),
    .dl_up_o(a_up), .dl_state_o(ast), .cl_hdr_o(a_clh), .cl_data_o(a_cld), .inf_hdr_o(a_ih), .inf_data_o(a_id),
    .init1_sent_o(a_i1), .init2_sent_o(a_i2));
  fc_init #(.ADV_P_HDR(8'd1), .ADV_P_DATA(12'd8), .ADV_NP_HDR(8'd3), .ADV_NP_DATA(12'd3),
            .ADV_CPL_HDR(8'd4), .ADV_CPL_DATA(12'd32)) ub (
    .clk, .rst_n, .link_up_i(link), .rx_dllp_valid_i(b_rx_v), .rx_dllp_i(b_rx), .rx_tlp_i(1'b0),
    .dllp_valid_o(bv), .dllp_ready_i(br), .dllp_o(bd),
    .rel_valid_i(b_rel), .rel_type_i(b_rt), .rel_data_i(b_rdat),
    .dl_up_o(b_up), .dl_state_o(bst), .cl_hdr_o(b_clh), .cl_data_o(b_cld), .inf_hdr_o(b_ih), .inf_data_o(b_id),
    .init1_sent_o(b_i1), .init2_sent_o(b_i2));

  // channel model: a DLLP occupies the wire for 8 cycles, then arrives
  assign ar = link && a_busy == 0;
  assign br = link && b_busy == 0;
  always_ff @(posedge clk) begin
    b_rx_v <= 1'b0; a_rx_v <= 1'b0;
    if (av && ar) begin a_busy <= 8; a_fly <= ad; a_seq.push_back(ad[31:24]); end
    else if (a_busy > 0) begin
      a_busy <= a_busy - 1;
      if (a_busy == 1) begin b_rx_v <= 1'b1; b_rx <= a_fly; end
    end
    if (bv && br) begin b_busy <= 8; b_fly <= bd; end
    else if (b_busy > 0) begin
      b_busy <= b_busy - 1;
      if (b_busy == 1 && !(drop_init2 && b_fly[31:30] == 2'b11)) begin a_rx_v <= 1'b1; a_rx <= b_fly; end
    end
  end

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  int n;
  initial begin
    link = 0; a_rel = 0; b_rel = 0; a_rt = FC_P; b_rt = FC_P; a_rdat = 0; b_rdat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!a_up && !b_up && av == 0, "inactive while the link is down");
    link = 1;
    n = 0;
    while (!(a_up && b_up) && n < 2000) begin @(negedge clk); n++; end
    check(a_up && b_up, "both sides DL_Active");
    check(a_seq[0] == DLLP_INIT1_P && a_seq[1] == DLLP_INIT1_N && a_seq[2] == DLLP_INIT1_C, "InitFC1 P, NP, Cpl");
    begin
      int first2 = -1, last1 = -1;
      foreach (a_seq[i]) begin
        if (a_seq[i][7:6] == 2'b11 && first2 < 0) first2 = i;
        if (a_seq[i][7:6] == 2'b01) last1 = i;
      end
      check(first2 > last1 && first2 >= 3, "all InitFC1 before InitFC2");
    end
    check(a_i1 >= 3 && a_i2 >= 3 && b_i1 >= 3 && b_i2 >= 3, "at least one full set of each");
    check(a_clh == {8'd4, 8'd3, 8'd1} && a_cld == {12'd32, 12'd3, 12'd8}, "A recorded B's credits");
    check(b_clh == {8'd0, 8'd2, 8'd2} && b_cld == {12'd0, 12'd2, 12'd16}, "B recorded A's credits");
    check(b_ih == 3'b100 && b_id == 3'b100 && a_ih == 3'b000, "infinite completion credit of A");
    // B frees a posted buffer with 4 data credits and a non-posted one
    @(negedge clk); b_rel = 1; b_rt = FC_P; b_rdat = 8'd4;
    @(negedge clk); b_rt = FC_NP; b_rdat = 8'd1;
    @(negedge clk); b_rel = 0;
    repeat (60) @(negedge clk);
    check(a_clh[0] == 8'd2 && a_cld[0] == 12'd12, "A's posted limit raised by UpdateFC");
    check(a_clh[1] == 8'd4 && a_cld[1] == 12'd4, "A's non-posted limit raised by UpdateFC");
    // A frees a completion buffer: infinite, so no UpdateFC
    n = a_seq.size();
    @(negedge clk); a_rel = 1; a_rt = FC_CPL; a_rdat = 8'd1;
    @(negedge clk); a_rel = 0;
    repeat (30) @(negedge clk);
    check(a_seq.size() == n, "no UpdateFC for infinite credit");
    link = 0; @(negedge clk); @(negedge clk);
    check(!a_up && !b_up, "link down returns to DL_Inactive");
    // again, with B's InitFC2 lost: A must wait in FC_INIT2 until some other
    // DLLP from B (here an UpdateFC) tells it B has finished (FI2)
    drop_init2 = 1; link = 1;
    repeat (600) @(negedge clk);
    check(b_up && !a_up && ast == 2'd2, "A waits in FC_INIT2 without FI2");
    @(negedge clk); b_rel = 1; b_rt = FC_NP; b_rdat = 8'd0;
    @(negedge clk); b_rel = 0;
    repeat (60) @(negedge clk);
    check(a_up, "UpdateFC from B completes A's initialisation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
