// evs_top: the Early Verification Suite, a PCI Express root-side model that
// drives and checks an endpoint device over its link.
//
// It stacks a host model on a downstream port. The host model (host_model with
// its host memory model_mem and configuration shadow config_reg) takes test
// commands - configuration, memory and I/O reads and writes - waits for the
// link, issues them and checks every completion. The downstream port
// (pcie_port) holds the transaction, data link and physical layers: it trains
// the link, runs flow-control initialisation (InitFC1/InitFC2), sends TLPs
// with sequence numbers and LCRC, answers the endpoint's Acks, Naks and
// requests to host memory, and keeps the replay buffer. Two monitors
// (evs_monitor) count what crosses the link in each direction.
//
// The endpoint under test is outside: it connects to tx_sym_o / rx_sym_i, one
// symbol (8 bits plus a control flag) per clock in each direction; the
// serialiser and 8b/10b coding between them are not modelled.
//
// Default sizes: 1024-DWORD host memory, 4 tags, a 4-entry replay buffer, an
// 8-entry receive queue, 1024 TS1 sets during training. The document gives
// none of these; they are this design's choices.
module evs_top
  import pcie_pkg::*;
#(
  parameter int MEM_DEPTH      = 1024,
  parameter int NTAGS          = 4,
  parameter int RB_DEPTH       = 4,
  parameter int RXQ_DEPTH      = 8,
  parameter int TS1_MIN        = 1024,
  parameter int REPLAY_TIMEOUT = 2048,
  parameter int CPL_TIMEOUT    = 65535
) (
  input  logic        clk,
  input  logic        rst_n,
  // scenario
  input  logic        cmd_valid_i,
  output logic        cmd_ready_o,
  input  req_t        cmd_i,
  // link to the device under test
  output sym_t        tx_sym_o,
  input  sym_t        rx_sym_i,
  // status
  output logic        link_up_o,
  output logic        dl_up_o,
  output logic [1:0]  dl_state_o,
  output logic        host_idle_o,
  output logic [15:0] issued_o,
  output logic [15:0] cpl_ok_o,
  output logic [15:0] cpl_bad_o,
  output logic [15:0] cpl_timeouts_o,
  output logic [15:0] cfg_checked_o,
  output logic [15:0] cfg_mismatches_o,
  output logic [15:0] fc_stall_cycles_o,
  output logic [15:0] replays_o,
  output logic [15:0] lcrc_errs_o,
  output logic [15:0] ur_sent_o,
  output logic [15:0] msgs_rcvd_o,
  output logic [7:0]  msg_code_o,
  output mon_counts_t mon_tx_o,
  output mon_counts_t mon_rx_o,
  // host memory / configuration shadow read-back
  input  logic [15:0] peek_addr_i,
  output logic [31:0] peek_mem_o,
  output logic [31:0] peek_cfg_o
);
  localparam int MEM_AW = $clog2(MEM_DEPTH);

  logic        p_req_valid, p_req_ready, host_ready, res_valid, res_ok, cpl_to, fc_stall;
  txreq_t      p_req;
  logic [3:0]  res_err;
  req_t        res_req;
  tlp_t        res_tlp;
  logic        t_en, t_we;
  logic [1:0]  t_space;
  logic [15:0] t_addr;
  logic [3:0]  t_be;
  logic [31:0] t_wdata, t_rdata;
  logic        a_en, a_we;
  logic [3:0]  a_be;
  logic [MEM_AW-1:0] a_addr;
  logic [31:0] a_wdata, a_rdata;
  logic        ce_we, cr_we, cfg_mm;
  logic [9:0]  ce_reg, cr_reg;
  logic [3:0]  ce_be;
  logic [31:0] ce_data, cr_data;
  logic        peek_en;

  host_model #(.MEM_AW(MEM_AW), .CFG_RW(10)) u_host (
    .clk, .rst_n, .dl_up_i(dl_up_o),
    .cmd_valid_i, .cmd_ready_o, .cmd_i,
    .req_valid_o(p_req_valid), .req_ready_i(p_req_ready), .req_o(p_req),
    .host_ready_o(host_ready),
    .res_valid_i(res_valid), .res_ok_i(res_ok), .res_err_i(res_err), .res_req_i(res_req), .res_tlp_i(res_tlp),
    .mem_en_o(a_en), .mem_we_o(a_we), .mem_be_o(a_be), .mem_addr_o(a_addr),
    .mem_wdata_o(a_wdata), .mem_rdata_i(a_rdata),
    .cfg_exp_we_o(ce_we), .cfg_exp_reg_o(ce_reg), .cfg_exp_be_o(ce_be), .cfg_exp_data_o(ce_data),
    .cfg_rd_we_o(cr_we), .cfg_rd_reg_o(cr_reg), .cfg_rd_data_o(cr_data),
    .idle_o(host_idle_o), .issued_o, .cpl_ok_o, .cpl_bad_o);

  // port A is shared with the read-back port when the host does not use it
  assign peek_en = !a_en;
  model_mem #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk,
    .a_en_i(a_en || peek_en), .a_we_i(a_we), .a_be_i(a_be),
    .a_addr_i(a_en ? a_addr : MEM_AW'(peek_addr_i)), .a_wdata_i(a_wdata), .a_rdata_o(a_rdata),
    .b_en_i(t_en && t_space == 2'd0), .b_we_i(t_we), .b_be_i(t_be),
    .b_addr_i(MEM_AW'(t_addr)), .b_wdata_i(t_wdata), .b_rdata_o(t_rdata));
  assign peek_mem_o = a_rdata;

  config_reg #(.NREG(1024)) u_cfg (
    .clk, .rst_n,
    .exp_we_i(ce_we), .exp_reg_i(ce_reg), .exp_be_i(ce_be), .exp_data_i(ce_data),
    .rd_we_i(cr_we), .rd_reg_i(cr_reg), .rd_data_i(cr_data),
    .lk_reg_i(peek_addr_i[9:0]), .lk_data_o(peek_cfg_o),
    .mismatch_o(cfg_mm), .checked_o(cfg_checked_o), .mismatches_o(cfg_mismatches_o));

  pcie_port #(
    .PORT_ID(16'h0000), .SUPPORT(3'b001), .NTAGS(NTAGS), .RXQ_DEPTH(RXQ_DEPTH),
    .RB_DEPTH(RB_DEPTH), .TS1_MIN(TS1_MIN), .REPLAY_TIMEOUT(REPLAY_TIMEOUT),
    .CPL_TIMEOUT(CPL_TIMEOUT),
    // a root port advertises infinite completion credits
    .ADV_P_HDR(8'd2), .ADV_P_DATA(12'd16), .ADV_NP_HDR(8'd2), .ADV_NP_DATA(12'd2),
    .ADV_CPL_HDR(8'd0), .ADV_CPL_DATA(12'd0)
  ) u_port (
    .clk, .rst_n,
    .req_valid_i(p_req_valid), .req_ready_o(p_req_ready), .req_i(p_req),
    .host_ready_i(host_ready),
    .res_valid_o(res_valid), .res_ok_o(res_ok), .res_err_o(res_err), .res_req_o(res_req),
    .res_tlp_o(res_tlp), .cpl_timeout_o(cpl_to),
    .tgt_en_o(t_en), .tgt_we_o(t_we), .tgt_space_o(t_space), .tgt_addr_o(t_addr),
    .tgt_be_o(t_be), .tgt_wdata_o(t_wdata), .tgt_rdata_i(t_rdata),
    .tx_sym_o, .rx_sym_i,
    .link_up_o, .dl_up_o, .dl_state_o, .fc_stall_o(fc_stall),
    .tlps_sent_o(), .replays_o, .acknaks_sent_o(), .lcrc_errs_o, .dups_o(), .dllp_errs_o(),
    .init1_sent_o(), .init2_sent_o(), .ur_sent_o,
    .msgs_rcvd_o, .msg_code_o);

  evs_monitor u_mon_tx (.clk, .rst_n, .sym_i(tx_sym_o), .counts_o(mon_tx_o));
  evs_monitor u_mon_rx (.clk, .rst_n, .sym_i(rx_sym_i), .counts_o(mon_rx_o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpl_timeouts_o <= '0; fc_stall_cycles_o <= '0;
    end else begin
      if (cpl_to) cpl_timeouts_o <= cpl_timeouts_o + 1'b1;
      if (fc_stall) fc_stall_cycles_o <= fc_stall_cycles_o + 1'b1;
    end
  end
endmodule
