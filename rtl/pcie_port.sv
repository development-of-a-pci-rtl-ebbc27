// pcie_port: one PCI Express port, transaction + data link + physical layer.
//
// This is the "downstream port model" of the verification suite: requests
// from the host are turned into TLPs (tlp_send), get a tag and a completion
// record (cpl_tracker), pass the flow-control gate (fc_credit) and go through
// the data link layer (dll_tx: sequence number, LCRC, replay buffer) and the
// physical layer (phy_layer: training, framing) onto the symbol stream.
// Received symbols are deframed, checked and acknowledged (dll_rx), queued
// (tlp_rcv) and either matched against their request (completions, handed to
// the host on res_*) or served by the completion generator (cpl_gen) against
// the target port (requests from the partner). Flow-control initialisation
// and credit return are done by fc_init.
//
// The same port also serves, with other parameters, as the link partner in the
// testbenches. The arrangement of layers follows the document; which
// sub-blocks exist and how they hand over to each other is this design's.
//
// Interface: req_* takes one txreq_t per handshake. res_valid_o is a one-cycle
// pulse per completion received, with the check result, the request it answers
// and the completion TLP (data in dw[3..]); the host must keep host_ready_i
// high only while it can take two more results. tgt_* is the memory port for
// requests from the partner (one-cycle read latency). tx_sym_o / rx_sym_i carry
// one symbol per clock.
module pcie_port
  import pcie_pkg::*;
#(
  parameter logic [15:0] PORT_ID        = 16'h0000,
  parameter logic [2:0]  SUPPORT        = 3'b001,
  parameter int          NTAGS          = 4,
  parameter int          RXQ_DEPTH      = 8,
  parameter int          RB_DEPTH       = 4,
  parameter int          TS1_MIN        = 1024,
  parameter int          REPLAY_TIMEOUT = 2048,
  parameter int          CPL_TIMEOUT    = 65535,
  parameter logic [7:0]  ADV_P_HDR      = 8'd2,
  parameter logic [11:0] ADV_P_DATA     = 12'd16,
  parameter logic [7:0]  ADV_NP_HDR     = 8'd2,
  parameter logic [11:0] ADV_NP_DATA    = 12'd2,
  parameter logic [7:0]  ADV_CPL_HDR    = 8'd0,
  parameter logic [11:0] ADV_CPL_DATA   = 12'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  // host request side
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  txreq_t      req_i,
  input  logic        host_ready_i,
  output logic        res_valid_o,
  output logic        res_ok_o,
  output logic [3:0]  res_err_o,
  output req_t        res_req_o,
  output tlp_t        res_tlp_o,
  output logic        cpl_timeout_o,
  // target for requests from the partner
  output logic        tgt_en_o,
  output logic        tgt_we_o,
  output logic [1:0]  tgt_space_o,
  output logic [15:0] tgt_addr_o,
  output logic [3:0]  tgt_be_o,
  output logic [31:0] tgt_wdata_o,
  input  logic [31:0] tgt_rdata_i,
  // link
  output sym_t        tx_sym_o,
  input  sym_t        rx_sym_i,
  // status and event counters
  output logic        link_up_o,
  output logic        dl_up_o,
  output logic [1:0]  dl_state_o,
  output logic        fc_stall_o,
  output logic [15:0] tlps_sent_o,
  output logic [15:0] replays_o,
  output logic [15:0] acknaks_sent_o,
  output logic [15:0] lcrc_errs_o,
  output logic [15:0] dups_o,
  output logic [15:0] dllp_errs_o,
  output logic [15:0] init1_sent_o,
  output logic [15:0] init2_sent_o,
  output logic [15:0] ur_sent_o,
  output logic [15:0] msgs_rcvd_o,     // messages received
  output logic [7:0]  msg_code_o       // code of the last message received
);
  // transaction layer
  logic             tag_avail, alloc;
  logic [TAG_W-1:0] tag;
  req_t             alloc_req;
  logic             s_valid, s_ready, g_valid, g_ready;
  tlp_t             s_tlp, g_tlp, cand;
  logic             cand_valid, fc_ok, dl_ready, send;
  logic             rq_cpl_valid, rq_req_valid, cpl_take;
  tlp_t             rq_head;
  logic             rel_valid;
  fc_type_e         rel_type;
  logic [7:0]       rel_data;
  logic             ur, g_ready_in;
  // data link
  logic             rx_tlp_valid;
  tlp_t             rx_tlp;
  logic             an_req, an_nak, rx_ack, rx_nak, rx_dllp_valid;
  logic [11:0]      an_seq, rx_seq;
  dllp_t            rx_dllp, fc_dllp;
  logic             fc_valid, fc_ready;
  logic [2:0][7:0]  cl_hdr;
  logic [2:0][11:0] cl_data;
  logic [2:0]       inf_hdr, inf_data;
  // physical
  logic             tx_bv, tx_br, rx_bv, ferr;
  lbyte_t           tx_b, rx_b;
  logic [1:0]       ltssm;
  logic [15:0]      tlp_frames, dllp_frames, dropped;
  logic             overflow;

  tlp_send #(.REQUESTER_ID(PORT_ID)) u_send (
    .clk, .rst_n,
    .req_valid_i, .req_ready_o, .req_i,
    .tag_avail_i(tag_avail), .tag_i(tag), .alloc_o(alloc), .alloc_req_o(alloc_req),
    .tlp_valid_o(s_valid), .tlp_ready_i(s_ready), .tlp_o(s_tlp));

  cpl_tracker #(.NTAGS(NTAGS), .TIMEOUT(CPL_TIMEOUT), .REQUESTER_ID(PORT_ID)) u_trk (
    .clk, .rst_n,
    .tag_avail_o(tag_avail), .tag_o(tag), .alloc_i(alloc), .alloc_req_i(alloc_req),
    .cpl_valid_i(cpl_take), .cpl_i(rq_head),
    .res_valid_o, .res_ok_o, .res_err_o, .res_req_o,
    .timeout_o(cpl_timeout_o), .outstanding_o());

  always_ff @(posedge clk) if (cpl_take) res_tlp_o <= rq_head;

  tlp_rcv #(.RXQ_DEPTH(RXQ_DEPTH)) u_rcv (
    .clk, .rst_n,
    .tlp_valid_i(rx_tlp_valid), .tlp_i(rx_tlp),
    .cpl_valid_o(rq_cpl_valid), .cpl_ready_i(host_ready_i),
    .req_valid_o(rq_req_valid), .req_ready_i(g_ready_in),
    .head_o(rq_head),
    .rel_valid_o(rel_valid), .rel_type_o(rel_type), .rel_data_o(rel_data),
    .overflow_o(overflow), .dropped_o(dropped), .msgs_o(msgs_rcvd_o), .msg_code_o(msg_code_o));
  assign cpl_take = rq_cpl_valid && host_ready_i;


  cpl_gen #(.COMPLETER_ID(PORT_ID), .SUPPORT(SUPPORT)) u_gen (
    .clk, .rst_n,
    .req_valid_i(rq_req_valid), .req_ready_o(g_ready_in), .req_i(rq_head),
    .tgt_en_o, .tgt_we_o, .tgt_space_o, .tgt_addr_o, .tgt_be_o, .tgt_wdata_o, .tgt_rdata_i,
    .cpl_valid_o(g_valid), .cpl_ready_i(g_ready), .cpl_o(g_tlp), .ur_o(ur));

  // completions go ahead of new requests
  assign cand_valid = g_valid || s_valid;
  assign cand       = g_valid ? g_tlp : s_tlp;
  assign send       = cand_valid && fc_ok && dl_ready;
  assign g_ready    = send && g_valid;
  assign s_ready    = send && !g_valid;

  fc_credit u_fc (
    .clk, .rst_n, .dl_up_i(dl_up_o),
    .cl_hdr_i(cl_hdr), .cl_data_i(cl_data), .infinite_hdr_i(inf_hdr), .infinite_data_i(inf_data),
    .chk_tlp_i(cand), .ok_o(fc_ok), .consume_i(send), .stall_o());
  assign fc_stall_o = cand_valid && dl_up_o && !fc_ok;

  fc_init #(
    .ADV_P_HDR(ADV_P_HDR), .ADV_P_DATA(ADV_P_DATA), .ADV_NP_HDR(ADV_NP_HDR),
    .ADV_NP_DATA(ADV_NP_DATA), .ADV_CPL_HDR(ADV_CPL_HDR), .ADV_CPL_DATA(ADV_CPL_DATA)
  ) u_fci (
    .clk, .rst_n, .link_up_i(link_up_o),
    .rx_dllp_valid_i(rx_dllp_valid), .rx_dllp_i(rx_dllp), .rx_tlp_i(rx_tlp_valid),
    .dllp_valid_o(fc_valid), .dllp_ready_i(fc_ready), .dllp_o(fc_dllp),
    .rel_valid_i(rel_valid), .rel_type_i(rel_type), .rel_data_i(rel_data),
    .dl_up_o, .dl_state_o, .cl_hdr_o(cl_hdr), .cl_data_o(cl_data),
    .inf_hdr_o(inf_hdr), .inf_data_o(inf_data),
    .init1_sent_o, .init2_sent_o);

  dll_tx #(.RB_DEPTH(RB_DEPTH), .REPLAY_TIMEOUT(REPLAY_TIMEOUT)) u_dtx (
    .clk, .rst_n, .link_up_i(link_up_o), .dl_up_i(dl_up_o),
    .tlp_valid_i(send), .tlp_ready_o(dl_ready), .tlp_i(cand),
    .acknak_req_i(an_req), .acknak_nak_i(an_nak), .acknak_seq_i(an_seq),
    .fc_valid_i(fc_valid), .fc_ready_o(fc_ready), .fc_dllp_i(fc_dllp),
    .rx_ack_i(rx_ack), .rx_nak_i(rx_nak), .rx_seq_i(rx_seq),
    .byte_valid_o(tx_bv), .byte_ready_i(tx_br), .byte_o(tx_b),
    .tlps_sent_o, .replays_o, .acknaks_sent_o);

  dll_rx u_drx (
    .clk, .rst_n, .link_up_i(link_up_o),
    .byte_valid_i(rx_bv), .byte_i(rx_b), .frame_err_i(ferr),
    .tlp_valid_o(rx_tlp_valid), .tlp_o(rx_tlp),
    .acknak_req_o(an_req), .acknak_nak_o(an_nak), .acknak_seq_o(an_seq),
    .rx_ack_o(rx_ack), .rx_nak_o(rx_nak), .rx_seq_o(rx_seq),
    .dllp_valid_o(rx_dllp_valid), .dllp_o(rx_dllp),
    .lcrc_errs_o, .dups_o, .dllp_errs_o);

  phy_layer #(.TS1_MIN(TS1_MIN)) u_phy (
    .clk, .rst_n,
    .tx_valid_i(tx_bv), .tx_ready_o(tx_br), .tx_byte_i(tx_b),
    .rx_valid_o(rx_bv), .rx_byte_o(rx_b), .frame_err_o(ferr), .link_up_o,
    .tx_sym_o, .rx_sym_i, .ltssm_o(ltssm), .tlp_frames_o(tlp_frames), .dllp_frames_o(dllp_frames));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ur_sent_o <= '0;
    else if (ur) ur_sent_o <= ur_sent_o + 1'b1;
  end
endmodule
