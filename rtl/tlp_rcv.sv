// tlp_rcv: receive side of the transaction layer (the "Rcv Tasks").
//
// TLPs accepted by the data link layer wait in a receive queue. The head of
// the queue is sorted by its Fmt/Type: a completion goes to the completion
// check and on to the host, a memory, I/O or configuration request goes to the
// completion generator, a message is counted and its code kept (msgs_o,
// msg_code_o), and anything else (malformed headers) is dropped and counted. Taking a TLP out of the queue frees its receive buffer
// space, which is reported to fc_init (rel_*) so it can return the credits to
// the partner with an UpdateFC DLLP. The queue depth must cover the credits
// advertised, as the partner may send that many TLPs before any is taken. The
// document names the receive procedures; the sorting rules are those of the
// PCI Express TLP header.
//
// Timing: a TLP enters the queue the cycle tlp_valid_i is high (no
// back-pressure); the head is offered on cpl_* or req_* and leaves when that
// side is ready.
module tlp_rcv
  import pcie_pkg::*;
#(
  parameter int RXQ_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tlp_valid_i,
  input  tlp_t       tlp_i,
  output logic       cpl_valid_o,
  input  logic       cpl_ready_i,
  output logic       req_valid_o,
  input  logic       req_ready_i,
  output tlp_t       head_o,
  output logic       rel_valid_o,
  output fc_type_e   rel_type_o,
  output logic [7:0] rel_data_o,
  output logic       overflow_o,
  output logic [15:0] dropped_o,
  output logic [15:0] msgs_o,
  output logic [7:0]  msg_code_o
);
  logic head_v, pop, is_cpl, is_req, is_msg;
  logic [4:0] typ;
  logic [$clog2(RXQ_DEPTH+1)-1:0] cnt;
  logic in_ready;

  sync_fifo #(.T(tlp_t), .DEPTH(RXQ_DEPTH)) u_q (
    .clk, .rst_n,
    .wr_valid_i(tlp_valid_i), .wr_ready_o(in_ready), .wr_data_i(tlp_i),
    .rd_valid_o(head_v), .rd_ready_i(pop), .rd_data_o(head_o), .count_o(cnt));

  assign typ    = head_o.dw[0][28:24];
  assign is_cpl = typ == TYPE_CPL;
  assign is_req = typ inside {TYPE_MEM, TYPE_IO, TYPE_CFG0, TYPE_CFG1};
  assign cpl_valid_o = head_v && is_cpl;
  assign req_valid_o = head_v && is_req;
  assign is_msg = typ[4:3] == TYPE_MSG;
  assign pop = head_v && ((is_cpl && cpl_ready_i) || (is_req && req_ready_i) || (!is_cpl && !is_req));

  assign rel_valid_o = pop;
  assign rel_type_o  = tlp_fc_type(head_o);
  assign rel_data_o  = tlp_data_credits(head_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow_o <= 1'b0; dropped_o <= '0; msgs_o <= '0; msg_code_o <= '0;
    end else begin
      if (tlp_valid_i && !in_ready) overflow_o <= 1'b1;
      if (pop && is_msg) begin
        msgs_o <= msgs_o + 1'b1;
        msg_code_o <= head_o.dw[1][7:0];
      end else if (pop && !is_cpl && !is_req) dropped_o <= dropped_o + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tlp_valid_i |-> in_ready);
endmodule
