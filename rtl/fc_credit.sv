// fc_credit: transmit flow-control gate of the transaction layer.
//
// Counts the header and data credits consumed by the TLPs this port sends, per
// class (posted, non-posted, completion), and compares them with the credit
// limits the partner advertised (InitFC, then UpdateFC). A TLP may go out only
// if, for its class, limit - (consumed + needed) taken modulo 2^8 (headers) or
// 2^12 (data) is at most half the range, as the PCI Express flow-control rules
// state; a limit of zero advertised at initialisation means infinite credit.
// The document names data link flow control; the counter widths and the
// test are the specification's.
//
// Interface: chk_tlp_i is the candidate TLP, ok_o says whether it may be sent
// now (combinational); consume_i charges it. Counters clear while dl_up_i is 0.
module fc_credit
  import pcie_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             dl_up_i,
  input  logic [2:0][7:0]  cl_hdr_i,
  input  logic [2:0][11:0] cl_data_i,
  input  logic [2:0]       infinite_hdr_i,   // advertised 0 at initialisation
  input  logic [2:0]       infinite_data_i,
  input  tlp_t             chk_tlp_i,
  output logic             ok_o,
  input  logic             consume_i,
  output logic             stall_o           // candidate refused for lack of credit
);
  logic [2:0][7:0]  cc_hdr;
  logic [2:0][11:0] cc_data;
  fc_type_e   c;
  logic [7:0] need_d;
  logic [7:0] hdr_gap;
  logic [11:0] data_gap;

  assign c      = tlp_fc_type(chk_tlp_i);
  assign need_d = tlp_data_credits(chk_tlp_i);
  assign hdr_gap  = cl_hdr_i[c] - (cc_hdr[c] + 8'd1);
  assign data_gap = cl_data_i[c] - (cc_data[c] + 12'(need_d));
  assign ok_o = dl_up_i &&
                (infinite_hdr_i[c]  || hdr_gap  <= 8'd128) &&
                (infinite_data_i[c] || need_d == 8'd0 || data_gap <= 12'd2048);
  assign stall_o = dl_up_i && !ok_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cc_hdr <= '0; cc_data <= '0;
    end else if (!dl_up_i) begin
      cc_hdr <= '0; cc_data <= '0;
    end else if (consume_i) begin
      cc_hdr[c]  <= cc_hdr[c] + 8'd1;
      cc_data[c] <= cc_data[c] + 12'(need_d);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) consume_i |-> ok_o);
endmodule
