// fc_init: data link flow-control initialisation and credit bookkeeping
// ("FCINIT").
//
// When the physical layer reports the link up, the data link layer leaves
// DL_Inactive for FC_INIT1: it sends InitFC1 DLLPs for posted, non-posted and
// completion credits in turn, and records the credits the partner advertises
// in its InitFC1 or InitFC2 DLLPs. Once all three are recorded and a full set
// has gone out, it moves to FC_INIT2 and sends InitFC2 DLLPs until it has
// seen an InitFC2, an UpdateFC or a TLP from the partner (and a full set has
// again gone out); then the link is DL_Active (dl_up_o). This is the
// FCINIT1 ... FCINIT2 exchange of the document; the state names, DLLP codes
// and fields follow the PCI Express specification.
//
// In DL_Active it keeps the partner's credit limits up to date from received
// UpdateFC DLLPs and, when the local receiver frees buffer space (rel_*), it
// advances its own allocated-credit counters and sends UpdateFC DLLPs for the
// classes that changed. An advertised value of 0 means infinite credit, which
// is never updated.
//
// Timing: one DLLP request at a time on dllp_*; rx_dllp_i is a one-cycle pulse
// of a DLLP whose CRC checked good.
module fc_init
  import pcie_pkg::*;
#(
  parameter logic [7:0]  ADV_P_HDR    = 8'd2,
  parameter logic [11:0] ADV_P_DATA   = 12'd16,
  parameter logic [7:0]  ADV_NP_HDR   = 8'd2,
  parameter logic [11:0] ADV_NP_DATA  = 12'd2,
  parameter logic [7:0]  ADV_CPL_HDR  = 8'd0,
  parameter logic [11:0] ADV_CPL_DATA = 12'd0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_up_i,
  input  logic        rx_dllp_valid_i,
  input  dllp_t       rx_dllp_i,
  input  logic        rx_tlp_i,
  output logic        dllp_valid_o,
  input  logic        dllp_ready_i,
  output dllp_t       dllp_o,
  input  logic        rel_valid_i,
  input  fc_type_e    rel_type_i,
  input  logic [7:0]  rel_data_i,
  output logic        dl_up_o,
  output logic [1:0]  dl_state_o,      // 0 inactive, 1 FC_INIT1, 2 FC_INIT2, 3 active
  output logic [2:0][7:0]  cl_hdr_o,   // partner's limits, index fc_type_e
  output logic [2:0][11:0] cl_data_o,
  output logic [2:0]  inf_hdr_o,       // partner advertised infinite credit
  output logic [2:0]  inf_data_o,
  output logic [15:0] init1_sent_o,
  output logic [15:0] init2_sent_o
);
  typedef enum logic [1:0] {DL_INACTIVE, DL_INIT1, DL_INIT2, DL_ACTIVE} dl_state_e;
  dl_state_e st;
  logic [1:0]  sidx;          // class being sent
  logic        set_done;      // a full P/NP/Cpl set went out in this state
  logic [2:0]  got;
  logic        fi2;
  logic [2:0][7:0]  ca_hdr, adv_hdr;
  logic [2:0][11:0] ca_data, adv_data;
  logic [2:0]  upd_pend;
  logic [7:0]  rtyp;
  logic        rx_init1, rx_init2, rx_upd;

  assign adv_hdr  = {ADV_CPL_HDR, ADV_NP_HDR, ADV_P_HDR};
  assign adv_data = {ADV_CPL_DATA, ADV_NP_DATA, ADV_P_DATA};
  assign rtyp     = rx_dllp_i[31:24];
  assign rx_init1 = rx_dllp_valid_i && rtyp[7:6] == 2'b01 && rtyp[3:0] == 4'h0 && rtyp[5:4] != 2'b11;
  assign rx_init2 = rx_dllp_valid_i && rtyp[7:6] == 2'b11 && rtyp[3:0] == 4'h0 && rtyp[5:4] != 2'b11;
  assign rx_upd   = rx_dllp_valid_i && rtyp[7:6] == 2'b10 && rtyp[3:0] == 4'h0 && rtyp[5:4] != 2'b11;
  assign dl_up_o  = (st == DL_ACTIVE);
  assign dl_state_o = st;

  // class index of a received FC DLLP: bits [5:4] are 00 P, 01 NP, 10 Cpl
  function automatic logic [1:0] cls(logic [7:0] t);
    return t[5:4];
  endfunction

  always_comb begin
    dllp_valid_o = 1'b0;
    dllp_o = '0;
    unique case (st)
      DL_INIT1: begin
        dllp_valid_o = 1'b1;
        dllp_o = make_fc(8'h40 | {2'b00, sidx, 4'h0}, adv_hdr[sidx], adv_data[sidx]);
      end
      DL_INIT2: begin
        dllp_valid_o = 1'b1;
        dllp_o = make_fc(8'hC0 | {2'b00, sidx, 4'h0}, adv_hdr[sidx], adv_data[sidx]);
      end
      DL_ACTIVE: begin
        for (int i = 2; i >= 0; i--)
          if (upd_pend[i]) begin
            dllp_valid_o = 1'b1;
            dllp_o = make_fc(8'h80 | {2'b00, 2'(i), 4'h0}, ca_hdr[i], ca_data[i]);
          end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= DL_INACTIVE; sidx <= '0; set_done <= 1'b0; got <= '0; fi2 <= 1'b0;
      cl_hdr_o <= '0; cl_data_o <= '0; upd_pend <= '0; inf_hdr_o <= '0; inf_data_o <= '0;
      ca_hdr <= '0; ca_data <= '0;
      init1_sent_o <= '0; init2_sent_o <= '0;
    end else if (!link_up_i) begin
      st <= DL_INACTIVE; sidx <= '0; set_done <= 1'b0; got <= '0; fi2 <= 1'b0; upd_pend <= '0;
    end else begin
      // record advertised credits from InitFC1 / InitFC2
      if ((rx_init1 || rx_init2) && st != DL_ACTIVE && !got[cls(rtyp)]) begin
        got[cls(rtyp)] <= 1'b1;
        cl_hdr_o[cls(rtyp)]  <= rx_dllp_i[21:14];
        cl_data_o[cls(rtyp)] <= rx_dllp_i[11:0];
        inf_hdr_o[cls(rtyp)]  <= rx_dllp_i[21:14] == 8'd0;
        inf_data_o[cls(rtyp)] <= rx_dllp_i[11:0] == 12'd0;
      end
      if (rx_init2 || rx_upd || rx_tlp_i) fi2 <= 1'b1;
      // sending the InitFC sets
      if ((st == DL_INIT1 || st == DL_INIT2) && dllp_ready_i) begin
        if (st == DL_INIT1) init1_sent_o <= init1_sent_o + 1'b1;
        else                init2_sent_o <= init2_sent_o + 1'b1;
        if (sidx == 2'd2) begin
          sidx <= 2'd0;
          set_done <= 1'b1;
        end else sidx <= sidx + 1'b1;
      end
      unique case (st)
        DL_INACTIVE: begin
          st <= DL_INIT1;
          ca_hdr <= adv_hdr;
          ca_data <= adv_data;
        end
        DL_INIT1: if (got == 3'b111 && set_done && sidx == 2'd0) begin
          st <= DL_INIT2;
          set_done <= 1'b0;
        end
        DL_INIT2: if (fi2 && set_done && sidx == 2'd0) st <= DL_ACTIVE;
        DL_ACTIVE: begin
          if (rx_upd) begin
            if (!inf_hdr_o[cls(rtyp)])  cl_hdr_o[cls(rtyp)]  <= rx_dllp_i[21:14];
            if (!inf_data_o[cls(rtyp)]) cl_data_o[cls(rtyp)] <= rx_dllp_i[11:0];
          end
          for (int i = 0; i < 3; i++)
            if (dllp_ready_i && dllp_valid_o && dllp_o[29:28] == 2'(i)) upd_pend[i] <= 1'b0;
          if (rel_valid_i && adv_hdr[rel_type_i] != 8'd0) begin
            ca_hdr[rel_type_i]  <= ca_hdr[rel_type_i] + 1'b1;
            ca_data[rel_type_i] <= ca_data[rel_type_i] + 12'(rel_data_i);
            upd_pend[rel_type_i] <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
