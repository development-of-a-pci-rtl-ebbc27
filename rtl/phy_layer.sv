// phy_layer: physical layer of the port, single lane, at symbol level.
//
// Link training: after reset the port sends TS1 ordered sets (COM followed by
// fifteen TS1 identifier symbols). When it has sent TS1_MIN of them and has
// received eight TS1 or TS2 sets from the partner in a row, it sends TS2 sets;
// when it has received eight TS2 sets in a row and sent sixteen TS2 sets since
// the first TS2 arrived, the link is up (L0) and link_up_o rises. This is a
// reduced form of the Polling states of the PCI Express link training: lane and
// link numbers, the Configuration states, 8b/10b coding, scrambling and the
// serialiser are left out. The document says only that the physical layer
// establishes and trains the link and adds the framing of Fig. 2.
//
// In L0 the transmitter frames each packet from the data link layer: STP
// before a TLP, SDP before a DLLP, END after it, and the idle data symbol 00
// between packets. The receiver strips the framing and hands the bytes back
// with sop/eop marks, one cycle late (it must see END to mark the last byte);
// an EDB symbol, a control symbol inside a packet or a packet of the wrong kind
// raises frame_err_o.
//
// Timing: one symbol per clock in each direction. byte_ready_o is low while
// the start and end symbols go out.
module phy_layer
  import pcie_pkg::*;
#(
  parameter int TS1_MIN = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // data link side
  input  logic        tx_valid_i,
  output logic        tx_ready_o,
  input  lbyte_t      tx_byte_i,
  output logic        rx_valid_o,
  output lbyte_t      rx_byte_o,
  output logic        frame_err_o,
  output logic        link_up_o,
  // symbol stream
  output sym_t        tx_sym_o,
  input  sym_t        rx_sym_i,
  output logic [1:0]  ltssm_o,       // 0 Polling.Active, 1 Polling.Configuration, 2 L0
  output logic [15:0] tlp_frames_o,
  output logic [15:0] dllp_frames_o
);
  typedef enum logic [1:0] {LT_POLL_ACT, LT_POLL_CFG, LT_L0} lt_e;
  typedef enum logic [1:0] {TX_IDLE, TX_DATA, TX_END} tx_e;
  lt_e         lt;
  tx_e         ts;
  logic [3:0]  os_idx;          // symbol within the ordered set being sent
  logic [15:0] ts1_sent, ts2_sent_after;
  logic [3:0]  rx_any_cnt, rx_ts2_cnt;
  logic        seen_ts2;
  // receiver
  logic        in_os;
  logic [3:0]  os_rx_idx;
  logic        os_all1, os_all2;
  logic        got_ts1, got_ts2, os_bad;
  logic        in_pkt, pkt_dllp, held_v, held_sop;
  logic [7:0]  held;

  assign ltssm_o   = lt;
  assign link_up_o = (lt == LT_L0);
  assign tx_ready_o = (lt == LT_L0) && (ts == TX_DATA);

  // ---------------------------------------------------------------- transmit
  always_comb begin
    tx_sym_o = '{k: 1'b0, d: 8'h00};
    if (lt != LT_L0) begin
      if (os_idx == 4'd0) tx_sym_o = '{k: 1'b1, d: K_COM};
      else tx_sym_o = '{k: 1'b0, d: (lt == LT_POLL_ACT) ? TS1_ID : TS2_ID};
    end else begin
      unique case (ts)
        TX_IDLE: if (tx_valid_i && tx_byte_i.sop)
                   tx_sym_o = '{k: 1'b1, d: tx_byte_i.dllp ? K_SDP : K_STP};
        TX_DATA: tx_sym_o = '{k: 1'b0, d: tx_byte_i.d};
        TX_END:  tx_sym_o = '{k: 1'b1, d: K_END};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lt <= LT_POLL_ACT; ts <= TX_IDLE; os_idx <= '0;
      ts1_sent <= '0; ts2_sent_after <= '0; rx_any_cnt <= '0; rx_ts2_cnt <= '0; seen_ts2 <= 1'b0;
      tlp_frames_o <= '0; dllp_frames_o <= '0;
    end else begin
      // receive-side set counters (consecutive)
      if (got_ts1 || got_ts2) begin
        if (rx_any_cnt != 4'hF) rx_any_cnt <= rx_any_cnt + 1'b1;
      end else if (os_bad) rx_any_cnt <= '0;
      if (got_ts2) begin
        if (rx_ts2_cnt != 4'hF) rx_ts2_cnt <= rx_ts2_cnt + 1'b1;
      end else if (got_ts1 || os_bad) rx_ts2_cnt <= '0;
      if (got_ts2 && lt == LT_POLL_CFG) seen_ts2 <= 1'b1;

      if (lt != LT_L0) begin
        os_idx <= os_idx + 1'b1;                    // wraps after 16 symbols
        if (os_idx == 4'hF) begin
          if (lt == LT_POLL_ACT) begin
            if (ts1_sent != 16'hFFFF) ts1_sent <= ts1_sent + 1'b1;
            if (ts1_sent + 1 >= TS1_MIN && rx_any_cnt >= 4'd8) lt <= LT_POLL_CFG;
          end else begin
            if (seen_ts2 && ts2_sent_after != 16'hFFFF) ts2_sent_after <= ts2_sent_after + 1'b1;
            if (rx_ts2_cnt >= 4'd8 && ts2_sent_after + 1 >= 16) lt <= LT_L0;
          end
        end
      end else begin
        unique case (ts)
          TX_IDLE: if (tx_valid_i && tx_byte_i.sop) begin
            ts <= TX_DATA;
            if (tx_byte_i.dllp) dllp_frames_o <= dllp_frames_o + 1'b1;
            else                tlp_frames_o  <= tlp_frames_o + 1'b1;
          end
          TX_DATA: if (tx_valid_i && tx_byte_i.eop) ts <= TX_END;
          TX_END:  ts <= TX_IDLE;
          default: ts <= TX_IDLE;
        endcase
      end
    end
  end

  // ---------------------------------------------------------------- receive
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_os <= 1'b0; os_rx_idx <= '0; os_all1 <= 1'b0; os_all2 <= 1'b0;
      got_ts1 <= 1'b0; got_ts2 <= 1'b0; os_bad <= 1'b0;
      in_pkt <= 1'b0; pkt_dllp <= 1'b0; held_v <= 1'b0; held_sop <= 1'b0; held <= '0;
      rx_valid_o <= 1'b0; rx_byte_o <= '0; frame_err_o <= 1'b0;
    end else begin
      got_ts1 <= 1'b0; got_ts2 <= 1'b0; os_bad <= 1'b0;
      rx_valid_o <= 1'b0; frame_err_o <= 1'b0;
      // ordered sets
      if (rx_sym_i.k && rx_sym_i.d == K_COM && !in_pkt) begin
        if (in_os) os_bad <= 1'b1;
        in_os <= 1'b1; os_rx_idx <= 4'd1; os_all1 <= 1'b1; os_all2 <= 1'b1;
      end else if (in_os) begin
        if (rx_sym_i.k) begin
          in_os <= 1'b0; os_bad <= 1'b1;
        end else begin
          os_all1 <= os_all1 && rx_sym_i.d == TS1_ID;
          os_all2 <= os_all2 && rx_sym_i.d == TS2_ID;
          os_rx_idx <= os_rx_idx + 1'b1;
          if (os_rx_idx == 4'hF) begin
            in_os <= 1'b0;
            got_ts1 <= os_all1 && rx_sym_i.d == TS1_ID;
            got_ts2 <= os_all2 && rx_sym_i.d == TS2_ID;
            os_bad  <= !(os_all1 && rx_sym_i.d == TS1_ID) && !(os_all2 && rx_sym_i.d == TS2_ID);
          end
        end
      end
      // packets, only in L0
      if (lt == LT_L0 && !in_os) begin
        if (rx_sym_i.k) begin
          if (rx_sym_i.d == K_STP || rx_sym_i.d == K_SDP) begin
            if (in_pkt) frame_err_o <= 1'b1;
            in_pkt <= 1'b1; pkt_dllp <= (rx_sym_i.d == K_SDP);
            held_v <= 1'b0; held_sop <= 1'b1;
          end else if (rx_sym_i.d == K_END && in_pkt) begin
            in_pkt <= 1'b0;
            if (held_v) begin
              rx_valid_o <= 1'b1;
              rx_byte_o <= '{sop: held_sop, eop: 1'b1, dllp: pkt_dllp, d: held};
            end
            held_v <= 1'b0;
          end else if (in_pkt) begin              // EDB or stray control symbol
            in_pkt <= 1'b0; held_v <= 1'b0; frame_err_o <= 1'b1;
            if (held_v) begin
              rx_valid_o <= 1'b1;
              rx_byte_o <= '{sop: held_sop, eop: 1'b1, dllp: pkt_dllp, d: held};
            end
          end
        end else if (in_pkt) begin
          if (held_v) begin
            rx_valid_o <= 1'b1;
            rx_byte_o <= '{sop: held_sop, eop: 1'b0, dllp: pkt_dllp, d: held};
            held_sop <= 1'b0;
          end
          held <= rx_sym_i.d;
          held_v <= 1'b1;
        end
      end
    end
  end
endmodule
