// dll_tx: transmit side of the data link layer.
//
// A TLP from the transaction layer gets the next 12-bit sequence number and
// is stored in the replay buffer; the framer then sends it to the physical
// layer as a byte stream: two sequence-number bytes, the TLP DWORDs most
// significant byte first, and the four LCRC bytes (computed on the fly by
// lcrc32, least significant byte first). An Ack DLLP from the partner frees
// every stored TLP up to the acknowledged sequence number; a Nak frees those
// and sends the rest again, as does the replay timer when no Ack has arrived
// for REPLAY_TIMEOUT cycles. DLLPs (Ack/Nak for the receive side, and the
// flow-control DLLPs of fc_init) are framed as four body bytes and the 16-bit
// DLLP CRC. This is the document's data link layer (sequence number, LCRC,
// DLLP Ack/Nak, DLLP tasks); the replay mechanism and formats are those of the
// PCI Express specification, the buffer depth and timer are this design's.
//
// Priority when a frame ends: Ack/Nak, then flow-control DLLP, then TLPs
// (replayed ones first). TLPs are accepted only while dl_up_i; DLLPs whenever
// link_up_i. Byte stream: one lbyte_t per cycle when byte_valid_o and
// byte_ready_i.
module dll_tx
  import pcie_pkg::*;
#(
  parameter int RB_DEPTH       = 4,
  parameter int REPLAY_TIMEOUT = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_up_i,
  input  logic        dl_up_i,
  input  logic        tlp_valid_i,
  output logic        tlp_ready_o,
  input  tlp_t        tlp_i,
  input  logic        acknak_req_i,     // from the receive side
  input  logic        acknak_nak_i,
  input  logic [11:0] acknak_seq_i,
  input  logic        fc_valid_i,       // flow-control DLLP from fc_init
  output logic        fc_ready_o,
  input  dllp_t       fc_dllp_i,
  input  logic        rx_ack_i,         // Ack/Nak received from the partner
  input  logic        rx_nak_i,
  input  logic [11:0] rx_seq_i,
  output logic        byte_valid_o,
  input  logic        byte_ready_i,
  output lbyte_t      byte_o,
  output logic [15:0] tlps_sent_o,
  output logic [15:0] replays_o,
  output logic [15:0] acknaks_sent_o
);
  localparam int PW = $clog2(RB_DEPTH);
  typedef enum logic [1:0] {F_IDLE, F_TLP, F_DLLP} fstate_e;

  tlp_t          rb [RB_DEPTH];
  logic [11:0]   rb_seq [RB_DEPTH];
  logic [PW:0]   head, tail, sptr;            // extra bit tells full from empty
  logic [11:0]   nts, ackd;
  logic          ap_pend, ap_nak;
  logic [11:0]   ap_seq;
  logic          replay_req;
  logic [31:0]   rtimer;
  fstate_e       fs;
  logic [7:0]    bidx;
  logic [PW-1:0] fent;
  logic [11:0]   fseq;
  logic [7:0]    flen;                        // bytes before the CRC
  dllp_t         fdllp;
  logic [15:0]   fcrc16;
  logic          crc_clr, crc_en;
  logic [31:0]   crc;
  logic [PW:0]   occ;
  logic          take_tlp, frame_done;
  logic [11:0]   ack_cnt;
  tlp_t          ft;

  assign occ         = tail - head;
  // a slot still being framed is not overwritten
  assign tlp_ready_o = dl_up_i && (occ != (PW+1)'(RB_DEPTH)) &&
                       !(fs == F_TLP && fent == tail[PW-1:0]);
  assign take_tlp    = tlp_valid_i && tlp_ready_o;
  assign ft          = rb[fent];

  lcrc32 u_crc (.clk, .rst_n, .clear_i(crc_clr), .en_i(crc_en), .data_i(byte_o.d), .crc_o(crc));

  // byte of the current frame
  always_comb begin
    byte_valid_o = (fs != F_IDLE);
    byte_o = '0;
    byte_o.sop = (bidx == 8'd0);
    if (fs == F_TLP) begin
      byte_o.eop = (bidx == flen + 8'd3);
      if (bidx == 8'd0)      byte_o.d = {4'h0, fseq[11:8]};
      else if (bidx == 8'd1) byte_o.d = fseq[7:0];
      else if (bidx < flen)  byte_o.d = ft.dw[(bidx - 8'd2) >> 2][8*(3 - int'(bidx[1:0] - 2'd2)) +: 8];
      else                   byte_o.d = crc[8*int'(bidx - flen) +: 8];
    end else if (fs == F_DLLP) begin
      byte_o.dllp = 1'b1;
      byte_o.eop  = (bidx == 8'd5);
      if (bidx < 8'd4) byte_o.d = fdllp[8*(3 - int'(bidx)) +: 8];
      else             byte_o.d = fcrc16[8*(5 - int'(bidx)) +: 8];
    end
    crc_clr = (fs == F_TLP) && (bidx == 8'd0);
    crc_en  = (fs == F_TLP) && byte_ready_i && (bidx < flen);
  end

  assign frame_done = byte_valid_o && byte_ready_i && byte_o.eop;
  assign fc_ready_o = link_up_i && (fs == F_IDLE || frame_done) && !ap_pend;
  assign ack_cnt    = rx_seq_i - ackd;

  always_ff @(posedge clk) begin
    if (take_tlp) begin
      rb[tail[PW-1:0]] <= tlp_i;
      rb_seq[tail[PW-1:0]] <= nts;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; sptr <= '0; nts <= '0; ackd <= 12'hFFF;
      ap_pend <= 1'b0; ap_nak <= 1'b0; ap_seq <= '0; replay_req <= 1'b0; rtimer <= '0;
      fs <= F_IDLE; bidx <= '0; fent <= '0; fseq <= '0; flen <= '0; fdllp <= '0; fcrc16 <= '0;
      tlps_sent_o <= '0; replays_o <= '0; acknaks_sent_o <= '0;
    end else if (!link_up_i) begin
      head <= '0; tail <= '0; sptr <= '0; nts <= '0; ackd <= 12'hFFF;
      ap_pend <= 1'b0; replay_req <= 1'b0; rtimer <= '0; fs <= F_IDLE; bidx <= '0;
    end else begin
      // new TLP into the replay buffer
      if (take_tlp) begin
        tail <= tail + 1'b1;
        nts  <= nts + 1'b1;
      end
      // Ack / Nak to send for the receive side (latest request wins)
      if (acknak_req_i) begin
        ap_pend <= 1'b1; ap_nak <= acknak_nak_i; ap_seq <= acknak_seq_i;
      end
      // Ack / Nak from the partner
      if (rx_ack_i || rx_nak_i) begin
        if (ack_cnt != 12'd0 && ack_cnt <= 12'(occ)) begin
          head   <= head + (PW+1)'(ack_cnt);
          ackd   <= rx_seq_i;
          rtimer <= '0;
          if (!rx_nak_i && (sptr - head) < (PW+1)'(ack_cnt)) sptr <= head + (PW+1)'(ack_cnt);
        end
        if (rx_nak_i) replay_req <= 1'b1;
      end
      // replay timer runs while TLPs wait for their Ack
      if (occ != '0 && !(rx_ack_i || rx_nak_i)) begin
        rtimer <= rtimer + 1;
        if (rtimer >= REPLAY_TIMEOUT) begin
          replay_req <= 1'b1;
          rtimer <= '0;
        end
      end else if (occ == '0) rtimer <= '0;

      // framer
      if (byte_valid_o && byte_ready_i) bidx <= bidx + 1'b1;
      if (fs == F_IDLE || frame_done) begin
        fs <= F_IDLE;
        bidx <= '0;
        if (ap_pend && !acknak_req_i) begin
          fs <= F_DLLP;
          fdllp  <= make_ack_nak(ap_nak, ap_seq);
          fcrc16 <= dllp_crc16(make_ack_nak(ap_nak, ap_seq));
          ap_pend <= 1'b0;
          acknaks_sent_o <= acknaks_sent_o + 1'b1;
        end else if (fc_valid_i && !ap_pend) begin
          fs <= F_DLLP;
          fdllp  <= fc_dllp_i;
          fcrc16 <= dllp_crc16(fc_dllp_i);
        end else if (replay_req && !(rx_ack_i || rx_nak_i)) begin
          replay_req <= 1'b0;
          sptr <= head;
          replays_o <= replays_o + 1'b1;
        end else if (dl_up_i && sptr != tail && !(rx_ack_i || rx_nak_i)) begin
          fs   <= F_TLP;
          fent <= sptr[PW-1:0];
          fseq <= rb_seq[sptr[PW-1:0]];
          flen <= 8'(rb[sptr[PW-1:0]].ndw) * 8'd4 + 8'd2;
          sptr <= sptr + 1'b1;
          tlps_sent_o <= tlps_sent_o + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n || !link_up_i) occ <= (PW+1)'(RB_DEPTH));
endmodule
