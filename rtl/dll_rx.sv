// dll_rx: receive side of the data link layer.
//
// Takes the byte stream of deframed packets from the physical layer. For a
// TLP it recomputes the LCRC over the sequence-number and TLP bytes (the last
// four bytes are held back in a delay line, so that at the end of the frame
// they are the received LCRC), then checks the sequence number against the
// next expected one. A good, in-order TLP is passed to the transaction layer
// and acknowledged; a duplicate is dropped and acknowledged again; a TLP with
// a bad LCRC, a framing error or a sequence number from the future is dropped
// and answered with a Nak (once, until a good TLP arrives). For a DLLP it
// checks the 16-bit CRC and hands Ack/Nak DLLPs to the transmit side and
// flow-control DLLPs to fc_init. The document asks the data link layer to
// guarantee link integrity with CRCs and Ack/Nak DLLPs; the rules applied are
// those of the PCI Express specification.
//
// Timing: results (tlp_valid_o, acknak_req_o, rx_ack_o/rx_nak_o,
// dllp_valid_o) are one-cycle pulses, two cycles after the last byte of the
// frame. There is no back-pressure; flow control keeps the receiver from
// being overrun.
module dll_rx
  import pcie_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_up_i,
  input  logic        byte_valid_i,
  input  lbyte_t      byte_i,
  input  logic        frame_err_i,      // bad end of frame from the physical layer
  output logic        tlp_valid_o,
  output tlp_t        tlp_o,
  output logic        acknak_req_o,
  output logic        acknak_nak_o,
  output logic [11:0] acknak_seq_o,
  output logic        rx_ack_o,
  output logic        rx_nak_o,
  output logic [11:0] rx_seq_o,
  output logic        dllp_valid_o,
  output dllp_t       dllp_o,
  output logic [15:0] lcrc_errs_o,
  output logic [15:0] dups_o,
  output logic [15:0] dllp_errs_o
);
  localparam int MAXB = 4 * MAX_TLP_DW + 6;
  logic [8:0]  n;                  // bytes of this frame so far
  logic        in_tlp, in_dllp, chk_tlp, chk_dllp, bad;
  logic [31:0] dl;                 // last four bytes, newest in [7:0]
  logic [11:0] seq, nrs;
  tlp_t        acc;
  logic [47:0] dbuf;
  logic        crc_en, crc_clr;
  logic [31:0] crc, rx_crc;
  logic        nak_sched;
  logic [8:0]  nfin;
  logic [11:0] seq_gap;

  // bytes older than four behind enter the CRC
  assign crc_clr = byte_valid_i && byte_i.sop && !byte_i.dllp;
  assign crc_en  = byte_valid_i && !byte_i.dllp && (byte_i.sop || in_tlp) && (byte_i.sop ? 1'b0 : n >= 9'd4);
  lcrc32 u_crc (.clk, .rst_n, .clear_i(crc_clr), .en_i(crc_en), .data_i(dl[31:24]), .crc_o(crc));

  assign rx_crc = {dl[7:0], dl[15:8], dl[23:16], dl[31:24]};
  assign seq_gap   = nrs - seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; in_tlp <= 1'b0; in_dllp <= 1'b0; chk_tlp <= 1'b0; chk_dllp <= 1'b0; bad <= 1'b0;
      dl <= '0; seq <= '0; nrs <= '0; acc <= '0; dbuf <= '0; nak_sched <= 1'b0; nfin <= '0;
      tlp_valid_o <= 1'b0; tlp_o <= '0; acknak_req_o <= 1'b0; acknak_nak_o <= 1'b0; acknak_seq_o <= '0;
      rx_ack_o <= 1'b0; rx_nak_o <= 1'b0; rx_seq_o <= '0; dllp_valid_o <= 1'b0; dllp_o <= '0;
      lcrc_errs_o <= '0; dups_o <= '0; dllp_errs_o <= '0;
    end else if (!link_up_i) begin
      n <= '0; in_tlp <= 1'b0; in_dllp <= 1'b0; chk_tlp <= 1'b0; chk_dllp <= 1'b0;
      nrs <= '0; nak_sched <= 1'b0;
      tlp_valid_o <= 1'b0; acknak_req_o <= 1'b0; rx_ack_o <= 1'b0; rx_nak_o <= 1'b0; dllp_valid_o <= 1'b0;
    end else begin
      tlp_valid_o <= 1'b0; acknak_req_o <= 1'b0; rx_ack_o <= 1'b0; rx_nak_o <= 1'b0; dllp_valid_o <= 1'b0;
      chk_tlp <= 1'b0; chk_dllp <= 1'b0;
      if (frame_err_i && (in_tlp || in_dllp)) begin
        bad <= 1'b1;
      end
      if (byte_valid_i) begin
        dl <= {dl[23:0], byte_i.d};
        if (byte_i.sop) begin
          n <= 9'd1;
          in_tlp <= !byte_i.dllp;
          in_dllp <= byte_i.dllp;
          bad <= 1'b0;
          acc <= '0;
          seq[11:8] <= byte_i.d[3:0];
          dbuf <= {40'd0, byte_i.d};
        end else begin
          n <= n + 1'b1;
          if (in_dllp) dbuf <= {dbuf[39:0], byte_i.d};
          if (in_tlp) begin
            if (n == 9'd1) seq[7:0] <= byte_i.d;
            else if (n < 9'(4 * MAX_TLP_DW + 2) && n >= 9'd2)
              acc.dw[(n - 9'd2) >> 2][8*(3 - int'(n[1:0] - 2'd2)) +: 8] <= byte_i.d;
          end
        end
        if (byte_i.eop) begin
          in_tlp <= 1'b0; in_dllp <= 1'b0;
          nfin <= byte_i.sop ? 9'd1 : n + 1'b1;
          chk_tlp <= !byte_i.dllp;
          chk_dllp <= byte_i.dllp;
        end
      end
      // TLP checks, the cycle after its last byte
      if (chk_tlp) begin
        if (bad || crc != rx_crc || nfin < 9'd18 || nfin[1:0] != 2'b10 || nfin > 9'(MAXB)) begin
          lcrc_errs_o <= lcrc_errs_o + 1'b1;
          if (!nak_sched) begin
            nak_sched <= 1'b1;
            acknak_req_o <= 1'b1; acknak_nak_o <= 1'b1; acknak_seq_o <= nrs - 1'b1;
          end
        end else if (seq == nrs) begin
          nrs <= nrs + 1'b1;
          nak_sched <= 1'b0;
          tlp_valid_o <= 1'b1;
          tlp_o <= acc;
          tlp_o.ndw <= 6'((nfin - 9'd6) >> 2);
          acknak_req_o <= 1'b1; acknak_nak_o <= 1'b0; acknak_seq_o <= seq;
        end else if (seq_gap != 12'd0 && seq_gap < 12'd2048) begin
          dups_o <= dups_o + 1'b1;
          acknak_req_o <= 1'b1; acknak_nak_o <= 1'b0; acknak_seq_o <= nrs - 1'b1;
        end else if (!nak_sched) begin
          nak_sched <= 1'b1;
          acknak_req_o <= 1'b1; acknak_nak_o <= 1'b1; acknak_seq_o <= nrs - 1'b1;
        end
      end
      if (chk_dllp) begin
        if (bad || nfin != 9'd6 || dllp_crc16(dbuf[47:16]) != dbuf[15:0]) begin
          dllp_errs_o <= dllp_errs_o + 1'b1;
        end else if (dbuf[47:40] == DLLP_ACK || dbuf[47:40] == DLLP_NAK) begin
          rx_ack_o <= dbuf[47:40] == DLLP_ACK;
          rx_nak_o <= dbuf[47:40] == DLLP_NAK;
          rx_seq_o <= dbuf[27:16];
        end else begin
          dllp_valid_o <= 1'b1;
          dllp_o <= dbuf[47:16];
        end
      end
    end
  end
endmodule
