// evs_monitor: passive link monitor (the TL, DLL and Phy monitors).
//
// Watches one direction of the symbol stream and counts, per layer, what goes
// by: TS1 and TS2 ordered sets and framing violations (physical layer), Ack,
// Nak, InitFC1, InitFC2 and UpdateFC DLLPs (data link layer), and memory read,
// memory write, I/O, configuration, completion, completion-with-data and
// message TLPs
// (transaction layer). It decodes the same framing the physical layer sends
// (STP/SDP ... END); the type of a TLP is read from its first header byte,
// which follows the two sequence-number bytes. The document names the three
// monitors; what they count is this design's choice.
//
// Timing: counts_o is updated the cycle after the symbol that completes an
// event. A violation is an END, EDB or start symbol out of place.
module evs_monitor
  import pcie_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sym_t        sym_i,
  output mon_counts_t counts_o
);
  logic       in_pkt, is_dllp, in_os;
  logic [7:0] pos;
  logic [3:0] os_pos;
  logic       os_t1, os_t2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt <= 1'b0; is_dllp <= 1'b0; in_os <= 1'b0; pos <= '0; os_pos <= '0;
      os_t1 <= 1'b0; os_t2 <= 1'b0; counts_o <= '0;
    end else begin
      if (sym_i.k) begin
        unique case (sym_i.d)
          K_COM: begin
            if (in_pkt) counts_o.frame_err <= counts_o.frame_err + 1'b1;
            in_pkt <= 1'b0; in_os <= 1'b1; os_pos <= 4'd1; os_t1 <= 1'b1; os_t2 <= 1'b1;
          end
          K_STP, K_SDP: begin
            if (in_pkt) counts_o.frame_err <= counts_o.frame_err + 1'b1;
            in_pkt <= 1'b1; in_os <= 1'b0; is_dllp <= (sym_i.d == K_SDP); pos <= '0;
          end
          K_END: begin
            if (!in_pkt) counts_o.frame_err <= counts_o.frame_err + 1'b1;
            in_pkt <= 1'b0;
          end
          default: begin
            counts_o.frame_err <= counts_o.frame_err + 1'b1;
            in_pkt <= 1'b0; in_os <= 1'b0;
          end
        endcase
      end else if (in_os) begin
        os_t1 <= os_t1 && sym_i.d == TS1_ID;
        os_t2 <= os_t2 && sym_i.d == TS2_ID;
        os_pos <= os_pos + 1'b1;
        if (os_pos == 4'hF) begin
          in_os <= 1'b0;
          if (os_t1 && sym_i.d == TS1_ID) counts_o.ts1 <= counts_o.ts1 + 1'b1;
          if (os_t2 && sym_i.d == TS2_ID) counts_o.ts2 <= counts_o.ts2 + 1'b1;
        end
      end else if (in_pkt) begin
        pos <= pos + 1'b1;
        if (is_dllp && pos == 8'd0) begin
          if (sym_i.d == DLLP_ACK) counts_o.ack <= counts_o.ack + 1'b1;
          else if (sym_i.d == DLLP_NAK) counts_o.nak <= counts_o.nak + 1'b1;
          else if (sym_i.d[3:0] == 4'h0 && sym_i.d[5:4] != 2'b11) begin
            unique case (sym_i.d[7:6])
              2'b01: counts_o.initfc1  <= counts_o.initfc1 + 1'b1;
              2'b11: counts_o.initfc2  <= counts_o.initfc2 + 1'b1;
              2'b10: counts_o.updatefc <= counts_o.updatefc + 1'b1;
              default: ;
            endcase
          end
        end
        if (!is_dllp && pos == 8'd2 && sym_i.d[4:3] == TYPE_MSG) counts_o.msg <= counts_o.msg + 1'b1;
        else if (!is_dllp && pos == 8'd2) begin
          unique case (sym_i.d[4:0])
            TYPE_MEM:  if (sym_i.d[6]) counts_o.mwr <= counts_o.mwr + 1'b1;
                       else            counts_o.mrd <= counts_o.mrd + 1'b1;
            TYPE_IO:   counts_o.io <= counts_o.io + 1'b1;
            TYPE_CFG0, TYPE_CFG1: counts_o.cfg <= counts_o.cfg + 1'b1;
            TYPE_CPL:  if (sym_i.d[6]) counts_o.cpld <= counts_o.cpld + 1'b1;
                       else            counts_o.cpl  <= counts_o.cpl + 1'b1;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
