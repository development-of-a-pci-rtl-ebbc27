// cpl_gen: completer of received requests ("Rx Cpl gen").
//
// Serves a request TLP that arrived from the link partner: it writes the
// payload of a memory, I/O or configuration write into the target, reads the
// requested DWORDs of a read, and builds the completion: CplD with the data for
// a read, Cpl without data for an I/O or configuration write, none for a
// posted memory write. A request for a space the target does not support
// (SUPPORT mask: bit 0 memory, bit 1 I/O, bit 2 configuration type 0) is
// answered with Unsupported Request status. These are the "Cpl RxQ set",
// "Cpl RxQ Chk", "Payload get" and "TLP Cpl Send" steps of the document's
// transaction flow; the header fields follow the PCI Express specification.
//
// Target port: one DWORD per cycle, reads return data the next cycle. tgt_addr_o
// is the DWORD address: address bits [17:2] for memory and I/O, the
// extended/plain register number for configuration.
// Timing: accept (req_ready_o) in IDLE, one cycle per DWORD of access, then the
// completion is held on cpl_o until cpl_ready_i.
module cpl_gen
  import pcie_pkg::*;
#(
  parameter logic [15:0] COMPLETER_ID = 16'h0000,
  parameter logic [2:0]  SUPPORT      = 3'b001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  tlp_t        req_i,
  output logic        tgt_en_o,
  output logic        tgt_we_o,
  output logic [1:0]  tgt_space_o,   // 0 memory, 1 I/O, 2 configuration
  output logic [15:0] tgt_addr_o,
  output logic [3:0]  tgt_be_o,
  output logic [31:0] tgt_wdata_o,
  input  logic [31:0] tgt_rdata_i,
  output logic        cpl_valid_o,
  input  logic        cpl_ready_i,
  output tlp_t        cpl_o,
  output logic        ur_o          // pulse: request answered with UR
);
  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_BUILD, S_OUT} state_e;
  state_e st;
  tlp_t   rq;
  logic [9:0]  idx, len;
  logic        is_wr, is_mem, is_io, is_cfg0, sup, four_dw, rd_pend;
  logic [9:0]  rd_idx;
  logic [MAX_PAYLOAD_DW-1:0][31:0] rdata;
  logic [63:0] addr;
  logic [3:0]  fbe, lbe;

  assign is_wr   = rq.dw[0][30];
  assign four_dw = rq.dw[0][29];
  assign is_mem  = rq.dw[0][28:24] == TYPE_MEM;
  assign is_io   = rq.dw[0][28:24] == TYPE_IO;
  assign is_cfg0 = rq.dw[0][28:24] == TYPE_CFG0;
  assign sup     = (is_mem && SUPPORT[0]) || (is_io && SUPPORT[1]) || (is_cfg0 && SUPPORT[2]);
  assign len     = is_mem ? rq.dw[0][9:0] : 10'd1;
  assign addr    = four_dw ? {rq.dw[2], rq.dw[3]} : {32'h0, rq.dw[2]};
  assign fbe     = rq.dw[1][3:0];
  assign lbe     = rq.dw[1][7:4];

  assign req_ready_o = (st == S_IDLE);

  always_comb begin
    tgt_en_o    = (st == S_ACCESS);
    tgt_we_o    = is_wr;
    tgt_space_o = is_mem ? 2'd0 : is_io ? 2'd1 : 2'd2;
    tgt_addr_o  = is_cfg0 ? {6'd0, rq.dw[2][11:2]} : 16'(addr[17:2] + 16'(idx));
    tgt_be_o    = (idx == 10'd0) ? fbe : (idx == len - 1'b1) ? lbe : 4'hF;
    tgt_wdata_o = rq.dw[(four_dw ? 4 : 3) + int'(idx)];
  end

  function automatic logic [6:0] lower_addr(logic [6:0] a, logic [3:0] be);
    logic [6:0] r;
    r = {a[6:2], 2'b00};
    if (!be[0]) r[1:0] = be[1] ? 2'd1 : be[2] ? 2'd2 : be[3] ? 2'd3 : 2'd0;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; rq <= '0; idx <= '0; rd_pend <= 1'b0; rd_idx <= '0;
      rdata <= '0; cpl_valid_o <= 1'b0; cpl_o <= '0; ur_o <= 1'b0;
    end else begin
      ur_o <= 1'b0;
      rd_pend <= tgt_en_o && !tgt_we_o;
      rd_idx  <= idx;
      if (rd_pend) rdata[rd_idx[4:0]] <= tgt_rdata_i;
      unique case (st)
        S_IDLE: if (req_valid_i) begin
          rq <= req_i;
          idx <= '0;
          st <= S_ACCESS;
        end
        S_ACCESS: begin
          if (!sup) st <= S_BUILD;
          else if (idx == len - 1'b1) st <= S_BUILD;
          else idx <= idx + 1'b1;
        end
        S_BUILD: if (!rd_pend) begin
          cpl_o <= '0;
          cpl_o.dw[0][28:24] <= TYPE_CPL;
          cpl_o.dw[0][22:20] <= rq.dw[0][22:20];
          cpl_o.dw[0][13:12] <= rq.dw[0][13:12];
          cpl_o.dw[2] <= {rq.dw[1][31:16], rq.dw[1][15:8], 1'b0,
                          is_mem ? lower_addr(addr[6:0], fbe) : 7'd0};
          if (!sup) begin
            cpl_o.dw[1] <= {COMPLETER_ID, CPL_UR, 1'b0, 12'd4};
            cpl_o.ndw <= 6'd3;
            ur_o <= 1'b1;
          end else if (is_wr) begin
            cpl_o.dw[1] <= {COMPLETER_ID, CPL_SC, 1'b0, 12'd4};
            cpl_o.ndw <= 6'd3;
          end else begin
            cpl_o.dw[0][30] <= 1'b1;
            cpl_o.dw[0][9:0] <= len;
            cpl_o.dw[1] <= {COMPLETER_ID, CPL_SC, 1'b0,
                            is_mem ? byte_count(len, fbe, lbe) : 12'd4};
            for (int i = 0; i < MAX_PAYLOAD_DW; i++) cpl_o.dw[3 + i] <= rdata[i];
            cpl_o.ndw <= 6'(10'd3 + len);
          end
          // posted memory writes, and unsupported ones, get no completion
          if (is_wr && is_mem) st <= S_IDLE;
          else begin
            st <= S_OUT;
            cpl_valid_o <= 1'b1;
          end
        end
        S_OUT: if (cpl_ready_i) begin
          cpl_valid_o <= 1'b0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
