// tlp_send: request TLP builder of the transaction layer (the "Send Tasks").
//
// Takes one request descriptor with its payload (configuration read/write of
// type 0 or 1, memory read/write with a 32- or 64-bit address, I/O read/write,
// message without data)
// and builds the TLP: header DWORD 0 (Fmt, Type, TC, TD, EP, Attr, Length),
// DWORD 1 (requester ID, tag, byte enables) and the address or
// bus/device/function/register DWORDs, followed by the write data. Non-posted
// requests take a tag from the completion tracker and register themselves
// there, so that the completion can be checked later; a memory write or a
// message needs no tag and is sent at once. A message has a 4-DWORD header:
// the routing subfield in Type, the message code in the last byte of DWORD 1
// and the descriptor's addr in DWORDs 2 and 3 (address- or ID-routed
// messages use them; for the others they are reserved and addr is 0). The request descriptor carries the same fields as the
// document's Send_TLP_CfgWr / CfgRd / MWr / MRd / IOWr / IORd procedures; the
// header layout follows the PCI Express specification.
//
// Timing: a request is accepted in one cycle (req_ready_o) when the output
// register is free and, for a non-posted request, a tag is available. The TLP
// appears on tlp_o the next cycle and is held until tlp_ready_i.
// ECRC is not generated: TD is always sent as 0.
module tlp_send
  import pcie_pkg::*;
#(
  parameter logic [15:0] REQUESTER_ID = 16'h0000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid_i,
  output logic             req_ready_o,
  input  txreq_t           req_i,
  // tag allocation (completion tracker)
  input  logic             tag_avail_i,
  input  logic [TAG_W-1:0] tag_i,
  output logic             alloc_o,
  output req_t             alloc_req_o,
  // TLP out
  output logic             tlp_valid_o,
  input  logic             tlp_ready_i,
  output tlp_t             tlp_o
);
  req_t r;
  logic np, out_free, take;
  tlp_t t;
  logic [9:0] len;

  assign r   = req_i.req;
  assign np  = !(r.kind inside {REQ_MWR, REQ_MSG});
  assign out_free = !tlp_valid_o || tlp_ready_i;
  assign req_ready_o = out_free && (!np || tag_avail_i);
  assign take = req_valid_i && req_ready_o;
  assign alloc_o = take && np;
  assign alloc_req_o = r;

  always_comb begin
    t = '0;
    len = (r.kind == REQ_MRD || r.kind == REQ_MWR) ? r.length : (r.kind == REQ_MSG) ? 10'd0 : 10'd1;
    t.dw[0][22:20] = r.tc;
    t.dw[0][15]    = 1'b0;             // no ECRC
    t.dw[0][14]    = r.ep;
    t.dw[0][13:12] = r.attr;
    t.dw[0][9:0]   = len;
    t.dw[1] = {REQUESTER_ID, 8'(np ? tag_i : '0), (len == 10'd1) ? 4'h0 : r.last_be, r.first_be};
    unique case (r.kind)
      REQ_MRD, REQ_MWR: begin
        t.dw[0][30]    = (r.kind == REQ_MWR);
        t.dw[0][29]    = r.ad64;
        t.dw[0][28:24] = TYPE_MEM;
        if (r.ad64) begin
          t.dw[2] = r.addr[63:32];
          t.dw[3] = {r.addr[31:2], 2'b00};
        end else begin
          t.dw[2] = {r.addr[31:2], 2'b00};
        end
      end
      REQ_IORD, REQ_IOWR: begin
        t.dw[0][30]    = (r.kind == REQ_IOWR);
        t.dw[0][28:24] = TYPE_IO;
        t.dw[2] = {r.addr[31:2], 2'b00};
      end
      REQ_MSG: begin
        t.dw[0][29]    = 1'b1;
        t.dw[0][28:24] = {TYPE_MSG, r.msg_route};
        t.dw[1][7:0]   = r.msg_code;
        t.dw[2] = r.addr[63:32];
        t.dw[3] = r.addr[31:0];
      end
      default: begin                   // configuration
        t.dw[0][30]    = (r.kind == REQ_CFGWR);
        t.dw[0][28:24] = r.cfg_type ? TYPE_CFG1 : TYPE_CFG0;
        t.dw[2] = {r.bdf, 4'h0, r.ext_reg_no, r.reg_no, 2'b00};
      end
    endcase
    // payload after the header
    for (int i = 0; i < MAX_PAYLOAD_DW; i++) begin
      if (t.dw[0][30] && i < int'(len)) begin
        if (t.dw[0][29]) t.dw[4 + i] = req_i.data[i];
        else             t.dw[3 + i] = req_i.data[i];
      end
    end
    t.ndw = 6'(({4'd0, t.dw[0][29] ? 6'd4 : 6'd3}) + (t.dw[0][30] ? len : 10'd0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tlp_valid_o <= 1'b0;
      tlp_o <= '0;
    end else begin
      if (take) begin
        tlp_valid_o <= 1'b1;
        tlp_o <= t;
      end else if (tlp_ready_i) begin
        tlp_valid_o <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    req_valid_i && req_i.req.kind inside {REQ_MRD, REQ_MWR} |-> req_i.req.length <= 10'(MAX_PAYLOAD_DW) && req_i.req.length != 0);
endmodule
