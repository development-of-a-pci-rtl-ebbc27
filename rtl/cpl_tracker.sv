// cpl_tracker: completion check of the requester ("Tx Cpl check").
//
// Every non-posted request the host sends takes a free tag here and leaves a
// record (request kind, length, byte enables, destination in host memory or
// configuration shadow): the "Cpl TxQ set" step of the transaction flow. When a
// completion arrives ("Cpl TxQ Chk") its tag selects the record and the tracker
// checks that the tag is outstanding, the requester ID is this port's, the
// status is Successful Completion, a read returns data (CplD) of the requested
// length and byte count and a write returns none (Cpl). The record is then
// freed. A record left waiting for TIMEOUT cycles is dropped as a completion
// timeout. The checks follow the request/completion rules of PCI Express; the
// document says only that each request needs an appropriate completion.
//
// Timing: allocation and lookup are combinational; res_* is registered, one
// cycle after cpl_valid_i. Completions split into several TLPs are not
// supported: a completion frees its tag.
module cpl_tracker
  import pcie_pkg::*;
#(
  parameter int          NTAGS        = 4,
  parameter int          TIMEOUT      = 65535,
  parameter logic [15:0] REQUESTER_ID = 16'h0000
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             tag_avail_o,
  output logic [TAG_W-1:0] tag_o,
  input  logic             alloc_i,
  input  req_t             alloc_req_i,
  input  logic             cpl_valid_i,
  input  tlp_t             cpl_i,
  output logic             res_valid_o,
  output logic             res_ok_o,
  output logic [3:0]       res_err_o,   // {unexpected, status, length/type, id}
  output req_t             res_req_o,   // the request this completion answers
  output logic             timeout_o,
  output logic [$clog2(NTAGS+1)-1:0] outstanding_o
);
  logic [NTAGS-1:0] busy;
  req_t             rec [NTAGS];
  logic [31:0]      age [NTAGS];
  logic [TAG_W-1:0] ctag;
  logic             hit, rd_kind, has_data, len_bad, id_bad, st_bad;
  req_t             cr;

  always_comb begin
    tag_avail_o = 1'b0;
    tag_o = '0;
    for (int i = NTAGS - 1; i >= 0; i--)
      if (!busy[i]) begin
        tag_avail_o = 1'b1;
        tag_o = TAG_W'(i);
      end
  end

  assign ctag = cpl_i.dw[2][8 +: TAG_W];
  assign hit  = (int'(ctag) < NTAGS) && busy[ctag] && (cpl_i.dw[2][15:8] < 8'(NTAGS));
  assign cr   = rec[ctag];
  assign rd_kind  = cr.kind inside {REQ_MRD, REQ_IORD, REQ_CFGRD};
  assign has_data = cpl_i.dw[0][30];
  assign st_bad   = cpl_i.dw[1][15:13] != CPL_SC;
  assign id_bad   = cpl_i.dw[2][31:16] != REQUESTER_ID;
  always_comb begin
    len_bad = 1'b0;
    if (!st_bad) begin
      if (rd_kind) begin
        if (!has_data) len_bad = 1'b1;
        else if (cr.kind == REQ_MRD) begin
          if (cpl_i.dw[0][9:0] != cr.length ||
              cpl_i.dw[1][11:0] != byte_count(cr.length, cr.first_be, cr.last_be)) len_bad = 1'b1;
        end else if (cpl_i.dw[0][9:0] != 10'd1) len_bad = 1'b1;
      end else if (has_data) len_bad = 1'b1;
    end
  end

  always_comb begin
    outstanding_o = '0;
    for (int i = 0; i < NTAGS; i++) outstanding_o = outstanding_o + busy[i];
  end

  always_ff @(posedge clk) begin
    if (alloc_i) rec[tag_o] <= alloc_req_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      res_valid_o <= 1'b0; res_ok_o <= 1'b0; res_err_o <= '0; res_req_o <= '0;
      timeout_o <= 1'b0;
      for (int i = 0; i < NTAGS; i++) age[i] <= '0;
    end else begin
      timeout_o <= 1'b0;
      for (int i = 0; i < NTAGS; i++) begin
        if (busy[i]) begin
          age[i] <= age[i] + 1;
          if (age[i] >= TIMEOUT) begin
            busy[i] <= 1'b0;
            timeout_o <= 1'b1;
          end
        end else age[i] <= '0;
      end
      if (alloc_i) begin
        busy[tag_o] <= 1'b1;
        age[tag_o] <= '0;
      end
      res_valid_o <= cpl_valid_i;
      if (cpl_valid_i) begin
        res_req_o <= cr;
        res_err_o <= {!hit, hit && st_bad, hit && len_bad, hit && id_bad};
        res_ok_o  <= hit && !st_bad && !len_bad && !id_bad;
        if (hit) busy[ctag] <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) alloc_i |-> tag_avail_o);
endmodule
