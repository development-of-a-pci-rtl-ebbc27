// host_model: host side of the verification suite (scenario input, response
// model, host memory access).
//
// Test commands (request descriptors) enter the scenario queue at any time,
// but none is issued before the data link layer reports DL_Active: the host
// waits for the link, then starts configuring the endpoint. For each command
// the host copies the write payload from host memory (Model_Mem, from
// host_addr on) into the transmit buffer (TxBuf); a configuration write also
// records its data in the configuration shadow (Config Reg) as the value
// expected back. Completions come back through the receive buffer (RxBuf):
// data of a memory or I/O read is written to host memory at host_addr, data
// of a configuration read goes to Config Reg, which compares it with what was
// written. The host counts completions that passed and failed the checks of
// the completion tracker.
//
// The paths Model_Mem -> TxBuf -> send and receive -> RxBuf -> Config Reg /
// Model_Mem are those of the document's block diagram; buffer depths, the
// command format and the order of service (draining RxBuf before filling
// TxBuf, as both use memory port A) are this design's.
//
// Timing: memory port A has one cycle of read latency; filling an entry of
// TxBuf takes payload length + 2 cycles, draining one from RxBuf takes data
// length + 1 cycles.
module host_model
  import pcie_pkg::*;
#(
  parameter int SCN_DEPTH = 8,
  parameter int TXB_DEPTH = 2,
  parameter int RXB_DEPTH = 4,
  parameter int MEM_AW    = 10,
  parameter int CFG_RW    = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dl_up_i,
  // scenario input
  input  logic              cmd_valid_i,
  output logic              cmd_ready_o,
  input  req_t              cmd_i,
  // to the port
  output logic              req_valid_o,
  input  logic              req_ready_i,
  output txreq_t            req_o,
  output logic              host_ready_o,
  input  logic              res_valid_i,
  input  logic              res_ok_i,
  input  logic [3:0]        res_err_i,
  input  req_t              res_req_i,
  input  tlp_t              res_tlp_i,
  // Model_Mem port A
  output logic              mem_en_o,
  output logic              mem_we_o,
  output logic [3:0]        mem_be_o,
  output logic [MEM_AW-1:0] mem_addr_o,
  output logic [31:0]       mem_wdata_o,
  input  logic [31:0]       mem_rdata_i,
  // Config Reg
  output logic              cfg_exp_we_o,
  output logic [CFG_RW-1:0] cfg_exp_reg_o,
  output logic [3:0]        cfg_exp_be_o,
  output logic [31:0]       cfg_exp_data_o,
  output logic              cfg_rd_we_o,
  output logic [CFG_RW-1:0] cfg_rd_reg_o,
  output logic [31:0]       cfg_rd_data_o,
  // status
  output logic              idle_o,
  output logic [15:0]       issued_o,
  output logic [15:0]       cpl_ok_o,
  output logic [15:0]       cpl_bad_o
);
  typedef struct packed {
    logic       ok;
    logic [3:0] err;
    req_t       req;
    tlp_t       tlp;
  } result_t;

  typedef enum logic [1:0] {H_IDLE, H_FILL, H_PUSH, H_DRAIN} hstate_e;
  hstate_e  st;
  logic     scn_valid, scn_pop, txb_ready, txb_push, rxb_valid, rxb_pop;
  req_t     scn_head;
  result_t  rxb_head, rxb_in;
  txreq_t   fill;
  logic [9:0] n, idx;
  logic       rd_pend;
  logic [9:0] rd_idx;
  logic [$clog2(RXB_DEPTH+1)-1:0] rxb_cnt;
  logic       has_payload, rd_kind;
  logic [$clog2(SCN_DEPTH+1)-1:0] scn_cnt;
  logic [$clog2(TXB_DEPTH+1)-1:0] txb_cnt;

  sync_fifo #(.T(req_t), .DEPTH(SCN_DEPTH)) u_scn (
    .clk, .rst_n, .wr_valid_i(cmd_valid_i), .wr_ready_o(cmd_ready_o), .wr_data_i(cmd_i),
    .rd_valid_o(scn_valid), .rd_ready_i(scn_pop), .rd_data_o(scn_head), .count_o(scn_cnt));

  sync_fifo #(.T(txreq_t), .DEPTH(TXB_DEPTH)) u_txbuf (
    .clk, .rst_n, .wr_valid_i(txb_push), .wr_ready_o(txb_ready), .wr_data_i(fill),
    .rd_valid_o(req_valid_o), .rd_ready_i(req_ready_i), .rd_data_o(req_o), .count_o(txb_cnt));

  assign rxb_in = '{ok: res_ok_i, err: res_err_i, req: res_req_i, tlp: res_tlp_i};
  sync_fifo #(.T(result_t), .DEPTH(RXB_DEPTH)) u_rxbuf (
    .clk, .rst_n, .wr_valid_i(res_valid_i), .wr_ready_o(), .wr_data_i(rxb_in),
    .rd_valid_o(rxb_valid), .rd_ready_i(rxb_pop), .rd_data_o(rxb_head), .count_o(rxb_cnt));

  // room for a completion in flight plus the next one
  assign host_ready_o = int'(rxb_cnt) <= RXB_DEPTH - 3;

  assign has_payload = scn_head.kind inside {REQ_MWR, REQ_IOWR, REQ_CFGWR};
  assign rd_kind     = rxb_head.req.kind inside {REQ_MRD, REQ_IORD, REQ_CFGRD};
  assign scn_pop     = (st == H_IDLE) && !rxb_valid && scn_valid && dl_up_i && txb_ready;
  assign txb_push    = (st == H_PUSH) && !rd_pend;
  assign rxb_pop     = (st == H_DRAIN) && (!rxb_head.ok || !rd_kind || rxb_head.req.kind == REQ_CFGRD ||
                                           idx == n - 1'b1);
  assign idle_o      = (st == H_IDLE) && !scn_valid && !rxb_valid && txb_cnt == '0;

  always_comb begin
    mem_en_o = 1'b0; mem_we_o = 1'b0; mem_be_o = 4'hF;
    mem_addr_o = '0; mem_wdata_o = '0;
    if (st == H_FILL) begin
      mem_en_o = 1'b1;
      mem_addr_o = MEM_AW'(fill.req.host_addr) + MEM_AW'(idx);
    end else if (st == H_DRAIN && rxb_head.ok && rd_kind && rxb_head.req.kind != REQ_CFGRD) begin
      mem_en_o = 1'b1; mem_we_o = 1'b1;
      mem_addr_o = MEM_AW'(rxb_head.req.host_addr) + MEM_AW'(idx);
      mem_wdata_o = rxb_head.tlp.dw[3 + int'(idx)];
    end
  end

  assign cfg_exp_we_o   = txb_push && fill.req.kind == REQ_CFGWR;
  assign cfg_exp_reg_o  = CFG_RW'({fill.req.ext_reg_no, fill.req.reg_no});
  assign cfg_exp_be_o   = fill.req.first_be;
  assign cfg_exp_data_o = fill.data[0];
  assign cfg_rd_we_o    = (st == H_DRAIN) && rxb_head.ok && rxb_head.req.kind == REQ_CFGRD;
  assign cfg_rd_reg_o   = CFG_RW'({rxb_head.req.ext_reg_no, rxb_head.req.reg_no});
  assign cfg_rd_data_o  = rxb_head.tlp.dw[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; fill <= '0; n <= '0; idx <= '0; rd_pend <= 1'b0; rd_idx <= '0;
      issued_o <= '0; cpl_ok_o <= '0; cpl_bad_o <= '0;
    end else begin
      rd_pend <= (st == H_FILL);
      rd_idx  <= idx;
      if (rd_pend) fill.data[rd_idx[4:0]] <= mem_rdata_i;
      unique case (st)
        H_IDLE: begin
          idx <= '0;
          if (rxb_valid) begin
            st <= H_DRAIN;
            n  <= (rxb_head.req.kind == REQ_MRD) ? rxb_head.req.length : 10'd1;
          end else if (scn_pop) begin
            fill.req  <= scn_head;
            fill.data <= '0;
            n <= (scn_head.kind == REQ_MWR) ? scn_head.length : 10'd1;
            st <= has_payload ? H_FILL : H_PUSH;
          end
        end
        H_FILL: begin
          if (idx == n - 1'b1) st <= H_PUSH;
          else idx <= idx + 1'b1;
        end
        H_PUSH: if (txb_push) begin
          st <= H_IDLE;
          issued_o <= issued_o + 1'b1;
        end
        H_DRAIN: begin
          if (rxb_pop) begin
            st <= H_IDLE;
            if (rxb_head.ok) cpl_ok_o <= cpl_ok_o + 1'b1;
            else             cpl_bad_o <= cpl_bad_o + 1'b1;
          end else idx <= idx + 1'b1;
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) res_valid_i |-> rxb_cnt != RXB_DEPTH[$clog2(RXB_DEPTH+1)-1:0]);
endmodule
