// ep_model: behavioural endpoint used as the link partner of the verification
// suite in the testbenches.
//
// It is a second pcie_port, configured as endpoint (ID 01:00.0), that
// completes memory, I/O and type-0 configuration requests against its own
// arrays: 256 DWORDs of memory, 16 DWORDs of I/O space and a 1024-DWORD
// configuration space whose DWORD 0 (vendor/device ID 0x1234/0xABCD) is read
// only. Type-1 configuration requests get Unsupported Request. It can also
// issue requests of its own (app_*), standing in for the application master
// behind the device, and it advertises small posted credits so that the
// requester's flow-control gate is exercised. mute_i replaces its transmitted
// symbols with idle data, to model a lost stretch of traffic.
module ep_model
  import pcie_pkg::*;
#(
  parameter int TS1_MIN        = 16,
  parameter int REPLAY_TIMEOUT = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sym_t        rx_sym_i,
  output sym_t        tx_sym_o,
  input  logic        mute_i,
  input  logic        app_valid_i,
  output logic        app_ready_o,
  input  txreq_t      app_i,
  output logic        res_valid_o,
  output logic        res_ok_o,
  output tlp_t        res_tlp_o,
  output logic        dl_up_o,
  output logic [15:0] lcrc_errs_o,
  output logic [15:0] dups_o,
  output logic [15:0] ur_sent_o,
  output logic [15:0] msgs_o,
  output logic [7:0]  msg_code_o,
  input  logic [7:0]  peek_addr_i,
  output logic [31:0] peek_mem_o,
  output logic [31:0] peek_io_o
);
  logic [31:0] mem [256];
  logic [31:0] io  [16];
  logic [31:0] cfg [1024];
  logic        t_en, t_we;
  logic [1:0]  t_space;
  logic [15:0] t_addr;
  logic [3:0]  t_be;
  logic [31:0] t_wdata, t_rdata;
  sym_t        tx;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = '0;
    for (int i = 0; i < 16; i++) io[i] = '0;
    for (int i = 0; i < 1024; i++) cfg[i] = '0;
    cfg[0] = 32'hABCD_1234;
  end

  always_ff @(posedge clk) begin
    if (t_en) begin
      unique case (t_space)
        2'd0: t_rdata <= mem[t_addr[7:0]];
        2'd1: t_rdata <= io[t_addr[3:0]];
        default: t_rdata <= cfg[t_addr[9:0]];
      endcase
      if (t_we)
        for (int b = 0; b < 4; b++)
          if (t_be[b]) begin
            if (t_space == 2'd0) mem[t_addr[7:0]][8*b +: 8] <= t_wdata[8*b +: 8];
            else if (t_space == 2'd1) io[t_addr[3:0]][8*b +: 8] <= t_wdata[8*b +: 8];
            else if (t_addr[9:0] != 10'd0) cfg[t_addr[9:0]][8*b +: 8] <= t_wdata[8*b +: 8];
          end
    end
  end

  assign peek_mem_o = mem[peek_addr_i];
  assign peek_io_o  = io[peek_addr_i[3:0]];
  assign tx_sym_o   = mute_i ? '{k: 1'b0, d: 8'h00} : tx;

  pcie_port #(
    .PORT_ID(16'h0100), .SUPPORT(3'b111), .NTAGS(4), .RXQ_DEPTH(4), .RB_DEPTH(4),
    .TS1_MIN(TS1_MIN), .REPLAY_TIMEOUT(REPLAY_TIMEOUT), .CPL_TIMEOUT(65535),
    .ADV_P_HDR(8'd1), .ADV_P_DATA(12'd8), .ADV_NP_HDR(8'd2), .ADV_NP_DATA(12'd2),
    .ADV_CPL_HDR(8'd1), .ADV_CPL_DATA(12'd8)
  ) u_port (
    .clk, .rst_n,
    .req_valid_i(app_valid_i), .req_ready_o(app_ready_o), .req_i(app_i),
    .host_ready_i(1'b1),
    .res_valid_o, .res_ok_o, .res_err_o(), .res_req_o(), .res_tlp_o, .cpl_timeout_o(),
    .tgt_en_o(t_en), .tgt_we_o(t_we), .tgt_space_o(t_space), .tgt_addr_o(t_addr),
    .tgt_be_o(t_be), .tgt_wdata_o(t_wdata), .tgt_rdata_i(t_rdata),
    .tx_sym_o(tx), .rx_sym_i,
    .link_up_o(), .dl_up_o, .dl_state_o(), .fc_stall_o(),
    .tlps_sent_o(), .replays_o(), .acknaks_sent_o(), .lcrc_errs_o, .dups_o, .dllp_errs_o(),
    .init1_sent_o(), .init2_sent_o(), .ur_sent_o,
    .msgs_rcvd_o(msgs_o), .msg_code_o);
endmodule
