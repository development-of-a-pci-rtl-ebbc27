// pcie_pkg: types, encodings and helper functions shared by the PCI Express
// verification-suite blocks.
//
// A TLP travels between the transaction layer and the data link layer as one
// tlp_t word: up to four header DWORDs followed by up to MAX_PAYLOAD_DW data
// DWORDs, with the DWORD count alongside. Field encodings (Fmt/Type, DLLP type
// codes, ordered-set symbols, flow-control credit units) follow the PCI Express
// 1.0a base specification; the document names the transactions and DLLPs but
// not their bit layout. Messages are limited to those without data. The payload limit of 32 DWORDs (128 bytes, the
// smallest Max_Payload_Size the specification allows) is this design's choice.
package pcie_pkg;

  localparam int MAX_PAYLOAD_DW = 32;
  localparam int MAX_TLP_DW     = 4 + MAX_PAYLOAD_DW;
  localparam int TAG_W          = 5;

  // ---------------------------------------------------------------- TLP
  typedef enum logic [2:0] {
    REQ_MRD   = 3'd0,
    REQ_MWR   = 3'd1,
    REQ_IORD  = 3'd2,
    REQ_IOWR  = 3'd3,
    REQ_CFGRD = 3'd4,
    REQ_CFGWR = 3'd5,
    REQ_MSG   = 3'd6    // message without data
  } req_kind_e;

  // Fmt field: bit 1 = with data, bit 0 = 4-DWORD header
  localparam logic [1:0] FMT_3DW_ND = 2'b00;
  localparam logic [1:0] FMT_4DW_ND = 2'b01;
  localparam logic [1:0] FMT_3DW_D  = 2'b10;
  localparam logic [1:0] FMT_4DW_D  = 2'b11;

  localparam logic [4:0] TYPE_MEM  = 5'b00000;
  localparam logic [4:0] TYPE_IO   = 5'b00010;
  localparam logic [4:0] TYPE_CFG0 = 5'b00100;
  localparam logic [4:0] TYPE_CFG1 = 5'b00101;
  localparam logic [4:0] TYPE_CPL  = 5'b01010;
  localparam logic [1:0] TYPE_MSG  = 2'b10;     // Type[4:3] of a message; Type[2:0] is the routing

  localparam logic [2:0] CPL_SC = 3'b000;  // successful completion
  localparam logic [2:0] CPL_UR = 3'b001;  // unsupported request
  localparam logic [2:0] CPL_CA = 3'b100;  // completer abort

  // Request descriptor: the arguments of the Send_TLP_* procedures.
  typedef struct packed {
    req_kind_e    kind;
    logic         ad64;       // AdFmt: 64-bit address, 4-DWORD header
    logic         cfg_type;   // CfgType: 0 = type 0, 1 = type 1
    logic [2:0]   tc;
    logic         td;
    logic         ep;
    logic [1:0]   attr;
    logic [9:0]   length;     // DWORDs, 0 means 1024 (not used here)
    logic [3:0]   first_be;
    logic [3:0]   last_be;
    logic [63:0]  addr;       // byte address for memory / I/O
    logic [15:0]  bdf;        // bus/device/function for configuration
    logic [5:0]   reg_no;
    logic [3:0]   ext_reg_no;
    logic [15:0]  host_addr;  // Model_Mem DWORD address of payload / destination
    logic [2:0]   msg_route;  // message routing subfield (Type[2:0])
    logic [7:0]   msg_code;   // message code
  } req_t;

  // Request with its write payload, as held in the transmit buffer.
  typedef struct packed {
    req_t                            req;
    logic [MAX_PAYLOAD_DW-1:0][31:0] data;
  } txreq_t;

  typedef struct packed {
    logic [MAX_TLP_DW-1:0][31:0] dw;   // dw[0] is the first DWORD on the wire
    logic [5:0]                  ndw;  // DWORDs in use
  } tlp_t;

  // Bytes a read returns: 4 x length less the bytes the first and last byte
  // enables leave out at the two ends.
  function automatic logic [11:0] byte_count(logic [9:0] len, logic [3:0] fbe, logic [3:0] lbe);
    logic [11:0] n;
    logic [3:0]  l;
    n = {len, 2'b00};
    l = (len == 10'd1) ? fbe : lbe;
    if (fbe == 4'b0000) return 12'd1;
    for (int i = 0; i < 4; i++) begin
      if (fbe[i]) break;
      n = n - 1'b1;
    end
    for (int i = 3; i >= 0; i--) begin
      if (l[i]) break;
      n = n - 1'b1;
    end
    return n;
  endfunction

  typedef enum logic [1:0] {FC_P = 2'd0, FC_NP = 2'd1, FC_CPL = 2'd2} fc_type_e;

  function automatic logic [1:0] tlp_fmt(tlp_t t);
    return t.dw[0][30:29];
  endfunction

  function automatic logic [4:0] tlp_type(tlp_t t);
    return t.dw[0][28:24];
  endfunction

  function automatic logic [9:0] tlp_len(tlp_t t);
    return t.dw[0][9:0];
  endfunction

  function automatic logic tlp_is_cpl(tlp_t t);
    return t.dw[0][28:24] == TYPE_CPL;
  endfunction

  // Credit class of a TLP: posted (memory write, message), non-posted, completion.
  function automatic fc_type_e tlp_fc_type(tlp_t t);
    if (t.dw[0][28:24] == TYPE_CPL)                         return FC_CPL;
    if (t.dw[0][28:24] == TYPE_MEM && t.dw[0][30])          return FC_P;
    if (t.dw[0][28:27] == TYPE_MSG)                         return FC_P;
    return FC_NP;
  endfunction

  // Data credits: one credit per 4 DWORDs of payload.
  function automatic logic [7:0] tlp_data_credits(tlp_t t);
    logic [10:0] n;
    if (!t.dw[0][30]) return 8'd0;
    n = {1'b0, t.dw[0][9:0]};
    return 8'((n + 11'd3) >> 2);
  endfunction

  // ---------------------------------------------------------------- DLLP
  localparam logic [7:0] DLLP_ACK     = 8'h00;
  localparam logic [7:0] DLLP_NAK     = 8'h10;
  localparam logic [7:0] DLLP_INIT1_P = 8'h40;
  localparam logic [7:0] DLLP_INIT1_N = 8'h50;
  localparam logic [7:0] DLLP_INIT1_C = 8'h60;
  localparam logic [7:0] DLLP_INIT2_P = 8'hC0;
  localparam logic [7:0] DLLP_INIT2_N = 8'hD0;
  localparam logic [7:0] DLLP_INIT2_C = 8'hE0;
  localparam logic [7:0] DLLP_UPD_P   = 8'h80;
  localparam logic [7:0] DLLP_UPD_N   = 8'h90;
  localparam logic [7:0] DLLP_UPD_C   = 8'hA0;

  // DLLP body without its CRC: type byte and three content bytes.
  typedef logic [31:0] dllp_t;

  function automatic dllp_t make_ack_nak(logic nak, logic [11:0] seq);
    return {nak ? DLLP_NAK : DLLP_ACK, 8'h00, 4'h0, seq};
  endfunction

  // Flow-control DLLP: HdrFC (8 bits) and DataFC (12 bits) for VC0.
  function automatic dllp_t make_fc(logic [7:0] typ, logic [7:0] hdr, logic [11:0] data);
    return {typ, 2'b00, hdr, 2'b00, data};
  endfunction

  // 16-bit DLLP CRC, polynomial 0x100B, all-ones seed, inverted result.
  function automatic logic [15:0] dllp_crc16(dllp_t d);
    logic [15:0] c;
    c = 16'hFFFF;
    for (int i = 31; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = (c << 1) ^ 16'h100B;
      else              c = c << 1;
    end
    return ~c;
  endfunction

  // ---------------------------------------------------------------- PHY
  typedef struct packed {
    logic       k;     // control (K) symbol
    logic [7:0] d;
  } sym_t;

  localparam logic [7:0] K_COM = 8'hBC;  // K28.5
  localparam logic [7:0] K_STP = 8'hFB;  // K27.7 start of TLP
  localparam logic [7:0] K_SDP = 8'h5C;  // K28.2 start of DLLP
  localparam logic [7:0] K_END = 8'hFD;  // K29.7
  localparam logic [7:0] K_EDB = 8'hFE;  // K30.7 end bad
  localparam logic [7:0] TS1_ID = 8'h4A; // D10.2
  localparam logic [7:0] TS2_ID = 8'h45; // D5.2

  // Byte stream between data link and physical layer.
  typedef struct packed {
    logic       sop;
    logic       eop;
    logic       dllp;   // 1 = DLLP frame, 0 = TLP frame
    logic [7:0] d;
  } lbyte_t;

  // Event counts of one direction of the link, kept by evs_monitor.
  typedef struct packed {
    logic [15:0] ts1;        // physical: TS1 ordered sets
    logic [15:0] ts2;        //           TS2 ordered sets
    logic [15:0] frame_err;  //           framing violations
    logic [15:0] ack;        // data link: Ack DLLPs
    logic [15:0] nak;        //            Nak DLLPs
    logic [15:0] initfc1;    //            InitFC1 DLLPs
    logic [15:0] initfc2;    //            InitFC2 DLLPs
    logic [15:0] updatefc;   //            UpdateFC DLLPs
    logic [15:0] mrd;        // transaction: memory reads
    logic [15:0] mwr;        //              memory writes
    logic [15:0] io;         //              I/O requests
    logic [15:0] cfg;        //              configuration requests
    logic [15:0] cpl;        //              completions without data
    logic [15:0] cpld;       //              completions with data
    logic [15:0] msg;        //              messages
  } mon_counts_t;

endpackage
