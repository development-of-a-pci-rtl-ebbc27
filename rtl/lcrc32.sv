// lcrc32: byte-serial 32-bit link CRC (LCRC) of the data link layer.
//
// The data link layer appends this CRC to every TLP it sends, covering the
// sequence-number bytes and the TLP bytes, and recomputes it on receipt. The
// generator polynomial is 0x04C11DB7, processed least significant bit first
// (reflected form 0xEDB88320) from an all-ones seed; crc_o is the inverted
// running value, sent least significant byte first. The document names the
// CRC unit only; the polynomial follows the PCI Express specification and the
// bit order is this design's choice (it matches the common Ethernet CRC-32).
//
// Interface: clear_i restarts the CRC, en_i folds data_i in. crc_o is valid
// one cycle after the last byte; clear_i and en_i together start a new CRC with
// data_i as its first byte.
module lcrc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        en_i,
  input  logic [7:0]  data_i,
  output logic [31:0] crc_o
);
  logic [31:0] state_q, seed, next;

  always_comb begin
    seed = clear_i ? 32'hFFFF_FFFF : state_q;
    next = seed;
    for (int i = 0; i < 8; i++) begin
      if (next[0] ^ data_i[i]) next = (next >> 1) ^ 32'hEDB8_8320;
      else                     next = next >> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state_q <= 32'hFFFF_FFFF;
    else if (en_i)    state_q <= next;
    else if (clear_i) state_q <= 32'hFFFF_FFFF;
  end

  assign crc_o = ~state_q;
endmodule
