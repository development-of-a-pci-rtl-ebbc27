// model_mem: host system memory model (Model_Mem) of the verification suite.
//
// A DWORD-wide memory with two ports. Port A belongs to the host model: it
// reads write payloads into the transmit buffer and stores completion data of
// read requests. Port B serves requests the device under test sends to host
// memory, through the completion generator. Each port reads with one cycle of
// latency and writes the bytes enabled by its byte-enable mask. Contents start
// at zero. The document names the memory; its size (DEPTH DWORDs) and the two
// ports are this design's choice. Port A wins when both ports write the same
// word in the same cycle.
module model_mem #(
  parameter int DEPTH = 1024,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en_i,
  input  logic          a_we_i,
  input  logic [3:0]    a_be_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [31:0]   a_wdata_i,
  output logic [31:0]   a_rdata_o,
  input  logic          b_en_i,
  input  logic          b_we_i,
  input  logic [3:0]    b_be_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [31:0]   b_wdata_i,
  output logic [31:0]   b_rdata_o
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (b_en_i && b_we_i)
      for (int i = 0; i < 4; i++) if (b_be_i[i]) mem[b_addr_i][8*i +: 8] <= b_wdata_i[8*i +: 8];
    if (a_en_i && a_we_i)
      for (int i = 0; i < 4; i++) if (a_be_i[i]) mem[a_addr_i][8*i +: 8] <= a_wdata_i[8*i +: 8];
    if (a_en_i) a_rdata_o <= mem[a_addr_i];
    if (b_en_i) b_rdata_o <= mem[b_addr_i];
  end
endmodule
