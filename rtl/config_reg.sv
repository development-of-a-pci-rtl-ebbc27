// config_reg: configuration space model of the host (Config Reg).
//
// Holds a shadow copy of the endpoint's configuration space as the host sees
// it. When the host sends a configuration write, the written bytes are
// recorded as expected values. When a configuration read completes, its data
// is stored and compared, byte by byte, with the expected values of the bytes
// written before; any difference counts as a mismatch and is flagged for one
// cycle. The document names this model and says configuration writes and reads
// are checked; the byte-wise comparison is this design's reading of that.
//
// Interface: exp_we_i records a write (register index, byte enables, data);
// rd_we_i stores read-back data. Both take effect at the clock edge;
// mismatch_o and the counters follow one cycle later. The lookup port
// (lk_reg_i / lk_data_o) reads the shadow combinationally.
module config_reg #(
  parameter int NREG = 1024,            // 4 KB extended configuration space
  parameter int RW   = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          exp_we_i,
  input  logic [RW-1:0] exp_reg_i,
  input  logic [3:0]    exp_be_i,
  input  logic [31:0]   exp_data_i,
  input  logic          rd_we_i,
  input  logic [RW-1:0] rd_reg_i,
  input  logic [31:0]   rd_data_i,
  input  logic [RW-1:0] lk_reg_i,
  output logic [31:0]   lk_data_o,
  output logic          mismatch_o,
  output logic [15:0]   checked_o,
  output logic [15:0]   mismatches_o
);
  logic [31:0] shadow [NREG];
  logic [31:0] expect_v [NREG];
  logic [3:0]  known [NREG];
  logic        diff;

  assign lk_data_o = shadow[lk_reg_i];

  always_comb begin
    diff = 1'b0;
    for (int i = 0; i < 4; i++)
      if (known[rd_reg_i][i] && (expect_v[rd_reg_i][8*i +: 8] != rd_data_i[8*i +: 8])) diff = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (exp_we_i)
      for (int i = 0; i < 4; i++) if (exp_be_i[i]) expect_v[exp_reg_i][8*i +: 8] <= exp_data_i[8*i +: 8];
    if (rd_we_i) shadow[rd_reg_i] <= rd_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) known[r] <= '0;
      mismatch_o <= 1'b0; checked_o <= '0; mismatches_o <= '0;
    end else begin
      if (exp_we_i) known[exp_reg_i] <= known[exp_reg_i] | exp_be_i;
      mismatch_o <= rd_we_i && diff;
      if (rd_we_i && known[rd_reg_i] != '0) checked_o <= checked_o + 1'b1;
      if (rd_we_i && diff) mismatches_o <= mismatches_o + 1'b1;
    end
  end
endmodule
