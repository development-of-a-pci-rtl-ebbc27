// sync_fifo: single-clock first-in first-out buffer of an arbitrary type.
//
// Used for the host model's TxBuf (requests waiting for the send logic) and
// RxBuf (completion data waiting to be written to host memory or the
// configuration shadow), and for the receive queue of the transaction layer.
// The document names the buffers but not their depth or handshake; a
// valid/ready interface and the depths chosen by each user are this design's.
//
// Interface: push when wr_valid_i and wr_ready_o; pop when rd_valid_o and
// rd_ready_i. rd_data_o shows the head entry with no read latency. A push into
// a full FIFO and a pop from an empty one are refused.
module sync_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid_i,
  output logic wr_ready_o,
  input  T     wr_data_i,
  output logic rd_valid_o,
  input  logic rd_ready_i,
  output T     rd_data_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic do_wr, do_rd;

  assign wr_ready_o = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid_o = (cnt != '0);
  assign do_wr = wr_valid_i && wr_ready_o;
  assign do_rd = rd_valid_o && rd_ready_i;
  assign rd_data_o = mem[rp];
  assign count_o = cnt;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (do_wr ? 1'b1 : 1'b0) - (do_rd ? 1'b1 : 1'b0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= DEPTH);
endmodule
