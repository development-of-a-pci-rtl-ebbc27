// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// the count, refusal when full and when empty.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int D = 4;
  logic wv, wr, rv, rr;
  logic [15:0] wd, rd;
  logic [2:0] cnt;
  int checks = 0, failures = 0, fulls = 0;
  logic [15:0] q[$];

  sync_fifo #(.T(logic [15:0]), .DEPTH(D)) dut (
    .clk, .rst_n, .wr_valid_i(wv), .wr_ready_o(wr), .wr_data_i(wd),
    .rd_valid_o(rv), .rd_ready_i(rr), .rd_data_o(rd), .count_o(cnt));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    wv = 0; rr = 0; wd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wv = ($urandom % 3) != 0;
      rr = ($urandom % 3) == 0 || i > 1900;
      wd = 16'($urandom);
      check(int'(cnt) == q.size(), "count");
      check(wr == (q.size() < D), "ready when not full");
      check(rv == (q.size() > 0), "valid when not empty");
      if (rv && q.size() > 0) check(rd == q[0], "head data");
      if (q.size() == D) fulls++;
      @(posedge clk);
      if (rv && rr) void'(q.pop_front());
      if (wv && wr) q.push_back(wd);
    end
    check(fulls > 0, "became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
