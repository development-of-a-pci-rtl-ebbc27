// tb_lcrc32: checks the link CRC against published CRC-32 check values
// ("123456789" -> CBF43926, "a" -> E8B7BE43, "abc" -> 352441C2,
// "message digest" -> 20159D7F) and checks that clear_i restarts the CRC.
module tb_lcrc32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, en;
  logic [7:0] data;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  lcrc32 dut (.clk, .rst_n, .clear_i(clear), .en_i(en), .data_i(data), .crc_o(crc));

  task automatic run(input string s, input logic [31:0] expected);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      clear = (i == 0);
      en = 1'b1;
      data = s[i];
    end
    @(negedge clk);
    clear = 1'b0; en = 1'b0;
    checks++;
    if (crc !== expected) begin
      failures++;
      $display("FAIL: crc(%s) = %h, expected %h", s, crc, expected);
    end
  endtask

  initial begin
    clear = 0; en = 0; data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run("123456789", 32'hCBF43926);
    run("a", 32'hE8B7BE43);
    run("abc", 32'h352441C2);
    run("message digest", 32'h20159D7F);
    run("123456789", 32'hCBF43926);
    // clear without data returns to the seed: CRC of nothing is 0
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    checks++;
    if (crc !== 32'h0) begin failures++; $display("FAIL: cleared crc %h", crc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
