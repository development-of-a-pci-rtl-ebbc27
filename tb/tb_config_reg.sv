// tb_config_reg: records expected bytes with configuration writes, stores
// read-back data and checks the comparison: equal bytes pass, a changed
// written byte is a mismatch, bytes never written are not compared.
module tb_config_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ew, rw, mm;
  logic [9:0] er, rr_, lr;
  logic [3:0] ebe;
  logic [31:0] ed, rd, ld;
  logic [15:0] chk, mms;
  int checks = 0, failures = 0;

  config_reg dut (.clk, .rst_n, .exp_we_i(ew), .exp_reg_i(er), .exp_be_i(ebe), .exp_data_i(ed),
    .rd_we_i(rw), .rd_reg_i(rr_), .rd_data_i(rd), .lk_reg_i(lr), .lk_data_o(ld),
    .mismatch_o(mm), .checked_o(chk), .mismatches_o(mms));

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr_exp(input int r, input logic [3:0] be, input logic [31:0] d);
    @(negedge clk); ew = 1; er = 10'(r); ebe = be; ed = d; @(negedge clk); ew = 0;
  endtask

  task automatic readback(input int r, input logic [31:0] d, input bit exp_mm);
    @(negedge clk); rw = 1; rr_ = 10'(r); rd = d; @(negedge clk); rw = 0;
    check(mm == exp_mm, $sformatf("mismatch flag for reg %0d data %h", r, d));
    lr = 10'(r); #1;
    check(ld == d, "shadow holds read-back data");
  endtask

  initial begin
    ew = 0; rw = 0; er = 0; rr_ = 0; lr = 0; ebe = 0; ed = 0; rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    readback(5, 32'h1111_2222, 0);                  // never written: not compared
    check(chk == 0, "unwritten register not counted as checked");
    wr_exp(1, 4'hF, 32'h0000_0006);
    readback(1, 32'h0000_0006, 0);
    wr_exp(66, 4'b0011, 32'hDEAD_BEEF);
    readback(66, 32'h0000_BEEF, 0);                 // upper bytes not written
    readback(66, 32'h0000_BEEE, 1);                 // written byte differs
    wr_exp(1, 4'b0100, 32'h00AB_0000);              // adds one byte
    readback(1, 32'h00AB_0006, 0);
    readback(1, 32'h0000_0006, 1);
    check(chk == 5 && mms == 2, $sformatf("counters %0d %0d", chk, mms));
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
