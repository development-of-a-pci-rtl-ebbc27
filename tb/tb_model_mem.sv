// tb_model_mem: random byte-enabled writes and reads on both ports compared
// with an array model; checks one-cycle read latency and zero start contents.
module tb_model_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int N = 64;
  logic ae, awe, be_, bwe;
  logic [3:0] abe, bbe;
  logic [5:0] aa, ba;
  logic [31:0] awd, ard, bwd, brd;
  logic [31:0] ref_m [N];
  logic [31:0] exp_a, exp_b;
  logic chk_a, chk_b;
  int checks = 0, failures = 0;

  model_mem #(.DEPTH(N)) dut (
    .clk, .a_en_i(ae), .a_we_i(awe), .a_be_i(abe), .a_addr_i(aa), .a_wdata_i(awd), .a_rdata_o(ard),
    .b_en_i(be_), .b_we_i(bwe), .b_be_i(bbe), .b_addr_i(ba), .b_wdata_i(bwd), .b_rdata_o(brd));

  initial begin
    for (int i = 0; i < N; i++) ref_m[i] = '0;
    ae = 0; be_ = 0; awe = 0; bwe = 0; abe = 0; bbe = 0; aa = 0; ba = 0; awd = 0; bwd = 0;
    chk_a = 0; chk_b = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (ard !== exp_a) begin failures++; $display("FAIL: port A read %h exp %h", ard, exp_a); end end
      if (chk_b) begin checks++; if (brd !== exp_b) begin failures++; $display("FAIL: port B read %h exp %h", brd, exp_b); end end
      ae = $urandom % 2; be_ = $urandom % 2;
      awe = (i > 200) && ($urandom % 2); bwe = (i > 200) && ($urandom % 2);
      abe = 4'($urandom); bbe = 4'($urandom);
      aa = 6'($urandom); ba = 6'($urandom);
      awd = $urandom; bwd = $urandom;
      chk_a = ae; chk_b = be_;
      exp_a = ref_m[aa]; exp_b = ref_m[ba];
      if (be_ && bwe) for (int b = 0; b < 4; b++) if (bbe[b]) ref_m[ba][8*b +: 8] = bwd[8*b +: 8];
      if (ae && awe) for (int b = 0; b < 4; b++) if (abe[b]) ref_m[aa][8*b +: 8] = awd[8*b +: 8];
    end
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
