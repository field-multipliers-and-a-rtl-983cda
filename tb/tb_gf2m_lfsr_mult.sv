// tb_gf2m_lfsr_mult: checks the word-serial LFSR multiplier at N = 191,
// D = 50 against the reference carry-less multiply-and-reduce. Random and
// corner operands; operands given with start, and operand a loaded in an
// earlier cycle. Checks that a multiplication takes 4 cycles (ready low for
// 3 cycles after start, product valid in the 4th) and that the product is
// held while idle.
module tb_gf2m_lfsr_mult;
  import gf_ref_pkg::*;
  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, la = 1'b0, lb = 1'b0;
  logic [N-1:0] a = '0, b = '0, p;
  logic ready;

  gf2m_lfsr_mult dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(fe_t x, fe_t y, bit preload_a);
    int lat;
    fe_t exp_p = fe_mul(x, y);
    if (preload_a) begin
      @(negedge clk); la = 1'b1; a = x; b = '1;
      @(negedge clk); la = 1'b0; a = '1;        // garbage on a afterwards
      start = 1'b1; lb = 1'b1; b = y;
    end else begin
      @(negedge clk); start = 1'b1; la = 1'b1; lb = 1'b1; a = x; b = y;
    end
    @(negedge clk); start = 1'b0; la = 1'b0; lb = 1'b0; a = '1; b = '1;
    lat = 1;
    while (!ready) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("FAIL latency %0d, expected 4", lat); end
    checks++;
    if (p !== exp_p) begin failures++; $display("FAIL product\n a=%h\n b=%h\n got %h\n exp %h", x, y, p, exp_p); end
    repeat (2) @(negedge clk);
    checks++;
    if (p !== exp_p) begin failures++; $display("FAIL product not held"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mul('0, fe_rand(), 0);
    mul(fe_rand(), 1, 0);
    mul(1, fe_rand(), 0);
    mul('1, '1, 0);
    mul(fe_t'(1) << 190, fe_t'(1) << 190, 0);
    for (int i = 0; i < 40; i++) mul(fe_rand(), fe_rand(), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
