// tb_gf2m_squarer: checks the combinational squarer for GF(2^191) against
// the reference multiplication a*a, for corner values and random inputs.
module tb_gf2m_squarer;
  import gf_ref_pkg::*;
  localparam int N = 191;
  logic [N-1:0] a, q;
  int checks = 0, failures = 0;

  gf2m_squarer dut (.a, .q);

  task automatic one(fe_t x);
    a = x;
    #1;
    checks++;
    if (q !== fe_sqr(x)) begin
      failures++;
      $display("FAIL a=%h\n got %h\n exp %h", x, q, fe_sqr(x));
    end
  endtask

  initial begin
    one('0); one(1); one('1); one(fe_t'(1) << 190); one(fe_t'(1) << 96);
    for (int i = 0; i < 200; i++) one(fe_rand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
