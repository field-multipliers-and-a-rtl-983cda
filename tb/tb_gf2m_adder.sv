// tb_gf2m_adder: checks field addition over GF(2^191): a + b against the
// reference, a + a = 0 and a + 0 = a, for random operands.
module tb_gf2m_adder;
  import gf_ref_pkg::*;
  localparam int N = 191;
  logic [N-1:0] a, b, s;
  int checks = 0, failures = 0;

  gf2m_adder dut (.a, .b, .s);

  initial begin
    for (int i = 0; i < 100; i++) begin
      fe_t x = fe_rand(), y = fe_rand();
      logic [N-1:0] e;
      for (int k = 0; k < N; k++) e[k] = (x[k] != y[k]);
      a = x; b = y; #1;
      checks++; if (s !== e) begin failures++; $display("FAIL sum"); end
      b = x; #1;
      checks++; if (s !== '0) begin failures++; $display("FAIL a+a"); end
      b = '0; #1;
      checks++; if (s !== x) begin failures++; $display("FAIL a+0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
