// tb_gf2m_mo_mult: checks the Massey-Omura multiplier (N = 191, 50-bit
// words) against a reference that works in a different representation.
// With gamma a primitive 383rd root of unity, the type II normal basis
// element beta_i = gamma^(2^i) + gamma^(-2^i). An operand is mapped to a
// polynomial in Z2[x]/(x^383 - 1), the two polynomials are multiplied by
// cyclic convolution, the constant term is folded away using
// 1 = x + x^2 + ... + x^382 (valid modulo the 383rd cyclotomic polynomial),
// and the product bit k is read off at exponent 2^k mod 383. Also checks
// that the all-ones element is the unit, that a*a is a cyclic shift of a,
// and that a multiplication takes 4 cycles.
module tb_gf2m_mo_mult;
  localparam int N = 191, P = 2 * N + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] a = '0, b = '0, p;
  logic ready;

  gf2m_mo_mult dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pw [N];
  initial begin
    pw[0] = 1;
    for (int i = 1; i < N; i++) pw[i] = (pw[i-1] * 2) % P;
  end

  function automatic logic [N-1:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y);
    logic [P-1:0] px, py, pc;
    logic [N-1:0] r;
    px = '0; py = '0; pc = '0;
    for (int i = 0; i < N; i++) begin
      if (x[i]) begin px[pw[i]] ^= 1'b1; px[P - pw[i]] ^= 1'b1; end
      if (y[i]) begin py[pw[i]] ^= 1'b1; py[P - pw[i]] ^= 1'b1; end
    end
    for (int i = 0; i < P; i++)
      if (px[i]) for (int j = 0; j < P; j++)
        if (py[j]) pc[(i + j) % P] ^= 1'b1;
    if (pc[0]) pc = ~pc;            // fold the constant term
    for (int k = 0; k < N; k++) r[k] = pc[pw[k]];
    return r;
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [223:0] t;
    for (int k = 0; k < 7; k++) t[k*32 +: 32] = $urandom;
    return t[N-1:0];
  endfunction

  task automatic mul(logic [N-1:0] x, logic [N-1:0] y, logic [N-1:0] e, string what);
    int lat;
    @(negedge clk); start = 1; a = x; b = y;
    @(negedge clk); start = 0; a = rnd(); b = rnd();
    lat = 1;
    while (!ready) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
    if (p !== e) begin failures++; $display("FAIL %s\n got %h\n exp %h", what, p, e); end
  endtask

  initial begin
    logic [N-1:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    x = rnd();
    mul(x, '1, x, "a * 1");
    mul('1, '1, '1, "1 * 1");
    mul(x, x, {x[N-2:0], x[N-1]}, "a * a");
    mul('0, x, '0, "0 * a");
    for (int t = 0; t < 30; t++) begin
      x = rnd(); y = rnd();
      mul(x, y, ref_mul(x, y), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
