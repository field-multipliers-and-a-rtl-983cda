// tb_mult_word_lengths: runs the two GF(2^191) multipliers at every word
// length of the area comparison (D = 1, 2, 4, 8, 16, 32, 50, 64, 100), one
// LFSR and one Massey-Omura instance per word length, all fed the same
// operands. For each instance it checks that ready stays low for the first
// ceil(191/D) - 1 cycles after start, that the product is there in cycle
// ceil(191/D), and that it is held afterwards while the operand inputs
// change. The LFSR product is compared with the polynomial-basis reference
// (gf_ref_pkg); the Massey-Omura product with a reference that maps both
// operands into Z2[x]/(x^383 - 1), multiplies there by cyclic convolution and
// reads the product back (the same method as tb_gf2m_mo_mult). The choice of
// word lengths follows the comparison; operand values and the number of
// trials are this testbench's own.
module tb_mult_word_lengths;
  import gf_ref_pkg::*;
  localparam int N = 191, P = 2 * N + 1;
  localparam int NL = 9;
  localparam int DS [NL] = '{1, 2, 4, 8, 16, 32, 50, 64, 100};
  localparam int SETTLE = N + 8;   // cycles per trial, longer than any latency

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [N-1:0] exp_lfsr = '0, exp_mo = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- Massey-Omura reference (type II optimal normal basis, p = 383) ----
  int pw [N];
  initial begin
    pw[0] = 1;
    for (int i = 1; i < N; i++) pw[i] = (pw[i-1] * 2) % P;
  end

  function automatic logic [N-1:0] mo_ref(logic [N-1:0] x, logic [N-1:0] y);
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

  // ---- one LFSR and one Massey-Omura multiplier per word length ----
  for (genvar g = 0; g < NL; g++) begin : lane
    localparam int D  = DS[g];
    localparam int NW = (N + D - 1) / D;

    logic [N-1:0] p_lfsr, p_mo;
    logic rdy_lfsr, rdy_mo;

    gf2m_lfsr_mult #(.N(N), .D(D)) u_lfsr (
      .clk, .rst_n, .start, .la(start), .lb(start), .a, .b,
      .p(p_lfsr), .ready(rdy_lfsr));

    gf2m_mo_mult #(.N(N), .D(D)) u_mo (
      .clk, .rst_n, .start, .a, .b, .p(p_mo), .ready(rdy_mo));

    // k = number of rising edges since (and including) the start edge
    int k = 0;
    always @(posedge clk)
      if (start) k <= 1;
      else if (k != 0 && k < 1000) k <= k + 1;

    always @(negedge clk) begin
      if (k >= 1 && k < NW) begin
        checks++;
        if (rdy_lfsr !== 1'b0 || rdy_mo !== 1'b0) begin
          failures++;
          $display("FAIL D=%0d ready high in cycle %0d of %0d", D, k, NW);
        end
      end
      if (k == NW || k == NW + 5) begin
        checks += 2;
        if (rdy_lfsr !== 1'b1 || p_lfsr !== exp_lfsr) begin
          failures++;
          $display("FAIL D=%0d LFSR cycle %0d ready=%b\n got %h\n exp %h",
                   D, k, rdy_lfsr, p_lfsr, exp_lfsr);
        end
        if (rdy_mo !== 1'b1 || p_mo !== exp_mo) begin
          failures++;
          $display("FAIL D=%0d M-O cycle %0d ready=%b\n got %h\n exp %h",
                   D, k, rdy_mo, p_mo, exp_mo);
        end
      end
    end
  end

  task automatic run(logic [N-1:0] x, logic [N-1:0] y);
    exp_lfsr = fe_mul(x, y);
    exp_mo   = mo_ref(x, y);
    @(negedge clk); start = 1'b1; a = x; b = y;
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < SETTLE; c++) begin
      a = fe_rand(); b = fe_rand();  // inputs change while the word loop runs
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('1, '1);
    run(fe_t'(1) << (N - 1), fe_rand());
    for (int t = 0; t < 8; t++) run(fe_rand(), fe_rand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
