// tb_ecc_coprocessor: end-to-end test of the point multiplication
// coprocessor at its default size (GF(2^191), 50-bit multiplier words).
//
// For each case the testbench picks a curve and a point on it (random x, y
// and a; b follows from the curve equation), writes x, y and b through the
// host port, starts the coprocessor with a scalar m, and compares the affine
// result with mP from the reference model (gf_ref_pkg, affine double-and-add
// with Euclidean inversion). Cases: m = 1, 2, 3, small and random full-size
// scalars, m = 0 (infinity), and a point of order 2 (x = 0) with m = 1, 2, 3,
// which reaches the two special cases of the affine conversion.
//
// It also checks the cost of a ladder step (6 multiplications per key bit:
// 4 for the addition, 2 for the doubling) and counts how often each
// mechanism happened: addition and doubling with key bit 1 and with key bit
// 0, indirect (parameter) addressing, both multipliers busy in the same
// cycle, the inversion, each special result. A mechanism that never
// happened counts as a failure.
module tb_ecc_coprocessor;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] m = '0;
  logic busy, done, inf;
  logic host_rd = 1'b0, host_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [N-1:0] host_wdata = '0, host_rdata;

  ecc_coprocessor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_add1 = 0, n_add0 = 0, n_dbl1 = 0, n_dbl0 = 0, n_param = 0;
  int n_par_mul = 0, n_inv = 0, n_inf_z1 = 0, n_negp = 0, n_mzero = 0;
  int n_mstart = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.go_add  &&  dut.u_main.key_bit) n_add1++;
    if (dut.go_add  && !dut.u_main.key_bit) n_add0++;
    if (dut.go_dbl  &&  dut.u_main.key_bit) n_dbl1++;
    if (dut.go_dbl  && !dut.u_main.key_bit) n_dbl0++;
    if ((dut.ctrl_in[1].pa.use_param && dut.active[1]) ||
        (dut.ctrl_in[2].pa.use_param && dut.active[2])) n_param++;
    if (!dut.mul0_ready && !dut.mul1_ready) n_par_mul++;
    if (dut.u_conv.cnt_load) n_inv++;
    if (dut.u_conv.inf_set) n_inf_z1++;
    if (dut.active[3] && dut.ctrl_in[3].pa.we &&
        dut.ctrl_in[3].pa.addr == A_RX && dut.ctrl_in[3].pa.wsrc == SRC_RDA) n_negp++;
    if (dut.active[0] && dut.ctrl_in[0].pa.we && dut.ctrl_in[0].pa.addr == A_RX) n_mzero++;
    if (dut.ctrl.m0.start) n_mstart++;
    if (dut.ctrl.m1.start) n_mstart++;
  end

  task automatic host_write(logic [ADDR_W-1:0] a, logic [N-1:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(logic [ADDR_W-1:0] a, output logic [N-1:0] d);
    @(negedge clk);
    host_rd = 1'b1; host_addr = a;
    @(negedge clk);
    host_rd = 1'b0;
    d = host_rdata;
  endtask

  function automatic int bitlen(logic [N-1:0] v);
    for (int i = N-1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  task automatic run_case(string name, pt_t p, fe_t a, fe_t b, logic [N-1:0] k);
    pt_t exp_r;
    logic [N-1:0] rx, ry;
    int c0, ms0, steps;
    exp_r = pt_mul(k, p, a);
    host_write(A_X, p.x);
    host_write(A_Y, p.y);
    host_write(A_B, b);
    @(negedge clk);
    start = 1'b1; m = k;
    ms0 = n_mstart;
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    c0 = cyc - c0;
    @(negedge clk);
    host_read(A_RX, rx);
    host_read(A_RY, ry);
    checks++;
    if (inf !== exp_r.inf) begin
      failures++;
      $display("FAIL %s: inf=%0b expected %0b", name, inf, exp_r.inf);
    end
    if (!exp_r.inf) begin
      checks += 2;
      if (rx !== exp_r.x) begin failures++; $display("FAIL %s: x3 mismatch\n got %h\n exp %h", name, rx, exp_r.x); end
      if (ry !== exp_r.y) begin failures++; $display("FAIL %s: y3 mismatch\n got %h\n exp %h", name, ry, exp_r.y); end
    end else begin
      checks++;
      if (rx != '0 || ry != '0) begin failures++; $display("FAIL %s: result words not cleared", name); end
    end
    $display("%s: m has %0d bits, %0d cycles, %0d multiplications", name, bitlen(k), c0,
             n_mstart - ms0);
  endtask

  // Multiplications per ladder step: count starts between a go_add and the
  // done of the doubling that follows it.
  int step_muls = 0, step_bad = 0, steps_seen = 0;
  logic in_step = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.go_add) begin in_step <= 1'b1; step_muls <= 0; end
    else if (in_step) begin
      step_muls <= step_muls + int'(dut.ctrl.m0.start) + int'(dut.ctrl.m1.start);
      if (dut.dbl_done) begin
        in_step <= 1'b0;
        steps_seen++;
        if (step_muls + int'(dut.ctrl.m0.start) + int'(dut.ctrl.m1.start) != 6) step_bad++;
      end
    end
  end

  initial begin
    pt_t p;
    fe_t a, b;
    logic [N-1:0] k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Random curves and points.
    for (int t = 0; t < 4; t++) begin
      p.inf = 1'b0; p.x = fe_rand(); p.y = fe_rand(); a = fe_rand();
      b = curve_b(p.x, p.y, a);
      case (t)
        0: begin
          run_case("m=1", p, a, b, 1);
          run_case("m=2", p, a, b, 2);
          run_case("m=3", p, a, b, 3);
          run_case("m=0", p, a, b, 0);
          run_case("m=0x2d", p, a, b, 'h2d);
        end
        1: begin
          k = {fe_rand()}; k[N-1] = 1'b1;
          run_case("m=random full length", p, a, b, k);
        end
        2: begin
          k = '1;
          run_case("m=all ones", p, a, b, k);
        end
        default: begin
          k = fe_rand() >> ($urandom % 150);
          run_case("m=random", p, a, b, k);
        end
      endcase
    end

    // Point of order 2: x = 0, y^2 = b.
    p.inf = 1'b0; p.x = '0; p.y = fe_rand(); a = fe_rand();
    b = fe_sqr(p.y);
    run_case("order-2 point, m=1", p, a, b, 1);
    run_case("order-2 point, m=2", p, a, b, 2);
    run_case("order-2 point, m=3", p, a, b, 3);

    // Cost of a ladder step.
    checks++;
    if (step_bad != 0 || steps_seen == 0) begin
      failures++;
      $display("FAIL: %0d of %0d ladder steps did not take 6 multiplications", step_bad, steps_seen);
    end

    // Mechanisms.
    $display("mechanisms: add(bit1)=%0d add(bit0)=%0d dbl(bit1)=%0d dbl(bit0)=%0d indirect=%0d",
             n_add1, n_add0, n_dbl1, n_dbl0, n_param);
    $display("            parallel-mul cycles=%0d inversions=%0d inf(Z1=0)=%0d -P(Z2=0)=%0d m=0:%0d",
             n_par_mul, n_inv, n_inf_z1, n_negp, n_mzero);
    checks++; if (n_add1 == 0)    begin failures++; $display("FAIL: no key-bit-1 addition"); end
    checks++; if (n_add0 == 0)    begin failures++; $display("FAIL: no key-bit-0 addition"); end
    checks++; if (n_dbl1 == 0)    begin failures++; $display("FAIL: no key-bit-1 doubling"); end
    checks++; if (n_dbl0 == 0)    begin failures++; $display("FAIL: no key-bit-0 doubling"); end
    checks++; if (n_param == 0)   begin failures++; $display("FAIL: no indirect access"); end
    checks++; if (n_par_mul == 0) begin failures++; $display("FAIL: multipliers never parallel"); end
    checks++; if (n_inv == 0)     begin failures++; $display("FAIL: no inversion"); end
    checks++; if (n_inf_z1 == 0)  begin failures++; $display("FAIL: no infinity result"); end
    checks++; if (n_negp == 0)    begin failures++; $display("FAIL: no -P result"); end
    checks++; if (n_mzero == 0)   begin failures++; $display("FAIL: no m=0 case"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
