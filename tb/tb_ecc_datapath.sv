// tb_ecc_datapath: checks the datapath by driving control words directly.
// Operands are written through the host port; then a short program reads
// two words, squares twice through the chained squarers, adds, starts both
// multipliers in the same cycle, loads the squaring register, and writes
// results back on both ports. The host reads the results, which are compared
// with the reference arithmetic. Also checks the multiplier ready flags
// (4-cycle multiplications) and the zero flag of port A's read data.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctrl = CTRL_IDLE;
  logic host_sel = 1'b1, host_rd = 1'b0, host_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [N-1:0] host_wdata = '0, host_rdata;
  logic mul0_ready, mul1_ready, rda_zero;

  ecc_datapath dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hw(logic [ADDR_W-1:0] a, fe_t d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic hr(logic [ADDR_W-1:0] a, output fe_t d);
    @(negedge clk); host_rd = 1; host_addr = a;
    @(negedge clk); host_rd = 0; d = host_rdata;
  endtask
  task automatic expect_word(logic [ADDR_W-1:0] a, fe_t e, string what);
    fe_t r;
    hr(a, r);
    checks++;
    if (r !== e) begin failures++; $display("FAIL %s\n got %h\n exp %h", what, r, e); end
  endtask

  task automatic program_run();
    fe_t a0, a1, e4, e5, e6, e7, e8, p0, p1;
    a0 = fe_rand(); a1 = fe_rand();
    hw(0, a0); hw(1, a1); hw(2, '0);
    @(negedge clk); host_sel = 0;
    // read words 0 and 1
    ctrl = CTRL_IDLE; ctrl.pa = rd_dir(0); ctrl.pb = rd_dir(1);
    @(negedge clk);
    ctrl = CTRL_IDLE;
    ctrl.sqr0_src = SRC_RDA; ctrl.sqr1_src = SRC_SQR0;
    ctrl.add1_a = SRC_SQR1; ctrl.add1_b = SRC_RDB;
    ctrl.pa = wr_dir(4, SRC_ADD1);
    ctrl.pb = wr_dir(5, SRC_SQR0);
    ctrl.m0 = mul_go(SRC_RDA, SRC_RDB);
    ctrl.m1 = mul_go(SRC_SQR0, SRC_ADD1);
    ctrl.sq_ld = 1; ctrl.sq_src = SRC_SQR1;
    @(negedge clk);
    ctrl = CTRL_IDLE;
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (mul0_ready || mul1_ready) begin failures++; $display("FAIL ready during multiplication"); end
      @(negedge clk);
    end
    checks++;
    if (!mul0_ready || !mul1_ready) begin failures++; $display("FAIL not ready after 4 cycles"); end
    ctrl.add0_a = SRC_MUL0; ctrl.add0_b = SRC_MUL1;
    ctrl.pa = wr_dir(6, SRC_ADD0);
    ctrl.pb = wr_dir(7, SRC_SQREG);
    @(negedge clk);
    ctrl = CTRL_IDLE;
    ctrl.sqr0_src = SRC_MUL1;
    ctrl.pa = wr_dir(8, SRC_SQR0);
    ctrl.pb = wr_dir(9, SRC_ONE);
    @(negedge clk);
    ctrl = CTRL_IDLE; ctrl.pa = rd_dir(2);
    @(negedge clk);
    ctrl = CTRL_IDLE;
    checks++;
    if (!rda_zero) begin failures++; $display("FAIL zero flag"); end
    @(negedge clk); host_sel = 1;
    e5 = fe_sqr(a0);
    e7 = fe_sqr(e5);
    e4 = e7 ^ a1;
    p0 = fe_mul(a0, a1);
    p1 = fe_mul(e5, e4);
    e6 = p0 ^ p1;
    e8 = fe_sqr(p1);
    expect_word(4, e4, "x^4 + y");
    expect_word(5, e5, "x^2");
    expect_word(6, e6, "mul0 + mul1");
    expect_word(7, e7, "squaring register");
    expect_word(8, e8, "square of mul1");
    expect_word(9, 1, "constant one");
    expect_word(0, a0, "operand untouched");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) program_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
