// tb_main_fsm: checks the main (ladder) state machine on its own. Simple
// responders stand in for the sub-machines: each answers its go with done
// after a random delay, and the conversion responder returns a random inf.
// For random scalars the testbench checks: the set-up writes of the ladder
// points (X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2), one addition and one
// doubling per bit below the leading one bit, the parameter addresses put
// out before each trigger (target point first for the addition, the point
// to double for the doubling, chosen by the key bit from the top down), that
// no trigger comes while a sub-machine is running, one conversion, done and
// inf. m = 0 must give inf with no ladder step.
module tb_main_fsm;
  import ecc_pkg::*;
  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] m = '0;
  logic busy, done, inf, go_add, go_dbl, go_conv, own_active;
  logic add_done = 0, dbl_done = 0, conv_done = 0, conv_inf = 0;
  logic [ADDR_W-1:0] param_addr [4];
  ctrl_t ctrl;

  main_fsm dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Responders.
  int pending = 0;
  always @(posedge clk) begin
    if (go_add || go_dbl || go_conv) begin
      checks++;
      if (pending != 0) begin failures++; $display("FAIL trigger while a sub-machine runs"); end
    end
  end
  task automatic respond(ref logic d, input bit is_conv);
    repeat ($urandom_range(1, 6)) @(negedge clk);
    if (is_conv) conv_inf = 1'($urandom);
    d = 1'b1;
    @(negedge clk);
    d = 1'b0;
    pending = 0;
  endtask
  always @(posedge clk) if (go_add)  begin pending = 1; fork respond(add_done, 0); join_none end
  always @(posedge clk) if (go_dbl)  begin pending = 1; fork respond(dbl_done, 0); join_none end
  always @(posedge clk) if (go_conv) begin pending = 1; fork respond(conv_done, 1); join_none end

  // Observed events.
  typedef logic [ADDR_W-1:0] quad_t [4];
  quad_t add_pa [$];
  quad_t dbl_pa [$];
  int n_conv = 0, n_done = 0;
  logic [3:0] init_seen;
  always @(posedge clk) if (rst_n) begin
    if (go_add)  add_pa.push_back(param_addr);
    if (go_dbl)  dbl_pa.push_back(param_addr);
    if (go_conv) n_conv++;
    if (done)    n_done++;
    if (own_active) begin
      if (ctrl.pa.we && ctrl.pa.addr == A_X1 && ctrl.pa.wsrc == SRC_RDA)  init_seen[0] = 1;
      if (ctrl.pb.we && ctrl.pb.addr == A_X2 && ctrl.pb.wsrc == SRC_ADD1 &&
          ctrl.add1_a == SRC_SQR1 && ctrl.sqr1_src == SRC_SQR0 &&
          ctrl.sqr0_src == SRC_RDA && ctrl.add1_b == SRC_RDB)             init_seen[1] = 1;
      if (ctrl.pa.we && ctrl.pa.addr == A_Z1 && ctrl.pa.wsrc == SRC_ONE)  init_seen[2] = 1;
      if (ctrl.pb.we && ctrl.pb.addr == A_Z2 && ctrl.pb.wsrc == SRC_SQR0 &&
          ctrl.sqr0_src == SRC_RDA)                                       init_seen[3] = 1;
    end
  end

  task automatic run(logic [N-1:0] k);
    int l, j;
    bit got_inf;
    add_pa.delete(); dbl_pa.delete(); n_conv = 0; n_done = 0; init_seen = '0;
    l = 0;
    for (int i = N-1; i >= 0; i--) if (k[i]) begin l = i + 1; break; end
    @(negedge clk); start = 1; m = k;
    @(negedge clk); start = 0; m = '0;
    while (!done) @(negedge clk);
    got_inf = inf;
    @(negedge clk);
    checks++;
    if (n_done != 1) begin failures++; $display("FAIL done pulses %0d", n_done); end
    if (l == 0) begin
      checks += 3;
      if (!got_inf) begin failures++; $display("FAIL m=0 without inf"); end
      if (add_pa.size() != 0 || n_conv != 0) begin failures++; $display("FAIL m=0 ran the ladder"); end
      if (busy) begin failures++; $display("FAIL still busy"); end
      return;
    end
    checks += 4;
    if (init_seen != 4'hf) begin failures++; $display("FAIL set-up writes %b", init_seen); end
    if (add_pa.size() != l - 1 || dbl_pa.size() != l - 1) begin
      failures++; $display("FAIL %0d/%0d steps for %0d bits", add_pa.size(), dbl_pa.size(), l);
    end
    if (n_conv != 1) begin failures++; $display("FAIL %0d conversions", n_conv); end
    if (got_inf !== conv_inf) begin failures++; $display("FAIL inf not taken from conversion"); end
    j = 0;
    for (int i = l - 2; i >= 0 && j < add_pa.size(); i--, j++) begin
      quad_t ea;
      logic [ADDR_W-1:0] d0, d1;
      if (k[i]) ea = '{A_X1, A_Z1, A_X2, A_Z2};
      else      ea = '{A_X2, A_Z2, A_X1, A_Z1};
      d0 = k[i] ? A_X2 : A_X1;
      d1 = k[i] ? A_Z2 : A_Z1;
      checks += 2;
      if (add_pa[j] != ea) begin failures++; $display("FAIL add parameters, bit %0d", i); end
      if (dbl_pa[j][0] != d0 || dbl_pa[j][1] != d1) begin
        failures++; $display("FAIL dbl parameters, bit %0d", i);
      end
    end
  endtask

  initial begin
    logic [223:0] t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run('h2d);
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < 7; k++) t[k*32 +: 32] = $urandom;
      run(t[N-1:0] >> (r * 40));
    end
    run('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
