// tb_conv_fsm: checks the affine conversion machine on the real datapath.
// Random projective ladder points P1 = (X1 : Z1), P2 = (X2 : Z2) and a base
// point (x, y) are written to memory. The result words must hold
//     x3 = X1/Z1
//     y3 = (x + x3) * [(X1 + x Z1)(X2 + x Z2) + (x^2 + y) Z1 Z2] / (x Z1 Z2) + y
// evaluated with the reference arithmetic (Euclidean inversion). Also
// checked: Z1 = 0 gives inf and cleared results, Z2 = 0 gives (x, x + y).
module tb_conv_fsm;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic mul0_ready, mul1_ready, rda_zero, active, done, inf;
  ctrl_t ctrl_fsm, ctrl;
  ctrl_t ctrl_arr [1];
  logic [ADDR_W-1:0] param_addr [4];
  logic host_sel = 1'b1, host_rd = 1'b0, host_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [N-1:0] host_wdata = '0, host_rdata;

  conv_fsm dut (.clk, .rst_n, .go, .mul0_ready, .mul1_ready, .rda_zero,
                .ctrl(ctrl_fsm), .active, .done, .inf);
  assign ctrl_arr[0] = ctrl_fsm;
  param_addr_mux #(.NM(1)) u_mux (.ctrl_in(ctrl_arr), .active(active),
                                  .param_addr, .ctrl_out(ctrl));
  ecc_datapath u_dp (.clk, .rst_n, .ctrl, .host_sel, .host_rd, .host_we,
                     .host_addr, .host_wdata, .host_rdata,
                     .mul0_ready, .mul1_ready, .rda_zero);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nmul = 0;
  always @(posedge clk) nmul += int'(ctrl.m0.start) + int'(ctrl.m1.start);

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run(int kind);
    fe_t x, y, x1, z1, x2, z2, ex, ey, r, inv, num;
    bit einf;
    int cyc;
    x = fe_rand(); y = fe_rand(); x1 = fe_rand(); z1 = fe_rand();
    x2 = fe_rand(); z2 = fe_rand();
    if (kind == 1) z1 = '0;
    if (kind == 2) z2 = '0;
    hw(A_X, x); hw(A_Y, y); hw(A_X1, x1); hw(A_Z1, z1); hw(A_X2, x2); hw(A_Z2, z2);
    hw(A_RX, fe_rand()); hw(A_RY, fe_rand());
    einf = 1'b0;
    if (kind == 1) begin einf = 1'b1; ex = '0; ey = '0; end
    else if (kind == 2) begin ex = x; ey = x ^ y; end
    else begin
      inv = fe_inv(fe_mul(x, fe_mul(z1, z2)));
      ex  = fe_mul(x1, fe_inv(z1));
      num = fe_mul(x1 ^ fe_mul(x, z1), x2 ^ fe_mul(x, z2)) ^
            fe_mul(fe_sqr(x) ^ y, fe_mul(z1, z2));
      ey  = fe_mul(fe_mul(x ^ ex, num), inv) ^ y;
    end
    @(negedge clk); host_sel = 0; go = 1;
    @(negedge clk); go = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk); host_sel = 1;
    $display("case %0d: %0d cycles", kind, cyc);
    checks++; if (inf !== einf) begin failures++; $display("FAIL inf"); end
    hr(A_RX, r); checks++; if (r !== ex) begin failures++; $display("FAIL x3 kind %0d", kind); end
    hr(A_RY, r); checks++; if (r !== ey) begin failures++; $display("FAIL y3 kind %0d", kind); end
  endtask

  initial begin
    param_addr = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1); run(2);
    for (int i = 0; i < 4; i++) run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
