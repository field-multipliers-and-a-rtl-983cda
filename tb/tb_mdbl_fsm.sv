// tb_mdbl_fsm: checks the point doubling machine on the real datapath.
// Random ladder points and b are written to memory; the parameter addresses
// name P1 or P2, as the two key-bit values do. After the machine finishes,
// the doubled point must hold
//     X' = X^4 + b*Z^4,  Z' = X^2 * Z^2
// computed with the reference arithmetic, the other point must be
// unchanged, and the doubling must use 2 multiplications and take 7 cycles
// from go to done.
module tb_mdbl_fsm;
  import ecc_pkg::*;
  import gf_ref_pkg::*;
  localparam int N = 191;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  logic mul0_ready, mul1_ready, rda_zero, active, done;
  ctrl_t ctrl_fsm, ctrl;
  ctrl_t ctrl_arr [1];
  logic [ADDR_W-1:0] param_addr [4];
  logic host_sel = 1'b1, host_rd = 1'b0, host_we = 1'b0;
  logic [ADDR_W-1:0] host_addr = '0;
  logic [N-1:0] host_wdata = '0, host_rdata;

  mdbl_fsm dut (.clk, .rst_n, .go, .mul0_ready, .mul1_ready,
                .ctrl(ctrl_fsm), .active, .done);
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

  task automatic run(bit order);
    fe_t b, x1, z1, x2, z2, xa, za, xb, zb, ez, ex, r;
    int cyc, n0;
    b = fe_rand(); x1 = fe_rand(); z1 = fe_rand(); x2 = fe_rand(); z2 = fe_rand();
    hw(A_B, b); hw(A_X1, x1); hw(A_Z1, z1); hw(A_X2, x2); hw(A_Z2, z2);
    if (order) begin param_addr = '{A_X1, A_Z1, A_X2, A_Z2}; xa = x1; za = z1; xb = x2; zb = z2; end
    else       begin param_addr = '{A_X2, A_Z2, A_X1, A_Z1}; xa = x2; za = z2; xb = x1; zb = z1; end
    ex = fe_sqr(fe_sqr(xa)) ^ fe_mul(b, fe_sqr(fe_sqr(za)));
    ez = fe_mul(fe_sqr(xa), fe_sqr(za));
    @(negedge clk); host_sel = 0; go = 1; n0 = nmul;
    @(negedge clk); go = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk); host_sel = 1;
    checks++; if (cyc != 7) begin failures++; $display("FAIL cycles %0d", cyc); end
    checks++; if (nmul - n0 != 2) begin failures++; $display("FAIL %0d multiplications", nmul - n0); end
    hr(param_addr[0], r); checks++; if (r !== ex) begin failures++; $display("FAIL X'"); end
    hr(param_addr[1], r); checks++; if (r !== ez) begin failures++; $display("FAIL Z'"); end
    hr(param_addr[2], r); checks++; if (r !== xb) begin failures++; $display("FAIL other X changed"); end
    hr(param_addr[3], r); checks++; if (r !== zb) begin failures++; $display("FAIL other Z changed"); end
  endtask

  initial begin
    param_addr = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) run(i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
