// tb_operand_dpram: checks the dual-ported operand memory: writes on both
// ports in the same cycle, reads on both ports with one cycle of latency,
// read data held while no read is requested, and random traffic against a
// model array.
module tb_operand_dpram;
  localparam int N = 191, W = 16, AW = 4;
  logic clk = 1'b0;
  logic a_rd = 0, a_we = 0, b_rd = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [N-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [N-1:0] model [W];

  operand_dpram dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [223:0] t;
    for (int k = 0; k < 7; k++) t[k*32 +: 32] = $urandom;
    return t[N-1:0];
  endfunction

  initial begin
    logic [N-1:0] ea, eb;
    logic va, vb;
    // Fill every word, two at a time.
    for (int i = 0; i < W; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i);   a_wdata = rnd(); model[i]   = a_wdata;
      b_we = 1; b_addr = AW'(i+1); b_wdata = rnd(); model[i+1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // Read back on both ports.
    for (int i = 0; i < W; i++) begin
      @(negedge clk); a_rd = 1; a_addr = AW'(i); b_rd = 1; b_addr = AW'(W-1-i);
      @(negedge clk); a_rd = 0; b_rd = 0;
      checks += 2;
      if (a_rdata !== model[i])     begin failures++; $display("FAIL A read %0d", i); end
      if (b_rdata !== model[W-1-i]) begin failures++; $display("FAIL B read %0d", W-1-i); end
      // held
      a_addr = AW'(i+1); @(negedge clk);
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("FAIL A hold %0d", i); end
    end
    // Random traffic.
    va = 0; vb = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (va) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL A random"); end end
      if (vb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL B random"); end end
      a_we = $urandom_range(0, 1); a_rd = !a_we && $urandom_range(0, 1);
      b_we = $urandom_range(0, 1); b_rd = !b_we && $urandom_range(0, 1);
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      if (a_we && b_we && a_addr == b_addr) b_addr = a_addr + 1'b1;
      a_wdata = rnd(); b_wdata = rnd();
      va = a_rd; vb = b_rd;
      if (a_rd) ea = model[a_addr];
      if (b_rd) eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
