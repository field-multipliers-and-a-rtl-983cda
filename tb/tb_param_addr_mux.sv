// tb_param_addr_mux: checks the control and address multiplexer. Random
// control words from four machines, one or none active, random parameter
// addresses: the output must be the active machine's word, with every port
// address that asks for a parameter replaced by that parameter address and
// direct addresses passed unchanged; with no machine active, the idle word.
module tb_param_addr_mux;
  import ecc_pkg::*;
  localparam int NM = 4;
  ctrl_t ctrl_in [NM];
  logic [NM-1:0] active;
  logic [ADDR_W-1:0] param_addr [4];
  ctrl_t ctrl_out;

  param_addr_mux #(.NM(NM)) dut (.*);

  int checks = 0, failures = 0, n_par = 0, n_dir = 0;

  function automatic ctrl_t rnd_ctrl();
    logic [$bits(ctrl_t)-1:0] v;
    for (int k = 0; k < $bits(ctrl_t); k++) v[k] = 1'($urandom);
    return ctrl_t'(v);
  endfunction

  function automatic port_req_t expect_port(port_req_t r);
    port_req_t o = r;
    if (r.use_param) o.addr = param_addr[r.pidx];
    o.use_param = 1'b0;
    return o;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      ctrl_t e;
      int sel;
      for (int i = 0; i < NM; i++) ctrl_in[i] = rnd_ctrl();
      for (int i = 0; i < 4; i++) param_addr[i] = ADDR_W'($urandom);
      sel = $urandom_range(0, NM);            // NM = none active
      active = (sel == NM) ? '0 : NM'(1) << sel;
      #1;
      if (sel == NM) e = CTRL_IDLE;
      else begin
        e = ctrl_in[sel];
        e.pa = expect_port(ctrl_in[sel].pa);
        e.pb = expect_port(ctrl_in[sel].pb);
        if (ctrl_in[sel].pa.use_param) n_par++; else n_dir++;
      end
      checks++;
      if (ctrl_out !== e) begin
        failures++;
        $display("FAIL t=%0d sel=%0d", t, sel);
      end
    end
    checks++;
    if (n_par == 0 || n_dir == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
