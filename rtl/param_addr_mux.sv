// param_addr_mux: control and address multiplexer with indirect addressing.
//
// Several state machines share one datapath, and only one of them is active
// at a time. This block passes the control word of the active machine to the
// datapath. For each of the two operand-memory ports the active machine may
// ask for a direct address, which it generates itself (temporaries, fixed
// locations), or for one of the four parameter addresses that the main state
// machine put on its parameter address port before it triggered the machine.
// The second case is the indirect addressing that lets the point addition and
// doubling machines work in place on whichever ladder point the current key
// bit selects, without copying points into temporary registers.
//
// Purely combinational. active must be one-hot or zero (the coprocessor
// asserts this); with no machine active the
// idle control word (no access, no start) is passed on.
module param_addr_mux
  import ecc_pkg::*;
#(
  parameter int unsigned NM = 4    // number of state machines
) (
  input  ctrl_t             ctrl_in [NM],
  input  logic [NM-1:0]     active,
  input  logic [ADDR_W-1:0] param_addr [4],
  output ctrl_t             ctrl_out
);
  function automatic port_req_t resolve(port_req_t r,
                                        logic [ADDR_W-1:0] pa [4]);
    port_req_t o = r;
    if (r.use_param) o.addr = pa[r.pidx];
    o.use_param = 1'b0;
    return o;
  endfunction

  ctrl_t sel;
  always_comb begin
    sel = CTRL_IDLE;
    for (int i = 0; i < NM; i++)
      if (active[i]) sel = ctrl_in[i];
    ctrl_out    = sel;
    ctrl_out.pa = resolve(sel.pa, param_addr);
    ctrl_out.pb = resolve(sel.pb, param_addr);
  end
endmodule
