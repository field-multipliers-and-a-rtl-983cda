// ecc_coprocessor: elliptic curve point multiplication coprocessor for
// binary curves y^2 + xy = x^3 + a x^2 + b over GF(2^191).
//
// Given an affine base point P = (x, y), the curve coefficient b and a
// scalar m, it computes mP with the Montgomery ladder, which performs one
// point addition and one point doubling per key bit in x-only projective
// coordinates, and recovers the affine result with one inversion at the end.
// The coefficient a is never needed.
//
// Structure: a main state machine (main_fsm) drives three sub-state
// machines, for point addition (madd_fsm), point doubling (mdbl_fsm) and
// the final conversion to affine coordinates (conv_fsm). One machine at a
// time drives the shared datapath (ecc_datapath: two 50-bit-word LFSR
// multipliers, two squarers, two adders, dual-ported operand memory)
// through the control and address multiplexer (param_addr_mux). The
// multiplexer resolves the indirect parameter addresses set by the main
// machine, so the addition and doubling machines work in place on the
// ladder points the key bit selects.
//
// Host interface: while busy is low the host owns memory port B. It writes
// x, y and b to words 0, 1 and 2 (see ecc_pkg), pulses start with m, waits
// for done, and reads the affine result from words 13 (x3) and 14 (y3); a
// read returns data in the next cycle. inf flags mP = point at infinity
// (result words are then 0). Each key bit below the leading one takes 21
// cycles (addition 11, doubling 7, hand-over 3), the final conversion with
// its inversion about 800, and the search for the leading one bit one cycle
// per leading zero: a full 191-bit scalar takes about 4800 cycles.
module ecc_coprocessor
  import ecc_pkg::*;
#(
  parameter int unsigned  N    = FIELD_N,
  parameter int unsigned  D    = WORD_D,
  parameter logic [N-1:0] POLY = FIELD_POLY
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic [N-1:0]      m,
  output logic              busy,
  output logic              done,
  output logic              inf,
  // host access to the operand memory (while busy is low)
  input  logic              host_rd,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [N-1:0]      host_wdata,
  output logic [N-1:0]      host_rdata
);
  localparam int unsigned NM = 4;   // main, addition, doubling, conversion

  ctrl_t             ctrl_in [NM];
  ctrl_t             ctrl;
  logic [NM-1:0]     active;
  logic [ADDR_W-1:0] param_addr [4];
  logic go_add, go_dbl, go_conv, add_done, dbl_done, conv_done, conv_inf;
  logic mul0_ready, mul1_ready, rda_zero;

  main_fsm #(.N(N)) u_main (
    .clk, .rst_n, .start, .m, .busy, .done, .inf,
    .param_addr, .go_add, .go_dbl, .go_conv,
    .add_done, .dbl_done, .conv_done, .conv_inf,
    .ctrl(ctrl_in[0]), .own_active(active[0]));

  madd_fsm u_add (
    .clk, .rst_n, .go(go_add), .mul0_ready, .mul1_ready,
    .ctrl(ctrl_in[1]), .active(active[1]), .done(add_done));

  mdbl_fsm u_dbl (
    .clk, .rst_n, .go(go_dbl), .mul0_ready, .mul1_ready,
    .ctrl(ctrl_in[2]), .active(active[2]), .done(dbl_done));

  conv_fsm #(.N(N)) u_conv (
    .clk, .rst_n, .go(go_conv), .mul0_ready, .mul1_ready, .rda_zero,
    .ctrl(ctrl_in[3]), .active(active[3]), .done(conv_done), .inf(conv_inf));

  param_addr_mux #(.NM(NM)) u_amux (
    .ctrl_in, .active, .param_addr, .ctrl_out(ctrl));

  ecc_datapath #(.N(N), .D(D), .POLY(POLY)) u_dp (
    .clk, .rst_n, .ctrl,
    .host_sel(!busy), .host_rd, .host_we, .host_addr, .host_wdata, .host_rdata,
    .mul0_ready, .mul1_ready, .rda_zero);

  // Only one state machine drives the datapath at a time.
  property p_one_machine;
    @(posedge clk) disable iff (!rst_n) $onehot0(active);
  endproperty
  assert property (p_one_machine)
    else $error("ecc_coprocessor: several state machines active");

  // The host may not start a new multiplication while one is running.
  property p_start_when_idle;
    @(posedge clk) disable iff (!rst_n) start |-> !busy;
  endproperty
  assert property (p_start_when_idle)
    else $error("ecc_coprocessor: start while busy");
endmodule
