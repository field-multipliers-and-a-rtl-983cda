// ecc_datapath: field arithmetic datapath of the coprocessor.
//
// Two word-serial LFSR multipliers, two squarers and two adders sit around a
// dual-ported operand memory. The control word (ctrl_t, addresses already
// resolved) chooses for every unit input one of the sources of src_e: the
// read data of either memory port, the product registers, the squarer and
// adder outputs, the squaring register, 0 or 1. The units are chained in a
// fixed order so that no loop can form:
//   adder 0   <- memory read data, products, squaring register, constants
//   squarer 0 <- the above or adder 0
//   squarer 1 <- the above or squarer 0        (x^4 in one cycle)
//   adder 1   <- the above or squarer 1
// Multiplier operands, memory write data and the squaring register may take
// any source. The squaring register lets a state machine square a value
// repeatedly, one or two squarings per cycle, during an inversion.
//
// Timing: memory reads return data the cycle after the request; squarers and
// adders are combinational; a multiplication started in cycle k has its
// product in cycle k+4 (see gf2m_lfsr_mult). The host port reaches memory
// port B while host_sel is high, and its read data is port B's read data.
// The number of squarers and adders and the squaring register are this
// design's choice; the two multipliers with 50-bit words are the design's
// main configuration.
module ecc_datapath
  import ecc_pkg::*;
#(
  parameter int unsigned  N    = FIELD_N,
  parameter int unsigned  D    = WORD_D,
  parameter logic [N-1:0] POLY = FIELD_POLY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,
  // host access to memory port B
  input  logic              host_sel,
  input  logic              host_rd,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [N-1:0]      host_wdata,
  output logic [N-1:0]      host_rdata,
  // status
  output logic              mul0_ready,
  output logic              mul1_ready,
  output logic              rda_zero       // port A read data is 0
);
  logic [N-1:0] rda, rdb, p0, p1, s0, s1, ad0, ad1, sq_reg;
  logic [N-1:0] ad0_a, ad0_b, ad1_a, ad1_b, s0_in, s1_in;
  logic [N-1:0] m0a, m0b, m1a, m1b, wda, wdb;

  // Multiplexer over the sources. Inputs that a unit may not use are tied
  // to 0 by the caller.
  function automatic logic [N-1:0] pick(src_e s,
      logic [N-1:0] ra, logic [N-1:0] rb, logic [N-1:0] q0, logic [N-1:0] q1,
      logic [N-1:0] sr, logic [N-1:0] sq0, logic [N-1:0] sq1,
      logic [N-1:0] a0, logic [N-1:0] a1);
    case (s)
      SRC_ONE:   return N'(1);
      SRC_RDA:   return ra;
      SRC_RDB:   return rb;
      SRC_MUL0:  return q0;
      SRC_MUL1:  return q1;
      SRC_SQREG: return sr;
      SRC_SQR0:  return sq0;
      SRC_SQR1:  return sq1;
      SRC_ADD0:  return a0;
      SRC_ADD1:  return a1;
      default:   return '0;
    endcase
  endfunction

  localparam logic [N-1:0] Z = '0;

  always_comb begin
    ad0_a = pick(ctrl.add0_a,   rda, rdb, p0, p1, sq_reg, Z,  Z,  Z,   Z);
    ad0_b = pick(ctrl.add0_b,   rda, rdb, p0, p1, sq_reg, Z,  Z,  Z,   Z);
  end
  gf2m_adder #(.N(N)) u_add0 (.a(ad0_a), .b(ad0_b), .s(ad0));

  always_comb s0_in = pick(ctrl.sqr0_src, rda, rdb, p0, p1, sq_reg, Z, Z, ad0, Z);
  gf2m_squarer #(.N(N), .POLY(POLY)) u_sqr0 (.a(s0_in), .q(s0));

  always_comb s1_in = pick(ctrl.sqr1_src, rda, rdb, p0, p1, sq_reg, s0, Z, ad0, Z);
  gf2m_squarer #(.N(N), .POLY(POLY)) u_sqr1 (.a(s1_in), .q(s1));

  always_comb begin
    ad1_a = pick(ctrl.add1_a,   rda, rdb, p0, p1, sq_reg, s0, s1, ad0, Z);
    ad1_b = pick(ctrl.add1_b,   rda, rdb, p0, p1, sq_reg, s0, s1, ad0, Z);
  end
  gf2m_adder #(.N(N)) u_add1 (.a(ad1_a), .b(ad1_b), .s(ad1));

  always_comb begin
    m0a = pick(ctrl.m0.asrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
    m0b = pick(ctrl.m0.bsrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
    m1a = pick(ctrl.m1.asrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
    m1b = pick(ctrl.m1.bsrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
    wda = pick(ctrl.pa.wsrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
    wdb = pick(ctrl.pb.wsrc, rda, rdb, p0, p1, sq_reg, s0, s1, ad0, ad1);
  end

  gf2m_lfsr_mult #(.N(N), .D(D), .POLY(POLY)) u_mul0 (
    .clk, .rst_n, .start(ctrl.m0.start), .la(ctrl.m0.la), .lb(ctrl.m0.lb),
    .a(m0a), .b(m0b), .p(p0), .ready(mul0_ready));

  gf2m_lfsr_mult #(.N(N), .D(D), .POLY(POLY)) u_mul1 (
    .clk, .rst_n, .start(ctrl.m1.start), .la(ctrl.m1.la), .lb(ctrl.m1.lb),
    .a(m1a), .b(m1b), .p(p1), .ready(mul1_ready));

  // Squaring register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sq_reg <= '0;
    else if (ctrl.sq_ld) sq_reg <= pick(ctrl.sq_src, rda, rdb, p0, p1, sq_reg,
                                        s0, s1, ad0, ad1);
  end

  operand_dpram #(.N(N), .WORDS(MEM_WORDS), .AW(ADDR_W)) u_mem (
    .clk,
    .a_rd   (ctrl.pa.rd),
    .a_we   (ctrl.pa.we),
    .a_addr (ctrl.pa.addr),
    .a_wdata(wda),
    .a_rdata(rda),
    .b_rd   (host_sel ? host_rd    : ctrl.pb.rd),
    .b_we   (host_sel ? host_we    : ctrl.pb.we),
    .b_addr (host_sel ? host_addr  : ctrl.pb.addr),
    .b_wdata(host_sel ? host_wdata : wdb),
    .b_rdata(rdb));

  assign host_rdata = rdb;
  assign rda_zero   = (rda == '0);
endmodule
