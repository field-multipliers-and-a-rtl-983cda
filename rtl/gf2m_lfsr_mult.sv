// gf2m_lfsr_mult: word-serial LFSR multiplier for GF(2^N) in polynomial basis.
//
// The product p = a * b mod f(x) is built most significant word first. The
// operand b is cut into NW = ceil(N/D) words of D bits. Each clock cycle
// takes the next word d of b and updates the accumulator
//     p <- p * x^D + a * d   (mod f)
// which is D steps of the classic bit-serial LFSR multiplier (shift the
// accumulator left by one with reduction by f, then add a if the bit of d is
// set) unrolled into one cycle. With N = 191 and D = 50 a multiplication
// takes NW = 4 cycles, as in the coprocessor's main configuration; D = 1
// gives the bit-serial multiplier. The reduction trinomial is a parameter.
//
// Interface: la / lb load the operand registers from a / b. start begins a
// multiplication; operands loaded in the same cycle are used at once, so a
// start with la and lb set computes a * b of that cycle. The first word is
// processed on the start edge, so p holds the product NW cycles after the
// cycle in which start was high, and ready is high again from that cycle on.
// p keeps its value until the next start. Loading an operand while busy is
// not allowed (checked by an assertion).
module gf2m_lfsr_mult
  import ecc_pkg::*;
#(
  parameter int unsigned    N    = FIELD_N,
  parameter int unsigned    D    = WORD_D,
  parameter logic [N-1:0]   POLY = FIELD_POLY   // f(x) - x^N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         la,
  input  logic         lb,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic         ready
);
  localparam int unsigned NW = (N + D - 1) / D;   // words per operand
  localparam int unsigned BW = NW * D;            // padded width of b
  localparam int unsigned CW = (NW > 1) ? $clog2(NW) : 1;

  logic [N-1:0]  a_reg;
  logic [BW-1:0] b_reg;
  logic [CW-1:0] cnt;      // words still to process after the current one
  logic          busy;

  // One word step: acc * x^D + a * d mod f.
  function automatic logic [N-1:0] word_step(logic [N-1:0] acc,
                                             logic [N-1:0] op,
                                             logic [D-1:0] d);
    logic [N-1:0] c = acc;
    for (int j = D - 1; j >= 0; j--) begin
      c = {c[N-2:0], 1'b0} ^ (c[N-1] ? POLY : '0);
      if (d[j]) c = c ^ op;
    end
    return c;
  endfunction

  logic [N-1:0]  a_eff;
  logic [BW-1:0] b_eff;
  always_comb begin
    a_eff = la ? a : a_reg;
    b_eff = lb ? BW'(b) : b_reg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
      p     <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
    end else if (start) begin
      a_reg <= a_eff;
      b_reg <= b_eff << D;
      p     <= word_step('0, a_eff, b_eff[BW-1 -: D]);
      cnt   <= CW'(NW - 1);
      busy  <= (NW > 1);
    end else if (busy) begin
      b_reg <= b_reg << D;
      p     <= word_step(p, a_reg, b_reg[BW-1 -: D]);
      cnt   <= cnt - 1'b1;
      busy  <= (cnt != CW'(1));
    end else begin
      if (la) a_reg <= a;
      if (lb) b_reg <= BW'(b);
    end
  end

  assign ready = !busy;

  // A new multiplication or an operand load only while idle.
  property p_no_load_when_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !(start || la || lb);
  endproperty
  assert property (p_no_load_when_busy)
    else $error("gf2m_lfsr_mult: operand load or start while busy");

endmodule
