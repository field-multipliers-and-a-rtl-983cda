// gf2m_squarer: combinational squarer for GF(2^N) in polynomial basis.
//
// Squaring a polynomial over GF(2) only spreads its coefficients: bit i of a
// moves to bit 2i of the 2N-1 bit square, with zeros between. The square is
// then reduced modulo f(x) = x^N + POLY by folding the upper N-1 bits down
// one at a time, from the top. For a trinomial or pentanomial the folding is
// a small network of XOR gates, so squaring costs far less than a
// multiplication. Purely combinational, no clock.
module gf2m_squarer
  import ecc_pkg::*;
#(
  parameter int unsigned  N    = FIELD_N,
  parameter logic [N-1:0] POLY = FIELD_POLY   // f(x) - x^N
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] q
);
  logic [2*N-2:0] sq;

  always_comb begin
    sq = '0;
    for (int i = 0; i < N; i++) sq[2*i] = a[i];
    // x^k = x^(k-N) * POLY for k >= N; fold from the top down.
    for (int k = 2*N-2; k >= N; k--) begin
      if (sq[k]) begin
        sq[k] = 1'b0;
        sq[k-N +: N] = sq[k-N +: N] ^ POLY;
      end
    end
    q = sq[N-1:0];
  end
endmodule
