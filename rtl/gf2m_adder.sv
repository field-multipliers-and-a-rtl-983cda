// gf2m_adder: addition in GF(2^N). The sum of two field elements is the
// bitwise XOR of their coefficient vectors, in any basis. Combinational.
module gf2m_adder
  import ecc_pkg::*;
#(
  parameter int unsigned N = FIELD_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);
  assign s = a ^ b;
endmodule
