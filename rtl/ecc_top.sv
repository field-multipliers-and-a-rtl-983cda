// ecc_top: top level. Holds the two pieces of hardware side by side:
//   - the elliptic curve point multiplication coprocessor (ecc_coprocessor),
//     with its command and host memory ports brought out unchanged;
//   - a stand-alone word-serial Massey-Omura normal basis multiplier
//     (gf2m_mo_mult), the alternative field multiplier to the LFSR
//     multiplier the coprocessor uses. It is not connected to the
//     coprocessor; its operand, start and product ports are brought out
//     with the prefix mo_.
// Timing and handshakes are those of the two blocks.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned N    = FIELD_N,
  parameter int unsigned D    = WORD_D,
  parameter int unsigned MO_D = WORD_D
) (
  input  logic              clk,
  input  logic              rst_n,
  // coprocessor command
  input  logic              start,
  input  logic [N-1:0]      m,
  output logic              busy,
  output logic              done,
  output logic              inf,
  // coprocessor host memory port
  input  logic              host_rd,
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic [N-1:0]      host_wdata,
  output logic [N-1:0]      host_rdata,
  // Massey-Omura multiplier
  input  logic              mo_start,
  input  logic [N-1:0]      mo_a,
  input  logic [N-1:0]      mo_b,
  output logic [N-1:0]      mo_p,
  output logic              mo_ready
);
  ecc_coprocessor #(.N(N), .D(D), .POLY(FIELD_POLY)) u_cop (
    .clk, .rst_n, .start, .m, .busy, .done, .inf,
    .host_rd, .host_we, .host_addr, .host_wdata, .host_rdata);

  gf2m_mo_mult #(.N(N), .D(MO_D)) u_mo (
    .clk, .rst_n, .start(mo_start), .a(mo_a), .b(mo_b), .p(mo_p),
    .ready(mo_ready));
endmodule
