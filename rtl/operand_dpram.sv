// operand_dpram: dual-ported operand memory of the coprocessor.
//
// WORDS words of N bits with two independent ports, A and B, each able to
// read or write one word per clock cycle. Reads are synchronous: the word
// addressed in one cycle appears on rdata in the next cycle, and rdata holds
// it until the next read on that port. A port that writes does not read in
// the same cycle. If both ports write the same word in one cycle, port B's
// data is kept. The memory is written as an array, so synthesis may map it to
// block RAM; it is not reset.
module operand_dpram
  import ecc_pkg::*;
#(
  parameter int unsigned N     = FIELD_N,
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // port A
  input  logic          a_rd,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [N-1:0]  a_wdata,
  output logic [N-1:0]  a_rdata,
  // port B
  input  logic          b_rd,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [N-1:0]  b_wdata,
  output logic [N-1:0]  b_rdata
);
  logic [N-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_rd) a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
  end
endmodule
