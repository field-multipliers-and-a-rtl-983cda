// gf2m_mo_mult: word-serial Massey-Omura multiplier for GF(2^N) in an
// optimal normal basis of type II.
//
// In a normal basis {beta^(2^i)} squaring is a cyclic shift, and every
// product bit is the same bilinear form of the operands, only with both
// operands rotated: c_k = sum_{i,j} M[i][j] a_(i+k) b_(j+k). For a type II
// optimal normal basis (P = 2N+1 prime, here 383 for N = 191) the matrix M
// has 2N-1 ones: row i has ones at the columns j != i with
// 2^i +- 2^j = +-1 (mod P), row 0 has a single one, and row N-1 also has
// the diagonal one that comes from beta_(N-1)^2 = beta_0.
// The matrix is worked out from N at elaboration (onb_columns below), so no
// table is stored. One product bit is an AND-XOR tree of N AND gates over
// the pairwise XORs b_(ja(i)+k) ^ b_(jb(i)+k).
//
// D copies of that tree, each wired to a different rotation (written here
// as rotated whole vectors of which only D bits are used), give D product
// bits per clock cycle; the operand registers rotate by D bits per cycle, so
// a multiplication takes NW = ceil(N/D) cycles, with the same timing and
// handshake as gf2m_lfsr_mult: the first word is computed on the start edge
// from the a and b inputs, ready rises with the complete product in the
// NW-th cycle after start, and p holds it until the next start. The default
// word length of 50 bits matches the LFSR multiplier of the coprocessor;
// any D from 1 to N works. Bit i of a, b and p is the coefficient of
// beta^(2^i).
module gf2m_mo_mult #(
  parameter int unsigned N = 191,
  parameter int unsigned D = 50
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic         ready
);
  localparam int unsigned P  = 2 * N + 1;
  localparam int unsigned NW = (N + D - 1) / D;
  localparam int unsigned CW = (NW > 1) ? $clog2(NW) : 1;

  // Column table of the multiplication matrix, worked out once: entry
  // [2i] and [2i+1] are the columns of the ones in row i (-1: none).
  // With lg(v) = the j for which 2^j = +-v (mod P), the columns of row i are
  // lg(2^i + 1) and lg(2^i - 1); row 0 has only column 1. For row N-1 one
  // of them is N-1 itself: the diagonal term beta_(N-1)^2 = beta_0.
  typedef int col_tab_t [2*N];
  function automatic col_tab_t onb_columns();
    col_tab_t tab;
    int pw [N];
    int lg [P];
    int v;
    v = 1;
    for (int j = 0; j < N; j++) begin
      pw[j] = v;
      lg[v] = j;
      lg[P - v] = j;
      v = (v * 2) % P;
    end
    tab[0] = 1;                      // 2^0 - 1 = 0 has no logarithm
    tab[1] = -1;
    for (int i = 1; i < N; i++) begin
      tab[2*i]     = lg[(pw[i] + 1) % P];
      tab[2*i + 1] = lg[(pw[i] + P - 1) % P];
    end
    return tab;
  endfunction

  localparam col_tab_t COLS = onb_columns();

  logic [N-1:0]     a_reg, b_reg, a_cur, b_cur;
  logic [NW*D-1:0]  c_reg;
  logic [D-1:0]     word;
  logic [CW-1:0]    cnt;
  logic             busy;

  assign a_cur = start ? a : a_reg;
  assign b_cur = start ? b : b_reg;

  // Rotation: bit k of rotl(v, s) is bit (k + s) mod N of v.
  function automatic logic [N-1:0] rotl(logic [N-1:0] v, int s);
    return (s == 0) ? v : ((v >> s) | (v << (N - s)));
  endfunction

  // Product bits k .. k+D-1 of the current rotation. Term (i, j) of the
  // matrix contributes a_(i+k) & b_(j+k) to bit k, which for all k at once
  // is rotl(a, i) & rotl(b, j); only the low D bits are kept.
  logic [N-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) begin
      if (COLS[2*i + 1] < 0)
        acc = acc ^ (rotl(a_cur, i) & rotl(b_cur, COLS[2*i]));
      else
        acc = acc ^ (rotl(a_cur, i) &
                     (rotl(b_cur, COLS[2*i]) ^ rotl(b_cur, COLS[2*i + 1])));
    end
    word = acc[D-1:0];
  end

  // Rotation that brings bit index i + D to position i.
  function automatic logic [N-1:0] rot(logic [N-1:0] v);
    return (v >> (D % N)) | (v << (N - (D % N)));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
      c_reg <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
    end else if (start) begin
      a_reg <= rot(a);
      b_reg <= rot(b);
      c_reg <= '0;
      c_reg[D-1:0] <= word;
      cnt   <= CW'(1);
      busy  <= (NW > 1);
    end else if (busy) begin
      a_reg <= rot(a_reg);
      b_reg <= rot(b_reg);
      c_reg[cnt*D +: D] <= word;
      cnt   <= cnt + 1'b1;
      busy  <= (cnt != CW'(NW - 1));
    end
  end

  assign p     = c_reg[N-1:0];
  assign ready = !busy;

  property p_no_start_when_busy;
    @(posedge clk) disable iff (!rst_n) busy |-> !start;
  endproperty
  assert property (p_no_start_when_busy)
    else $error("gf2m_mo_mult: start while busy");
endmodule
