// mbc_pkg: shared constants, types and check-bit membership functions of the
// minimal-parity matrix code.
//
// A 32-bit word D31..D0 is laid out as an 8-row x 4-column matrix, row by
// row: D[4*r+c] sits in row r, column c. Fourteen check bits protect it:
//   V[c]      column parity of column c (c = 0..3).
//   M[2p]     parity-sharing bit of row pair p (rows p and p+4), covering
//             columns 0, 1, 2 of both rows.
//   M[2p+1]   parity-sharing bit of row pair p, covering columns 1 and 3.
//   M8, M9    two "DNA" diagonal bits. In the upper half M8 follows the main
//             diagonal (r, r) and M9 the anti-diagonal (r, 3-r); in the lower
//             half M8 covers rows 5 (columns 0, 3) and 7 (columns 1, 2), and
//             M9 rows 4 (columns 1, 2) and 6 (columns 0, 3).
// These sets are the code's published equations; the pair rule for M2..M7 is
// the one stated for M0 and M1 applied to the remaining row pairs.
// The 46-bit codeword is {M9..M0, V3..V0, D31..D0}; that bit order is this
// design's own choice.
package mbc_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ROWS   = 8;
  localparam int unsigned COLS   = 4;
  localparam int unsigned PAIRS  = ROWS / 2;
  localparam int unsigned V_W    = COLS;           // vertical (column) bits
  localparam int unsigned M_W    = 2 * PAIRS + 2;  // parity-sharing bits
  localparam int unsigned CHK_W  = V_W + M_W;      // 14
  localparam int unsigned CODE_W = DATA_W + CHK_W; // 46

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [COLS-1:0]   row_t;
  typedef logic [V_W-1:0]    vbits_t;
  typedef logic [M_W-1:0]    mbits_t;

  typedef struct packed {
    mbits_t m;   // M9..M0
    vbits_t v;   // V3..V0
    data_t  d;   // D31..D0
  } codeword_t;

  typedef struct packed {
    mbits_t m;
    vbits_t v;
  } syndrome_t;

  // Column set of the even sharing bit of a pair (columns 0, 1, 2).
  function automatic logic in_m_even(int unsigned c);
    return c <= 2;
  endfunction

  // Column set of the odd sharing bit of a pair (columns 1, 3).
  function automatic logic in_m_odd(int unsigned c);
    return c == 1 || c == 3;
  endfunction

  // Cell (r, c) belongs to the M8 diagonal.
  function automatic logic in_m8(int unsigned r, int unsigned c);
    if (r < PAIRS) return c == r;
    if (r == 5)    return c == 0 || c == 3;
    if (r == 7)    return c == 1 || c == 2;
    return 1'b0;
  endfunction

  // Cell (r, c) belongs to the M9 diagonal.
  function automatic logic in_m9(int unsigned r, int unsigned c);
    if (r < PAIRS) return c == COLS - 1 - r;
    if (r == 4)    return c == 1 || c == 2;
    if (r == 6)    return c == 0 || c == 3;
    return 1'b0;
  endfunction

  // Row r of a data word.
  function automatic row_t get_row(data_t d, int unsigned r);
    return d[r*COLS +: COLS];
  endfunction

  // The 14 check bits {M, V} of a data word.
  function automatic syndrome_t check_bits(data_t d);
    syndrome_t s;
    s = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        if (d[r*COLS + c]) begin
          s.v[c] ^= 1'b1;
          if (in_m_even(c))  s.m[2*(r % PAIRS)]     ^= 1'b1;
          if (in_m_odd(c))   s.m[2*(r % PAIRS) + 1] ^= 1'b1;
          if (in_m8(r, c))   s.m[M_W-2]             ^= 1'b1;
          if (in_m9(r, c))   s.m[M_W-1]             ^= 1'b1;
        end
      end
    end
    return s;
  endfunction

endpackage
