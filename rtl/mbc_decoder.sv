// mbc_decoder: syndrome decoder and corrector of the minimal-parity matrix code.
//
// The received data bits are re-encoded and XORed with the received check
// bits to give a 14-bit syndrome. If it is zero the data are passed through
// untouched. Otherwise the column syndrome S_V3..S_V0 is read as the set E of
// columns that hold an error, assuming all errors lie in one matrix row (the
// adjacent-cell upsets the code targets). For each of the 8 rows the decoder
// forms the syndrome that pattern E in that row would give: the pair bits
// M[2p], M[2p+1] of its row pair p = r mod 4 (parity of E over columns {0,1,2}
// and {1,3}), zero for the other pairs, and M8, M9 from the row's diagonal
// cells. The row whose prediction equals the received M syndrome is corrected
// by flipping the bits E in it. This is the pair-then-diagonal search the code
// describes (M0..M7 pick the row pair, M8/M9 the row within it) done for all
// rows in parallel.
//
// When no row or more than one row matches, the data are passed on unchanged
// and uncorrectable_o is raised. This covers errors in the check bits, errors
// spread over several rows, and the row patterns the code cannot place
// ({0,2}, {1,3}, {0,1,3}, {1,2,3} in any row; {0,1}, {0,3} outside rows
// 0, 3, 4, 7; {1,2}, {2,3} outside rows 1, 2, 5, 6). The flag outputs and the
// rule of refusing ambiguous syndromes are this design's own choices.
//
// Interface: code_i = {M, V, D}; data_o corrected word; syndrome_o = {S_M, S_V};
// err_o syndrome non-zero; corrected_o a row was fixed. Timing: purely
// combinational.
module mbc_decoder
  import mbc_pkg::*;
(
  input  codeword_t code_i,
  output data_t     data_o,
  output syndrome_t syndrome_o,
  output logic      err_o,
  output logic      corrected_o,
  output logic      uncorrectable_o
);

  codeword_t recoded;
  syndrome_t syn;
  vbits_t    err_cols;
  logic [ROWS-1:0] row_match;
  logic      unique_match;
  data_t     flip;

  mbc_encoder u_recode (.data_i(code_i.d), .code_o(recoded));

  assign syn.v    = recoded.v ^ code_i.v;
  assign syn.m    = recoded.m ^ code_i.m;
  assign err_cols = syn.v;

  // Per-row column masks of the two diagonal bits, fixed at elaboration.
  function automatic row_t diag_mask(int unsigned r, bit nine);
    row_t msk;
    for (int unsigned c = 0; c < COLS; c++)
      msk[c] = nine ? in_m9(r, c) : in_m8(r, c);
    return msk;
  endfunction

  function automatic row_t pair_mask(bit odd);
    row_t msk;
    for (int unsigned c = 0; c < COLS; c++)
      msk[c] = odd ? in_m_odd(c) : in_m_even(c);
    return msk;
  endfunction

  localparam row_t EVEN_MASK = pair_mask(1'b0);
  localparam row_t ODD_MASK  = pair_mask(1'b1);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam row_t M8_MASK = diag_mask(r, 1'b0);
    localparam row_t M9_MASK = diag_mask(r, 1'b1);
    mbits_t predicted;
    always_comb begin
      predicted = '0;
      predicted[2*(r % PAIRS)]     = ^(err_cols & EVEN_MASK);
      predicted[2*(r % PAIRS) + 1] = ^(err_cols & ODD_MASK);
      predicted[M_W-2]             = ^(err_cols & M8_MASK);
      predicted[M_W-1]             = ^(err_cols & M9_MASK);
    end
    assign row_match[r] = (err_cols != '0) && (predicted == syn.m);
  end

  assign unique_match = (row_match != '0) && ((row_match & (row_match - 1'b1)) == '0);

  always_comb begin
    flip = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (row_match[r]) flip[r*COLS +: COLS] = err_cols;
  end

  assign err_o           = (syn != '0);
  assign corrected_o     = err_o && unique_match;
  assign uncorrectable_o = err_o && !unique_match;
  // Zero syndrome: the word bypasses the correction network.
  assign data_o          = corrected_o ? (code_i.d ^ flip) : code_i.d;
  assign syndrome_o      = syn;

  // A non-zero syndrome is either corrected or refused, never both.
  always_comb begin
    if (err_o) assert (corrected_o != uncorrectable_o);
    else       assert (!corrected_o && !uncorrectable_o);
  end

endmodule
