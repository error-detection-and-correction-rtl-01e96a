// mbc_encoder: encoder of the minimal-parity matrix code.
//
// Takes a 32-bit data word, views it as an 8x4 matrix filled row by row, and
// appends 14 check bits: four column parities V3..V0 and ten parity-sharing
// bits M9..M0 (see mbc_pkg for which cells each bit covers). Every check bit
// is the XOR of the data bits in its set; the sets follow the code's defining
// equations. Each set is turned into a constant 32-bit mask at elaboration,
// so the hardware is fourteen XOR trees of 4 to 12 inputs.
//
// Interface: data_i in, code_o = {M9..M0, V3..V0, D31..D0} out (the field
// order is this design's choice). Timing: purely combinational, no clock; a
// word is encoded in the same cycle it is presented.
module mbc_encoder
  import mbc_pkg::*;
(
  input  data_t     data_i,
  output codeword_t code_o
);

  // Mask of the data bits covered by check bit k (k < V_W: V[k], else M[k-V_W]).
  function automatic data_t cover_mask(logic [3:0] k);
    data_t msk;
    for (int unsigned d = 0; d < DATA_W; d++) begin
      syndrome_t s;
      s = check_bits(data_t'(1) << d);
      msk[d] = s[k];
    end
    return msk;
  endfunction

  syndrome_t chk;

  for (genvar k = 0; k < CHK_W; k++) begin : g_chk
    localparam data_t MASK = cover_mask(k);
    assign chk[k] = ^(data_i & MASK);
  end

  assign code_o.d = data_i;
  assign code_o.v = chk.v;
  assign code_o.m = chk.m;

endmodule
