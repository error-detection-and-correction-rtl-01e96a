// mbc_ref_pkg: reference model of the minimal-parity matrix code for the
// testbenches. It is written from the code's equations as explicit lists of
// data-bit indices, independently of the RTL's membership functions:
//   V[c]    = XOR of D[c], D[c+4], ..., D[c+28]
//   M[2p]   = D[4p] ^ D[4p+1] ^ D[4p+2] ^ D[4p+16] ^ D[4p+17] ^ D[4p+18]
//   M[2p+1] = D[4p+1] ^ D[4p+3] ^ D[4p+17] ^ D[4p+19]
//   M8      = D0 ^ D5 ^ D10 ^ D15 ^ D20 ^ D23 ^ D29 ^ D30
//   M9      = D3 ^ D6 ^ D9 ^ D12 ^ D17 ^ D18 ^ D24 ^ D27
// Codeword bit order {M9..M0, V3..V0, D31..D0}.
package mbc_ref_pkg;

  function automatic logic [13:0] ref_check(logic [31:0] d);
    logic [3:0] v;
    logic [9:0] m;
    int unsigned m8_idx [8] = '{0, 5, 10, 15, 20, 23, 29, 30};
    int unsigned m9_idx [8] = '{3, 6, 9, 12, 17, 18, 24, 27};
    v = '0;
    m = '0;
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 8; i++) v[c] ^= d[c + 4*i];
    for (int p = 0; p < 4; p++) begin
      m[2*p]   = d[4*p] ^ d[4*p+1] ^ d[4*p+2] ^ d[4*p+16] ^ d[4*p+17] ^ d[4*p+18];
      m[2*p+1] = d[4*p+1] ^ d[4*p+3] ^ d[4*p+17] ^ d[4*p+19];
    end
    for (int i = 0; i < 8; i++) begin
      m[8] ^= d[m8_idx[i]];
      m[9] ^= d[m9_idx[i]];
    end
    return {m, v};
  endfunction

  function automatic logic [45:0] ref_encode(logic [31:0] d);
    return {ref_check(d), d};
  endfunction

  // Whether an error confined to row r with column pattern pat (bit c =
  // column c) is expected to be located and corrected. Worked out by hand
  // from the syndrome each pattern gives in each row.
  function automatic bit ref_correctable(int r, logic [3:0] pat);
    case (pat)
      4'b0001, 4'b0010, 4'b0100, 4'b1000,
      4'b0111, 4'b1101, 4'b1111:          return 1'b1;
      4'b0011, 4'b1001:                   return r == 0 || r == 3 || r == 4 || r == 7;
      4'b0110, 4'b1100:                   return r == 1 || r == 2 || r == 5 || r == 6;
      default:                            return 1'b0;
    endcase
  endfunction

endpackage
