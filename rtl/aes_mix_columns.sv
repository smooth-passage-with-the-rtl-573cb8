// aes_mix_columns: AES MixColumns of one share of the 128-bit state.
//
// MixColumns is linear over GF(2), so in the masked design it is applied to
// each of the three shares separately; this module handles one share. Each
// column (a0..a3) is multiplied by the circulant matrix (2 3 1 1) in
// GF(2^8) mod x^8+x^4+x^3+x+1, using xtime for the factor 2. Purely
// combinational; the state is [column][row] in the polynomial basis.
module aes_mix_columns (
  input  aes_dom_pkg::state_t  d_i,
  output aes_dom_pkg::state_t  d_o
);
  import aes_dom_pkg::*;

  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        d_o[c][r] = xtime(d_i[c][r]) ^ xtime(d_i[c][(r+1)%4]) ^ d_i[c][(r+1)%4]
                    ^ d_i[c][(r+2)%4] ^ d_i[c][(r+3)%4];

endmodule
