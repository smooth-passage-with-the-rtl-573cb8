// aes_key_expand: one round of the masked AES-128 key schedule (KeyExpand).
//
// SubWord runs on four instances of the masked S-box, fed with the three-shared
// last key column k(0..3,3) already mapped into the normal basis (ksb_i, held
// in a register of the core). RotWord is folded into the wiring: the S-box of
// k(n,3) delivers row (n+3) mod 4 of the temporary word, and the round constant
// is added to share 0 of row 0. The new key columns follow the usual XOR chain
// w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2', per share.
//
// The refresh bits come from cotg_key_guards: for the S-box of k(n,3), shares
// of the nine key bytes that never meet its output, plus 16 fresh bits.
//
// Timing: key_i and ksb_i must be stable for the four S-box stages; the S-box
// Stage 1 is the first cycle after ksb_i was loaded and uses rnd_i of that
// cycle; key_o is valid combinationally in the fifth cycle (Stage 5).
module aes_key_expand (
  input  logic                       clk_i,
  input  aes_dom_pkg::state_t [2:0]  key_i,   // current round key shares, polynomial basis
  input  aes_dom_pkg::word_t  [2:0]  ksb_i,   // A2X-mapped shares of key column 3
  input  logic [63:0]                rnd_i,
  input  aes_dom_pkg::byte_t         rcon_i,
  output aes_dom_pkg::state_t [2:0]  key_o    // next round key shares, polynomial basis
);
  import aes_dom_pkg::*;

  sbox_rnd_t       rnd [4];
  logic [2:0][7:0] sx [4];
  logic [2:0][7:0] so [4];

  cotg_key_guards u_guards (.key_i, .rnd_i, .rnd_o(rnd));

  always_comb
    for (int n = 0; n < 4; n++)
      for (int i = 0; i < 3; i++) sx[n][i] = ksb_i[i][n];

  for (genvar n = 0; n < 4; n++) begin : g_sbox
    masked_sbox u_sbox (.clk_i, .x_i(sx[n]), .rnd_i(rnd[n]), .s_o(so[n]));
  end

  always_comb
    for (int i = 0; i < 3; i++) begin
      word_t t;
      for (int r = 0; r < 4; r++)
        t[r] = so[(r+1) % 4][i] ^ ((i == 0 && r == 0) ? rcon_i : 8'h00);
      key_o[i][0] = key_i[i][0] ^ t;
      key_o[i][1] = key_i[i][1] ^ key_o[i][0];
      key_o[i][2] = key_i[i][2] ^ key_o[i][1];
      key_o[i][3] = key_i[i][3] ^ key_o[i][2];
    end

endmodule
