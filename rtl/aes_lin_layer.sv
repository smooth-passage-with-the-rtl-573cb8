// aes_lin_layer: the Stage 5 linear layer of one share of the masked AES round.
//
// Takes one share of the SubBytes output (polynomial basis; the S-box's own
// Stage 5 already applied the inverse linear map and the affine transform) and
// computes ShiftRows, MixColumns (skipped when mix_i is low, i.e. in the last
// round), AddRoundKey with the same share of the round key, and finally the
// linear map A2X of every byte into the tower-field normal basis, so that the
// state register holds the next round's S-box inputs directly. Moving the
// linear map here, instead of a register stage of its own in the S-box, is
// the paper's; every operation acts within one share. Purely combinational.
module aes_lin_layer (
  input  aes_dom_pkg::state_t  sb_i,    // SubBytes output share
  input  aes_dom_pkg::state_t  key_i,   // round key share
  input  logic                 mix_i,   // 1: apply MixColumns
  output aes_dom_pkg::state_t  st_o     // next state share, normal basis
);
  import aes_dom_pkg::*;

  state_t sr, mc, ark;

  always_comb
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[c][r] = sb_i[(c+r)%4][r];

  aes_mix_columns u_mc (.d_i(sr), .d_o(mc));

  always_comb begin
    ark = (mix_i ? mc : sr) ^ key_i;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        st_o[c][r] = lin_map(ark[c][r]);
  end

endmodule
