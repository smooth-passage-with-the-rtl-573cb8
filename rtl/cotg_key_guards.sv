// cotg_key_guards: the changing-of-the-guards network of the four key-schedule
// S-boxes (SubWord). It forms their refresh inputs from shares of key-register
// bytes and the 64 fresh random bits of the cycle.
//
// COTG for SubWord: the S-box of k(n,3) draws its refresh bits from nine key
// bytes that never meet its output, rows n, n+1, n+2 of columns 0..2, with
// rotating share domains: guard G(3a+b) = k_{(a+b) mod 3}((n+a) mod 4, b), and
// from the 16 fresh bits R[16n+15:16n] (the paper's guard lists). How these
// bits are spread over the multipliers is this design's choice, since the
// paper does not say: the fresh bits feed Stage 1, which runs in the cycle
// the data path is in its Stage 5 and the RNG word is free for the key:
//   Stage 1: z0,z1 = G0, z2,z3 = R[7:0], y0,y1 = G8 ^ R[15:8] (the pattern the
//            data S-boxes use in Stage 1)
//   Stage 2: z0..z3 = G1, z4,z5,y0,y1 = G2, y2 = G3[1:0]
//   Stage 3: 3/1 z = G3[7:2], 3/2 z = G4[5:0], no inner-domain refresh
//   Stage 4: 4/1 z0,z1 = G5, z2 = G6[3:0]; 4/2 z0 = G6[7:4], z1,z2 = G7;
//            no inner-domain refresh (the key schedule has no MixColumns)
// G4[7:6] stays unused; every S-box uses the 78-bit configuration.
//
// Purely combinational; each S-box samples only the fields of its active stage.
module cotg_key_guards (
  input  aes_dom_pkg::state_t [2:0]  key_i,   // round key shares, polynomial basis
  input  logic [63:0]                rnd_i,
  output aes_dom_pkg::sbox_rnd_t     rnd_o [4]
);
  import aes_dom_pkg::*;

  always_comb
    for (int n = 0; n < 4; n++) begin
      byte_t       gd [9];
      logic [15:0] rr;
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++)
          gd[3*a+b] = key_i[(a+b) % 3][b][(n+a) % 4];
      rr = rnd_i[16*n +: 16];
      rnd_o[n]       = '0;
      rnd_o[n].s1_z  = {rr[7:0], gd[0]};
      rnd_o[n].s1_y  = gd[8] ^ rr[15:8];
      rnd_o[n].s2_z  = {gd[2][3:0], gd[1]};
      rnd_o[n].s2_y  = {gd[3][1:0], gd[2][7:4]};
      rnd_o[n].s3a_z = gd[3][7:2];
      rnd_o[n].s3b_z = gd[4][5:0];
      rnd_o[n].s4a_z = {gd[6][3:0], gd[5]};
      rnd_o[n].s4b_z = {gd[7], gd[6][7:4]};
    end

endmodule
