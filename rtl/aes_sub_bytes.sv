// aes_sub_bytes: SubBytes of the three-shared state with 16 masked S-boxes whose
// multipliers are refreshed by changing-of-the-guards (COTG): shares of other
// state bytes ("guards") combined with 64 fresh random bits per cycle.
//
// The refresh bits come from cotg_data_guards, which implements the paper's
// table of guards: shares of other state bytes, partly XORed with rows of the
// 64-bit RNG word.
//
// Timing: st_i must hold one round's input for Stages 1..4 (the state register
// does); rnd_i is consumed by Stage k in the k-th cycle; sb_o (polynomial
// basis) is valid combinationally in the fifth cycle.
module aes_sub_bytes (
  input  logic                       clk_i,
  input  aes_dom_pkg::state_t [2:0]  st_i,    // state shares, normal basis
  input  logic [63:0]                rnd_i,   // fresh randomness of this cycle
  output aes_dom_pkg::state_t [2:0]  sb_o     // S-box outputs, polynomial basis
);
  import aes_dom_pkg::*;

  sbox_rnd_t rnd [4][4];   // [col][row]

  cotg_data_guards u_guards (.st_i, .rnd_i, .rnd_o(rnd));

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      logic [2:0][7:0] x, s;
      for (genvar i = 0; i < 3; i++) begin : g_sh
        assign x[i]          = st_i[i][c][r];
        assign sb_o[i][c][r] = s[i];
      end
      masked_sbox u_sbox (.clk_i, .x_i(x), .rnd_i(rnd[c][r]), .s_o(s));
    end
  end

endmodule
