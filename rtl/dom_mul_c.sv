// dom_mul_c: second-order Type C DOM-indep multiplier over GF(2^2) (S-box Stage 2).
//
// Extends the Type B idea with more refresh so that the GF(2^2) output sharing
// is independent for the Stage 3 multipliers. The shared square-scaler term is
// folded into the inner-domain products; the paper's equations are
//   C0 = (A0B0^Sq0^y0^y1) ^ (A0B1^z0^z3) ^ (A0B2^z1^z5)
//   C1 = (A1B0^z0^z4) ^ (A1B1^Sq1^y1^y2) ^ (A1B2^z2^z5)
//   C2 = (A2B0^z1^z3) ^ (A2B1^z2^z4) ^ (A2B2^Sq2^y0^y2)
// Randomness: 6 x 2 bit z plus 3 x 2 bit y = 18 bits. Timing: one register
// stage, output valid after the sampling edge.
module dom_mul_c (
  input  logic            clk_i,
  input  logic [2:0][1:0] a_i,
  input  logic [2:0][1:0] b_i,
  input  logic [2:0][1:0] sq_i,
  input  logic [5:0][1:0] z_i,    // z0..z5
  input  logic [2:0][1:0] y_i,    // y0..y2
  output logic [2:0][1:0] c_o
);
  import aes_dom_pkg::*;

  logic [2:0][2:0][1:0] prod, term_d, term_q;

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        prod[i][j] = gf4_mul(a_i[i], b_i[j]);

    term_d[0][0] = prod[0][0] ^ sq_i[0] ^ y_i[0] ^ y_i[1];
    term_d[0][1] = prod[0][1] ^ z_i[0] ^ z_i[3];
    term_d[0][2] = prod[0][2] ^ z_i[1] ^ z_i[5];
    term_d[1][0] = prod[1][0] ^ z_i[0] ^ z_i[4];
    term_d[1][1] = prod[1][1] ^ sq_i[1] ^ y_i[1] ^ y_i[2];
    term_d[1][2] = prod[1][2] ^ z_i[2] ^ z_i[5];
    term_d[2][0] = prod[2][0] ^ z_i[1] ^ z_i[3];
    term_d[2][1] = prod[2][1] ^ z_i[2] ^ z_i[4];
    term_d[2][2] = prod[2][2] ^ sq_i[2] ^ y_i[0] ^ y_i[2];
  end

  always_ff @(posedge clk_i) term_q <= term_d;

  always_comb
    for (int i = 0; i < 3; i++) c_o[i] = term_q[i][0] ^ term_q[i][1] ^ term_q[i][2];

endmodule
