// dom_mul_b: second-order Type B DOM-indep multiplier over GF(2^4) (S-box Stage 1).
//
// Like the Type A gadget it multiplies two independently shared nibbles with
// nine registered share products, but it also folds the shared square-scaler
// term Sq_i into the inner-domain product of domain i before the register and
// blinds the inner-domain products with y0, y1 and the cross-domain products
// additionally with z3, so that its output sharing is independent and can feed
// the next DOM-indep multiplier directly:
//   C0 = (A0B0^Sq0^y0^y1) ^ (A0B1^z0^z3) ^ (A0B2^z1)
//   C1 = (A1B0^z0) ^ (A1B1^Sq1^y1) ^ (A1B2^z2)
//   C2 = (A2B0^z1^z3) ^ (A2B1^z2) ^ (A2B2^Sq2^y0)
// These equations are the paper's. Randomness: 4 x 4 bit z plus 2 x 4 bit y
// = 24 bits. Timing: one register stage, output valid after the sampling edge.
module dom_mul_b (
  input  logic            clk_i,
  input  logic [2:0][3:0] a_i,
  input  logic [2:0][3:0] b_i,
  input  logic [2:0][3:0] sq_i,   // square-scaler shares, added per domain
  input  logic [3:0][3:0] z_i,    // z0..z3
  input  logic [1:0][3:0] y_i,    // y0, y1
  output logic [2:0][3:0] c_o
);
  import aes_dom_pkg::*;

  logic [2:0][2:0][3:0] prod, term_d, term_q;

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        prod[i][j] = gf16_mul(a_i[i], b_i[j]);

    term_d[0][0] = prod[0][0] ^ sq_i[0] ^ y_i[0] ^ y_i[1];
    term_d[0][1] = prod[0][1] ^ z_i[0] ^ z_i[3];
    term_d[0][2] = prod[0][2] ^ z_i[1];
    term_d[1][0] = prod[1][0] ^ z_i[0];
    term_d[1][1] = prod[1][1] ^ sq_i[1] ^ y_i[1];
    term_d[1][2] = prod[1][2] ^ z_i[2];
    term_d[2][0] = prod[2][0] ^ z_i[1] ^ z_i[3];
    term_d[2][1] = prod[2][1] ^ z_i[2];
    term_d[2][2] = prod[2][2] ^ sq_i[2] ^ y_i[0];
  end

  always_ff @(posedge clk_i) term_q <= term_d;

  always_comb
    for (int i = 0; i < 3; i++) c_o[i] = term_q[i][0] ^ term_q[i][1] ^ term_q[i][2];

endmodule
