// dom_mul_a: second-order Type A DOM-indep multiplier over GF(2^W), W = 2 or 4.
//
// Computes C = A x B for two independently three-shared operands. In the
// calculation phase all nine share products A_i x B_j are formed; in the
// resharing phase the six cross-domain products are blinded with z0..z2 exactly
// as in the DOM-indep equations (A0B1^z0, A0B2^z1, A1B0^z0, A1B2^z2, A2B0^z1,
// A2B1^z2) and every product is stored in its own register; the integration
// phase XORs the three registers of each domain combinationally into C_i.
// The optional y0, y1 inputs refresh the inner-domain products (share 0 gets
// y0^y1, share 1 gets y1, share 2 gets y0), which the COTG AES uses in Stages 3
// and 4; the distribution pattern is this design's own and follows that of the
// Type B multiplier. Tie y to zero for the plain Type A gadget.
//
// Timing: one register stage. Operands and randomness are sampled at a rising
// clock edge; C is valid after that edge until the next one.
module dom_mul_a #(
  parameter int unsigned W = 4
) (
  input  logic                clk_i,
  input  logic [2:0][W-1:0]   a_i,   // shares of A
  input  logic [2:0][W-1:0]   b_i,   // shares of B
  input  logic [2:0][W-1:0]   z_i,   // cross-domain refresh z0..z2
  input  logic [1:0][W-1:0]   y_i,   // inner-domain refresh y0, y1
  output logic [2:0][W-1:0]   c_o    // shares of C
);
  import aes_dom_pkg::*;

  logic [2:0][2:0][W-1:0] prod;      // [i][j] = A_i x B_j
  logic [2:0][2:0][W-1:0] term_d, term_q;

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        prod[i][j] = W'(gf_mul_w(W, 4'(a_i[i]), 4'(b_i[j])));

    term_d[0][0] = prod[0][0] ^ y_i[0] ^ y_i[1];
    term_d[0][1] = prod[0][1] ^ z_i[0];
    term_d[0][2] = prod[0][2] ^ z_i[1];
    term_d[1][0] = prod[1][0] ^ z_i[0];
    term_d[1][1] = prod[1][1] ^ y_i[1];
    term_d[1][2] = prod[1][2] ^ z_i[2];
    term_d[2][0] = prod[2][0] ^ z_i[1];
    term_d[2][1] = prod[2][1] ^ z_i[2];
    term_d[2][2] = prod[2][2] ^ y_i[0];
  end

  always_ff @(posedge clk_i) term_q <= term_d;

  always_comb
    for (int i = 0; i < 3; i++) c_o[i] = term_q[i][0] ^ term_q[i][1] ^ term_q[i][2];

endmodule
