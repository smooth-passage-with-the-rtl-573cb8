// masked_sbox: second-order (three-share) DOM AES S-box with five stages that
// uses only DOM-indep multipliers.
//
// The input is the S-box byte already in the normal basis of the tower field
// (the linear map A2X is computed in the previous round's Stage 5, outside this
// module), split into the nibbles a1 = x[7:4] and a0 = x[3:0]. The inversion in
// GF(2^8) follows the paper's Figure 1:
//   Stage 1  Type B GF(2^4) multiplier: g = a1*a0 ^ nu*(a1^a0)^2
//   Stage 2  Type C GF(2^2) multiplier: w = g1*g0 ^ N*(g1^g0)^2
//   Stage 3  inverter t = w^2 (linear in GF(2^2)); two Type A GF(2^2)
//            multipliers form d = {t*g0, t*g1} = g^-1
//   Stage 4  two Type A GF(2^4) multipliers form {d*a0, d*a1} = x^-1
//   Stage 5  inverse linear map with the affine transform (X2S, combinational);
//            0x63 is added to share 0 only.
// The square scalers are added inside the Stage 1/2 multipliers. Stage 1's
// output g is pipelined into Stage 3 and the input x into Stage 4 through
// share-wise registers, so the S-box accepts a new input every cycle.
//
// Interface: x_i (3 shares) is sampled at the edge that ends Stage 1; each
// group of rnd_i is used only in the cycle its stage is active, i.e. s1_* with
// x_i, s2_* one cycle later, s3_* two and s4_* three cycles later. s_o is the
// three-shared S-box output in the polynomial basis, valid combinationally in
// the fourth cycle after x_i was applied (five-cycle latency counting Stage 5).
// With s3_y and s4a_y/s4b_y tied to zero the S-box consumes the paper's 78
// bits (24/18/12/24).
module masked_sbox (
  input  logic                     clk_i,
  input  logic [2:0][7:0]          x_i,
  input  aes_dom_pkg::sbox_rnd_t   rnd_i,
  output logic [2:0][7:0]          s_o
);
  import aes_dom_pkg::*;

  // Stage 1
  logic [2:0][3:0] a1, a0, sq1, g;
  always_comb
    for (int i = 0; i < 3; i++) begin
      a1[i]  = x_i[i][7:4];
      a0[i]  = x_i[i][3:0];
      sq1[i] = gf16_sq_sc(a1[i] ^ a0[i]);
    end

  dom_mul_b u_mul1 (
    .clk_i, .a_i(a1), .b_i(a0), .sq_i(sq1), .z_i(rnd_i.s1_z), .y_i(rnd_i.s1_y), .c_o(g)
  );

  // Input pipeline for Stage 4
  logic [2:0][7:0] x_d1, x_d2, x_d3;
  always_ff @(posedge clk_i) begin
    x_d1 <= x_i;
    x_d2 <= x_d1;
    x_d3 <= x_d2;
  end

  // Stage 2
  logic [2:0][1:0] g1, g0, sq2, w;
  always_comb
    for (int i = 0; i < 3; i++) begin
      g1[i]  = g[i][3:2];
      g0[i]  = g[i][1:0];
      sq2[i] = gf4_sq_sc(g1[i] ^ g0[i]);
    end

  dom_mul_c u_mul2 (
    .clk_i, .a_i(g1), .b_i(g0), .sq_i(sq2), .z_i(rnd_i.s2_z), .y_i(rnd_i.s2_y), .c_o(w)
  );

  logic [2:0][3:0] g_d;
  always_ff @(posedge clk_i) g_d <= g;

  // Stage 3
  logic [2:0][1:0] t, gd1, gd0, d_hi, d_lo;
  always_comb
    for (int i = 0; i < 3; i++) begin
      t[i]   = gf4_sq(w[i]);   // inversion in GF(2^2)
      gd1[i] = g_d[i][3:2];
      gd0[i] = g_d[i][1:0];
    end

  dom_mul_a #(.W(2)) u_mul31 (
    .clk_i, .a_i(t), .b_i(gd0), .z_i(rnd_i.s3a_z), .y_i(rnd_i.s3_y), .c_o(d_hi)
  );
  dom_mul_a #(.W(2)) u_mul32 (
    .clk_i, .a_i(t), .b_i(gd1), .z_i(rnd_i.s3b_z), .y_i(rnd_i.s3_y), .c_o(d_lo)
  );

  // Stage 4
  logic [2:0][3:0] d, xa1, xa0, inv_hi, inv_lo;
  always_comb
    for (int i = 0; i < 3; i++) begin
      d[i]   = {d_hi[i], d_lo[i]};
      xa1[i] = x_d3[i][7:4];
      xa0[i] = x_d3[i][3:0];
    end

  dom_mul_a #(.W(4)) u_mul41 (
    .clk_i, .a_i(d), .b_i(xa0), .z_i(rnd_i.s4a_z), .y_i(rnd_i.s4a_y), .c_o(inv_hi)
  );
  dom_mul_a #(.W(4)) u_mul42 (
    .clk_i, .a_i(d), .b_i(xa1), .z_i(rnd_i.s4b_z), .y_i(rnd_i.s4b_y), .c_o(inv_lo)
  );

  // Stage 5: inverse linear map and affine transform
  always_comb
    for (int i = 0; i < 3; i++)
      s_o[i] = inv_map_aff({inv_hi[i], inv_lo[i]}) ^ ((i == 0) ? SboxConst : 8'h00);

endmodule
