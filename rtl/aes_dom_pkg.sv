// aes_dom_pkg: types, tower-field arithmetic and basis changes shared by the
// second-order masked AES.
//
// The S-box inverts in GF(2^8) through the tower GF(((2^2)^2)^2) in normal bases
// (GF(2^2): [W^2, W], GF(2^4): [a^8, a^2], GF(2^8): [Y^16, Y]), as in Canright's
// compact S-box that the masked design builds on. A byte x in the AES polynomial
// basis is taken into this tower by the matrix A2X and back by X2A; X2S is X2A
// followed by the bit matrix of the AES affine transform (its constant 0x63 is
// added separately, to share 0 only). Each matrix is stored as eight column
// vectors: column i is the image of input bit i. They follow from mapping the
// polynomial-basis generator x to the tower root 0x17 of x^8+x^4+x^3+x+1, so
// A2X[i] = 0x17^i computed with the tower multiplication; the paper names the
// decomposition but prints no matrices, so these constants are this design's.
//
// State layout: state_t is [column][row] of bytes with s(0,0) in the top byte,
// which is the usual FIPS-197 byte order of a 128-bit block.
package aes_dom_pkg;

  typedef logic [7:0]            byte_t;
  typedef logic [0:3][0:3][7:0]  state_t;   // [col][row]
  typedef logic [0:3][7:0]       word_t;    // [row]

  // Refresh inputs of one masked S-box, all sampled in the cycle of their stage.
  // Stage 3 and Stage 4 y terms are the inner-domain refresh that the full AES
  // adds; the stand-alone 78-bit S-box ties them to zero.
  typedef struct packed {
    logic [3:0][3:0] s1_z;   // Type B z0..z3, 4 bit each
    logic [1:0][3:0] s1_y;   // Type B y0, y1
    logic [5:0][1:0] s2_z;   // Type C z0..z5, 2 bit each
    logic [2:0][1:0] s2_y;   // Type C y0..y2
    logic [2:0][1:0] s3a_z;  // multiplier 3/1 z0..z2
    logic [2:0][1:0] s3b_z;  // multiplier 3/2 z0..z2
    logic [1:0][1:0] s3_y;   // y0, y1 shared by 3/1 and 3/2
    logic [2:0][3:0] s4a_z;  // multiplier 4/1 z0..z2
    logic [1:0][3:0] s4a_y;  // multiplier 4/1 y0, y1
    logic [2:0][3:0] s4b_z;  // multiplier 4/2 z0..z2
    logic [1:0][3:0] s4b_y;  // multiplier 4/2 y0, y1
  } sbox_rnd_t;


  localparam byte_t A2X [8] = '{8'hff, 8'h17, 8'h9a, 8'h74, 8'h18, 8'h51, 8'h90, 8'hf2};
  localparam byte_t X2A [8] = '{8'hca, 8'h93, 8'h9c, 8'hd7, 8'hc7, 8'h7e, 8'h2d, 8'h87};
  localparam byte_t X2S [8] = '{8'h8e, 8'h5f, 8'hfa, 8'he4, 8'h15, 8'h6f, 8'h78, 8'hd2};
  localparam byte_t SboxConst = 8'h63;

  function automatic byte_t mvm(byte_t x, byte_t m [8]);
    byte_t r;
    r = '0;
    for (int i = 0; i < 8; i++) if (x[i]) r ^= m[i];
    return r;
  endfunction

  function automatic byte_t lin_map(byte_t x);     return mvm(x, A2X); endfunction
  function automatic byte_t inv_lin_map(byte_t x); return mvm(x, X2A); endfunction
  function automatic byte_t inv_map_aff(byte_t x); return mvm(x, X2S); endfunction

  // GF(2^2), normal basis [W^2, W]
  function automatic logic [1:0] gf4_mul(logic [1:0] g, logic [1:0] d);
    logic a, b, c;
    a = g[1] & d[1];
    b = (^g) & (^d);
    c = g[0] & d[0];
    return {a ^ b, c ^ b};
  endfunction

  function automatic logic [1:0] gf4_sq(logic [1:0] g);      return {g[0], g[1]}; endfunction
  function automatic logic [1:0] gf4_sc_n(logic [1:0] g);    return {g[0], g[1] ^ g[0]}; endfunction
  function automatic logic [1:0] gf4_sc_n2(logic [1:0] g);   return {g[1] ^ g[0], g[1]}; endfunction

  // GF(2^4), normal basis [a^8, a^2]
  function automatic logic [3:0] gf16_mul(logic [3:0] g, logic [3:0] d);
    logic [1:0] a, b, c;
    a = gf4_mul(g[3:2], d[3:2]);
    b = gf4_sc_n(gf4_mul(g[3:2] ^ g[1:0], d[3:2] ^ d[1:0]));
    c = gf4_mul(g[1:0], d[1:0]);
    return {a ^ b, c ^ b};
  endfunction

  // Square and scale by nu in GF(2^4)
  function automatic logic [3:0] gf16_sq_sc(logic [3:0] g);
    return {gf4_sq(g[3:2] ^ g[1:0]), gf4_sc_n2(gf4_sq(g[1:0]))};
  endfunction

  // Square and scale by N in GF(2^2) (square scaler of Stage 2)
  function automatic logic [1:0] gf4_sq_sc(logic [1:0] g);
    return gf4_sc_n(gf4_sq(g));
  endfunction

  // Field multiplication selected by width (2: GF(2^2), 4: GF(2^4))
  function automatic logic [3:0] gf_mul_w(int unsigned w, logic [3:0] g, logic [3:0] d);
    if (w == 2) return {2'b00, gf4_mul(g[1:0], d[1:0])};
    return gf16_mul(g, d);
  endfunction

  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant of AES-128 key expansion round r (1..10)
  function automatic byte_t rcon(int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < 10; i++) if (i < r) c = xtime(c);
    return c;
  endfunction

endpackage
