// aes_ref_pkg: unmasked reference model of AES-128 for the testbenches, written
// directly from FIPS-197 with no tower-field arithmetic: the S-box is the
// inverse x^254 in GF(2^8) followed by the affine transform. Blocks are 128-bit
// vectors with byte 0 (state s(0,0)) in bits 127:120.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] v);
    logic [7:0] inv = 8'h01, r;
    for (int i = 0; i < 254; i++) inv = gmul(inv, v);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // byte at row r, column c of a block
  function automatic logic [7:0] getb(logic [127:0] s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] setb(logic [127:0] s, int r, int c, logic [7:0] v);
    s[127 - 8*(4*c + r) -: 8] = v;
    return s;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s = setb(s, r, c, sbox(getb(s, r, c)));
    return s;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o = setb(o, r, c, getb(s, r, (c + r) % 4));
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o = setb(o, r, c, gmul(8'h02, getb(s, r, c)) ^ gmul(8'h03, getb(s, (r+1)%4, c))
                          ^ getb(s, (r+2)%4, c) ^ getb(s, (r+3)%4, c));
    return o;
  endfunction

  function automatic logic [127:0] next_key(logic [127:0] k, int round);
    logic [7:0] rc = 8'h01;
    logic [127:0] o;
    for (int i = 1; i < round; i++) rc = gmul(rc, 8'h02);
    for (int r = 0; r < 4; r++)
      o = setb(o, r, 0, getb(k, r, 0) ^ sbox(getb(k, (r+1)%4, 3)) ^ ((r == 0) ? rc : 8'h00));
    for (int c = 1; c < 4; c++)
      for (int r = 0; r < 4; r++) o = setb(o, r, c, getb(k, r, c) ^ getb(o, r, c-1));
    return o;
  endfunction

  // final_mix = 1 gives a (wrong) variant with MixColumns in round 10 as well
  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key,
                                           bit final_mix = 1'b0);
    logic [127:0] s = pt ^ key, k = key;
    for (int rnd = 1; rnd <= 10; rnd++) begin
      k = next_key(k, rnd);
      s = shift_rows(sub_bytes(s));
      if (rnd != 10 || final_mix) s = mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

endpackage
