// cotg_data_guards: the changing-of-the-guards network of the 16 data S-boxes.
// It forms, every cycle, all refresh inputs of every S-box from shares of other
// state-register bytes (the guards) and the 64 fresh random bits of the cycle.
//
// The 64-bit word R of the current cycle is split into rows R0 = R[15:0] ..
// R3 = R[63:48]; the S-box of byte s(r,c) uses row Rr, so the same random
// bits are reused once in each super box (a super box is a column of the
// state after ShiftRows: bytes s(r, c+r)). Guards are shares of state-register
// bytes; indices are taken modulo 4. Assignment per S-box of s(r,c), following
// the paper's table of guards (Table 2):
//   Stage 1 (Type B): z0,z1 = s_0(r+1,c+1); z2,z3 = Rr[7:0];
//                     y0,y1 = s_1(r+2,c+2) ^ Rr[15:8]
//   Stage 2 (Type C): z0..z3 = Rr[7:0]; z4,z5,y0,y1 = s_0(r+1,c+2) ^ Rr[15:8];
//                     y2 = s_1(r+2,c+3)[1:0]
//   Stage 3: 3/1 z0..z2 = s_2(r+2,c+2)[5:0] ^ Rr[5:0];
//            3/2 z0..z2 = s_0(r+3,c+3)[5:0] ^ Rr[13:8]; y0 = Rr[7:6], y1 = Rr[15:14]
//   Stage 4: 4/1 z0 = s_0(r,c+1)[3:0], z1 = s_0(r,c+1)[7:4], z2 = s_1(r,c+2)[3:0],
//                y0 = Rr[3:0], y1 = Rr[7:4];
//            4/2 z0 = s_1(r,c+2)[7:4], z1 = s_2(r,c+3)[3:0], z2 = s_2(r,c+3)[7:4],
//                y0 = Rr[11:8], y1 = Rr[15:12]
// Within a multi-value field the lowest bits go to the lowest-numbered term
// (this packing order is this design's choice). Stage 4 takes its guards from
// the three foreign super boxes, one share domain each; Stages 1 and 3 from the
// domestic and Stage 2 from the neighbouring super box.
//
// Purely combinational; each S-box samples only the fields of its active stage.
module cotg_data_guards (
  input  aes_dom_pkg::state_t [2:0]  st_i,    // state shares, normal basis
  input  logic [63:0]                rnd_i,   // fresh randomness of this cycle
  output aes_dom_pkg::sbox_rnd_t     rnd_o [4][4]   // [col][row]
);
  import aes_dom_pkg::*;

  function automatic byte_t g(int sh, int r, int c);
    return st_i[sh][c % 4][r % 4];
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [15:0] rr;
        byte_t t1, t2;
        logic [5:0] v3a, v3b;
        rr  = rnd_i[16*r +: 16];
        t1  = g(1, r+2, c+2) ^ rr[15:8];
        t2  = g(0, r+1, c+2) ^ rr[15:8];
        v3a = g(2, r+2, c+2)[5:0] ^ rr[5:0];
        v3b = g(0, r+3, c+3)[5:0] ^ rr[13:8];

        rnd_o[c][r].s1_z  = {rr[7:0], g(0, r+1, c+1)};
        rnd_o[c][r].s1_y  = t1;
        rnd_o[c][r].s2_z  = {t2[3:0], rr[7:0]};
        rnd_o[c][r].s2_y  = {g(1, r+2, c+3)[1:0], t2[7:4]};
        rnd_o[c][r].s3a_z = v3a;
        rnd_o[c][r].s3b_z = v3b;
        rnd_o[c][r].s3_y  = {rr[15:14], rr[7:6]};
        rnd_o[c][r].s4a_z = {g(1, r, c+2)[3:0], g(0, r, c+1)};
        rnd_o[c][r].s4a_y = rr[7:0];
        rnd_o[c][r].s4b_z = {g(2, r, c+3), g(1, r, c+2)[7:4]};
        rnd_o[c][r].s4b_y = rr[15:8];
      end
  end

endmodule
