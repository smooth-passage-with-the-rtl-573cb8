// tb_cotg_data_guards: checks the COTG network of the data S-boxes.
// 1. Worked examples: for random state shares and RNG words, the refresh values
//    of several S-boxes are compared with the guard assignments spelled out for
//    Stages 1, 2 and 3 of the first two super boxes, and with the general
//    Stage 4 rule.
// 2. Stage 4 usage: flipping any single bit of any share of any state byte
//    must change exactly one Stage 4 z bit of all 16 S-boxes, in an S-box of
//    another super box (every guard share is used once, and only across super
//    boxes prev MixColumns).
// 3. Reuse of fresh bits: row Rr reaches only the S-boxes of row r.
module tb_cotg_data_guards;
  import aes_dom_pkg::*;

  int checks = 0, failures = 0;
  state_t [2:0] st;
  logic [63:0]  rnd;
  sbox_rnd_t    ro [4][4];

  cotg_data_guards dut (.st_i(st), .rnd_i(rnd), .rnd_o(ro));

  function automatic byte_t sh(int k, int r, int c);
    return st[k][c][r];
  endfunction
  function automatic logic [15:0] R(int i);
    return rnd[16*i +: 16];
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Stage 1 of s(r,c): {z0,z1}, {z2,z3}, {y0,y1}
  task automatic stage1(int r, int c, byte_t e0, byte_t e1, byte_t e2);
    check($sformatf("stage 1 s(%0d,%0d)", r, c),
          ro[c][r].s1_z == {e1, e0} && ro[c][r].s1_y == e2);
  endtask
  // Stage 2 of s(r,c): {z0..z3}, {z4,z5,y0,y1}, y2
  task automatic stage2(int r, int c, byte_t e0, byte_t e1, logic [1:0] e2);
    check($sformatf("stage 2 s(%0d,%0d)", r, c),
          ro[c][r].s2_z == {e1[3:0], e0} && ro[c][r].s2_y == {e2, e1[7:4]});
  endtask
  // Stage 3 multiplier 3/1 of s(r,c)
  task automatic stage3(int r, int c, logic [5:0] e);
    check($sformatf("stage 3 s(%0d,%0d)", r, c), ro[c][r].s3a_z == e);
  endtask

  function automatic int count_s4_diff(sbox_rnd_t a [4][4], sbox_rnd_t b [4][4],
                                       output int sb_col, output int sb_row);
    int n = 0;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int d = $countones({a[c][r].s4a_z ^ b[c][r].s4a_z, a[c][r].s4b_z ^ b[c][r].s4b_z});
        if (d != 0) begin sb_col = c; sb_row = r; end
        n += d;
      end
    return n;
  endfunction

  initial begin
    for (int k = 0; k < 50; k++) begin
      st  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
             $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      rnd = {$urandom, $urandom};
      #1;
      stage1(0, 0, sh(0,1,1), R(0)[7:0], sh(1,2,2) ^ R(0)[15:8]);
      stage1(0, 1, sh(0,1,2), R(0)[7:0], sh(1,2,3) ^ R(0)[15:8]);
      stage1(2, 2, sh(0,3,3), R(2)[7:0], sh(1,0,0) ^ R(2)[15:8]);
      stage1(2, 3, sh(0,3,0), R(2)[7:0], sh(1,0,1) ^ R(2)[15:8]);
      stage1(3, 0, sh(0,0,1), R(3)[7:0], sh(1,1,2) ^ R(3)[15:8]);
      stage1(3, 3, sh(0,0,0), R(3)[7:0], sh(1,1,1) ^ R(3)[15:8]);
      stage2(0, 0, R(0)[7:0], sh(0,1,2) ^ R(0)[15:8], sh(1,2,3)[1:0]);
      stage2(0, 1, R(0)[7:0], sh(0,1,3) ^ R(0)[15:8], sh(1,2,0)[1:0]);
      stage2(1, 1, R(1)[7:0], sh(0,2,3) ^ R(1)[15:8], sh(1,3,0)[1:0]);
      stage2(1, 2, R(1)[7:0], sh(0,2,0) ^ R(1)[15:8], sh(1,3,1)[1:0]);
      stage2(2, 2, R(2)[7:0], sh(0,3,0) ^ R(2)[15:8], sh(1,0,1)[1:0]);
      stage2(2, 3, R(2)[7:0], sh(0,3,1) ^ R(2)[15:8], sh(1,0,2)[1:0]);
      stage2(3, 3, R(3)[7:0], sh(0,0,1) ^ R(3)[15:8], sh(1,1,2)[1:0]);
      stage2(3, 0, R(3)[7:0], sh(0,0,2) ^ R(3)[15:8], sh(1,1,3)[1:0]);
      stage3(0, 0, sh(2,2,2)[5:0] ^ R(0)[5:0]);
      stage3(0, 1, sh(2,2,3)[5:0] ^ R(0)[5:0]);
      stage3(1, 2, sh(2,3,0)[5:0] ^ R(1)[5:0]);
      stage3(2, 3, sh(2,0,1)[5:0] ^ R(2)[5:0]);
      stage3(3, 0, sh(2,1,2)[5:0] ^ R(3)[5:0]);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          check("stage 3/2", ro[c][r].s3b_z == (sh(0,(r+3)%4,(c+3)%4)[5:0] ^ R(r)[13:8]));
          check("stage 4", ro[c][r].s4a_z == {sh(1,r,(c+2)%4)[3:0], sh(0,r,(c+1)%4)} &&
                           ro[c][r].s4b_z == {sh(2,r,(c+3)%4), sh(1,r,(c+2)%4)[7:4]} &&
                           ro[c][r].s4a_y == R(r)[7:0] && ro[c][r].s4b_y == R(r)[15:8]);
        end
    end

    // every state-share bit is used exactly once in Stage 4, in a foreign super box
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          for (int b = 0; b < 8; b++) begin
            sbox_rnd_t prev [4][4];
            int n, hc, hr;
            prev = ro;
            st[k][c][r][b] = ~st[k][c][r][b];
            #1;
            n = count_s4_diff(prev, ro, hc, hr);
            check($sformatf("share %0d of s(%0d,%0d) bit %0d used %0d times in Stage 4", k, r, c, b, n),
                  n == 1 && ((hc - hr + 4) % 4) != ((c - r + 4) % 4));
            st[k][c][r][b] = ~st[k][c][r][b];
            #1;
          end

    // RNG row r only reaches S-boxes of row r
    for (int i = 0; i < 64; i++) begin
      sbox_rnd_t prev [4][4];
      logic ok = 1'b1;
      prev = ro;
      rnd[i] = ~rnd[i];
      #1;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          if (r != i / 16 && ro[c][r] != prev[c][r]) ok = 1'b0;
      check($sformatf("RNG bit %0d stays in its row", i), ok);
      rnd[i] = ~rnd[i];
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
