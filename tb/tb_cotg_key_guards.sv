// tb_cotg_key_guards: checks the COTG network of the key-schedule S-boxes by
// flipping single bits of the key shares and of the RNG word:
//  - the S-box of k(n,3) never depends on a byte of column 3 nor on the bytes
//    of row (n+3) mod 4, which are later combined with its output;
//  - it uses at most one share of any key byte;
//  - it uses all nine listed guards, e.g. k_0(n,0), k_1(n,1), k_2(n,2) and the
//    rotated shares of the next two rows;
//  - RNG bits R[16n+15:16n] reach only the S-box of k(n,3), and all 16 of them
//    are used.
module tb_cotg_key_guards;
  import aes_dom_pkg::*;

  int checks = 0, failures = 0;
  state_t [2:0] key;
  logic [63:0]  rnd;
  sbox_rnd_t    ro [4];

  cotg_key_guards dut (.key_i(key), .rnd_i(rnd), .rnd_o(ro));

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // dep[n][share][col][row]: does S-box n depend on this key share byte?
  bit dep [4][3][4][4];

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    rnd = {$urandom, $urandom};
    #1;
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          for (int b = 0; b < 8; b++) begin
            sbox_rnd_t prev [4];
            prev = ro;
            key[k][c][r][b] = ~key[k][c][r][b];
            #1;
            for (int n = 0; n < 4; n++) if (ro[n] != prev[n]) dep[n][k][c][r] = 1'b1;
            key[k][c][r][b] = ~key[k][c][r][b];
            #1;
          end
    for (int n = 0; n < 4; n++) begin
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          int shares = dep[n][0][c][r] + dep[n][1][c][r] + dep[n][2][c][r];
          check($sformatf("S-box %0d uses %0d shares of k(%0d,%0d)", n, shares, r, c), shares <= 1);
          if (c == 3 || r == (n + 3) % 4)
            check($sformatf("S-box %0d must not use k(%0d,%0d)", n, r, c), shares == 0);
        end
      // first row of guards: k_0(n,0), k_1(n,1), k_2(n,2); next rows rotated
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++)
            check($sformatf("S-box %0d guard k_%0d(%0d,%0d)", n, (a+b)%3, (n+a)%4, b),
                  dep[n][(a+b)%3][b][(n+a)%4]);
    end
    for (int i = 0; i < 64; i++) begin
      sbox_rnd_t prev [4];
      prev = ro;
      rnd[i] = ~rnd[i];
      #1;
      for (int n = 0; n < 4; n++)
        check($sformatf("RNG bit %0d reaches S-box %0d only if it is its own", i, n),
              (ro[n] != prev[n]) == (n == i / 16));
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
