// tb_aes_key_expand: holds a random three-shared round key and the mapped
// shares of its last column for one round, feeds random 64-bit words every
// cycle and checks, in the fifth cycle, that the recombined output is the next
// AES-128 round key of the reference model for a random round number 1..10.
module tb_aes_key_expand;
  import aes_dom_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t [2:0] key, key_nxt;
  word_t  [2:0] ksb;
  logic [63:0]  rnd;
  byte_t        rc;

  aes_key_expand dut (.clk_i(clk), .key_i(key), .ksb_i(ksb), .rnd_i(rnd), .rcon_i(rc),
                      .key_o(key_nxt));

  initial begin
    for (int k = 0; k < 60; k++) begin
      logic [127:0] plain, m0, m1, exp_v, got;
      int round;
      round = 1 + (k % 10);
      rc = 8'h01;
      for (int i = 1; i < round; i++) rc = gmul(rc, 8'h02);
      plain = {$urandom, $urandom, $urandom, $urandom};
      m0 = {$urandom, $urandom, $urandom, $urandom};
      m1 = {$urandom, $urandom, $urandom, $urandom};
      key[0] = m0; key[1] = m1; key[2] = plain ^ m0 ^ m1;
      for (int i = 0; i < 3; i++)
        for (int r = 0; r < 4; r++) ksb[i][r] = lin_map(key[i][3][r]);
      for (int s = 0; s < 4; s++) begin
        rnd = {$urandom, $urandom};
        @(posedge clk); #1;
      end
      exp_v = next_key(plain, round);
      got = key_nxt[0] ^ key_nxt[1] ^ key_nxt[2];
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 5) $display("round %0d mismatch got %h exp %h", round, got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
