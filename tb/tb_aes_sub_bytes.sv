// tb_aes_sub_bytes: holds a random three-shared state (normal basis) for one
// round, feeds fresh random 64-bit words every cycle as the COTG refresh source
// and checks, in the fifth cycle, that every byte of the recombined output is
// the AES S-box of the recombined input byte. Some rounds run with the fresh
// randomness at zero, where the guards alone refresh the multipliers.
module tb_aes_sub_bytes;
  import aes_dom_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t [2:0] st, sb;
  logic [63:0] rnd;

  aes_sub_bytes dut (.clk_i(clk), .st_i(st), .rnd_i(rnd), .sb_o(sb));

  initial begin
    for (int k = 0; k < 40; k++) begin
      logic [127:0] plain, exp_v, got, m0, m1;
      plain = {$urandom, $urandom, $urandom, $urandom};
      m0 = {$urandom, $urandom, $urandom, $urandom};
      m1 = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) begin
          st[0][c][r] = getb(m0, r, c);
          st[1][c][r] = getb(m1, r, c);
          st[2][c][r] = lin_map(getb(plain, r, c)) ^ getb(m0, r, c) ^ getb(m1, r, c);
        end
      for (int s = 0; s < 4; s++) begin
        rnd = (k % 4 == 3) ? 64'h0 : {$urandom, $urandom};
        @(posedge clk); #1;
      end
      exp_v = sub_bytes(plain);
      got = sb[0] ^ sb[1] ^ sb[2];
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 5) $display("mismatch got %h exp %h", got, exp_v);
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
