// tb_aes_cotg_top: end-to-end test of the masked AES with its Trivium RNG at the
// default configuration. It checks the two FIPS-197 example vectors and random
// key/plaintext pairs against the unmasked reference model, with a fresh random
// three-share sharing of key and plaintext for every block, and checks the
// 51-cycle latency from the start edge to done. It also exercises and counts:
// the RNG seeding (ready after 18 cycles), a start request refused while the
// RNG is not ready, a start request ignored while busy, re-seeding the RNG
// between blocks, back-to-back blocks, the last round without MixColumns, and
// the RNG-off mode: with the RNG disabled and two shares of key and plaintext
// zero, the result is still correct and repeats share for share, while with the
// RNG enabled the same sharing gives different output shares.
module tb_aes_cotg_top;
  import aes_dom_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, seed, rng_ready, rng_en, start, busy, done, out_valid;
  logic [79:0] rkey, riv;
  state_t [2:0] key_sh, pt_sh, ct_sh;

  aes_cotg_top dut (
    .clk_i(clk), .rst_ni(rst_n), .rng_seed_i(seed), .rng_key_i(rkey), .rng_iv_i(riv),
    .rng_ready_o(rng_ready), .rng_en_i(rng_en), .start_i(start), .key_i(key_sh), .pt_i(pt_sh), .ct_o(ct_sh),
    .busy_o(busy), .done_o(done), .out_valid_o(out_valid)
  );

  int n_seed = 0, n_blocked_rng = 0, n_ignored_busy = 0, n_blocks = 0, n_last_round = 0,
      n_rng_off = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic share(logic [127:0] v, output state_t [2:0] sh);
    logic [127:0] m0, m1;
    m0 = {$urandom, $urandom, $urandom, $urandom};
    m1 = {$urandom, $urandom, $urandom, $urandom};
    sh[0] = m0; sh[1] = m1; sh[2] = v ^ m0 ^ m1;
  endtask

  // fixed_sharing: shares 1 and 2 of key and plaintext are zero
  task automatic encrypt_block(logic [127:0] key, logic [127:0] pt, bit poke_busy,
                               bit fixed_sharing = 1'b0);
    logic [127:0] exp_ct, got;
    int cycles;
    exp_ct = encrypt(pt, key);
    if (fixed_sharing) begin
      key_sh = '0; key_sh[0] = key;
      pt_sh  = '0; pt_sh[0]  = pt;
    end else begin
      share(key, key_sh);
      share(pt, pt_sh);
    end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    @(posedge clk); #1;   // plaintext taken in this cycle
    cycles++;
    share(128'h0, pt_sh); // the plaintext port is free again
    while (!done && cycles < 200) begin
      if (poke_busy && cycles == 20) begin
        start = 1'b1; share({$urandom, $urandom, 64'h0}, key_sh);
      end else start = 1'b0;
      if (poke_busy && cycles == 20) n_ignored_busy++;
      @(posedge clk); #1;
      cycles++;
      start = 1'b0;
    end
    // done rises after the edge that writes the last round
    check($sformatf("latency %0d cycles, expected 51", cycles - 1), cycles - 1 == 51);
    got = ct_sh[0] ^ ct_sh[1] ^ ct_sh[2];
    check($sformatf("ciphertext %h expected %h", got, exp_ct), got === exp_ct);
    check("out_valid after done", out_valid === 1'b1);
    // the result matches only because round 10 skips MixColumns
    if (got === exp_ct && got !== encrypt(pt, key, 1'b1)) n_last_round++;
    @(posedge clk); #1;
    check("busy low after done", busy === 1'b0);
    n_blocks++;
  endtask

  task automatic seed_rng();
    int c = 0;
    rkey = {$urandom, $urandom, 16'($urandom)};
    riv  = {$urandom, $urandom, 16'($urandom)};
    seed = 1'b1;
    @(posedge clk); #1;
    seed = 1'b0;
    while (!rng_ready && c < 100) begin
      @(posedge clk); #1;
      c++;
    end
    check($sformatf("RNG ready after %0d cycles, expected 18", c), c == 18);
    n_seed++;
  endtask

  initial begin
    rst_n = 1'b0; seed = 1'b0; start = 1'b0; rng_en = 1'b1; rkey = '0; riv = '0;
    key_sh = '0; pt_sh = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // start before the RNG is seeded is refused
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    @(posedge clk); #1;
    check("start refused while RNG not ready", busy === 1'b0);
    n_blocked_rng++;

    // RNG off: runs before seeding, result repeats share for share
    begin
      state_t [2:0] first;
      logic [127:0] k0 = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] p0 = {$urandom, $urandom, $urandom, $urandom};
      rng_en = 1'b0;
      encrypt_block(k0, p0, 1'b0, 1'b1);
      first = ct_sh;
      encrypt_block(k0, p0, 1'b0, 1'b1);
      check("RNG off: identical output shares", ct_sh === first);
      if (ct_sh === first) n_rng_off++;
      rng_en = 1'b1;
      seed_rng();
      encrypt_block(k0, p0, 1'b0, 1'b1);
      check("RNG on: output shares refreshed", ct_sh !== first);
    end

    seed_rng();
    encrypt_block(128'h000102030405060708090a0b0c0d0e0f,
                  128'h00112233445566778899aabbccddeeff, 1'b0);
    encrypt_block(128'h2b7e151628aed2a6abf7158809cf4f3c,
                  128'h3243f6a8885a308d313198a2e0370734, 1'b1);
    for (int k = 0; k < 6; k++) begin
      if (k == 3) seed_rng();
      encrypt_block({$urandom, $urandom, $urandom, $urandom},
                    {$urandom, $urandom, $urandom, $urandom}, k == 1);
    end

    check("mechanism: RNG seeding", n_seed >= 2);
    check("mechanism: start refused before RNG ready", n_blocked_rng >= 1);
    check("mechanism: start ignored while busy", n_ignored_busy >= 1);
    check("mechanism: last round without MixColumns", n_last_round == n_blocks);
    check("mechanism: RNG off", n_rng_off >= 1);
    $display("mechanisms: seeds=%0d refused=%0d ignored_busy=%0d blocks=%0d last_rounds=%0d rng_off=%0d",
             n_seed, n_blocked_rng, n_ignored_busy, n_blocks, n_last_round, n_rng_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
