// tb_aes_dom_core: drives the masked AES core with uniformly random 64-bit
// randomness from the testbench every cycle and checks random and FIPS-197
// blocks against the unmasked reference model, with fresh sharings of key and
// plaintext per block. It checks the 51-cycle latency from the start edge to
// done, back-to-back operation (a new start in the cycle after done), and
// correctness with the randomness input held at zero and key/plaintext given as
// one real share plus two zero shares (the unprotected configuration used as a
// sanity check of leakage measurements).
// Randomness usage: with zero randomness except for one random 64-bit word in a
// single cycle, swept over the whole block, the ciphertext must stay correct and
// exactly 50 of those cycles must change the output shares: four data cycles
// and one key cycle per round, 3200 fresh bits per block. The word in the last
// round's fifth cycle would refresh an eleventh round key and has no effect.
module tb_aes_dom_core;
  import aes_dom_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, done, out_valid, rng_on, pulse_now = 1'b0;
  int   pulse_at = -1;
  logic [63:0] rnd;
  state_t [2:0] key_sh, pt_sh, ct_sh;

  aes_dom_core dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key_sh), .pt_i(pt_sh),
    .rnd_i(rnd), .ct_o(ct_sh), .busy_o(busy), .done_o(done), .out_valid_o(out_valid)
  );

  always @(posedge clk) rnd <= (rng_on || pulse_now) ? {$urandom, $urandom} : 64'h0;

  int n_rng_off = 0, n_back_to_back = 0, n_words_used = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic share(logic [127:0] v, bit masked, output state_t [2:0] sh);
    logic [127:0] m0, m1;
    m0 = masked ? {$urandom, $urandom, $urandom, $urandom} : '0;
    m1 = masked ? {$urandom, $urandom, $urandom, $urandom} : '0;
    sh[0] = m0; sh[1] = m1; sh[2] = v ^ m0 ^ m1;
  endtask

  task automatic encrypt_block(logic [127:0] key, logic [127:0] pt, bit masked);
    logic [127:0] exp_ct, got;
    int cycles;
    exp_ct = encrypt(pt, key);
    share(key, masked, key_sh);
    share(pt, masked, pt_sh);
    start = 1'b1;
    pulse_now = (pulse_at == 0);
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 200) begin
      pulse_now = (pulse_at == cycles);
      @(posedge clk); #1;
      cycles++;
    end
    pulse_now = 1'b0;
    check($sformatf("latency %0d cycles, expected 51", cycles - 1), cycles - 1 == 51);
    got = ct_sh[0] ^ ct_sh[1] ^ ct_sh[2];
    check($sformatf("ciphertext %h expected %h", got, exp_ct), got === exp_ct);
    check("busy low with done", busy === 1'b0 && out_valid === 1'b1);
    if (!rng_on) n_rng_off++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; rng_on = 1'b1; key_sh = '0; pt_sh = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    encrypt_block(128'h000102030405060708090a0b0c0d0e0f,
                  128'h00112233445566778899aabbccddeeff, 1'b1);
    // the next start follows directly in the cycle after done
    for (int k = 0; k < 8; k++) begin
      encrypt_block({$urandom, $urandom, $urandom, $urandom},
                    {$urandom, $urandom, $urandom, $urandom}, 1'b1);
      n_back_to_back++;
    end
    rng_on = 1'b0;
    for (int k = 0; k < 2; k++)
      encrypt_block({$urandom, $urandom, $urandom, $urandom},
                    {$urandom, $urandom, $urandom, $urandom}, 1'b0);
    // one random RNG word at a time
    begin
      logic [127:0] k0 = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] p0 = {$urandom, $urandom, $urandom, $urandom};
      state_t [2:0] ref_sh;
      encrypt_block(k0, p0, 1'b0);
      ref_sh = ct_sh;
      for (int j = 0; j <= 52; j++) begin
        pulse_at = j;
        encrypt_block(k0, p0, 1'b0);
        if (ct_sh !== ref_sh) n_words_used++;
      end
      pulse_at = -1;
      check($sformatf("%0d RNG words of a block are used, expected 50", n_words_used),
            n_words_used == 50);
    end
    check("mechanism: back-to-back blocks", n_back_to_back > 0);
    check("mechanism: randomness off", n_rng_off > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
