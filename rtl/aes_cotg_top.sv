// aes_cotg_top: second-order masked AES-128 with changing-of-the-guards and its
// RNG, as in the paper's architecture figure.
//
// One Trivium instance delivers 64 fresh random bits per cycle, the whole
// randomness the masked AES core needs (320 bits per round, 3200 per block).
// The RNG is seeded once (rng_seed_i with an 80-bit key and IV) and then runs
// freely; an encryption can start once it is ready. Everything else is the
// core's interface: three shares of key and plaintext in, three shares of the
// ciphertext out after 51 cycles. The outer control logic the paper mentions
// for its FPGA board (USB transfer) is not part of this module.
//
// rng_en_i switches the fresh randomness off: the core then gets an all-zero
// RNG word and may start without a seeded RNG. This is the test mode the paper
// uses to show that its leakage test can detect an unprotected run (RNG off,
// two shares of key and plaintext zero); the port itself is this design's.
// The RNG keeps running while disabled.
//
// Timing: see aes_dom_core; start_i is ignored while busy_o is high, or while
// rng_en_i is high and rng_ready_o low. rng_en_i must be stable during a block.
module aes_cotg_top (
  input  logic                       clk_i,
  input  logic                       rst_ni,
  input  logic                       rng_seed_i,
  input  logic [79:0]                rng_key_i,
  input  logic [79:0]                rng_iv_i,
  output logic                       rng_ready_o,
  input  logic                       rng_en_i,
  input  logic                       start_i,
  input  aes_dom_pkg::state_t [2:0]  key_i,
  input  aes_dom_pkg::state_t [2:0]  pt_i,
  output aes_dom_pkg::state_t [2:0]  ct_o,
  output logic                       busy_o,
  output logic                       done_o,
  output logic                       out_valid_o
);
  logic [63:0] rnd, rnd_core;
  logic        start_ok;

  trivium_rng #(.BITS_PER_CYCLE(64)) u_rng (
    .clk_i, .rst_ni, .seed_i(rng_seed_i), .key_i(rng_key_i), .iv_i(rng_iv_i),
    .rnd_o(rnd), .ready_o(rng_ready_o)
  );

  assign rnd_core = rng_en_i ? rnd : '0;
  assign start_ok = start_i && (rng_ready_o || !rng_en_i);

  aes_dom_core u_core (
    .clk_i, .rst_ni, .start_i(start_ok), .key_i, .pt_i, .rnd_i(rnd_core),
    .ct_o, .busy_o, .done_o, .out_valid_o
  );

endmodule
