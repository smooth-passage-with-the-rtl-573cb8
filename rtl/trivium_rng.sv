// trivium_rng: Trivium keystream generator used as the design's RNG, unrolled to
// 64 keystream bits per clock cycle.
//
// Trivium (De Canniere and Preneel) has a 288-bit state s1..s288 in three
// shift registers of 93, 84 and 111 bits. Per step:
//   t1 = s66^s93, t2 = s162^s177, t3 = s243^s288, z = t1^t2^t3,
//   t1 ^= s91&s92 ^ s171, t2 ^= s175&s176 ^ s264, t3 ^= s286&s287 ^ s69,
//   the registers shift by one and take t3, t1 and t2 at s1, s94 and s178.
// Seeding loads (K1..K80, 0..) into s1..s93, (IV1..IV80, 0..) into s94..s177
// and (0.., 1, 1, 1) into s178..s288, then runs 4 x 288 = 1152 steps without
// output, which is 18 cycles here. Afterwards every cycle yields 64 new bits,
// rnd_o[j] being the keystream bit of the j-th step of that cycle. The paper
// names Trivium and the 64-bit rate; the mapping of K_i to key_i[i-1] and IV_i
// to iv_i[i-1], and the seed/ready interface, are this design's choices.
//
// Timing: seed_i (one cycle) loads key and IV; ready_o rises 18 cycles later.
// The generator then advances every cycle; rnd_o is a register output.
module trivium_rng #(
  parameter int unsigned BITS_PER_CYCLE = 64
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      seed_i,
  input  logic [79:0]               key_i,
  input  logic [79:0]               iv_i,
  output logic [BITS_PER_CYCLE-1:0] rnd_o,
  output logic                      ready_o
);
  localparam int unsigned InitSteps  = 4 * 288;
  localparam int unsigned InitCycles = InitSteps / BITS_PER_CYCLE;

  logic [287:0] s_q, s_next;              // s_q[k-1] holds s_k
  logic [BITS_PER_CYCLE-1:0] z;
  logic [$clog2(InitCycles+1)-1:0] init_cnt_q;
  logic running_q;

  always_comb begin
    logic [287:0] s;
    logic t1, t2, t3;
    s = s_q;
    for (int j = 0; j < int'(BITS_PER_CYCLE); j++) begin
      t1 = s[65] ^ s[92];
      t2 = s[161] ^ s[176];
      t3 = s[242] ^ s[287];
      z[j] = t1 ^ t2 ^ t3;
      t1 = t1 ^ (s[90] & s[91]) ^ s[170];
      t2 = t2 ^ (s[174] & s[175]) ^ s[263];
      t3 = t3 ^ (s[285] & s[286]) ^ s[68];
      s[92:0]    = {s[91:0], t3};
      s[176:93]  = {s[175:93], t1};
      s[287:177] = {s[286:177], t2};
    end
    s_next = s;
  end

  always_ff @(posedge clk_i or negedge rst_ni)
    if (!rst_ni) begin
      init_cnt_q <= '0;
      running_q  <= 1'b0;
      ready_o    <= 1'b0;
    end else if (seed_i) begin
      init_cnt_q <= '0;
      running_q  <= 1'b1;
      ready_o    <= 1'b0;
    end else if (running_q && !ready_o) begin
      init_cnt_q <= init_cnt_q + 1'b1;
      if (init_cnt_q == ($bits(init_cnt_q))'(InitCycles - 1)) ready_o <= 1'b1;
    end

  always_ff @(posedge clk_i)
    if (seed_i) begin
      s_q          <= '0;
      s_q[79:0]    <= key_i;
      s_q[172:93]  <= iv_i;
      s_q[287:285] <= 3'b111;
      rnd_o        <= '0;
    end else begin
      s_q   <= s_next;
      rnd_o <= ready_o ? z : '0;
    end

endmodule
