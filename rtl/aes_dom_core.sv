// aes_dom_core: round-based second-order masked AES-128 encryption (three shares).
//
// All 16 state bytes and the four key-schedule bytes go through their own
// 5-stage masked S-box at the same time, so a round takes five cycles:
// Stages 1-4 are the S-box multiplier stages and Stage 5 is the linear layer
// (S-box output map, ShiftRows, MixColumns, AddRoundKey and the linear map of
// the next round's S-box inputs), which writes the state register. The state
// register therefore holds the state in the tower-field normal basis, and it
// stays constant during Stages 1-4, which lets its bytes serve as guards.
//
// The key schedule runs one cycle ahead of the data path, so AddRoundKey always
// reads the round key from the key register:
//   cycle 0 (start_i): key register <- key_i, key S-box input register <-
//            A2X(key column 3); the key S-boxes' Stage 1 follows in cycle 1.
//   cycle 1 (INIT): state <- A2X(pt_i ^ key); initial AddRoundKey.
//   each round (5 cycles, stg 0..4 = data Stages 1..5): at stg 3 (key Stage 5)
//            the key register takes the next round key; at stg 4 the state
//            register takes the round output. MixColumns is skipped in round 10.
// The ciphertext is in the state register 51 cycles after the start edge
// (the paper's 50+1 cycles). Randomness: rnd_i (64 bits) feeds the data
// S-boxes in the four cycles of their Stages 1-4 and the key S-boxes' Stage 1
// in the fifth, 320 bits per round and 3200 per block.
//
// Interface: start_i is accepted when busy_o is low. key_i (3 shares) is read
// in the start cycle, pt_i (3 shares) in the cycle after it, so both must be
// stable over those two cycles. done_o pulses for one cycle once the ciphertext
// shares ct_o are ready; ct_o (polynomial basis, three shares) then stays valid
// (out_valid_o) until the next start. Only the control has a reset
// (asynchronous, active low); data registers are written before they are read.
module aes_dom_core (
  input  logic                       clk_i,
  input  logic                       rst_ni,
  input  logic                       start_i,
  input  aes_dom_pkg::state_t [2:0]  key_i,
  input  aes_dom_pkg::state_t [2:0]  pt_i,
  input  logic [63:0]                rnd_i,
  output aes_dom_pkg::state_t [2:0]  ct_o,
  output logic                       busy_o,
  output logic                       done_o,
  output logic                       out_valid_o
);
  import aes_dom_pkg::*;

  typedef enum logic [1:0] {IDLE, INIT, ROUND} ctrl_e;

  ctrl_e       ctrl_q;
  logic [2:0]  stg_q;      // 0..4: data path in Stage stg_q+1
  logic [3:0]  rnd_q;      // round 1..10
  logic        done_q, valid_q;

  state_t [2:0] state_q, key_q, sb, key_next, lin_out;
  word_t  [2:0] ksb_q;
  logic         last_round;

  assign last_round = (rnd_q == 4'd10);

  aes_sub_bytes u_sub_bytes (.clk_i, .st_i(state_q), .rnd_i, .sb_o(sb));

  aes_key_expand u_key_expand (
    .clk_i, .key_i(key_q), .ksb_i(ksb_q), .rnd_i, .rcon_i(rcon(int'(rnd_q))), .key_o(key_next)
  );

  for (genvar i = 0; i < 3; i++) begin : g_lin
    aes_lin_layer u_lin (.sb_i(sb[i]), .key_i(key_q[i]), .mix_i(!last_round), .st_o(lin_out[i]));
  end

  // Control
  always_ff @(posedge clk_i or negedge rst_ni)
    if (!rst_ni) begin
      ctrl_q  <= IDLE;
      stg_q   <= '0;
      rnd_q   <= 4'd1;
      done_q  <= 1'b0;
      valid_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (ctrl_q)
        IDLE: if (start_i) begin
          ctrl_q  <= INIT;
          valid_q <= 1'b0;
        end
        INIT: begin
          ctrl_q <= ROUND;
          stg_q  <= '0;
          rnd_q  <= 4'd1;
        end
        ROUND: begin
          if (stg_q == 3'd4) begin
            stg_q <= '0;
            if (last_round) begin
              ctrl_q  <= IDLE;
              done_q  <= 1'b1;
              valid_q <= 1'b1;
            end else begin
              rnd_q <= rnd_q + 4'd1;
            end
          end else begin
            stg_q <= stg_q + 3'd1;
          end
        end
        default: ctrl_q <= IDLE;
      endcase
    end

  // Data registers
  logic key_load, key_update;
  assign key_load   = (ctrl_q == IDLE) && start_i;
  assign key_update = (ctrl_q == ROUND) && (stg_q == 3'd3);

  always_ff @(posedge clk_i) begin
    if (key_load) key_q <= key_i;
    else if (key_update) key_q <= key_next;

    for (int i = 0; i < 3; i++)
      for (int r = 0; r < 4; r++)
        if (key_load) ksb_q[i][r] <= lin_map(key_i[i][3][r]);
        else if (key_update) ksb_q[i][r] <= lin_map(key_next[i][3][r]);

    if (ctrl_q == INIT) begin
      for (int i = 0; i < 3; i++)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            state_q[i][c][r] <= lin_map(pt_i[i][c][r] ^ key_q[i][c][r]);
    end else if (ctrl_q == ROUND && stg_q == 3'd4) begin
      state_q <= lin_out;
    end
  end

  always_comb
    for (int i = 0; i < 3; i++)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          ct_o[i][c][r] = inv_lin_map(state_q[i][c][r]);

  assign busy_o      = (ctrl_q != IDLE);
  assign done_o      = done_q;
  assign out_valid_o = valid_q;

`ifndef SYNTHESIS
  // The round counter and stage counter stay in range while a block is processed.
  a_stg_range: assert property (@(posedge clk_i) disable iff (!rst_ni)
    ctrl_q == ROUND |-> (stg_q <= 3'd4 && rnd_q >= 4'd1 && rnd_q <= 4'd10));
`endif

endmodule
