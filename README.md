# Second-order masked AES-128 with changing-of-the-guards refresh

This is a round-based AES-128 encryption core protected against side-channel
attacks up to second order. Every key and data byte is split into three Boolean
shares. The non-linear S-boxes are built from domain-oriented masking (DOM)
multipliers, which need fresh random bits to keep the shares apart. A round takes
five cycles. A 128-bit block is encrypted in 51 cycles and uses only 3200 fresh
random bits, which one RNG delivering 64 bits per cycle can supply.

The randomness is kept low by two ideas. They come from the paper "Smooth Passage
with the Guards: Second-Order Hardware Masking of the AES with Low Randomness and
Low Latency".

1. **A 78-bit S-box.** Every multiplier in the S-box is a *DOM-indep* multiplier
   whose output sharing is independent. This removes the DOM-dep multipliers of
   the classic five-stage DOM S-box, which also have a known second-order flaw.
2. **Changing of the guards (COTG).** Most of the refresh bits an S-box needs are
   not fresh randomness. They are shares of *other* state or key bytes (the
   "guards"), picked so that they are unrelated to the values they protect. They
   are sometimes XORed with a slice of the 64-bit RNG word. Instead of 20 x 78
   fresh bits per stage set, the whole core consumes one 64-bit word per cycle.

The RTL here implements that architecture. It is functionally verified against
an unmasked AES reference. Its side-channel security has not been re-verified:
see "How far to trust it".

## Shares and bases

- A value `v` is held as `v = v0 ^ v1 ^ v2`. The ports carry the three shares as
  `aes_dom_pkg::state_t [2:0]`. A `state_t` is `[column][row]` of bytes, with
  `s(0,0)` in the top byte, which is the usual FIPS-197 order of a 128-bit block.
  To encrypt `pt` under `key`, drive any random `m0, m1` and `pt ^ m0 ^ m1`, and
  do the same for the key.
- Linear operations (ShiftRows, MixColumns, AddRoundKey, basis changes) act on
  each share separately. Only the S-box multipliers combine shares of different
  domains.
- The S-box inverts in GF(2^8) through the tower GF(((2^2)^2)^2) in normal bases,
  which is Canright's compact S-box. The **state register holds the state in this
  normal basis**. The map into it (A2X) is applied at the end of the previous
  round, so the S-box input is already registered in the right basis and needs no
  register stage of its own. The ciphertext is mapped back (X2A) at the output.
  The key register holds the key in the AES polynomial basis.
- The three 8x8 bit matrices A2X, X2A and X2S in `aes_dom_pkg` follow from
  mapping the AES generator `x` to the tower element `0x17`, which is a root of
  x^8+x^4+x^3+x+1. Column `i` of A2X is `0x17^i` computed in the tower field. X2S
  is X2A followed by the AES affine matrix. The constant `0x63` is added to share
  0 only.

## The masked S-box (`masked_sbox`)

Input `x` is split into nibbles `a1 = x[7:4]` and `a0 = x[3:0]`.

| Stage | Operation | Multiplier | Refresh bits |
|---|---|---|---|
| 1 | `g = a1*a0 ^ nu*(a1^a0)^2` in GF(2^4) | Type B | z0..z3 (4 x 4), y0, y1 (2 x 4) = 24 |
| 2 | `w = g1*g0 ^ N*(g1^g0)^2` in GF(2^2) | Type C | z0..z5 (6 x 2), y0..y2 (3 x 2) = 18 |
| 3 | `t = w^2` (inverse in GF(2^2), linear); `d = {t*g0, t*g1} = g^-1` | 2 x Type A, GF(2^2) | 2 x 3 x 2 = 12 |
| 4 | `{d*a0, d*a1} = x^-1` | 2 x Type A, GF(2^4) | 2 x 3 x 4 = 24 |
| 5 | X2S and `^0x63` (share 0) | combinational | - |

This totals 78 bits. In the full AES, Stages 3 and 4 also refresh their
inner-domain products (see below), which adds 4 + 16 bits. These inputs are tied
to zero in the stand-alone 78-bit configuration.

Every multiplier forms all nine share products `A_i x B_j` and stores each one in
its own register after blinding it. Each output share is the XOR of three
registers. The three types differ only in what is XORed in before the registers:

```
Type A (dom_mul_a)                Type B (dom_mul_b, Stage 1)            Type C (dom_mul_c, Stage 2)
C0 = A0B0      ^ A0B1^z0 ^ A0B2^z1    A0B0^Sq0^y0^y1 ^ A0B1^z0^z3 ^ A0B2^z1      A0B0^Sq0^y0^y1 ^ A0B1^z0^z3 ^ A0B2^z1^z5
C1 = A1B0^z0   ^ A1B1    ^ A1B2^z2    A1B0^z0 ^ A1B1^Sq1^y1 ^ A1B2^z2            A1B0^z0^z4 ^ A1B1^Sq1^y1^y2 ^ A1B2^z2^z5
C2 = A2B0^z1   ^ A2B1^z2 ^ A2B2       A2B0^z1^z3 ^ A2B1^z2 ^ A2B2^Sq2^y0         A2B0^z1^z3 ^ A2B1^z2^z4 ^ A2B2^Sq2^y0^y2
```

Types B and C add the square-scaler term `Sq_i` of their domain before the
register, not after it. They also refresh the inner-domain products with `y`.
Their output sharing is therefore independent even while glitches settle, and
the next stage can use an ordinary DOM-indep multiplier. When the optional `y0,
y1` of `dom_mul_a` are used, they enter the same way as in Type B (`y0^y1`, `y1`,
`y0`).

The S-box is a full pipeline. `x` is delayed three cycles for Stage 4, and `g` is
delayed one cycle for Stage 3. It accepts a new input every cycle. Each group of
refresh bits is sampled in its own stage's cycle. The output is valid
combinationally in the fourth cycle after the input, which is Stage 5.

## Changing of the guards

The 64-bit RNG word of a cycle is read as four rows `R0 = R[15:0]` to
`R3 = R[63:48]`. The S-box of byte `s(r,c)` uses row `Rr`, so each row is
reused once in every super box. A *super box* is a column of the state after
ShiftRows: the bytes `s(r, c+r)`. MixColumns mixes the bytes of one super box.
`s_k(r,c)` is share `k` of state-register byte `(r mod 4, c mod 4)`. The state
register does not change during Stages 1 to 4, so guards are stable.

### Data S-boxes (`cotg_data_guards`)

| Stage | Refresh inputs of the S-box of `s(r,c)` | Guards from |
|---|---|---|
| 1 | z0,z1 = `s_0(r+1,c+1)`; z2,z3 = `Rr[7:0]`; y0,y1 = `s_1(r+2,c+2) ^ Rr[15:8]` | own super box |
| 2 | z0..z3 = `Rr[7:0]`; z4,z5,y0,y1 = `s_0(r+1,c+2) ^ Rr[15:8]`; y2 = `s_1(r+2,c+3)[1:0]` | next super box |
| 3 | 3/1: z0..z2 = `s_2(r+2,c+2)[5:0] ^ Rr[5:0]`; 3/2: z0..z2 = `s_0(r+3,c+3)[5:0] ^ Rr[13:8]`; y0 = `Rr[7:6]`, y1 = `Rr[15:14]` (both) | own super box |
| 4 | 4/1: z = `s_0(r,c+1)` (8 bits), `s_1(r,c+2)[3:0]`, y = `Rr[7:0]`; 4/2: z = `s_1(r,c+2)[7:4]`, `s_2(r,c+3)` (8 bits), y = `Rr[15:8]` | three other super boxes, one share domain each |

Within a multi-term field, the lowest bits go to the lowest-numbered term. The
reasons behind the table are as follows:

- Stage 4 feeds MixColumns, which XORs the four S-box outputs of a super box.
  Its guards therefore come from the three other super boxes, each with its own
  share domain. No super box sees all shares of one guard byte.
- Its inner-domain products take fresh `y` bits. These 64 bits act as the
  column-wise resharing before MixColumns.
- The Stage 3 `z` terms mix fresh bits with domestic guards. They must be unique
  across super boxes, while the fresh bits alone are reused.
- Stages 1 and 2 are refreshed by guards of the own and the neighbouring super
  box, plus RNG bytes. Each RNG byte is reused once per super box.

### Key S-boxes (`cotg_key_guards`)

SubWord has four S-boxes on key column 3. The S-box of `k(n,3)` must not use a
key byte that is later XORed with its output. It draws from the nine bytes of
rows `n, n+1, n+2` in columns 0 to 2. The share domains rotate:
`G(3a+b) = k_{(a+b) mod 3}(n+a, b)`. It also takes the 16 fresh bits
`R[16n+15:16n]`. The split over the multipliers is this design's own:

- Stage 1: z0,z1 = G0; z2,z3 = R[7:0]; y0,y1 = G8 ^ R[15:8], the same
  pattern as Stage 1 of the data S-boxes
- Stage 2: z0..z3 = G1; z4,z5,y0,y1 = G2; y2 = G3[1:0]
- Stage 3: 3/1 takes G3[7:2]; 3/2 takes G4[5:0]
- Stage 4: 4/1 takes G5 and G6[3:0]; 4/2 takes G6[7:4] and G7
- No inner-domain refresh in Stages 3 and 4, because there is no MixColumns here.

RotWord is folded into the wiring. Rcon goes to share 0.

## Round timing and randomness (`aes_dom_core`)

The key schedule runs one cycle ahead of the data path. AddRoundKey therefore
always reads a finished round key from the key register.

| Cycle | Data path | Key schedule | RNG word used by |
|---|---|---|---|
| 0 (start) | - | key reg <- key; key S-box input reg <- A2X(column 3) | - |
| 1 | state <- A2X(pt ^ key) (initial AddRoundKey) | S-box Stage 1 | key S-boxes |
| 2 + 5(r-1) | S-box Stage 1 | Stage 2 | data S-boxes |
| 3 + 5(r-1) | Stage 2 | Stage 3 | data S-boxes |
| 4 + 5(r-1) | Stage 3 | Stage 4 | data S-boxes |
| 5 + 5(r-1) | Stage 4 | Stage 5: key reg <- round key r | data S-boxes |
| 6 + 5(r-1) | Stage 5: state <- A2X(ARK(MC(SR(S(state))))) | Stage 1 of round r+1 | key S-boxes |

- MixColumns is skipped in round 10.
- The ciphertext is in the state register after the edge that ends cycle 51,
  which is 51 cycles after the start edge.
- Each round uses 4 x 64 bits for the data and 64 bits for the key, so a block
  uses 3200 bits. The key's word comes from cycle 1 for round 1, and from the
  Stage 5 cycle of the previous round after that. The word of round 10's Stage 5
  cycle is not used.
- All 20 S-box pipelines run every cycle. Values computed outside a stage's own
  cycle are never used.

## Interface

`aes_cotg_top` (core plus RNG):

- `rng_seed_i`: a one-cycle pulse that loads the 80-bit `rng_key_i` and
  `rng_iv_i`. After 18 cycles (1152 Trivium steps), `rng_ready_o` rises. From
  then on the RNG produces 64 bits every cycle.
- `rng_en_i`: high for normal operation. Low switches the fresh randomness off:
  the core gets an all-zero RNG word and may start before the RNG is seeded.
  Together with zero shares 1 and 2 of key and plaintext, this gives an
  unprotected run. That run is useful to show that a leakage test can find
  leakage at all. Keep `rng_en_i` stable during a block.
- `start_i`: accepted only when `busy_o` is low and, with `rng_en_i` high,
  the RNG is ready.
  - `key_i` (three shares) is read in the start cycle.
  - `pt_i` (three shares) is read in the cycle after it.
  - Hold both over those two cycles.
- `done_o`: pulses when the ciphertext shares `ct_o` are ready. `out_valid_o`
  then stays high until the next start. A new start is accepted in the cycle
  after `done_o`.
- `rst_ni`: an asynchronous, active-low reset. It resets only the control. The
  data registers are written before they are read.

`aes_dom_core` has the same block interface with a 64-bit `rnd_i` input in place
of the RNG. The RNG (`trivium_rng`) is standard Trivium unrolled 64 times. Any
other generator of the same rate can replace it.

## Files

- `rtl/aes_dom_pkg.sv`: types, the S-box refresh struct `sbox_rnd_t`, field
  arithmetic and basis matrices
- `rtl/dom_mul_a.sv`, `dom_mul_b.sv`, `dom_mul_c.sv`: the three multiplier types
- `rtl/masked_sbox.sv`: the five-stage S-box
- `rtl/cotg_data_guards.sv`, `rtl/cotg_key_guards.sv`: the two guard networks,
  purely combinational, one `sbox_rnd_t` per S-box
- `rtl/aes_sub_bytes.sv`: 16 S-boxes fed by the data guard network
- `rtl/aes_key_expand.sv`: SubWord (four S-boxes fed by the key guard network),
  RotWord, Rcon and the XOR chain
- `rtl/aes_mix_columns.sv`, `rtl/aes_lin_layer.sv`: Stage 5 of one share
- `rtl/aes_dom_core.sv`: registers and round control
- `rtl/trivium_rng.sv`: the RNG
- `rtl/aes_cotg_top.sv`: the top level
- `tb/aes_ref_pkg.sv`: an unmasked FIPS-197 reference model. Its S-box is
  computed as x^254 plus the affine map, with no tower field.
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/aes_dom_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_cotg_top.sv --top-module tb_aes_cotg_top
./obj_dir/Vtb_aes_cotg_top
```

What each testbench checks:

- `tb_masked_sbox`: all 256 inputs, then random ones, fed back to back with
  random sharings and refresh bits. The outputs are compared four cycles later
  with the reference S-box, in both the 78-bit and the full configuration.
- `tb_dom_mul_*`: the recombined product, and that every output share is
  actually refreshed.
- `tb_aes_sub_bytes`, `tb_aes_key_expand`, `tb_aes_lin_layer`: each block
  against the reference. `tb_aes_sub_bytes` also runs some rounds with the RNG
  word at zero, where only the guards refresh.
- `tb_cotg_data_guards`: the table above on random inputs, including the worked
  examples of the original description. Flipping any one bit of any state share
  must change exactly one Stage 4 guard bit, in another super box. Each RNG row
  must reach only the S-boxes of its own row.
- `tb_cotg_key_guards`: every key S-box uses at most one share of any key byte
  and no byte that is later XORed with its output. It uses all nine listed
  guards, and only its own 16 RNG bits.
- `tb_aes_dom_core`:
  - FIPS-197 and random blocks with fresh sharings
  - the 51-cycle latency
  - back-to-back blocks
  - operation with zero randomness and two zero shares
  - randomness use: one random RNG word is injected into an otherwise all-zero
    stream, once for each cycle of a block. Exactly 50 cycles change the output
    shares, which is 3200 fresh bits per block.
- `tb_aes_cotg_top`: the whole design at its only configuration.
  - the FIPS-197 vectors and random blocks
  - RNG seeding and re-seeding
  - a start refused before the RNG is ready
  - the RNG-off mode: zero randomness and zero shares 1 and 2 give the right
    result, and the same output shares twice. With the RNG on, the same
    inputs give different output shares.
  - a start ignored while busy
  - the last round without MixColumns
  - the latency

## How far to trust it

- **Functionally**, every module is checked against an independent reference.
  The S-box is checked exhaustively.
- **Security** (second-order probing security with glitches) is a property of the
  gate netlist and its randomness schedule. It has not been checked for this
  RTL. The multiplier equations and the guard tables follow the published
  design. Bit ordering inside the refresh fields and the key-guard split are this
  design's own choices. They keep every sharing correct but may differ from the
  assignment that was formally verified for the original implementation.
  Synthesis must not merge registers across shares or re-associate the XORs of
  the integration phase. Keep hierarchy or use keep attributes when building
  for measurements.

Departures and own choices:

- **Key randomness.** The 64 fresh bits of the fifth cycle of each round feed
  Stage 1 of the key S-boxes, because that stage is active in that cycle when the
  key runs one cycle ahead. The published description also speaks of using them
  in Stage 4 of the key S-boxes, or to refresh the key after SubWord. Those
  statements do not fit its own cycle schedule.
- **Stage 3 guard example.** For super box 0, the published examples of the
  Stage 3 guard of `s(1,1)`, `s(2,2)` and `s(3,3)` differ from its general rule
  `s_2(r+2,c+2)`. The rule is implemented.
- **Interface.** Tower-field constants, the share-0 placement of `0x63` and Rcon,
  the start/done interface and the RNG seeding are not specified by the source
  and were chosen here.
- **Not included.** The board-level control logic (USB transfer) and the
  fixed DOM-dep multiplier, which the paper uses only as a baseline, are not part
  of this design.
