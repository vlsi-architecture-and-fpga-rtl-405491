# Folded ICE block cipher engine

ICE (Information Concealment Engine) is a DES-like cipher with a 64-bit block and a 64-bit
key. It runs 16 Feistel rounds, each with a 60-bit subkey. Its S-boxes are not lookup
tables. Each S-box output is a seventh power in GF(2^8), reduced by one of four
irreducible polynomials. The polynomial used depends on the input.

This RTL implements ICE (level 1, 16 rounds) as a folded engine: **one** round circuit is
reused 16 times, one round per clock cycle. The S-box exponentiation is built from a chain
of six Montgomery multipliers. Each multiplier is an array of small bit-level processing
elements. A block takes 16 cycles, and a new block can start in the cycle the previous one
finishes. At 29.1 MHz, the clock rate reported for a Virtex-E implementation of this
architecture, that is 64 bits / 16 cycles × 29.1 MHz ≈ 116 Mbit/s. The same hardware
decrypts by reading the subkeys in reverse order.

The engine has been checked against the published ICE test vector:

    key        deadbeef01234567
    plaintext  fedcba9876543210
    ciphertext 7d6ef1ef30d47a96

## The engine and its loop

```
 key ──► ice_key_expansion ──(60 b, 1 per cycle)──► ice_subkey_ram 16×60
                                                         │ async read, address from ice_ctrl
 din ──► ice_input_reg ──{L,R}──► ice_round ──{R, L^F(R,K)}──┬──► ice_output_reg ──► dout
              ▲                                              │   (halves exchanged)
              └──────────────── feedback (rounds 0..14) ─────┘
```

| module | role |
|---|---|
| `ice_top` | Wires the engine together. Ports: `key_load/key/key_ready`, `start/decrypt/din/ready/busy`, `dout/dout_valid`. |
| `ice_ctrl` | Round counter and sequencer. It drives the RAM address forward for encryption and backward for decryption, plus the register load enables and the handshake. |
| `ice_key_expansion` | ICE key schedule. After `key_load` it writes subkeys 0..15 into the RAM, one per cycle. |
| `ice_subkey_ram` | 16 × 60-bit memory. Synchronous write, asynchronous read. |
| `ice_input_reg` | Holds the round state `{L, R}`. It loads either a new block or the round output. |
| `ice_round` | One Feistel round, combinational: `{L,R} → {R, L ^ F(R, K)}`. |
| `ice_output_reg` | Captures the 16th round output with its halves exchanged and pulses `dout_valid`. |
| `ice_f` | Round function: expansion, key permutation, key XOR, four S-boxes, P-box. |
| `ice_sbox` | Selects a row offset and a modulus, then computes (C xor O)^7 mod P. |
| `gf_pow7` | A^7 mod P from six Montgomery multiplications. |
| `mont_mult` | Montgomery multiplication array: n × n processing elements, n = 9. |
| `mm_pe_q`, `mm_pe` | The array's Q-calc element (column 0) and its basic element. |
| `ice_pkg` | Types (`block_t`, `subkey_t`), the S-box tables, the P-box, the key rotation order and the wiring functions. |

### Timing

* **Key load.** A `key_load` pulse is accepted while no block is in flight. It clears
  `key_ready`. The RAM is written at addresses 0..15 on the next 16 clock edges, and
  `key_ready` rises with the last write. A `key_load` while `busy` is ignored.
* **Blocks.** `start` is accepted when `ready` is high, together with `din` and `decrypt`.
  Call the accepting edge t. Edge t loads the block, edges t+1..t+16 run the 16 rounds, and
  edge t+16 writes the output register. `dout_valid` is high for the cycle after that edge,
  and `dout` holds until the next result.
* **Back-to-back blocks.** `ready` is also high during the last round of a block. A start
  in that cycle loads the next block on the same edge that captures the previous result,
  so blocks follow every 16 cycles. Encryption and decryption may alternate freely.
* `start` is ignored until a key has been expanded. If `start` and `key_load` arrive
  together while the engine is idle, `start` wins.

Reset (`rst_n`) is asynchronous and active low. It clears the registers, `key_ready` and
the round state. The RAM is not reset.

## Inside the round function

For a right half `R` (bits 31..0), the round function works in five steps:

1. **Expansion E.** It forms four 10-bit values that overlap by two bits at each end:
   E1 = R[1:0],R[31:24]; E2 = R[25:16]; E3 = R[17:8]; E4 = R[9:0]. E1/E2 make the left
   20 bits and E3/E4 the right 20 bits.
2. **Key permutation ("salt").** Each bit of the 20-bit permutation key that is set
   exchanges the corresponding bits of the left and right 20-bit halves. It costs two
   2:1 multiplexers per bit.
3. **XOR.** The left half is XORed with `k0` and the right half with `k1`: 40 key bits in all.
4. **S-boxes.** S1 and S2 take the two 10-bit parts of the left half, S3 and S4 those of
   the right half. Each produces 8 bits.
5. **P-box.** The 32 S-box output bits, `{S1,S2,S3,S4}`, are scattered to new positions by
   the table `PBOX` in `ice_pkg`.

A subkey is stored as `subkey_t = {perm, k0, k1}`, 20 bits each.

### S-box

The outer input bits `{X9, X0}` pick the row R. The inner bits `X8..X1` are the column C.
The output is `(C xor O_R)^7 mod P_R`, where multiplication is carry-less (polynomials over
GF(2)) and `P_R` is a degree-8 polynomial written as a 9-bit number:

| S-box | O0 | O1 | O2 | O3 | P0 | P1 | P2 | P3 |
|---|---|---|---|---|---|---|---|---|
| S1 | 131 | 133 | 155 | 205 | 333 | 313 | 505 | 369 |
| S2 | 204 | 167 | 173 | 65 | 379 | 375 | 319 | 391 |
| S3 | 75 | 46 | 212 | 51 | 361 | 445 | 451 | 397 |
| S4 | 234 | 203 | 46 | 4 | 397 | 425 | 395 | 505 |

In hardware, one 4:1 multiplexer selects the offset. A second one selects the modulus
together with its Montgomery constant R' (next section). The XOR result goes to `gf_pow7`.

## Montgomery exponentiation

This is the deepest and least obvious part of the design.

**Why Montgomery form.** Montgomery multiplication replaces "multiply, then reduce modulo
P" with a sequence of bit-serial steps. Each step only adds and shifts, and an array of
identical cells can do it. `gf_pow7` raises its input to the 7th power in six
multiplications. With R = x^9 and R' = R² mod P:

| step | operation | value |
|---|---|---|
| 1 | MM(X, R') | X·R (enter Montgomery form) |
| 2 | MM(A, A) | X²·R |
| 3 | MM(B, A) | X³·R |
| 4 | MM(C, C) | X⁶·R |
| 5 | MM(D, A) | X⁷·R |
| 6 | MM(E, 1) | X⁷ (leave Montgomery form) |

X = 0 gives 0 automatically, which is the value ICE defines for a zero base. R' = x^18 mod P
is a constant for each modulus. `ice_pkg::mont_r2` computes it at elaboration time by
shifting and reducing 18 times.

**The array (`mont_mult`).** MM(X, Y, N) = X·Y·x⁻ⁿ mod N, with n = 9, the bit length of the
moduli. It uses one row per bit x_k of X:

* The Q-calc element in column 0 computes q_k = a_0 ⊕ x_k·y_0. This is the one bit that
  makes the row sum A + x_k·Y + q_k·N divisible by x.
* The basic element in column j computes s_j ⊕ x_k·y_j ⊕ q_k·n_j.
* Sum bit j of row k becomes input bit j−1 of row k+1. This shift is the division by 2.

All the moduli are odd (n_0 = 1). Over GF(2) there are no carries, so after 9 rows the
result has degree below 8. It is therefore already the reduced 8-bit answer: no final
subtraction or adder is needed. The test `tb_mont_mult` checks the identity
MM(X,Y)·x⁹ ≡ X·Y (mod N) for all 16 moduli.

**Not pipelined.** The six multipliers are a purely combinational chain, and so is the
whole round. This is what lets the feedback loop finish a round every cycle, and it sets
the critical path: 6 arrays × 9 rows of XOR/AND, plus the multiplexers and the key XOR.

## Where this RTL departs from its source architecture

* **Carry-less instead of integer Montgomery arithmetic.** The architecture this RTL
  follows draws its processing elements with full and half adders. Their output is in
  carry-save form and is resolved by a carry-lookahead adder. That is integer Montgomery
  multiplication. Integer arithmetic would not give the ICE S-box values, because ICE
  defines its S-boxes in GF(2^8). Here the same array, with the same cells, q bit and
  diagonal sum path, is built over GF(2): every adder becomes an XOR gate and the
  carry-lookahead adder disappears.
* **The "six stages" are not registered.** The exponentiation is described as six stages.
  Registering them would put six cycles into every round of the feedback loop, and the
  reported throughput (16 cycles per block) would no longer hold. The stages are cascaded
  combinationally instead.
* **S4, offset O1 = 203 (0xCB).** This is the value of the ICE specification, and the one
  that reproduces the ICE test vector.
* **Details taken from the ICE specification rather than from the architecture
  description:** the P-box bit order, the key schedule (word rotation order
  0,1,2,3,2,1,3,0,1,3,2,0,3,1,0,2, and complemented re-insertion of each consumed key bit),
  and the order in which the four S-boxes take the salted halves.
* **This design's own choices:** the handshake and controller, the asynchronous-read RAM,
  one subkey per cycle during key expansion, the field order inside a 60-bit subkey word,
  and the reset behaviour.
* **Only ICE level 1 is built** (16 rounds, 64-bit key). The Thin-ICE and ICE-n variants
  of the cipher are not supported.

No timing or area figure has been measured for this RTL. The 116 Mbit/s above is the
cycle count (16 per block) multiplied by the reported clock. The Virtex-E result was 5331
slices, 288 flip-flops and 29.1 MHz. This RTL has about 205 flip-flops plus the 960-bit
subkey RAM.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
`tb/ice_ref_pkg.sv`, a software-style model of ICE. That model multiplies in GF(2^8) by
shift-and-reduce (no Montgomery arithmetic), runs the key schedule one bit at a time, and
runs the cipher as the usual two-rounds-per-iteration loop.

| testbench | what it covers |
|---|---|
| `tb_mm_pe`, `tb_mm_pe_q` | all input combinations of the two array cells |
| `tb_mont_mult` | random and corner operands for all 16 moduli; checks the Montgomery identity |
| `tb_gf_pow7` | all 256 bases × every modulus |
| `tb_ice_sbox` | all 1024 inputs of each of the 4 S-boxes |
| `tb_ice_f`, `tb_ice_round` | random halves and subkeys, including all-zero and all-one permutation keys |
| `tb_ice_key_expansion` | 16 writes in address order, the `done` timing, and subkeys for fixed and random keys |
| `tb_ice_subkey_ram`, `tb_ice_input_reg`, `tb_ice_output_reg` | storage, priorities, the half exchange |
| `tb_ice_ctrl` | address order in both modes, 15 feedbacks and 1 capture per block, chained starts, refused key loads |
| `tb_ice_top` | the ICE test vector both ways and random keys and blocks, single and back-to-back with mixed modes; checks latency (16 cycles) and spacing (16 cycles) and counts each handshake case |
| `tb_ice_throughput` | a long back-to-back stream in both directions; checks 16 cycles per block and reports the rate at 29.1 MHz |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ice_pkg.sv tb/ice_ref_pkg.sv tb/tb_ice_top.sv --top-module tb_ice_top
./obj_dir/Vtb_ice_top
```

Replace `tb_ice_top` with any other testbench name. Verilator finds the modules a
testbench uses through `-Irtl -Itb`. Every testbench, including `tb_ice_top`, runs the
design at its default size and finishes in well under a second.

## Changing it

* **S-box tables:** edit `SBOX_XOR`/`SBOX_MOD` in `ice_pkg`. R' follows automatically. Any
  modulus must be a 9-bit number with bit 8 and bit 0 set.
* **Pipelining the round:** add registers between the `mont_mult` instances in `gf_pow7`.
  `ice_ctrl` would then have to wait that many cycles per round, which raises the clock
  rate but lowers the blocks per cycle.
* **Another RAM style:** the engine needs the subkey in the same cycle as its address. A
  RAM with a synchronous read would need the address one cycle earlier, that is
  `rnd + 1` from `ice_ctrl`.
