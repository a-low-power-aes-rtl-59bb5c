# Four-parallel AES-GCM authenticated-encryption core

This core encrypts a message with AES-128 in counter mode and computes the
128-bit GCM authentication tag over the additional authenticated data (AAD)
and the ciphertext. It takes four 128-bit blocks per clock. It is built for
low power, in three ways:

* **GHASH needs only H, H^2 and H^4.** Four Karatsuba-Ofman multipliers work
  in parallel. H^2 and H^4 are made by squaring, which is much cheaper than
  multiplying. No H^3 is stored: where a block needs H^3, it is multiplied
  by H^2 and then by H over two steps.
* **Squaring replaces a multiplier** in the hash-subkey generator.
* **Clock gating by a demultiplexer.** One select signal from the control
  FSM steers the clock to the one register group that must change in the
  current phase: key schedule, subkeys, or datapath.

All RTL is SystemVerilog-2017 and synthesizable, apart from the testbenches
in `tb/`.

## Block diagram

```
             key_i, iv_i, n_aad_i, n_text_i, start_i
                          |
   clk ---------------> gcm_ctrl --sel--> clk_gate_demux --+-- gclk[0] key
                          |  lane kinds,                   +-- gclk[1] subkey
                          |  length block                  +-- gclk[2] run
                          v
 in_blk_i[4] -----> [lane mux] --> gctr: 4 x aes_pipeline (10 stages) --> ct_blk_o[4]
                                     ^          |  ks[0]=E_K(0), ks[1]=E_K(J0)
                 aes_key_expand -----+          v
                 (11 round keys)       ghash_subkey_gen (H, H^2, H^4, E_K(J0))
                                                |
                  ciphertext/AAD/len --> ghash_4par (4 x gf128_mul_ko) --> hash
                                                tag_o = hash xor E_K(J0)
```

| module | role |
|---|---|
| `aes_gcm_top` | wires the blocks together; the only top |
| `gcm_ctrl` | phase FSM, input handshake, lane kinds, length block, clock select |
| `clk_gate_demux` | routes the clock to one of three register groups |
| `aes_key_expand` | iterative AES-128 key schedule, round keys kept in registers |
| `gctr` | four counter-mode lanes, each an `aes_pipeline` |
| `aes_pipeline` / `aes_round` / `aes_sbox` | 10-stage AES-128 with a register after each round |
| `ghash_subkey_gen` | H, H^2 = H*H, H^4 = H^2*H^2 with one squarer; keeps E_K(J0) |
| `gf128_square` | classic squaring: spread the bits, reduce by f(x) |
| `gf128_mul_ko` | GF(2^128) multiplier, two Karatsuba-Ofman levels |
| `ghash_4par` | four-lane GHASH with the H/H^2/H^4/1 operand schedule |
| `aes_gcm_pkg` | types, constants, S-box generator, reduction by f(x) |

## The four-lane GHASH schedule

GHASH of blocks A_1..A_n (AAD, then ciphertext, then the length block) is

    X = A_1 H^n + A_2 H^(n-1) + ... + A_n H      over GF(2^128), f = x^128+x^7+x^2+x+1

Block A_i enters lane (i-1) mod 4, four blocks per clock. Each lane keeps an
accumulator and updates it as `Y <- (Y + A) * op`. While more blocks will
follow in that lane, op = H^4, so each lane's blocks advance by four powers
per step.

At the end, lane j's last block still needs a power H^e with e between 1
and 4, and all four lanes must finish on the same clock. The last two steps of
a lane split e as follows. The second step of a lane that has run out of data
multiplies a zero-padded accumulator.

| e | next-to-last step | last step |
|---|---|---|
| 1 | 1 | H |
| 2 | 1 | H^2 |
| 3 | H^2 | H |
| 4 | 1 | H^4 |

If a lane's last block arrives in the final step, H^e is used directly. That
case only happens with e = 1, 2 or 4. When the last input group holds 3 or 4
blocks, one lane would need H^3 in a single step. One extra step with no data
(the *flush step*) is then added, so that all lanes can use the two-step
split. For ten blocks the schedule is

    ((A1 H^4 + A5) H^4 + A9) H^2  +  ((A2 H^4 + A6) H^4 + A10) H
  + ((A3 H^4 + A7) 1   + 0 ) H^4  +  ((A4 H^4 + A8) H^2 + 0  ) H

and the final hash is Y_0 + Y_1 + Y_2 + Y_3.

A step with operand 1 skips the multiplier. The schedule depends on n, so
the core needs the message length at start. The GHASH takes 1 clock after
the last group, or 2 with a flush step.

## Multiplier and squarer

`gf128_mul_ko` splits each 128-bit operand into halves, a = x^64 Ah + Al. It
uses the Karatsuba-Ofman identity

    a*b = x^128 AhBh + x^64 ((Ah+Al)(Bh+Bl) + AhBh + AlBl) + AlBl

then applies the same identity again to each 64-bit product. The result is
nine 32x32 schoolbook carry-less products. The 255-bit result is reduced by
folding every coefficient of degree 128+i onto degrees i, i+1, i+2 and i+7.
Folding runs from the top down.

`gf128_square` uses the fact that squaring is linear in characteristic 2:
(sum a_i x^i)^2 = sum a_i x^(2i). The operand is spread out with a zero
between its bits, giving d. The upper half of d is then reduced with a
constant matrix R, whose column i is x^(128+i) mod f:

    c(j) = d(j) + sum_i R(j,i) d(128+i)

R is computed at elaboration, so the squarer is only fixed XOR trees. It has
no AND terms at all.

Both modules take and return blocks in GCM bit order: bit 127 of the vector
is the coefficient of x^0. They bit-reverse internally.

## Clock gating and phases

`gcm_ctrl` has a registered select `sel` that names the register group to be
clocked by the *next* edge. `clk_gate_demux` latches `sel` while `clk` is
low and ANDs it with `clk`. A gated clock can therefore start or stop only in
the low phase, and no pulse is ever shortened. Lint reports this latch; it
is intended.

| phase | cycles | clocked group | work |
|---|---|---|---|
| IDLE | - | none | wait for `start_i`; capture the block counts |
| KEY | 11 | key | load the key, then one round key per clock |
| HGEN | 10 | run | lane 0 encrypts 0 (gives H); lane 1 encrypts J0 = IV‖0^31‖1; counter := 2; GHASH cleared |
| SUB | 3 | subkey | capture H and E_K(J0), then H^2, then H^4 |
| DATA | D | run | accept groups; insert the length block |
| DRAIN | ≈11 | run | pipelines empty; GHASH finishes |
| DONE | 1 | none | `done_o`; tag valid |

During HGEN and DATA, all four AES pipelines and the GHASH share the run
clock. Registers that do not change in a phase get no clock edges in it.

## Interface and timing

* Hold `key_i` and `iv_i` from `start_i` until `done_o`. `n_aad_i` and
  `n_text_i` are message lengths in whole 128-bit blocks; they are sampled
  with `start_i`.
* `in_ready_o` goes high 25 cycles after the start edge. Present the AAD
  blocks and then the plaintext blocks, packed: block 4g+j+1 goes in lane
  `in_blk_i[j]` of group g. A group is taken on each edge where `in_valid_i`
  and `in_ready_o` are both high. Only the last group may be short. Idle
  cycles are allowed.
* The core appends the length block len(A)‖len(C), in bits, in the first free
  lane of the last group. If the last group is full, the length block goes in
  a group of its own.
* Ciphertext appears on `ct_blk_o` 10 cycles after its plaintext was taken.
  `ct_mask_o` marks the lanes that hold ciphertext; AAD lanes are not flagged.
  Counter block i is IV‖(1+i).
* `done_o` rises 35 + D + f + idle cycles after the start edge. D is the
  number of groups including the length block, f = 1 if a flush step is
  needed, and idle is the number of cycles without input. `tag_o` stays
  valid until the next start.
* Throughput: 512 bits per clock during DATA. 8.3 Gbit/s therefore needs about
  16.2 MHz.

## Where this design fills gaps or departs

* Only encryption is implemented; GCM decryption is not.
* Only whole blocks and a 96-bit IV are supported.
* The key schedule, the FSM with its phase lengths, the valid/ready
  handshake, and the lane "kinds" (AAD, plaintext, length, empty) that travel
  down the pipelines are this design's own.
* The example schedule for ten blocks is generalised to any n, using the
  two-step split and the flush step described above.
* There are four AES pipelines, one per lane, sharing one round-key register
  file.
* H and E_K(J0) are computed in lanes 0 and 1 before the data phase.
* The clock demultiplexer uses a low-phase latch on the select.
* The core's low-power claims rest on the 65 nm SOTB process, its 0.4 V
  supply and back-bias. These are process properties and are not represented
  in RTL.

## Verification

Each module has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. The reference models in `tb/gcm_ref_pkg.sv`
are written independently of the RTL:

* the S-box inverse is found by search;
* the key schedule works on 32-bit words;
* GF(2^128) multiplication uses the bit-serial algorithm of the GCM
  specification.

Highlights:

* `aes_gcm_top_tb` runs the published GCM test cases 1-3 (empty message; one
  zero block; the 4-block `feffe992...` message) and random messages with
  AAD and idle cycles. It checks ciphertext, tag and the cycle count. It also
  requires every mechanism to occur at least once: each gated clock, flush
  steps, H^2-then-H splits, multiply-by-one steps, a length block alone and
  shared, and groups mixing AAD and plaintext. It runs the core at its only
  configuration (there are no size parameters to reduce).
* `aes_gcm_top_tb` also encrypts a message of exactly ten GHASH blocks
  through the whole core.
* `ghash_4par_tb` covers every n from 1 to 21, and random n up to 40. For
  n = 10 it checks the operand schedule shown above.
* `aes_pipeline_tb`, `aes_key_expand_tb` and `aes_round_tb` include the
  FIPS-197 vectors.

To simulate with Verilator, for example the full core:

    verilator --binary --timing -Wno-fatal --top-module aes_gcm_top_tb \
        -y rtl -y tb +libext+.sv rtl/aes_gcm_pkg.sv tb/gcm_ref_pkg.sv tb/aes_gcm_top_tb.sv
    ./obj_dir/Vaes_gcm_top_tb

Building takes about half a minute; the run itself takes well under a second.
