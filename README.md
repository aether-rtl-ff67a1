# AETHER authenticated encryption engine

AETHER is an authenticated encryption scheme with associated data (AEAD). It
takes a 256-bit key and a 128-bit nonce and produces a 128-bit tag. It is
built for hardware that needs terabit-per-second rates at low energy per bit.
Like AEGIS and Rocca it is a large-state stream construction: a state of nine
128-bit words is updated once per block, and each update absorbs three words
(384 bits) of data. AETHER replaces the AES round of those designs with its
own 128-bit *inner function* F. F is made of two layers of a 4-bit S-box
around a nibble-wise binary matrix, so it is shallow and cheap in gates.
Every state word passes through its own copy of F in each round, and all
nine copies work in parallel. A round is therefore one F deep, and the
circuit absorbs 384 bits per clock cycle.

This repository holds synthesizable SystemVerilog for the complete engine:
encryption and decryption, padding, tag generation and tag check. It also
holds self-checking testbenches that reproduce the published test vectors.

## The inner function F

F maps 128 bits to 128 bits. The word is read as 32 nibbles x0..x31, with x0
the most significant (bits 127..124). F applies four steps in order:

1. **S-box layer.** Each nibble goes through the 4-bit S-box
   `S = [1,0,2,4,3,8,6,d,9,a,b,e,f,c,7,5]` (the S-box of the Orthros cipher).
2. **Matrix layer.** Nibbles x0..x15 and x16..x31 are each multiplied by the
   same 16x16 binary matrix M_b. Its entries act on whole nibbles, so they
   only decide which nibbles are XORed together. M_b is a 4x4 block matrix:

   ```
   | I I I J |     I = 4x4 identity
   | I I J I |     J = 4x4 all ones
   | I J I I |
   | J I I I |
   ```

   Each output nibble is the XOR of seven input nibbles. In
   `aether_matmul` this is built as four group sums q_g (the XOR of nibble
   group g), plus the three "identity" nibbles of the other groups.
3. **S-box layer** again, on all 32 nibbles.
4. **Nibble permutation.** Nibble i moves to position P_n(i): i/2 for even i
   and 16 + i/2 for odd i. The two halves end up interleaved. This step is
   wiring only.

The S-box is written as a case table, so synthesis can pick its own gate
network for it. A round uses 9 copies of F and the keystream uses 3 more.
That makes 12 copies, or 768 S-boxes and 24 matrix blocks, and these make up
almost all of the logic.

## State, round and keystream

The state is S[0..8]. One round R(S, X0, X1, X2) computes:

```
S'[0] = F(S[8]) ^ X0    S'[1] = F(S[0]) ^ S[3]   S'[2] = F(S[1]) ^ S[6]
S'[3] = F(S[2]) ^ X1    S'[4] = F(S[3]) ^ S[4]   S'[5] = F(S[4]) ^ X2
S'[6] = F(S[5]) ^ S[8]  S'[7] = F(S[6]) ^ S[2]   S'[8] = F(S[7]) ^ S[0]
```

Before each message round, the keystream is computed from the current state:

```
KS0 = F(S[0]^S[1]) ^ S[4]   KS1 = F(S[2]^S[6]) ^ S[7]   KS2 = F(S[3]^S[5]) ^ S[8]
```

The ciphertext block is C = M ^ (KS0||KS1||KS2). In the same round, the
*plaintext* block M is absorbed as X. When decrypting, the engine first
recovers M = C ^ KS and then absorbs M. The keystream logic runs in parallel
with the round logic. The critical path is therefore one F plus a few XOR
levels. The longest is in decryption: the recovered plaintext feeds the
round's XOR, and then the key XOR follows.

## Phases and where the key comes back in

| phase | rounds | X0, X1, X2 | key words XORed into the result of the last round |
|---|---|---|---|
| load | 1 cycle | state := (Z1, K0, N^K0, 0, Z0, 0, N, K1, Z2) | - |
| initialisation | 20 | Z0, Z1, Z2 | K0 into S0-S3, S5; K1 into S4, S6-S8 |
| associated data | one per 384-bit block | padded AD | - |
| message | one per 384-bit block | padded plaintext | before finalisation: K0 into S0, S1, S4, S5, S7; K1 into S2, S3, S6, S8 |
| finalisation | 20 | K0, Z0, K1 | K1 into S0, S4, S7, S8; K0 into S1-S3, S5, S6 |

The tag is the XOR of the nine state words after finalisation. K = K0||K1,
with K0 = key[255:128]. Z0, Z1 and Z2 are fixed 128-bit constants, defined in
`aether_pkg`.

The specification adds the key three times: at the end of initialisation,
before finalisation, and after finalisation. In this design, none of these
additions takes a cycle of its own. Each one is a second XOR level behind
the round, and it is enabled on the round that comes just before it:

- the initialisation pattern on the 20th initialisation round;
- the pre-finalisation pattern on the last AD or message round;
- the post-finalisation pattern on the 20th finalisation round.

When there is no AD and no message, the initialisation pattern and the
pre-finalisation pattern are XORed together on the same round.

So an operation with d AD blocks and m message blocks takes one load cycle
followed by **20 + d + m + 20 round cycles**. For 1024 bits of AD and 2048
bits of message this is 49 cycles. For 1024 bits of AD and 1.28 Mbit of
message it is 3377 cycles, or 384 bits per cycle in steady state.

## Engine interface (`aether_core`)

```
start, decrypt, has_ad, has_msg, key[255:0], nonce[127:0], tag_in[127:0]
in_valid -> / <- in_ready, in_data[383:0], in_nbits[8:0], in_last
out_valid, out_data[383:0]
tag_valid, tag_out[127:0], tag_ok, busy
```

**Starting an operation.** Pulse `start` for one cycle. The engine samples
the key, the nonce, the mode, the two "string present" flags and the
expected tag. A new start is accepted while the engine is idle or done.

**Data blocks.** Blocks are 384 bits wide, most significant bit first:
X0 = `in_data[383:256]`.

- `in_ready` is high during the AD and message phases. A block is taken on
  every cycle in which both `in_valid` and `in_ready` are high.
- The AD blocks come first, ending with `in_last`. The message (or
  ciphertext) blocks follow, also ending with `in_last`.
- `in_nbits` must be 384 for every block except the last one of a string.
  The last block may be 1..384 bits; its valid bits are at the top.
- Dropping `in_valid` stalls the engine; the state holds.

**Output.** On the cycle a message block is taken, `out_valid` is high and
`out_data` carries the ciphertext (or plaintext) block. The bits below
`in_nbits` are cleared. The output is combinational from the state register
and `in_data`, so it adds no latency.

**Tag.** After the last finalisation round, `tag_valid` rises and stays high
until the next start. `tag_out` is the tag. `tag_ok` says whether it equals
`tag_in`.

A streaming engine cannot withhold plaintext until the tag has been checked.
Whoever receives the decrypted data must discard it when `tag_ok` is low.

**Padding.** Padding and truncation are done inside the engine
(`aether_pad`). A partial block is padded with one 1 bit after its last data
bit, followed by zeros. When decrypting, it is the recovered plaintext that
is truncated and padded before it is absorbed. The ciphertext is not.

The scheme fixes both round counts at 20. They are still parameters
(`INIT_ROUNDS`, `FINAL_ROUNDS`), but only so that the sequencing can be
tested in isolation.

## Modules

| module | role |
|---|---|
| `aether_pkg` | word and state types, Z0..Z2, key-addition patterns, phase and X-select enums |
| `aether_sbox` | 4-bit S-box |
| `aether_matmul` | M_b on 16 nibbles |
| `aether_inner_f` | F: S-box layer, two M_b, S-box layer, nibble permutation |
| `aether_round_update` | R(S, X): nine F plus XORs |
| `aether_output_fn` | keystream: three F plus XORs |
| `aether_pad` | truncation mask and 10* padding of a block |
| `aether_state_update` | state registers, load multiplexer, X multiplexer, round, key-addition XORs |
| `aether_tag` | tag = XOR of the state words, compare with the received tag |
| `aether_ctrl` | phase sequencer (load, init, AD, message, final, done) and handshake |
| `aether_core` | top level |

After synthesis, the engine has 1547 flip-flops: 1152 for the state, 256 for
the key, 128 for the received tag, and a few for control. Everything else is
combinational.

## Bit order and how far the RTL can be trusted

A few points of the algorithm are easy to get wrong and are not obvious from
its equations:

- the order of the nibbles inside a word;
- the direction of the permutation;
- whether "N + K0" means XOR or addition.

All three were settled against the published test vectors. The engine
reproduces all three vectors bit for bit: AD and message, message only, and
AD only. Two of the published hex strings have a digit missing. Their
complete values are:

- C2 of the first vector: `aff7f36089f14c36f49504331b998aa9`
- tag of the first vector: `ebb69bfbc2d9b02b3af0cbdaae73fd5d`

A software model produced these, and it matches every complete value.

These points are this design's own choices, not part of the algorithm:

- the handshake;
- bit-granular lengths;
- combining two key patterns in a single cycle when there is no data;
- combinational output;
- the asynchronous active-low reset.

## Verification

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. Each one also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_aether_sbox` | all 16 inputs; the S-box is a bijection |
| `tb_aether_matmul` | unit vectors and 200 random inputs against the matrix written row by row |
| `tb_aether_inner_f` | six known answers |
| `tb_aether_round_update` | a known answer; X1 reaches only S'[3] |
| `tb_aether_output_fn` | a known answer; S4, S7 and S8 reach only their own keystream word |
| `tb_aether_pad` | every length 1..384 against a bit-by-bit reference |
| `tb_aether_tag` | random states, matching and non-matching tags |
| `tb_aether_state_update` | hand-driven walk through the third test vector, state compared after initialisation and after the AD round |
| `tb_aether_ctrl` | all 25 combinations of 0..4 AD and 0..4 message blocks with random gaps: round counts, position of each key addition, handshake |
| `tb_aether_core` | test vectors; empty input; partial blocks with stalls; decryption with a correct and a corrupted tag; cycle count of every operation; back-to-back operations. Default parameters. |
| `tb_aether_workloads` | the 49-cycle and 3377-cycle benchmark inputs: tag, ciphertext checksum, cycle count |

The core and workload benches make their long inputs with a generator in
`tb/aether_tb_pkg.sv`. Word j of a stream with seed s is built from the four
32-bit values `((4j+k) * 0x9e3779b9) ^ s`, for k = 0..3. The expected tags
and checksums come from an independent software model of the algorithm.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aether_pkg.sv tb/aether_tb_pkg.sv \
    tb/tb_aether_core.sv --top-module tb_aether_core -o sim
./obj_dir/sim
```

Every testbench builds the same way; only the file name and top module
change. All of them finish in a few seconds.

## Not included

- **First-order threshold implementation.** This is a side-channel-protected
  variant with a four-share S-box. It was only sketched, and the shared
  S-box functions were not specified.
- **Key-committing wrapper.** It derives the encryption key and a commitment
  key with an external PRF, which is not defined here.
