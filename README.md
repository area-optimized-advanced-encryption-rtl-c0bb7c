# Compact AES-128 encryption/decryption core

This core encrypts and decrypts 128-bit blocks with a 128-bit key (AES-128, 10 rounds).
It is built for small area rather than speed. One round of the cipher is built in logic
and reused ten times, one round per clock cycle. A single 128-bit state register holds
the block and a single 128-bit register holds the current round key. The round keys are
never stored: each cycle's key is computed from the previous one, forwards for encryption
and backwards for decryption. The S-boxes are plain 256-entry look-up tables (ROMs).

The design is an iterative, area-oriented core that uses the equivalent inverse cipher for
decryption. It follows a published description of such a core: the interface names, the
round structure, the look-up-table S-box and the decryption rule that passes the round key
through InvMixColumns all come from that description. The handshake, the latency, the
backwards key schedule and the reset behaviour are this design's own choices. The
departures are listed under "Where this design departs from the description" below.

## Interface and timing

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk_i`      | in  | 1     | clock, all registers on the rising edge |
| `nrst_i`     | in  | 1     | active-low asynchronous reset; clears state, key and sequencer |
| `load_i`     | in  | 1     | start an operation with `data_i`, `key_i`, `decrypt_i` |
| `decrypt_i`  | in  | 1     | 0 = encrypt, 1 = decrypt |
| `key_i`      | in  | 128   | cipher key (the same key for both directions) |
| `data_i`     | in  | 128   | plaintext (encrypt) or ciphertext (decrypt) |
| `data_o`     | out | 128   | the state register; the result while `ready_o` is 1 |
| `ready_o`    | out | 1     | result valid |

Bytes use the standard AES order. Byte 0 of a 128-bit word is bits `[127:120]`, and state
element `[row r][column c]` is byte `r + 4c`. So `key_i = 128'h000102...0f` is the key
00 01 02 ... 0f of the AES specification's examples.

- **Load.** `load_i` is sampled on a rising edge while the core is idle or has finished.
  While an operation runs, `load_i` is ignored. The inputs only need to be valid on the
  load edge, because they are captured into the two registers.
- **Encryption.** The load edge performs the initial key addition, so right after it
  `data_o` shows `data_i ^ key_i`. The next 10 edges perform rounds 1 to 10.
  `ready_o` rises with the 10th of them.
- **Decryption.** The load edge parks the ciphertext in the state register. The next 10
  edges step the key schedule forwards to the last round key, and the 10th of them also
  adds that key to the state. The next 10 edges perform the inverse rounds. `ready_o`
  rises 20 edges after the load edge.
- **After the result.** `ready_o` and `data_o` hold until the next accepted load. If
  `load_i` stays high, the next operation starts on the edge after `ready_o` rises. The
  result is then visible for one cycle, and an encryption takes 11 cycles per block.

At a clock of f MHz, the encryption throughput is therefore 128 × f / 11 Mbit/s with
back-to-back loads. Decryption takes 21 cycles per block.

## How a round is computed

Encryption round (`aes_enc_round`):

    state' = AddRoundKey( MixColumns( ShiftRows( SubBytes(state) ) ), k_r )

In round 10, MixColumns is bypassed by a multiplexer. The round key `k_r` comes straight
from the forward key-schedule step (`aes_key_expand`) applied to the key register. The
same value is written back into the key register, so the key register always holds the
key of the round just done.

### Decryption: the equivalent inverse cipher

The textbook inverse cipher does AddRoundKey before InvMixColumns. The decryption
datapath here swaps those two steps, which is valid because InvMixColumns is linear:

    InvMixColumns(s ^ k) = InvMixColumns(s) ^ InvMixColumns(k)

So a decryption round (`aes_dec_round`) computes

    state' = InvMixColumns( InvSubBytes( InvShiftRows(state) ) ) ^ InvMixColumns(k_r)

for rounds 9 down to 1. The last step (round 0) is `InvSubBytes(InvShiftRows(state)) ^ k_0`.
The round key therefore goes through a second InvMixColumns unit before it is added.
This gives decryption the same shape as encryption: substitution, permutation, mixing,
then key addition.

### Round keys without a key table

Decryption needs the round keys in reverse order, starting with `k_10`. Storing all
eleven keys would cost 1408 bits of storage. Instead, the core does two things:

1. **Key preparation.** It runs the forward schedule 10 times after the load to reach
   `k_10`. The state register is free during this phase, so it holds the ciphertext.
2. **Backwards schedule.** It runs the schedule backwards (`aes_inv_key_expand`). From
   `k_r = (n0, n1, n2, n3)` it recovers

       w3 = n3 ^ n2,  w2 = n2 ^ n1,  w1 = n1 ^ n0,
       w0 = n0 ^ SubWord(RotWord(w3)) ^ Rcon(r)

Both directions take the round constant of the current round counter value.

The price is 10 extra cycles per decryption. Because each decryption restarts from
`key_i`, a different key can be used on every block.

## Module hierarchy

```
aes_core                     top: registers, input multiplexing, phase control
├── aes_control              sequencer: IDLE / KEYPREP / ENC / DEC / DONE, round counter, Rcon
├── aes_key_expand           forward key-schedule step (4 x aes_sbox)
├── aes_inv_key_expand       backward key-schedule step (4 x aes_sbox)
├── aes_enc_round            aes_sub_bytes -> aes_shift_rows -> aes_mix_columns -> aes_add_round_key
├── aes_dec_round            aes_inv_shift_rows -> aes_inv_sub_bytes -> aes_inv_mix_columns
│                            (+ aes_inv_mix_columns on the key) -> aes_add_round_key
└── aes_add_round_key        initial key addition / last-round-key addition
```

Packages:
- `aes_pkg` holds the types, the GF(2^8) `xtime`, the round-constant function and the
  S-box table generators.
- `aes_ctrl_pkg` holds the sequencer's state enum.

The S-box contents are computed at elaboration rather than written out. The generator
builds exponent and logarithm tables for generator 03 and inverts each byte as
`x^-1 = exp(255 - log x)`. It then applies the affine map

    b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i,   c = 0x63

The inverse table is obtained by inverting the forward one. In hardware each table is a
constant 256 × 8 ROM.

There are 40 S-box ROMs in all:
- 16 in SubBytes;
- 16 in InvSubBytes;
- 4 in each key-schedule direction.

After generic synthesis the core has 265 flip-flops: 128 for the state, 128 for the round
key, and 9 for the sequencer.

## Where this design departs from the description

- **Architecture.** The description credits its area saving to "pipelining" and to a
  special data-transfer mode, but describes neither. It also reports 551 flip-flops, far
  fewer than a ten-stage unrolled pipeline needs. This core is therefore iterative, with
  no pipeline registers inside the round.
- **I/O width.** The reported implementation used 133 I/O pins, which suggests narrower
  I/O than the 387 pins of the ports above. This core keeps the full-width ports, because
  the way the data was moved on fewer pins is not described.
- **Throughput.** The comparison figures of several Gbit/s are not reached. At 11 cycles
  per block, 5.25 Gbit/s would need a 451 MHz clock.
- **S-box tables.** The S-box contents, the MixColumns matrices, the round constants and
  the key-schedule equations are taken from the AES standard. The description only names
  these operations.
- **Key sizes.** Only 128-bit keys are supported. 192- and 256-bit keys are mentioned in
  the description's background but not used by its design.
- **Cycle-level behaviour.** Latency, the load/ready handshake and reset behaviour are
  this design's own choices. The one cycle-level fact taken from the description is that
  `data_o` shows `data_i ^ key_i` right after the load.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The testbenches
share `tb/tb_common.svh`, which provides the counters, clock and watchdog, and
`tb/aes_ref_pkg.sv`, an independent reference model. The reference model works on a 4x4
byte array and uses a shift-and-add GF multiplier. It finds S-box inverses by exhaustive
search and decrypts with the textbook inverse cipher. Each testbench prints
`TB_RESULT checks=N failures=M`.

- **S-boxes.** Checked on all 256 inputs, plus entries of the published table.
- **Round and key-schedule modules.** Checked on hundreds of random inputs, plus the AES
  specification's example round and round keys.
- **`tb_aes_control`.** Follows the sequencer cycle by cycle.
- **`tb_aes_core`.** Runs the core end to end at its only size. The runs are:
  - the stimulus `key = 128'h12153524`, `data = 128'hFFFFFFFF_FFFFFFFF_FFFFFFFF_C0895E81`,
    checking `data_o = ...D29C6BA5` after the load edge and then the ciphertext;
  - the two AES-128 example vectors of the specification (`69c4e0d8...` and `3925841d...`);
  - 60 random encrypt/decrypt round trips, checked against the reference model;
  - checks of the 10- and 20-cycle latencies;
  - loads pulsed while busy, which must be ignored;
  - back-to-back blocks with `load_i` held high;
  - a reset in the middle of a decryption.

  It counts each of these mechanisms and fails if one never occurred.

Concurrent assertions in `aes_control` and `aes_core` check that:
- the round counter stays in range;
- `ready_o` and busy never overlap;
- only one register-update phase is active in a cycle.

Running a testbench with Verilator (the same pattern works for every module):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aes_core \
    rtl/aes_pkg.sv rtl/aes_ctrl_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_core.sv -y rtl
./obj_dir/Vtb_aes_core
```

Verilator's lint reports one warning, SYNCASYNCNET on `nrst_i`. It arises because the
asynchronous reset also appears in the assertions' `disable iff` clauses, and it does not
affect the synthesized logic.

## Changing the design

- **Round count.** `aes_control` has a parameter `NR` (default 10 = `aes_pkg::AES_NR`),
  but the key schedule is AES-128 only, so other values do not give a standard cipher.
- **Look-up-table S-boxes.** To trade them for composite-field logic, replace the body
  of `aes_sbox` and `aes_inv_sbox`. All 40 instances go through those two modules.
- **Pipelining.** To add a register inside the round, split `aes_enc_round` /
  `aes_dec_round` and extend the sequencer by one cycle per round.
