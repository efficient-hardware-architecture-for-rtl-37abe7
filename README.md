# AES-CCMP encryption engine for IEEE 802.11i

IEEE 802.11i protects each data frame with CCMP. CCMP uses AES-128 in CCM
mode with an 8-octet MIC (M = 8) and a 2-octet length field (L = 2). CCM
needs two passes of AES over the frame:

* a **CBC-MAC** over an initial block B0, the additional authenticated data
  (AAD, built from the MAC header) and the payload, which gives the 64-bit tag T;
* a **counter-mode** pass that encrypts the payload with key-stream blocks
  S1..Sm and hides the tag as U = T xor S0.

This engine runs the two passes at the same time on two iterative AES-128
cores. Each core does one round per clock, so a block takes ten cycles. The
inputs are narrow: the AAD and the payload arrive 16 bits per cycle. Small
formatters build the next 128-bit block from these words while the cores work
on the current one, so the engine takes one block every ten cycles. A frame
with m payload blocks passes m + 3 blocks through the CBC-MAC. The counter
core encrypts m + 1 counter blocks in the same time slots, so it never holds
up the MAC core.

The RTL is written in SystemVerilog (IEEE 1800-2017), is synthesizable, and
has no parameters: every size is fixed by the 802.11i profile of CCM.

## Block diagram

```
            q, n ─────────► B0 wiring ───────── B0 ───┐
   aad (16b), fc, sc, ──►   format_aad ─ AAD blocks ──┤ MUX ─► BX reg ─┬─► aes_cbcmac ─ T ─┐
   flag_a4, flag_qc                        │ a_ad     │ (selmux)       │                   │
   plaintext (16b) ───►     format_payload ◄┘ P_i ─────┘                │                   ▼
                                                                       └─► aes_ctr ──► ciphertext
            n ─────────►    format_cb ── A_i ──────────────────────────────► (S0, T) ──► mic (U)
                            control_ccmp: slot counter, FSM, all loads/starts/register writes
```

`aesccm` holds `aes_cbcmac` and `aes_ctr`. Each of these contains an
`aes_cipher`, which is built from `aes_control`, `aes_genkey`, `aes_round`
and ten `aes_sbox_dp` memories.

## The ten-cycle slot schedule

This is the part that needs the most care. `control_ccmp` does not wait for
handshakes. It runs the frame on a fixed grid of ten-cycle *slots*, and each
formatter is built to have its block ready before its slot starts. Assertions
in `aesccmp` check this.

Let `c0` be the cycle after `start` (the controller's NC state). Slot k begins
in cycle `c_k = c0 + 10k`:

| slot k | BX register gets  | CBC-MAC input        | CTR core encrypts | output in this slot                       |
|--------|-------------------|----------------------|-------------------|-------------------------------------------|
| 0      | B0                | B0                   | A0                |                                           |
| 1      | AAD block 1       | BX xor YK            | A1                | S0 → S0 register (`regs`)                 |
| 2      | AAD block 2       | BX xor YK            | A2                |                                           |
| 3      | P1                | BX xor YK            | A3                | C1 = P1 xor S1 in `c_3 + 2`               |
| ...    | ...               | ...                  | ... (up to A_m)   | C_i = P_i xor S_i in `c_{i+2} + 2`        |
| m + 2  | P_m               | BX xor YK            | –                 | C_m, `cipher_last`                        |
| (end)  |                   |                      |                   | T → T register (`regt`) in `c_{m+3} + 1`, `mic_valid` in `c_{m+3} + 2` |

The timing of each AES core gives this grid. A core started in cycle `t`
samples its input in `t+1`, which is the first round. It shows its result with
`done` in `t+11`, and keeps it until the first round of its next block ends.
The controller starts both cores in the same cycle, in the tenth round of the
previous block. So the previous CBC-MAC output YK is still on the bus in the
cycle where the core samples `BX xor YK`. No extra register is needed for the
chaining value.

The counter side runs two slots ahead of the payload on the BX bus. S_i is
made in slot i, but P_i is in the BX register only in slot i + 2. `aes_ctr`
therefore passes the key stream through two 128-bit registers. Both registers
shift (`wr`) at every CBC-MAC completion, which comes once per slot. After the
counter core has stopped (slots m+1 and m+2), the same shifts still carry
S_{m-1} and S_m to the output at the right time. The ciphertext is the plain
XOR of the second delay register and BX. It is valid from the third cycle of
the slot to its end; `cipher_valid` marks one cycle in that window.

`format_cb` runs on its own. It is started together with the frame and
announces a new counter block every ten cycles, using a 4-bit cycle counter
that exits its wait state at 8. Its `flag_cb` pulses are the CTR core's
starts, and an assertion checks that they fall on the controller's slot
boundaries.

## AES-128 core (`aes_cipher`)

* **Initial round**: a 128-bit XOR of plaintext and key in front of the round
  multiplexer. It costs no clock cycle.
* **`aes_round`**: SubBytes (sixteen lookups in eight dual-port S-box
  memories), ShiftRows, MixColumns, and AddRoundKey, followed by the state
  register. A multiplexer bypasses MixColumns in round 10.
* **`aes_genkey`**: makes the round keys on the fly, one per cycle. It uses
  RotWord and SubWord (four lookups in two dual-port memories), the round
  constant, and the chained word XORs. Round 1 expands from the key input;
  later rounds expand from the key register.
* **`aes_control`**: a 12-state FSM (IDLE, R1..R10, DONE). It gives the
  round-1 selects, the round enables, the last-round flag, the 8-bit round
  constant, and the `done` and `busy` outputs. A new `start` is accepted in
  R10, so blocks can follow each other back to back.
* **`aes_sbox_dp`**: a 256 × 8 memory with two read ports and combinational
  read. Its contents are computed at elaboration: a walk through GF(2^8) pairs
  each element with its inverse, and the affine transform is applied to the
  inverse. No table file is used. The whole engine uses twenty of these
  memories (ten per core).

Latency is 11 cycles from `start` to `done`. With back-to-back starts, the
core delivers one block every 10 cycles.

## Block formatting

**B0** (wired directly in `aesccmp`): `{reserved, data, 3'b011, 3'b001, nonce[103:0], q[15:0]}`.
With `data = 1` and `reserved = 0` the flags octet is 8'h59. `q` is the
payload length in octets.

**AAD (`format_aad`)**: sixteen 16-bit words fill two blocks, one word per
cycle. A four-way multiplexer picks the source of each word:

| word index | source                                   |
|------------|------------------------------------------|
| 0          | `aad` input: the AAD length l(a) in octets (22, 24, 28 or 30) |
| 1          | masked Frame Control, built from `fc`    |
| 2–10       | `aad` input: A1, A2, A3 (3 words each)   |
| 11         | masked Sequence Control, built from `sc` |
| 12–14      | `aad` input: A4, if `flag_a4`            |
| next       | `aad` input: QoS Control, if `flag_qc`   |
| rest       | zeros                                    |

* `fc[8:0]` holds the Frame Control bits that CCMP keeps,
  `{b15, b10..b7, b3..b0}`. The engine clears bits b4–b6 and b11–b13 and sets
  the Protected bit b14.
* `sc[3:0]` is the fragment number. The sequence number reads as zero.
* Frame Control and Sequence Control are little-endian in 802.11, so their low
  octet goes first.
* Every word on `aad` is given first octet in `[15:8]`.
* QoS Control passes through unchanged.
* With both A4 and QC present, l(a) and the 240-bit AAD fill exactly 256 bits.

**Payload (`format_payload`)**: two octets per cycle. Each octet has a
multiplexer that substitutes 8'h00 once `q` octets have been taken, so the
last block is zero-padded. Eight words make a block.

**Counter blocks (`format_cb`)**: `{8'h01, nonce, i[15:0]}` for i = 0..m,
using a 16-bit counter.

## Interface (`aesccmp`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | one-cycle pulse, accepted when `busy` is low |
| `q` | in | 16 | payload length in octets |
| `n` | in | 104 | CCM nonce: priority octet, A2, packet number |
| `tk` | in | 128 | temporal key |
| `fc`, `sc` | in | 9, 4 | unmasked Frame Control bits, fragment number |
| `flag_a4`, `flag_qc` | in | 1 | A4 / QoS Control present in the AAD |
| `data`, `reserved` | in | 1 | B0 flag bits (1 and 0 for 802.11i) |
| `aad` / `aad_rd` | in / out | 16 / 1 | AAD word; taken in every cycle where `aad_rd` is high |
| `plaintext` / `pay_rd` | in / out | 16 / 1 | payload word (first octet in `[15:8]`); taken when `pay_rd` is high |
| `ciphertext`, `cipher_valid`, `cipher_last` | out | 128, 1, 1 | one ciphertext block per pulse |
| `mic`, `mic_valid` | out | 64, 1 | encrypted MIC U, held until the next frame |
| `busy` | out | 1 | frame in progress |

Host protocol:

* Hold all frame inputs (`q`, `n`, `tk`, `fc`, `sc`, the flags) stable from
  `start` until `mic_valid`.
* The word inputs work like a show-ahead FIFO: the current word must be valid
  combinationally whenever its read strobe is high.
* For an odd `q`, only the upper octet of the last payload word is used.
* In the last ciphertext block, octets past `q` are key stream, not
  ciphertext. Drop them.
* The engine does not build the output frame. The caller still has to
  increment the packet number, build the CCMP header, and concatenate the
  MAC header, CCMP header, ciphertext and `mic`.

## Performance

A frame takes `10*(m+3) + 3` cycles from `start` to `mic_valid`, where
m = ceil(q/16). For the largest frame considered, 1024 octets of payload and
two AAD blocks, that is 67 blocks and 673 cycles. The published FPGA
implementations of this architecture quote about 149 MHz (Virtex-4), 118 MHz
(Virtex-II) and 84 MHz (Spartan-3). At those clocks the same 66 × 128 useful
bits per 670 cycles gives about 1.9, 1.5 and 1.1 Gbit/s. This RTL has not
been through an FPGA flow, so those clock rates are not confirmed for it.

## How it differs from the published architecture

* The AAD length field l(a) comes in as the first word on `aad`. The AAD
  multiplexer only chooses between the input word, zeros, masked FC and
  masked SC.
* The controller runs on a fixed slot grid instead of handshakes between the
  formatters' control units. It has five states: START, NC, AAD, PAY and END.
  The separate "start counter blocks" state is folded into NC, because the
  counter core starts together with B0. Because of this, the key stream needs
  a two-register delay line.
* The S-box memories read combinationally. On an FPGA they would map to
  distributed ROM, not block RAM.
* Payload input is 16 bits wide, like the AAD input. It is not a 128-bit
  port.
* Some auxiliary control outputs of the formatters are left out, because
  their function was never specified. Read strobes, `cipher_valid`,
  `cipher_last`, `mic_valid` and `busy` are added.
* Only encryption with MIC generation is built. Decryption and verification
  are not.
* Reset is synchronous. It is not specified elsewhere.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `ccmp_ref_pkg` is
a behavioural model written separately from the RTL: it gets its S-box from
exponent and logarithm tables, expands the full key schedule up front, and
formats CCM on octet queues. Its AES output matches the FIPS-197 example
vectors. Its CCMP output matches the IEEE 802.11i CCMP test frame (20-octet
payload, MIC 7845ce0b16f97623).

* `tb_aesccmp` runs the whole engine with no parameter changes:
  * the 802.11i test frame, checked against the known ciphertext and MIC;
  * all four A4/QC combinations;
  * payloads that end mid-word, mid-block and on a block boundary;
  * an empty payload;
  * back-to-back frames;
  * a 1024-octet frame.

  It checks every ciphertext octet, the MIC, the number of words read and the
  exact cycle count. It also counts each of these cases and fails if one never
  happened.
* The unit testbenches check the details:
  * every S-box entry on both ports;
  * single rounds, including a FIPS-197 intermediate value;
  * round keys;
  * the controller's cycle-by-cycle outputs;
  * AES latency and back-to-back rate;
  * CBC-MAC chains;
  * the CTR delay line and U;
  * each formatter's blocks, fill timing and hold behaviour;
  * the main controller's schedule for 0–4 payload blocks.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -yrtl -ytb \
    rtl/ccmp_pkg.sv tb/ccmp_ref_pkg.sv tb/tb_aesccmp.sv --top-module tb_aesccmp
./obj_dir/Vtb_aesccmp
```

Replace `tb_aesccmp` with any other `tb_<module>`. The full-engine test
simulates in well under a second.

## Files

* `rtl/ccmp_pkg.sv`: shared types (`block_t`, `src_sel_e`), CCM constants,
  GF(2^8) helpers.
* `rtl/aes_sbox_dp.sv`, `aes_round.sv`, `aes_genkey.sv`, `aes_control.sv`,
  `aes_cipher.sv`: the AES-128 core.
* `rtl/aes_cbcmac.sv`, `aes_ctr.sv`, `aesccm.sv`: the CCM engine.
* `rtl/format_aad.sv`, `format_payload.sv`, `format_cb.sv`:
  the block formatters.
* `rtl/control_ccmp.sv`: the main controller.
* `rtl/aesccmp.sv`: the top level.
* `tb/ccmp_ref_pkg.sv`: the reference model.
* `tb/tb_*.sv`: the testbenches.
