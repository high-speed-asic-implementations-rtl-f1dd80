# HWCRYPT: a leakage-resilient crypto accelerator in SystemVerilog

HWCRYPT encrypts data held in the shared data memory of a small processor
cluster. Its modes are built to resist side-channel key recovery. It does
not harden one cipher against power analysis. Instead it never lets one key
process more than a handful of different inputs, so differential power
analysis (which needs many inputs per key) has nothing to work with.
Two schemes do this:

* **2PRG stream cipher** (for a sender that encrypts each message once).
  A session key is derived from a master key and a fresh nonce by a masked,
  shuffled polynomial multiplication. Each 16-byte block then gets its own
  AES key: `K_{i+1} = AES_{K_i}(C_A)` and pad `y_i = AES_{K_i}(C_B)`, with
  `c_i = p_i ^ y_i`. Every key encrypts only the two constants.
* **ISAP** (for storage, where the same ciphertext may be decrypted many
  times). It is a sponge construction on Keccak-p[400]. Its re-keying
  function ISAPRK absorbs the nonce one bit per permutation, and it includes
  a MAC over the ciphertext.

The accelerator also gives the processors direct access to one AES round
and to the Keccak-p[400] permutation, for software that wants to use those
primitives.

The RTL is the accelerator only. The processors, the memory banks and the
bus around it are not part of it. A behavioural two-port memory model stands
in for the memory in the testbenches.

## Structure

```
 cfg port ──► hwcrypt_ctrl ──► cmd_queue (5 jobs)
 (32 bit)        │  starts units job by job, raises events
                 ▼
 TCDM rd ──► tcdm_streamer_in ──┬──► aes_unit ───────────┬──► tcdm_streamer_out ──► TCDM wr
 (32 bit)    32→128 bit         │    (2PRG, AES round)   │    128→32 bit            (32 bit)
                                └──► sponge_unit ────────┤
                                     (ISAP, Keccak)      │
                  prng ──► rekey_unit ── session key ────┘
                              │  ▲
                              └──┘ AES call for post-processing (aes_unit ECB port)
```

| file | part |
|---|---|
| `rtl/hwcrypt.sv` | top: instances and stream routing by mode |
| `rtl/hwcrypt_pkg.sv` | TCDM port structs, job struct, AES and Keccak functions |
| `rtl/hwcrypt_ctrl.sv` | register file, job sequencing, events |
| `rtl/cmd_queue.sv` | FIFO of pending job configurations |
| `rtl/aes_unit.sv` | two AES-128 datapaths with one shared key schedule |
| `rtl/rekey_unit.sv` | masked, shuffled polynomial re-keying |
| `rtl/prng.sv` | xorshift128 randomness for masks and shuffling |
| `rtl/sponge_unit.sv` | ISAP sequencer |
| `rtl/keccak_f400.sv` | Keccak-p[400] with three rounds per cycle |
| `rtl/tcdm_streamer_in.sv`, `rtl/tcdm_streamer_out.sv` | word/block conversion on the memory ports |

Each file opens with a comment on its function, timing and interface. That
comment also says which parts follow the published design and which are
choices made here.

## AES unit and the 2PRG

Two full AES-128 datapaths run side by side: A computes the next key and B
the pad. Both use the same round keys, so one round-key generator feeds
both. Each datapath evaluates two rounds per clock. A block therefore takes
one cycle to load (the initial AddRoundKey) and five round cycles, which is
6 cycles per 16 bytes or 0.375 cycles/byte.

The next block's load happens in the same cycle as the current output is
formed. The rate therefore holds as long as the input stream keeps up.
The memory ports move one word per cycle, so they need only 4 cycles per
block and do not slow it down.

* `C_A = 0` and `C_B = 1` (the parameters `C_A` and `C_B`).
* In AES-round mode each block `s` becomes
  `MixColumns(ShiftRows(SubBytes(s))) ^ KEY`.
* The unit also has a single-encryption port. The re-keying unit uses it
  while the AES unit is idle.

## Polynomial re-keying

The session key is `K* = K · n` in GF(2^8)[y]/(y^16+1). Byte i of a 128-bit
value is the coefficient of y^i, and the field polynomial is the AES one.

The multiplication is done in operand-scan form. Each cycle, one key
coefficient `a_i` is multiplied by all 16 nonce coefficients at once on
16 GF(2^8) multipliers. The products are rotated by i positions into 16
accumulators. A share therefore takes 18 cycles: load, 16 multiply cycles
and a final sum.

Two protections are built in:

* **Masking of order d** (CTRL[6:4]). The key is split into d+1 additive
  shares: d random ones, and `K` xor all of them. The single multiplier
  array processes them one after the other. Because the product is linear,
  the sum of the share products is `K·n`, and the unmasked key never enters
  the multipliers. The cost is `18·(d+1)` cycles.
* **Shuffling** (CTRL[7]). Each share processes its 16 coefficients in a
  random order, at no cost in cycles. Each cycle a random start position is
  drawn, and the first unused index at or after it is taken. Every one of
  the 16! orders can occur, but they are not equally likely.

**Post-processing** (CTRL[8]) computes `K_out = AES_{K*}(K) ^ K` with one
call to the AES unit. This adds the 6-cycle encryption and a two-cycle
handshake.

For 2PRG jobs, re-keying is enabled with CTRL[9]. Mode POLY_RK runs the
re-keying alone and writes the session key to memory as one block.

## Sponge unit: ISAP on Keccak-p[400]

The state is 400 bits, as 25 lanes of 16 bits. Lane l sits at bits
`[399-16l -: 16]`, so the sponge's rate is the most significant end of the
state. Data blocks enter MSB first.

Each stage has its own round count (ROUNDS register): s_k, s_b, s_e and s_h,
from 1 to 20. The re-keying rate r_b and the data rate can each be set to 2^k
bits, from 1 to 128 (RATES register). The data rate stops at 128 bits so that
ISAP uses the same block size as the 2PRG.

The sequences, with `p^s` meaning s rounds of the permutation:

* **IV(id)** = bytes `id, 128, r_h, r_b, s_h, s_b, s_e, s_k`, followed by
  zeros to 272 bits. id = 1 for the MAC, 2 for the MAC's re-keying and 3 for
  the encryption's re-keying.
* **ISAPRK(K, IV, Y)**:
  1. `S = K‖IV`, then `p^s_k`.
  2. Absorb Y r_b bits at a time, with `p^s_b` between chunks and `p^s_k`
     after the last one.
  3. Y is up to 144 bits: NONCE (128 bits) followed by NONCE_EXT (16 bits).
     Its length is set by RATES[15:8].
* **ISAP_ENC**:
  1. The session state is the first 272 bits of ISAPRK(K, IV_ENC, N),
     followed by the nonce N.
  2. For each data chunk, run `p^s_e`, then XOR the chunk with the first
     bits of the state.
* **ISAP_MAC** over the ciphertext:
  1. `S = N‖IV_MAC`, then `p^s_h`.
  2. Pad the empty associated data, then `p^s_h`.
  3. Flip the last state bit to separate the two domains.
  4. Absorb the ciphertext and its padding, each chunk followed by `p^s_h`.
  5. Re-key with the first 144 state bits: `K_A = ISAPRK(K, IV_RK, y)`.
  6. Replace the first 128 bits of the state with `K_A`, run `p^s_h`, and
     output the first 128 bits as the tag.
* **ISAP_RK** writes the first 128 bits of ISAPRK(K, IV_RK, NONCE‖NONCE_EXT).
* **KECCAK** reads four blocks (the first 400 of their 512 bits form the
  state), applies `p^s_h`, and writes four blocks. The last 112 bits written
  are zero.

The sequences follow the published ISAP construction, but the IV layout,
bit order, domain-separation position and padding were chosen here.
Associated data is always empty, and messages are whole 16-byte blocks.
The outputs are checked against a software model written to these same
conventions. They have not been checked against official ISAP test vectors,
so do not expect interoperability with other ISAP implementations.

**Keccak core.** Three unrolled rounds sit in front of a 400-bit register.
A run of nr rounds uses round indices 20−nr … 19, following the Keccak-p
convention, and takes ⌈nr/3⌉ cycles. In the last cycle the rounds that are
not needed are bypassed. The round constants come from the Keccak LFSR, and
the rho offsets from the (t+1)(t+2)/2 rule.

Timing examples:

| operation | cycles |
|---|---|
| encryption, 12 rounds, 128-bit rate | 4 + 1 = 5 per block |
| MAC, 20 rounds | 7 + 1 = 8 per block |
| ISAPRK, 144 bits, r_b = 1, 12 rounds | 4 + 144·5 + 3 = 727 |

## Memory ports

The two TCDM ports are 32-bit word ports. One is used only for reading and
the other only for writing. A request counts as accepted in the cycle where
`req` and `gnt` are both high. Read data returns in request order on
`r_valid`, one or more cycles later.

The input streamer packs four words into a block, with the lowest address in
bits [127:96]. It issues a request only when there is room for the response,
so the memory never has to hold one back. The output streamer unpacks blocks
in the same order. A port moves one word per cycle when the memory grants
every request.

## Programming model

The configuration port is a 32-bit slave. Every access is granted at once,
and reads answer one cycle later.

| offset | register | contents |
|---|---|---|
| 0x00 | TRIGGER | write: push the current registers as a job into the queue |
| 0x04 | STATUS | [0] busy, [3:1] jobs queued, [4] queue full, [5] a push was dropped (cleared by the read) |
| 0x08 / 0x0C | SRC / DST | byte addresses |
| 0x10 | NBLOCKS | number of 16-byte blocks |
| 0x14 | CTRL | [2:0] mode, [6:4] masking order d, [7] shuffle, [8] post-processing, [9] 2PRG re-keying, [10] event at job end |
| 0x18 | ROUNDS | [4:0] s_k, [12:8] s_b, [20:16] s_e, [28:24] s_h (reset 12, 12, 12, 20) |
| 0x1C | RATES | [2:0] log2 r_b, [6:4] log2 data rate, [15:8] ISAPRK input bits (reset 0, 7, 128) |
| 0x20–0x2C | KEY0–3 | master key, KEY0 = bits [127:96] |
| 0x30–0x3C | NONCE0–3 | nonce, NONCE0 = bits [127:96] |
| 0x40 | NONCE_EXT | 16 more ISAPRK input bits |
| 0x44 | SEED | write: reseed the PRNG |
| 0x48 | JOBS | read: number of finished jobs |

The modes are:

| value | mode | memory traffic |
|---|---|---|
| 0 | PRG | NBLOCKS blocks in, NBLOCKS blocks out |
| 1 | AES_ROUND | NBLOCKS blocks in, NBLOCKS blocks out |
| 2 | POLY_RK | session key out as one block |
| 3 | ISAP_ENC | NBLOCKS blocks in, NBLOCKS blocks out |
| 4 | ISAP_MAC | NBLOCKS blocks in, tag out as one block |
| 5 | ISAP_RK | one block out |
| 6 | KECCAK | four blocks in, four blocks out |

Decryption is the same operation as encryption. A full ISAP operation is an
ISAP_ENC job followed by an ISAP_MAC job over its output.

The queue holds five jobs, so processors can queue work while a job runs.
When a job ends, the controller starts the next queued job by itself. A push
to a full queue is dropped and reported in STATUS[5].

The accelerator has two event outputs:

* `evt_job_o` pulses when a job that set CTRL[10] finishes.
* `evt_empty_o` pulses when a job ends and the queue is empty.

Software can use these events or poll STATUS.

## Performance and how it compares

These figures were measured in simulation with a memory that never stalls.
The reference numbers are those of the published design.

| case | here | reference |
|---|---|---|
| 2PRG stream | 6 cycles/block (0.375 cpb) | 0.38 cpb |
| ISAP encryption stream | 5 cycles/block in the unit | 0.38 cpb |
| 8 kB 2PRG, masked (d = 1), shuffled, post-processed re-keying | 3129 cycles | ≈ 3171 (5.29 Gbit/s at 256 MHz) |
| 8 kB ISAP encryption + MAC | 8003 cycles | ≈ 8673 (2.69 Gbit/s at 356 MHz) |
| polynomial re-keying, d = 1, shuffled, post-processed | about 46 cycles | 56 |
| ISAPRK, 144 bits | 727 cycles | 739 |

In the ISAP encryption stream, the memory ports hold the encryption at
4 cycles per block when the unit is not the bottleneck.

## Differences from the published design

* **Keccak round counts.** The published unit allows round counts in
  multiples of three, up to 20. This core takes any count from 1 to 20 and
  bypasses the rounds it does not need.
* **Re-keying post-processing.** This costs the AES call plus two cycles.
  The published figure is a fixed 20 cycles. The formula
  `AES_{K*}(K) ^ K` was chosen here: the published design only says that it
  uses a key feed-forward and a block-cipher call.
* **ISAPRK timing.** ISAPRK is 12 cycles faster than the published figure,
  and ISAP encryption in the unit is slightly faster.
* **Undocumented details.** The following were chosen here because the
  published design leaves them open:
  * the ISAP conventions described above, and the empty associated data;
  * the constants C_A and C_B;
  * the PRNG algorithm;
  * the register layout;
  * the memory-port handshake.
* **Outside the accelerator.** The processors, cluster interconnect,
  memory banks, DMA, event unit and clock generation are not part of the
  RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The expected values come
from `tb/tb_ref_pkg.sv`. It is a separate software model:

* AES-128 with an S-box built from log/antilog tables;
* the polynomial product as a plain convolution;
* Keccak-p[400] from the standard offset and constant tables;
* straight-line ISAP.

The AES model is checked against the FIPS-197 example vectors.

| testbench | what it runs |
|---|---|
| `tb_hwcrypt` | The full accelerator at its default parameters, on a memory with random stalls. It runs every mode; fills the queue and drops one push; counts events, stalls and modes; and measures the 2PRG block time. |
| `tb_hwcrypt_workloads` | An 8 kB 2PRG message with masked re-keying, 8 kB of ISAP encryption and MAC, and an 8960-byte frame, each against a cycle budget. |
| one per unit | Cycle counts where a rate is defined: 6 cycles per AES block, 18·(d+1) for re-keying, 727 for ISAPRK, ⌈nr/3⌉ for the permutation. The re-keying testbench also checks that every index is used once per share under shuffling. |

## Simulating

The RTL is plain SystemVerilog-2017, tested with Verilator 5. For example,
for the whole accelerator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/hwcrypt_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tcdm_mem.sv \
  tb/tb_hwcrypt.sv --top-module tb_hwcrypt -Mdir obj -o sim
./obj/sim
```

A unit testbench needs only the package, `tb/tb_ref_pkg.sv`, the unit's
files and its testbench. Verilator simulates with two states, so every
register that is read has a reset. The testbenches gate their monitors on
reset, because registers hold arbitrary values before the first clock edge.

Parameters on the top:

* `QUEUE_DEPTH` (default 5);
* `IN_FIFO_DEPTH` (default 2 blocks).

Parameters on the units:

* `C_A` and `C_B` on `aes_unit`;
* `SEED` on `prng`.
