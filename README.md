# Area-optimized AES-CCM security engine for IEEE 802.15.4 and IEEE 802.15.6

Both low-power wireless standards protect frames with AES-CCM. IEEE 802.15.4
(WPAN, ZigBee-class radios) uses CCM\*, and IEEE 802.15.6 (body-area
networks) uses CCM with a 4-byte MIC. CCM needs two AES-based computations
over the same data: a CBC-MAC over the header and payload for authentication,
and CTR-mode encryption of the payload. Parallel engines use two AES cores for
this. This engine uses **one** AES core and switches it between the two modes
block by block (the *toggle method*). It still finishes the MAC together with
the last ciphertext block, as a two-core engine would. The core is also
small: an 8-bit folded AES-128 encryption core with one S-box, built from
composite-field logic rather than a 256-byte table.

The design is single-clock SystemVerilog with no memories. It synthesizes to
about 1.5 k flip-flops, most of them 128-bit block registers.

## Block structure

```
 AUTH bytes ─┐                                    ┌──── B_DATA ─────┐
 MSG bytes ──┤ Block Generator ── B_IV ──┐        │                 ▼
 IV (cfg) ───┤                           ▼        │         ┌─ mux (B_DATA | B_CIPH)
             └ Count Generator ── B_CTR ─► PT mux ─► AES core ─► D_EN ⊕ ──► Cipher Register ─┬─► Cipher/MAC ─► ct_data, mac
                                             ▲                      └─────► MAC Register ────┤   Generator
                                             └──────── MAC_TEMP ◄───────────────────────────┘       │ D_MAC, Tag
                                                                                            Authentication Check ─► valid
```

| Module | Role |
|---|---|
| `aes_ccm_engine` | top level: wires the blocks below, latches `cfg` and `key` at start |
| `ccm_controller` | toggle scheduler: picks the AES input, the XOR operand and the destination register for every job |
| `ccm_block_generator` | builds B0 from the configuration and 16-byte data blocks from the AUTH and MSG byte streams |
| `ccm_count_generator` | counter blocks A_i = {01} ‖ nonce ‖ i |
| `aes_core_8bit` | folded AES-128 encryption, 201 cycles per block |
| `aes_key_schedule` | on-the-fly round-key generation, sharing the core's S-box |
| `cfa_sbox` | composite-field S-box |
| `mix_column` | MixColumns of one 32-bit column |
| `ccm_xor_stage` | D_EN ⊕ (B_DATA or B_CIPH) into the Cipher or MAC Register |
| `ccm_cipher_mac_gen` | ciphertext output strobes and truncation of the MAC to M bytes |
| `ccm_auth_check` | hardware tag comparison, `valid` output |
| `aes_ccm_pkg` | shared types (`block_t`, `ccm_cfg_t`), constants and GF helper functions |

## How one AES core does CBC-MAC and CTR

All data enters the chain through the XOR *after* the AES core. The AES input
PT can only be B0, a counter block, or the MAC Register (MAC_TEMP). The MAC
Register therefore always holds the *next* CBC-MAC input: after the CBC job
that produces X_(j-1), it holds X_(j-1) ⊕ B_j. That job can only end once
block B_j is present.

The controller runs a sequence of AES jobs, each 201 core cycles plus one
dispatch cycle:

| Phase | Job | PT | Result stored |
|---|---|---|---|
| AUTH block j | CBC-MAC | B0 (first job) or MAC_TEMP | MAC Reg ← D_EN ⊕ B_DATA |
| MSG block i | CTR | A_i | Cipher Reg ← D_EN ⊕ B_DATA → output block |
| | CBC-MAC | B0 (first job) or MAC_TEMP | MAC Reg ← D_EN ⊕ B_DATA (encrypt) or ⊕ B_CIPH (decrypt) |
| end | CTR | A_0 | Cipher Reg ← D_EN = S_0 (no block held, B_DATA is zero) |
| | CBC-MAC | MAC_TEMP (or B0 if there was no data) | MAC Reg ← D_EN ⊕ B_CIPH = T ⊕ S_0 = U |

Points to note:

* **The CTR job comes first in a message block.** When decrypting, the CTR job
  recovers the plaintext into the Cipher Register. The following CBC-MAC job
  then takes it through the B_CIPH path, so the MAC is computed over the
  plaintext without a second buffer. Encryption runs the same order with
  B_DATA.
* **The encrypted MAC U.** The last two jobs reuse the same paths. A_0 is
  encrypted into the Cipher Register, and the final CBC-MAC output T is XORed
  with it through B_CIPH. The MAC Register then holds U, the value sent on air.
  When decrypting, U is compared with the received tag (first M bytes), which
  is equivalent to comparing T.
* **Short blocks.** The Cipher Register only keeps the bytes that carry data
  and zeroes the rest. A short decrypted block therefore enters the CBC-MAC
  with the zero padding that CCM requires.
* **Jobs start before their data block is complete.** Bytes arrive at one per
  cycle while the core works. The controller waits at the *end* of a job if
  the block is not yet complete (a stall). With a steady byte stream no stall
  happens, because a block needs 16 to 18 cycles and a job needs 202.
* **Modes.** M' = 0 runs no CBC-MAC job: this is CCM\* encryption only, and
  AUTH blocks are consumed and dropped. Authentication only is CCM\* with all
  data given as AUTH and `m_len = 0`. Unsecured frames do not go through the
  engine.

`ccm_controller` states: IDLE → DISPATCH ⇄ {CTR, CBC} → A0 → S0 → FINAL →
CHECK → IDLE. Without a MIC, DISPATCH returns straight to IDLE.

## The 8-bit AES core

`aes_core_8bit` encrypts only. CCM never uses AES decryption, so none is
built. One round takes 20 cycles:

* **Cycles 0–3:** the four bytes of RotWord(w3) go through the S-box.
  `aes_key_schedule` captures them and forms the next round key
  combinationally (w0' = w0 ⊕ SubWord ⊕ rcon, w1' = w1 ⊕ w0', …).
* **Cycles 4–19:** a 16:1 multiplexer reads the state one byte per cycle in
  ShiftRows order. New byte (row r, column c) is S(old byte (r, (c+r) mod 4)),
  so ShiftRows needs no logic of its own. Three S-box outputs wait in a column
  register. With the fourth, the column passes through the single
  `mix_column` (bypassed in round 10) and is XORed with its round-key word.
  Columns 0–2 go to a 96-bit buffer. Column 3 is written into the state
  together with them, and the round key advances.

The start cycle loads `pt ⊕ key` (the initial AddRoundKey). `done` pulses
201 cycles after `start`, and `ct` holds the result until the next start.

## The composite-field S-box

`cfa_sbox` computes the S-box as inversion in GF(2^8) followed by the AES
affine transform, with no table. The byte is mapped by an 8×8 binary matrix δ
into the tower field GF(((2^2)^2)^2), written s_h·z + s_l, and inverted with

    (s_h z + s_l)^-1 = (s_h Δ) z + (s_h + s_l) Δ,   Δ = (s_h² λ + s_l (s_h + s_l))^-1

This uses one GF(16) squarer, one ×λ constant multiplier, three GF(16)
multipliers and one GF(16) inverter. The inverter is itself built from
GF(2^2) operations. The result goes back through δ^-1 and then the affine
transform (+ {63}).

Field choice in this design: GF(2^2) uses x²+x+1, GF((2^2)^2) uses y²+y+{10},
and the top level uses z²+z+λ with λ = {1100}. δ maps AES bit i to β^i, where
β = {42} is a root of the AES polynomial x⁸+x⁴+x³+x+1 in the tower field.
δ^-1 is its exact inverse. Both are stored column-wise in `aes_ccm_pkg`
(`DELTA_COLS`, `DELTA_INV_COLS`). Column i of a matrix is the image of input
bit i, so either matrix can be regenerated from the rule above. The
exhaustive S-box test checks all 256 entries.

## Interface and timing (`aes_ccm_engine`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge), asynchronous active-low reset |
| `start` | in | 1 | begin an operation; taken only while `busy` is low |
| `cfg` | in | `ccm_cfg_t` | `decrypt`, `mic_code` (M'), `a_len`, `m_len`, `nonce` (13 bytes); latched at start |
| `key` | in | 128 | AES key, latched at start |
| `tag_in` | in | 128 | received tag for decryption, first M bytes in the top bits; keep stable until `done` |
| `auth_data/valid/ready` | in/in/out | 8/1/1 | AUTH byte stream, `a_len` bytes, taken when valid & ready |
| `msg_data/valid/ready` | in/in/out | 8/1/1 | MSG byte stream (plaintext, or ciphertext when decrypting) |
| `ct_valid`, `ct_data`, `ct_keep` | out | 1/128/16 | one pulse per message block; `ct_keep` bit 15 is byte 0 |
| `mac_valid`, `mac` | out | 1/128 | encrypted MAC U, first M bytes, rest zero |
| `valid`, `checked` | out | 1/1 | tag check result (held until the next start); `checked` is set in decryption with M > 0 |
| `busy`, `done` | out | 1/1 | `done` pulses once, together with `mac_valid` |

Byte 0 of every 128-bit block is in bits [127:120]. M' follows the CCM flags
byte: 0 means no MIC, 1/3/7 give MIC-32/64/128, and the other values give
CCM's 6, 10, 12 and 14 bytes. `a_len` must stay below 0xFF00, because only
the two-byte length prefix is implemented. The length field is two bytes
(L = 2), as both standards use.

Cycle counts with a gap-free byte stream:

* one AES job: 202 cycles (201 in the core plus one dispatch cycle);
* one message block: 404 cycles, i.e. 0.317 bit/cycle. That is 11.1 Mb/s at
  35 MHz and 1.9 Mb/s at 6 MHz;
* one packet: 202 × (number of CBC-MAC jobs + CTR jobs) plus a few cycles.
  The packet has N data blocks in total, of which n are MSG blocks, and
  needs N + 1 CBC-MAC jobs and n + 1 CTR jobs.

Measured on the largest frames (`tb_wpan_workloads`):

| Link | Frame | Cycles | Air-time budget |
|---|---|---|---|
| IEEE 802.15.4, 6 MHz, 250 kb/s | 23-byte header, 94-byte payload, MIC-64 | 3235 | 24384 |
| IEEE 802.15.6, 35 MHz, 10 Mb/s | 7-byte header, 251-byte payload, MIC-32 | 7073 | 7392 |

The 802.15.6 case leaves about 4 % margin. The AES job length is what sets
it.

## Where the design makes its own choices

The following are this design's own decisions. The architecture around them
follows the published structure: one folded 8-bit core, one S-box, one
MixColumns, the toggle method, the register and XOR datapath after the core,
and a hardware tag check.

* The composite-field constants: the polynomials, λ and δ.
* The core's 20-cycle round schedule. The key schedule borrows the single
  S-box for four cycles per round. The column buffer holds three columns,
  not four.
* The engine interface: byte streams in, 128-bit blocks with byte masks out,
  a start/done handshake, and the `ccm_cfg_t` layout.
* The job order inside a message block (CTR before CBC-MAC), and the end
  sequence through A_0 and B_CIPH.
* The Cipher Register byte mask.
* The Block Generator holds one block at a time and has no second buffer.
* Encryption only (M' = 0) skips all CBC-MAC jobs. Authentication only is
  expressed as `m_len = 0`. An IEEE 802.15.6 frame whose payload is not to be
  encrypted is therefore passed entirely as AUTH data.
* The security mode is taken from `cfg` fields, from which the engine builds
  the B0 flags byte, rather than from a ready-made B0 block.

Not part of this RTL: the unsecured mode of IEEE 802.15.4 (the frame bypasses
the engine), the O-QPSK ZigBee modem that the engine is meant to sit next to,
and the frame-level handling around the engine, such as nonce assembly and
header parsing.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from `tb/ccm_ref_pkg.sv`, a separate byte-array AES-128 and CCM model that
shares no code with the RTL.

| Testbench | What it checks |
|---|---|
| `tb_cfa_sbox` | all 256 S-box entries |
| `tb_mix_column` | published MixColumns examples, 500 random columns |
| `tb_aes_key_schedule` | all ten round keys (FIPS-197 A.1 and random keys) |
| `tb_aes_core_8bit` | FIPS-197 C.1 and B vectors, 20 random blocks, latency exactly 201 cycles |
| `tb_ccm_block_generator` | B0, length prefix, padding, byte masks, random stream gaps |
| `tb_ccm_count_generator` | A_1…A_n and A_0 layout |
| `tb_ccm_xor_stage` | operand mux, masks, both registers |
| `tb_ccm_cipher_mac_gen` | MAC truncation for every M', strobe timing |
| `tb_ccm_auth_check` | accept / reject on single-bit tag errors |
| `tb_ccm_controller` | exact job sequence for all modes against a model core and block source |
| `tb_aes_ccm_engine` | end to end (see below) |
| `tb_wpan_workloads` | the two largest frames against their air-time budgets |

`tb_aes_ccm_engine` covers the whole engine:

* RFC 3610 packet vector 1, checked bit-exact.
* MIC-32, MIC-64 and MIC-128, plus encryption only and authentication only.
* Random packets, each encrypted and then decrypted with both a correct and a
  corrupted tag.
* Slow input streams that force stalls.
* A gap-free throughput check of at most 448 cycles per message block.

It counts each mechanism (AUTH-phase CBC-MAC, toggling, B_CIPH use, stall,
short block, each mode, tag accept and tag reject) and fails if any of them
never occurs. The engine has no parameters, so this test runs the design at
full size.

Running a testbench with Verilator 5 (the package files must come first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_ccm_pkg.sv tb/ccm_ref_pkg.sv rtl/*.sv tb/tb_aes_ccm_engine.sv \
  --top-module tb_aes_ccm_engine -Mdir obj -o sim && ./obj/sim
```

The shell expands `rtl/*.sv` to include `aes_ccm_pkg.sv` again; Verilator
warns about the repeated package (MODDUP) and uses it once. Lint a module with
`verilator --lint-only -Wall rtl/aes_ccm_pkg.sv rtl/*.sv --top-module <name>`.
The reference model makes testbench builds take up to about a minute.

Limits of what is verified: the tests cover functional behaviour and cycle
counts in simulation only. Gate count, timing closure at 6 or 35 MHz and
power have not been measured here.
