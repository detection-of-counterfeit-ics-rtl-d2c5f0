# Counterfeit-IC identification through a leaked keystream

Remarked, overproduced and out-of-spec chips are hard to spot. Checking
them usually needs a specialised lab, so only a few samples get checked. This
RTL implements a scheme that lets any user test a chip on the board, with an
oscilloscope and an EM probe:

* When a chip is made, the manufacturer burns a secret key/IV pair into
  one-time-programmable antifuse memory. Every chip gets a different pair.
* After every reset the chip runs the Trivium stream cipher from that pair.
  It feeds the keystream, one bit per clock, into *leakage circuits*: small
  ring-oscillator cells that emit extra EM noise while their input is 1.
* From time to time the manufacturer publishes short pieces of each chip's
  keystream, at random offsets. A few bits of each piece are flipped on
  purpose. These are the *identification sequences*.
* The user records the chip's EM emission after a reset and reduces it to one
  value per clock. They then correlate it with the published sequence at the
  published offset. A genuine chip correlates: the Pearson coefficient exceeds
  tanh(z/√(L−3)) for sequences of L bits, and z = 7 separates well in
  practice. A remarked, overproduced or out-of-spec chip has no valid key and
  does not.

The chip never outputs the keystream on a pin. It is only visible through the
side channel, so the cipher state is hard to attack.

Two pieces of hardware are described here. Both are implemented:

| design | top module | what it is |
|---|---|---|
| protection circuit | `ic_protection` | the circuit inside every protected IC: antifuse memory, initialisation FSMD, key/IV registers, crypto engine, 10 leakage circuits |
| evaluation platform | `poc_system` | an FPGA test system. Key/IV, the number of active leakage circuits (out of 64) and 40 AES-128 load circuits are set over a UART. The cipher restarts periodically and pulses a scope trigger each time. |

`cid_top` puts both side by side on one clock and reset. They share nothing
else.

The correlation and the publishing of sequences run in software on a PC and
are not part of the RTL.

## The timeline of one chip (`ic_protection`)

Most questions about this design come down to "which bit is on the leakage
circuits in which cycle". That question is answered here.

### 1. One-time programming (fresh part)

The antifuse memory holds 161 bits, one per address:

| address | contents |
|---|---|
| 0 | "IC initialised" flag |
| 1 .. 80 | key bits K1 .. K80 |
| 81 .. 160 | IV bits IV1 .. IV80 |

After reset the FSMD reads address 0. If the flag is 0, the FSMD waits for a
`1` on `pin` (the start bit). The 160 bits that follow on `pin`, one per
clock, are burnt into addresses 1..160 (K1 first, IV80 last). Then the flag is
burnt and the FSMD idles. Nothing is leaked until the next reset.

A fuse can only be blown, never cleared. Neither reset nor later pin activity
changes the memory once the flag is set. The FSMD has assertions for the two
write rules: no writes after initialisation, and the flag is written only at
address 0.

### 2. Every later reset

Cycles below are counted from the first clock after `rst_n` rises.

| cycles | what happens | `phase` |
|---|---|---|
| 0 .. 160 | fuse 0 read, fuses 1..160 copied into the key/IV registers, one per clock | `CE_IDLE` |
| 161 | `crypto_en` rises; Trivium loads key and IV | `CE_IDLE` |
| engine cycle 0 .. 999 | calibration pattern 1,0,1,0,… on the leakage circuits; Trivium warms up meanwhile | `CE_CAL` |
| engine cycle 1000 .. 1151 | leakage held at 0 (Trivium still in its 1152-round warm-up) | `CE_WAIT` |
| engine cycle 1152 + k | keystream bit *k* on the leakage circuits | `CE_KS` |
| after 50 000 000 keystream bits | engine off, leakage 0 until the next reset | `CE_OFF` |

"Engine cycle 0" is the cycle after `crypto_en` rises, i.e. cycle 162 after
reset. A published sequence for offset *t* therefore covers engine cycles
1152+*t* onwards.

The calibration pattern lets the user find a good probe position before
identifying the chip. Trivium needs 4 × 288 = 1152 rounds before its first
output bit. Calibration overlaps with that warm-up, so the two leave a
152-cycle quiet gap between them. Switching off after 50 M bits (one second at
50 MHz) saves power. It still leaves far more keystream than the manufacturer
will ever publish (10 k bits a month would last over 400 years).

### 3. The keystream

`trivium` is the standard cipher: 80-bit key and IV, a 288-bit state in three
shift registers, one state update per clock. It is loaded with
`s1..s80 = K1..K80`, `s94..s173 = IV1..IV80`, `s286..s288 = 1` and all other
bits 0. In the RTL, `key[i-1]` is K*i* and `iv[i-1]` is IV*i*.

## Leakage circuits

Each `leakage_circuit` has four NAND gates. One input of each NAND is the
common input and the other is the NAND's own output, so each NAND is a ring
oscillator while the input is 1. NANDs 0 and 1 feed one OR gate, NANDs 2 and 3
the other, and the two ORs feed an AND. The four oscillators run at slightly
different speeds, so the OR and AND outputs glitch several times per period.
That switching current is the signal. With the input at 0, every NAND output
sits at 1 and the cell is silent. Many cells in parallel (`leakage_array`) give
a stronger signal.

**`leakage_circuit` is a behavioural model, not synthesizable RTL.** It
oscillates only because each NAND has its own delay (1.1, 1.3, 1.7 and 1.9 ns
by default, parameters of this model). It needs a simulator with timing
(`verilator --timing`). On silicon or an FPGA the cell has to be built from
hand-placed gates that synthesis is told to keep. The combinational loops are
intended.

In `leakage_array`, circuit *i* is enabled when `i <= n_active`. The 6-bit
count therefore selects 1 to 64 active circuits. The IC uses all 10 of its
circuits all the time.

## The evaluation platform (`poc_system`)

This is the system used to measure the scheme on FPGAs. It is not meant to
ship in a product: there the settings would be fixed at design time.

**UART** (`uart_rx`): 8N1, LSB first, 434 clocks per bit (115 200 baud at
50 MHz). Receive only.

**Commands** (`cmd_interpreter`): one code byte, then the payload. A setting
changes only once its last byte has arrived.

| code | payload | effect |
|---|---|---|
| `'K'` 0x4B | 10 bytes | key. Byte *j* carries K(8j+1)..K(8j+8), with K(8j+1) in bit 0 |
| `'I'` 0x49 | 10 bytes | IV, same layout |
| `'N'` 0x4E | 1 byte | bits 5:0 = n; leakage circuits 0..n active |
| `'L'` 0x4C | 1 byte | bit 0 = load circuits on |

Unknown code bytes are ignored. The reset values are: key = IV = 0, n = 15
(16 circuits) and loads off.

**Auto-reset** (`auto_reset`): every 550 000 000 cycles (11 s), and in the
first cycle after the system reset, `trigger` is high for one cycle. In the
same cycle the crypto engine restarts and reloads Trivium from the current
key/IV registers. A new key or IV is therefore used from the next trigger on.
The LC count and the load enable take effect at once. If the trigger is in
cycle T, engine cycle 0 is T+1 and keystream bit *k* is in cycle T+1+1152+*k*.
The same crypto engine as in the IC is used here, but it never switches off,
because measurements are taken up to 10 s after reset.

**Load circuits** (`load_circuit`): they simulate a busy chip around the
cipher. Each one is an `aes128_core` in CBC mode, with block
*i* = AES_K(PT xor C(i-1)) and C(-1) = 0. A dedicated 128-bit LFSR (`lfsr128`,
polynomial x^128+x^126+x^101+x^99+1) pauses the core in the cycles where its
output bit is 0, so the cores drift apart. Key, plaintext and LFSR seed are
derived from the instance number with a 64-bit mixing function, so each
instance differs. The auto-reset does not touch the load circuits.
`load_digest`, the XOR of all ciphertexts, only keeps the load logic
observable.

`aes128_core` runs one round per enabled clock, so a block takes 11 enabled
cycles. It expands the key on the fly. Its S-box is computed during
elaboration from the GF(2^8) inverse and the affine map, not stored as a
literal table.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `cid_top` / `ic_protection` | `IC_N_LC` / `N_LC` | 10 | leakage circuits in the IC |
| | `CAL_LEN` | 1000 | calibration cycles |
| | `IC_KS_BITS` / `KS_BITS` | 50 000 000 | keystream bits before switch-off (0 = never) |
| `cid_top` / `poc_system` | `POC_N_LOAD` / `N_LOAD` | 40 | AES load circuits |
| | `POC_N_LC` / `N_LC` | 64 | leakage circuits |
| | `CLKS_PER_BIT` | 434 | UART bit time in clocks |
| | `AUTO_RESET_PERIOD` | 550 000 000 | cycles between auto-resets |
| `trivium` / `crypto_engine` | `WARMUP` | 1152 | Trivium warm-up rounds |

The published description fixes 80-bit key and IV, one keystream bit per
clock, 1000 calibration cycles, switch-off after one second at 50 MHz, 64
leakage circuits with a 6-bit count, and 1, 26 or 40 load circuits (40 is the
largest board). The other values are choices made for this RTL.

## How far to trust it, and where it goes beyond the description

Taken from the published description: the block structure of both designs;
the programming algorithm and fuse map; one keystream bit per clock; the
calibration pattern and its length; the leakage-cell gate structure; 64
leakage circuits with a 6-bit count; the UART-controlled settings; the
auto-reset with a one-cycle trigger; AES-128 CBC loads gated by 128-bit LFSRs.

Choices made for this RTL, where the description says nothing:

* Programming bits arrive one per clock, right after the start bit. The FSMD,
  not the pin, supplies the `1` written to the flag fuse.
* Fuse writes are blocked while `rst_n` is low. Before reset has acted, the
  FSMD outputs are undefined, and one stray write at power-up would ruin the
  part for good.
* The antifuse memory is modelled as set-only bits with a combinational read.
  Programming voltages and timing are left out.
* Calibration starts with a 1 and overlaps Trivium's warm-up. This creates the
  152-cycle gap shown above.
* Reading the 6-bit LC count as "circuits 0..n".
* The UART format and command set, the reset values of the settings, and the
  auto-reset period (chosen to hold measurements up to 10 s after reset).
* The AES key of each load circuit, and how its plaintext continues after the
  first block.
* The LFSR polynomial and output bit.
* The leakage-cell delays.

Not included:

* The off-chip part of the scheme: generating and publishing the sequences
  and the correlation test. `tb_identification` contains a testbench-only
  model of both.
* Any countermeasure against physical attacks.

Trivium is checked against a bit-level model written from the cipher's
specification, not against published test vectors. AES is checked against
the FIPS-197 example vectors and against an independent software model.

## Simulating

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. The testbench-only models are in
`trivium_ref_pkg.sv` (Trivium, spec style) and `aes_ref_pkg.sv` (AES-128 built
from log/antilog tables). With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/cid_pkg.sv rtl/aes_pkg.sv tb/trivium_ref_pkg.sv tb/aes_ref_pkg.sv \
    -y rtl -y tb --top-module tb_cid_top tb/tb_cid_top.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_cid_top` | Both designs end to end, with a short keystream, auto-reset period and UART bit time. The IC is programmed, reset, leaks calibration and then keystream, and switches off. A key one bit different gives a different stream. The PoC system takes new settings over the UART and restarts with the new key. Each mechanism is counted. |
| `tb_cid_top_full` | All defaults (40 AES cores, 64 + 10 leakage circuits, 115 200 baud). The IC is programmed and 2000+ keystream cycles are compared. The PoC is compared from power-up, then set over the UART. Takes about a minute. |
| `tb_identification` | The identification experiment at full size: a genuine and a counterfeit part each leak 50 000 keystream bits. The measurement is modelled as the active-circuit count plus Gaussian noise of about the signal's size. Ten published 1000-bit sequences with 10 % flipped bits must clear the z = 7 threshold on the genuine part only, and never at wrong offsets. |
| `tb_ic_protection` | Programming, two resets (the second with noise on the pin), the leaked bits cycle by cycle, and switch-off |
| `tb_poc_system` | Power-up stream, UART settings, key change at the next trigger, load activity across the auto-reset |
| `tb_init_fsmd`, `tb_af_memory`, `tb_af_counter`, `tb_key_iv_reg` | Programming and load sequence, set-only fuses, the counter, the fuse-to-register map |
| `tb_trivium`, `tb_crypto_engine` | Keystream against the reference, with warm-up length, pauses, reload, the phase sequence and restart |
| `tb_leakage_circuit`, `tb_leakage_array` | Silent when the input is 0 and glitching when it is 1; the circuit-count selection |
| `tb_uart_rx`, `tb_cmd_interpreter`, `tb_auto_reset` | Framing, glitches, the command set, and the trigger period |
| `tb_aes128_core`, `tb_load_circuit`, `tb_lfsr128` | FIPS-197 vectors, the 11-cycle latency, pausing, CBC chaining, and the LFSR recurrence |

The full-size run does not reach the 50 M-bit switch-off or the 550 M-cycle
auto-reset. Those are covered by the reduced-size testbenches.

## Files

`rtl/` holds one module or package per file:

* `cid_pkg.sv`: shared widths, the fuse map, state and phase enums, command
  codes.
* `aes_pkg.sv`: AES helper functions, the computed S-box, and seed mixing.

The integration modules are `cid_top`, `ic_protection` and `poc_system`.
Everything else is a leaf module named as in the text above.
