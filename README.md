# Hash-based mutual authentication on a passive UHF RFID tag

This is the digital part of a passive UHF RFID tag that proves its identity
to a reader and checks the reader's identity in return. It does this with
nothing but a hash function and a secret key that changes after every
successful session. A tag that changes its key every time cannot be traced
by an eavesdropper. A stolen old response is also of no use. The protocol is
OMHSO, an improved form of the OSK scheme. The tag carries two hash
functions behind one port: the lightweight SPONGENT-160 (80-bit security)
and Keccak (128-bit security). A pin selects which one runs, so a single
chip can be measured both ways.

The RTL covers the whole digital part of the published chip:
interface, finite state machine, memory controller, hash block, comparator,
a 128-byte SRAM and a 1 Kbyte EEPROM. The EEPROM is a behavioural model. The
analog power block, the analog clock block (oscillator, demodulator,
modulator, power-on reset) and the antenna are not RTL. Their digital-side
signals are the top-level ports. Interface, comparator, finite state
machine, hash function and memory controller together form the
*cryptographic block*; SRAM and EEPROM sit beside it. Each of the two
memories has its own port, which only the memory controller drives.

## The protocol, as the tag runs it

The tag holds a 128-bit key `S_i` and a 64-bit PRNG seed in EEPROM. One
session runs in eight steps. The `step` output shows which step is running:

| step | work | SPONGENT-160 | Keccak | published |
|---|---|---|---|---|
| 1 | copy tag state and seed, EEPROM → SRAM | 0.024 ms | 0.024 ms | 0.02 / 0.02 ms |
| 2 | copy key, EEPROM → SRAM | 0.024 ms | 0.024 ms | 0.02 / 0.02 ms |
| – | wait for the reader's 64-bit challenge `X` | | | |
| 3 | `alpha‖seed' = PRNG(seed)`, `beta = H0(S_i‖X‖alpha)`, send `Y = alpha‖beta` | 4.43 ms | 0.217 ms | 4.52 / 0.23 ms |
| – | wait for the server's 160-bit answer `Z` | | | |
| 4 | `Z' = H1(S_i‖X‖alpha)` | 3.03 ms | 0.141 ms | 2.94 / 0.14 ms |
| 5 | compare `Z` with `Z'` | 0.054 ms | 0.054 ms | 0.06 / 0.06 ms |
| 6 | if equal: `S_{i+1} = H2(S_i)` | 1.87 ms | 0.096 ms | 2.04 / 0.11 ms |
| 7 | if equal: EEPROM block write of the new key | 4.36 ms | 4.36 ms | 4.33 / 4.33 ms |
| 8 | EEPROM block write of the new seed | 4.35 ms | 4.35 ms | 4.33 / 4.33 ms |

The simulated times come from the end-to-end testbench at 800 kHz. The
published column gives the measured times of the original chip, SPONGENT-160
first. The whole flow takes 18.1 ms with SPONGENT-160 and 9.26 ms with
Keccak; the published totals are 18.26 ms and 9.24 ms. The testbench fails
if any step is more than 25 % off.

The server holds both the current and the previous key of each tag. It finds
the tag by testing which key reproduces `beta`, answers
`Z = H1(key‖X‖alpha)` and moves to `H2(key)`. If `Z` is lost or corrupted,
the tag keeps `S_i` while the server has moved on. At the next session the
server still finds the tag through its stored previous key, and both sides
get back in step. The server is software on the reader side and is not part
of this RTL. The end-to-end testbench contains a model of it.

On a mismatch the tag skips steps 6 and 7 and writes the seed anyway, so
that an attacker who replays an old `X` never sees the same `alpha` again.
The tag then goes straight back to step 1 and waits for the next challenge.
`auth_ok` and `key_updated` hold the outcome until the next `X` arrives.
`session_done` pulses after step 8.

### Data sizes

`X` is 64 bits, `alpha` 64, `beta`, `Z` and `Z'` each 160 bits. So each
direction carries 224 bits: the reader sends `X` and `Z`, the tag sends
`alpha‖beta`. Every hash output is the first 20 bytes of the digest. The new
key is the first 16 bytes of `H2`. The PRNG output is split into `alpha`
(bytes 0–7) and the next seed (bytes 8–15).

## One hash function, four uses

The tag needs `H0`, `H1`, `H2` and a PRNG. To save area, all four are one
sponge hash, told apart by a *suffix byte* that the hash block appends after
the message and before the algorithm's own padding:

| use | suffix |
|---|---|
| H0 | `0x01` |
| H1 | `0x02` |
| H2 | `0x03` |
| PRNG | `0x04` |

`H0` and `H1` therefore hash the same 32 bytes `S_i‖X‖alpha` and still give
unrelated results. The values (`use + 1`) are this design's choice. Only the
idea of telling the uses apart by padding is taken from the original design.

### The sponge port (`hash_function`, `spongent160`, `keccak_core`)

Both cores share the same byte-serial handshake. Everything advances on the
clock enable `ce` (800 kHz in the tag):

- `init` / `start`: clear the state. `start` on `hash_function` also latches
  `pad_mode` (the use).
- `in_valid`, `in_data`, `in_last` → `in_ready`: one message byte per enabled
  cycle. A byte is taken when `in_valid && in_ready`. Each full rate block
  starts a permutation, and `in_ready` stays low while it runs.
- `out_valid`, `out_data` ← `out_ready`: digest bytes, one per enabled cycle,
  while `out_ready` is high. Squeezing is on demand: when the rate is used
  up, the next permutation starts only if the consumer still asks. The
  consumer stops asking after the bytes it needs.
- `busy`: a permutation is running.

| core | state | rate | permutation | padding |
|---|---|---|---|---|
| `spongent160` | 176 bit | 16 bit (2 bytes) | 90 rounds, 1 per cycle | `0x80` then zeros |
| `keccak_core` | 1600 bit | 1344 bit (168 bytes) | Keccak-f[1600], 24 rounds, 1 per cycle | `0x01 … 0x80` (original Keccak, not SHA-3) |

SPONGENT-160/160/16 uses the 4-bit S-box `E D B 0 2 1 4 F 7 A 8 5 9 C 3 6`,
the bit permutation `P(j) = 44·j mod 175` (bit 175 fixed), and a 7-bit
round-counter LFSR (`x^7 + x^6 + 1`, starting at `0x45`). The counter and
its bit-reversed value are XORed into the two ends of the state. Message
bytes enter the rate most significant byte first.

The Keccak rate is a parameter. With `RATE_BYTES = 136` the core gives
the published Keccak-256 digests, which the core testbench checks. The tag
uses 168 bytes (capacity 256 bits). Every message the tag hashes (at most
33 bytes with the suffix) then fits one block.

Only the selected core receives enables, so the idle one does not switch.
`hash_sel` must not change while a hash is running.

Per hash the cost is one cycle per input byte, one for the suffix, 90 or 24
per permutation and one per output byte. This is why the SPONGENT steps take
milliseconds: a 32-byte `H1` needs 17 absorb permutations and 9 squeeze
permutations of 90 cycles.

## Memory controller commands

The protocol controller (`omhso_fsm`) never touches a memory. Each state
issues one `rfid_pkg::mc_cmd_t` to `memory_controller` and waits for `done`:

| op | action | rate |
|---|---|---|
| `OP_EE2SR` | EEPROM[src..] → SRAM[dst..], `len` bytes | 1 byte/cycle (read and write overlap) |
| `OP_SR2EE` | SRAM[src..] → EEPROM page buffer, then block write, wait until not busy | 1 byte/cycle + 4.33 ms |
| `OP_HASH` | start hash with use `pad`, stream SRAM[src..+len), store `len2` digest bytes at SRAM[dst..] | 2 cycles/byte in |
| `OP_TX` | SRAM[src..+len) → response encoder; `last` marks the end of the reply | set by the air rate |
| `OP_RX` | wait for one reader frame, store its first `len` bytes at SRAM[dst..], report `rx_bits` | set by the air rate |
| `OP_CMP` | compare SRAM[src..] with SRAM[dst..] over `len` bytes | 2 SRAM reads per pair |

`cmd_ready` is high only while the controller is idle. The SRAM answers a
read one enabled cycle later. The controller accounts for that latency in
every streaming command. Two assertions in the controller guard its
handshakes: no EEPROM request while a block write runs, and no command of
length zero. Run Verilator with `--assert` to have them checked.

### Memory maps

SRAM (124 of 128 bytes used):

| address | content |
|---|---|
| 0x00 | tag state (1 byte) |
| 0x08 | seed (8) |
| 0x10 | key `S_i` (16) |
| 0x20 | `X` (8) |
| 0x28 | `alpha` (8) |
| 0x30 | next seed (8) |
| 0x38 | `beta` (20) |
| 0x50 | `Z` (20) |
| 0x68 | `Z'` (20) |

`X` directly follows the key and `alpha` directly follows `X`, so
`S_i‖X‖alpha` is one 32-byte range that a single `OP_HASH` can read.

EEPROM: tag state at 0x000, seed at 0x008 (page 0), key at 0x010 (page 1).
A page is 16 bytes, so the key is one block write and the seed another. The
tag-state byte is loaded with the seed but nothing uses it. It stands in
for the tag state of the original flow, whose content is not defined.

## The air interface (`tag_interface`)

`clock_divider` turns the 12.8 MHz clock into enable strobes: 6.4 MHz (EEPROM
timer), 800 kHz (controller, hash, memories, comparator, decoder), 40 kHz
(reply turnaround) and a reply half-bit strobe every 67 clocks. There is one
clock domain. Nothing is clocked by a divided clock.

Reader → tag (`pie_decoder`): pulse-interval encoding on the demodulated
envelope `rx_env`. Each symbol ends with a carrier-off pulse, so the decoder
measures the time between falling edges in 800 kHz ticks. With Tari = 25 µs
(20 ticks), a 0 is 1 Tari and a 1 is 2 Tari, split at `PIVOT = 30` ticks.
Random data then averages 26.7 kbit/s. A frame of N bits has N+1 falling
edges and ends after `TIMEOUT = 60` ticks of silence. It has no delimiter,
calibration symbols, command codes or CRC. The tag accepts a 64-bit frame as
`X` and a 160-bit frame as `Z`. It ignores frames of any other length while
waiting.

Tag → reader (`fm0_encoder`): FM0 (bi-phase space). The level inverts at
every bit boundary, and a 0 inverts again mid-bit. The half-bit is 67 clocks
(95.5 kbit/s). The reply starts `T1_TICKS = 4` periods of 40 kHz (100 µs)
after the encoder gets its first byte. It ends with a dummy 1. If the next
byte is not there in time, the reply is cut short and `underflow` is
raised. The decoder ignores the line while the tag replies.

## Interface of the top (`rfid_tag`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_12m8` | in | 1 | 12.8 MHz clock from the analog clock block |
| `por_n` | in | 1 | power-on reset, active low, asynchronous |
| `rx_env` | in | 1 | demodulated reader envelope, 1 = carrier on |
| `hash_sel` | in | 1 | 0 = SPONGENT-160, 1 = Keccak |
| `tx_mod` | out | 1 | FM0 reply to the backscatter modulator |
| `auth_ok` | out | 1 | the last `Z` matched |
| `key_updated` | out | 1 | the key was rewritten in the current protocol run |
| `session_done` | out | 1 | pulse after step 8 |
| `step` | out | 4 | running step 1..8, 0 while waiting for or talking to the reader |
| `tx_active` | out | 1 | reply in progress |
| `hash_busy` | out | 1 | a permutation is running |
| `tx_underflow` | out | 1 | a reply was cut short |

Parameters: `PROG_TICKS = 27712` (EEPROM block write, 4.33 ms of 6.4 MHz),
`DIV_HALF = 67` (reply half-bit) and `T1_TICKS = 4` (reply turnaround).

The EEPROM array is not reset. It models nonvolatile memory, and whatever
loads a key into the tag (a programmer, or a testbench writing
`dut.u_eeprom.mem`) must do so before the first session.

## Where this design departs from, or fills in, the original

- **Line codes and framing.** The original names a reader command decoder
  and a response encoder and gives the rates (Tari 25 µs, 27 kbit/s down,
  95 kbit/s up). PIE with a 2-Tari one and FM0 follow the usual EPC UHF
  scheme, which matches those rates. The bare framing without commands or
  CRC is a simplification.
- **40 kHz.** In the original the response is generated from a 40 kHz
  clock. That cannot produce 95 kbit/s, so here the 40 kHz strobe only
  times the turnaround before the reply, and the bit time follows the
  95 kbit/s figure.
- **Reply length.** The tag's algorithm lists its response as 160 bits,
  while the communication budget counts 224 bits each way. This design sends
  `alpha‖beta` (224 bits). The reader needs `alpha` to compute `Z`.
- **Hash parameters.** SPONGENT-160/160/16 and a Keccak capacity of 256 bits
  are this design's picks. The original gives only the security levels. The
  SPONGENT constants follow its public specification but have not been
  checked against published test vectors. The Keccak core is checked against
  Keccak-256 digests.
- **Suffix bytes, seed size, memory maps, page size, mismatch handling,
  command set**: this design's choices, described above. The 64-bit seed and
  the one-round-per-cycle cores reproduce the measured step times.
- **Clocks as enables** instead of divided clocks. The timing seen from
  outside is the same.
- **Not built:** power supply, oscillator, modulator/demodulator and
  power-on reset circuits, antenna, and the server. Power, supply drop and
  read distance cannot be studied with this RTL.

## Files

`rtl/` (one module or package per file):

- `rfid_pkg.sv`: shared types (hash select, use, commands) and the memory maps.
- `rfid_tag.sv`: top: cryptographic block, SRAM and EEPROM.
- `crypto_block.sv`: everything but the memories, with the two memory ports
  brought out.
- `omhso_fsm.sv`: protocol controller.
- `memory_controller.sv`, `comparator.sv`.
- `hash_function.sv`, `spongent160.sv`, `keccak_core.sv`.
- `sram_128x8.sv`; `eeprom_1k.sv` (behavioural model, not synthesizable as a
  real EEPROM).
- `tag_interface.sv`, `clock_divider.sv`, `pie_decoder.sv`, `fm0_encoder.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and
`ref_hash_pkg.sv`, a reference model of both hash functions and their use
suffixes, written independently of the RTL. `tb_crypto_block.sv` runs the
cryptographic block with the memories attached and also watches the memory
ports: address ranges, no EEPROM request during a block write, one block
write per key or seed update. `tb_rfid_tag.sv` runs four
sessions at the default parameters, playing reader and server:

1. a normal SPONGENT-160 session;
2. a Keccak session with `Z` corrupted (the tag rejects it and the two sides
   fall out of step);
3. a Keccak session where the server answers with the previous key (the two
   sides get back in step);
4. a SPONGENT-160 session after a 40-bit frame that the tag must ignore.

It checks `Y`, the results, the EEPROM contents and every step time, and
counts each mechanism. `tb_rfid_tag_sessions.sv` runs the protocol 50 times
with each hash function, back to back without a reset. About one session in
eight has a corrupted `Z` and must be followed by a resynchronisation. The
run passes only if tag and server agree on the key after every clean
session. Every testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/rfid_pkg.sv tb/ref_hash_pkg.sv tb/tb_rfid_tag.sv --top tb_rfid_tag
./obj_dir/Vtb_rfid_tag
```

The full end-to-end run simulates 96 ms of tag time in about a second. The
100-session run (`tb_rfid_tag_sessions`) covers 2.3 s of tag time in about
20 seconds.
For a block testbench, replace the top file and `--top` with, for example,
`tb/tb_spongent160.sv` and `tb_spongent160`. The block testbenches shorten
the EEPROM programming time through `PROG_TICKS`. Everything else runs at
its default.

When changing the design:

- keep `X` and `alpha` next to the key in SRAM (or issue separate hash
  commands);
- `hash_sel` is read at every `start`;
- a different `RATE_BYTES` or seed size changes the step times, which the
  end-to-end testbench checks against the table above.
