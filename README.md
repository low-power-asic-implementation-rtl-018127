# AES-256 crypto-processor with a power-gated encryption engine

This is a small AES-256 core for ASIC use. It holds one encryption engine and
one decryption engine. Each engine computes one AES round per clock and
generates its round keys as it goes, so no expanded key is stored. The two
engines are chained, so every block is encrypted and then decrypted. While one
block is being decrypted, the next is already being encrypted. To save leakage
power, the encryption engine can be put to sleep (clock stopped, supply cut)
while only the decryption engine is working.

The RTL is SystemVerilog 2017, fully synthesizable, with no vendor cells. The
only exception is the power switches themselves, which are transistors
inserted at layout. This RTL drives their control signal.

## Block structure

```
              data_e key_e            key_d
                 |     |                |
 e_enable --> +--v-----v--+  op_e   +---v--------+
 e_ready  <-- | aes_encrypt|------->| aes_decrypt |--> op_d
              |  (gclk)    | e_valid|   (clk)     |--> d_valid
              +-----^------+------->+-------------+
                    |   enable = e_valid
         clock_gate | <-- clk_en -- pg_ctrl --> sleep_e (to power switches)
```

| module | role |
|---|---|
| `aes_crypto_processor` | top: the two engines, clock gate, power-gating controller |
| `aes_encrypt` | iterative encryption engine |
| `aes_decrypt` | iterative decryption engine |
| `round_counter` | one-hot control counter shared by both engines |
| `key_expansion` | round keys rk0..rk14, forward, one per clock |
| `inv_key_expansion` | round keys rk14..rk0, backward, one per clock |
| `sub_bytes`, `inv_sub_bytes` | 16 S-box / inverse S-box look-up tables |
| `shift_rows`, `inv_shift_rows` | byte permutations |
| `mix_columns`, `inv_mix_columns` | column mixing over GF(2^8) |
| `add_round_key` | 128-bit XOR |
| `clock_gate` | latch-based clock gate for the encryption engine |
| `pg_ctrl` | sleep / wake controller |
| `aes_pkg` | shared types, GF(2^8) helpers, S-box tables computed at elaboration |

## The round engines and the one-hot counter

Each engine has one round's worth of logic and a 128-bit state register that
feeds back to the round input through a 2:1 multiplexer. A 16-bit one-hot
counter (`round_counter`) runs the sequence. Bits 0..14 are the 15 round
states, and bit 15 is a one-cycle "result valid" state:

| count bit | encryption does | decryption does | round key |
|---|---|---|---|
| 0 | mux takes `data_in`; SubBytes, ShiftRows and MixColumns bypassed, so only AddRoundKey | mux takes `data_in`; InvShiftRows, InvSubBytes and InvMixColumns bypassed, so only AddRoundKey | enc rk0, dec rk14 |
| 1..13 | SubBytes, ShiftRows, MixColumns, AddRoundKey | InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns | enc rk_k, dec rk_(14-k) |
| 14 | MixColumns bypassed | InvMixColumns bypassed | enc rk14, dec rk0 |
| 15 | output valid | output valid | — |

The decryption engine runs the straightforward inverse cipher, with the steps
in that order; it is not the "equivalent inverse cipher". So the two
datapaths differ, and the decryption round keys need no InvMixColumns.

The counter rests in state 0 until a start arrives. The clock edge that
accepts a block samples the data and key and already performs the initial
AddRoundKey. The 14 rounds take the next 14 edges, so `valid` rises on the
14th edge after the accepting edge. The state register then holds the result
until the next block is accepted.

### Timing of the top level

* `e_enable`/`e_ready` is a valid/ready handshake. A block (`data_e`,
  `key_e`) is taken on a rising edge where both are 1.
* `e_valid` rises on the 14th edge after that. `op_e` holds the ciphertext
  until the next block starts.
* The encryption engine is ready again in the cycle after `e_valid`. With a
  request waiting, blocks are taken every 16 clocks.
* The decryption engine takes `op_e` on the edge that ends the `e_valid`
  cycle. `d_valid` comes 15 clocks after `e_valid`, with the plaintext on
  `op_d`.
* Both engines have the same 16-clock period, so the decryption engine is
  always waiting when a ciphertext appears. An assertion in the top checks
  this.

Reset (`rst`) is asynchronous and active high. It puts both counters in the
waiting state and clears the state registers.

## Round keys on the fly, forwards and backwards

This is the least obvious part of the design.

**Forward (`key_expansion`).** A 256-bit register holds a window of eight
expanded words. The round key is the older four. Each clock the next four
words are computed from the window, and the window slides by four:

```
t    = SubWord(RotWord(w[i-1])) ^ Rcon(i/8)   when i mod 8 = 0
t    = SubWord(w[i-1])                       when i mod 8 = 4
w[i] = w[i-8] ^ t,  w[i+j] = w[i+j-8] ^ w[i+j-1]   for j = 1..3
```

The two cases alternate from one clock to the next. Which one applies, and
which Rcon, is decoded from the one-hot count. In state 0 the round key comes
straight from the `key` input, so the key only has to be valid on the
accepting edge.

**Backward (`inv_key_expansion`).** The recurrence can be solved for the
oldest word: `w[i-8] = w[i] ^ t(w[i-1])`. Starting from the last eight words
w52..w59, each clock gives the four words before the window, so the round
keys come out as rk14, rk13, ..., rk0. This is exactly the order the inverse
cipher needs. The price is the decryption key format:

> `key_d` is not the cipher key. It is the last 256 bits of the expanded key,
> `{w52, w53, ..., w59}`. These can be computed once per cipher key in
> software, or taken from the forward schedule after an encryption.

This keeps decryption at the same 14-clock latency as encryption. An
engine that took the plain cipher key would first have to run the schedule
forward.

Rcon is computed with repeated `xtime`, and the 8-bit S-boxes are the same
tables the datapath uses.

## The S-boxes are tables

SubBytes and InvSubBytes are look-up tables, one 256 x 8 ROM per byte lane
(16 per engine, plus 4 in each key unit). The table contents are not typed
in. `aes_pkg` computes them when the design is elaborated: the S-box entry is
the GF(2^8) inverse of the input (as `a^254`), followed by the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse table
is made by inverting the forward one. Synthesis sees them as constant
memories.

Byte order follows FIPS-197. Byte 0 of a 128-bit vector is bits [127:120],
and state element S(r,c) is byte r+4c, so each 32-bit word is one column.
Known-answer vectors from the standard can be applied as they are printed.

## Power gating of the encryption engine

`pg_ctrl` has three states:

* **ACTIVE**: clock running. It goes to SLEEP when `pg_en` is 1, the
  encryption engine is idle, no request is pending (`e_enable` low) and the
  decryption engine is busy.
* **SLEEP**: `sleep_e` is high, which opens the header/footer power switches,
  and the clock is gated off. It goes to WAKE when a request arrives, when
  decryption finishes, or when `pg_en` is cleared.
* **WAKE**: switches closed again, clock still off for `WAKE_CYCLES` clocks
  (default 2) while the virtual supply settles. Then ACTIVE.

`e_ready` is low unless the engine's clock is enabled. A request made during
sleep simply waits, as any valid/ready handshake allows. The clock gate
latches the enable while the clock is low, so the gated clock never carries a
shortened pulse. That latch is the only latch in the design, and it is
intended.

The state elements are assumed to keep their contents through sleep
(retention flip-flops, or an always-on register supply). In RTL they simply
hold while the clock is stopped. The engine only sleeps in its waiting state,
so the state to keep is small: the one-hot counter (which must wake up in its
waiting state) and the last ciphertext on `op_e`. The decryption engine has
already taken that ciphertext by then.

With `pg_en` low the encryption engine never sleeps.

## Where this design departs from, or adds to, its source description

* **Latency.** The source says the processor takes 14 clock cycles, and
  describes a 15-bit one-hot round counter driving a 16-bit count bus. Here the
  15 round states are counter bits 0..14, and the 16th bit is a one-cycle
  valid state. A result appears 14 clock edges after the accepting edge, and
  a block can be taken every 16 clocks.
* **AES-256 key schedule.** The key-expansion description shows only two
  kinds of word cell (with and without SubWord/RotWord/Rcon). Standard
  AES-256 also applies SubWord alone when i mod 8 = 4. That step is included,
  so the core is standard AES-256 and passes the published vectors.
* **Decryption key.** The source gives the decryption engine its own key
  input without saying what it holds. Here it is the last eight expanded
  words; see above.
* **Handshake, `e_ready`, `pg_en`, sleep/wake policy, reset.** None of these
  is specified in the source. They are this design's choices.
* **InvMixColumns matrix.** The coefficients used are the standard
  `a^-1(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e}` circulant.
* **Power switches.** These are not RTL. `sleep_e` is the port they connect
  to.
* Only AES-256 is supported. AES-128 and AES-192 are not built.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against `aes_ref_pkg`, a separate software AES model. It finds the S-box by
brute-force inversion, uses byte arrays for the state, and expands the full
60-word key schedule. Beyond the model, the tests check:

* the AES standard's AES-256 example (`000102...1f` /
  `00112233...eeff` -> `8ea2b7ca516745bfeafc49904b496089`), two NIST
  SP 800-38A ECB-AES256 vectors, and published MixColumns columns;
* words w8 and w59 of the standard's key-expansion example;
* the latency, the one-cycle valid, the held output and back-to-back
  operation of both engines;
* the clock gate: no glitch when the enable changes while the clock is high,
  and the exact number of gated edges;
* the sleep/wake sequence and wake delay of `pg_ctrl`.

`tb_aes_crypto_processor` runs the whole design at its default size. It
sends 200 blocks with random keys and random gaps, first with power gating on
and then off. It checks every ciphertext and every decrypted block, and the
latencies. It also counts each mechanism and fails if one never happened: the
AddRoundKey-only first stage and the last-round bypass in both engines,
overlapped operation, back-to-back blocks, sleep, wake on request, wake at
the end of decryption, and a request held off while asleep. The whole run
takes well under a second of simulation.

Power, area and timing are not checked here. They depend on the cell
library and the place-and-route flow.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  --top-module tb_aes_crypto_processor \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_crypto_processor.sv
./obj_dir/Vtb_aes_crypto_processor
```

Any other testbench builds the same way: change the top module and the last
file. Verilator
finds the modules it uses in `rtl/` and `tb/` by name. Each testbench ends by printing
`TB_RESULT checks=<n> failures=<m>`. To lint the design:

```
verilator --lint-only -Wall -y rtl rtl/aes_pkg.sv rtl/aes_crypto_processor.sv
```

Lint reports `SYNCASYNCNET` because `rst` is used both as an asynchronous
reset and in the `disable iff` of the assertions. This is harmless.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `NR` | `aes_encrypt`, `aes_decrypt`, key units, `round_counter` | 14 | number of rounds. The key units implement the AES-256 schedule only, so only 14 gives AES. |
| `WAKE_CYCLES` | `pg_ctrl` | 2 | clocks between closing the power switches and restarting the clock |
