# AES-128 at two points of the area/speed trade-off, with a serial crypto processor

AES-128 encrypts a 128-bit block under a 128-bit key. It does this in ten rounds
of the same four steps: SubBytes, ShiftRows, MixColumns and AddRoundKey. How much
of that round you build in hardware sets both the area and the speed. This RTL
builds the cipher at both ends of that trade-off:

* **Small-area cores.** One round is built and reused ten times, one round per
  clock. A block takes 10 clocks. The S-boxes are computed arithmetically in a
  composite field, which saves area.
* **Pipelined (high-speed) cores.** All ten rounds are built one after another
  with a register between each pair. A new block enters on every clock and its
  result leaves 10 clocks later. The S-boxes are ROM tables, which are faster.

Each style comes as an encryptor and as a decryptor, so there are four cores.
Any of them can sit inside a small **crypto processor**. The processor talks to
an outside peripheral over three 1-bit serial ports: key in, data in and result
out. An operator drives it, either one command at a time or in a free-running
loop.

Everything is synthesizable SystemVerilog-2017. It uses a single clock and an
active-low asynchronous reset, `rst_n`.

## Block map

```
aes_top                      four processors side by side, one per core
└─ aes_crypto_processor      CORE = area enc | area dec | speed enc | speed dec
   ├─ aes_control_unit       Moore FSM, discrete / continuous mode
   ├─ aes_serial_in  (x2)    key unit and input unit: 128-bit serial-to-parallel
   ├─ aes_serial_out         output unit: 128-bit parallel-to-serial
   └─ one core:
      ├─ aes_area_encryptor  = aes_area_enc_keyexp + aes_area_cipher
      ├─ aes_area_decryptor  = aes_area_dec_keyexp + aes_area_cipher(INVERSE) + sequencer
      ├─ aes_speed_encryptor = aes_speed_keyexp    + aes_speed_cipher
      └─ aes_speed_decryptor = aes_speed_keyexp    + aes_speed_cipher(INVERSE) + accept logic
shared combinational blocks:
   aes_round      one full round (cipher or decipher, final or not)
   aes_key_round  one key-expansion round (RotWord, SubWord, Rcon, four XORs)
   aes_sbox_cf    composite-field S-box / inverse S-box
   aes_sbox_lut   ROM S-box / inverse S-box
   aes_mix_column MixColumns / InvMixColumns on one column
   aes_pkg        types, ShiftRows, xtime, affine maps, Rcon, the S-box tables
```

All 128-bit values use the byte order of the AES standard. Byte 0, the first
byte of the block (row 0, column 0), is in bits `[127:120]`. Column `c` is
bytes `4c..4c+3`. With key `000102030405060708090a0b0c0d0e0f`, plaintext
`00112233445566778899aabbccddeeff` encrypts to
`69c4e0d86a7b0430d8cdb78070b4c55a`. Every testbench uses this vector.

## The round and its two S-box styles

`aes_round` carries out one round:

* Cipher round: SubBytes, then ShiftRows, then MixColumns, then XOR with the
  round key.
* Decipher round: InvShiftRows, then InvSubBytes, then XOR with the round key,
  then InvMixColumns. This is the straight inverse cipher, not the "equivalent
  inverse cipher". So the decryptors use the ordinary round keys, in reverse
  order.
* `is_final` drops (Inv)MixColumns for round 10.
* ShiftRows needs no logic. It is only wiring, in `aes_pkg::shift_rows` and
  `aes_pkg::inv_shift_rows`.

### Composite-field S-box (`aes_sbox_cf`)

This block is the least obvious part of the design. The S-box is the
multiplicative inverse in GF(2^8), taken modulo x^8+x^4+x^3+x+1, combined with
an affine bit-mix. Instead of storing 256 bytes, the block computes the inverse
in a smaller field:

1. An 8x8 bit matrix (`MAP_ROW`) maps the byte to a pair of GF(2^4) digits
   `(ah, al)`. The pair stands for `ah*y + al`. GF(2^4) uses x^4+x+1, and
   `y^2 = y + 0xC`. Output bit `i` is the parity of `byte & MAP_ROW[i]`.
2. In that field the inverse needs only 4-bit products and one 4-bit inverse:
   `d = 0xC*ah^2 ^ ah*al ^ al^2`, then the result is `(ah*d^-1, (ah^al)*d^-1)`.
   The 4-bit inverse is `a^14`.
3. `INV_ROW` maps the pair back to a byte.
4. SubBytes applies the affine transform after the inversion (constant 0x63).
   InvSubBytes applies the inverse affine transform before it (constant 0x05).

The two matrices are one valid isomorphism between the fields. Many others
exist. If you change the field polynomials you must also recompute the
matrices:

* Find an element of the composite field that acts as a generator.
* Map each power `g^k` of a GF(2^8) generator to the matching power of it.
* Check that the map is linear.
* Read the columns off the images of `1, 2, 4, ... 0x80`.

`tb_aes_sbox_cf` checks all 256 inputs in both directions.

### ROM S-box (`aes_sbox_lut`)

The ROM is a 256 x 8 table. `aes_pkg::build_sbox_table` computes it once at
elaboration; it is not typed in. The function walks the powers of the
generator {03}. If a = 3^i, then a^-1 = 3^(255-i). The affine map is then
applied. A synthesis tool sees a constant array indexed by the input byte, so
it can map it to LUTs or to a block-RAM ROM. Each pipelined core uses 200 such
tables:

* 160 in the ten rounds (16 per round).
* 40 in the key pipeline (4 per key-expansion round).

### MixColumns with shared terms (`aes_mix_column`)

For a column `a0..a3`, with `t = a0^a1^a2^a3` computed once,
`b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1))`.

The inverse matrix factors as the forward matrix times
`[5 0 4 0; 0 5 0 4; 4 0 5 0; 0 4 0 5]`. So InvMixColumns is a small pre-stage,
`a_i ^= {04}(a_i ^ a_(i+2))`, followed by the same forward network. The two
`{04}` products are shared between bytes 0/2 and 1/3.

## Small-area cores

### Datapath (`aes_area_cipher`)

The datapath has three parts:

* a multiplexer,
* one 128-bit state register,
* one `aes_round` with composite-field S-boxes.

It has no round counter of its own. Instead it follows the key source, which
offers one round key per clock together with its index `rk_index` and a valid
flag `rk_valid`:

| `rk_index` | state register takes           |
|------------|--------------------------------|
| 0          | `data_in ^ round_key`          |
| 1 .. 9     | `round(state, round_key)`      |
| 10         | final round; `done` pulses one cycle later |

### Encryptor (`aes_area_encryptor`)

`aes_area_enc_keyexp` produces the key schedule on the fly. It has a
multiplexer, a sub-key register and one `aes_key_round`, and it produces one
sub-key per clock in step with the rounds:

* In the start cycle it passes the input key through as sub-key 0.
* In each of the next ten cycles it passes the newly derived sub-key.

```
clk edge      E0        E1 .. E9          E10           E11
start         1         -                 -             (may start again)
state reg     pt^k0     rounds 1..9       round 10
done                                                    1 (one cycle)
```

`done` and `data_out` are valid 10 clocks after the start edge. `data_out`
holds until the next start. A start in the cycle where `done` is high is taken
at the next edge, so back-to-back blocks run at one block per 11 clocks. A
start while a block is in progress is ignored. Holding `start` high therefore
streams one block every 11 clocks.

### Decryptor (`aes_area_decryptor`)

Decryption needs sub-key 10 first, so the schedule cannot be produced on the
fly. `aes_area_dec_keyexp` walks through the schedule once, one sub-key per
clock, and stores every sub-key in a bank of 11 x 128-bit registers. The
decipher reads the bank in reverse order.

A small sequencer compares `key_in` with the key whose schedule is already in
the bank:

* **Same key.** Deciphering starts in the start cycle. `done` comes 10 clocks
  after start.
* **New key.** The block is captured. The bank is refilled in 10 clocks, then
  the 11 decipher steps run. `done` comes 21 clocks after start.

`data_in` and `key_in` need to be valid only in the start cycle. A start
while a block is in progress is ignored.

## Pipelined cores

### Datapath (`aes_speed_cipher`)

The datapath is built like this:

* Stage 0 is the input XOR with `round_key[0]`, followed by a register.
* Stages 1 to 9 are each a round followed by a register.
* Round 10 drives `data_out` combinationally from the last register.

`out_valid` follows `in_valid` by 10 clocks. When no block enters, the first
register holds its value and the later stages recompute the same block, so
`data_out` stays on the last result. `busy` is high while a block is inside.

### Key pipeline (`aes_speed_keyexp`)

The key pipeline is the same structure for the key schedule: 11 sub-key
registers with 10 `aes_key_round`s between them.

* Register 0 loads `key_in` on `load`.
* Register `i` takes the round-`i` output of register `i-1` on every clock.

### Aligning key and data

The two pipelines must be lined up so that each block meets its own sub-keys.

**Encryptor.** A key enters the key pipeline at the same edge as its block
enters the cipher. Cipher stage `k` takes its sub-key from the output of
key-expansion round `k`: `next_key[k]`, the value register `k` will load at
the next edge. It is not taken from register `k` itself, which would be one
stage late. As a result, key and block travel together. Every block is
encrypted under the key presented with it, even when the key changes on every
clock. While `start` is high, one block is taken per clock, and results come
out in order, 10 clocks later.

**Decryptor.** The first decipher stage needs sub-key 10, and the pipelined
schedule produces it last. So the key pipeline is filled first, and the
decipher reads the settled registers in reverse order: stage `k` uses register
`10-k`. `ready[i]` marks register `i` as holding the schedule of the key now in
register 0. A new key clears `ready[1..10]`, which then refill one per clock.
The accept rules are:

* A block is taken only when `start` is high, `key_in` equals the loaded key,
  and `ready[10]` is set.
* A different key is loaded only when no block is in flight, so blocks already
  inside finish with their own key.
* The caller holds `start`, `data_in` and `key_in` until the block is taken.

The first block after a new key completes 21 clocks after start: 1 clock to
load, 10 to fill the key pipeline, 10 stages. Later blocks under the same key
stream at one per clock.

## Crypto processor

`aes_crypto_processor #(.CORE(...))` wraps one core. `CORE` defaults to the
small-area encryptor.

### Serial units

All three serial units work the same way:

* The transfer starts when the control unit raises the unit's `start`.
* The handshake with the peripheral comes first.
* Then 128 bits pass, one per clock, most significant bit first.
* After that the unit raises `complete`, and holds it until `start` falls.

| unit | processor asks / offers | peripheral answers | then |
|------|-------------------------|--------------------|------|
| key  (`aes_serial_in`)  | `request_key` high | `key_ready` for one clock | `serial_key` carries bit 127 .. 0 in the next 128 clocks |
| data (`aes_serial_in`)  | `request_din` high | `din_ready` for one clock | `serial_din` carries bit 127 .. 0 in the next 128 clocks |
| output (`aes_serial_out`) | `dout_ready` high (result loaded) | `request_dout` for one clock | `serial_dout` drives bit 127 .. 0 in the next 128 clocks |

The core reads its key and data straight from the two input shift registers.
The output unit copies the core's result when its transfer begins.

### Control unit

`aes_control_unit` is a Moore FSM with five states. The outputs depend on the
state alone:

| output              | Idle | Key request | Input request | Encrypt/decrypt | Output ready |
|---------------------|------|-------------|---------------|-----------------|--------------|
| start of key unit   | 0 | 1 | 0 | 0 | 0 |
| start of input unit | 0 | 0 | 1 | 0 | 0 |
| start of output unit| 0 | 0 | 0 | 0 | 1 |
| `input_key_done`    | 0 | 0 | 1 | 1 | 1 |
| `input_data_done`   | 0 | 0 | 0 | 1 | 1 |
| `encryption_done`   | 0 | 0 | 0 | 0 | 1 |
| `output_data_done`  | 0 | 0 | 0 | 0 | 1 |

The FSM runs in one of two modes:

* **Discrete mode.** Each operator command (`get_key`, `get_data`, `encrypt`,
  `output_data`) moves the FSM from Idle into the matching state. The FSM
  returns to Idle when the unit doing the job reports `complete`, or the core
  reports done.
* **Continuous mode.** A `start` pulse in Idle sets the mode. The FSM then
  cycles through Key request, Input request, Encrypt/decrypt and Output ready,
  moving on the completions alone. Only reset leaves this mode.

If several commands arrive in Idle at once, the order of precedence is
`start`, `get_key`, `get_data`, `encrypt`, `output_data`.

Because the status pins follow the table, they are 0 in Idle. In discrete mode
an operator sees the end of a step as the FSM leaving its state:

* the request line drops, or
* `input_data_done` falls after an encryption.

How the FSM starts the core depends on the core:

* The core's start is a single-cycle pulse on entry to Encrypt/decrypt.
* The exception is the pipelined decryptor. It gets `start` for the whole
  state, because it takes the block only once its key pipeline is full.

### Top level

`aes_top` places four processors side by side, with every port a 4-bit vector.
Bit `i` belongs to processor `i`:

| bit | core |
|-----|------|
| 0 | area encryptor |
| 1 | area decryptor |
| 2 | pipelined encryptor |
| 3 | pipelined decryptor |

Clock and reset are shared.

## Simulating

Every testbench compares against `tb/aes_ref_pkg.sv`, a slow behavioural
AES-128 model written independently of the RTL. Each testbench prints one
line, `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Any other `tb/tb_<module>.sv` builds the same way with its own top module name.

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_sbox_cf`, `tb_aes_sbox_lut` | all 256 inputs, forward and inverse |
| `tb_aes_mix_column` | the standard's example columns; random columns; inverse of forward |
| `tb_aes_round` | cipher and decipher rounds, final and not, both S-box styles |
| `tb_aes_key_round` | ten chained rounds against the schedule; the standard's key 2b7e1516... |
| `tb_aes_area_*` | latency 10 (area encryptor), 10/21 (area decryptor, key reused / rebuilt); random blocks |
| `tb_aes_speed_*` | one block per clock; key changing every few blocks (encryptor); first result 21 clocks after a new key (decryptor); input stalls during a key load; result order |
| `tb_aes_serial_in`, `tb_aes_serial_out` | handshake order; bit order; `complete` timing; abandoned handshake |
| `tb_aes_control_unit` | every transition of both modes; output table in every state |
| `tb_aes_crypto_processor` | area encryptor through the serial ports, discrete then continuous mode |
| `tb_aes_top` | all four processors at full size, in parallel, discrete then continuous mode |

`tb_aes_top` also counts how often these mechanisms occur, and fails if one
never does:

* discrete operations,
* continuous loops,
* the area decryptor reusing its stored schedule,
* the area decryptor rebuilding its schedule,
* the pipelined decryptor waiting for its key pipeline.

It runs in a few seconds. `tb_aes_speed_decryptor` reads the internal `accept`
signal of the core to see when a block is taken.

## Where this departs from the reference design, and what was chosen

The architecture is taken from a published design: the block structure, the
S-box and MixColumns methods, the register placement, the latencies and the
FSM. The published design was written in VHDL for a Xilinx Virtex-4. These
points are interpretations or choices of this RTL:

* **Pipelined decryptor latency.** It is 21 clocks for the first block, where
  the reference gives 2 x Nr = 20. The extra clock is the key load.
* **Area decryptor key reuse.** The area decryptor reuses a stored key
  schedule when the key is unchanged. The reference only says the schedule is
  computed beforehand and stored, in registers or a RAM. Registers are used
  here, as the reference's block diagram draws them.
* **Status pins.** They follow the FSM's output table, so they read 0 in Idle.
  The reference's waveform of the processor shows the key-done and data-done
  flags staying high after a discrete step. If you want sticky flags, add a
  set/clear register per flag in `aes_crypto_processor`.
* **Serial handshake.** The reference does not give the exact cycle offsets,
  the bit order (MSB first here) or the level or pulse form of the handshake
  signals. It calls start, complete and reset "asynchronous control signals".
  Here they are level signals sampled on the common clock.
* **Construction details.** The reference names the composite-field method
  and substructure sharing but not their exact construction. The field
  polynomials, the isomorphism matrices and the MixColumns factorization are
  this implementation's.
* **Composite-field InvSubBytes.** The reference prescribes composite-field
  S-boxes for SubBytes. Here InvSubBytes is built the same way.
* **Pipelined encryptor alignment.** The per-stage key alignment is what makes
  each block use its own key. The reference shows a sub-key-ready bus into the
  cipher, which the encryptor here does not need.
* **`aes_top`.** The reference pairs the processor with any one core. Putting
  all four processors in one top is this RTL's choice.
* **Area encryptor throughput.** Back-to-back blocks take 11 clocks each,
  because the next start is taken one clock after the tenth round.

Only AES-128 is built. `aes_pkg::NR = 10` is the round count. AES-192 and
AES-256 would need a different key schedule, not a change to this parameter.
No timing or area figures are claimed. The reference's throughput numbers
assume clock rates of about 130-223 MHz on its FPGA, and those depend on the
target.

## Changing the design

* **A different core in the processor.** Set `CORE` (`aes_pkg::core_e`). All
  four cores have the same port shape, and the generate block in
  `aes_crypto_processor` selects one.
* **Wider or narrower serial words.** `aes_serial_in` and `aes_serial_out`
  take `WIDTH` (default 128). The processor uses 128, the AES block size.
* **Switching S-box style.** Change `USE_LUT` in `aes_round` or
  `aes_key_round`. Both styles have the same ports.
* **Assertions.** One SystemVerilog assertion in `aes_control_unit` checks
  that the core is started only from the Encrypt/decrypt state. Run verilator
  with `--assert` to enable it.
