# AES-128 encryption engine for an embedded processor

This is a small hardware AES-128 engine. It lets an embedded processor encrypt or decrypt
messages before sending them over an untrusted link. The processor streams a message to the
engine over a 32-bit FIFO link (a Xilinx Fast Simplex Link, FSL) and gets the processed blocks
back on a second FSL. The engine holds an encryption core and a decryption core. Both use the
same design idea: save area by building **one round of AES in hardware and running it ten
times**, and keep the S-boxes in small block memories that are read one byte per cycle.

The processor side stays in software and is not part of this RTL. That covers choosing the mode,
generating a random session key per message, padding the message to whole 16-byte blocks, and
moving data to and from a PC.

```
                 FSL in (32 bit)                     +-------------+
  processor  ------------------->  fsl_controller ---| aes_encrypt |--+
  (software)  <------------------       |   ^        +-------------+  |
                 FSL out (32 bit)       |   +-------------------------+
                                        |   ^        +-------------+  |
                                        +---|------- | aes_decrypt |--+
                                                     +-------------+
```

## A session on the FSL link

A session is one message. The processor writes these words to the incoming FSL:

| word(s)   | content                                                      |
|-----------|--------------------------------------------------------------|
| 1         | mode: bit 0 = 0 encrypt, 1 decrypt (other bits ignored)      |
| 1         | N, the number of 128-bit blocks (unsigned)                   |
| 4         | 128-bit session key, bits 127:96 first                       |
| 4 x N     | the blocks, each sent as bits 127:96 first                   |

After the key words arrive, the controller loads the key into the selected core and waits until
the core has expanded it. It then takes one block at a time. It starts the core, waits for the
result, and writes the result as four words (bits 127:96 first) to the outgoing FSL. After the
N-th result it waits for the next mode word. A session with N = 0 only loads a key. The session
key is expanded once per session and reused for all N blocks.

Each 32-bit word uses a *wait* state followed by an *acknowledge* state:

- Incoming: wait until `fsl_s_exists`, then pulse `fsl_s_read` for one cycle while the word is
  captured.
- Outgoing: wait until `fsl_m_full` is low, then pulse `fsl_m_write`.

So moving a block costs four wait/acknowledge pairs in each direction, at least 8 cycles each way.
The FSL control bits are not used.

Padding is the software's job. The format the testbench uses is a `0x01` byte, then `0x00`
bytes up to the next multiple of 16. At least one padding byte is always added, so a message
that is already a whole number of blocks gets one extra block. To remove the padding, strip
`0x00` bytes from the end up to and including the `0x01`.

## The cipher cores: one round, used ten times

AES-128 encrypts as follows:

- AddRoundKey with round key 0.
- Nine full rounds, each doing SubBytes, ShiftRows, MixColumns and AddRoundKey.
- A tenth round with no MixColumns.

`aes_encrypt` builds only one round (`aes_round`) and loops over it with a round counter. When
the counter reaches 10, the `last` line switches a multiplexer so the ShiftRows output goes
straight to AddRoundKey, skipping MixColumns. For each round the core reads round key *n* from
the key expansion unit by round number.

`aes_decrypt` mirrors this with the inverse transformations, in the FIPS-197 inverse-cipher
order:

- AddRoundKey with round key 10.
- Ten rounds of InvShiftRows, InvSubBytes, AddRoundKey (keys 9 down to 0) and InvMixColumns.
  The last round skips InvMixColumns.

Decryption needs the *last* round key first. So each core expands the whole key into a 44-word
buffer before any block is processed. The same complete key expansion unit serves both
directions.

### Where the cycles go: SubBytes through a block memory

The S-box is a 256 x 8 block memory (`sbox_rom`) with a registered output. `sub_bytes`
substitutes the 16 state bytes one per cycle, issuing the reads back to back: 16 reads plus one
cycle of read latency, so **17 cycles**. ShiftRows and MixColumns are wiring and XOR gates.
AddRoundKey is one XOR. All three sit after the SubBytes output register, so a whole round takes
as long as its SubBytes.

| step                                    | clock edges                                  |
|-----------------------------------------|----------------------------------------------|
| SubBytes / InvSubBytes (16 S-box reads) | 17                                           |
| one round, including start and store    | 19                                           |
| one block in a core (start to `done`)   | 190 (10 x 19; round 0's XOR happens on start) |
| key expansion (once per session)        | 70 (10 round keys x 7)                       |
| FSL transfer per block                  | at least 8 in and 8 out, plus a few control cycles |

Latencies count clock edges, from the edge that samples the start pulse to the edge that raises
`done`. Of the 190 cycles of a block, 160 are S-box reads. The original implementation reports
653 cycles per block, 360 of them S-box accesses. Its sequencing is not described in enough
detail to reproduce, so the timing here is this design's own. Because the S-box memories are the
bottleneck, making SubBytes read several bytes per cycle is the obvious speed-up. A fully
pipelined design with ten round units is possible too, but is not built.

The MixColumns units follow the "precompute products" scheme:

- `mix_columns` forms `mul2` (shift left, XOR `0x1B` if the top bit was set) and
  `mul3 = mul2 ^ s` for every byte. Each output byte is one `mul2`, one `mul3` and two plain
  bytes XORed together.
- `inv_mix_columns` doubles each byte three times to get `mul2`, `mul4` and `mul8`. It then forms
  the four products it needs: `mul9 = s^mul8`, `mulB = s^mul2^mul8`, `mulD = s^mul4^mul8` and
  `mulE = mul2^mul4^mul8`.

## Key expansion

`key_expansion` is the key expansion control unit. Its timing:

1. A `gen` pulse writes the key into words 0-3 of the buffer and clears `ready`.
2. For each of the ten round keys:
   - Start `g_function` on the last word of the previous round key, with the current round
     constant. g does RotWord (a byte reorder), then SubWord (four reads of its own S-box
     memory, 5 cycles), then XORs the round constant into the leftmost byte.
   - `word_xor` forms the four new words: `w[4n] = w[4n-4] ^ g`, then
     `w[4n+i] = w[4n+i-4] ^ w[4n+i-1]`. They are stored in the buffer.
3. `ready` rises. Round keys are then read combinationally by round number (0-10). A round
   number above 10 reads as zero.

The round constant starts at `01` and is doubled in GF(2^8) for each round key: 01, 02, 04, 08,
10, 20, 40, 80, 1B, 36. SubWord substitutes from the least significant byte upward, so the last
byte out of the memory is the one the constant is added to.

## Data layout and interfaces

- A state is a 128-bit vector. Byte *k* is bits `[127-8k -: 8]` and sits in row `k % 4`, column
  `k / 4` of the 4x4 AES state. This is the FIPS-197 order: the byte string `00 11 22 ...` is
  `128'h001122...`.
- Round keys use the same layout, with word 0 in bits 127:96.
- `aes_pkg` holds the shared types and functions:
  - `state_t`, `word_t` and `mode_e`.
  - The controller-to-core bundles. `cipher_req_t` carries the `key_load` and `start` pulses,
    the key and the input block. `cipher_rsp_t` carries `key_ready`, `busy`, the `done` pulse
    and the output block.
  - The GF(2^8) helpers.
- The S-box contents are computed at start-up as the multiplicative inverse followed by the AES
  affine map, not stored as a typed-in table. The inverse S-box is computed the same way.
- Reset is synchronous and active high (`rst`). There is a single clock.
- A core accepts `key_load` and `start` only when idle. A `start` is ignored until the key is
  ready.
- Results (`dout`) stay valid after `done` until the next result.
- The top, `aes_engine_top`, brings out the two FSL port sets. It also has observation outputs:
  `mode_decrypt`, `session_active`, `blocks_left`, `enc_busy` and `dec_busy`.

## What follows the original description, and what is this design's choice

These follow the original description:

- The split into controller and encryption/decryption cores.
- The order mode, block count, key, blocks on the link, with one key expansion per session.
- Wait/acknowledge pairs per 32-bit word.
- The single reused round with a round-10 bypass of MixColumns.
- S-box block memories of 256 x 8, read 16 times per SubBytes.
- The MixColumns product scheme.
- The complete key expansion before processing, built from a g module, a word-XOR module and a
  control unit.
- The padding format.

These are this design's own choices:

- All cycle timing, including back-to-back S-box reads.
- The mode-word encoding, and the block count as a full 32-bit word.
- Word and byte order on the bus.
- The request/response handshake between controller and cores.
- A separate S-box memory for each SubBytes unit and each g unit, six in total.
- Register storage for the expanded key.
- Synchronous reset.

The original description of the decryption session lists only mode, key and blocks. The
controller here always expects a block count, for both modes.

Not included: the processor and its software (key generation from timers, padding, RS232
transfer), the FSL FIFOs themselves, and the speed-optimised pipelined variant.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values come from
`tb/aes_ref_pkg.sv`, a behavioural AES model written independently of the RTL:

- byte arrays rather than packed vectors;
- an S-box found by searching for inverses;
- MixColumns as a generic matrix product;
- the key schedule written from the FIPS-197 pseudocode.

The testbenches also use the published FIPS-197 vectors: key `000102...0f` with
`00112233...ff` gives `69c4e0d86a7b0430d8cdb78070b4c55a`, and the `2b7e1516...` key gives the
Appendix B example. Each testbench checks latencies as well as values: 17, 5, 70 and 190 cycles.

- `tb_fsl_controller` replaces the cores with simple behavioural ones. It checks word order,
  core selection, sessions with 0 to 4 blocks, random input gaps and output-full stalls.
- `tb_aes_engine_top` is the end-to-end test at default parameters. It encrypts padded text
  messages of 1 to 139 bytes (up to nine blocks), decrypts them again in a second session, strips the padding and compares the
  result with the original text. It also checks every ciphertext block against the reference.
  It counts each mechanism and fails if any never happened:
  - key expansions and blocks in both cores;
  - last rounds with the MixColumns bypass;
  - mode switches;
  - an empty session;
  - a whole padding block;
  - input gaps and output stalls;
  - exactly 190 busy cycles per block.

To run a testbench with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_engine_top.sv --top-module tb_aes_engine_top
./obj_dir/Vtb_aes_engine_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends it with a
failure if it hangs. To lint the synthesizable code:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/aes_pkg.sv rtl/aes_engine_top.sv`.

## Files

| file                         | role                                                          |
|------------------------------|---------------------------------------------------------------|
| `rtl/aes_pkg.sv`             | types, request/response structs, GF(2^8) and S-box functions  |
| `rtl/aes_engine_top.sv`      | top: controller plus both cores                               |
| `rtl/fsl_controller.sv`      | FSL session protocol, core selection, block counting          |
| `rtl/aes_encrypt.sv`         | encryption core: round sequencer, initial AddRoundKey         |
| `rtl/aes_decrypt.sv`         | decryption core                                               |
| `rtl/aes_round.sv`           | one encryption round with the MixColumns bypass               |
| `rtl/aes_inv_round.sv`       | one decryption round with the InvMixColumns bypass            |
| `rtl/sub_bytes.sv`           | SubBytes / InvSubBytes by 16 S-box memory reads               |
| `rtl/sbox_rom.sv`            | 256 x 8 S-box block memory (forward or inverse)               |
| `rtl/shift_rows.sv`          | ShiftRows / InvShiftRows                                      |
| `rtl/mix_columns.sv`         | MixColumns                                                    |
| `rtl/inv_mix_columns.sv`     | InvMixColumns                                                 |
| `rtl/add_round_key.sv`       | AddRoundKey                                                   |
| `rtl/key_expansion.sv`       | key expansion control unit and 44-word buffer                 |
| `rtl/g_function.sv`          | RotWord, SubWord, round-constant XOR                          |
| `rtl/word_xor.sv`            | next round key from previous key and g                        |
| `tb/aes_ref_pkg.sv`          | reference AES model and helpers for the testbenches           |
| `tb/tb_*.sv`                 | one self-checking testbench per module                        |
