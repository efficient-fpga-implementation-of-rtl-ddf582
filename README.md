# AES-CCM encryption engine with a 32-bit AES datapath

Vehicle-to-vehicle messages under IEEE 1609.2 are protected with AES-CCM
(NIST SP 800-38C): a CBC-MAC over the formatted message gives the integrity
code (MIC), and counter-mode encryption gives the ciphertext. Both halves use
the same AES-128 forward cipher. This RTL implements the generation-encryption
direction as a self-contained engine built around three ideas:

* **Two AES cores side by side.** The CBC-MAC core and the counter core start
  together on every step, so the counter work hides behind the CBC-MAC chain,
  which has to be sequential.
* **A 32-bit AES round datapath.** ShiftRow picks one column of the shifted
  state, the four bytes go through the S-box in one lookup, then MixColumn and
  AddRoundKey. One round takes 7 cycles, one block 73. The same S-box, one lane
  wide, also serves the key expansion.
* **Saved key tables and on-chip buffers.** Each core keeps its eleven round
  keys. A message that reuses the last key skips the 91-cycle expansion. The
  input bytes, the formatted blocks and the ciphertext stay in on-chip register
  files and never go to external memory.

The architecture follows a published FPGA design of AES-CCM for IEEE 1609.2.
Where that description leaves details open, this RTL makes its own choices;
they are listed under [Departures and choices](#departures-and-choices).

## Block structure

```
 host bytes ──► format_input ──► ccm_formatter ──► Parser_memory (ccm_regfile, 128 x 256)
 (valid/ready,  Input_register    B0, AAD, payload      │ port 0: block i          │ port 1: payload block j
  type tag)     8 x 256 FIFO      blocks                ▼                          ▼
                                                     cbc_mac                    ctr_mode
                                              X = first ? B : B ^ MAC     A_j = {q-1, nonce, j}
                                                  aes_cipher                  aes_cipher
                                                  MAC Data reg                S0, C_j = P_j ^ AES(A_j)
                                                        │ MAC                     │ ct writes
                                                        └────────► MIC = (MAC ^ S0)[tag]
                                                                                 ▼
                                                                  Ctr_memory (ccm_regfile, 128 x 256) ──► ct_rdata
 ccm_controller (READY → FORMAT → KEY_EXP → DO_AES ⇄ NEXT_DATA → CBC_DONE)
 ccm_data_length (Plen, Alen → block counts)
```

`ccm_top` wires these together. Each `aes_cipher` contains one
`aes_key_expansion` (AES_KEY register, Rcon, Temp[4], Key_Tbl[0..10]), one
four-lane `aes_sbox` and one `aes_mixcolumn`.

## The AES-128 core (`aes_cipher`)

### Controller

Three states:

| state | leaves on | to |
|-------|-----------|----|
| READY | `do_expd` | KEY: the key expansion starts and the key table becomes invalid |
| READY | `do_aes` with a valid key table | AES: the saved table is used, no expansion |
| KEY   | `do_aes` once the expansion has finished | AES |
| AES   | last round done, `text_valid` pulses | READY |

`do_aes` is ignored while no valid key table exists. Both requests are
ignored while the core is busy.

### Round schedule, 7 cycles per round

The state is a 128-bit register, with byte 0 in bits [127:120] and column `c`
as bytes `4c..4c+3`. Within a round, column `p` moves down a three-stage
pipeline:

| phase | work |
|-------|------|
| p = 0..3 | ShiftRow register ← column `p` of ShiftRows(state), where row `r` comes from column `(p+r) mod 4` |
| p+1      | S-box, all four lanes, registered read |
| p+2      | MixColumn, skipped in round 10, then XOR with round-key word `p`, into the next-state buffer |
| 6        | the next-state buffer becomes the state |

A block occupies 1 input-register cycle, 1 initial AddRoundKey cycle, 10 × 7
round cycles and the output cycle. That is 73 cycles counted from the cycle in
which `do_aes` is sampled up to and including the cycle with `text_valid`
high. `text_out` then holds the result until the next block finishes.
ShiftRow comes before SubByte here. This gives the same result as the
standard order, because both steps act on single bytes and only move or
substitute them.

### Key expansion, 9 cycles per round

The S-box byte lane 0 is lent to the key expansion while it runs. Each round
works through these phases:

| phase | work |
|-------|------|
| 0..3 | the bytes of RotWord(w3) are looked up one at a time; the first result is XORed with Rcon |
| 4    | Temp[0] = w0 ^ G, using the fourth byte as it arrives |
| 5..7 | Temp[i] = Temp[i−1] ^ w_i |
| 8    | Key_Tbl[round] ← Temp |

The whole expansion takes 1 + 10 × 9 = 91 cycles. The first word of a round
is the slow part, because it goes through the S-box one byte at a time. Four
S-box lanes would save 3 cycles per round, 30 per key. Since keys change
rarely, the byte-wide path is kept.

### S-box contents

`ccm_pkg::sbox_calc` fills the 256-entry table at start-up from the S-box
definition. It takes the GF(2⁸) inverse modulo x⁸+x⁴+x³+x+1 as a²⁵⁴. It then
applies the affine map b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕
0x63. Rcon is x^(r−1) in the same field.

## One CCM operation

### Formatting (`ccm_formatter`)

The formatter runs in the controller's FORMAT state and consumes up to one
input byte per cycle:

1. **FIRST_BLOCK** builds the flag octet: `64·Adata + 8·(TAG_BYTES−2)/2 + (q−1)`,
   with q = 15 − NONCE_BYTES.
2. **S_NONCE** writes B0 = flags ‖ nonce ‖ Plen, where Plen takes q bytes. It
   then waits for the first data byte. With associated data the next state is
   ASSOCIATE, otherwise PAYLOAD.
3. **ASSOCIATE** starts its first block with the two-byte Alen. It packs
   `T_ASSOCIATE` bytes into blocks. When a `T_PAYLOAD` byte shows up, it
   zero-pads and writes the partial block.
4. **PAYLOAD** packs bytes until the remaining Plen reaches 0. It zero-pads
   the last block and returns to READY.

Each completed block is written to the Parser_memory one cycle after its last
byte arrives. `parsing_counter` counts these writes, and the controller
leaves FORMAT when the count equals `total_block_num`. That count is
`1 + ceil((Alen+2)/16) + ceil(Plen/16)`, or `1 + ceil(Plen/16)` when Alen = 0.

### Key handling (KEY_EXP)

The controller compares the captured key with the key that each core's table
was expanded from. If both match and both tables are valid, it goes straight
to DO_AES. Otherwise it pulses `do_expd` to both cores and waits 91 cycles.

### Encryption loop (DO_AES ⇄ NEXT_DATA)

Step `i`, for `i = 0 .. total_block_num−1`, runs as follows:

* CBC-MAC encrypts `B_i`, XORed with the MAC register when `i > 0`.
* The counter core encrypts `A_i` while `i ≤ pay_blocks`. Its result is S0 at
  `i = 0`, and ciphertext block `i` after that. For the remaining steps, which
  occur only when the message has associated data, the counter core is idle.
* Both cores finish in the same cycle. NEXT_DATA then advances the block
  counter.

Each step costs 74 cycles: 73 for AES and 1 for NEXT_DATA. After the last step
the controller passes through CBC_DONE, where `done` is high for one cycle.
`mic = (MAC ⊕ S0)`, cut to `TAG_BYTES` and left-aligned.

### Cost of a message

```
cycles ≈ (formatting: about 1 per input byte, plus 3 for B0)
       + (91 if the key is new, else 1)
       + 74 · total_block_num + 2
```

A 1000-byte payload with no associated data and a new key takes 5836 cycles
from `i_do_cbc` to `done` in simulation. At a 166 MHz clock that would be
about 35 µs, well inside the 565.5 µs minimum frame delay of 802.11p at
27 Mbit/s. The clock rate is taken from the FPGA result of the published
design. This RTL has not been timed on a device.

## Host interface (`ccm_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `i_do_cbc` | in | 1 | start pulse; `key`, `nonce`, `plen`, `alen` are captured in this cycle. Ignored if `plen == 0` or the engine is busy |
| `key` | in | 128 | AES-128 key |
| `nonce` | in | 8·NONCE_BYTES | nonce, first byte in the top bits |
| `plen`, `alen` | in | 16 | payload and associated-data lengths in bytes |
| `in_valid`, `in_ready`, `in_data`, `in_type` | in/out | 1/1/8/1 | byte stream. Send all associated-data bytes (`T_ASSOCIATE`) first, then the `plen` payload bytes (`T_PAYLOAD`). Bytes may be sent before the start pulse, up to the 256-byte buffer. `in_ready` low means the buffer is full |
| `busy` | out | 1 | controller not in READY |
| `done` | out | 1 | one-cycle pulse when the operation is complete |
| `mic` | out | 128 | MIC, valid from `done` until the next start |
| `ct_raddr`, `ct_rdata` | in/out | 8/128 | combinational read of ciphertext block `k`. Bytes past `plen` in the last block read as zero |

Blocks use the big-endian layout of the standards: byte 0 of a message block
sits in bits [127:120].

Parameters: `NONCE_BYTES` (12, the IEEE 1609.2 nonce), `TAG_BYTES` (16),
`IN_DEPTH` (256-byte Input_register), `MEM_DEPTH` (256 blocks each for the
Parser_memory and the Ctr_memory). A message must fit:
`1 + ceil((alen+2)/16) + ceil(plen/16) ≤ MEM_DEPTH`. With no associated data
this allows payloads of up to 4080 bytes. An assertion in `ccm_top` flags a
message that does not fit.

## Departures and choices

These follow the published architecture:

* the 7-cycle round and 73-cycle block
* the 9-cycle key-expansion round
* the shared S-box
* ShiftRow before SubByte
* the two parallel AES cores
* the state machines of the AES core, the controller and the formatter
* the register-file sizes: 8 × 256 input, 128 × 256 formatted blocks,
  128 × 256 counter output, and eleven 128-bit key-table entries per core

This RTL chose the following itself:

* the exact pipeline stages within a round and within a key-expansion round
* the registered S-box read
* the FIFO organisation of the input buffer, with a type bit per byte
* the valid/ready host interface and the ciphertext read port
* the key comparison that decides whether to skip the expansion
* leaving CBC_DONE after one cycle
* the zeroing of unused ciphertext bytes
* the 12-byte nonce and 16-byte tag defaults

The published design also lists a further 128-bit register file among its
storage, named Input_data. What it holds is not described, so it is not
built; the byte buffer, the formatted blocks and the ciphertext each have
their own storage here.

Not provided:

* **Decryption-verification.** CCM decryption has to finish the counter
  half before the CBC-MAC can check the recovered payload. That is a
  different schedule from the one the controller implements, so only
  generation-encryption is built.
* **AES-192 and AES-256.** IEEE 1609.2 needs only 128-bit keys.
* **Long associated-data lengths.** The formatter supports only the two-byte
  encoding, Alen < 65280.
* **Decryption with the same round hardware.** The published design says its
  core can be reused for this; that reuse is not built.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends by
printing `TB_RESULT checks=N failures=M`. The references in
`tb/ccm_ref_pkg.sv` are written separately from the RTL: a byte-wise FIPS-197
AES with an S-box found by inverse search, and SP 800-38C formatting, CBC-MAC
and counter mode on byte queues. The reference is itself checked against
published vectors.

| testbench | checks |
|-----------|--------|
| `tb_aes_sbox` | all 256 entries on four lanes, FIPS values, one-cycle read |
| `tb_aes_mixcolumn` | textbook columns and 200 random columns |
| `tb_aes_key_expansion` | FIPS-197 A.1 schedule and random keys (all 11 round keys), 91-cycle expansion |
| `tb_aes_cipher` | FIPS-197 C.1 and B vectors, random blocks and keys, 73-cycle latency, saved-key encryption, no encryption without a key |
| `tb_cbc_mac`, `tb_ctr_mode` | chaining, counter blocks, tail zeroing, MIC, idle counter core |
| `tb_ccm_formatter` | every Parser_memory write for 37 message shapes, and leaving S_NONCE when `do_format` drops |
| `tb_format_input`, `tb_ccm_regfile`, `tb_ccm_data_length` | FIFO order and full/empty flags, both read ports, block-count formulas |
| `tb_ccm_controller` | legal state order, request counts per message, expansion skipped for a known key |
| `tb_ccm_top` | end to end at default parameters; see below |

`tb_ccm_top` runs the SP 800-38C example with a 12-byte nonce: its ciphertext
must equal the published value, and its MIC is compared with the reference.
It also runs random messages with and without associated data, block-boundary
cases, and two 1000-byte payloads. It checks 74 cycles per block, the 91-cycle
expansion, and the 565.5 µs budget at 166.2 MHz. It also counts that each
mechanism happened at least once: key expansion, expansion skipped, padding,
host stalls on a full input buffer, and the counter core idle during
associated-data blocks.

To run a testbench with Verilator 5 (add `-y tb` for those that use the
reference package):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ccm_top \
  -y rtl -y tb +libext+.sv rtl/ccm_pkg.sv tb/ccm_ref_pkg.sv tb/tb_ccm_top.sv
./obj_dir/Vtb_ccm_top
```

The full end-to-end test takes under a second of simulation time after the
build.

## Files

* `rtl/ccm_pkg.sv`: shared types, state encodings, cycle constants, GF(2⁸) functions
* `rtl/aes_sbox.sv`, `rtl/aes_mixcolumn.sv`, `rtl/aes_key_expansion.sv`, `rtl/aes_cipher.sv`: the AES-128 core
* `rtl/format_input.sv`, `rtl/ccm_formatter.sv`, `rtl/ccm_data_length.sv`, `rtl/ccm_regfile.sv`: input path and storage
* `rtl/cbc_mac.sv`, `rtl/ctr_mode.sv`, `rtl/ccm_controller.sv`, `rtl/ccm_top.sv`: the CCM engine
* `tb/ccm_ref_pkg.sv` and `tb/tb_*.sv`: reference models and testbenches
