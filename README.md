# ChaCha20 hardware cores

SystemVerilog implementation of the ChaCha20 stream cipher (RFC 8439 layout:
four constants, 256-bit key, 32-bit block counter, 96-bit nonce) in several
architectures, from small sequential designs to a 21-stage pipeline, plus two
side-channel protected cores that work on masked data.

## Host interface (all cores)

Every cipher core has the same word-serial command port:

| control | meaning                                  |
|---------|------------------------------------------|
| 1..3    | write nonce word 0..2 from `in`          |
| 4..B    | write key word 0..7 from `in`            |
| C       | write block counter from `in`            |
| D       | encrypt/decrypt the text word on `in`    |
| other   | no operation                             |

A command is taken in a clock where `ready` is high. After a D command,
`done` pulses for one clock with the result on `out`. Encryption and
decryption are the same operation (xor with the keystream). Each 64-byte
keystream block serves 16 words. The counter goes up by one per block.

The first word after configuration is a "long" encryption, because a block
has to be computed first. While the words of a block are being used, the core
already computes the next block. Words served from a computed block are
"short": one clock for the unprotected cores. If the key or nonce is written
while a block is computed in advance, that block is thrown away. The counter
is then stepped back, so no counter value is skipped.

## Top level: `rtl/chacha20_top.sv`

The top level holds six independent cores. Each has its own port group
(`<prefix>_control`, `_in`, `_ready`, `_done`, `_out`). All share `clk` and
the active-low asynchronous `rst_n`.

| prefix | core | block time |
|--------|------|-----------|
| `main` | iterative block function, 4 combinational quarter-round (QR) units, one round per clock | 22 clocks; 0.36 cycles/byte when streaming |
| `seq`  | 4 sequential QR units, each with one 32-bit adder and one xor bank (width `SEQ_WIDTH` can be 32/16/8) | 20 × (8·32/W + 2) + 2 clocks |
| `unr`  | `UNROLL` rounds cascaded per clock (2, 4, 5, 10, 20) | 20/UNROLL + 2 clocks |
| `p21`  | 64-bit words; 20 registered round stages plus a final-addition stage | one 64-bit word per clock after a 21-clock fill |
| `ti`   | threshold implementation, 3 shares per bit | about 3035 clocks per block |
| `lc`   | low-cost gate masking, 2 shares per bit | about 8380 clocks per block |

## Module map

* `chacha20_pkg`: types, constants, command codes and the state-layout
  helper.
* `chacha20_qr` / `chacha20_round`: combinational quarter round, and a full
  column or diagonal round.
* `chacha20_qr_seq`: quarter round on one adder and one xor bank, used in
  turn. It handles 32/WIDTH slices per operation.
* `chacha20_block`: iterative block function with 1 or 4 QR units, either
  combinational or sequential. It holds the initial state and the working
  state, and ends with the final addition.
* `chacha20_block_unrolled`: unrolled block function.
* `chacha20_cipher`: the cipher controller shared by the iterative and
  unrolled block functions.
* `chacha20_pipeline21`, `chacha20_cipher_p21`: the pipelined core.
* `lfsr40`, `lfsr_bank`: 40-bit maximum-period LFSRs, x^40+x^38+x^21+x^19+1.
  There are 96 per TI core and 48 per LC core.
* `ti_xor2`, `ti_xor3`, `ti_carry`, `ti_adder`, `ti_encoder`, `ti_decoder`:
  three-share threshold-implementation gates. Each output share leaves out
  one input share index, and every gate output is registered.
* `lc_and`, `lc_or`, `lc_xor`, `lc_xor3`, `lc_carry`, `lc_adder`,
  `lc_encoder`: two-share masked gates. The masked AND delays share y1 by one
  flip-flop. The other gates are built from that AND and inverters.
* `mask_pkg`, `masked_add`, `masked_xor`, `masked_qr`, `masked_block`,
  `masked_cipher`: the protected cipher, written once for either scheme.
  Words are split into shares at the input by an encoder fed from the LFSR
  bank. Key, nonce, constants and state stay masked. Only the output word is
  recombined.

## Design choices to know about

* The unrolled block function runs in the same clock as the rest of the
  cipher. A real build would need a slower clock or multicycle constraints
  for the cascaded rounds.
* The pipelined core uses 64-bit text words. Any configuration write flushes
  the pipeline and restarts it from the counter then loaded.
* In the masked cores the block counter is public and is encoded per block.
  Each D command costs a few extra clocks (encode, masked xor, decode), and
  `ready` is low during that time.
* Not built: the closed-loop pipelines with 2 to 20 stages, and the
  power-measurement controller with its UART.

## Testbenches (`tb/`)

Each block has a self-checking testbench. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `chacha20_ref_pkg` is an
independent behavioural model of ChaCha20. It is checked against the RFC
8439 quarter-round and block test vectors. `tb_chacha20_top` runs all six
cores at their default sizes in parallel, end to end. It covers long and
short encryptions, prefetched blocks, key changes that discard a block, and
decryption. Each of these mechanisms must occur at least once.

Example run:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/chacha20_pkg.sv \
  rtl/mask_pkg.sv tb/chacha20_ref_pkg.sv tb/tb_chacha20_top.sv --top-module tb_chacha20_top
```
