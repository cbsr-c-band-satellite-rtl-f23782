# CBSR C-band transmitter core

This core is the programmable-logic half of a small C-band satellite radio
transmitter. Software hands it 32-bit payload words. The core turns them into
a stream of 16-bit I/Q samples for a DAC. The samples form radio frames:
training sequences for the receiver, then turbo-coded, OQPSK-modulated
payload, then root-raised-cosine pulse shaping. Everything runs in one
clock domain. One new output sample is produced every second clock and held
for two clocks, which suits a transceiver in one-transmitter mode. There, the
DAC takes a sample on every other clock of its interface.

The turbo coders are not part of this RTL. Their interface is brought out of
the top, and the testbench provides a behavioural stand-in (see
"Turbo coders" below).

## The radio frame

One radio frame, in samples at two samples per symbol:

```
| G_AMB 256 | T_AMB 512 | F_AMB 544/1056/2080 | subframe 1 | ... | subframe N |

subframe = P_AMB 166, then n times ( PCWORD 660 | P_AMB 166 )
```

- **G_AMB** is for the receiver's gain control. **T_AMB** is for timing.
  **F_AMB** is for frequency-offset estimation; its length is chosen with
  `flen_sel` (0, 1, 2 → 544, 1056, 2080).
- A **subframe** carries one turbo codeword. The coding-rate index `cri_sel`
  (CRI, 0–6) sets the codeword length:

  | CRI | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
  |---|---|---|---|---|---|---|---|
  | codeword bits | 6600 | 7260 | 7920 | 10560 | 15840 | 21120 | 31680 |
  | PCWORDs n | 10 | 11 | 12 | 16 | 24 | 32 | 48 |

  A codeword is cut into *partial codewords* (PCWORDs) of 660 bits. After
  OQPSK mapping, each PCWORD is 660 samples.
- **P_AMB**, the phase midamble, comes before each PCWORD and after the last
  one. It is a cyclic shift of a Zadoff-Chu sequence, and the shift encodes
  the subframe's CRI. A receiver can therefore read the rate from the
  midamble itself. CRI value 7 is reserved for the end of a transmission.
  After the enable is dropped and all queued subframes have gone out, one
  P_AMB with CRI 7 is sent (the `eot` output is high meanwhile). Then the
  output goes idle.
- `num_subframes` sets N, the number of subframes per frame.

Different subframes of the same frame may use different rates. The CRI is
queued with each codeword and read back when that subframe starts.

## Data path

```
words ─► word FIFO ─► unpacker ─► scrambler ─► CRC-32 ─► coder dispatch ═► 2 turbo coders
(software or                       (PN x^20+x^17+1)        (ping-pong)   ◄═ (external)
 internal PN)                                                   │
                                        in-order merge ◄────────┘
                                              │  + CRI queue
                                              ▼
         OQPSK mapper ─► sample FIFO ─► frame assembler ─► RRC FIR ─► tx_out_i/q
                                         ▲  preamble / F_AMB / P_AMB tables
```

1. **Word request** (`request_data`). A subframe's payload is 187 words
   (5984 bits). The request FSM starts only when four things hold: the
   enable is on, the coding chain is empty, a coder is free, and the sample
   FIFO has room. It then raises `tx_load_req` once per word, 187 times.
   Words may arrive with any latency; `words_valid` marks each one. Requests
   and arrivals are counted separately, so a slow source still gets exactly
   187 requests.
2. **Internal source** (`internal_data_gen`). This replaces software in mode
   1, or whenever `inject_fake` is set when a subframe starts. It is a PN
   generator with one 32-bit word per request, bit 0 first. It restarts from
   its seed after four idle cycles. Every subframe therefore carries the
   same, repeatable payload.
3. **Unpacker** (`word_unpacker`). It waits until all 187 words are in the
   FIFO. It then shifts them out LSB first, one bit per clock, with no gaps.
4. **Scrambler** (`scrambler`). It XORs each bit with an x^20+x^17+1 PN
   sequence. The generator restarts whenever the input is not valid, so every
   block is scrambled from the same starting state.
5. **CRC** (`crc_append`). This passes the 5984 bits and appends a 32-bit CRC
   (polynomial 0x814141AB, start value 0, not reflected, MSB first). The
   result is the 6016-bit coder block.
6. **Coder dispatch** (`coder_dispatch`), described below.
7. **OQPSK mapper** (`oqpsk_mod`). Bits are taken in pairs (a, b). Each pair
   becomes two samples: (±1, 0) then (0, ±1). Bit 0 maps to +1 and bit 1 to
   −1. Put another way, Q is delayed by half a symbol, with zero insertion at
   two samples per symbol.
8. **Sample FIFO**. It holds 4096 samples of 2+2 bits. When it is within 8
   entries of full, it stops the coders' output.
9. **Frame assembler**, described below.
10. **RRC filter** (`rrc_shaper`). This is a 17-tap FIR spanning 8 symbols
    at two samples per symbol. Its roll-off is 0.22 (`alpha_sel`=1) or 0.35
    (`alpha_sel`=0). The training tables and the data both use amplitude
    16384. The filter output is `acc >>> 14`, saturated to 16 bits and
    two's complement.

## Two coders, one stream

A turbo coder needs far longer to emit a codeword (up to 31680 bits) than
the chain needs to deliver a block (6016 bits). Two coders are therefore
used in turn. `coder_dispatch` does the following:

- It sends block k to coder k mod 2, and latches that block's CRI for the
  coder.
- It marks a coder busy from the first bit of its block until the last bit
  of its codeword has been taken. The codeword length comes from the
  latched CRI. `ready` is low while the coder whose turn is next is still
  busy, and no new block is requested until it is free.
- It gives `tc_out_ready` only to the coder whose codeword is next in order.
  The other coder finishes its work and holds its first output bit until
  its turn comes, so codewords never interleave.
- When the first bit of a codeword is taken, it pushes that codeword's CRI
  into the CRI queue.

This last point matters. The frame assembler starts a subframe only when the
CRI queue is not empty. A queued CRI therefore means its samples are already
flowing into the sample FIFO. Announcing a subframe earlier, when its block
entered a coder, could start a frame whose data is still thousands of clocks
away.

The coders must take a block without backpressure. They must also hold an
output bit while their `tc_out_ready` is low.

## Frame assembly and flow control

`tx_status` steps once per output sample. Its states are idle, preamble,
F_AMB, waiting for a subframe, P_AMB, data, and EOT.

- A frame begins only when a subframe is queued. Between subframes of a
  frame, the FSM waits if the next one is not queued yet.
- Inside a PCWORD, it waits while the sample FIFO is empty. While waiting,
  `valid_out` is low and zeros enter the filter. The waiting state decides
  this, not the data.
- Dropping `tx_enable` never cuts a frame short. `tx_enable_sampler` copies
  the enable only when its subframe counter is at 0, i.e. at a frame
  boundary. The loading side therefore always delivers whole frames. The
  assembler sends what was loaded, then the EOT midamble.

The training sequences come from read-only tables filled at elaboration:
`preamble_gen` holds 768 entries, `famb_gen` 2080, and `pamb_gen` 8 × 166.
A counter walks each table.

## Registers

The processor controls the core over a 32-bit AXI4-Lite port. The bus runs
on the core clock, so any clock-domain crossing belongs in the interconnect
in front of it. `axi_regs` accepts a write when address and data are both
valid, answers on the next clock, and holds the response until it is
accepted. Reads work the same way.

| address | access | content |
|---|---|---|
| 0x000 | W | bit 0 = 1: reset the data path (one-clock pulse); the registers keep their values |
| 0x100 | RW | bit 0 `tx_enable`, bit 1 `inject_fake` |
| 0x108 | R | subframes transmitted since reset |
| 0x148 | RW | `cri_sel` [2:0] |
| 0x150 | RW | `tx_mode` [1:0] |
| 0x158 | RW | `flen_sel` [1:0] |
| 0x160 | RW | `alpha_sel` [0], reset 1 (roll-off 0.22) |
| 0x168 | RW | `num_subframes` [7:0], reset 1 |
| 0x200, 0x208 | RW | two 32-bit test registers, stored and read back only |

Unmapped addresses read as 0. Bits above a field's width are dropped.
Changing `cri_sel` takes effect for the next block that enters the coders.
The other settings are meant to be changed while the transmitter is idle.
The usual start-up sequence is: reset the data path once the transceiver is
calibrated, write the configuration, then set `tx_enable`.

## Modes (`tx_mode`)

| value | mode | source of the PCWORD samples |
|---|---|---|
| 0 | coded, software data | words from `input_words` (internal PN if `inject_fake`) |
| 1 | coded, internal data | internal PN words |
| 2 | uncoded | `fake_data_ctrl`: a 660-bit table read once per PCWORD, bypassing scrambler, CRC and coders |
| 3 | continuous preamble | no frames: G_AMB followed by `num_subframes` × T_AMB, repeated while enabled (`tx_status_cont_tamb`) |

Mode 2 is a test signal. Every PCWORD carries the same 660 bits, and each
subframe has the length of a codeword at the selected CRI. Mode 3 stops at
the end of a G_AMB + T_AMB block once the enable is low.

## What follows the source description and what is chosen here

These follow the description:

- frame structure and all lengths;
- 187 words per subframe;
- the CRC and PN polynomials;
- the codeword lengths per CRI;
- the two turbo coders used in turn;
- OQPSK with half-symbol Q offset;
- two RRC roll-offs;
- output held for two clocks in 16-bit two's complement;
- sampling of the enable only at frame boundaries;
- the EOT marker value 7 on the midamble rate path.

These are this design's own choices. The source description does not give
them.

- **Training-sequence contents.** G_AMB, T_AMB and F_AMB are OQPSK-mapped
  bits of the x^20+x^17+1 sequence, seeded 0x5A5A5, 0x0ACE1 and 0x31337. The
  shorter F_AMB settings use the first 544 or 1056 entries. P_AMB uses a
  length-83 Zadoff-Chu sequence, root 1, shifted by 10·CRI symbols, with
  zeros between symbols. Change the seeds in the generator modules, and
  `ZC_ROOT`/`SHIFT_STEP` in `pamb_gen`.
- **PN details.** Fibonacci form, output from stage 20, seed 1 for the
  scrambler and the internal source.
- **CRC conventions.** Start value 0, no reflection, no final inversion.
- **RRC filter.** Span 8 symbols. Taps normalised so that the sum of |h| is
  32767, which rules out overflow.
- **`tx_mode` numbering**, the bit order inside a word (LSB first), and
  which bit of a pair goes to I (the first).
- **Buffer depths.** Word FIFO 256, sample FIFO 4096, CRI queue 4. Also the
  rule that unpacking starts only once a whole subframe is buffered.
- **EOT frame content.** One P_AMB at CRI 7.
- **Register details.** The bit positions in the enable register, the
  addresses 0x000, 0x108, 0x160 and 0x168, and the reset values (see
  "Registers" below). The other addresses, and one 32-bit register per
  field, follow the description.
- **Software-data timeout.** The "fake data until software data arrives"
  fallback is reduced to the `inject_fake` input. No timeout on software
  data is built.

Not included: the turbo coders, the DMA and transceiver interface cores,
the processor system, and everything analog.

## Turbo coders

`tb/turbo_coder_model.sv` stands in for a coder in simulation. After a
set latency it emits a codeword of the right length for the CRI. Bit k is
block bit r for r < 6016 and the inverted block bit r−6016 otherwise, with
r = k mod 12032. This is not a turbo code. It only makes every codeword
bit traceable to its block, so the testbench can check ordering and
content. A real coder connects to the same ports.

## Files

`rtl/`:

- `cbsr_pkg.sv`: constants, types, and the table functions used at
  elaboration (PN, Zadoff-Chu, RRC).
- `cbsr_tx_top.sv`: the top.
- One file per block: `axi_regs`, `request_data`, `internal_data_gen`, `word_unpacker`,
  `scrambler`, `crc_append`, `coder_dispatch`, `fake_data_ctrl`,
  `tx_enable_sampler`, `oqpsk_mod`, `sync_fifo`, `tx_status`,
  `tx_status_cont_tamb`, `preamble_gen`, `famb_gen`, `pamb_gen`,
  `rrc_shaper`.

`tb/`:

- One self-checking testbench per block, `tb_<block>.sv`.
- `tb_cbsr_tx_top.sv`: the end-to-end test.
- `turbo_coder_model.sv`: the coder stand-in described above.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Verification

`tb_cbsr_tx_top` runs the top at its default parameters and takes about
a minute. It does the following:

- It runs six scenarios: software data with two subframes per frame and a
  rate change between subframes; internal data at CRI 4 with the longest
  F_AMB; uncoded; continuous preamble; software mode with `inject_fake`;
  and internal data with three subframes per frame at CRI 3, 5 and 6.
  Together they send every rate 0–6 and the EOT marker.
- In the first scenario it drops the enable in the middle of loading a
  frame.
- All configuration is written over the AXI4-Lite port. The test starts
  with a register-write reset and finally reads back the subframe counter
  and a configuration register.
- It rebuilds every 6016-bit coder block from the words delivered. It
  scrambles them and computes the CRC by long division, then compares.
- It compares every output sample with a floating-point RRC filter applied
  to the expected frame. The expected frame is rebuilt from independent
  sequence generators. The allowed tolerance is ±3.
- It fails if the sample buffer ever runs dry inside a PCWORD. With coder
  latencies of 100–150 clocks, loading keeps ahead of transmission at every
  rate.
- It counts each mechanism and fails if any never occurred: software
  blocks, internal blocks, use of both coders, coder backpressure, the
  frame-aligned stop, EOT midambles, uncoded subframes, continuous-preamble
  blocks, and both roll-offs.

The block testbenches use random stimulus (`$urandom`) against reference
models. Examples: a queue model for the FIFO; long division for the CRC; a
bit-exact PN model; a delay-line model of the FIR; and a cycle-level frame
walk for `tx_status`.

Build and run with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/cbsr_pkg.sv tb/tb_cbsr_tx_top.sv --top-module tb_cbsr_tx_top -o sim
obj_dir/sim
```

Replace `tb_cbsr_tx_top` with any `tb_<block>` to test one block.

In coarse synthesis the top comes to about 850 cells and 1100 flip-flops,
plus about 255 kbit of memory (table depths rounded up to powers of two).
That memory is the 4096 × 4 sample FIFO, the 256 × 32 word FIFO, and the
32-bit-wide training tables: F_AMB 2080 entries, preamble 768, and
midambles 1328.

## Changing it

- **Rates.** Edit `cw_len` and `n_pcwords` in the package. The codeword
  length must be a multiple of 660.
- **Frame-part lengths.** These are in `cbsr_pkg`.
- **Buffers.** Change the depths with the top's parameters. The sample FIFO
  must be at least 16 deep.
- **Coder handshake.** It is local to `coder_dispatch`.
