# Bit-plane parallel embedded block coder for JPEG 2000

JPEG 2000 tier-1 coding turns each code-block of wavelet coefficients into
arithmetic-coded byte streams. It codes one magnitude bit-plane at a time,
from the most significant down, in three passes per plane. A conventional
"word-level" coder reads each coefficient as a whole word and builds every
plane's state on the fly. That hardware is sized for all planes of a word
(about ten), even though at lossy rates only a few planes per block survive
rate control.

This design codes a chosen number of planes (`NBPC`, default 4) side by side:

- **Skipping planes.** A rate-distortion stage ahead of the coder picks, per
  block, the lowest plane worth coding (`trunc`). Planes below it are never
  read or coded.
- **Plane-wise memory.** Coefficients are stored in external memory as
  bit-plane words, not coefficient words. A coder reads only the planes it
  codes. Each coefficient's sign is stored once, right behind its first 1 bit.
- **Parallel bit-plane coders (BPC).** Each BPC codes one plane. All BPCs walk
  the block in the same scan order, one coefficient per clock. Each BPC passes
  its significance information for that coefficient to the BPC one plane
  below in the same cycle, so the lower planes never wait for the upper ones.
- **Runs.** A block with more planes to code than there are BPCs is coded in
  several runs. A 1.5 KB state memory (3 bits per coefficient) carries the
  state from the lowest plane of one run to the highest plane of the next.
- **Shared encoders.** One two-symbol arithmetic encoder (TSAE) and `NBPC-1`
  one-symbol encoders (AE) are shared through a dispatcher. A BPC can
  produce 0, 1, 2 or 4 context-decision pairs for one coefficient.

The output is one MQ-coded byte stream per coded plane and pass, tagged with
plane and pass number.

## Data flow

```
coefficients ──> bpg_ss_packer ──> tile memory (write port)
(scan order)       (plane words,                │
                    sign scattered)             │ (read port)
                                                v
                           ┌──────── bp_ebc ────────────────────────────┐
                           │ ebc_addr_gen: one read port for all BPCs    │
                           │  BPC 0 (base): ss_decoder -> bp_cf ─┐       │
                           │  BPC 1:        ss_decoder -> bp_cf ─┤       │
                           │  ...  (coefficient chain, top → down)│      │
                           │  BPC n-1:      ss_decoder -> bp_cf ─┤       │
                           │                  ebc_ae_bank: dispatcher,   │
                           │                  TSAE, AEs, pass coders     │
                           │ ebc_state_mem: state between runs          │
                           └─────────────────────────────────────────────┘
                                                │
                                                v
                                   bs[j]: bytes of plane/pass streams
```

`jpeg2k_bpp_ebc_top` handles one block at a time. It first stores the
block through the packer, then codes it with `bp_ebc`. The wavelet transform,
the rate-distortion stage that chooses `trunc`, the external memory and
tier-2 are not part of the RTL. Their signals are ports.

## Memory layout: bit-plane grouping with sign scattering

`bpg_ss_packer` takes coefficients in sign-magnitude form, in code-block
scan order: four-row stripes, column by column, top to bottom within a
column. For each magnitude plane `k` it appends bits to a word for that
plane:

- the coefficient's bit `k`;
- if this bit is the coefficient's first 1, counting from the top plane, its
  sign bit right after it.

So each plane's word stream holds exactly the information that plane's
coder needs, and every sign is stored once. Bits fill a `W`-bit word from
the most significant bit down, and the last word of a plane is zero-padded.

Words are interleaved by word index: the `n`-th word of plane `k` lives at

```
base + n*NPLANES + (NPLANES-1-k)
```

so the words of all planes at the same index sit together, top plane first.
A coder that needs plane `k` computes its addresses directly and never touches
the words of skipped planes. The packer also reports `n_planes`, the number of
planes above the highest zero plane of the block.

`ss_decoder` reverses the scattering for one plane. It keeps a two-word
buffer. It consumes one bit per coefficient, or two when the bit is 1 and the
coefficient was not yet significant in any higher plane. That "already
significant" flag arrives from the BPC above.

## The coefficient chain and context formation

This is the core of the design and the part that departs most from a
sequential coder.

In one scan step every BPC sees the same coefficient. BPC `j` codes plane
`ks-j`, where `ks` is the top plane of the current run. It passes three flags
to BPC `j+1`:

- significant above its plane;
- significant above the plane above;
- the sign.

BPC 0 takes these flags from the state memory on a later run, or as zeros on
the first run. So each plane knows, without delay, whether the coefficient
was significant before it. Its own bit then tells whether the coefficient
becomes significant here.

`bp_cf` works two columns behind its input. When row `r` of column `x+2`
enters, row `r` of column `x` is coded, so all neighbours of the coefficient
`C` that follow it in scan order are already present. The last row of the
previous stripe is held in a line buffer of 3 bits per column. A code-block
takes `CB*CB + 8` scan steps; the last eight flush the window.

How `C`'s pass is chosen:

- Pass 2 (magnitude refinement) if `C` is already significant above this
  plane.
- Pass 3 (cleanup) if no neighbour contributes.
- Pass 1 (significance propagation) otherwise.

When a neighbour contributes:

- A neighbour that comes after `C` in scan order contributes if it was
  significant above this plane.
- A neighbour that comes before `C` also contributes if it became
  significant in pass 1 of this plane.
- Neighbours in the next stripe are treated as insignificant (the
  stripe-causal "parallel" mode).
- The above-right neighbour of a stripe's first row lies in the previous
  stripe, so it counts as coming before `C`.

The context of a pair comes from the standard JPEG 2000 tables: zero coding
by sub-band orientation, sign coding, refinement, run length and uniform.
The contributions above feed those tables. All three passes of a plane come
out of one scan. Each step yields the pass of the coefficient and up to four
pairs:

- one pair for refinement or for an insignificant coefficient;
- two for a coefficient that becomes significant (bit and sign);
- up to four for a run-length coded cleanup column (run symbol, two uniform
  symbols giving the first row with a 1, and that row's sign).

**Cleanup-pass departure.** In a sequential JPEG 2000 coder, a later
neighbour that became significant in pass 1 of the same plane is already
known when the cleanup pass codes `C`. Here it is not. In cleanup contexts:

- a neighbour before `C` counts if its bit in this plane is 1;
- a neighbour after `C` counts only if it was significant above this plane.

The streams are therefore decodable by a decoder that applies the same rule,
not by an unmodified JPEG 2000 decoder.

**Parallel mode.** Each pass of each plane is a separate arithmetic-coder
segment. Every segment starts from the initial probability states and ends
with a flush.

## Encoders and the dispatcher

The arithmetic encoder is the standard MQ coder. `mq_ae` is one purely
combinational step: it takes the registers A, C, CT and B plus the context
state, and returns the updated ones and up to three output bytes. Its parts:

- renormalisation in at most three shift segments;
- byte-out with carry and bit stuffing;
- a `flush` input that performs the terminating SETBITS and final byte-outs.

`mq_tsae` chains two steps in one cycle. When both pairs use the same
context, the second step sees the first step's updated context state.

The encoders hold no state. `ebc_ae_bank` owns the registers of every pass
coder: `NBPC` BPCs × 3 passes, each with the coder registers and 19 context
states. Each cycle, `ebc_dispatcher` looks at how many pairs each BPC still
holds for the current step:

- The TSAE goes to the lowest-numbered BPC holding two or more pairs. If
  there is none, it goes to the lowest-numbered BPC holding one pair.
- Every other BPC gets one AE.
- If pairs remain, because some BPC holds four pairs or two BPCs hold two or
  more, the step takes another cycle and the whole chain waits.

On random blocks this costs about 1% extra cycles with 2 BPCs, 2% with 4 and 3% with 7.

## Runs, truncation and the state memory

A block with `n_planes` planes, truncated at `trunc`, codes planes
`trunc .. n_planes-1` in `ceil((n_planes-trunc)/NBPC)` runs. The top plane of
the first run is `n_planes-1`. In a run with fewer planes left than BPCs, the
lower BPCs are idle.

During each run except the last, the lowest active BPC writes each
coefficient's three state bits to `ebc_state_mem` (4096 × 3 bits for a 64×64
block). The next run's base BPC reads them back. The highest plane of the
block has only a cleanup pass.

Each run goes through these steps:

1. Clear the buffers and coders.
2. Scan `CB*CB+8` steps.
3. Flush every pass coder of every active plane, one per cycle.
4. Wait until no memory read is outstanding.

A scan step stalls when any active BPC lacks its next memory word.

## Interfaces

`jpeg2k_bpp_ebc_top` (parameters `NBPC=4`, `CB=64`, `NPLANES=10`, `W=32`,
`AW=16`):

| Signal | Direction | Meaning |
|---|---|---|
| `cb_start`, `base`, `band`, `trunc` | in | start a block: word address, sub-band orientation, lowest plane to code |
| `coef_valid/ready`, `coef_mag`, `coef_sign` | in/out | coefficients in scan order, sign-magnitude |
| `mem_wr_req/addr/data`, `mem_wr_gnt` | out/in | tile-memory writes, accepted with the grant |
| `mem_rd_req/addr`, `mem_rd_gnt`, `mem_rd_valid/data` | out/in | reads, accepted with the grant; data returns in request order, any latency |
| `bs[j]` | out | per BPC and cycle: up to six valid bytes, with plane and pass |
| `cb_busy`, `cb_done`, `n_planes` | out | status |
| `ev_*` | out | one-cycle event pulses: extra dispatcher cycle, TSAE coding two pairs, run-length column per BPC, data stall, state-memory read |

All logic is clocked on the rising edge, with a synchronous active-low
reset. The state memory has no reset. It is always written before it is
read.

## Simulation

Each file in `rtl/` holds one module or package. `ebc_pkg.sv` must be
compiled first. The testbenches import `tb/tb_ref_pkg.sv`, a software model
of the whole coder:

- the packer's word image;
- per-pass pair sequences built directly from the neighbour rules above;
- a buffer-based MQ encoder.

Example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ebc_pkg.sv tb/tb_ref_pkg.sv \
  rtl/mq_ae.sv rtl/mq_tsae.sv rtl/ebc_dispatcher.sv rtl/ebc_ae_bank.sv \
  rtl/ebc_state_mem.sv rtl/ebc_addr_gen.sv rtl/ss_decoder.sv rtl/bp_cf.sv \
  rtl/bp_ebc.sv rtl/bpg_ss_packer.sv rtl/jpeg2k_bpp_ebc_top.sv \
  tb/tb_jpeg2k_bpp_ebc_top.sv --top-module tb_jpeg2k_bpp_ebc_top
./obj_dir/Vtb_jpeg2k_bpp_ebc_top
```

Use the same list with another testbench file and top module name to run a
unit test. Every testbench ends with `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_ebc_pkg` | context tables and probability table, exhaustively |
| `tb_mq_ae`, `tb_mq_tsae` | random symbol sequences, byte for byte against the model, including flush |
| `tb_ebc_dispatcher` | random pair counts: TSAE choice, unit assignment, extra cycles |
| `tb_ebc_state_mem`, `tb_ebc_addr_gen` | memory behaviour; addresses, routing and fairness under random grants and latency |
| `tb_ss_decoder`, `tb_bpg_ss_packer` | sign scattering, both directions, 16×16 blocks |
| `tb_bp_cf` | pass and pair sequences of single planes, 16×16 |
| `tb_bp_ebc` | whole coder with `NBPC=3`, multi-run and truncated blocks, every stream byte |
| `tb_bp_ebc_scaling` | coders with 2, 5 and 7 BPCs side by side; streams, cycle budget and dispatcher overhead |
| `tb_jpeg2k_bpp_ebc_top` | default parameters: five 64×64 blocks through packing and coding; see below |

`tb_jpeg2k_bpp_ebc_top` runs five blocks:

- 10 planes in three runs;
- a truncated block;
- a two-run HH block;
- a block with a slow memory;
- an all-zero block.

For each block it checks the memory image, every stream byte, the
run-length count and the cycle budget. It also requires each event to occur
at least once.

## Limits and departures

- **Cleanup contexts** follow the parallel contribution rule described above.
  The streams are not bit-compatible with a standard sequential decoder.
- **Truncation** is by whole bit-planes. Truncating inside a plane (after a
  pass) is left to later stages.
- **Blocks are processed one at a time.** Packing and coding of one block do
  not overlap, and coding several blocks at once is not supported.
- **No output buffer.** There is no bit-stream buffer or memory write-back
  for the streams; `bs` is a raw per-cycle byte output.
- **Block size is fixed by `CB`.** A 32×32 block needs `CB=32`.
- **Memory format.** The word width (`W=32`), the bit order inside a word and
  the fixed group of `NPLANES` words per word index are this design's
  choices.
- **Dispatcher priority** (lowest-numbered BPC first) is this design's choice.
