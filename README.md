# GRAND decoder for 128-bit linear codes

This is synthesizable SystemVerilog for a universal maximum-likelihood channel decoder. Most
decoders search for the most likely *code-word* and so are tied to one family of codes. This one
guesses the *noise* instead. It is built on GRAND (Guessing Random Additive Noise Decoding). The
architecture follows the decoder chip described in V. Bansal, *A Universal Maximum Likelihood
Decoder Using Noise Guessing* (Boston University thesis). This section covers the idea; later
sections say where this RTL fills gaps in that description or departs from it.

A transmitted code-word `c` arrives as `y = c xor e`, where `e` is the channel noise. For any
linear code with parity-check matrix `H`, `H c = 0`, so

    H y = H e          (over GF(2))

The decoder therefore tries error vectors `e'` in order of decreasing likelihood. On a binary
symmetric channel (BSC) that means lightest first. It stops at the first `e'` with
`H e' = H y`, and `y xor e'` is then the maximum-likelihood code-word. Only `H` is needed, so the
same hardware decodes any binary linear code of length 128 with at most 44 parity bits (rate ≥
0.656). This includes non-systematic codes and random codes. `H` can also be changed at run time.

At a bit-flip probability of 1e-3, a 128-bit word has no error 88% of the time, one error 11.3%,
two errors 0.72% and three errors 0.03%. Four or more errors occur with probability about 1e-5.
The decoder searches up to weight 3 and reports anything heavier as a failure, to be sent again.

## How a channel output moves through the decoder

```
 in ─► syndrome_calc ─┬─ H·y = 0 ────────────────────────────────────────────► result_arbiter ─► out
      (1 cycle)       │                                                             ▲  ▲  ▲
                      └─ H·y ≠ 0 ─► FIFO ─► primary block ── found ─────────────────┘  │  │
                                            (weights 1, 2)                             │  │
                                              └─ not found ─► FIFO ─► secondary block ─┘  │
                                                                      (weight 3)          │
                                                                        └─ not found ─────┘ (DEC_FAIL)
```

* **Syndrome calculator** (`syndrome_calc`). It computes `H·y` for the bank named by the channel
  output's tag, at one channel output per cycle. A zero syndrome means `y` is already a code-word.
  Such a word goes straight to the output with status `DEC_HW0`. This is the 88% case.
* **Primary block** (`noise_search_block`, weights 1..2). It walks all 128 + 8128 error vectors of
  weight 1 and 2, and stops at the first match.
* **Secondary block** (the same module, weight 3). It walks the 341,376 weight-3 vectors. This is
  about 44 times more work than the primary block does, but it is needed for only 0.03% of
  channel outputs.

The search is split into two blocks so that a slow weight-3 search does not stall the frequent
light cases. While the secondary block searches, the primary block and the syndrome calculator
keep working on later channel outputs. As a result, results can leave **out of order**. Each
result carries back the `id` given at the input.

## Ordering the guesses: distance pairs, seeds and shifts

This is the least obvious part of the design (`error_generator`, built from `distance_logic`,
`pattern_generator` and `error_shifter`).

Every error vector of weight ≤ 3 is a *seed* with bit 0 set, shifted left by some amount `s`. A
seed is described by two distances:

| seed        | (D1, D2)         | set bits              |
|-------------|------------------|-----------------------|
| weight 1    | (0, 0)           | 0                     |
| weight 2    | (D1, 0)          | 0, D1                 |
| weight 3    | (D1, D2)         | 0, D1, D1+D2          |

As a single number, the seed is `X = 1 + 2^D1 − [D1=0] + 2^(D1+D2) − [D2=0]·2^D1`.
`pattern_generator` produces it both as that vector and as a list of bit positions. The rest of
the pipeline uses only the positions.

* **Distance logic** is a pair of counters. It steps through the seeds in this order: (0,0); then
  (1,0) … (127,0); then, for D2 = 1..126 and D1 = 1..127−D2, the weight-3 seeds. The last seed is
  (1,126). Each block's `MIN_HW`/`MAX_HW` parameters pick the part of this list it walks.
* **Error shifter** issues 16 shifted copies of the current seed per cycle. They are built in 4
  branches of 4 lanes: branch `b` adds `base + 4b`, and its lanes add 0..3 to that. A lane's
  vector is valid while its top bit is at most bit 127. The lane whose top bit lands exactly on
  bit 127 raises **overflow**, because a further shift would drop a bit and change the weight.
* The distance logic ORs the 16 overflow flags. On an overflow it moves to the next seed, and the
  shifter's base returns to 0.

Inside one weight all vectors are equally likely on a BSC. So within a weight the order only
decides which of two equally likely solutions wins. A seed with top bit `t` takes
`ceil((128 − t)/16)` cycles. A full walk therefore takes:

| weight | vectors | generator cycles |
|--------|---------|------------------|
| 1      | 128     | 8                |
| 2      | 8,128   | 568              |
| 3      | 341,376 | 25,256           |

The thesis tabulates 584 cycles for weight 2 and 25,840 for weight 3. The weight-3 figure is
exactly 25,256 + 584, so it reads as the total for a weight-3 channel output: primary walk plus
secondary walk. The weight-2 figure is 8 cycles above this design's 8 + 568 = 576. The thesis
does not say where those 8 cycles come from. This RTL follows the stated rule of 16 new vectors
per cycle and a new seed on overflow.

## Multiplying by a sparse vector

`H·e` over GF(2) is the XOR of the columns of `H` at the ones of `e`. An error vector has at most
three ones, so `sparse_mvm` stores `H` **by column** in dual-port SRAMs (`dp_sram`, 128 words ×
44 bits) and handles each vector in three steps:

1. It reads the 2 or 3 selected columns.
2. It XORs them.
3. It compares the result with `H·y`.

This replaces a 44-cycle row-by-row product with a single SRAM read.

* The primary multiplier uses one dual-port SRAM per bank: two ports for two columns.
* The secondary multiplier uses two per bank. The fourth port is kept disabled during reads.
* Ports for positions beyond the vector's weight are disabled too.

Each of the 16 lanes has its own multiplier and its own SRAM copies, so all 16 vectors issued in a
cycle are checked together. Reads are synchronous: vectors issued in cycle `t` are compared in
cycle `t+1`. A match is registered at the end of that cycle. The lowest matching lane wins, which
is the earliest vector in generation order, and the generator is stopped.

Storage: 16 lanes × 2 banks × (1 + 2) SRAMs = 96 SRAMs of 5,632 bits, about 540 kbit. The
syndrome calculator has its own register copy of both banks (11,264 flip-flops). It needs every
column at once for a dense `y`. The thesis gives no circuit for this stage; a single-cycle XOR
tree over a register copy is this design's choice.

## Two code-books: tags, banks and rewrites

The decoder holds two parity-check matrices, H0 and H1. Every channel output carries a one-bit
`tag` that selects the bank it is decoded with. A transmitter can therefore switch code-books per
code-word, following a pseudo-random sequence agreed in advance. Generating and storing that
sequence happens outside the decoder.

`h_bank_ctrl` lets the host load a new `H` into one bank while the other keeps decoding:

* It counts the channel outputs of each bank that are inside the decoder, from acceptance at the
  input to delivery at the output.
* A pending write to bank `b` holds off new channel outputs tagged `b` (`in_ready` stays low for
  them).
* The write is granted (`hw_ready`) once bank `b` is empty. Channel outputs of the other bank
  flow throughout.
* A granted write goes to every copy of that bank: the syndrome calculator's registers and all
  SRAMs. It carries up to two columns per cycle, one per SRAM port, so a full matrix takes 64
  cycles.

## Interfaces and timing

All handshakes are valid/ready. A transfer happens on a rising edge where both are high. A
producer holds its data until it is taken. Reset `rst_n` is asynchronous and active-low. It
clears control state; memories and data registers are not reset.

Top module `grand_decoder_top` (types in `grand_pkg`):

| port | dir | type | meaning |
|------|-----|------|---------|
| `in_valid/in_ready` | in/out | 1 | channel output handshake |
| `in_y` | in | `cw_t` (128) | channel output, bit i pairs with column i of H |
| `in_tag` | in | 1 | H bank |
| `in_id` | in | 8 | label returned with the result |
| `out_valid/out_ready` | out/in | 1 | result handshake |
| `out_res` | out | `result_t` | `id`, `tag`, `status`, `codeword`, `error` |
| `hw_valid/hw_ready` | in/out | 1 | H write handshake |
| `hw_req` | in | `h_write_t` | `bank`, `en[1:0]`, `addr[1:0]`, `data[1:0]`: up to two columns |
| `bank_busy` | out | 2 | bank has channel outputs inside |
| `primary_busy`, `secondary_busy` | out | 1 | search in progress |

`in_id` is only a label: a channel output with a weight-3 error can stay inside for up to about
26,000 cycles while hundreds of others pass it, so the sender must not reuse an id that has not
come back yet.

`status` is one of `DEC_HW0..DEC_HW3` (weight of the error removed) or `DEC_FAIL`. On a failure,
`codeword` is `y` unchanged and `error` is zero.

Latency, counted in clock edges from the edge that accepts the input to the edge that delivers
the result, with idle stages and no back-pressure:

* code-word (zero syndrome): 1 cycle;
* error found by the primary block: 5 cycles + the generator cycle (counted from 0) of the
  winning vector, e.g. `5 + floor(b/16)` for a single error at bit `b`;
* forward from the primary block to the secondary block: 578 cycles after the primary block
  starts (576 generator cycles + 2);
* error found by the secondary block: generator cycle of the winning vector + 3 after it starts;
  a failure takes 25,258 cycles.

Throughput: the syndrome stage takes one channel output per cycle. At p = 1e-3, the primary block
needs about 3.2 cycles and the secondary block about 4 cycles per incoming channel output on
average. On random BSC noise at p = 1e-3 with a rate-0.8 code, `tb_bsc_workload` measures 18.9
decoded bits per cycle, about 950 Mbit/s at 50 MHz. The thesis targets 250 Mbit/s, which is 5 bits
per cycle. Bursts of weight-3 errors are absorbed only by the two 4-entry FIFOs; after that, the
input stalls.

Parameters of the top: `LANES` (16), `BRANCHES` (4), `PRIMARY_FIFO` and `SECONDARY_FIFO` (4 each).
The code length `N = 128`, the rows of `H` `M = 44`, the id width and the bank count are constants
in `grand_pkg`. To load a code of rate above 0.656, leave its unused rows of `H` zero.

## How far it follows the thesis

Taken from the thesis:

* n = 128, a 44 × 128 `H`, and the syndrome → primary (weights 1, 2) → secondary (weight 3) flow
  with abandonment above weight 3;
* the distance-pair seed scheme, the seed formula, and the 16-lane, 4-branch error shifter with
  overflow;
* the column-selecting multiplier on dual-port SRAMs (one per primary multiplier, two per
  secondary, the fourth port disabled);
* two tag-selected H banks with rewriting of the idle one.

This design's own choices, where the thesis is silent:

* the syndrome calculator circuit;
* the one-cycle read-then-compare pipeline;
* valid/ready handshakes and the 4-entry FIFOs;
* out-of-order results with an id;
* the rule that grants bank writes only to a drained bank;
* two columns per write;
* a multiplier and SRAM set per lane;
* the seed order within a weight;
* reset behaviour.

Departures:

* generator cycle counts for weights 2 and 3 (see above);
* one clock for everything. The thesis suggests running the secondary block at a lower
  frequency.
* SRAMs are modelled as synchronous-read arrays. A chip would substitute its process's
  dual-port macros with the same ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `grand_tb_pkg` builds random systematic codes (`H = [A | I]`) and encodes. Its reference search
  walks the same vector order in software, so expected results come from an independent loop
  rather than from the RTL.
* `tb_error_generator` checks all 349,632 vectors of weights 1..3 for order and uniqueness, and
  the cycle counts 576 and 25,256.
* `tb_primary_block` and `tb_secondary_block` check every result against the reference and the
  exact latency of each hit and forward. They also apply back-pressure and rewrite a bank.
* `tb_grand_decoder_top` runs the whole decoder at its default parameters. A rate-0.656 code sits
  in bank 0 and a rate-0.8 code in bank 1. The test runs 364 channel outputs with 0–4 errors, out
  of order, under random stalls, and rewrites bank 1 while bank 0 keeps decoding. It also checks
  one code-word per cycle on error-free input. It counts each mechanism and fails if any never
  happens: direct output, weight 1/2/3 decodes, failure, both search blocks busy, out-of-order
  results, both banks, a write waiting for its bank to drain, decoding during a write, a full
  FIFO, and input and output stalls. It takes a few seconds.
* `tb_bsc_workload` runs the operating point the decoder is sized for: 20,000 code-words of a
  rate-0.8 code through a BSC with p = 1e-3, back to back. It checks every result, and checks a
  weight-0 share near 88% and at least 5 decoded bits per cycle.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/grand_pkg.sv tb/grand_tb_pkg.sv tb/tb_grand_decoder_top.sv \
  --top-module tb_grand_decoder_top
./obj_dir/Vtb_grand_decoder_top
```

Replace the testbench name to run another. Only the packages must be listed; `-y` finds the
modules. The RTL also carries concurrent assertions for its handshake and SRAM rules, for example:
no read of a bank during its rewrite, no write granted to a busy bank, and held outputs stable
under back-pressure.

## Files

| file | contents |
|------|----------|
| `rtl/grand_pkg.sv` | constants (N, M, widths) and the shared types |
| `rtl/grand_decoder_top.sv` | the decoder |
| `rtl/syndrome_calc.sv` | H·y for a dense y, H bank register copy |
| `rtl/noise_search_block.sv` | primary / secondary block: generator, 16 multipliers, match, control |
| `rtl/error_generator.sv` | distance logic + pattern generator + error shifter |
| `rtl/distance_logic.sv`, `rtl/pattern_generator.sv`, `rtl/error_shifter.sv` | its three parts |
| `rtl/sparse_mvm.sv`, `rtl/dp_sram.sv` | column-select multiplier and its SRAM |
| `rtl/h_bank_ctrl.sv` | bank in-flight counting and write grant |
| `rtl/sync_fifo.sv`, `rtl/result_arbiter.sv` | stage queues and the output merge |
| `tb/*.sv` | testbenches, the shared harness `search_block_checker` and `grand_tb_pkg` |
