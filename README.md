# Built-in self-test for FPGA block RAMs by circular comparison

An FPGA can test its own embedded block RAMs: part of the fabric becomes
test logic, and the RAMs are tested in every mode they support. The
difficulty is not the memory test. It is the time spent downloading the
many test configurations, and turning thousands of RAM outputs into a
verdict that is cheap to read.
This design does it with three ideas:

* **No expected values.** All RAMs of a column get the same configuration
  and the same stimulus. Each RAM is compared with its neighbour instead of
  with a golden value. A test pattern generator (TPG) therefore only has to
  produce stimulus, and the test length depends on the RAM mode, not on how
  many RAMs are tested.
* **Circular comparison.** The RAMs (blocks under test, BUTs) stand in a
  ring. Output response analyzer (ORA) *i* compares BUT *i* with BUT *i+1*.
  Each BUT is watched by two ORAs, so a faulty RAM shows up as the pair of
  failing ORAs on either side of it. Two identical TPGs drive alternate
  RAMs, so a faulty TPG makes every ORA fail instead of going unnoticed.
* **One-bit verdict.** Each ORA flag is sticky. All flags are ORed along a
  chain, which in the FPGA is built on the dedicated carry logic. The end of
  the chain is a single pass/fail bit. The individual flags are read only
  when diagnosis is wanted.

The RTL implements the architecture of the article *Built-In Self-Test of
Embedded Memory Cores in Virtex-5 Field Programmable Gate Arrays* for 36 Kbit
Virtex-5 block RAMs. It covers the TPGs, the ORAs, the ring routing and the
19 BIST configurations. The RAMs themselves are outside the RTL. They are a
hard macro of the FPGA, and `tb/bram_model.sv` is a behavioural stand-in for
simulation.

```
           TPG A ──────────┬───────────────┬──────────── (even BUTs)
           TPG B ──────┬───┼───────────┬───┼──────────── (odd BUTs)
                       │   │           │   │
   ┌──> ORA7 <── BUT0 ──> ORA0 <── BUT1 ──> ORA1 <── BUT2 ... BUT7 ──┐
   └─────────────────────────────────────────────────────────────────┘
        every ORA cell:  pass <= pass & (a0 == b0) & (a1 == b1)
        chain:           fail = OR of all ~pass
```

## The ORA and the pass/fail chain (`ora_cell`, `ora_ring`)

An `ora_cell` compares **two** outputs of BUT *j* with the same two outputs
of BUT *k*, using two XNORs. The two results feed a sticky pass flag.
Putting two bit pairs in one cell halves the ORA count. The cost is that
diagnosis cannot tell which of the two bits differed.

The cell is also one stage of the OR chain:
`carry_out = carry_in | ~pass`.

`ora_ring` builds one ORA per BUT. Each ORA has `RESP_W/2 = 76` cells,
because every response bit of a BUT is compared: both 72-bit data output
buses and 8 status flags. All cells of all ORAs form one chain.

The `casc` input switches the routing from neighbour (*i* vs *i+1*) to every
other RAM (*i* vs *i+2*). This is needed in the cascade configurations,
where RAMs alternate between LOWER and UPPER roles. Every other RAM then
compares UPPER with UPPER and LOWER with LOWER. `N_BUT` must be even.

Diagnosis works from `ora_pass`. ORA *i*, cell *c* sits at bit
`i*76 + c` and compares response bits `2c` and `2c+1` of its two BUTs:

* One faulty BUT *b* in neighbour routing fails ORAs *b−1* and *b*.
* In cascade routing, a faulty BUT *b* fails ORAs *b−2* and *b*.
* The failing cell index gives the faulty output pair.

## The 19 configurations (`bist_pkg::cfg_lookup`)

A run applies one configuration. In the FPGA, each configuration is a
(partial) bitstream. Here it is a number on `cfg_sel`, and the RAM settings
go out on `but_cfg`.

| # | RAM mode | Test | Size | Operations here | Reference cycle budget |
|---|----------|------|------|-----------------|------------------------|
| 1 | BRAM | March s2pf- (two-port) | 1K×36 | 14N = 14,336 | 20,000 |
| 2 | BRAM | March d2pf (two-port) | 1K×36 | 9N = 9,216 | 15,000 |
| 3–7 | BRAM | MATS+ | 2K×18 … 32K×1 | 5N = 10,240 … 163,840 | 25,000 … 330,000 |
| 8 | ECC | March LR + BDS | 512×72 | 44N = 22,528 | 23,000 |
| 9 | ECC | ECC read | 512×72 | 512 | 7,000 |
| 10 | ECC | ECC write (RAM clock inverted) | 512×72 | 4,160 | 7,000 |
| 11 | FIFO | FIFO March X (RAM clock inverted) | 1K×36 | 6N+2 = 6,146 | 8,500 |
| 12–13 | FIFO | FIFO March X | 2K×18, 4K×9 | 12,290, 24,578 | 34,000, 66,000 |
| 14–15 | FIFO | FIFO March X, almost offsets 0x0AAA/0x1555 swapped | 8K×4 | 49,154 | 131,500 |
| 16 | FIFOECC | ECC read through FIFO | 512×72 | 1,026 | 10,000 |
| 17 | FIFOECC | ECC write through FIFO | 512×72 | 5,130 | 10,000 |
| 18–19 | CASC | March Y, LOWER/UPPER roles swapped | 64K×1 | 32 | 36 |

"Operations here" is what this RTL issues, at one operation per clock. The
reference column is the cycle count quoted for the original FPGA
implementation. It is given for comparison and is not a target. Overall,
the RTL issues 515,734 operations against 1,113,572 reference cycles. Each
run also adds about 10 cycles of start and drain.

The order of the configurations is part of the method. Memory cells are
tested thoroughly only once: March LR with background data sequences (BDS)
in configuration 8, at the widest aspect ratio, which reaches the whole
36 Kbit core. The other configurations only need to reach the logic around
the core:

* address decoding at each aspect ratio (MATS+);
* the two ports (s2pf-, d2pf);
* Hamming generation and correction (ECC);
* FIFO flags (March X);
* the cascade multiplexers (March Y).

## Test pattern generators

Each TPG issues one *operation slot* per clock. A slot says what port A and
port B do: read, write or nothing. It also gives the addresses and the data.
Data is a background pattern or its inverse, replicated over the 72-bit bus.
A RAM configured narrower uses only the low bits.

* **`tpg_bram`** is a table-driven march engine. A march element has a
  direction, up to six operations, and a flag that repeats the element once
  per background pattern. The engine walks all `2**addr_bits` addresses for
  each element and issues every operation of the element at each address.
  The element tables live in `bist_pkg::march_elem`:
  * MATS+ is `{⇕(w0); ⇑(r0,w1); ⇓(r1,w0)}`.
  * March LR is `{⇕(w0); ⇓(r0,w1); ⇑(r1,w0,r0,r0,w1); ⇑(r1,w0); ⇑(r0,w1,r1,r1,w0); ⇑(r0)}`.
  * For BDS, `⇕(w0,r0,w1,r1)` follows once for each of the ⌈log2 72⌉ = 7
    backgrounds. Background *k* sets bit *j* to bit *k−1* of *j*.
  * March s2pf- runs port B reads on the cell that port A works on.
  * March d2pf runs port B reads on the neighbouring cell.
* **`ecc_pattern_gen`** enumerates the words that exercise the Hamming logic:
  * the 2,080 words with one or two 1s in 64 data bits;
  * the 256 words with all-0 data and every Hamming value.
* **`tpg_ecc`** runs March LR + BDS on the raw 512×72 core (through an
  embedded `tpg_bram`) and two ECC tests:
  * **ECC read:** the 256 Hamming values are written with Hamming generation
    off. They are read back with correction on, so every syndrome reaches
    the corrector.
  * **ECC write:** the 2,080 data words are written through the Hamming
    generator. They are read back raw, in batches of 512, so the generated
    check bits appear on the outputs.
* **`tpg_fifo`** runs FIFO March X:
  * N+1 writes of 0s (the last one while full);
  * N × (read, write 1s);
  * N × (read, write 0s);
  * N+1 reads (the last one while empty).

  This drives every flag through all its states: FULL, EMPTY, ALMOST FULL,
  ALMOST EMPTY, and the write and read error flags.
* **`tpg_fifoecc`** uses the same fill/drain structure on a 512×72 FIFO and
  carries the ECC words: 1 pass for ECC read, 5 passes for ECC write.
* **`tpg_casc`** runs March Y on addresses 0x0000, 0x7FFF, 0x8000 and 0xFFFF
  of the 64K×1 cascade, so reads alternate between the LOWER and the UPPER
  half.
* **`tpg`** is one TPG site. It holds all five generators, and the RAM mode
  of the configuration picks one. It also opens the ORA compare window
  (`cmp_en`) at start and keeps it open for `DRAIN` = 4 cycles after the last
  slot, so reads still in the RAM output pipeline get compared.

## Top level (`bist_top`)

| Port | Dir | Meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `cfg_sel[4:0]` | in | one-cycle pulse runs configuration 1..19 |
| `but_cfg` | out | `bist_cfg_t`: mode, aspect ratio, write mode, output register, ECC enables, clock inversion, almost offsets |
| `casc_upper[N_BUT]` | out | UPPER role per RAM in cascade configurations |
| `but_stim[N_BUT]` | out | `but_stim_t` per RAM (even RAMs from TPG A, odd from TPG B) |
| `but_resp[N_BUT]` | in | `but_resp_t` per RAM: `dout_a`, `dout_b`, `{full, empty, afull, aempty, wrerr, rderr, sbiterr, dbiterr}` |
| `busy`, `done` | out | TPGs issuing; run and drain finished (held until next start) |
| `pass` | out | end of the OR chain, inverted: valid when `done` |
| `ora_pass` | out | all ORA cell flags, for diagnosis |

Conventions for `but_stim_t`:

* Bits [63:0] of a data bus are data and bits [71:64] are parity.
* In FIFO modes, `we_a`/`din_a` is the write side and `en_b` the read side.

Timing of a run:

* `start` is pulsed with `cfg_sel` valid. The next clock latches the
  configuration and clears every ORA flag.
* The clock after that starts both TPGs. The first slot appears one cycle
  later.
* `done` rises `DRAIN`+2 cycles after the last slot.

With `N_BUT = 8`, the top synthesizes to about 3.2k flip-flops. 608 of
them are ORA flags. Most of the rest are the registered stimulus buses of
the ten generators (five per TPG site).

## How far to trust it, and where it departs from the original

Taken from the original description:

* the two-TPG circular comparison;
* the neighbour and every-other routing;
* the two-XNOR sticky ORA and the OR chain;
* the 19 configurations, with their modes, algorithms, sizes and the two
  clock-inverted ones;
* the 13-bit almost-flag values 0xAAAA/0x5555;
* the ECC pattern sets;
* the fill-until-full / read-until-empty FIFO test;
* March Y as a functional test for the cascade.

This design's own choices:

* **March element sequences.** MATS+, March LR and March Y are the standard
  textbook sequences. The BDS extension is a common one. March s2pf- and
  March d2pf are *approximations*: two-port elements of the right kind (same
  cell / neighbouring cell), but not verified against their published
  definitions. The FIFO March X element order is likewise this design's.
* **Timing.** One operation per clock. The cycle counts of the original
  implementation are larger: about twice as large for MATS+, and much
  larger for the short ECC tests. That suggests operations of more than one
  cycle, or steps that are not described. Neither is reproduced here.
* **ECC read test.** The original first proposes loading the test words
  through the RAM's configuration-time initialisation. Here they are
  written with Hamming generation disabled, which is the alternative it
  also describes.
* **Write mode and output register per configuration.** Configurations 1–7
  cycle through WRITE_FIRST, READ_FIRST and NO_CHANGE, and 4–6 enable the
  output register. The original does not say which configuration tests
  which of these options.
* **Cascade roles.** Configuration 18 makes even RAMs LOWER and configuration
  19 makes them UPPER. The ring wraps, so the last RAM feeds the first. A
  real column instead leaves the outputs of a LOWER RAM without a partner
  unrouted.
* **Configuration loading.** Partial reconfiguration, compressed bitstreams
  and configuration readback are FPGA infrastructure. Here they become the
  `cfg_sel` input and the `ora_pass` output.
* **Clock inversion.** Configurations 10 and 11 test the RAMs' clock
  inversion. `but_cfg.clk_inv` tells the RAM to use the opposite edge. In
  the FPGA, the TPG and ORA clocks are inverted as well during these two
  configurations, so that the test still runs at full clock rate. That is a
  timing measure with no effect on function, and the RTL keeps one clock
  edge for all its logic.
* **All five TPGs in one site.** In the FPGA only the current mode's TPG is
  present.
* **Compare enable and ORA initialisation** (`cmp_en`, `init`) are added. In
  the FPGA the flags start from their configured values.
* **`N_BUT` default.** 8, as in the architecture drawing. A real column
  holds however many RAMs the device has, and the test length does not
  change with it.

Not built:

* the block RAM itself (only the behavioural model in `tb/`);
* the configuration-memory fault injection used to measure fault coverage;
* the bitstream generation flow.

## Simulation

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line. For example, the end-to-end test at
default size:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
  rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

`tb_bist_top` puts eight `bram_model` RAMs around `bist_top` and runs all
19 configurations fault-free. For each one it checks the pass bit, every
ORA flag, and the exact operation count. It then injects three faults into
RAM 3 and checks the verdict and the diagnosis:

* a stuck memory cell, under MATS+;
* a stuck FULL flag, under FIFO March X;
* a stuck cascade output, in configuration 19, where the fault appears at
  the UPPER RAM above.

Finally it checks that every mechanism happened at least once:

* FULL, EMPTY and both almost flags;
* the write and read error flags;
* single- and double-bit ECC errors;
* cascade reads;
* both routings and both clock inversions.

The run takes about 600k clock cycles and a few seconds.

`tb_bist_column` builds a taller column, with `N_BUT = 12`. It checks two
things. First, the operation counts are the same as with eight RAMs.
Second, the diagnosis is right for faults at both ends of the circle:

* a stuck cell in RAM 0, 5 or 11 fails exactly ORAs j-1 and j;
* a cascade fault across the wrap, from RAM 11 into RAM 0, fails exactly
  ORAs 10 and 0.

Block testbenches: `tb_ora_cell`, `tb_ora_ring`, `tb_tpg_bram`,
`tb_ecc_pattern_gen`, `tb_tpg_ecc`, `tb_tpg_fifo`, `tb_tpg_fifoecc`,
`tb_tpg_casc`, `tb_tpg` and `tb_bist_pkg`. Each compares the block against
sequences or rules worked out in the testbench.

`bram_model` uses a 72/64 SECDED code of its own. Its `fault_kind` input
injects the three faults listed above.

## Files

* `rtl/bist_pkg.sv`: types, configuration table, march tables.
* `rtl/ora_cell.sv`, `rtl/ora_ring.sv`: response analysis.
* `rtl/tpg_bram.sv`, `rtl/ecc_pattern_gen.sv`, `rtl/tpg_ecc.sv`,
  `rtl/tpg_fifo.sv`, `rtl/tpg_fifoecc.sv`, `rtl/tpg_casc.sv`, `rtl/tpg.sv`:
  pattern generation.
* `rtl/bist_top.sv`: the BIST.
* `tb/`: the testbenches and `bram_model.sv`.
