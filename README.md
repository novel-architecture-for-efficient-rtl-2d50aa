# Dimmable VPPM modulator without a codeword table

Variable pulse position modulation (VPPM, IEEE 802.15.7) lets an LED lamp send
data and be dimmed at the same time. Each symbol carries one bit and contains
one light pulse whose width sets the brightness: for bit 0 the pulse sits at
the start of the symbol, for bit 1 at its end. Sampled with N_T samples per
symbol, a dimming level N_D (0..N_T) gives these two codewords:

| level N_D (N_T = 10) | bit 0      | bit 1      |
|----------------------|------------|------------|
| 0                    | 0000000000 | 0000000000 |
| 3                    | 1110000000 | 0000000111 |
| 5                    | 1111100000 | 0000011111 |
| 9                    | 1111111110 | 0111111111 |
| 10                   | 1111111111 | 1111111111 |

The straightforward modulator stores both tables (N_T + 1 codewords of N_T
bits each) and serialises the selected word, so its size grows with the
dimming resolution. This design needs no table. It relies on one
observation: within a symbol, the output is the *inverted* data bit up to a
transition sample N_TP, and the data bit itself from there on, with

    N_TP = N_D          for bit 0
    N_TP = N_T - N_D    for bit 1
    out[n_s] = (n_s >= N_TP) ? D_TX : ~D_TX

So a sample counter, one subtracter, one comparator, an inverter and two 2:1
muxes are enough. Only their bit width, ceil(log2(N_T + 1)), grows with the
resolution. At levels 0 and N_T the lamp is fully off or fully on and the
output no longer depends on the data.

## Datapath

```
 sym_clk ──► vppm_symbol_detect ──sym_start──► vppm_sample_counter ──n_s──┐
 mod_en  ──►        │  active ───────────────►   (0 at start, +1/sample)  │
                    │                                                     ▼
 tx_data ───────────┼──► vppm_transition_point ──N_TP──► vppm_output_select ──► vppm_out
 dimming_level ─────┘      (N_T - N_D, mux on D_TX,   D_TX  (n_s >= N_TP ?
                            held for the symbol) ─────────►  D_TX : ~D_TX, reg)
```

| module                  | what it is                                                   |
|-------------------------|--------------------------------------------------------------|
| `vppm_pkg`              | default N_T (10) and the width function `vppm_width(nt)`     |
| `vppm_symbol_detect`    | finds the first sample of each symbol from `sym_clk`         |
| `vppm_sample_counter`   | sample index n_s inside the symbol                           |
| `vppm_transition_point` | subtracter and mux giving N_TP; holds N_TP and D_TX          |
| `vppm_output_select`    | comparator, inverter, output mux and output register         |
| `vppm_modulator`        | top level: the four blocks wired together                    |

## Timing

This is the part to read before connecting the modulator.

* **One clock.** `clk` is the sample clock; one symbol is N_T cycles of it.
  The symbol clock `sym_clk` is an ordinary input, synchronous to `clk`, with
  one rising edge per symbol. Its duty cycle does not matter. Generating it
  (for instance by dividing `clk` by N_T) is left to the surrounding system.
* **Symbol start.** In the cycle where `sym_clk` is 1 and was 0 in the cycle
  before, `sym_start` is high. That cycle is sample 0 of the new symbol.
  `tx_data` and `dimming_level` are read in that cycle only. They are held
  inside for the rest of the symbol, so the driver may change them at any
  time after it.
* **Sample index.** `sample_idx` is 0 in the start cycle and counts up by one
  per cycle. If the next symbol start is late, the index stops at N_T - 1 and
  the last output level is held until that start.
* **Output latency.** `vppm_out` is registered. The level for sample k
  appears in the cycle after the one in which `sample_idx = k`. A symbol
  therefore comes out exactly N_T cycles long, one cycle behind the inputs.
* **Enable.** While `mod_en` is low no symbol starts and `vppm_out` is 0
  from the next cycle on, even in the middle of a symbol. After `mod_en`
  rises, output begins at the next rising edge of `sym_clk`.
* **Reset.** `rst_n` is asynchronous and active low. It clears every register,
  so the output is 0.

## Parameters and sizes

`vppm_modulator #(NT, W)`: `NT` is the codeword length (samples per symbol,
100 % / dimming step). The default is 10, a 10 % step. `W` defaults to
`$clog2(NT+1)` and sizes `dimming_level` and `sample_idx`. Levels above NT
are clamped to NT.

| dimming step | NT  | W |
|--------------|-----|---|
| 33.33 %      | 3   | 2 |
| 20 %         | 5   | 3 |
| 10 %         | 10  | 4 |
| 5 %          | 20  | 5 |
| 3.33 %       | 30  | 5 |
| 2.5 %        | 40  | 6 |
| 2 %          | 50  | 6 |
| 1.25 %       | 80  | 7 |
| 1 %          | 100 | 7 |

The design uses 2W + 4 flip-flops: the count and N_TP (W bits each), and
the held data bit, the symbol-clock delay, the in-symbol flag and the output
register (one bit each). The logic is four W-bit adders or comparators and a
few muxes. Even for NT = 100 the level fits in 7 bits. A codeword-table
modulator would need 2 × 101 words of 100 bits for the same resolution.

A 33.33 % step (NT = 3) is the coarsest that still carries data: it leaves
one level, N_D = 1 or 2, strictly between off and on. The data rate is the
sample clock divided by NT. A finer dimming step therefore costs data rate
at a fixed clock.

## Own design choices

The way the modulator works (the transition-point rule, counter, subtracter,
comparator, inverter and two muxes, and the order: symbol start, then reset
the count and pick N_TP, then compare and select, then increment) is the
published architecture. The following details are this implementation's own:

* the symbol start is found from the rising edge of a synchronous symbol
  clock;
* the `mod_en` enable, and output 0 while it is low or before the first
  symbol;
* D_TX and N_TP are held in registers for the whole symbol;
* the output register, which adds one cycle of latency;
* the count holds at N_T - 1 when symbols are longer than N_T samples;
* levels above N_T are clamped;
* the reset style;
* the default N_T = 10, the size of the reference waveforms and of the lamp
  prototype the architecture was demonstrated with. Other resolutions come
  from the `NT` parameter.

Not included: the LED driver and luminaire, the receiver/demodulator, and the
host that supplies data and dimming levels.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                   | what it checks                                                                 |
|-----------------------------|--------------------------------------------------------------------------------|
| `tb_vppm_symbol_detect`     | start pulses and active flag against a cycle model, random symbol clocks/enable |
| `tb_vppm_sample_counter`    | 0..N_T-1 per symbol, irregular symbol spacing, hold at N_T-1                   |
| `tb_vppm_transition_point`  | N_TP for every level 0..15 (clamping) and both bits, held during the symbol     |
| `tb_vppm_output_select`     | every (n_s, N_TP, D_TX) combination, one-cycle latency, 0 when inactive        |
| `tb_vppm_modulator`         | whole modulator at default size (see below)                                    |
| `tb_vppm_resolution_sweep`  | NT = 3, 5, 10, 20, 30, 40, 50, 80, 100 side by side, every level and bit against the codeword table, and W against the table above |

`tb_vppm_modulator` runs the top with no parameter overrides. It ramps the
level from 0 to 10 with random data, then sends every level with both bits,
random traffic with out-of-range levels and over-long symbols, and switches
the enable off mid-symbol. Every output sample is compared with the codeword
table c0[k] = (k < N_D), c1[k] = (k >= N_T - N_D). A loopback receiver model
decides each bit by comparing the pulse energy in the two halves of the
symbol, and it must recover every bit sent at a level strictly between 0 and
N_T. The test counts symbol starts, bits 0 and 1, inverted and direct
samples, fully-off and fully-on symbols, clamps, count holds, disabled
cycles and detections. If any of these never happens, the test fails.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/vppm_pkg.sv rtl/vppm_symbol_detect.sv rtl/vppm_sample_counter.sv \
  rtl/vppm_transition_point.sv rtl/vppm_output_select.sv rtl/vppm_modulator.sv \
  tb/tb_vppm_modulator.sv --top tb_vppm_modulator -Mdir obj
./obj/Vtb_vppm_modulator
```

For the sweep, also add `tb/vppm_sweep_lane.sv` and use
`--top tb_vppm_resolution_sweep`. All testbenches run in well under a second.
