# PSEC5 digital core

PSEC5 is an 8-channel waveform sampler in 65 nm CMOS, aimed at fast
timing with large-area photodetectors such as LAPPDs. Every channel writes its input into
switched-capacitor arrays (SCA): a fast array of 256 cells sampled at 40 GS/s
(6.4 ns of waveform) and a slow array of 1024 cells sampled at 5 GS/s
(204.8 ns). A discriminator trigger stops sampling, and the stored voltages
are read out slowly afterwards.

Most of the chip is analog. This repository holds synthesizable
SystemVerilog for its digital part:

- the clock tree that makes 5 GHz, 2.5 GHz and ~39 MHz from a 10 GHz oscillator;
- the dual-edge flip-flop chains that open and close the sampling switches;
- the controller that splits the fast array into 1, 2 or 4 capture windows;
- the SPI register block through which an FPGA controls the chip.

The sizes and register codes come from the published PSEC5 design review.
The review describes the digital logic at block level. Where it gives only
a block's function, the insides here are this design's own and are marked
as such below and in each file's header.

## Clock tree

```
clk10 (10 GHz, from the on-chip VCO, not in this RTL)
  └─ clk_div2 ── clk5 (5 GHz) ─┬─ clk_skew_gen ── clk5_ph[3:0]  fast banks
                               └─ clk_div128 ─┬─ q[0]  2.5 GHz  slow bank
                                              └─ q[6]  39.06 MHz internal clock, clkout
```

- `clk_div2` is a toggle flip-flop. A reset flip-flop samples `clk_en`, so
  the divider can be stopped together with its power-gated supply.
- `clk_div128` is a 7-stage ripple counter with no reset. It divides
  correctly from any starting state.
- `clk_skew_gen` models the sized clock buffers that give four copies of
  the 5 GHz clock, 25 ps apart. It is a behavioural model: pure transport
  delays, not synthesizable.

## Sampling at 40 GS/s with a 5 GHz clock

This is the core idea of the digital part.

Each storage cell has its own switch-control flip-flop. The flip-flops of a
column form a ring, and a single "1" (the token) circulates in it. A cell
tracks the input while it holds the token. It takes its sample at the
moment the token leaves.

**Dual edge.** The flip-flops are dual-edge-triggered (`detff`), so a 5 GHz
clock moves the token every 100 ps, which is 10 GS/s. The cell is the XOR
form of a DETFF:

- one flop captures on the rising edge, one on the falling edge;
- `q = q_rise ^ q_fall`.

The output changes exactly once per edge and never depends on the clock
level. This keeps a chain glitch-free even in zero-delay simulation.

**Four phases.** A fast column of 64 cells is split into four interleaved
sub-chains of 16 cells. Sub-chain `p` owns cells `p, p+4, p+8, ...` and is
clocked by `clk5_ph[p]`, which lags phase 0 by `25*p` ps. The four tokens
move together, but 25 ps apart. The sampling instants therefore walk
through cells 0, 1, 2, 3, 4, ... one every 25 ps, which is 40 GS/s:

```
phase 0 edge  t=0     cell 0 opens (sample)   cell 4 starts tracking
phase 1 edge  t=25    cell 1 opens            cell 5 starts tracking
phase 2 edge  t=50    cell 2 opens            cell 6 ...
phase 3 edge  t=75    cell 3 opens            cell 7 ...
phase 0 edge  t=100   cell 4 opens            cell 8 ...
```

Each switch stays closed for half a clock period (100 ps), so four
neighbouring cells track at any moment.

**Slow bank.** The slow bank uses the same module (`sca_switch_ctrl`) with
one phase, 1024 cells and the 2.5 GHz clock. That gives 5 GS/s, and one lap
of the ring is 204.8 ns.

**Start and stop.** `en` and `load` are registered first on phase 0, and
each later phase re-registers them 25 ps after that. All sub-chains
therefore start and stop in the same clock cycle, as long as the skew stays
below half a period.

- While `load` is high, stage 0 of each sub-chain takes `head` and every
  other stage is cleared.
- While `en` is low, the tokens stand still and every switch is open, so
  the cells hold what they sampled.

## Capture windows: modes and triggers (`bank_ctrl`)

The four fast banks (1.6 ns each) can be linked into rings of different
lengths. The mode register sets the length:

| mode | banks per window | windows (edges captured) | ring length |
|------|------------------|--------------------------|-------------|
| 0    | 1                | 4 × 1.6 ns               | 64 cells    |
| 1    | 2                | 2 × 3.2 ns               | 128 cells   |
| 2    | 4                | 1 × 6.4 ns               | 256 cells   |

`bank_ctrl` drives the links:

- `tok_src[c]` names the bank whose last cell feeds bank `c`. That is bank
  `c-1` inside a group; the first bank of a group takes the group's last
  bank, which closes the ring.
- `head[c]` marks the bank whose ring gets the token at load time.

The controller has three states:

- **IDLE:** the rings are kept loaded. Writing the START instruction (3)
  starts group 0, and the slow bank starts too.
- **RUN:** on each trigger edge the running group stops, so its cells now
  hold that edge, and the next group starts. After the last group, the slow
  bank also stops.
- **DONE:** the controller waits here until the RESET instruction (1).
  READOUT (2) leaves it in DONE.

The trigger is the OR of the discriminator outputs enabled by the trigger
channel mask, which also drives `trig_out`, and the external `trig_in`. It
passes a two-flop synchroniser and an edge detector, so a group stops
three 5 GHz cycles (600 ps) after the trigger rises. All eight channels
share one controller and stop together.

## SPI register interface (`psec5_spi`)

The FPGA drives SCLK (40–50 MHz) and PICO, and reads POCI. A transaction
is a string of bytes, MSB first, sampled on the rising SCLK edge:

1. **Address byte.** Bits 6:0 give the register address. Bit 7 asks for a
   write.
2. **Data bytes.** During each data byte, the chip shifts out the current
   contents of the addressed register on POCI. The output changes on the
   falling edge. If the write flag was set, the byte the host sends replaces
   the register at the end of the byte.
3. After every data byte the address goes up by one. A long string of bytes
   therefore walks through consecutive registers.

A transaction ends when SCLK pauses. The ~39 MHz internal clock watches
SCLK through a synchroniser. After 7 internal-clock cycles without an SCLK
edge, it pulses an internal reset that clears the byte counter and the
address, but not the registers. The pulse ends 11 internal-clock cycles
after the last SCLK edge; the host must wait that long before it sends the
next address.

Register map (8 bits each):

| address | access | content |
|---------|--------|---------|
| 0       | –      | reserved, reads 0 |
| 1       | R/W    | trigger channel mask (bit n enables channel n) |
| 2       | R/W    | instruction: 1 reset, 2 readout, 3 start |
| 3       | R/W    | mode: 0/1/2 = 1/2/4 fast banks per edge |
| 4..59   | R      | counters 0..7, 7 bytes each (last 6 bits of each counter unused) |

The counter registers live in the analog channels. For address `a` in
4..59, the block sets:

- `load_cnt_ser` to one-hot channel `(a-4)/7`;
- `select_reg` to byte `(a-4)%7`.

Outside 4..59 it drives `load_cnt_ser = 0` and `select_reg = 7`, which
selects nothing. This block returns zeros for those addresses; the
counter's own serial data is outside this RTL.

Internal structure, after the block diagram of the original design:

| block | role |
|-------|------|
| `spi_pico` | shift register, framing, pause detector |
| `spi_write_mux` | write strobes |
| three `spi_latched_write_reg` | the R/W registers |
| `spi_convert_addr` | counter addressing |
| `spi_reg_readout` | POCI shifter |

## Not in this RTL

These parts of the chip are analog or physical, or have no logic function:

- the input network and source followers;
- the sampling switches and capacitors;
- the output followers;
- the 1.2 V to 2.5 V level shifters between `fast_sw`/`slow_sw` and the switches;
- the discriminators (their outputs are the `disc` inputs);
- the 10 GHz VCO (its clock is `clk10`);
- the power-gated clock buffers, supply grid and pads.

The per-channel counters behind registers 4..59 are not built either: the
design review names them and says how they are addressed, but not what they
count.

## Where this design makes its own choices

The design review is silent on the following points. Each is a choice
made here:

- **SPI framing:**
  - the write flag in bit 7 of the address byte;
  - MSB-first bit order and the SCLK edges;
  - the pause detector's synchroniser, which adds 4 cycles to the documented 7.
- **SPI registers:** they are edge-triggered on SCLK, not level latches.
  The write mux is combinational.
- **DETFF:** the XOR form, and its enable/load pins.
- **Sampling control:** the token-ring operation of the switch chains, the
  interleaving order of the four phases, and the re-timing of enable/load.
- **`bank_ctrl`:**
  - stop-on-trigger hand-over in group order 0, 1, 2, 3;
  - the slow bank stops with the last group;
  - one controller for all channels;
  - RESET is needed before a new START;
  - mode codes above 2 act as mode 2.
- **Windows:** the review gives the capture window once as 204.8 ns and once
  as 208.4 ns. This design uses 204.8 ns (1024 cells at 5 GS/s).

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog fails
the run if it hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/psec5_pkg.sv tb/tb_psec5_top.sv \
  --top-module tb_psec5_top
obj_dir/Vtb_psec5_top +verilator+rand+reset+2
```

`tb_psec5_top` runs the whole core at full size (8 channels, 256 + 1024
cells each) from the SPI pins. It checks:

- the clock tree;
- register write and read-back, and counter addressing;
- a capture in each of the three modes, including cell order and the
  25 ps / 200 ps sampling spacing;
- that a masked discriminator is ignored and that an external trigger counts;
- clock gating.

It also counts how often each of these happened. It compiles in about two
minutes and runs in seconds.

The block testbenches (`tb_<module>`) check one module each, against values
worked out in the testbench itself.

## Files

- `rtl/psec5_pkg.sv`: register addresses, instruction and mode codes, sizes
- `rtl/psec5_top.sv`: the digital core
- `rtl/psec5_spi.sv`, `rtl/spi_*.sv`: SPI register block
- `rtl/clk_div2.sv`, `rtl/clk_div128.sv`, `rtl/clk_skew_gen.sv`: clock tree
  (the skew generator is behavioural)
- `rtl/detff.sv`, `rtl/sca_switch_ctrl.sv`: sampling-switch chains
- `rtl/bank_ctrl.sv`: mode and trigger control
- `tb/tb_*.sv`: self-checking testbenches
