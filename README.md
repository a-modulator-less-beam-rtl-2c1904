# Beam steering and PSK transmission by delaying PLL references

A phased array steers its beam by giving each antenna the same carrier with a
different phase. This design produces those phases without any RF phase
shifter and without any RF modulator. Each antenna has its own integer-N PLL,
and every PLL locks to a copy of one common 1 MHz reference square wave. The
only thing the digital logic does is **delay each copy by a programmable
number of fast-clock cycles**. A PLL locked to a delayed reference puts out a
phase-shifted carrier, so four 8-bit delay words set four carrier phases with
a resolution of 360/256 = 1.40625 degrees.

The same mechanism also carries data. Adding the same rotation α to all four
channels leaves the phase differences untouched, so the beam stays where it
is, while the common phase carries a PSK symbol. The RTL here adds the
rotation of every symbol to the per-channel steering offsets β and reloads
the delay words once per symbol. The default is 16-PSK at 8 kbaud
(32 kbit/s) with a 256 MHz delay clock.

The RTL covers the digital part: delay lines, tuning registers, the
phase-to-delay table and the symbol sequencer. The four PLLs (2.453 GHz
carrier, 1 MHz phase detector frequency), the clock sources and the
microcontroller that configures the unit sit outside it.

## From a reference delay to a carrier phase

The delay clock runs 2^8 = 256 times faster than the reference
(T_CLK = T_REF / 256). So a delay of d cycles shifts the reference by
d/256 of a turn. The PLL multiplies frequency by its feedback ratio M, and
phase with it:

    output phase index = (d * M) mod 256        (units of 1/256 turn)

With a 2.453 GHz carrier and a 1 MHz reference, M = 2453 and
n = M mod 256 = 149. Every reference step therefore moves the carrier by 149
steps. Because n is odd, the map d -> d*n mod 256 is a permutation: all 256
carrier phases can still be reached, but in scrambled order. To get carrier
phase PTR you must load

    PTW = (PTR * n_hat) mod 256,   with (n_hat * n) mod 256 = 1,

which for M = 2453 is n_hat = 189. For example, PTR = 1 (1.4 degrees) needs a
delay of 189 cycles, and 189 * 2453 = 463617, which is 1 mod 256.

`phase_lut` holds this inverse table. After reset it fills itself by adding
n_hat once per address (256 cycles, no multiplier); `lut_ready_o` then
rises. The package function `bsu_pkg::mod_inv_pow2` computes n_hat at
elaboration, so changing `PLL_M` rebuilds the table. Real hardware adds small,
code-dependent delay errors. The table therefore has a write port, so
firmware can replace entries with measured ("calibrated") PTWs. An even `PLL_M`
is rejected at elaboration, because it would make half of the phases
unreachable.

## The synchronous delay line (`sdl`)

Each delay line is a cascade of delay blocks, longest first. Block k holds
2^k flip-flops and a 2:1 multiplexer. When PTW bit k is set, the mux takes
the shift register's output; when it is clear, the mux passes the block's
input straight through. The delay is therefore the PTW itself. The longest
block would add exactly half a reference period, and for a 50 % duty square
wave that is just an inversion. So it is replaced by an XOR gate acting as a
controlled inverter, which saves 128 flip-flops per line. A final pipeline
flip-flop retimes the output, so every channel leaves through a register and
routing differences do not become phase errors.

* Latency: `ref_o(t) = ref_i(t - PTW - 1)`. The extra cycle is common to all
  channels and does not affect phase differences.
* Size: 127 delay flip-flops + 1 output flip-flop, and 7 muxes + 1 XOR per
  line.
* **Settling:** a new PTW switches the muxes at once. The shorter blocks
  downstream, however, still hold samples that went through the old setting of
  the longer blocks upstream. The output reaches the new delay within one
  reference period (255 cycles, 1 µs). The PLL sees this as a phase step,
  well inside the 125 µs symbol.
* The XOR trick is exact only for a reference with a period of exactly 256
  clock cycles and 50 % duty. `USE_XOR_MSB = 0` builds a full shift register
  for the top block and delays any waveform.

## Phase Control Unit (`pcu`, `ptw_regs`)

Four tuning registers feed four delay lines that share the reference input.
The registers are written over one shared 8-bit data bus, with one enable per
channel (`ptw_we_i`). Several channels may be loaded in the same cycle. A
write in cycle t is in the register at t+1.

## Sending symbols (`mod_ctrl`)

Phases are 8-bit fractions of a turn, so all sums wrap modulo 360 degrees for
free:

    alpha  = m << (8 - p)              symbol m of a 2^p-PSK constellation, p = 1..8
    PTR_c  = (alpha + beta_c) mod 256  for channel c
    PTW_c  = LUT[PTR_c]

A symbol timer produces a boundary every `sym_cyc_i` cycles (32000 = 8 kbaud
at 256 MHz). At each boundary:

1. One symbol is taken from a valid/ready stream (`sym_ready_o` pulses). If
   none is waiting, the previous α is kept and `sym_underrun_o` pulses.
2. The LUT is read for channels 0..3 in consecutive cycles.
3. Each PTW is written to its tuning register one cycle after its read.
   Channel c is written c+2 cycles after the boundary.

The whole update takes N_CH+2 = 6 cycles, and the delay lines then settle
within one reference period. Changes of β (steering) are picked up at the
next boundary. The first boundary comes as soon as `mod_en_i` is high, the
LUT is filled and no earlier update is still being written. `sym_cyc_i` below
N_CH+2 is treated as N_CH+2, so two updates never overlap.

## Top level (`bsu_top`)

`bsu_top` holds `phase_lut`, `mod_ctrl` and `pcu`. `mod_en_i` chooses who
writes the tuning registers:

* **low:** the host writes PTWs directly through `host_ptw_i` and
  `host_ptw_sel_i`. This is used for fixed steering, PTW sweeps and
  calibration measurements.
* **high:** the modulator writes them, once per symbol.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 256 MHz delay clock; active-low asynchronous reset |
| `ref_i` | in | 1 MHz reference, synchronous to `clk`, period 256 cycles, 50 % duty |
| `host_ptw_i[7:0]`, `host_ptw_sel_i[3:0]` | in | direct tuning-register write (mod_en_i low) |
| `mod_en_i` | in | modulator owns the tuning registers |
| `psk_bits_i[3:0]` | in | p of 2^p-PSK, 1..8 (other values read as 8) |
| `sym_cyc_i[19:0]` | in | clock cycles per symbol |
| `beta_i[4][7:0]` | in | steering offsets in 1/256 turn |
| `sym_valid_i`, `sym_data_i[7:0]`, `sym_ready_o` | in/in/out | symbol stream; the low p bits are used |
| `sym_tick_o`, `sym_underrun_o` | out | symbol boundary; boundary without a symbol |
| `lut_wr_en_i`, `lut_wr_addr_i`, `lut_wr_data_i` | in | calibration write, ignored during the self-fill |
| `lut_ready_o` | out | LUT filled |
| `ptw_o[4][7:0]` | out | current PTWs |
| `ref_o[3:0]` | out | delayed references to the four PLLs |

Parameters (package `bsu_pkg` holds the defaults): `N_CH = 4`, `PTW_W = 8`,
`PLL_M = 2453`, `USE_XOR_MSB = 1`, `CYC_W = 20`. With the defaults the
design has about 600 flip-flops and one 256 x 8 RAM.

A steering vector that points the beam along a line of equally spaced
elements is `B = [0, w, 2w, 3w]`. The sum of α and β wraps in 8 bits, and
the transmitted symbols do not move the beam.

## Where this RTL departs from the prototype, and its own choices

* In the prototype's netlist the PTW bus and register bits are called
  "bypass". Here a set bit *inserts* its delay block, so the delay equals
  the PTW, the reading under which the PTW sets the line length. If your
  firmware uses the opposite convention, invert the PTW.
* The prototype's FPGA clock PLL (inside its PCU) is not part of this RTL.
  The fast clock arrives as `clk`.

* The whole design runs on the 256 MHz delay clock. A controller in another
  clock domain must synchronise its writes.
* The reference is an input. It is not generated here and must be
  cycle-synchronous to `clk`.
* The symbol sequencer is hardware. The original scheme leaves the sum and
  the lookup to microcontroller firmware.
* Channels are updated one after the other, 1 cycle apart, rather than
  simultaneously. This difference is 4 ns against a 125 µs symbol.
* β is given directly in 1/256 turn. Converting degrees to table indices,
  rounding included, is left to whoever sets β.
* Reset clears the tuning registers to PTW 0. The LUT comes from its
  self-fill, not from a preloaded image.
* The LUT holds the theoretical inverse. Measured corrections have to be
  written in through the calibration port.

## Not included

* The microcontroller (an 8051 core) and its firmware. The top exposes the
  registers it would drive.
* The four PLL/VCO chains (Frequency Scaling Unit), loop filters and
  antennas. The testbench models them only by their phase behaviour.
* The FPGA clock PLL and the reference and clock oscillators.

## Simulation

Every testbench is self-checking, ends with a `TB_RESULT checks=N failures=M`
line and has a watchdog. Build and run one with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_bsu_top \
        -y rtl +libext+.sv rtl/bsu_pkg.sv tb/tb_bsu_top.sv -o sim
    ./obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_sdl` | every PTW 0..255 plus random ones; output = input PTW+1 cycles earlier, cycle by cycle, with the XOR line on a square wave and a full line on random data |
| `tb_ptw_regs` | random writes with single and multiple enables against a model; reset |
| `tb_phase_lut` | fill time 256 cycles; (PTW * M) mod 256 = PTR for every entry, for M = 2453 / 8 bits and M = 2451 / 6 bits; writes ignored during fill; calibration writes |
| `tb_mod_ctrl` | symbol spacing, first boundary, ready/underrun, write order and timing, PTW = LUT(α+β) for p = 1, 2, 3, 4, 8 and out-of-range p, enable toggled during an update |
| `tb_pcu` | per-channel delay cycle by cycle after settling; edge-measured delay differences for steering vectors [0, w, 2w, 3w]; shared writes |
| `tb_bsu_top` | the whole unit at default parameters, as described below |
| `tb_bsu_steer_sweep` | at default parameters and 32000 cycles per symbol, all 256 steering vectors [0, w, 2w, 3w] while 16-PSK data is sent; phases per symbol, and the broadside array power from the measured phases: 1 at w = 0, below -50 dB at w = 128 (about 8.2 million cycles, a few seconds) |

`tb_bsu_top` applies a 1 MHz reference (256 cycles) and measures each
channel's delay from its rising edges. It turns the delay into a carrier
phase with the PLL model `(d * 2453) mod 256`. It then checks:

* a PTW sweep of one channel against another (all 256 codes);
* 16-PSK at 32000 cycles per symbol, with several steering vectors;
* that every channel carries α+β for every symbol, and that the relative
  phases equal β whatever α is;
* underruns, BPSK and 256-PSK, a calibrated LUT entry, and switching between
  host and modulator modes.

It counts each of these mechanisms and fails if one never happens. It runs
about a million clock cycles in under a second.
