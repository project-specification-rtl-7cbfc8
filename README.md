# Cluster Processor chip for the ATLAS level-1 calorimeter trigger

This is the RTL of the chip at the heart of the electron/photon and tau/hadron
trigger. Every 25 ns bunch crossing (BC), one chip looks at a small patch of
calorimeter trigger towers. It decides whether an isolated, localised energy
deposit is present and reports two things:

- **hits**: for each of 16 programmable threshold sets, how many candidates passed;
- **Regions of Interest (RoIs)**: where the candidates sit and which thresholds they
  passed. The chip keeps these records in a history buffer and sends them out
  serially when the downstream read-out asks for them.

One chip covers a 2 (phi) x 4 (eta) block of reference towers. Around each
reference tower it evaluates a 4 x 4 tower window in two calorimeter layers, em and
had. The eight windows overlap, so the chip needs a 5 x 7 x 2 tower environment.
The input links carry a 6 x 7 x 2 map; its top row is received but not used.

## Data path at a glance

```
108 serial lines (160 Mbit/s)
  -> per line: clock-phase select, 0-3 bit delay, 4-bit nibble per BC   (s2p_align, clock_calib)
  -> 42 ten-bit fields -> BC de-multiplexing, parity check -> 6x7x2 map (demux_array, bc_demux)
  -> 8 windows -> hits[31:0], RoI records L and R                        (cp_algorithm)
  -> 128-deep RoI history RAM -> 64-deep FIFO -> 2 serial outputs        (roi_readout)
slow-control bus: registers, error bookkeeping, RAM/FIFO access, scan  (cp_regs, scan_path)
```

`cp_chip` is the top level.

- Clocks:
  - `clk40` is the BC clock.
  - `clk160_ph[3:0]` are the four 90-degree phases of the 160 MHz bit clock. On
    silicon a DLL would make them; here they are inputs.
- Resets:
  - `por_n` clears everything.
  - `rst_global` clears everything except the software-written registers. The
    calibration state is lost, so run calibration again afterwards.

## Serial inputs and their calibration

Each BC, each line carries 4 bits (MSB first), so 108 lines give 432 bits per
crossing. Every line's path has three parts:

1. A mux picks one of the four 160 MHz phases as the sampling clock.
2. A 3-stage delay chain and a tap mux delay the stream by 0-3 bit periods.
3. A 4-bit shift register is captured on every `clk40` rising edge.

The phase choice keeps the sampling point away from bit transitions. The delay
puts the 4-bit word boundary on the BC boundary.

`clock_calib` (one per line) finds both settings on its own. It starts on a rising
`en_cal`, while the transmitters repeat the pattern `10100101`. Every sliding
4-bit view of that pattern falls into one of four pairs: A/5, 4/B, 9/6 or 2/D.

1. **Phase scan.** For each phase: clear the converter, wait 4 BCs, classify the
   next 7 nibbles into the four pairs, and keep the largest count. The phase with
   the best count wins; ties go to the lower phase.
2. **Delay.** With the winning phase and zero delay, one nibble is read after a
   4-BC pause. Its pair gives the delay: A/5 -> 0, 4/B -> 1, 9/6 -> 2, 2/D -> 3.
3. **Check.** Skip 4 nibbles, then the next 8 must all be A or 5. This sets the
   line's `sync_ok`.

A run takes 71 BCs. `sync_done` is the AND over all lines. The results are copied
into the phase and delay registers, which software may later overwrite.

With calibrated lines, a crossing's nibble sits on the converter outputs after the
second `clk40` edge that follows the start of its first bit.

## BC multiplexing and error detection

Each 10-bit field has three parts:

- 8 data bits;
- an odd-parity bit;
- a BC-multiplexing flag.

The field carries two towers (A and B) over two consecutive crossings, because a
real energy deposit is followed by an empty crossing. An empty slot is the value
`0x100` (zero data, parity 1).

`bc_demux` tracks a phase bit: an empty slot sets it to 1, and it toggles on every
other slot. From the phase and the flags of the previous, current and next slot it
decides which tower the current slot is:

| phase | flag | previous flag | result |
|-------|------|---------------|--------|
| 0 | 0 | – | slot is A; B is taken from the next slot if its flag is 0 |
| 0 | 1 | – | slot is B |
| 1 | 1 | 1 | slot is A |
| 1 | 1 | 0 | slot is B |

Everything else yields zero towers. With multiplexing off (control bit 0), the field
goes straight to tower A.

Parity errors:

- A slot with bad parity is zeroed, and so is the first slot of a pair whose second
  slot is bad.
- Every slot after an error is zeroed until the next empty slot, which re-locks
  the pairing.
- Each channel sets a bit in the 42-bit error register.
- A saturating 16-bit counter counts crossings with any error. The `error` pin is
  high while that counter is non-zero.
- An error mask bit disables the check for a channel.
- A link mask bit forces a channel's towers to zero.

Line layout: each 2 x 2 tower group of a layer uses 5 lines. Lines 0-3 carry the
high and low nibbles of the group's two fields. Line 4 carries their parity and
flag bits. The three tower pairs of the last eta column use 3 lines each. The
line-to-bit assignment is this design's own (see `demux_array.sv`).

## The algorithm (cp_algorithm, cluster_window, roi_group)

For each of the eight 4 x 4 x 2 windows, `cluster_window` computes the following
(inner 2 x 2 towers = the "core"):

- **em cluster sums**: the four horizontal and vertical pairs of core em towers,
  each saturated at 255.
- **tau sums**: each em pair plus the sum of the four had core towers, saturated
  at 255.
- **isolation sums**, each saturated at 63:
  - the 12 em towers of the ring around the core;
  - the 12 had ring towers;
  - the 4 had core towers.
- **de-cluster test** (local maximum): the em+had core sum must not be beaten by
  any of the eight overlapping 2 x 2 clusters in the window. It compares with >=
  against the neighbours at offsets (0,0), (1,0), (2,0) and (0,1), and with >
  against (2,1), (0,2), (1,2) and (2,2). Because the test is asymmetric, two equal
  neighbouring maxima cannot both pass.
- **16 threshold sets**. Each set has an 8-bit cluster threshold and three 6-bit
  isolation limits (em ring, had ring, had core).
  - Sets 0-7 are em sets. They pass if any em pair is greater than the threshold,
    all three isolation sums are within their limits, and the de-cluster test
    passes.
  - Set 8+k is a tau set when control bit 8+k is 1. It then uses the tau sums
    instead and ignores the had-core limit.

The windows form two groups: L (reference towers 11, 12, 21, 22) and R (13, 14,
23, 24). `roi_group` picks the passing window with the largest core sum (ties go
to the lower index) and builds the 20-bit RoI record:

```
[19:18] position in the group {phi, eta}   [17] error   [16] saturation   [15:0] passed thresholds
```

- If no window passed, the position and threshold bits are zero.
- The saturation flag is set if any tower the group reads (rows 0-4; columns 0-4
  for L, 2-6 for R) is 255.
- The error flag is set if any of those towers came from a channel in error.
- `hits[2t+1:2t]` is the number of groups (0, 1 or 2) that passed set t.

There are two pipeline stages:

1. Window results and flags are registered.
2. RoIs and hits are registered.

**Latency**: hits leave the chip 6 `clk40` edges (150 ns) after the first serial
bit of the crossing arrived: 2 edges capture, 2 de-multiplexing, 2 algorithm.

## RoI read-out (roi_readout, readout_seq, dpram, roi_fifo, roi_shiftreg)

Every BC, the pair {R, L} (40 bits) is written into a 128 x 40 dual-port RAM at the
write counter. Both 7-bit counters advance every BC.

- `rst_load` clears the write counter and loads the read counter with the Offset
  register. From then on, read = write + offset (mod 128).
- Set the offset to minus the delay between the RoI write and the arrival of the
  `en_readout` request for that crossing. The testbench uses -10.
- When `en_readout` is seen, the RAM word at the read counter is pushed into a 64 x 40
  FIFO on the next clock. A push into a full FIFO is dropped.
- `fifo_ef` and `fifo_ff` are the FIFO's empty and full flags.
- `load_shift` pops the FIFO head into two 20-bit shift registers. These shift every
  BC, MSB first, onto `roi_data_l` and `roi_data_r`, and shift in zeros afterwards.

Over the bus, the RAM and FIFO contents can be read and written as three lanes each
(bits 15:0, 31:16 and 39:32). RAM reads by the bus are served only while no
read-out request is being handled.

## Slow control (cp_regs)

The bus is synchronous to `clk40` and uses these signals:

- `cs_n`, `rw_n` (high = read), `strobe`;
- a 10-bit word address `addr`;
- 16-bit `data_in` and `data_out`, plus `data_oe` to drive the bidirectional pad.

A write takes effect on the clock after a rising strobe. Read data are valid two
clocks after the address.

| address | contents |
|---------|----------|
| 000 | version |
| 001 | control: bit 0 BC multiplexing on, bits 15:8 make sets 8-15 tau sets |
| 002 | status: 0 FIFO empty, 1 FIFO full, 2 error pin, 3 all lines in sync, 4 scan recording |
| 003 | error counter |
| 004 | RAM counters: read 6:0, write 14:8 |
| 005 | offset |
| 008-00A | error mask, 42 channels |
| 00C-00E | error register: write 1 to clear a bit; any write also clears the counter |
| 010-012 | link mask |
| 020-02F | cluster thresholds, sets 0-15 |
| 040-06F | isolation limits, word 3*set + {0 em ring, 1 had ring, 2 had core} |
| 080-095 | clock phase, 5 lines x 2 bits per word |
| 0A0-0B5 | clock delay, same layout |
| 0C0-0CA | sync OK, 10 lines per word |
| 0D0 | scan: a read returns the next word; a write restarts at word 0 |
| 100-17F / 180-1FF / 200-27F | RAM lanes 15:0 / 31:16 / 39:32 |
| 280-2BF / 2C0-2FF / 300-33F | FIFO lanes, same split |

Channel numbering for the three mask and error words: channel n sits at bit n-1
of the 48-bit span. For the em layer:

- 2 x 2 group g gives channels 2g+1 and 2g+2;
- column pair p gives channel 19+p.

The had layer channels are the em numbers plus 21.

`scan_path` helps with setting up the links. A rising `en_scan` records the 432
synchronised input bits of the next 16 crossings. Software then reads them 27 words
per crossing.

## How far to trust it, and where it departs from the specification

Every block has a self-checking testbench. These testbenches compare against models
written separately from the RTL, and include an integer reference of the window
algorithm (`tb_ref_pkg`). The end-to-end test `tb_cp_chip` runs the full-size chip
with default parameters through these steps:

1. Serial links with skew and jittery bit edges.
2. Calibration.
3. Programming over the bus.
4. 150 BC-multiplexed events. Every crossing's hits are compared with the reference.
5. Read-out of RoIs, including a burst that fills the FIFO.
6. A parity error.
7. A scan recording.
8. A stretch with BC multiplexing switched off.
9. Reset-Global.

It takes a few seconds.

Departures and choices the specification leaves open:

- **Clock generation**: the DLL, boundary scan (JTAG), I/O pads and RAM BIST are not
  included. The four clock phases come in as ports.
- **Hit coding**: the hit pins carry a 2-bit count per threshold set.
- **De-cluster test**: the asymmetric >= / > rule above is used.
- **Scan path width**: 432 bits per crossing, the real input width. The
  specification quotes a larger figure for the scan register.
- **Own choices**: the register addresses and bit layouts, the line-to-field
  mapping, the tie rules, the flag regions of the RoI groups and the bus timing.
- **Reset/Load**: clears the write counter and loads the read counter with the
  offset. The specification also has a sentence that can be read the other way
  round.

## Simulating

Verilator 5 is enough. For example, the full chip test:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cp_pkg.sv tb/tb_ref_pkg.sv tb/tb_cp_chip.sv --top-module tb_cp_chip
./obj_dir/Vtb_cp_chip
```

It prints `TB_RESULT checks=... failures=0` and a count of each mechanism it
exercised. Every block has its own test: replace `cp_chip` with the module name,
e.g. `tb_cluster_window`.
