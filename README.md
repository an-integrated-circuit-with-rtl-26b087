# Transmit-beamforming front end for a 16 × 16 ultrasound array

A two-dimensional array of 16 × 16 ultrasound transducer elements can steer
and focus a beam in three dimensions. To do that, each of its 256 elements
must fire at its own moment. Running 256 cables up a catheter or a probe
handle to do this is impractical. This design moves the timing onto a chip
that sits directly under the array, one circuit per element. Each element
stores its own 8-bit transmit delay. The system then broadcasts a single
8-bit count, and every element fires when that count reaches its stored
value. The cables reduce to 16 serial lines for loading delays, a two-phase
shift clock, the 8-bit count, a reset, a pulse-width bias and a 6-bit
receive-aperture select. Sixteen analog receive channels come back.

For receive, the chip has only 16 amplifiers, one per column of the array.
A decoder picks one element in every column. Together the 16 picked
elements form one of these receive apertures:

- a whole row (any of the 16);
- the main diagonal;
- the other diagonal.

Receiving on the two diagonals, one after the other, gives an X-shaped
aperture. Pairing full-array transmit with that X-shaped receive is the
intended imaging mode.

The SystemVerilog describes the chip, `frontend_ic`, and a system-side
sequencer, `acq_sequencer`, that drives the chip through the steps of one
image acquisition. `us3d_probe_top` joins the two. The digital parts are
synthesizable RTL. These are the shift registers, the comparators, the
aperture decoder, the sequencer and its Gray-code counter. The analog parts
are behavioural models: the one-shot, the 25 V pulser, the high-voltage
switch and the preamplifier.

## The transmit cell

Every element has the same cell (`tx_cell`). Its parts, in signal order:

```
 delay out of the        +-------------------+  dl[7] = delay out to the next cell
 cell to the left ------>| 8-bit two-phase   |----------------------------------->
 clk_ph1, clk_ph2 ------>| shift register    |
                         +---------+---------+
                                   | dl[7:0] (Gray code)
                         +---------v---------+      +----------+    +--------+
 count[7:0] (Gray) ----->| 8-bit comparator, |eq_n  | one-shot |    | 25 V   |  pad
 reset ----------------->| precharged, sticky|----->| (bias I) |--->| pulser |------> element
                         +-------------------+      +----------+    +--------+
 rx_sel (from decoder) -----------------------------> HV switch: element --> column amplifier
```

### Shift register and delay chain

Each bit of `tx_shift_register` is a pair of latches. The master latch is
transparent while `clk_ph1` is high. The slave latch is transparent while
`clk_ph2` is high. The two phases must never be high at the same time; an
assertion checks this. A ph1 pulse followed by a ph2 pulse moves every bit
one place:

- serial data enters `dl[0]`;
- `dl[7]` leaves the cell and feeds the next cell in the same row.

Each row's 16 cells form one 128-bit chain, fed by one line. The 16 rows
load in parallel. The cell farthest from the input (column 15) must be
sent first, and each word is sent most significant bit first.

At a 100 MHz shift rate a full load takes 128 × 10 ns = 1.28 µs. That is
short compared with an ultrasound receive window. The sequencer makes the
two phases from a 400 MHz system clock, with four cycles per bit:

| cycle | `dl_in`    | `clk_ph1` | `clk_ph2` |
|-------|------------|-----------|-----------|
| 0     | next bit   | 0         | 0         |
| 1     |            | 1         | 0         |
| 2     |            | 0         | 0         |
| 3     |            | 0         | 1         |

Lint tools report the master → slave → next-master path as a combinational
loop. It is not one, because the two phases are never transparent
together.

### Comparator: precharged and sticky

`tx_comparator` compares the stored word with the global count bit by bit.
Its output `eq_n` works like a precharged node:

- While `reset` is high, `eq_n` is forced high (precharged).
- After `reset` falls, the first count value equal to the stored word
  pulls `eq_n` low.
- `eq_n` then stays low whatever the count does, until the next reset.

So every element fires exactly once per count sweep. In the RTL this node
is a latch.

The count is a Gray code because the comparator has no clock. Between two
Gray-code values only one bit changes, so the compare never passes through
a value that was not on the count lines. A binary count that changes
several bits at once could create a brief false match and fire the wrong
elements.

### One-shot and pulser

The falling edge of `eq_n` starts a one-shot. Its pulse width comes from a
bias current that charges a 1.5 pF capacitor up to an inverter threshold.
All elements share one bias, set to suit the transducer's centre frequency.
The model uses

    width = C · V_trip / I = 1.5 pF × 2.5 V / I  →  3750 / I[µA] ns

so 50 µA gives 75 ns and 18 µA gives 208 ns. A larger current gives a
shorter pulse. The 2.5 V threshold is an assumed value; it is half of the
5 V supply. The bias is an 8-bit port in µA, standing in for the analog
bias line.

`hv_pulser` then drives the element's pad to 25 V for the length of the
pulse. It models a fixed 5 ns propagation delay, which is an assumed value.

### Timing of one transmit

The comparators are reset with the count at the first value of the sweep,
which is 0 for a full sweep. After that, each step of `CNT_DIV` clock
cycles advances the count by one. With the defaults a step is 4 cycles, or
10 ns. In a full sweep, an element with delay `d` shows a pad pulse
beginning `d × 10 ns + 5 ns` after the reset falls.

The count does not have to start at 0. The system may step only through
the range where pulses are wanted, with any spacing between steps. This
puts no limit on how far apart two elements' pulses can be. The sequencer
supports this with its `cnt_lo` and `cnt_hi` inputs.
`tb_workload_partial_count` drives the chip pins directly and steps the
count from 135 to 145 only, 200 ns per step. An element whose delay lies
outside the sweep does not fire. Its comparator therefore stays armed, and
it may fire during the next load.

The comparators hold arbitrary states at power-up. During the first load
after power-up, some of them can therefore fire as their registers are
rewritten. After any complete sweep, every comparator has fired and stays
quiet during the next load until the reset comes. This is why the
procedure loads first and resets second.

## Receive apertures

`rx_aperture_decoder` turns the 6-bit select `ap` into one select per
element. `col_sel[j][i]` closes the switch between element (row `i`,
column `j`) and amplifier `j`. The encoding is this design's own choice
(`us_pkg::ap_sel_t`):

| `ap[5:4]` | shape           | element used in column `j` |
|-----------|-----------------|----------------------------|
| `00`      | row `ap[3:0]`   | `(ap[3:0], j)`             |
| `01`      | main diagonal   | `(j, j)`                   |
| `10`      | other diagonal  | `(15 − j, j)`              |
| `11`      | none            | all switches open          |

Rows are counted from the top of the array and columns from the left. In
`frontend_ic` the outputs of a column's 16 switches are wired together. At
most one of them is closed, so the amplifier sees one element.

`preamp` models the transimpedance amplifier, whose feedback resistor is
430 kΩ. It outputs `−430 kΩ × current` while `amp_en` is high, and 0 V
while powered down.

The analog node at each pad carries both the outgoing pulse and the
incoming echo. A logic simulator cannot solve that shared node, so it is
split into two ports:

- `pad_v`: the pulser output, in volts;
- `elem_i`: the echo current from the element, in amps.

## The acquisition sequence

`acq_sequencer` runs these steps for each of `num_beams` beams:

1. **LOAD**: shift the beam's delays into all 256 cells. This takes 512
   cycles, which is 1.28 µs at 400 MHz.
2. **RESET**: precharge the comparators with the count at `cnt_lo`, for
   `RST_CYCLES` cycles.
3. **FIRE**: step the Gray count from `cnt_lo` to `cnt_hi`, one step every
   `CNT_DIV` cycles. The full sweep is 0 to 255.
4. **RX**: apply the beam's receive aperture and power the amplifiers, for
   `RX_CYCLES` cycles.

The amplifiers are powered at the first receive window and stay on until
the run ends. Outside RX the aperture is "none". `done` pulses for one
cycle at the end of the run.

With `load_in_rx` high, the next beam's delays are shifted in during the
current receive window. RX then leads straight to RESET, which saves
1.28 µs per beam. The receive window lasts at least as long as the load. A
load during reception fires nothing as long as every delay lay inside the
sweep, because every comparator has then already fired. The cost is digital switching activity while
the weak echoes are being amplified.

A separate engine inside the sequencer performs the loads, so loading can
run alongside the main sequence.

The delay memory belongs to the system and sits outside this design. The
sequencer asks for one column at a time with `dly_beam` and `dly_col`. In
the same cycle it reads `dly_val[i]`, the binary delay of element
(`i`, `dly_col`). It converts each value to Gray code itself.
`beam_ap` must give the aperture of beam `dly_beam`.

## Files

| file | role |
|------|------|
| `rtl/us_pkg.sv` | sizes (16 × 16, 8 bits), aperture types, Gray-code functions |
| `rtl/us3d_probe_top.sv` | top: sequencer + chip |
| `rtl/acq_sequencer.sv` | system-side acquisition sequence, phase generation |
| `rtl/gray_counter.sv` | global 8-bit Gray-code counter |
| `rtl/frontend_ic.sv` | the chip: 16 × 16 cells, row chains, decoder, column lines, 16 preamps |
| `rtl/tx_cell.sv` | one element's transmit circuit |
| `rtl/tx_shift_register.sv` | two-phase latch shift register |
| `rtl/tx_comparator.sv` | precharged, sticky equality comparator |
| `rtl/rx_aperture_decoder.sv` | 6-bit aperture code to switch selects |
| `rtl/one_shot.sv`, `rtl/hv_pulser.sv`, `rtl/hv_switch.sv`, `rtl/preamp.sv` | behavioural models of the analog parts |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_workload_partial_count.sv` | count stepped through 135..145 only, row loaded at 50 MHz |

The behavioural models use `real` ports, `#` delays and `fork`, so they
simulate but do not synthesize. The synthesizable logic is
`tx_shift_register`, `tx_comparator`, `rx_aperture_decoder`,
`gray_counter` and `acq_sequencer`. `tx_cell`, `frontend_ic` and
`us3d_probe_top` contain the models and are for simulation. A synthesis
flow would replace the models with the real analog cells.

## Simulating

Verilator 5 with timing support is needed. Each testbench prints
`TB_RESULT checks=N failures=M`. Each one also has a watchdog that fails
the run if it hangs. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/us_pkg.sv tb/tb_us3d_probe_top.sv --top-module tb_us3d_probe_top -o sim
./obj_dir/sim
```

Replace `us3d_probe_top` with any other module name to run that module's
testbench.

`tb_us3d_probe_top` runs the whole design at its default size: 256
elements and 400 MHz. It makes two runs:

- three beams, one per aperture shape, with full sweeps and focused delay
  patterns that include delays 0 and 255;
- two beams, each loaded during the previous receive window, with the
  count swept over 100..180 only.

The test checks:

- the 1.28 µs load;
- that every element pulses exactly once per beam, at the expected time,
  with the expected width;
- that no element pulses while a later beam is loading;
- that all 16 channels carry the right element's signal for each
  aperture;
- that the amplifiers switch on and off.

It also prints how often each mechanism occurred, and fails if one never
did. The run takes well under a second.

To change the size, set the parameters `NE` (elements per side) and `W`
(delay bits) on `us3d_probe_top`, `frontend_ic` and `acq_sequencer`. The
aperture type in `us_pkg` is fixed at 6 bits, with 4 bits for the row
number, so row apertures address at most 16 rows.

## What is assumed, and what is left out

These come from the published chip:

- the cell structure and its connections;
- the two-phase latch bit;
- the 8-bit width;
- the sticky precharged comparator with its reset;
- the Gray-code count;
- one amplifier per column behind high-voltage switches;
- the 6-bit aperture select choosing a row or a diagonal;
- the 1.5 pF one-shot capacitor;
- the 430 kΩ feedback resistor;
- the 25 V pulse;
- the order of the acquisition steps;
- loading during reception;
- sweeping only part of the count range.

These are this design's own choices:

- the aperture code assignment, including the "none" code;
- the active-high reset;
- which end of a register the serial data enters;
- reflected binary Gray code;
- the 400 MHz clock and four cycles per shifted bit;
- `CNT_DIV`, `RST_CYCLES` and `RX_CYCLES`;
- the delay-source interface;
- the `cnt_lo`/`cnt_hi` and `load_in_rx` controls;
- the one-shot threshold of 2.5 V;
- the pulser delay of 5 ns;
- ideal switches and amplifiers;
- a separate amplifier-enable pin.

These are not built:

- **Output buffers.** The chip has a row of 16 buffers after the
  preamplifiers, but no gain or circuit is specified for them. `rx_out` is
  the preamplifier output.
- **Tiling.** Two sides of the chip have no bond pads, so four chips can
  tile a 32 × 32 array. That is a board-level arrangement with no extra
  logic, and it is not simulated.
- **Analog detail.** The models do not include amplifier noise, bandwidth
  or clipping, pulser rise times, the extra capacitance of the shared
  column line, or power.
