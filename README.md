# ROC chip digital interface with power-pulsed clocks

This RTL covers the digital interface of a family of calorimeter read-out
front-end chips ("ROC" chips) and the board that chains them together.
Such chips sit in a detector with a beam structure like the ILC's: a short
bunch-crossing train, then a long quiet gap. A chip is busy for under about
5 ms out of each 200 ms cycle:

| phase       | who drives it                         | length                      |
|-------------|---------------------------------------|-----------------------------|
| acquisition | DAQ, all chips at once                | about 1 ms                  |
| conversion  | DAQ, all chips at once                | up to 103 us (12-bit ramp at 40 MHz) |
| readout     | one chip after another (daisy chain)  | up to about 4 ms per chip at 5 MHz |

Two ideas shape the design:

1. **Power pulsing of the digital part.** The clock LVDS receivers and the
   clocks they deliver are switched on only while the chip is working. In
   the readout phase, the longest of a cycle, only the chip
   that holds the readout token is clocked. The **POD** (Power On Digital)
   block does this. It is the most delicate part of the design.
2. **Surviving a dead chip on a long chain.** Every serial chain has a
   bypass. This covers the readout token, the slow-control shift registers
   and the shared Data/TransmitOn bus drivers. A broken chip can then be cut
   out with configuration bits and board jumpers.

Some smaller fixes are included too:
- the slow-control and probe registers share one set of pads;
- the registers come out of reset with a useful default;
- the chip-to-chip shift hop has half a clock period of timing margin;
- the memory is limited to 127 frames, so that its pointer cannot wrap;
- the chip never reads out an unwritten frame;
- the memory-full signal is called ChipSat;
- StartAcquisition acts on its level.

## Hierarchy

```
roc_slab                      board: NCHIP chips, chains, bus lines, jumpers
 ├─ sc_jumper  (NCHIP+1)      PCB jumper in the slow-control chain
 └─ roc_chip   (NCHIP)        one chip
     ├─ sc_pad_mux            shared SC / probe pads, Select line
     ├─ sc_shift_reg  x2      SC register (17 bits), probe register (8 bits)
     ├─ lvds_receiver x4      fast clock, slow clock, RazChn/NoTrig, ValEvt (behavioural)
     ├─ pod           x2      one per clock receiver (fast 40 MHz, slow 5 MHz)
     ├─ ro_bypass             StartReadOut / EndReadOut switches
     ├─ sro_lowpass_filter    glitch filter on StartReadOut before the PODs (behavioural)
     ├─ conv_timer            conversion timing, fast clock
     ├─ acq_readout_ctrl      memory, ChipSat, serial readout, slow clock
     └─ bus_buffer    x2      two removable buffers each on Data and TransmitOn
roc_pkg                       SC word struct, frame sizes, jumper enum
```

All of it is synthesizable except two behavioural models of analog parts:
- `lvds_receiver`, a receiver with a start-up delay;
- `sro_lowpass_filter`, an RC filter.

Their delays are the only timing constructs used in `rtl/`.

## One operating cycle

The DAQ waveform for one cycle (all chips see the same DAQ signals):

```
Resetb         ‾‾\____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
PowerOnDigital ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________________________
StartAcq       ________/‾‾‾‾‾‾‾‾\___________________________________________________
StartConv_b    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
ChipSat        ________________/‾‾‾‾‾‾‾‾‾‾‾\______________________________________
StartReadOut   ____________________________________/‾‾‾‾\___ (to chip 0) _______
clocks         ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____/‾‾‾ chip 0 ‾‾\___ ... ___
```

1. **Reset with PowerOnDigital.** The DAQ raises PowerOnDigital while it
   holds Resetb low. The receivers start at once. The reset must be longer
   than the receiver start-up time, so the logic leaves reset with a clock.
   The SC and probe registers share a reset pad of their own, separate from
   the chip reset, so the chip configuration survives the reset before each
   acquisition. (Keeping the two resets apart is this design's choice.)
2. **Acquisition.** While StartAcquisition is high, every slow clock with
   `trigger` high stores one frame. A frame is 160 bits:

   | bits   | content                                          |
   |--------|--------------------------------------------------|
   | 8      | chip ID                                          |
   | 24     | bunch-crossing ID (clocks since the acquisition started) |
   | 128    | hit bits (64 channels x 2 discriminators)        |

   After 127 frames the chip raises ChipSat and ignores further triggers.
   The DAQ can watch ChipSat and stop the acquisition.
3. **Conversion.** When StartAcquisition falls, ChipSat goes (or stays)
   high. The DAQ pulses StartConversion_b low. `conv_timer` counts 2^12
   fast clocks, which is 102.4 us. ChipSat then falls.
4. **Clocks off.** The DAQ drops PowerOnDigital. Each chip stops its
   receivers and clocks within two ticks.
5. **Readout.** The DAQ's StartReadOut goes to chip 0. That chip powers up
   and sends its frames on Data, with TransmitOn high. It then raises
   EndReadOut for 8 slow clocks and powers down. Its EndReadOut is the next
   chip's StartReadOut, and so on along the chain. The EndReadOut of the
   last chip goes back to the DAQ.

Two more receivers, for RazChn/NoTrig and ValEvt, are biased only while
PowerOnAnalog is high (during the bunch crossings). Their outputs are chip
ports that feed the analog front end.

## Power On Digital (`pod`)

There is one POD behind each clock receiver. Its outputs are:

```
StartLVDS    = acq_enable | readout_request          (receiver bias)
EnableClock  = acq_enable | readout_enable
ClkOut       = Clkin & EnableClock
```

Every enable changes on the **falling** edge of Clkin, while Clkin is low.
The AND gate therefore never makes a short clock pulse; the testbench
measures every ClkOut phase to check this. When the receiver is off, Clkin
is low, so nothing clocked by Clkin moves. Each path below is built so that
it does not need a clock to start.

**Acquisition / conversion path.** This is a two-flip-flop chain. PowerOnDigital
*sets* it asynchronously, which starts the receiver and enables the clock at
once. When PowerOnDigital falls, the zero shifts through the chain on two
falling edges. The receiver and the clock then stop together, two ticks
later at most. A set flip-flop left over from power-up keeps the receiver
alive just long enough to clear itself, so this path needs no reset.
PowerOnDigital held high forces the clock on, whatever the readout path does.

**Readout path.** This is a small state machine on the falling edge of
Clkin, reset by `Rstb AND enable`:

```
IDLE --sync(SRO)=1--> ARMED --sync(SRO)=0--> START --> RUN --ERO seen--> ENDING --ERO gone--> IDLE
                                    (enable clock) (StartReadOutInt)           (release clock)
```

- A StartReadOut edge starts the receiver *combinationally*: there is no
  clock yet.
- StartReadOut is then synchronised by two flip-flops. The clock is
  enabled only after the synchronised pulse has ended. The next falling
  edge produces a one-clock `StartReadOutInt`, which starts the chip's
  readout.
- EndReadOut is sampled on the rising edge of ClkOut. The clock is
  released only once the EndReadOut pulse has ended, so a chip stays
  clocked until it has finished handing the token on.

This gives two timing rules for whoever drives the chain:

- **StartReadOut must outlast the receiver start-up time** plus about two
  clock periods. Otherwise the synchroniser never sees the pulse. Inside the
  chain, StartReadOut is the previous chip's EndReadOut, which is why
  `acq_readout_ctrl` stretches EndReadOut to `ERO_CYCLES` = 8 slow clocks
  (1.6 us). With the model's 500 ns start-up, that leaves margin. The real
  start-up time is calibrated on silicon. If it is longer, raise
  `ERO_CYCLES`.
- The fast-clock POD sees the same StartReadOut and EndReadOut. Its
  synchroniser is eight times faster, so the fast clock starts first and
  stops first.

Two configuration bits change the POD's behaviour:

- **`enable = 0`** holds the readout path in reset. The clock then runs
  only under PowerOnDigital.
- **`use_ext_sro = 1`** passes StartReadOut straight through as
  StartReadOutInt. This is the behaviour of chips without a POD. It needs
  the clock to be forced with PowerOnDigital.

**StartReadOut filter.** StartReadOut can wake a sleeping chip with no
clock running, so a spike on it must not count. On silicon it passes
through an analog low-pass filter. `sro_lowpass_filter` models that filter
by its effect:
- it is an inertial delay of `TAU_NS` (50 ns, an assumed value): the
  output follows the input 50 ns later;
- a pulse shorter than 50 ns never reaches the PODs;
- a real StartReadOut arrives 50 ns late, with its width unchanged.

If a longer spike gets through, it only wakes the receivers for a few
clocks, because the synchroniser does not see it. The filter delays
StartReadOut but does not shorten it, so the rule on its length above is
unchanged.

## Readout chain and its bypass (`ro_bypass`, `roc_slab`)

```
           ERO→SRO           ERO→SRO           ERO→SRO
DAQ SRO → [chip 0] ───────→ [chip 1] ───────→ [chip 2] ───────→ [chip 3] → DAQ
   │         │ ERO-B──────────────────→ SRO-B   │ ERO-B ─────────────────→ DAQ
   └──────────────→ SRO-B (chip 1)                ...
```

Each chip has a bypass output ERO-B, wired to the bypass input SRO-B of the
chip two places further on. Three SC bits set the switches:

| to remove chip N           | set on    | bit            |
|----------------------------|-----------|----------------|
| chip N passes SRO to ERO   | chip N    | `ro_self_byp`  |
| or, if chip N is dead:     | chip N-1  | `ro_out_byp` (send EndReadOut on ERO-B) |
|                            | chip N+1  | `ro_in_byp` (take StartReadOut from SRO-B) |

A chip in self-bypass does not start its own readout. The board also wires
the DAQ's StartReadOut to SRO-B of chip 1, and the bypass outputs of the last
two chips back to the DAQ. The first and the last chip can therefore be
skipped too.

## Slow-control chain (`sc_shift_reg`, `sc_pad_mux`, `sc_jumper`)

**Shift register.**
- `W` flip-flops shift on the rising edge.
- Each flip-flop has either its set or its reset tied to the register
  reset, so reset loads the default pattern `DEFAULT`. Bit 0 is next to the
  input. The module's own default is the 3-bit example "011": first
  flip-flop reset, the other two set.
- One extra flip-flop on the falling edge drives the next chip, which
  captures on its rising edge. The hop between chips therefore has half a
  period of margin, and the chain still moves one bit per clock.
- The SC register is 17 bits and resets to `SC_DEFAULT`.

**Shared pads.** The data in, data out and clock pads are shared by the SC
and probe registers through a Select pad:
- Select is pulled down, so the default is the **probe** register. A
  floating Select can then never disturb the configuration.
- The register that is not selected gets 0 on data and clock, so it holds
  its contents.
- The reset pad reaches both registers.

**Board jumpers.** Each SC input on the board goes through a jumper with
three positions: `JMP_NORMAL` reads chip N-1, `JMP_BYPASS` reads chip N-2,
`JMP_REMOVED` gives 0. One more jumper sits in front of the DAQ's return. To
skip chip N:
- set `jumper[N] = JMP_REMOVED`;
- set `jumper[N+1] = JMP_BYPASS`.

Chip N then shifts in zeros, which turns its POD, its bus buffers and its
bypasses off.

### SC word (`roc_pkg::sc_cfg_t`, 17 bits, bit 0 shifted in last)

| bits  | field          | default | meaning                                     |
|-------|----------------|---------|---------------------------------------------|
| 16:9  | `chip_id`      | 0       | written into every frame                    |
| 8     | `tx_buf1_en`   | 0       | extra TransmitOn buffer on the bus          |
| 7     | `tx_buf0_en`   | 1       | TransmitOn buffer on the bus                |
| 6     | `data_buf1_en` | 0       | extra Data buffer on the bus                |
| 5     | `data_buf0_en` | 1       | Data buffer on the bus                      |
| 4     | `ro_out_byp`   | 0       | EndReadOut on ERO-B                         |
| 3     | `ro_in_byp`    | 0       | StartReadOut from SRO-B                     |
| 2     | `ro_self_byp`  | 0       | pass the token straight through             |
| 1     | `pod_ext_sro`  | 0       | StartReadOutInt = StartReadOut              |
| 0     | `pod_enable`   | 1       | POD readout clock control on                |

To load a chain, shift the word of the chip farthest from the DAQ first,
each word MSB first. The field order and the defaults are this design's own
choice.

## Memory and ChipSat (`acq_readout_ctrl`, `conv_timer`)

**Memory size.** The memory has 128 locations behind a 7-bit pointer but
takes only 127 frames. With 128 frames, a full memory would wrap the pointer
back to "empty". The fault test for this block makes exactly that change,
and the testbench catches it.

**Readout.** The readout sends frames `0 .. count-1`:
- first written first;
- MSB first;
- one bit per slow clock;
- no gap between frames.

A chip that is not full therefore never sends an unwritten frame.
`n` frames take exactly `n × 160` slow clocks. A chip with no frames just
returns EndReadOut.

**ChipSat** is high in two cases:
- during an acquisition, once the memory is full;
- from the end of the acquisition until the conversion timer has finished.

**Conversion timer.** The conversion timer runs in the fast-clock domain.
The controller synchronises its `busy` flag with two flip-flops. The ramp
ADC itself is not modelled.

## Data and TransmitOn buffers (`bus_buffer`)

Each of the two outputs has two buffers, and each buffer has its own SC
switch to the bus. A buffer that sticks the line can be disconnected, and
the other one used instead. `BUF_SPLIT = 0` puts both buffers on one bus
line. `BUF_SPLIT = 1` gives each buffer its own line (`data[1:0]`,
`transmit_on[1:0]`).

The bus is modelled as a wired-OR, and only the chip holding the token
drives it. The electrical bus type, open-drain or tri-state, is not part of
this RTL.

## Parameters

| parameter       | default | where                      | origin |
|-----------------|---------|----------------------------|--------|
| `NCHIP`         | 4       | `roc_slab`                 | own choice |
| `FRAMES`        | 127     | `roc_slab`, `roc_chip`, `acq_readout_ctrl` | 127-frame limit |
| `ADC_W` / `ADC_BITS` | 12 | `conv_timer`             | 12-bit conversion at 40 MHz |
| `ERO_CYCLES`    | 8       | EndReadOut length          | own choice (must exceed receiver start-up) |
| `LVDS_START_NS` | 500     | receiver model             | own choice (calibrated on silicon) |
| `SRO_FILTER_NS` | 50      | `roc_chip`, StartReadOut filter | own choice (filter required, no value given) |
| `BUF_SPLIT`     | 0       | bus wiring                 | one of the two wirings |
| frame layout    | 8+24+128 | `roc_pkg`                 | usual ROC frame, own choice |

## Against the timing budget

- **Readout.** A full chip takes 127 × 160 clocks × 200 ns = 4.064 ms of
  readout, plus 1.6 us of EndReadOut. That is about the "max 4 ms" budget
  of a HARDROC-type chip. The exact number depends on the 160-bit frame,
  which is an assumption.
- **Conversion.** 4096 × 25 ns = 102.4 us, which is within 103 us.
- **Total working time.** Acquisition, conversion and a full readout add up
  to about 5.2 ms. That is slightly above the "< 5 ms" quoted for one chip.
  The budget's own phase numbers (1 + 0.103 + 4 ms) also add up to more
  than 5 ms, so read it as approximate.
- **Measured.** Over a whole 200 ms period with four full chips, each
  chip's clocks are on for 5.174 ms, a 2.6 % duty cycle. The receivers are
  on a few microseconds longer, because they start before the clock is
  enabled. Reading the four chips takes 16.26 ms.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if
something hangs. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_roc_slab -y rtl -y tb rtl/roc_pkg.sv tb/tb_roc_slab.sv
./obj_dir/Vtb_roc_slab
```

Replace `tb_roc_slab` with any other testbench name. `--timing` is needed
for the receiver model and the testbenches. The simulator is two-state, so
every testbench resets what it reads.

| testbench               | what it shows |
|-------------------------|---------------|
| `tb_roc_slab`           | The whole slab at default sizes, two full cycles. Cycle 1: SC chain loaded and read back, probe mode, one chip overfilled (ChipSat while acquiring), conversion, clocks stopped, readout of all chips in order with every frame checked, idle chips clocked off, a StartReadOut glitch ignored. Cycle 2: chip 1 declared dead and removed from both chains, chip 3 self-bypassed, chip 0 on its extra buffers. Counts every mechanism and fails if one never happened. Runs in under a second. |
| `tb_ilc_cycle`          | One whole 200 ms period at default sizes, every chip filled: 1 ms acquisition with bunch-crossing IDs checked, conversion, 4 × 4.064 ms readout, then 195 ms idle. Measures how long each chip's clocks and receivers are on (5.17 ms each, 2.6 % duty cycle) and checks that no chip is clocked outside the common phases and its own readout. Takes about 20 s. |
| `tb_roc_chip`           | One chip: StartReadOut glitch ignored, pads, SC read-back, PowerOnAnalog receivers, 102.4 us conversion, clocks stop within two ticks, readout frames, fast clock stops before the slow one. |
| `tb_pod`                | Asynchronous start, synchronous release within two ticks, no clock glitch, enable after StartReadOut ends, one StartReadOutInt, hold through EndReadOut, disabled and pass-through modes. |
| `tb_acq_readout_ctrl`   | Exact frames including the bunch-crossing ID, 127-frame limit, 127 × 160 clocks readout, no gap, ChipSat sequence, empty readout. |
| `tb_conv_timer`         | 3-clock latency, 4096-clock conversion, restart ignored. |
| `tb_sc_shift_reg`       | Default "011", shifting, falling-edge output. |
| `tb_sc_pad_mux`, `tb_ro_bypass`, `tb_bus_buffer`, `tb_sc_jumper` | Exhaustive truth tables. |
| `tb_sro_lowpass_filter` | Single glitches and bursts from both levels rejected, long pulses passed after one time constant, width kept, random pulse widths. |
| `tb_lvds_receiver`      | Silent during start-up, follows the input, stops at once. |

## Limits and departures

- **Analog parts.** The front end, the discriminators and the ramp ADC are
  not modelled. The low-pass filter on StartReadOut is modelled only by its
  effect (a 50 ns inertial delay), not as an RC circuit. The chip takes `trigger`
  and `hit` as inputs in step with the slow clock. The receivers are a
  behavioural model with a fixed start-up time.
- **Own choices.** The following are this design's own and can be changed
  freely:
  - the SC field layout, its default, and the probe register width;
  - the frame layout and the readout order;
  - the EndReadOut length;
  - the number of chips on the slab;
  - the wired-OR bus model.
- **Left unspecified.** The POD's exact cycle timing is this design's own,
  within these constraints: asynchronous start, synchronous stop on the low
  clock phase, release within two ticks, and the start and stop order of
  the fast and slow clocks. The width of StartReadOutInt is also its own.
- **Reset between acquisitions.** A chip whose readout never came stays
  waiting for it. The reset the DAQ gives before every acquisition clears
  it.
