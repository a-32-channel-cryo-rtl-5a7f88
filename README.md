# Picosecond time-tagging readout core for a 32-channel SNSPD array

Superconducting nanowire single-photon detectors (SNSPDs) can fix the arrival
time of a photon to a few picoseconds. Large arrays are hard to build
because every nanowire needs a bias current, a quench path, an amplifier and
a timing measurement. This RTL is the digital core of a cryogenic readout
chip with 32 readout channels and 5 bias-only channels. It turns the
discriminated pulse of each readout channel into a timestamp with a 5 ps step
and sends the timestamps out on four 1 Gb/s differential lanes. It also holds
the settings of the analog channels, which a host writes over a slow serial
interface.

The architecture follows the paper "A 32-Channel Cryo-CMOS ASIC for SNSPD
Biasing and Readout with Picosecond Timing" (22 nm FD-SOI, 4 K). That paper
gives the block structure, the channel counts, the fine-TDC schematic and the
time-tagging scheme. It does not give the packet format, the register map,
the serial protocol or the clock frequencies. Those are this design's own
choices, and each one is marked as such below and in the header comment of
its file.

## Block structure

```
 i_event[31:0] ──► 32 x ┌───────────────────┐ sample, dout, valid ┌────────────────┐ count, dout, valid ┌───────────────────┐ frame ┌─────────────┐
                        │ vernier_delay_line│────────────────────►│ tdc_aggregator │───────────────────►│ readout_subsystem │──────►│ hsio_driver │──► sdata_p/m[3:0]
                        │ + tdc_logic       │                     │ (coarse count) │                    │ FIFOs, arbiter,   │◄──────│ 4 lanes     │
                        └───────────────────┘                     └───────▲────────┘                    │ frame builder     │ load  └─────────────┘
                                                                          │ i_cclk                      └─────────▲─────────┘
                                                          ┌───────────────┴──┐                                    │ config / status
  gppi_cclk ◄─────────────────────────────────────────────│ clock_controller │         ┌──────────┐   ┌───────────┴──┐
                                                          └──────────────────┘         │ prog_    │◄─►│ csr_regs     │──► bias / impedance codes
  gppi_clk, gppi_sel, gppi_sdi ──► / gppi_sdo ◄──────────────────────────────────────► │ interface│   │ 5120 bytes   │    of the analog channels
                                                                                       └──────────┘   └──────────────┘
```

| File | Role |
|---|---|
| `rtl/snspd_pkg.sv` | Sizes, frame types, register map, shared structs |
| `rtl/vernier_delay_line.sv` | **Behavioural model** of the analog Vernier delay line (not synthesizable) |
| `rtl/tdc_logic.sv` | Start/stop flops, code capture, self-timed re-arm, output register of one fine TDC |
| `rtl/therm2bin.sv` | Thermometer-to-binary decoder |
| `rtl/tdc_aggregator.sv` | Shared 8-bit coarse counter; pairs each fine code with its coarse count |
| `rtl/clock_controller.sv` | Counter clock that marks coarse-counter rollovers |
| `rtl/readout_subsystem.sv` | Per-channel FIFOs, arbitration, frame assembly, diagnostic injection |
| `rtl/hsio_driver.sv` | Four-lane serializer with complementary outputs |
| `rtl/csr_regs.sv` | Control and status registers |
| `rtl/prog_interface.sv` | Serial programming interface |
| `rtl/snspd_readout_top.sv` | Top level |

The following parts are not modelled: the analog front end of each readout
channel (bias current source, quench impedance, low-noise amplifier), the
bias channels, the PLL, the pads and the supply domains. The PLL output is
the top's `i_hsclk` input. The discriminated front-end outputs are the
`i_event` inputs. The analog settings come out as the `o_rch_*` and
`o_bch_*` code ports.

## How a timestamp is formed

Time is measured in two parts: a fine part local to each channel and a
coarse part shared by all channels.

**Fine TDC (per channel).** A rising edge on `i_event` sets the start flop.
The next rising edge of `i_hsclk` copies start into the stop flop. The
interval between the two edges, Δt, lies between 0 and one clock period.
Both edges enter a Vernier delay line. Start travels through slow stages
(25 ps in the model) and stop through fast stages (20 ps), so stop gains
5 ps per stage. A latch at each stage records whether start is still ahead.
The result is a thermometer code whose number of ones is ⌊Δt / 5 ps⌋. With
the 1 GHz clock assumed here, one period spans 200 stages, and the fine code
runs from 0 to 200 in 8 bits. In the model, `o_delay_done` rises once both
edges have left the line. The code is then captured and decoded by counting
its ones. Counting ones gives the same result as finding the 1-to-0
transition, and it also tolerates a bubble from a metastable latch.

**Self-timed re-arm.** `i_delay_done` passes through a chain of four
`i_hsclk` flops, which synchronises it to the clock:

* The third stage drives the clear of the start and stop flops. The clear
  resets the delay line, so `done` falls, and the chain then releases the
  clear on its own.
* The cycle in which the third stage is high and the fourth still low is a
  one-cycle strobe. It loads the decoded code into `o_dout`. One flop later
  it becomes `o_dout_valid`, so code and valid change on the same edge.

This structure is drawn in the paper's fine-TDC schematic. The gate types
are this design's reading of it. With the model's delays, the timing is:

| Step | Clock edge after the stop edge *k* |
|---|---|
| `o_dout`/`o_dout_valid` update | *k* + 8 |
| clear released, channel re-armed | after *k* + 10 |

A second rising edge of `i_event` during the measurement is ignored. After
the clear, the channel waits for a new rising edge of `i_event`.

**Coarse TDC (shared).** `tdc_aggregator` counts `i_hsclk` edges in an 8-bit
counter. The paper's timing diagram shows the counter values 0xFE, 0xFF and
0x00. Each channel's stop signal goes to the aggregator as `sample`. On the
first cycle in which `sample` is high, the aggregator latches the count
reached at that stop edge. When the channel's fine valid arrives, count,
fine code and valid leave the aggregator together, one cycle later.

The reported timestamp is the concatenation `{coarse[7:0], fine[7:0]}`. It
means: *the event happened `fine` × 5 ps before the `i_hsclk` edge at which
the coarse counter reached `coarse`*. Counting edges from reset (the first
edge after reset is edge 1), the event time is

    t_event = (256·R + coarse) · T_hsclk − fine · 5 ps

Here R is the number of rollovers. A receiver tracks R with the counter
clock: `clock_controller` raises `o_cclk` exactly when the coarse count
passes zero (edges 256, 512, …), keeps it high for 128 cycles, and brings it
out on the `gppi_cclk` pin. Inside the chip, the rising edge of the counter
clock reloads the coarse counter to the value it must have at that point,
so the two can never drift apart. `CTRL.cclk_en` turns the counter clock on
and off, and a change takes effect only at a rollover.

## Readout: buffering, arbitration, frames

`readout_subsystem` gives each channel a 4-entry FIFO. If a timestamp finds
the FIFO full, it is dropped and counted in a saturating 8-bit drop counter.
Every accepted or dropped event is also counted in an 8-bit event counter.
Channels cleared in the channel mask are ignored.

The serializer takes one 64-bit frame every 16 cycles. At each take, the
next frame is chosen in this order:

1. a pending hit-pattern frame;
2. a pending configuration frame;
3. a timestamp from the channel the arbiter grants;
4. an idle frame.

Two arbitration modes are selected by `CTRL.mode`. The paper names both; how
a channel's priority is set is this design's choice.

* **Fixed priority (round robin), `mode = 0`.** The search starts at the
  channel after the one served last, so every waiting channel is served once
  per turn.
* **Dynamic priority, `mode = 1`.** Each channel has a 4-bit priority
  register, and the highest value is served first. Among equal priorities,
  the lower channel number wins. A high-priority channel that arrives later
  overtakes channels that are already waiting.

**Diagnostic injection.** `INTERVAL` (N) sets how often diagnostic frames
are sent: when `CTRL.inj_hit` or `CTRL.inj_cfg` is set, a hit-pattern and/or
configuration frame is requested every N frames. N = 0 disables injection.

* A hit-pattern frame has one bit per channel that produced an event since
  the previous hit-pattern frame. The first one covers everything since
  reset.
* With `CTRL.parity` set, bit 0 of every frame is even parity over bits
  63..1.

**Frame layout** (this design's choice). Bits 63:62 give the type, bit 0
holds parity (or 0), and unlisted bits are 0:

| Type | Code | Fields |
|---|---|---|
| idle | `00` | none |
| timestamp | `01` | 61:57 channel, 56:41 {coarse[7:0], fine[7:0]} |
| hit pattern | `10` | 61:30 one bit per channel (bit 30 + c for channel c) |
| configuration | `11` | 61:54 CTRL, 53:46 INTERVAL, 45:14 channel mask |

**Serial lanes.** `hsio_driver` sends each frame as four 16-bit slices:

* Lane *l* carries frame bits [16*l*+15 : 16*l*], most significant bit first.
  All lanes run in lockstep at one bit per `i_hsclk` cycle, 1 Gb/s per lane
  at the assumed 1 GHz.
* Each lane drives `sdata_p`/`sdata_m` from flops as a complementary pair.
* `o_frame_load` marks the last bit of a frame. On that edge the next frame
  is taken, and its first bit appears one cycle later.
* The first frame after reset is taken on edge 16, so frame *j* occupies the
  lanes after edges 16*j*+1 … 16*j*+16.

There is no alignment pattern, and idle frames are all zero. A receiver
must find frame boundaries from the reset timing or from the frame
contents. That is a limitation of this design, not something the paper
specifies.

Capacity: one timestamp per frame gives 62.5 M timestamps/s over all
channels. A burst on all 32 channels at once is held in the FIFOs and drains
in 32 frames (512 ns).

## Registers

`csr_regs` holds 5120 byte registers. The paper gives "about 5 kilobytes" of
status and control registers; the map below is this design's choice. Bytes
outside the decoded addresses are plain storage.

| Address | Contents | Reset |
|---|---|---|
| 0x000 | CTRL: bit0 mode (1 = dynamic), bit1 inject hit pattern, bit2 inject configuration, bit3 parity, bit4 counter clock enable | 0x18 |
| 0x001 | INTERVAL: frames between diagnostic injections (0 = never) | 0 |
| 0x004–0x007 | channel mask, little endian | all ones |
| 0x100 + c | bias current code, readout channel c (`o_rch_ibias`) | 0 |
| 0x120 + c | quench impedance code, readout channel c (`o_rch_imp`) | 0 |
| 0x140 + c | priority of channel c, low nibble | 0 |
| 0x160 + b | bias current code, bias channel b (`o_bch_ibias`) | 0 |
| 0x168 + b | impedance code, bias channel b (`o_bch_imp`) | 0 |
| 0x800 + c | dropped events of channel c (read only, saturates at 255) | 0 |
| 0x820 + c | events of channel c, modulo 256 (read only) | 0 |

The paper gives the analog ranges: 1.0–100 µA bias current and 20 Ω–1.0 kΩ
quench impedance. How a code maps onto these ranges is left to the analog
channels.

**Serial programming protocol** (`prog_interface`, this design's choice):

* A transaction is 24 bits while `gppi_sel` is high. `gppi_sdi` is sampled
  on rising edges of `gppi_clk`, most significant bit first: 1 write flag
  (1 = write), then a 15-bit byte address (the low 13 bits are used), then
  8 data bits.
* A write takes effect after bit 24.
* A read is issued after bit 16. The byte then comes out on `gppi_sdo`, MSB
  first, changing after falling edges of `gppi_clk`, and the host samples it
  on the rising edges of bits 17–24.
* The pins are oversampled by `i_hsclk` through two-flop synchronisers, so
  `gppi_clk` must be at most 1/16 of `i_hsclk`.

## What comes from the paper and what does not

Taken from the paper:

* the block structure and its signal names (`sample`/`dout`/`valid`,
  `count`, `sdata_p`/`sdata_m[3:0]`, `gppi_*`);
* the channel counts: 32 readout channels, 5 bias channels, 4 lanes;
* the 5 ps fine step and the 1.0 GHz lane rate;
* the Vernier fine TDC, with its start and stop flops, thermometer decoder
  and four-flop self-timed reset;
* the coarse counter counting clock rising edges, with 8 bits as its
  timing diagram shows, and the timestamp as the concatenation of coarse
  and fine;
* the counter clock marking rollovers;
* the two arbitration modes;
* hit-pattern, parity and configuration injection;
* about 5 KB of registers, and a serial programming interface.

This design's own choices:

* the 1 GHz TDC clock and the single clock domain;
* decoding by counting ones;
* the delay-line model's stage delays;
* the FIFO depth, the frame format and the injection interval;
* the channel mask and the status counters;
* the register map and reset values;
* the serial protocol;
* the re-alignment of the coarse counter to the counter clock.

Not built:

* In the paper's architecture diagram the TDC logic and the aggregator are
  also connected to the registers. The paper does not say what those
  connections carry, so they are left out.
* The analog channels, PLL and pads.

## Clocking and reset

Everything digital runs on `i_hsclk`. The paper gives 1.0 GHz for the
output drivers only, and this design assumes the same frequency for the TDC
clock (`HSCLK_PERIOD_PS`). The paper implies two more clocks: the
asynchronous start flops clocked by `i_event`, and the `gppi_clk` domain,
which is oversampled.

`i_rst_n` is asynchronous and active low, and reaches every flop. The start
flops are clocked only by `i_event`. A two-state simulator applies an
asynchronous clear only on its falling edge, so a testbench should assert
reset after the clock has run for a few cycles, for example high → low, a
few clocks, a brief release, low again, release. The included testbenches
do this. Silicon would see the reset level and need none of it.

## Changing the design

* The number of Vernier stages follows from `HSCLK_PERIOD_PS / FINE_LSB_PS`
  in `snspd_pkg`. For another clock frequency, change `HSCLK_PERIOD_PS`. The
  fine code width follows automatically.
* `COARSE_BITS` sets the coarse counter and the counter-clock divider
  together.
* The timestamp frame has room for a wider timestamp: bits 56:41 hold it
  today, and bits 40:1 are unused.
* FIFO depth is the `DEPTH` parameter of `readout_subsystem`.
* The Vernier model's stage delays are parameters. Only their difference,
  the 5 ps step, is taken from the paper.

## Simulation

Every block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. The package must be read first, and the
testbenches need `--timing`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snspd_pkg.sv tb/tb_snspd_readout_top.sv \
          --top-module tb_snspd_readout_top
./obj_dir/Vtb_snspd_readout_top
```

`tb_snspd_readout_top` runs the whole core at its default size with no
parameter overridden. It takes about a second of wall time for 83 µs of chip
time. In that time it:

* writes and reads registers over the serial pins;
* fires several hundred events at random picosecond offsets, including
  one burst on all 32 channels at the same instant;
* checks every received frame:
  * every timestamp, per channel and in order;
  * round-robin order, and priority order after a mode switch;
  * hit-pattern and configuration frame contents, and parity;
* checks the rollover marks on `gppi_cclk`, the channel mask, an event
  during a busy measurement and a FIFO overflow;
* finally compares the drop and event counters, read back over the serial
  interface, with its own count.

It also counts how often each of these mechanisms happened and fails if one
never did.

The unit testbenches cover:

* the decoder over every clean code;
* the delay-line model's code and completion time;
* a fine TDC channel's code, its 8-edge latency and re-arm;
* the aggregator on all 32 channels, including re-alignment to an
  out-of-step counter clock;
* the counter clock's period and enable;
* the readout's arbitration, overflow, mask and injection;
* serializer framing;
* the register file over all 5120 bytes;
* the serial protocol.

What the testbenches cannot show: everything analog, which covers the 8 ps
rms accuracy, jitter and power targets, and the behaviour of real latches
near metastability. The delay-line model is ideal: it has no mismatch and
no jitter.

`vernier_delay_line` contains delays and real arithmetic, so it is not
synthesizable, and neither is `snspd_readout_top` as long as it instantiates
the model. For synthesis, replace the model with the analog macro, which
has the same ports.
