# n-XYTER read-out logic in SystemVerilog

n-XYTER is a 128-channel front-end chip for 2-D neutron detectors. Neutrons
arrive at random times, and no accelerator clock says when to look, so every
channel triggers on its own. A hit gives three numbers: which strip fired (the
channel number), when it fired (a 14-bit time stamp, 2 ns or finer), and how
much charge it deposited (the peak of a slow shaper). An x-plane chip and a
y-plane chip are later matched off-chip by time stamp. Hits come in bursts, so
the chip smooths them out in two steps: a small FIFO in each channel, then a
shared read-out bus. A token ring hands that bus to channels that have data,
one event per 32 MHz cycle. Channels without data cost almost nothing. A lone
busy channel can use the whole bus, and in saturation every channel gets an
equal share.

This repository holds synthesizable RTL for the chip's digital part:

- the per-channel hit logic;
- the four-stage channel FIFOs;
- the token ring with its group bypasses and the token manager;
- the read-out bus and the 128 MHz output multiplexer;
- the time-stamp generator;
- the I2C slow control with its event counters.

It also holds behavioural models of two mixed-signal parts, the peak detector
and the clock delay line. The analogue front end (preamplifier, shapers,
discriminator with time-walk compensation, DACs, test-pulse generator) is not
modelled. Its outputs are inputs of the top module.

## The path of one hit

```
trig[c] ──► hit_ctrl ──► channel_fifo ──► roc (token_cell) ──► bus ──► word_q ──► ro_mux ──► data[7:0], frame
   │          │  ▲            4 × {ts, amp}        ▲                                      └──► amp_out
   │          ▼  │ held                          token_ring ◄── token_manager
   │        pdh_model ◄── slow_amp[c]
ts ◄── timestamp_gen ◄── clk256, ts_delay_line
```

1. **Trigger (asynchronous).** The rising edge of `trig[c]` latches the
   time-stamp bus into the channel and sets the channel's hit latch. The hit
   latch arms the peak detector. The latch is built from two toggle flops:
   one flips on the trigger, the other flips in the clock domain when the hit
   is done. The latch output is their XOR. A trigger that comes while the
   latch is set is ignored; this is the channel's dead time.
2. **Synchronisation.** The hit crosses into the 32 MHz read-out clock
   domain through two flip-flops. The slow shaper takes about 150 ns to peak,
   so crossing clock domains here adds no dead time.
3. **Peak wait.** The logic waits `PEAK_CYCLES` = 5 cycles (156 ns). Then it
   writes {time stamp, held amplitude} into the channel FIFO. If the FIFO is
   full, it drops the hit instead and pulses `rejected`. In the next cycle it
   resets the peak detector and releases the latch.
4. **FIFO.** Four stages. On the chip the amplitude sits in analogue hold
   cells. Here it is a 12-bit code (`AMP_W`) stored next to the time stamp.
5. **Read-out.** When the token reaches the channel, the channel sends its
   oldest entry as {channel ID, time stamp, amplitude} on the bus for one
   cycle (next section).
6. **Output.** The bus word is registered. The digital part (valid, channel,
   time stamp) leaves on 8 lines in four 128 MHz slots. The amplitude code
   is held on `amp_out` for those four slots.

With the bus free, the first output slot (`frame`) comes 10.5 to 11.5 read-out
cycles after the trigger (330–360 ns). The spread comes from where the trigger
falls relative to the clock. A channel accepts its next trigger at the earliest
9 cycles (281 ns) after the previous one. The end-to-end testbench checks both.

## The token ring

This is the part that takes the most thought.

**Protocol.** The chip's protocol uses both clock edges:

- On a **rising** edge, the current holder of the token sends it into the
  ring.
- The token ripples through every channel whose FIFO is empty.
- On the **falling** edge, the first channel with data latches it.
- That channel owns the bus for the next full cycle, from the next rising
  edge to the one after. On that same rising edge it sends the token on.

So one channel is read per cycle, and while it is read the next one is
already being chosen.

`token_cell` holds the two flops. `cap` is set on the falling edge if the
token is present and the channel has data. `grant` copies `cap` on the rising
edge. In `roc`, the rising edge that raises `grant` also pops the FIFO into
an output register. So the empty flag seen at the next falling edge already
counts this read. Without that, a channel with one entry would grab the
token twice.

**Token manager.** The manager is a token cell whose "has data" input is the
AND of all 128 empty flags:

- While every channel is empty, the token comes back to the manager and stays
  there (it is *parked*). The manager re-injects it on every rising edge.
- As soon as any channel has data, the manager lets the token pass.

A consequence: a single channel with several events gets the token back after
one trip around the ring. It is then read in consecutive cycles. When every
channel has data, they are read in ring order 0, 1, …, 127, 0, 1, …, which
gives each one 1/128 of the bus.

**Bypasses.** On silicon the ripple has to cross up to 127 cells in half a
clock period. To shorten it, each group of 16 channels has a bypass that is
taken when the whole group is empty. In the worst case the token then passes
7 bypasses and 15 cells. In RTL the bypass is a multiplexer. Logically it
equals the chain it skips, and it is kept so the structure matches the chip.
The bypass flag is also an output (`group_bypass`).

This design adds one condition: a group whose cell holds the grant is never
bypassed. A channel that has just sent its last event is empty, but the token
starts inside it and must leave through the chain. Without this condition
the token would be lost.

**Writing a ring without a combinational loop.** The ring is a closed loop:
cell *i* passes `grant(i) | (in(i) & empty(i))` to cell *i+1*, and the last
cell feeds the manager. `token_ring` breaks the loop by using the fact that
only one token exists. It walks the ring twice, starting at the manager:

- The first walk starts with the manager's own injection. It ends with
  whatever reaches the manager from any holder.
- The second walk starts from the manager's output, fed with that end value.
  It gives every cell its true input.

The logic is acyclic and, with one token, gives the same values as the ring.
For a silicon implementation you would draw the real ring and its bypasses,
and time them.

## Time stamp

`timestamp_gen` keeps a 13-bit binary counter on the 256 MHz clock. It
registers the Gray code of the *next* count, so the bus that the channels
latch at arbitrary moments changes one bit per edge. The global reset zeroes
it. The least significant bit is `clk256 | clk256_delayed`, with the delayed
copy coming from an adjustable delay line (`ts_delay_line`, set by register
0xA2).

The LSB is a literal OR of the two clocks and is not re-encoded. With a 50%
clock, the OR is high from the rising edge until half a period plus the delay
after it. The LSB therefore marks whether the trigger fell in that window or
in the rest of the period. Off-chip decoding must take the delay setting into
account. The counter wraps every 2^13 × 3.906 ns = 32 µs.

## Output format

Each 32 MHz cycle sends one 32-bit word, most significant byte first, on
`data[7:0]` in four 128 MHz slots. `frame` is high in the first slot.

| bits  | field                              |
|-------|------------------------------------|
| 31    | valid: a channel was read          |
| 30:24 | channel ID                         |
| 23:10 | time stamp (13 Gray bits, LSB)     |
| 9:0   | spare, zero                        |

The 32 MHz read-out clock is produced by dividing `clk128` by four, so the
two clocks are in phase. The clock is also an output (`clk32`).

## Slow control

An I2C slave (7-bit address 0x08) uses a register pointer. After the address
with the write bit, the first byte sets the pointer. Further bytes are
written to it, and the pointer advances after each. A read returns bytes from
the pointer onward. The register map:

| address   | content                                                          |
|-----------|------------------------------------------------------------------|
| 0x00–0x7F | per-channel threshold trim, one byte per channel                 |
| 0x80–0x8F | test-pulse channel mask; byte *k* bit *j* = channel 8*k*+*j*     |
| 0x90–0x9F | 16 DAC settings (bias currents, threshold)                       |
| 0xA0      | bit 0 polarity, bit 1 test-pulse enable, bits 3:2 injection point |
| 0xA1      | test-pulse amplitude                                             |
| 0xA2      | bits 3:0 time-stamp delay (delay = (code+1) × 100 ps in the model) |
| 0xA8–0xAB | latched-event counter, read-only, LSB first                      |
| 0xAC–0xAF | rejected-event counter, read-only, LSB first                     |

The two counters add, each cycle, how many channels latched or rejected an
event. Reading the lowest byte of a counter returns it live and freezes the
other three bytes, so a 4-byte read is consistent. The global reset `rst`
clears everything: the time-stamp counter, the FIFOs, the counters and the
registers.

## What follows the chip and what is this design's own

These follow the chip's description:

- 128 channels;
- 14-bit time stamp (13 Gray bits on 256 MHz plus an OR-of-clocks LSB);
- trigger latches the time stamp and arms the peak detector;
- synchronisation to 32 MHz after the peak;
- four-stage FIFO per channel;
- token captured on the falling edge and passed on the rising edge;
- manager driven by the AND of the empty flags;
- 16-channel bypass groups;
- one event per 32 MHz cycle;
- 8 output lines at 128 MHz;
- I2C slow control with DACs, per-channel threshold trim, test-pulse
  settings and latched/rejected counters;
- a global reset that zeroes the counter and empties the FIFOs.

These are this design's own choices, where the description is silent:

- amplitude as a 12-bit code;
- `PEAK_CYCLES` = 5;
- the two-flop synchroniser and the toggle-pair hit latch;
- triggers ignored while busy;
- rejection decided at write time;
- FIFO read at the start of the grant cycle;
- AND-OR bus instead of tri-state;
- the unrolled ring and the "holder's group is never bypassed" rule;
- 32 MHz derived from the 128 MHz clock;
- the output word layout and the `frame` flag;
- the I2C address, protocol details, register map and widths;
- 32-bit wrapping counters;
- reset clearing the registers;
- the delay-line range.

Known departures:

- The block diagram shows an "Ineff" line from the channels to the token
  manager. Here, inefficiency (hits lost to a full FIFO) goes only to the
  rejected counter, not to the manager.
- The time-stamp latch and the hit latch are flops clocked by each channel's
  trigger. Their handshake with the read-out clock is read asynchronously, as
  an analogue latch would be. This is fine in simulation. In silicon it needs
  the same timing care as the chip's own latch.
- The polarity, threshold, trim, DAC and test-pulse settings are only brought
  out as ports. The circuits that use them are analogue.
- The peak detector is modelled as a latch that tracks the maximum. Lint and
  synthesis report it as a latch with a feedback loop: that is the hold
  capacitor.

## Files

| file | role |
|------|------|
| `rtl/nx_pkg.sv` | sizes (`N_CH`=128, `TS_W`=14, `FIFO_DEPTH`=4, `GROUP`=16, `AMP_W`=12) and the event/bus/word structs |
| `rtl/nxyter_top.sv` | the chip: everything below wired together |
| `rtl/nx_channel.sv` | one channel: `hit_ctrl` + `channel_fifo` + `roc` |
| `rtl/hit_ctrl.sv` | trigger latch, synchroniser, peak wait, FIFO write, latched/rejected |
| `rtl/channel_fifo.sv` | 4-entry FIFO with overflow/underflow assertions |
| `rtl/roc.sv`, `rtl/token_cell.sv` | read-out controller and its token cell |
| `rtl/token_ring.sv`, `rtl/token_manager.sv` | token path with bypasses; token manager |
| `rtl/timestamp_gen.sv` | Gray counter and LSB |
| `rtl/ts_delay_line.sv` | behavioural delay line |
| `rtl/pdh_model.sv` | behavioural peak detector and hold |
| `rtl/event_counters.sv` | latched/rejected counters |
| `rtl/i2c_slave.sv`, `rtl/slow_control.sv` | I2C slave and register file |
| `rtl/ro_mux.sv` | clock divider and 4:1 output multiplexer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/i2c_master_bfm.sv` | I2C master used by the testbenches |

Top-level inputs that stand in for the analogue front end: `trig[c]`, the
discriminator output after time-walk compensation, and `slow_amp[c]`, the
slow-shaper output as a code.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. The
whole-chip test runs at the default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/nx_pkg.sv tb/tb_nxyter_top.sv --top-module tb_nxyter_top
./obj_dir/Vtb_nxyter_top
```

It builds in about a minute and runs in a few seconds. It goes through these
phases:

- I2C configuration;
- a hit on the last channel (data and latency);
- saturation (order 0..127 twice, then a lone channel read in back-to-back
  cycles);
- FIFO overflow (the missing words must match the rejected counter);
- dead time;
- the delay-line LSB;
- random hits across a time-stamp wrap;
- a global reset with data pending.

It counts each mechanism and fails if one never happened.

`tb/tb_nxyter_rate.sv` is a rate test, also at the default size. It is built
the same way (`--top-module tb_nxyter_rate`). It sends 20 million events per
second into the chip for 50 µs, with the hits spread at random over the 128
channels. That is one chip's share of a 100 MHz event rate on a detector with
640 strips per coordinate, which is read out by five chips per coordinate.
Each hit must then either come out with the right time stamp and amplitude,
or be counted as lost to dead time or as rejected. The total loss must stay
under the 10% target. In a typical run, 4% of the hits are lost to dead time
and none are rejected. The estimate is 156 kHz per channel × 281 ns = 4.4%.

The block tests build the same way, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/nx_pkg.sv tb/tb_token_ring.sv --top-module tb_token_ring
```

Lint with `verilator --lint-only -Wall -y rtl rtl/nx_pkg.sv rtl/<module>.sv`.

Verilator has only two signal states, so the testbenches raise `rst` with a
real 0→1 edge at the start. This makes the asynchronous resets act before the
first clock edge, including in the derived 32 MHz domain, which does not
toggle during reset.

## Changing it

- **Channel count or group size.** Set `N_CH` and `GROUP` in `nx_pkg`.
  `N_CH` must be a multiple of `GROUP`, and `CH_W` must hold `N_CH`−1.
- **FIFO depth.** `FIFO_DEPTH` in `nx_pkg`.
- **Peak timing.** `PEAK_CYCLES` on `nxyter_top`. It sets the time from
  synchronisation to FIFO write, and with it the dead time.
- **Amplitude resolution.** `AMP_W`. The output word does not carry the
  amplitude, so the word layout is unaffected.
