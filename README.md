# CTRP timing receiver core: a UTC-locked 40 MHz from a 500 kb/s message stream

CERN's General Machine Timing (GMT) network broadcasts timing messages at
500 kb/s over multi-drop RS-485 cable. The central sender encodes them with a
40 MHz clock disciplined by GPS. By the time they reach a receiver, cabling and
input loading have added about 14 ns of jitter to every edge. This RTL is the
FPGA core of a CTRP-style receiver, which works backwards from that stream:

* It **rebuilds the sender's 40 MHz** with under 1 ns of jitter. A
  counter-based phase detector and a PI controller steer a VCXO, so the clean
  clock is locked to UTC.
* It **keeps UTC time**: UTC seconds from a once-per-second message, plus a
  count of 25 ns ticks of the clean clock.
* It **acts on events**. Each received frame is looked up in an action table.
  Each matching action loads and arms one of five configurable counters. A
  counter produces a front-panel pulse, an interrupt, or both, and time-tags it
  in UTC.
* It **supports an HPTDC** time-to-digital converter for sub-nanosecond tags. It
  provides a 10 kHz reference aligned to UTC, a register through which software
  drives the HPTDC's JTAG lines, and a readout FIFO for the HPTDC's parallel
  port.

The split into blocks and the way each one works follow the published CTRP
design. Details that design leaves open were chosen here; they are marked as
such below and in each file's header. The main ones are the frame format, the
register map, the bus and HPTDC handshakes, the number formats and the
numbers of inputs.

```
            clk_osc domain                          clk40 domain (clean 40 MHz)
 gmt_in ──► phase_detector ─► pi_controller ─► dac_code ─► [DAC+VCXO] ─► clk40
   │            ▲ clk40 (sampled as data)                                  │
   │            └──────────────────────────────────────────────────────────┘
   └──────► gmt_rx ─► msg ─┬─► utc_clock ─► utc_sec/tick ─► counter time tags
                           │        └─► ref10k_gen ─► tdc_ref10k
                           └─► action_scanner ◄─► action_ram
                                     └─► load/cfg ─► counter_channel ×5 ─► out_fp, irq
 local bus ◄─► host_regs ◄─► PLL settings, UTC, IRQ, action writes, stamps,
                             jtag_port (HPTDC JTAG), hptdc_readout (HPTDC FIFO)
```

## The clock-recovery loop

This is the part that needs the most care. The loop multiplies the frequency
by 40 (a 1 µs grid of message edges becomes 25 ns clock edges), and it must
average out jitter that is far larger than its output jitter.

**Phase detector (`phase_detector`).** This block runs on a free-running
oscillator that is unrelated to 40 MHz (`clk_osc`). Both the GMT line and the
clean 40 MHz (sampled as data) pass through identical two-flip-flop
synchronisers, so their latency cancels.
* A rising edge of the GMT line opens a measurement.
* The next rising edge of the 40 MHz closes it.
* The count of oscillator cycles in between is the phase.

A single count can only be right to within one oscillator tick. The
oscillator is unrelated to the two signals, so that quantisation error changes
from one measurement to the next, and the 14 ns line jitter adds more
dither. The mean of 2^`avg_log2` counts therefore resolves the phase well below
one tick. The result `avg` is the mean in ticks with 8 fraction bits, whatever
the number of counts averaged.

The reading is unambiguous only while the GMT edge lies more than one
oscillator period from both neighbouring 40 MHz edges. A GMT edge and a 40 MHz
edge seen on the same oscillator cycle give a count of 0, even if that 40 MHz
edge actually came first. Put the setpoint in the middle of the 25 ns, at
12.5 ns / T_osc × 256, and choose an oscillator fast enough that the line
jitter stays inside the clean range. With ±7 ns of jitter, 1/T_osc of about
230 MHz or more is enough.

**Controller (`pi_controller`).** On every new average it computes
`e = avg − setpoint` and updates the integral `I += ki·e`. The integral is
clamped to the range the output can use. The DAC code is then
`dac = 32768 + (kp·e + I) >>> 8`, saturated to 16 bits. `kp` and `ki` are
signed 16-bit registers. A positive error means the clean edge comes late, so
the code rises; the VCXO is assumed to speed up with a higher code. While the
loop is disabled, the integral is cleared and the DAC sits at mid-scale.

**Trade-off.** More averaging lowers the measurement noise, but each update
then comes later, and the loop becomes slower and harder to capture. The
end-to-end test uses the following settings:
* 16 averaged edges per update
* `kp` = 8000, `ki` = 250
* a VCXO pulling ±100 ppm over the code range, 30 ppm off at mid-scale
* a 232.6 MHz oscillator
* ±7 ns uniform jitter on every line edge

In that test the loop locks within 3 ms. Over the following millisecond the
clean clock sits 12.1 ns behind the sender's clock, with 0.40 ns rms
jitter. Slower settings, 32 or 64 averaged edges with `kp` between 1000 and
3000, had not locked after 3 ms.
These numbers hold for that simulated VCXO, not for any specific part:
retune for real hardware.

Only rising edges of the message carry phase information. The line idles
between frames, so updates come at the rate of message traffic.

## GMT frames (`gmt_rx`)

The rate (500 kb/s, 80 cycles of 40 MHz per bit) is fixed by the network. The
bit format implemented here is this design's choice:
* Manchester code, line idle low; a '1' is low then high, a '0' high then low.
* One start bit '1', then 40 data bits MSB first, then one odd-parity bit.
* Data = 8-bit type + 32-bit payload. Type `0x01` is the UTC message; its
  payload is the UTC second.

The mid-bit edge of the start bit sets the bit timing. Each later bit is
sampled a quarter bit before and a quarter bit after its middle: the two
halves must differ, or the frame is dropped as a code violation. The sender
uses the same 40 MHz reference, so no later re-alignment is needed; the
sampling points stay 500 ns from every edge. `msg_valid` comes 23 cycles after
the middle of the parity bit. A bad frame raises `msg_err`, which sets
interrupt status bit 8.

## UTC time and time tags (`utc_clock`, `ref10k_gen`)

When a UTC message completes, the second it carries is loaded and the tick
count restarts at 0 on that clock edge. The constant receiver latency is left
to the sender to compensate. Between messages the register counts by itself,
with 40 000 000 ticks per second. When a counter fires, it latches the UTC
second and tick of that cycle.

`ref10k_gen` restarts with every UTC load. Each rising edge of `tdc_ref10k`
comes one cycle after a UTC tick that is a multiple of 4000 (every 100 µs), and
the output has a 50 % duty cycle. Software can then place any HPTDC tag on the
UTC scale:
1. Compare the tag with the tag of the nearest reference edge.
2. Add the UTC time of that edge, which is known from its position on the
   100 µs grid.

## Actions and counters (`action_scanner`, `action_ram`, `counter_channel`)

An action (`ctrp_pkg::action_t`) contains:
* an enable bit
* the 40-bit frame that triggers it
* the counter it loads (0–4)
* that counter's configuration:
  * start mode: immediate, external start `start_sel`, or chained to the
    previous counter (counter 0's previous counter is counter 4)
  * clock: the clean 40 MHz, or front-panel clock `clk_sel−1`
  * routing: front panel `out_fp`, interrupt `out_irq`, or both
  * a 32-bit `delay`

After each frame the scanner reads all 256 entries, one per clock, so a scan
takes 258 cycles (6.5 µs). Frames are at least 82 µs apart, so there is ample
slack. Entry k is applied k+2 cycles after `msg_valid`; if two entries name the
same counter, the later one wins. A frame that arrives during a scan would be
dropped and flagged (`overrun`, IRQ bit 9). With correct traffic that cannot
happen.

A counter fires on the (delay+1)-th tick of its clock after the start. With
the 40 MHz selected, that is delay+1 cycles after the start. Its front-panel
pulse starts on the following cycle and lasts `PULSE_W` = 40 cycles (1 µs). A
new load while a counter is armed or counting restarts it. The front-panel
starts and clocks are synchronised and edge-detected on the 40 MHz, so external
clocks must stay below 20 MHz.

## HPTDC support (`jtag_port`, `hptdc_readout`)

The HPTDC is configured over JTAG, and the JTAG protocol is left to
software. Register `JTAG` drives TCK, TMS, TDI and TRST_N directly and reads
TDO back through a synchroniser.

Time tags come out of the HPTDC one 32-bit word at a time. While
`tdc_data_ready` is high, the block takes the word, pulses `tdc_get_data` for
one cycle, and then waits one cycle. Words go into a 16-word FIFO that the CPU
empties through `TDC_DATA`. While that FIFO is full no word is taken, so the
words wait in the HPTDC. This handshake is this design's choice; check it
against the HPTDC readout mode you configure. On the board the HPTDC's
clock input is the clean 40 MHz, so this port is treated as synchronous to
`clk40`.

## Register map (`host_regs`)

The local bus behind the PCI bridge is modelled as a synchronous word bus:
* A write takes effect on the cycle with `lb_wr`.
* Read data appears one cycle after `lb_rd`.

Word addresses:

| addr | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | RW | [0] PLL enable, [11:8] log2 of the number of phase counts averaged (reset 4) |
| 0x01 | PLL_SETPT | RW | phase setpoint, oscillator ticks × 256 |
| 0x02 | PLL_KP | RW | signed 16-bit proportional coefficient |
| 0x03 | PLL_KI | RW | signed 16-bit integral coefficient |
| 0x04 | PLL_DAC | RO | current DAC code |
| 0x05 | PLL_PHASE | RO | last phase average |
| 0x06 | UTC_SEC | RO | UTC second; the read latches the tick count |
| 0x07 | UTC_TICK | RO | tick count latched by the last UTC_SEC read |
| 0x08 | IRQ_STAT | R/W1C | [4:0] counters, [8] receiver error, [9] scan overrun |
| 0x09 | IRQ_EN | RW | `irq` is the OR of all bits of `IRQ_STAT & IRQ_EN` |
| 0x0A | JTAG | RW | [0] TCK [1] TMS [2] TDI [3] TRST_N, [4] TDO (RO) |
| 0x0B | TDC_DATA | RO | oldest HPTDC word; the read removes it |
| 0x0C | TDC_STAT | RO | [15:0] words held, [16] empty |
| 0x0D–0x0F | ACT_W0..W2 | RW | staged action: event[31:0]; {en[31], out_irq[19], out_fp[18], clk_sel[17:16], start_sel[15:14], start_mode[13:12], channel[10:8], event[39:32]}; delay |
| 0x10 | ACT_COMMIT | W | writes the staged action to entry [7:0] |
| 0x11, 0x12 | MSG_LO, MSG_HI | RO | last frame received |
| 0x13 | STATUS | RO | [4:0] counters armed, [8] scan running, [9] tick 0 of the second |
| 0x20+2c, 0x21+2c | STAMP | RO | UTC second and tick of counter c's last output |

The action table has no reset, so software must write all 256 entries after
power-up. Entries it does not use should be written with `en` = 0.

## Clock domains

Two clocks:
* **`clk_osc`**: the phase detector and the controller.
* **`clk40`**: everything else.

Each domain has its own reset synchroniser. The PLL settings cross into
`clk_osc` through two flip-flops per bit (`cdc_bus`). This is only safe for
quasi-static values: change the coefficients, the setpoint or the averaging
with the loop disabled. The DAC code and phase come back through two
flip-flops in `host_regs` and are meant for monitoring; a read may catch a
value in transition.

## Parameters

`ctrp_fpga` parameters:

| parameter | default | meaning |
|---|---|---|
| `NCH` | 5 | counters / front-panel outputs |
| `NSTART`, `NEXTCLK` | 2, 2 | front-panel start and clock inputs (chosen; up to 4 and 3) |
| `ACTIONS` | 256 | action table entries (chosen) |
| `TICKS_PER_SEC` | 40 000 000 | ticks per UTC second |
| `BIT_CLKS` | 80 | clock cycles per GMT bit |
| `REF_DIV` | 4000 | clock cycles per 10 kHz reference period |
| `PULSE_W` | 40 | front-panel pulse width in cycles (chosen) |

## Not in this RTL

The board parts around the FPGA are outside the RTL:
* the PCI bridge and its local-bus timing
* the flash holding the FPGA configuration, which is rewritten through the
  bridge's GPIO pins
* the board RAM; the action table is an on-chip array here, with the same
  one-cycle read a synchronous RAM would give
* the DAC and the VCXO
* the free-running oscillator
* the RS-485 receiver
* the HPTDC itself

`tb/vcxo_model.sv` is a behavioural model of the DAC and VCXO together, written
only for simulation.

## Simulation

Each block has a self-checking testbench in `tb/`; `tb_ctrp_fpga` runs the
whole core at its default parameters. Each testbench prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ctrp_fpga -y rtl -y tb +libext+.sv -Irtl \
  rtl/ctrp_pkg.sv tb/tb_ctrp_fpga.sv -o sim && obj_dir/sim
```

`tb_ctrp_fpga` simulates about 4.5 ms in a few seconds. It does the following:
* closes the PLL
* loads the UTC time
* programs five actions that cover every start mode, clock mode and output
  routing
* sends the events and checks pulse timing, time tags and interrupts
* sends a frame with a parity error
* drives JTAG and reads HPTDC words
* checks that every 10 kHz edge falls on the 4000-tick grid

It counts each of these mechanisms and fails if one never happens. The block
testbenches check exact cycle timing against models written independently of
the RTL. The top and the VCXO model use 1 fs time precision (`timescale
1ns/1fs`), so that changes of a few parts per billion in the VCXO period
survive rounding.

A UTC second rolling over without a new message is only tested in
`tb_utc_clock`, with a shortened second; the end-to-end test lasts less than
one second.
