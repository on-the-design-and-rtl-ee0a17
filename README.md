# Isoswitch: a time-band switch that never reads a frame header

An Isochronet network does its routing by time, not by addresses. Time is split into a
repeating **cycle**. The cycle is cut into **bands**. During a band, a fixed set of
routing trees is open, and each tree leads to one destination. A switch in such a network
never reads a frame. It only needs to know which band it is in. That tells it which input
ports connect to which output ports, and which input wins when several compete. Everything
else is computed off-line by a host computer and loaded into the switch as a small table.

This repository holds synthesizable SystemVerilog for such a switch, the Isoswitch, plus a
workstation interface card:

- four input ports and four output ports
- 1 Gb/s serial lines
- 40-bit words inside the switch
- one arbitration decision every 320 ns (3.125 MHz)
- the **RDMA+** contention rule: a frame that loses arbitration waits in its input buffer,
  but only until its band ends.

Every block has a self-checking testbench.

## Time: bits, words, ticks, bands, cycles

The whole design runs on one clock, the serial bit clock (1 GHz at the nominal line rate).
The time base (`iso_timebase`) derives two single-clock strobes from it:

| unit | length | strobe | what happens |
|---|---|---|---|
| bit | 1 clock (1 ns) | — | one bit moves on each serial line |
| word | 40 clocks (40 ns) | `word_en` | each granted input buffer sends one word; fabric, delay RAM and serializers advance |
| tick | 8 words = 320 clocks (320 ns) | `tick_en` | arbitration result is latched; the band counter counts down |
| band | E ticks, E from the table | `band_begin` | a new table line takes effect |
| cycle | sum of the bands of one table | `cycle_begin` | the table wraps to line 0; a newly loaded table may take over |

Per output port this gives 3.125 MHz × 8 words × 40 bits = 1 Gb/s. Blocks that only work at
word or tick rate use these strobes as clock enables, so there is only one clock domain.

## The configuration table

The heart of the switch is the configuration table (CT). It has one line per band of the
cycle, and each line has three fields. For M outports and N inports (here 4 × 4):

```
 line = { con[1..M][1..N] , pri[1..M][1..N] , exp }
          16 bits           16 bits           12 bits      = 44 bits
```

- **con** (port connection): one N-bit word per outport. The outport-1 word is leftmost,
  and inside each word the inport-1 bit is leftmost. A 1 means the inport belongs to the
  routing tree that leaves through this outport.
- **pri** (priority port): the same shape. At most one bit per outport word should be set.
  It names the inport that owns the outport during the band. A band with a priority bit is
  a *priority band* for that outport, and one with none is a *contention band*.
- **exp** (expiration): how many ticks the band lasts (1 to 4095; 0 behaves as 1).

In the RTL the fields are packed arrays with ascending ranges (`[0:M-1][0:N-1]`). So the line
written as a 44-bit binary literal, left to right, reads the same as the layout above.
Example, a two-band cycle:

```
band 0: 44'b0000_0011_0000_1000__0000_0010_0000_0000__100011110001
        outport 2 <- inports 3 and 4, inport 3 has priority
        outport 4 <- inport 1
        lasts 2289 ticks (732.5 us)

band 1: 44'b1000_0010_1000_1000__0000_0000_0000_0000__000111101100
        inport 1 -> outports 1, 3 and 4 (a multicast tree)
        outport 2 <- inport 3
        lasts 492 ticks (157.4 us)
```

A line may connect one inport to several outports, which gives multicast. It may also
connect several inports to one outport, which makes them contend for it.

## Arbitration: who gets each outport, every tick

On every tick the arbitration logic (`arbitration_logic`, combinational) decides, for each
outport j independently:

1. If the priority inport of j has data waiting, it gets j. This holds even if its con bit
   is clear.
2. Otherwise the connected inports that have data waiting contend. One is picked at random.
3. Otherwise j stays idle.

An inport "has data waiting" when its input buffer is non-empty. A last word that leaves the
buffer on this very edge does not count. Without that exception, a drained priority inport
would hold its outport for one more empty tick.

Step 2 carries a deliberate reading. In the original algorithm, contention is only
considered when no priority inport is set at all. Taken literally, that leaves an outport
idle whenever its priority source is silent. But the network's service model says
contention traffic may use a priority band whenever the priority source does not. This
design follows the service model: an idle priority inport falls through to contention. To
get the strict behaviour, restrict the contention branch in `arbitration_logic` to outports
whose `pri` word is zero.

The random choice works like this:

- A 16-bit LFSR (`iso_lfsr`) steps once per tick.
- Each outport takes its own 2-bit slice of the LFSR, XORed with the outport number, as a
  start offset.
- It scans the inports circularly from that offset and grants the first connected, busy one.

The logic is cheap, O(N) deep per outport. It is not exactly uniform when the contending
inports are not adjacent.

The result is latched into the grant flip-flops on `tick_en` (`control_unit`) and held for
the whole tick. The grants give:

- per outport, a multiplexer select and enable
- per inport, a "granted" flag; a granted inport removes one word from its buffer on every
  `word_en`.

A word that arrives at an idle switch is therefore picked up at the next tick, at most
320 ns later.

## Band boundaries and the RDMA+ rule

The band counter (`band_counter`) is loaded with `exp` when a line takes effect and counts
down once per tick. When it expires, the table moves to the next line on the same tick.
The configuration RAM is read asynchronously at the *next* program-counter value, so the
new line reaches the arbitration without losing a tick.

At the tick that ends a running band (`band_end`), every input buffer is emptied. This is
RDMA+: frames that lost arbitration waited, but they do not survive the band. On that tick
the arbitration is told that every inport is idle, so no grant is made from buffers that are
being emptied. As a result, **the first grants of a band come on its second tick**. A band
of E ticks carries at most (E − 1) × 8 words per outport. Sources are expected to time
their transmissions into bands using the signals described below.

## Loading a new table without stopping: the tandem RAMs

`config_memory` holds two CT RAMs (banks), each with a data boundary register, which is the
index of the last line of that table. One bank runs while the host writes the other.
Loading works like this:

1. The host writes lines (`h_we`, `h_addr`, `h_data`) and the boundary (`h_bnd_we`,
   `h_bnd`). These always go to the bank that is *not* running.
2. The host pulses `h_commit`. `h_pending` goes high.
3. When the last band of the running table expires and a commit is pending, the banks
   swap on that same tick edge. Line 0 of the new table becomes the next band with no gap,
   and `h_pending` drops.

While a commit is pending, host writes are ignored, so the waiting table cannot be damaged.

After reset nothing runs and no grants are made. The first commit starts the switch at
line 0 of the newly written bank on the next tick, and `running` goes high.

`band_begin` and `cycle_begin` pulse for one clock just after the tick on which a band or
cycle starts. `band_idx` is the line in use. These are the synchronisation signals for
attached nodes.

## Datapath

```
serial in -> serial_to_parallel -> word_fifo ---> switching_fabric ---> delay_module -> parallel_to_serial -> serial out
             \_________ input_line_card ______/   (4 muxes, 1 reg)    \______________ output_line_card ______________/
```

- **Serial lines.** Each line is `sdata` plus a qualifier `svalid`, sent MSB first. Forty
  consecutive valid bits make a word. A word cut short by `svalid` dropping is discarded.
- **Input line card.** Converts the serial line to words and keeps them in a first-word
  fall-through buffer (64 words). It reports `busy` to the control unit. A word arriving
  when the buffer is full is dropped and flagged on `dropped`. Buffering at the input costs
  no throughput here. Everything queued at one inport belongs to the same tree and goes to
  the same outports, so there is no head-of-line blocking.
- **Switching fabric.** One 4-to-1 multiplexer per outport, with a registered output updated
  on `word_en`. A word crosses in one word time (40 ns). A valid flag travels with each word.
- **Delay module.** It delays an outport's stream by a host-set number of word times. The
  host sets this so that the link delay to the next switch becomes a whole number of cycles,
  which keeps the cycles of neighbouring switches lined up.
  - It is a dual-port RAM of 1024 words with one status bit per word.
  - On each `word_en` it writes the incoming word at PCW, with status = valid, and reads the
    word at PCR. Both pointers then advance.
  - Writing the delay register D (`h_dly_we`, `h_dly`) sets PCW = D and PCR = 0 and clears
    every status bit. The first D words out are therefore empty.
  - D = 0 passes the word straight through.
- **Output line card.** The delay module feeds the serializer. A word with status 0 is not
  sent, so the line stays idle (`svalid` = 0) for that word time. `sent` pulses when a word
  starts on the line.

## Workstation interface card

`interface_card` connects a workstation to one switch port. In `isoswitch_top` it is on
port 1. It has a transmission buffer and transmitter, a receiver and reception buffer (64
words each), and a signal detector that turns switch events into status bits and an
interrupt.

The workstation's bus is replaced by a simple synchronous register port: `wr`, `rd`, a
3-bit address and 40-bit data. Read data is valid on the clock after `rd`.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | TXDATA | write | push a word into the transmission buffer (lost if full) |
| 1 | RXDATA | read | pop a word from the reception buffer (0 if empty) |
| 2 | STATUS | read | bits [2:0] events (cycle began, band began, word received); [9:3] tx level; [16:10] rx level. Reading clears the event bits |
| 3 | CONTROL | read/write | [0] cycle event enable, [1] band event enable, [2] receive event enable, [3] interrupt enable, [4] transmit enable |
| 4 | BAND | read | index of the band now running in the switch |

The transmitter's rule: when transmit enable is set and the buffer holds at least 8 words,
it sends a burst of 8 words back to back at the full line rate. If the rule still holds, it
starts the next burst immediately. The host uses the transmit-enable bit to time its
transmissions into the bands it owns.

The interrupt is high while interrupts are enabled and any enabled event bit is set.
Alternatively, the host can poll STATUS with interrupts off. Received words that find the
reception buffer full are counted in `rx_lost`.

## Top level (`isoswitch_top`)

`isoswitch_top` is the switch (`isoswitch`) with the interface card on port 1. These are
brought out as plain ports:

- the serial lines of ports 2–4 (`rx_*` and `tx_*`, indexed 1..3)
- the host configuration port (`h_*`)
- the workstation register port (`ws_*`, `ws_irq`)
- the synchronisation signals
- per-port `in_dropped` and `out_sent`

The optical converters, the host computer and the workstation are outside the design. They
connect at these ports.

## Sizes

| parameter | value | origin |
|---|---|---|
| ports | 4 × 4 | prototype |
| word width | 40 bits | prototype |
| words per tick | 8 | prototype (320 ns tick at 1 Gb/s) |
| expiration field | 12 bits | prototype's table format |
| CT lines per bank (`CT_AW`) | 16 | chosen |
| input buffer | 64 words | chosen |
| delay RAM (`DLY_AW`) | 1024 words = 40.96 µs | chosen |
| interface card buffers | 64 words | chosen |
| burst size | 8 words | prototype |

All of these are parameters; the defaults live in `iso_pkg`.

The delay RAM is the one size that does not match the intended use. The delay should reach
a full cycle. The example cycle above is 2781 ticks, or 22 248 words, and needs
`DLY_AW = 15`. A maximal cycle (16 × 4095 ticks) would need about 21 Mbit per outport. The
default is kept small so the design stays a practical size for simulation and synthesis.

## How far to trust it, and where it departs from the original switch

What is checked:

- Every module has a self-checking testbench, including the full top at its default sizes
  with no parameter changes.
- The top-level test drives the switch end to end. It counts each mechanism and fails if
  any one never happens: band change, cycle start, table swap, priority grant, random
  contention pick, multicast grant, RDMA+ discard, input overflow, delayed output, card
  burst, card interrupt.

- A second full-size test (`tb_isoswitch_cycle`) runs the two-band example table at its
  real lengths (2289 + 492 ticks) for two whole cycles, 1.78 million clocks, with
  saturated inputs. It checks:
  - every band and cycle length, to the clock
  - exactly 8 words per tick on every outport on every tick of a band except the first
  - that the priority source shuts out its rival completely
  - a 1000-word delay
  - the card's reception of its own multicast stream.

Choices and departures:

- **Priority fall-through** (see Arbitration) instead of the literal algorithm.
- **Random pick** by a circular scan from an LFSR offset, not a uniform draw.
- **First grants of a band on its second tick**, because the buffers are emptied at the
  band edge.
- **Single clock**, with word and tick enables. The original used slower parallel logic
  behind fast serial converters.
- **Delay in word times.** The original describes one word written per clock tick and the
  delay counted in ticks; here the unit is the 40 ns word.
- **Serial format** (MSB first, a valid qualifier), **reset** (asynchronous, active low),
  **drop-on-full**, the **host handshake** (commit/pending, writes ignored while pending),
  the **register map** and the **burst-after-enable rule** are this design's own.
- **Band expiry goes straight from the band counter to the configuration memory.** The
  original routes elapsed time into the arbitration logic, which then asks the memory for
  the next line. The behaviour is the same. The elapsed-tick count is still available as
  `control_unit.elapsed`.
- **Only RDMA+.** RDMA− (discard losers at once) and RDMA++ (carry them into the next band)
  are not built.
- **No separate scaling modes.** Two ways to reach faster lines are a wider internal word
  and one arbitration per block of frames. Neither is built as a mode. `WORD_W` and `WPT`
  (words per tick) are plain parameters, and the control logic does not depend on them.
- **No multi-stage fabric.** The original suggests replacing the crossbar with a multi-stage
  network for larger switches; only the crossbar is here.

## Simulating

Each testbench is `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a hung run. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/iso_pkg.sv tb/tb_isoswitch_top.sv \
          --top-module tb_isoswitch_top -Mdir obj_top -o sim
./obj_top/sim
```

`-Wno-fatal` keeps Verilator's style warnings from stopping the build. The main one is
ASCRANGE: it is expected, because the table fields use ascending ranges on purpose.
Replace `isoswitch_top` with any module name to run that block's test. Modules are found
through `-Irtl`; only the package has to be listed. The testbenches drive inputs and sample
outputs on the falling clock edge. They use `$urandom` for traffic, so a different seed
(`+verilator+seed+N`) gives different traffic.

To change a size, override the parameters on `isoswitch_top` or edit `iso_pkg`. The block
testbenches show smaller instances, for example the 2-line tables in `tb_control_unit`.

## Files

| file | contents |
|---|---|
| `rtl/iso_pkg.sv` | sizes, register map, event bit numbers |
| `rtl/iso_timebase.sv` | word and tick strobes |
| `rtl/serial_to_parallel.sv`, `rtl/parallel_to_serial.sv` | serial line converters |
| `rtl/word_fifo.sv` | buffer used by line cards and interface card |
| `rtl/input_line_card.sv`, `rtl/output_line_card.sv`, `rtl/delay_module.sv` | port datapath |
| `rtl/switching_fabric.sv` | crossbar |
| `rtl/config_memory.sv`, `rtl/band_counter.sv`, `rtl/arbitration_logic.sv`, `rtl/iso_lfsr.sv`, `rtl/control_unit.sv` | control |
| `rtl/isoswitch.sv` | the switch |
| `rtl/signal_detector.sv`, `rtl/interface_card.sv` | workstation interface |
| `rtl/isoswitch_top.sv` | switch plus interface card |
| `tb/tb_*.sv` | one testbench per module |
| `tb/tb_isoswitch_cycle.sv` | the example table at its real band lengths, saturated traffic |
