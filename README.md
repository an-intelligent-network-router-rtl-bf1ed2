# Segregating network router: rate, duration and size

A router that looks at a property of the traffic itself before forwarding it,
and gives each kind of traffic its own channel. Three properties are used, each
by a small, separate router:

| router | looks at | splits into | decided by |
|---|---|---|---|
| `drir` (rate) | width of each pulse on a serial line | high data rate / low data rate | pulse width <= reference: high rate |
| `drir_pulse_count` (rate) | pulses per one-second window on the same line | high data rate / low data rate / no data | pulses > threshold: high rate |
| `ddir` (duration) | how long data has stayed on a serial line | short / medium / long duration | ticks 1-5 short, 6-9 medium, 10 and on long |
| `dsir` (size) | number of bytes in a packet | normal / bulk path | bytes <= reference: normal |
| `dsir_multilevel` (size) | number of bytes in a packet | one of `LEVELS` paths (3: byte, kilobyte, megabyte channels) | number of size limits exceeded |

The idea behind it: long-lived or bulky traffic should not hold up short,
small or slow traffic that shares the line. No processor is involved; each
decision is a counter and a comparator, so the routers are a few dozen cells
each and run at clock rate. Rate is judged in two ways, by pulse width and by
pulse count; both routers are built and listen to the same line.

Around the three routers sit a **time base generator** (`atg`), which divides a
10 MHz board clock down to a one-second pulse and sets how fast the rate and
duration routers count, and a **duration request arbiter** (`request_arbiter`),
a 100-entry request queue that hands requests to short, medium and long
duration routers kept in the ratio 7:2:1. The top level, `intelligent_router`,
puts all of them side by side.

Everything is synchronous to one clock `i_clk`, with a synchronous, active-high
reset `i_rst`.

## Counting on a time base

Both serial routers count "ticks", not clock cycles: each has an `i_tick`
enable and only counts on cycles where it is high. The time base generator
provides the ticks.

`atg` is seven cascaded modulo-10 counters (`decade_counter`). Stage 0 counts
every clock; stage k counts only when stage k-1 wraps. `o_tick[k]` is a
one-clock strobe when stage k wraps, so with a 10 MHz clock the strobes come at
1 MHz, 100 kHz, 10 kHz, 1 kHz, 100 Hz, 10 Hz and 1 Hz; `o_tick[6]` is the
one-second pulse. `o_clk_div[k]` is a 50 % square wave at the same frequency,
for observation. The stages are chained by clock enables rather than by using
one stage's output as the next stage's clock, so there is only one clock
domain.

In the top, `DRIR_TICK_SEL`, `DDIR_TICK_SEL` and `RATE_WIN_SEL` pick the tick
for each router: 0 means every clock, k (1 to 7) means `o_tick[k-1]`. The
defaults are 0 for the pulse width router (it measures pulse widths in clock
cycles), 7 for the duration router (it measures durations in seconds) and 7
for the pulse count router (one-second counting windows).

## Rate router (`drir`): judging rate by pulse width

A high-rate signal has short pulses, a low-rate one long pulses. The rate
router therefore measures every pulse:

- the **pulse counter** `on_count` counts ticks while `i_data` is high;
- when the line falls, the count is copied into the **pulse counter
  register** `on_count_reg` (PR) and the pulse counter restarts;
- a **comparator** produces PR < RR, PR = RR and PR > RR against the
  **reference register** `i_ref` (RR);
- PR <= RR selects the high rate output, PR > RR the low rate output. The
  **demultiplexer** passes `i_data` to `o_high_frq` or `o_low_frq`, and
  `o_high_valid` / `o_low_valid` tell which one carries the line.

So a pulse is always routed by the width of the *previous* finished pulse; the
decision changes on the clock after a pulse ends. Example with `i_ref = 4`:
pulses of one to four clocks go to the high rate output, pulses of five or
more to the low rate output.

A silence counter `off_count` counts ticks with the line low. When it
saturates (63 ticks) the line counts as carrying no data: `o_no_data` rises and
both valids drop until data returns. All three counters are 6 bits and
saturate. After reset the pulse counter register is 0, so the line starts on
the high rate output.

The demultiplexer is combinational from `i_data`; only its select is
registered.

## Rate router (`drir_pulse_count`): pulses per window

The second way of judging rate counts how many pulses (rising edges) arrive
in a counting window, normally one second long and closed by the time base's
one-second pulse. At the end of each window the count moves into the pulse
counter register and the counter restarts. A count above the threshold
`i_ref` means high rate (`o_hdr_data`, `o_hdr_valid`), a count from one up to
the threshold means low rate (`o_ldr_*`), and a window without any pulse
raises `o_no_data` with both valids low. Each window is routed by the count of
the window before it; the decision changes on the clock after the window
strobe. After reset the line is in the no-data state until the first window
closes.

The counter and threshold are 20 bits wide, enough to count a 1 MHz pulse
train for a full second. As an example, a 1 kHz line counts 1000 per window and
a 1 MHz line 1 000 000; a threshold of 100 000 separates them.

The two rate routers differ in what they need: the width router decides after
every pulse, so it reacts within one pulse but only sees the pulse shape; the
count router sees the real pulse rate but needs a whole window to react.

## Duration router (`ddir`): a two-stage counter cascade

Data that has been on the line for a short time goes to the short channel,
then to the medium channel, and finally to the long channel, where it stays
until the router is reset (`i_rst`, or `i_dur_restart` in the top).

The mechanism is two counters in series. The first stage counts ticks on which
`i_data` is high, up to `i_short_len`; while it has not reached that count the
class is short. Reaching it enables the second stage, which counts up to
`i_medium_len`; until it gets there the class is medium; afterwards it is long.
With the intended settings `i_short_len = 5` and `i_medium_len = 4` (a mod-5
counter followed by a mod-4 counter):

| data tick number | channel |
|---|---|
| 1 - 5 | short (`o_short_data`) |
| 6 - 9 | medium (`o_medium_data`) |
| 10 and after | long (`o_long_data`) |

A tick's data is routed by the ticks counted before it, so the class changes on
the clock after the tick that completes a stage. When data drops off the line
the counters hold; they only clear on reset. The two inactive channels are
driven low, and `o_short_en`, `o_medium_en`, `o_long_en` and `o_class` show the
active one. `o_count` is the total number of data ticks (5 bits, saturating).

With the top's default time base (one tick per second) "short" means up to
5 s of data, "medium" 6 to 9 s and "long" 10 s or more. The thresholds are
inputs, so a network operator can set other values at run time (the
testbench also runs short until tick 10 and medium until tick 20); the
surrounding description talks of one minute and ten minutes as the real
borders, which would need stage lengths of 60 and 540 ticks (wider counters,
`CNT_W` of 10) or a slower tick.

## Size router (`dsir`): byte counter, line buffer and demultiplexer

This is the least obvious of the three, because a packet's size is only known
once enough of it has arrived, yet the whole packet must leave on one path.

A packet is a run of cycles with `i_valid` high; the first cycle with
`i_valid` low ends it. Every byte (4 bits wide by default) is accepted into a
**line buffer** (a 16-entry FIFO) and counted by the **byte counter**
`data_count`. The counter's terminal count `TC = data_count > i_ref` is the
select of the demultiplexer:

1. **Collecting.** While TC is low, bytes only go into the line buffer;
   nothing leaves.
2. **Bulk.** The moment byte `i_ref + 1` has been counted, TC rises and the
   packet is bulk. The line buffer starts draining onto the bulk path, one byte
   per cycle, while the rest of the packet keeps coming in at one byte per
   cycle. The buffer level stays at `i_ref + 1`, so a bulk packet of any length
   streams through. When the packet ends, the remaining bytes drain out.
3. **Normal.** If the packet ends while TC is still low (at most `i_ref`
   bytes), the buffered packet is played out on the normal path.
4. When the buffer is empty after a packet has ended, the byte counter clears.

While a finished packet is being played out (steps 2 and 3 after the end of
the packet), `o_ready` is low and the sender must hold off the next packet. A
sender that leaves at least one idle cycle between packets and waits for
`o_ready` never loses a byte. The buffer is 2^`REF_W` entries deep, enough for
the largest normal packet (15 bytes) plus the one byte that makes a packet
bulk.

Example with `i_ref = 4`: the packet 1,2,3,4 comes out on `o_normal_data`; the
packet 1,2,3,4,5,6 comes out whole on `o_bulk_data`, starting two cycles after
byte 5 arrived.

Latency: outputs are registered. A bulk packet's first byte leaves two cycles
after byte `i_ref + 1` is accepted; a normal packet's first byte leaves two
cycles after the idle cycle that ends the packet.

### More than two size levels (`dsir_multilevel`)

Size routing can use more than one bulk level, for example separate byte,
kilobyte and megabyte channels. `dsir_multilevel` generalizes `dsir` to
`LEVELS` paths (3 by default) with `LEVELS-1` programmable limits
`i_ref[k]`, given in ascending order. A packet's level is the number of limits
its byte count exceeds: with limits 4 and 10, packets of 1-4 bytes take path 0,
5-10 bytes path 1, 11 and more path 2. Outputs are `o_valid[l]` and
`o_data[l]` per path.

The level of a packet is final only once its count has passed the top limit,
so only the top path streams through (starting two cycles after byte
`i_ref[LEVELS-2] + 1`). Packets of the lower levels are held in the line
buffer until they end and then played out on their path, two cycles after the
ending idle cycle. Framing, `o_ready`, the 16-entry buffer and the counter are
as in `dsir`, and with `LEVELS = 2` the block behaves as `dsir`. The limits are
byte counts as wide as `dsir`'s reference (4 bits). Real kilobyte and megabyte
limits would need wider limits and a line buffer as large as the largest limit
plus one.

## Duration request arbiter (`request_arbiter`)

When every request competes for the same few routers, a handful of long
requests can block everything behind them. Here requests (an 8-bit id and a
duration class, `router_pkg::dur_req_t`) wait in a 100-entry queue, and the
routers are split by class: 7 short, 2 medium and 1 long (router numbers 0-6,
7-8 and 9). Each cycle the oldest request is given to the lowest-numbered free
router of its class (`o_issue_valid`, `o_issue_chan`, `o_issue_id`). A router
stays busy until its `i_done` bit is pulsed. Service is strictly in order:
`o_hol_wait` shows when the oldest request is waiting because all routers of
its class are busy. Requests enter through a valid/ready handshake
(`i_req_valid`, `o_req_ready`); ready is low while the queue is full.

The class of a request is supplied with it; nothing in this design measures it
for queued requests.

## Top level (`intelligent_router`)

The five routers, the time base and the arbiter share only the clock, the
reset and the time base ticks. The two rate routers listen to the same line,
`i_rate_data`; every other router has its own input. Port names are prefixed
`rate_` (pulse width), `rate_hdr_` / `rate_ldr_` / `rate_pc_` (pulse count),
`dur_`, `size_` / `normal_` / `bulk_`, `msize_` (multi-level size router, on
its own input stream), and `req_` / `issue_`.
Main parameters (defaults in brackets):

| parameter | meaning |
|---|---|
| `ATG_STAGES` (7), `ATG_RATIO` (10) | time base: number of divider stages, ratio per stage |
| `DRIR_TICK_SEL` (0), `DDIR_TICK_SEL` (7), `RATE_WIN_SEL` (7) | time base used by the pulse width, duration and pulse count routers |
| `RATE_CNT_W` (6), `RATE_REF_W` (4) | pulse width router counter and reference widths |
| `RATE_PC_W` (20) | pulse count router counter and threshold width |
| `DUR_CNT_W` (5) | duration router counter width |
| `SIZE_DATA_W` (4), `SIZE_REF_W` (4), `SIZE_CNT_W` (6) | size router data, threshold and byte counter widths (both size routers) |
| `SIZE_LEVELS` (3) | number of paths of the multi-level size router |
| `QUEUE_DEPTH` (100), `N_SHORT` (7), `N_MEDIUM` (2), `N_LONG` (1) | request queue and router pools |

Coarse synthesis of the whole top gives about 370 word-level cells, 199
flip-flop bits and 1128 memory bits (the 100 x 10-bit request queue and the
two 16 x 4-bit line buffers).

## Departures and open points

These are the places where the source description was ambiguous or silent and
a choice was made here:

- **Rate router: what is counted.** The rate router was described both as
  counting *pulses per second* (more pulses than the threshold = high rate)
  and, in its detailed design and simulation, as counting the *width* of each
  pulse (width up to the threshold = high rate). Both are built, side by side
  on the same line. Pulse width equal to the reference goes to the high rate
  side; a pulse count equal to the threshold goes to the low rate side, as
  described. The 20-bit width of the pulse count router is this design's own.
- **Rate router: no-data indication.** Called for but not specified; the
  63-tick silence rule is this design's own.
- **Duration router thresholds.** The classification table (1-5 / 6-9 / 10+)
  is followed. A simulation example elsewhere used thresholds of 10 and about
  20; those can be set through the stage-length inputs. The counter order
  (mod-5 first, then mod-4) follows the text; one drawing shows the two
  counters the other way round.
- **Duration router outputs.** Inactive channels are described as tri-stated;
  here they are driven low and come with enable outputs.
- **Size router.** The block diagram shows a byte counter switching the
  demultiplexer as soon as the count passes the threshold, which would send
  the first bytes of a bulk packet down the normal path. The worked example
  instead shows whole packets on one path, with buffers collecting the data so
  that nothing has to be sent again; that is what is built, using the line
  buffer. Packet framing by
  `i_valid`, `o_ready` back-pressure and the 16-entry buffer are this design's
  own. More levels were mentioned only as a possibility, with no design;
  `dsir_multilevel` is this design's own generalization, and its level rule
  (count of limits exceeded) and 4-bit limits are its own.
- **Size threshold of 100.** A threshold of 100 bytes was also mentioned. It
  needs `REF_W = 7` and `CNT_W = 8` (a 128-entry line buffer); the size
  router's testbench runs such an instance with packets of 100, 101 and 150
  bytes.
- **Time base.** Built with clock enables instead of ripple clocks.
- **Request arbiter.** Only its function (queue of 100, three classes, 7:2:1)
  was given; in-order service, lowest-free-router choice, the request format
  and the done pulses are this design's own.
- **Not built:** an analog alternative for rate detection (frequency-to-voltage
  converter plus ADC, whose four top bits would read 0000 for low and 1111 for
  high rate), and the blocks of the larger router this one is meant to sit in
  (basic routing protocol, data management, variable-frame data casting, a
  buffer-optimized network-on-chip router), which are only named.
- The published FPGA results (utilization, a 10.9 ns critical path,
  60-65 mW) were not reproduced and do not apply directly: the register counts
  here differ from the published ones, and this RTL was only simulated.

## Files

`rtl/`:
`router_pkg.sv` (duration class and request types), `decade_counter.sv`,
`atg.sv`, `drir.sv`, `drir_pulse_count.sv`, `ddir.sv`, `sync_fifo.sv` (FIFO used as line buffer and
request queue), `dsir.sv`, `dsir_multilevel.sv`, `request_arbiter.sv`, `intelligent_router.sv` (top).

`tb/`: one self-checking testbench per block (`atg_tb`, `drir_tb`,
`drir_pulse_count_tb`, `ddir_tb`, `dsir_tb`, `dsir_multilevel_tb`,
`request_arbiter_tb`), each comparing the block with an
independent cycle-level model; `intelligent_router_tb`, an end-to-end test
with a shortened time base (3 divider stages, duration router on the first
one); and `intelligent_router_full_tb`, the same test with every parameter at
its default, which takes about 1.4 x 10^8 clock cycles (fourteen seconds of
simulated 10 MHz time; under two minutes of run time). It also drives the
pulse count router with 1 MHz and 1 kHz trains over full one-second windows. Each prints
`TB_RESULT checks=N failures=M` and the end-to-end tests count every mechanism
(high/low rate and no data for both rate routers, short/medium/long, restart, normal/bulk, each of the three size levels, each request
class, head-of-line wait, full queue, every time base stage) and fail if one
never happened.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl -Itb rtl/router_pkg.sv tb/dsir_tb.sv --top-module dsir_tb
./obj_dir/Vdsir_tb
```

Replace `dsir_tb` by any testbench name. For the full-size run add `-O3`.
Lint a module with `verilator --lint-only -Wall -Irtl rtl/router_pkg.sv rtl/<module>.sv`.
