# GAPLA: a globally asynchronous, locally synchronous FPGA fabric in SystemVerilog

In a large FPGA the long interconnect wires set the clock period of the
whole chip, and one global clock has to be distributed over all of it
without skew. GAPLA splits the fabric into *asynchronous islands*. Inside an
island, logic runs synchronously on short wires and a local clock. Between
islands there is no common clock: data moves over bundled-data channels
with a 2-phase request/acknowledge handshake, and a sender or receiver that
has to wait simply stretches its own local clock. A long wire then costs
time only when it is actually used, and only to the two islands at its ends.

This repository holds the RTL of that fabric: the pausable local clock
generators, the 2-phase port controllers, the programmable-width I/O
registers, the clock grouping and clock distribution of an island, and the
inter-island routing with its handshake switch boxes (fanout, fanin,
arbiter, merge). The logic inside an island is left out. It is an ordinary
LUT/CLB fabric (Virtex-II-like in the published architecture). Its
interface is brought out as ports, and the testbenches play its part.

## Structure

```
gapla_top                      ROWS x COLS mesh (default 2 x 2)
 ├─ async_island  [r][c]       one per mesh position
 │   ├─ async_wrapper x4       N, E, S, W side of the island
 │   │   ├─ clock_gen          pausable ring oscillator, 16 ME elements
 │   │   ├─ in_port_ctrl  x8   2-phase receiver
 │   │   ├─ out_port_ctrl x8   2-phase sender
 │   │   └─ io_port_matrix     128 I/O data registers + enable matrix
 │   ├─ clock_grouping x4      C-element joining two wrappers' clocks
 │   └─ cdu_clock_select       16 clock distribution units, 4 clocks each
 ├─ req_delay  (one per wrapper output request)
 └─ rsb [ROWS+1][COLS+1]       routing switch box at every channel crossing
     ├─ crsb                   handshake pairs: switch matrix + modules
     │   ├─ crsb_switch_matrix
     │   ├─ hs_fanout x2, hs_fanin x2, hs_arbiter x2, hs_merge x2
     └─ lrsb                   data wires: disjoint switch box
```

Shared leaf cells are `c_element` (Muller C-element) and `mutex` (ME
element). `gapla_pkg` holds the sizes and the configuration record types.

Sides and wrappers are numbered 0 north, 1 east, 2 south, 3 west
everywhere. Switch boxes are indexed by the crossing `[row][column]`, with
`0..ROWS` and `0..COLS`.

## The handshake and the pausable clock

This part has to be understood before the rest makes sense.

**2-phase protocol.** A channel is a request wire, an acknowledge wire and
a bundle of data wires. One transfer is one *event* on each wire: the
sender toggles `req` (either edge counts), and the receiver toggles `ack`
to match. A transfer is pending while `req != ack`. Compared with a
4-phase protocol this crosses the long wire twice instead of four times.
Every request leaving a wrapper goes through `req_delay`, a fixed delay of
0.5 ns by default. The data bits, which take the same route, therefore
settle before the request event arrives.

**Pausable clock (`clock_gen`).** Each wrapper has a ring oscillator. Its
output `clk` comes from a C-element fed by `clkallowed` and by the inverted
clock after a programmable delay (`dly_cfg` × 0.1 ns per half period).
Each port controller owns one ME (mutual exclusion) element. The ME
arbitrates between that port's pause request `rc[i]` and the clock's own
request `eclk = ~clk`. The clock-side grants are ANDed into `clkallowed`.

* While `clk` is high, `eclk` is low, so a port that raises `rc` gets the
  ME at once (`ac[i]` goes high).
* After that, `clkallowed` stays low, and the *next rising edge waits*
  until the port drops `rc`.
* A port that asks during the low phase has to wait until the clock has
  risen.

The generator therefore never cuts a clock pulse short; it only delays
the next one. Any number of ports can hold the clock at once. Metastability
is confined to the ME elements.

**Output port (`out_port_ctrl`).** The logic block raises `en` to send.

1. At the next rising edge, `req` toggles and the data registers
   attached to the port load the word (`load = en`).
2. Because `req != ack`, `rc` rises and the generator holds the clock
   after the current pulse.
3. When the receiver toggles `ack`, `rc` falls. This happens only after
   `ac` has been seen high: `rc` is a C-element of "pending" and `~ac`.
4. The clock is released. If `en` is still high, the next edge sends the
   next word with the opposite `req` transition.

`req` is registered as `en XOR C(req, ack)`. As a result, `req` can never
toggle twice for one acknowledge, even if an edge slipped through.

**Input port (`in_port_ctrl`).** The logic block raises `en` when it needs
a word.

1. If no new event has arrived (`req == ack`), `rc` rises and the clock
   stops after the current pulse.
2. The request event makes `req != ack`, so `rc` falls and the clock is
   let go.
3. At that rising edge `load` is high. The registers take the data and
   `ack` copies `req`, which completes the transfer.
4. If a word was already waiting when `en` rose, no pause happens.

Both controllers are *demand type*: while `en` is high, every rising edge
of the domain clock moves exactly one word on that port. The logic block
needs no handshake logic of its own. It sees only a clock that sometimes
arrives late.

Consequence for users: a wrapper whose logic keeps an input port enabled
with no sender stops its whole clock domain. A logic block that waits on
several ports at once must expect all of them to deliver. The end-to-end
testbench runs its flows in phases for this reason.

## Programmable channel width (`io_port_matrix`)

The 16 port controllers of a wrapper share 128 bidirectional I/O data
registers. Each register has one configuration entry (`io_reg_cfg_t`):
unused, or attached to input port *p*, or attached to output port *p*.

* The port's `load` strobe is the register's enable.
* An output register drives its wire (`pin_out`, `pin_oe`) from
  `lb_dout`.
* An input register takes `pin_in` and shows it on `lb_din`.

A port therefore carries as many bits as there are registers pointing at
it. A port may own at most 64 registers; `cfg_err` flags a configuration
that breaks this rule. Bidirectional wires are split into in, out and
output-enable signals throughout, so there are no tri-state nets.

## Clock domains inside an island

The four wrappers give four local clocks, numbered 1..4 clockwise from
north. `cdu_clock_select` carries all four over the logic block. Each of
its 16 clock distribution units picks one with a 2-bit select. A clock
domain can therefore have any shape made of units.

A domain that needs more than one wrapper's 16 ports uses a
`clock_grouping` module. There is one at each island corner; module *k*
sits between wrappers *k* and *k+1*. When enabled, its C-element combines
the two generated clocks into a common clock, and both wrappers' controllers
and registers run on it. A pause held by any port of either wrapper keeps
one of the two generators low, which stops the common clock. Two adjacent
grouping modules must not both be enabled (an assertion checks this), so a
wrapper belongs to at most one group.

## Interconnect

**Direct links.** Facing wrappers of adjacent islands (E with W, S with N)
are wired together with 8 handshake pairs and 64 data wires. The split is:

* Output ports 0..3 of each side drive input ports 0..3 of the other side.
* Registers 0..63 of the two wrappers share the 64 wires. A wire carries
  whichever side has that register configured as an output.

**Global channels.** A horizontal channel runs above and below every row
of islands, and a vertical channel runs left and right of every column.
Every segment between two switch boxes has 32 handshake pairs and 256 data
wires. The two wrappers beside a segment tap it with their ports 4..7 and
registers 64..127:

| segment tracks | use |
|---|---|
| pairs 0..3 / 4..7 | outputs / inputs of the wrapper above or left |
| pairs 8..11 / 12..15 | outputs / inputs of the wrapper below or right |
| pairs 16..31 | box to box |
| data 0..63 | shared by both wrappers (their registers 64..127) |
| data 64..255 | box to box |

A tapped pair track reaches the boxes at both ends of the segment.
Whichever box is configured to use it carries it on. The other box
leaves it alone, because an unselected source returns no acknowledge.
Data keeps its track number through the disjoint data switch, so wrappers
on different segments can exchange data on the same track numbers.

**Switch boxes (`rsb`).** Each box has two parts:

* `lrsb` switches data. Leaving track *t* on side *d* takes entering
  track *t* from one configured side, or stays low.
* `crsb` switches handshake pairs through a full crossbar
  (`crsb_switch_matrix`). Every *sink* names the *source* it takes its
  request from, and the acknowledge flows back along the same path.
  - A sink is a leaving track or a module input.
  - A source is an entering track or a module output.
  - One source may feed only one sink (an assertion checks this).

Broadcast and joins go through the modules that hang on the crossbar:

| module | count | behaviour |
|---|---|---|
| `hs_fanout` | 2 | one request to up to 4 receivers; acknowledges when all enabled receivers have (masked C-element) |
| `hs_fanin` | 2 | output event once all enabled senders made theirs; acknowledge to all |
| `hs_arbiter` | 2 | competing senders pass one at a time (tree of ME elements, forward and acknowledge latches) |
| `hs_merge` | 2 | XOR merge for senders that take turns; acknowledge goes to the one that asked |

Endpoint numbers in a box with `T` tracks per side:

* Side *d* track *t* is endpoint `d*T + t`, both as a source and as a
  sink. Let `ST = 4*T` be the first module endpoint.
* Sources from `ST` on: fanout 0 outputs 0..3, fanout 1 outputs 0..3,
  fanin 0, fanin 1, arbiter 0, arbiter 1, merge 0, merge 1.
* Sinks from `ST` on: fanout 0 input, fanout 1 input, then four inputs
  each for fanin 0, fanin 1, arbiter 0, arbiter 1, merge 0, merge 1.

Modules can be chained through the crossbar to build wider ones. The
arbiter and merge modules route only the handshake. Senders that share a
destination through them must share data wires in a way the configuration
arranges, or send data-less events.

## Configuration

All configuration is static, given as ports of `gapla_top`, and must be
stable before reset is released. How a bitstream would load it is not
modelled. The ports are:

* `dly_cfg`: ring delay of each wrapper.
* `grp_en`: clock grouping.
* `cdu_sel`: CDU clock selects.
* `reg_cfg`: register matrices.
* `rsb_snk_en` / `rsb_snk_sel`: crossbar settings.
* `rsb_*_mask`: module branch enables.
* `rsb_data_cfg`: data switch settings.

## Asynchronous circuits in RTL

The C-elements and the latches of the handshake modules are written as
`always_latch` blocks, because holding state without a clock is their
function. Lint and synthesis will report latches and combinational loops
in them, through the ME elements and the handshake feedback. These are
intended.

Two parts are behavioural models, since their real form is analog:

* `mutex`: the metastability filter of the ME element. On an exact tie,
  request 0 wins.
* `clock_gen` and `req_delay`: the delay lines, written with `#` delays.

Reset (`rst`, active high, asynchronous) brings every handshake to
`req = ack = 0` and holds every clock low.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/gapla_pkg.sv tb/tb_gapla_top.sv --top tb_gapla_top -o sim
./obj_dir/sim
```

Replace the testbench name to run a single block's test. Files are found
by module name through `-Irtl -Itb`.

`tb_gapla_top` runs the whole 2 × 2 array at its default sizes. It builds
in about a minute and runs in a few seconds. Its flows are:

* A 32-bit stream over a direct link.
* A 16-bit stream through a channel and a switch box.
* A 16-bit vertical direct link.
* An 8-bit fanout to two islands.
* Two senders competing through an arbiter.
* Two senders taking turns through a merge.
* A two-sender fanin.

All islands run at different ring periods, and island (1,1) groups two
wrappers. The testbench counts every mechanism and fails if one never
happened: direct and channel words, fanout deliveries, contended
arbitrations, merged and joined events, clock pauses, grouped-clock and
CDU-clock checks.

`tb_des_pipeline` maps a pipelined 64-bit block cipher onto the array the
way a fully pipelined DES would be partitioned:

* Three islands hold 6, 5 and 5 Feistel rounds.
* 64-bit ports carry the blocks over direct links.
* Two of the islands group their input and output wrappers into one
  clock domain.
* A fourth island checks the ciphertext.

The round function is a stand-in for DES's, computed by the testbench
acting as the logic blocks. The test shows the blocks flowing through
three clock domains with several in flight at once. At the ring settings
used, and with two clock cycles per block in each stage, it reports about
18 ns per block. That figure reflects the testbench's stage timing and
ring periods; it is not a prediction for real DES logic.

What the block testbenches cover:

| testbench | checks |
|---|---|
| `tb_clock_gen` | period for two settings; pause with one and with two ports |
| `tb_out_port_ctrl`, `tb_in_port_ctrl` | event counts, no edge while pending, pause and release |
| `tb_async_wrapper` | two wrappers at 6 ns and 11 ns: in-order delivery, stretched sender, width limit |
| `tb_async_island` | cross-domain stream; a pause in one grouped wrapper stops both |
| `tb_io_port_matrix` | random matrices against a reference model |
| `tb_crsb`, `tb_rsb` | all module types at full size; bundled data around a corner |
| other leaf tests | each leaf cell against an independent reference model |

## Where this RTL departs from, or adds to, the published architecture

Taken from the architecture:

* The island, wrapper and switch box organisation.
* All counts: 8 + 8 ports, 128 registers, at most 64 per port, 16 CDUs,
  4 local clocks, 8 pairs and 64 bits per direct link, 32 pairs and 256
  bits per channel, and two of each handshake module per box.
* The clock generator structure.
* The gate types of the port controllers.

Choices made here:

* Array size 2 × 2.
* The split of wrapper ports and registers between direct links and
  channels. A published block diagram labels the wrapper-to-channel
  connection with 16 pairs and 128 bits; here each wrapper gives half of
  its I/O to the direct links and half to the channel.
* The channel track assignment and shared data taps.
* The disjoint data switch box.
* The crossbar encoding.
* The internals of the fanout, fanin, arbiter and merge modules. Only
  their function is given by the architecture.
* The exact wiring of the input port controller, built from its described
  behaviour.
* The ring delay step (0.1 ns), the request delay (0.5 ns), the reset, and
  the rule of one group per wrapper.

The island's synchronous logic is not included. The published evaluation
assumes 24 × 20 CLBs plus 24 multipliers per island; its area figures
count 576 CLBs per island instead.

## Capacity against the published benchmarks

These figures come from the published results, not from simulation of
this RTL.

* **Synthetic DAG circuits.** The circuits ex1, ex2 and ex3 were
  partitioned into 2, 8 and 16 clock domains, using 960, 3840 and 7680
  CLBs, which is 480 CLBs per partition. The default 2 × 2 array has four
  islands, so it holds ex1. ex2 needs `ROWS*COLS >= 8` and ex3 needs at
  least 16.
* **Pipelined DES.** It uses three encryption partitions plus a subkey
  module. The default array has enough islands for that, but the CLB
  count of each partition is not published. `tb_des_pipeline` runs this
  partitioning with a stand-in round function.
