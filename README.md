# EDWARD pixel-array readout (8x8 tile) in SystemVerilog

A pixel detector chip has many more data sources than output links, so
channels must share a bus. This RTL implements EDWARD (Event Driven With
Access and Reset Decoder), a readout that shares one data bus among 64 pixel
channels without any of the usual costs:

* no polling: a pixel that has data raises a request, and only requests
  travel;
* no clock inside the array: the requests are arbitrated by an asynchronous
  binary tree of mutual-exclusion cells, and the only clocked element near
  the array is the token generator at the root;
* no fixed priority: each cell of the tree serves whichever of its two inputs
  asked first;
* no dead time: when a channel finishes, the token moves to the next waiting
  channel within the same token pulse, so back-to-back readouts fill every
  bus period;
* a defined bus at all times: an idle word is driven when nobody reads out,
  so a serializer downstream sees an unbroken word stream.

The access token does double duty: it grants the bus (access decoder) and,
after the last packet, resets the pixel (reset decoder).

## One readout, period by period

Time is divided into token periods of 14 bit clocks (250 MHz bit clock,
17.86 MHz periods, 56 ns). Each period starts with the token **active** for 3
bit clocks (12 ns) and then leaves it **inactive** for 11 (44 ns, 78.6 % of
the period). The inactive part is the bus-access frame.

```
bit clock  |0 1 2|3 4 5 6 7 8 9 10 11 12 13|0 1 2|3 ...          |0 1 2|
token      |#####|.........................|#####|...............|#####|
channel A  |edge1| drives packet 0         |edge2| drives pkt 1  |edge3: done, req cleared,
           |     |                         |     |               |  pixel reset; token moves on
channel B  |     |                         |     |               |   edge1 (same pulse)| drives...
word_o     |     |                    latch ^|    |          latch ^|
```

1. The pixel raises `rdy`. The channel's request flip-flop (clocked by `rdy`)
   sets `req`, which climbs the tree; the root request `rqo` is synchronised
   by two flip-flops to the bit clock.
2. At the next period boundary the token generator sees the request and
   issues a token. The tree routes it down the path the request took; the
   channel sees a rising `ack` (token edge 1), opens bus access and loads its
   packet counter.
3. When the token goes inactive the channel drives packet 0. The data-valid
   detector raises `dval` once the lines have settled, and at the last bit
   clock of the period the management block latches the bus word into
   `word_o` with `word_valid`.
4. Each further token edge advances to the next packet. The edge after the
   last packet (edge N_PACKETS + 1) ends the readout: the channel clears its
   request and resets its pixel. Clearing the request frees the path, so any
   cell that has a waiting request on its other side switches at once and
   the still-active token reaches the next channel in the same pulse: that
   edge is the next channel's edge 1. The active part of the period (12 ns)
   is the budget for this redistribution; reported worst-case redistribution
   in a 65 nm implementation is 9.6 ns, which is why the inactive share must
   stay at or below 82 %.
5. The pixel acknowledges the reset by dropping `rdy`; that releases
   `pix_rst` and arms the request flip-flop for the next event.

With the default of 2 packets per readout, a channel occupies the bus for two
periods and sees three token edges; under continuous load the array delivers
one readout every 112 ns and every period carries a data word.

## The arbitration tree

`arb_tree` is a binary tree of 63 `arb_cell`s for 64 channels (6 levels).
Each cell has three parts:

* **Arbiter** (`arb_mutex`): the SR latch of a Seitz mutual-exclusion
  element. A request is granted if the other side holds no grant; the grant
  is held for as long as the request stays, whatever the other side does;
  when it is withdrawn a waiting request on the other side is granted at
  once. In silicon a metastability filter hides the latch until it has
  decided; here both grants are updated in one latch process, so they can
  never be high together. An exact tie, decided in silicon by metastability,
  goes to side a in this model.
* **Commuting circuit**: the cell's request to its parent (`rqo`) is high
  while either side holds the grant, and the parent's token (`acki`) is
  steered to the granted side.
* **Guard stage**: the token reaches a child only while that child's own
  request is still high. A child that withdraws its request loses the token
  in the same instant, before the arbiter switches, so two children never see
  the token together while the path moves. This is this design's reading of
  the first, glitch-preventing stage of the cell.

The cells come in two flavours, NOR (active-high child side) and NAND
(active-low child side). A cell's parent-side signals have the opposite
polarity of its child side, so levels alternate flavours and no inverters are
needed: in `arb_tree`, level *l* is NOR for even *l* and NAND for odd *l*,
and node signals of level *l* are active high for even *l*. For an odd number
of levels one inverter at the root keeps `rqo` and `acki` active high.

Channels 0-31 sit under side a of the root and 32-63 under side b.

**Fairness under saturation.** Because a subtree hands the token on without
ever dropping its request, a cell keeps serving the same side for as long as
that side has a request waiting when its current readout ends. Below
saturation (the intended use: about 3 readouts per microsecond against a
capacity of about 9) every request is served within a few periods. At
sustained overload one half of a cell can starve the other: with every pixel
asking ten times as often as nominal (`tb_edward_saturation`), 26 to 32 of
the 64 channels (depending on the random seed) were never read in 50 us,
while the bus stayed fully used. Nothing
in this RTL adds round-robin behaviour.

## In-channel logic

`in_channel` holds this state:

| state     | set by               | cleared by | role |
|-----------|----------------------|------------|------|
| `req`     | rising `rdy` (if `en`) | the completing token edge | readout request |
| `access`  | first token edge     | completing token edge | the channel owns the bus |
| `cnt`     | first token edge (loaded) | counts down on each token edge | packets left after the current one |
| `done`    | completing token edge | falling `rdy` | readout finished, drives `pix_rst` |

`req` and `done` are each set in one clock domain and cleared in another.
They are built as the XOR of two toggle flip-flops, one per domain
(`req = start_t ^ fin_t`, `done = fin_t ^ rel_t`), so every flip-flop has a
single clock and a single reset, and a flag never glitches because only one
toggle moves per event.

The channel drives its bus contribution only while it has access and the
token is inactive (`drive = access & ~ack`), so the bus is free during every
token pulse, which is when ownership can change. A token edge that arrives
without a pending request is ignored. Disabling a channel (`en` low) blocks
new requests; a readout already requested runs to completion.

There is no address encoder: the token itself selects the channel. If the
consumer must know which pixel a word came from, the pixel has to put that
in its packets (the testbenches use `{channel, packet index, event number}`).
Reset (`rst_n`) is asynchronous and must be applied with a falling edge
before use, as the channel flip-flops are clocked by `rdy` and `ack`, not by
the bit clock.

## Bus, data valid and the word stream

* `shared_bus` combines the channel contributions. The tri-state drivers of a
  real bus are modelled as AND-OR: a channel presents zeros unless it
  drives. When no channel drives, the default-state circuitry forces
  `IDLE_WORD` (`14'h2AAA`). Assertions in the top check, at every bit clock
  after reset, that at most one channel drives and at most one channel sees
  the token.
* `data_validator` stands for an analog detector that senses the data lines
  at 70 % of their final level. It is a **behavioural model** (delays, not
  synthesizable): `dval` rises 2 ns after the bus is driven or changes and
  falls as soon as it is released.
* `sync_mgmt` holds the request synchroniser, the token generator
  (`token_gen`) and the word latch. Once per period it emits a word with
  `word_stb`: the bus word with `word_valid` high if a token was issued and
  `dval` was high at the last bit clock of the frame, otherwise `IDLE_WORD`
  with `word_valid` low. A serializer (not part of this RTL) can shift out
  one 14-bit word per period at 250 Mbps.

## Parameters

Defaults live in `rtl/edward_pkg.sv` and are passed down from the top.

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| `N_CH` | 64 | channels (power of two) | the 8x8 tile |
| `DATA_W` | 14 | bits per word | 250 Mbps / 17.86 MHz = 14 bits per period |
| `N_PACKETS` | 2 | packets per readout | design choice; three token edges per readout, matching published token-to-reset sample ratios |
| `DIV` | 14 | bit clocks per token period | 250 MHz / 17.86 MHz |
| `ACTIVE_TICKS` | 3 | bit clocks of token-active time | largest split with inactive share <= 82 % |
| `IDLE_WORD` | `14'h2AAA` | default bus word | design choice |
| `SETTLE_NS` (`data_validator`) | 2.0 | data-valid settling delay | design choice, near published 2.2-3.7 ns setup times |

## Choices made in this RTL

The architecture fixes the structure (request flip-flop, token-clocked
channel state, time-of-arrival arbitration tree with alternating cell
flavours, token generator, shared bus with default state, data-valid
detector) and the 64-channel, 17.86 MHz, <= 82 % operating point. These
points are this implementation's own:

* packets per readout (2), word width (14), idle word and data-valid delay;
* deriving the token from a 250 MHz bit clock divided by 14, with a 3/14
  active split, and latching data at the last bit clock of each frame;
* the form of the cell's guard stage (token gated by the child's own
  request) and the tie-break of the arbiter (side a);
* the pixel handshake: `pix_rst` held until `rdy` falls;
* toggle-pair construction of `req` and `done`;
* AND-OR instead of tri-state for the bus.

The end-to-end test uses a Poisson event rate of one per 20 us per pixel; over
256 us this gives about 820 readouts of the 64 pixels, the number reported for
the reference 65 nm transient study of this architecture.

## What is not here, and what a zero-delay model cannot show

* The pixel front ends, the analog bus with its transmission gates, the
  buffer stage that splits the bus load, and the serializer have no logic to
  write; pixel-side signals (`rdy`, `pix_data`, `pix_rst`, `en`) are ports of
  the top. Each pixel supplies `N_PACKETS` digital words.
* The architecture's interest lies largely in analog timing: setup and hold
  of bus data against the clock, token propagation (about 0.8-1.7 ns) and
  redistribution (about 6.6-9.6 ns) through the tree, and pixel reset time,
  measured on an extracted 65 nm layout. RTL simulation is zero-delay, so
  those intervals are 0 here apart from the bit-clock quantisation and the
  modelled `dval` delay; the RTL shows that the protocol is correct, not that
  a given process meets the 12 ns redistribution budget.
* The arbiter and the asynchronous channel flip-flops are real latches and
  derived clocks. Synthesis tools report a combinational loop through each
  arbiter latch; that loop is the SR latch and is intended. In a
  standard-cell flow the arbiter would be a hand-made cell.

## Files

| file | contents |
|------|----------|
| `rtl/edward_pkg.sv` | shared default constants |
| `rtl/arb_mutex.sv` | two-input arbiter (SR latch + filter), NAND/NOR flavours |
| `rtl/arb_cell.sv` | arbitration cell: guard, arbiter, commuting circuit |
| `rtl/arb_tree.sv` | binary tree of cells with alternating flavours |
| `rtl/in_channel.sv` | per-pixel request, access, countdown, done and pixel reset |
| `rtl/shared_bus.sv` | shared digital bus with idle default |
| `rtl/data_validator.sv` | behavioural data-valid detector |
| `rtl/token_gen.sv` | token generator from the bit clock |
| `rtl/sync_mgmt.sv` | synchroniser, token generator, word latch |
| `rtl/edward_readout.sv` | top: the 64-channel tile |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_edward_saturation.sv` | the tile under tenfold overload |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run with a failure. From the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/edward_pkg.sv tb/tb_edward_readout.sv \
          --top-module tb_edward_readout -Mdir obj_top
./obj_top/Vtb_edward_readout
```

Replace the testbench name for the others. `--timing` is needed because the
testbenches and the data-valid model use delays.

What the testbenches check:

* `tb_arb_mutex`, `tb_arb_cell`: both flavours against a reference model,
  over directed sequences (first come, hold, handover, tie) and hundreds of
  random single-signal changes.
* `tb_arb_tree`: a 64-channel and an 8-channel tree (even and odd level
  counts) against a cell-by-cell reference, 20,000 random steps; handovers
  within a token pulse and contention must both occur.
* `tb_in_channel`: complete readouts with 2 and 4 packets; the right packet
  in each frame, nothing driven while the token is active, N_PACKETS + 1
  token edges per readout, reset handshake, disabled channel.
* `tb_shared_bus`, `tb_data_validator`, `tb_token_gen`, `tb_sync_mgmt`:
  idle word, settling and glitch suppression, the 3/14 token split and 56 ns
  period, synchronised request and the word stream.
* `tb_edward_readout`: the whole tile at its default parameters for 256 us
  with every pixel a Poisson source of mean interval 20 us (about 810
  readouts). Each output word is matched to the readout and packet it belongs
  to; a pixel may be reset only after all its packets left; every event is
  read out; one word leaves per 56 ns; latency from an idle array stays
  within 48-128 ns. It also requires at least one contention, one gapless
  handover between channels, one idle period, and a disabled channel that
  raises `rdy` without requesting.
* `tb_edward_saturation`: the tile at its defaults with a 2 us mean interval
  per pixel; after the first 5 us every period must carry a data word and
  the readout rate must be one per two periods; it reports how many channels
  went unserved.
