# A field-programmable array of self-timed, bit-serial cells with per-LUT power gating

This design is a programmable logic fabric built to save power. It has three ideas:

- **Bit-serial cells.** Every cell handles one bit at a time, and a word travels LSB first as a stream of tokens. That keeps each cell's routing to a single link per neighbour.
- **Self-timed LEDR links.** No global clock decides when data moves. Each bit travels with its own validity information, coded as LEDR (level-encoded two-phase dual-rail). A cell works only when a complete set of inputs has arrived.
- **Per-cell power gating.** Every cell's logic sits behind its own power switch. The handshake already knows when data is coming and when a cell has gone quiet, so the switch can be driven from that: upstream cells wake a cell ahead of its data, and a cell that stays idle turns itself off.

The default array has 200 cells (10 rows × 20 columns). Each cell connects to its four neighbours and is programmed through a scan chain. A cell can act as any two-input logic function, a one-bit serial adder that keeps its carry, or a one-bit store.

The RTL is a **clocked rendering** of this self-timed circuit. The wire codes, the handshake rules and the power-gating decisions are the real ones. But every state change happens on one clock edge, so the code can be synthesised and simulated with two-state tools. Read "one clock" below as "one handshake step".

## The link: four wires and the LEDR code

Each cell-to-cell link has four wires:

| wire | direction | meaning |
|------|-----------|---------|
| `v`    | forward  | the data value |
| `r`    | forward  | redundant rail; `v ^ r` is the token's phase |
| `wake` | forward  | "a token is on its way, power up" |
| ack    | backward | phase of the last token the receiver consumed |

`v`, `r` and `wake` are bundled as `fpvlsi_pkg::link_fwd_t`. The acknowledge is a separate signal because it runs in the other direction.

LEDR encodes one bit on two wires. The phase flips with every new token:

| phase | data 0 | data 1 |
|-------|--------|--------|
| 0     | (v,r) = (0,0) | (1,1) |
| 1     | (0,1)         | (1,0) |

Between two tokens exactly one wire changes. A receiver therefore spots a new token because its phase differs from the phase the receiver last consumed. Unlike four-phase dual-rail, no spacer is needed between tokens.

The handshake is two-phase, with no return to zero:

- **Sender.** It may put a new token on the link (in the opposite phase) only once `ack` equals the phase of the token currently on the link.
- **Receiver.** It has a token waiting while `phase(v,r) != ack`. Consuming the token means setting `ack` to that phase.

After reset every link sits at (0,0) and every ack at 0, so no token is waiting anywhere. A link that is not used stays at (0,0).

If one output feeds several neighbours, the sender waits until **all** of them have acknowledged (`switch_box.out_ready`). This is the two-phase counterpart of a C-element.

## The LEDR look-up table (`ledr_lut`, `ledr_lut_sub`)

The LUT works directly on the LEDR pairs (Va,Ra) and (Vb,Rb). It is split into two halves:

- One `ledr_lut_sub` answers phase-0 tokens and the other answers phase-1 tokens.
- Each half has a decoder, the four memory bits `Mmn` (the result for Va=m, Vb=n) and an output driver.
- A half drives only when **both** inputs carry its phase. It then outputs `Vout = M[Va][Vb]` and `Rout = Vout ^ phase`, so the result is already a legal LEDR code in the same phase.

If the inputs carry different phases (one operand has arrived and the other has not), neither half drives. In silicon the output would float while a keeper latch holds the last value. Here the keeper is a flip-flop and `valid` is low.

So `valid` is the block's completion detector: a valid, same-phase pair that the block has not yet consumed means "compute now". Memory bits are indexed `m[{a,b}]`. For example, AND is `4'b1000`, XOR is `4'b0110`, "pass A" is `4'b1100` and "NOT A" is `4'b0011`.

## The logic block (`logic_block`)

The block **fires** in the clock cycle in which all of these hold:

1. The LUT reports a valid pair whose phase differs from `in_ack` (a new pair).
2. `pwr_good` is high (the block is powered).
3. `out_ready` is high (every receiver has taken the previous output).
4. The cell is not configured as unused.

Firing does three things:

- It flips `in_ack`, which acknowledges both inputs at once.
- It puts the result on the output in the opposite output phase.
- It updates the block's own state.

If input B is not used, it is replaced internally by a 0 in A's phase.

| mode | result | state update |
|------|--------|--------------|
| `MODE_LOGIC` | `LUT(a,b)` | none |
| `MODE_ARITH` | `LUT(a,b) ^ c`; program the LUT as XOR | `c <= maj(a,b,c)`; `c` clears after `WORD_BITS` bits |
| `MODE_STORE` | the stored bit | stored bit `<= a` (one-token delay, starts at `init`) |
| `MODE_OFF`   | never fires | none |

Timing:

- A complete pair is acknowledged at the first clock edge after it arrives, if the block is powered and its output is free.
- The result appears on the output link at that same edge.
- A token therefore moves one cell per clock through a powered pipeline, and back-pressure stalls it without loss.

## Power gating (`power_ctrl`, `power_switch`)

Each cell has its own controller and switch.

- **Wake-ahead.** A cell raises its `wake` wire towards its receivers one clock after one of these happens: a token arrives at its inputs, or it sees a wake request itself. A receiver turns its switch on when it sees `wake` on one of its selected input links. The request therefore runs down the configured path one cell per clock, ahead of the data. Each cell's wake-up (`WAKE_CYCLES`) overlaps the work of the cells before it instead of being paid when the token arrives.
- **Staying awake.** A cell stays on while any of these holds:
  - a wake request is present;
  - a token is waiting at its inputs;
  - its output has not been acknowledged;
  - it holds state: a store cell, or an adder in the middle of a word.
- **Delayed sleep.** Only after `SLEEP_DELAY` consecutive idle cycles is the switch turned off. A cell that gets tokens in quick succession therefore is not switched on and off for every bit, and the energy of charging the virtual supply is not wasted.
- **Unused cells** (`MODE_OFF`) are never powered.

`power_switch` is a behavioural model of the analog sleep transistor. `pwr_good` rises `WAKE_CYCLES` clocks after `en` rises and falls one edge after `en` falls. `on_cycles` counts the cycles the switch has conducted, as a stand-in for leakage energy.

State retention is a simplification here: the handshake phases, the carry and the stored bit are treated as always-on. Power-down only stops the block from firing. Cells whose state matters refuse to sleep anyway.

## The array (`fpvlsi_top`, `fpvlsi_cell`, `switch_box`)

`fpvlsi_cell` contains:

- the configuration register;
- `switch_box`, which connects the cell to its neighbours;
- `logic_block`;
- `power_ctrl`;
- `power_switch`.

`switch_box` does the following:

- It picks which neighbour feeds input A and which feeds input B, and ORs their wake wires.
- It returns the block's acknowledge on those two links.
- It copies the output onto every neighbour enabled in `out_en`.
- A token arriving on a link that is not selected is acknowledged at once and dropped, so a programming error cannot hang the neighbour.

The configuration word (`cell_cfg_t`, 16 bits, MSB first):

| field | bits | meaning |
|-------|------|---------|
| `lut`    | 4 | memory bits `m[{a,b}]` |
| `mode`   | 2 | `MODE_LOGIC`, `MODE_ARITH`, `MODE_STORE`, `MODE_OFF` |
| `sel_a`  | 2 | neighbour feeding A (`DIR_N`, `DIR_E`, `DIR_S`, `DIR_W`) |
| `sel_b`  | 2 | neighbour feeding B |
| `use_b`  | 1 | input B takes part |
| `out_en` | 4 | output sent to these neighbours (bit index = direction) |
| `init`   | 1 | initial stored bit |

How to program the array:

- All cells form one scan path in row-major order, starting at cell (0,0).
- Hold `rst_n` low, raise `cfg_shift`, and shift the words in: the last cell's word first, each word MSB first. That takes `ROWS*COLS*16` clocks.
- Then release `rst_n`. Reset is synchronous, and a store cell loads `init` while reset is held.

Border cells bring their outward links out as top-level ports:

- `n_*` and `s_*` are indexed by column; `w_*` and `e_*` by row.
- Each side has `_in` / `_in_ack` for tokens entering the array and `_out` / `_out_ack` for tokens leaving it.
- The status arrays `pwr_good`, `fire`, `wait_pwr` and `on_cycles` give one entry per cell for measurement.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `ROWS`, `COLS` | 10, 20 | top | array size (200 cells) |
| `WORD_BITS` | 8 | top, cell, logic block | serial word length; the carry clears after this many bits |
| `SLEEP_DELAY` | 4 | top, cell, power controller | idle cycles before power-off |
| `WAKE_CYCLES` | 2 | top, cell, power switch | wake-up latency of the switch |

## Simulating

All files are plain SystemVerilog-2017. The package must be read first. For example, to run the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_fpvlsi_top \
  -y rtl -y tb +libext+.sv rtl/fpvlsi_pkg.sv tb/tb_fpvlsi_top.sv
obj_dir/Vtb_fpvlsi_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each one compares the design against reference values computed independently and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ledr_lut` | every function and input code; the keeper holds on mixed phases |
| `tb_logic_block` | logic functions with skewed inputs; one-clock latency; serial sums; one-token storage; no firing unpowered |
| `tb_power_ctrl` | cycle-exact reference model; many wake-ups and sleeps |
| `tb_power_switch` | wake-up latency; immediate off; on-cycle count |
| `tb_switch_box` | selection, acknowledge routing, fan-out, acknowledge join, with random stimulus |
| `tb_fpvlsi_cell` | scan in and out; XOR with fan-out to two receivers; wake-ahead; sleep; token waiting for power |
| `tb_fpvlsi_top` | 3×4 array (see below) |
| `tb_fpvlsi_full` | the same end-to-end test on the default 10×20 array, parameters untouched |
| `tb_fpvlsi_activity` | the default array with every input carrying a token about one clock in ten; measures power-switch on time |

The last two tests program the array as two pipelines:

- **Row 0:** serial adder → store → buffers → inverter.
- **Row 1:** XOR with the adder's result, reached by fan-out from the cell above → buffers.
- **Other rows:** unused.

Both tests check every output bit, and they check that the unused cells never power up. Each also counts, and requires at least once:

- a wake-up;
- a wake-up ahead of the data;
- a sleep;
- a token waiting for power;
- a mixed-phase hold;
- back-pressure;
- a carry.

## Power gating at low activity

`tb_fpvlsi_activity` runs the two pipelines on the full 200-cell array with random gaps between input tokens, about 10 % input activity. It then adds up `on_cycles`. Typical results:

- The 40 cells in use conduct for about 90 % of the run.
- The whole array conducts for about 18 %, because the 160 unused cells never power up.

With one-bit tokens arriving every ten clocks or so, `SLEEP_DELAY = 4` and `WAKE_CYCLES = 2`, a used cell is rarely idle long enough to sleep. Even so, the cells in use go to sleep about 2,000 times in all over a run, roughly 50 times each. Most of the saving comes from cells that are not in use or are between bursts.

A larger `SLEEP_DELAY` saves switching energy but keeps cells on longer. These numbers are cycle counts, not power. The trade-off in energy depends on the process, which this RTL does not model.

## Where this RTL departs from, or goes beyond, the design it renders

- **Clocking.** The original circuit is self-timed. Here one clock paces all cells, and each handshake step costs a clock. Delays in nanoseconds, and power, are not modelled; `on_cycles` is only an activity proxy.
- **Keeper and tri-state.** The LUT's floating outputs and keeper latch become a drive-enable and a flip-flop.
- **Choices made here, not given by the design:**
  - the carry clearing after `WORD_BITS` bits;
  - the one-token-delay meaning of "1-bit storage";
  - the configuration word and the scan path;
  - the neighbour-selection fields;
  - dropping tokens on unselected links;
  - the edge ports;
  - the 10 × 20 shape of the 200 cells;
  - the values of `WORD_BITS`, `SLEEP_DELAY` and `WAKE_CYCLES`.
- **Sleep policy.** The controller implements "power off after a fixed idle time". The original controller's exact sleep condition is not known here.
- **No input registers.** The logic block reads its operands straight off the links and acknowledges them when it fires. There are no separate input latches.
- **No routing-only tracks.** Tokens move only between neighbouring cells. Longer paths are made from cells set to pass their input through (LUT `4'b1100`).
