# Tensor-Organized Memory (TOM): message retrieval with winner-take-all modules

A TOM is an associative memory for *messages*. A message is a short list of patterns
(here four binary images of 25 pixels, such as four letters). Each position in the list
has its own winner-take-all (WTA) module that has learned a set of patterns (25 classes).
Storing a message means tying together the class neurons that represent its patterns,
one neuron per module, into a *clique*. Retrieval presents a damaged message, with noisy
pixels and some patterns erased to black. Every module that recognises its pattern
produces a winner. The clique connections then switch on the missing members, so the
whole stored message comes back.

The design contains two retrieval engines that share one set of trained weights:

* **Spiking engine** (`tom_normal`). Leaky integrate-and-fire (LIF) neurons integrate
  spikes over an integration window. The first output neuron to reach threshold wins
  and resets its rivals.
* **DLBS engine** (`tom_dlbs`, for "digital-logic-based system"). It makes the same
  decision without any time dynamics: XNOR, population count and two comparators, in a
  pipeline that accepts one message per clock.

Training is not part of the hardware. STDP (spike-timing-dependent plasticity) trains
the feed-forward synapses, and Hebbian association builds the cliques. Both run in
software, and the results are written into registers.

## Storing a message: the register file

`tom_weight_regs` holds everything that was learned:

| bank | size (defaults) | meaning |
|---|---|---|
| `w2` | 4 modules x 25 classes x 25 bits | trained pattern of each class (the feed-forward synapses) |
| `w1` | 4 modules x 25 bits | input-layer weight of each pixel. Used by the spiking engine as a pixel enable. Resets to all ones. |
| `msg_class`, `msg_valid` | 8 slots x 4 class indices | stored messages. One class per module, so one clique per slot. |

Writes go through one port on `tom_top`, one row per clock:

* `wr_sel = 0`: `w2[wr_wta][wr_idx] <= wr_data`
* `wr_sel = 1`: `w1[wr_wta] <= wr_data`
* `wr_sel = 2`: message slot `wr_idx` gets `wr_msg_class` (4 indices of 5 bits) and
  `wr_msg_valid`

Clearing `wr_msg_valid` frees a slot.

The cliques are kept as class indices per message, not as a neuron-to-neuron
connection matrix. Both forms describe the same cliques. The index form needs 8 x 20
bits here instead of 100 x 100.

## Completing a message: the excitatory OR network

`excitatory_or` is shared by both engines and is purely combinational. Output bit
(x, c) is the OR of:

* module x's own winner bit c; and
* for every valid stored message whose member in module x is class c, the winner bits
  of that message's members in the *other* modules.

So a single recognised member is enough to light up its whole clique. A module can end
up with two active classes: its own winner, plus a different class pulled in by a clique
that the other modules recognised. Both bits are kept, as an OR gate would keep them.
Downstream logic decides what to do with such a conflict.

## The spiking engine

### Input layer: a LIF neuron that is just a shift register (`lif_sr_neuron`)

The discrete LIF neuron is `u[n] = alpha*u[n-1] + beta*I[n]`. With alpha = 1/2 and
beta = 2 this recurrence is exactly a shift register. Read the register as a
fixed-point number whose MSB weighs 2, the next bit 1, then 1/2, and so on. A right shift
halves the potential, which is the leak. Inserting the input bit at the MSB adds
2*I[n]. With a constant input the potential climbs 0, 2, 3, 3.5, 3.75, ... towards
beta/(1-alpha) = 4.

The threshold is the all-ones value, so the spike is simply the AND of all register
bits. The spike drives the register's synchronous reset. The input bit is
`pattern AND w1`. With `SR_BITS = 6`:

* an active pixel first fires 6 clocks after a clear;
* it then fires every 7 clocks.

Because every input neuron is cleared at the same time, all active pixels fire
together.

### Output layer: class neurons (`lif_fp_neuron`)

The potential follows `u = eta*u + I` with `eta = alpha/beta`. Dividing the LIF equation
by beta needs one multiplier instead of two, and the threshold scales the same way.

* **Input.** In each clock, `I_j` is the number of input-layer spikes that arrive through
  class j's set synapses: `popcount(spikes & w2[j])`. So class j sees an impulse train
  whose height is its overlap with the pattern.
* **Format.** The potential, `eta` and `gamma` are floating point, stored as IEEE-754
  single-precision words (1 sign, 8 exponent and 23 fraction bits). All values are
  non-negative. The multiplier and the adder truncate, there are no subnormals (tiny
  results become zero), and overflow saturates at the largest finite value. Because the
  values are non-negative, the threshold test is an unsigned compare of the words.
* **Spike and reset.** The neuron spikes while its stored potential is at least
  `gamma`. It is cleared on the next clock when it spikes itself, or when any other
  class neuron of the same module spiked (lateral inhibition).

### Deciding the winner (`wta_snn`)

All class neurons receive their impulses on the same clocks and share `eta`, so their
potentials stay in the order of their overlaps. The class with the largest overlap
therefore reaches `gamma` first. How sharply the engine tells close classes apart
depends on `gamma`:

* If `gamma` is reached by the first impulse, every class whose overlap is at least
  `gamma` crosses at once.
* A higher threshold, reached only after several impulses, separates close overlaps.

The first clock with any class spike latches the winner one-hot. On a tie, the lowest
class index wins. A module whose pattern is erased receives no input and stays silent.

Timing, with one impulse needed: the class spike shows 7 clocks after the clear and
`winner` 8 clocks after. Each further impulse adds 7 clocks.

### Controller (`tom_normal`)

`IDLE -> CLEAR (1 clock) -> RUN (WINDOW = 64 clocks) -> DONE (1 clock)`.

* `start` is accepted while `busy` is low. The message is captured on that edge.
* `done` pulses on the 66th clock edge after the edge that captured `start` (WINDOW + 2).
* `winners` and `retrieved` are then valid and hold until the next `done`.

A winner must latch within the window. With the defaults this allows up to 9 impulses
(9 x 7 + 1 = 64 clocks).

## The DLBS engine

The spiking output neuron's firing rate grows monotonically with its input amplitude S.
So the winner of the spiking race can be found by comparing the S values directly,
without simulating time. The DLBS does that, and also changes the match measure:

1. **`dlbs_popcount`: XNOR and population count.** The count includes pixels that are
   black in both the pattern and the class, not only white ones. This separates
   patterns better than the AND used by the spiking engine.
2. **`dlbs_spike_cmp`.** Passes S only if `S > Smin`, and outputs 0 otherwise.
3. **`dlbs_winner_cmp`.** A class wins if its value is non-zero and larger than every
   other class's value. On a tie the lower index wins. If all values are 0 there is no
   winner.

`dlbs_wta` puts a register after each of these three stages. `tom_dlbs` adds a register
after the excitatory OR. A message issued with `dlbs_in_valid` comes back with
`dlbs_out_valid` **4 clocks later**, and a new message can be issued every clock.

`Smin` matters more than it may seem. An erased pattern is all black, and XNOR counts
black-on-black as agreement. A class whose trained pattern is mostly black would
therefore "recognise" an erased pattern unless `Smin` is above its number of black
pixels. Choose `Smin` from the trained patterns. With 25 pixels and the test patterns
used here, 19 works well.

## Top level (`tom_top`) interface

| port | dir | width (defaults) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of every register |
| `wr_en`, `wr_sel`, `wr_wta`, `wr_idx`, `wr_data`, `wr_msg_class`, `wr_msg_valid` | in | 1, 2, 2, 5, 25, 4x5, 1 | register writes (see above) |
| `cfg_eta` | in | 32 | spiking leak, single-precision word; 1.0 means no leak |
| `cfg_gamma` | in | 32 | spiking threshold, single-precision word |
| `cfg_smin` | in | 5 | DLBS minimum match count |
| `message` | in | 4x25 | message to retrieve; pattern x is `message[x]` |
| `norm_start`, `norm_busy`, `norm_done` | in/out | 1 | spiking-engine handshake |
| `norm_winners`, `norm_retrieved` | out | 4x25 | spiking winners and completed message (one-hot rows) |
| `dlbs_in_valid`, `dlbs_out_valid` | in/out | 1 | DLBS pipeline valid in/out |
| `dlbs_winners`, `dlbs_retrieved` | out | 4x25 | DLBS winners and completed message |

Both engines read the same `message` bus and can run at the same time. The spiking
engine also uses `w1`; the DLBS engine uses only `w2`. The defaults live in
`rtl/tom_pkg.sv` and can be overridden on `tom_top`:

* `PAT_LEN = 25`, `NUM_CLASS = 25`, `NUM_WTA = 4`, `MAX_MSG = 8`
* `SR_BITS = 6`, `EXP_W = 8`, `MAN_W = 23`, `WINDOW = 64`

At the defaults, coarse (word-level) synthesis of the whole design gives about 20,200
cells and 8,200 flip-flops. By part:

* spiking engine: about 10,000 cells and 4,100 flip-flops. The 100 single-precision
  multiply-add units are most of the logic.
* DLBS engine: about 10,200 cells and 1,300 flip-flops.
* register file: 2,770 flip-flops.

## What comes from the source design and what is this implementation's choice

Taken from the source design:

* the two-layer WTA with shift-register input neurons and single-multiplier output
  neurons;
* lateral inhibition by resetting the other output neurons;
* OR-gate excitatory connections between modules;
* the XNOR / population count / spike comparator / winner comparator chain;
* alpha = 1/2 and beta = 2;
* 25 input neurons per module, 25 classes, and four patterns per message;
* training off-chip, with the results loaded into registers.

Choices made here, which can be changed:

* **Output-neuron arithmetic.** The source describes a floating-point output neuron
  but does not give its precision. Here it is single precision with truncation, no
  subnormals and saturation; `EXP_W` and `MAN_W` change the format. The source also
  uses a two-clock delay to align its comparator with the feedback path. Here the
  comparator looks at the stored potential, so no alignment delay is needed.
* **Multiply-add.** The source draws a fused multiply-add. Here the product is truncated
  before the add. The input is an integer, so it lies on the product's truncation grid
  whenever the product is below 2^24. The result then equals a fused multiply-add with
  one truncation, and the adder needs only 24-bit significands.
* **Input-neuron size.** The shift register has 6 bits. The source gives a formula for
  the length, and elsewhere a count of two flip-flops; neither fixes a number.
* **Second-layer synapses** are binary, and each class neuron's input is a population
  count.
* **Not specified by the source:**
  * tie rules (lowest index wins);
  * the winner latch;
  * the integration window (64 clocks);
  * the number of message slots (8);
  * the DLBS pipeline registers and the 4-clock latency;
  * the register write port and its reset values;
  * sharing one register file and one message bus between the two engines.
* **Pattern size.** The source's test images are 8 x 8 pixels, but its WTA has 25 input
  neurons. `PAT_LEN = 25` follows the WTA. Set `PAT_LEN = 64` to present 8 x 8 images
  directly.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against models
written separately from the RTL (`tb/tom_ref_pkg.sv`), and checks latencies as well as
values:

* the shift-register neuron against its integer recurrence;
* the output neuron against a real-number model truncated to 24 significant bits, and
  against the closed-form step response;
* the WTA against the maximum-overlap rule, with the exact impulse count to the winner;
* the DLBS stages exhaustively or with random data;
* both engines and the top against cycle-accurate models of the race to threshold, the
  DLBS decision and the clique completion.

`tb_tom_top` runs the whole design at its default sizes. It:

1. loads all registers through the write port;
2. presents stored messages with per-pixel flip noise from 0 to 50 % in 10 % steps, and
   with 0, 1 or 2 of the 4 patterns erased, to both engines at once;
3. streams 16 messages back to back through the DLBS.

It also confirms that every mechanism occurs at least once:

* a silent module;
* a multi-impulse winner;
* completion by the OR network;
* restoration of an erased pattern;
* back-to-back issue.

The test prints how many messages each engine returned exactly. The test patterns are
random 25-pixel patterns at least 8 pixels apart, not letter images. With
`eta = 1`, `gamma = 60` and `Smin = 19`:

* **DLBS engine.** It returned all or nearly all messages up to 20 % noise, with or
  without erased patterns, and fell off from 30 % on.
* **Spiking engine.** It returned every noise-free message, including those with one or
  two erased patterns. Its AND-based match degraded from 10 % noise on.

`tb_tom_img64` repeats the noise and erasure runs, 20 messages per setting, with
`PAT_LEN = 64`, so that each pixel of an 8 x 8 image has its own input neuron. It uses
random 64-pixel images at least 20 pixels apart, `gamma = 150` and `Smin = 48`; the
other sizes stay at their defaults. In one run:

* **DLBS engine.** It returned every message up to 10 % noise, and up to 20 % with at
  most one erased image. At 30 % noise it returned between 7 and 12 of 20.
* **Spiking engine.** It returned every noise-free message, about half at 20 % noise,
  and almost none from 30 % on.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tom_pkg.sv tb/tom_ref_pkg.sv tb/tb_tom_top.sv --top-module tb_tom_top -o sim
./obj_dir/sim
```

Replace `tb_tom_top` with any other `tb_<block>` to run that block's test. Each test
ends with a line `TB_RESULT checks=N failures=M`. The whole-design test finishes in
under a second.

## Files

`rtl/`:

* `tom_pkg.sv`: defaults and the write-bank enum.
* `tom_top.sv`: the whole design.
* `tom_weight_regs.sv`: register file.
* `excitatory_or.sv`: clique completion.
* Spiking engine:
  * `tom_normal.sv`: engine and controller;
  * `wta_snn.sv`: WTA module;
  * `lif_sr_neuron.sv`: input neuron;
  * `lif_fp_neuron.sv`: output neuron.
* DLBS engine:
  * `tom_dlbs.sv`: engine;
  * `dlbs_wta.sv`: pipelined WTA;
  * `dlbs_popcount.sv`, `dlbs_spike_cmp.sv`, `dlbs_winner_cmp.sv`: its three stages.

`tb/`:

* `tb_<module>.sv`: one self-checking test per module;
* `tb_tom_img64.sv`: the retrieval workload on 8 x 8 images (`PAT_LEN = 64`);
* `tom_ref_pkg.sv`: the reference models and pattern generators.
