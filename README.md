# 3D-Flow trigger slice

A first-level trigger at a collider gets a new set of detector data every bunch crossing:
every 25 ns at 40 MHz. In a normal pipeline no stage may take longer than that interval. The
3D-Flow scheme lifts that limit for the stage that runs the trigger algorithm. That stage is
a *stack* of identical processors. Each processor runs the *whole* algorithm on one crossing,
like one computer in a farm. A bypass switch inside every processor hands each new crossing to
the first idle processor and passes the rest down the stack. With N layers, each processor
may take up to N crossings. Deeper algorithms need more layers, not faster logic.

This repository holds synthesizable SystemVerilog for one *slice* of such a trigger: the
front-end interface of 80 sensor channels grouped into 4 trigger towers, one 10-layer 3D-Flow
stack per tower, the data-reduction pyramid, and a look-up-table decision unit. It also holds
self-checking testbenches for every module.

```
 adc[80] ──► fe_interface ─────────────────────────────────────────► DAQ link (ser_*)
  (Stage 2)   │ sync ─► trigger words ─┐        ▲ l1a (global accept, from outside)
              │        pipeline buffer ─► derandomizer ─► serializer
              ▼
   tw[0..3]  flow_stack x4  (Stage 3, 10 layers of flow_pe each)
              ▼
             pyr_zero_filter x4 ─► pyr_merge4  (Stage 4, 4 channels to 1)
              ▼
             global_decision (Stage 5, 256 x 1 look-up table) ─► acc_valid / acc_tag
```

## The bypass switch (`flow_pe`, `flow_stack`)

This is the core of the design and the least obvious part.

Processors are chained: the bottom port of one layer feeds the top port of the next. The
bottom port is registered, so a word moves down one layer per clock. Timing only has to close
between neighbouring layers, whatever the depth of the stack. A word on a port
(`flow_pkg::flow_word_t`) is either an **input datum** or a **result**. It carries the
bunch-crossing number (`tag`) of its event.

Each processor's switch is in one of two positions:

* **'i'**: the processor fetches the words of one input set (`SET_WORDS` words, 2 by default)
  into its algorithm.
* **'b'**: a word from the top port goes unchanged to the bottom port. This is either input
  data meant for a lower layer or a result from an upper layer.

The rules, as built:

1. A processor finds set boundaries by counting the input words that pass its top port.
2. At the first word of a set, an idle processor (algorithm not running) takes the whole set.
   A busy processor bypasses the whole set.
3. The algorithm takes `ALGO_CYCLES` clocks from the first fetched word. Its `SET_WORDS`
   results are then sent out of the bottom port in cycles when no bypassed word needs that
   port; bypassed words always go first. In steady operation those free cycles are exactly the
   cycles in which the processor fetches its next set. A result therefore takes the slot of the
   datum just consumed, and one port carries both data and results.
4. A new result is not handed over until the previous one has left the processor.
5. Every processor counts the input words it fetched, the results it sent, and the data and
   results it bypassed. These are the counters a supervising host reads.
6. A processor whose `exclude` input is high fetches no new set, so its switch stays in 'b'.
   This is how the host takes a faulty processor out of service. The rest of the stack carries
   on with one processor less. A set being fetched and a pending result are still completed.

Worked example: 3 layers, one set of two words every 8 clocks, an algorithm of 24 clocks.
Cycle 1 is the first word at layer 1. `tb_flow_stack` checks this timing cycle by cycle.

| set enters layer 1 at | fetched by | switch 'i' at | its results leave that layer at |
|---|---|---|---|
| 1, 2   | layer 1 | 1, 2   | 25, 26 (while layer 1 fetches set 4) |
| 9, 10  | layer 2 | 10, 11 | 34, 35 |
| 17, 18 | layer 3 | 19, 20 | 43, 44 |
| 25, 26 | layer 1 | 25, 26 | 49, 50 |
| 33, 34 | layer 2 | 34, 35 | … |

In this regular case, every result leaves the bottom of the stack exactly
`ALGO_CYCLES + N_LAYERS` clocks after its word entered the top.

The stack keeps up as long as `ALGO_CYCLES <= (layers in service) x (clocks between sets)`.
The default is 10 layers and 20 clocks (20 algorithm steps at 80 MHz, i.e. 250 ns), with a
crossing every 2 clocks, so the stack runs exactly at its limit. A set that finds every layer
busy falls out of the last layer as input data. The stack drops it and reports it as `overrun`.

## The algorithm stand-in (`flow_algo`)

A real 3D-Flow processor is programmable. Its program (20 steps of up to 26 operations each)
and its ports to neighbouring processors are not part of this RTL. `flow_algo` keeps the
processor's timing and stands in for the program:

* it sums the set's words;
* if the sum reaches `threshold`, it returns the words as results;
* otherwise it returns zeros. Zero means "nothing found" from here on.

Replace this module to run a different algorithm. Only the `busy`/`done`/`res` timing must be
kept.

## Data reduction and decision (`pyr_zero_filter`, `pyr_merge4`, `global_decision`)

* `pyr_zero_filter` drops every zero result of a stack. It passes the few non-zero ones, one
  clock later.
* `pyr_merge4` merges four channels into one. Each input has an 8-word FIFO. The output takes
  one word per clock in round-robin order and labels it with its input number (`src`). A word
  that arrives at a full FIFO is dropped and counted (`n_merge_overflow`). This node assumes
  sparse data: if every stack accepted every set, four towers would send up to 4 words per
  clock into a 1 word per clock output.
* `global_decision` looks each candidate up in a 256 x 1 table. The address is
  `{src, data[15:10]}`. A set bit accepts the candidate's crossing, and each crossing is
  accepted only once. The table is written through `lut_we/lut_addr/lut_wdata` and cleared by
  reset.

## Front-end interface (`fe_*`)

All front-end logic runs on the processor clock. It advances only when `bx_en` is high (once per
crossing).

* `fe_input_sync` registers the 80 channels and delays channel `c` by `dly[c]` (0–15) crossings.
* `fe_trigger_word` builds each tower's 32-bit trigger word from bytes picked by the format
  table `sel[tower][byte]`. Byte 0 is the high byte of word 0. It sends the word as a two-word
  set: word 0 in the clock after `bx_en`, word 1 in the next. Crossings must therefore be at
  least `SET_WORDS` clocks apart.
* `fe_pipeline_buffer` is a 160-crossing circular memory (4 µs at 40 MHz). At each crossing it
  outputs the crossing written 160 crossings earlier.
* `fe_derandomizer` is a 16-event FIFO. If `l1a` is high at a crossing, it stores the crossing
  leaving the pipeline, unless it is full. An accept that finds it full is counted in `n_lost`.
* `fe_serializer` sends each 652-bit event as 41 words of 16 bits. The event layout is
  `{12-bit crossing number, channel 0, …, channel 79}`, zero-padded at the top and sent most
  significant word first. `ser_sof` marks the first word and `ser_eof` the last. Events can
  follow each other without a gap. This gives 1.95 M events/s at 80 MHz.

**Accept timing.** `l1a` at crossing *m* refers to crossing *m − 161*: the pipeline depth plus
the one crossing the buffer's output register adds. The slice itself does not return its
decision as `l1a`; that is left to the timing system outside. The end-to-end testbench plays
that part.

## Interfaces of the top (`trigger_top`)

* **Clock and crossing strobe.** `clk` is the processor clock, 80 MHz. `bx_en` is high one
  clock in two, giving 40 MHz crossings.
* **Configuration.** `dly`, `sel`, `threshold[tower]`, `exclude[tower][layer]` and the table
  write port. They stand for what the supervising host loads.
* **Outputs.**
  * the DAQ link (`ser_*`) and the derandomizer status;
  * the decision (`acc_valid`, `acc_tag`);
  * monitoring: the switch position and busy flag of every layer, the four counters of every
    processor, and the overrun, zero-filter and overflow counters.

All counters are 16 bits and wrap. Reset (`rst_n`) is synchronous and active low. It clears
all state except the contents of the pipeline memory and the FIFO memories, which are never
read before they are written.

## How far to trust it, and where it departs from the original design

Taken from the original 3D-Flow description:

* the bypass switch positions and the cycle-level example above;
* the registered bottom port and the four processor counters;
* excluding faulty processors from service;
* routing each set to the first idle processor;
* 10 layers at 80 MHz for a 250 ns, 20-step algorithm;
* the four front-end functions and which of their sizes are configurable;
* 80 channels in 4 towers;
* zero filtering in the first pyramid layer, then 4:1 reduction;
* a look-up-table decision unit.

Choices made here, where the original says nothing:

* the word format with its bunch-crossing tag;
* data and results sharing one port;
* the rule that results go out in any free slot;
* the stand-in algorithm;
* the trigger-word byte-select format;
* every depth and width not listed above: 8-bit channels, 16-bit words, a 160-crossing
  pipeline, a 16-event derandomizer, 8-word merge FIFOs, 16-bit DAQ words, a 256-entry table;
* the DAQ event format;
* the single clock domain. The front end originally ran in its own 40 MHz FPGA.

Not built:

* the analog-to-digital converters (Stage 1);
* the programmable processor core and its exchange of data with neighbouring processors;
* the host that loads and monitors the processors;
* crates and backplanes;
* the chip with 16 processors.

The slice implements one slice of a larger system. A 64-channel board would need 16 slices
side by side. A full system has more pyramid layers between the slices and the decision.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/flow_pkg.sv tb/tb_trigger_top.sv --top-module tb_trigger_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_flow_algo` | run length, result held while the output is busy, threshold rule (200 random sets) |
| `tb_flow_pe` | fetch, data and result bypass, bypass priority over results, exclusion, counters, cycle by cycle |
| `tb_flow_stack` | the 3-layer example above; a default 10-layer stack at full rate with fixed latency; overrun when sets come too fast; a layer excluded at a rate the other two can still hold |
| `tb_pyr_zero_filter`, `tb_pyr_merge4`, `tb_global_decision` | filtering; ordering, round robin and overflow; table look-up and once-per-crossing accept |
| `tb_fe_*` | each front-end function against a model of the sample history, at default sizes |
| `tb_trigger_top` | the whole slice at default parameters (see below) |

`tb_trigger_top` is the end-to-end test. It runs the slice at its default sizes for 1,420
crossings of random detector data, checked against a model of the whole chain. It returns each
accept as `l1a` 161 crossings later, and checks the events read out on the DAQ link word by
word. It then overloads the slice to force pyramid overflow and lost accepts. At the same time
it excludes one processor of one tower, so that this stack overruns. It counts each mechanism
(fetch, both bypasses, zero filtering, accept, store, overflow, loss, overrun) and fails if any
never happened. The run takes about a minute.

To change the stack depth or the algorithm length, set `N_LAYERS` and `ALGO_CYCLES` on
`trigger_top`. Keep `ALGO_CYCLES <= N_LAYERS x` (clocks between crossings), or sets will be
lost as overrun. The default stack has no spare layer: excluding a processor at the default
rate causes overrun, so a system that must survive a faulty processor needs an eleventh
layer.
