# On-line checkers: a self-checking counter and a LocalLink protocol monitor

An on-line checker is a small piece of hardware that runs next to a circuit
in normal operation, watches the circuit's inputs and outputs every clock, and
raises an error the moment the circuit does something its specification does
not allow. The checkers here follow the method of the paper *The Design of
On-Line Checkers and Their Use in Verification and Testing*: the allowed
behaviour is written as a finite automaton whose input symbols are simple
conditions on the watched signals (`OUT==3 and RST==0 and STR==0`). Every
(state, symbol) pair that the description names is a legal step; every other
pair leads to an error state `Serr`. The checker is then just a state register
plus the combinational logic of the transition table, small enough to stay in
the finished product for on-line testing or fault-tolerant operation rather
than only in simulation.

Two checked circuits are built, and both sit in one top level:

| part | RTL | what is checked |
|---|---|---|
| self-checking counter | `cnt_counter`, `cnt_fsm_checker`, `self_checking_counter` | the 0..15 count sequence, reset, start, and the forbidden RST-with-STR input |
| LocalLink FSM checker | `ll_fsm_checker` | control-signal combinations, their order within a frame, two data rules |
| LocalLink segmented checker | `ll_phase_checker` (x4), `ll_main_checker`, `ll_segment_checker` | the same combinations and order, split into four per-phase modules that also report which phase failed |
| top level | `online_checkers_top` | the three above side by side |

Shared types (the LocalLink control bundle, the condition symbols, the phase
names and the data-rule constants) are in `online_chk_pkg`.

## How a condition automaton becomes RTL

Every checker has the same three pieces, and the code keeps them apart so the
transition table can be read directly against its specification:

1. **Condition logic** (`always_comb`): one signal per input symbol, true when
   its condition holds in this clock. For LocalLink the mapping from the six
   control lines to a symbol is the package function `ll_classify()`.
2. **Next-state logic** (`always_comb`): the transition table. The default
   assignment is `Serr`; each listed transition overrides it.
3. **State register** (`always_ff`).

The error output is the registered "state is Serr" flag, so an error shows
**one clock after** the offending sample and stays until the checker's reset.

## Self-checking counter

`cnt_counter` is a WIDTH-bit counter (WIDTH = 4 by default, outputs 0..15):

* `rst` — asynchronous, active high: output 0, counting stopped.
* `str` — synchronous start pulse, active high: the output is 1 in the next
  clock and the counter runs, wrapping from 15 to 0, until the next `rst`.
  A `str` while running restarts at 1.

`cnt_fsm_checker` watches `rst`, `str` and `out` (it has no reset of its own;
`rst` is one of the watched inputs, exactly as in the counter/checker pair it
models). Its symbols, for a WIDTH-bit counter:

| symbol | condition |
|---|---|
| C*k* (k = 0..2^WIDTH-1) | `out == k`, `rst == 0`, `str == 0` |
| CSTR | `rst == 0`, `str == 1` |
| CRST | `rst == 1`, `str == 0`, `out == 0` |

and its transitions:

| from | symbol | to |
|---|---|---|
| S*k* | C*k* | S*(k+1) mod 2^WIDTH* |
| any state except Serr | CRST | SIDLE |
| SIDLE | C0 | SIDLE |
| SIDLE, any S*k* | CSTR | S1 |
| Serr | CRST | SIDLE |
| anything else | | Serr |

Two points need explaining because they differ from the paper's printed
3-bit example:

* **The resting state SIDLE.** In the printed table, reset leads to S0 and
  (S0, C0) leads on to S1, which would flag a counter that correctly sits at
  zero after reset waiting for its start pulse. SIDLE is that waiting state.
* **The start symbol.** The printed example defines the start condition but
  gives it no transition. Here it leads to S1, matching the paper's
  property "after STR, OUT is 0001".

One state per counter value would explode for the 8-, 16- and 32-bit counters
the paper also measures, so S0..S(2^WIDTH-1) are stored binary-coded as the
*expected output value*: the transition S*k* → S*k+1* is "output equals the
register, so increment the register". The state is that WIDTH-bit register
plus a two-bit mode (running / SIDLE / Serr). RST and STR high together match
no symbol and therefore land in Serr.

## LocalLink FSM checker

LocalLink is a point-to-point, frame-based streaming interface with six
active-low control lines: `src_rdy_n` and `dst_rdy_n` for flow control (a
word moves only when both are low), and four delimiters. A frame is

```
SOF beat, header words, SOP beat, payload words, EOP beat, footer words, EOF beat
```

with any number of stall cycles in between. The checker's symbols are:

| symbol | transfer? | delimiter low | extra data rule (level 3) |
|---|---|---|---|
| C0 | yes | `sof_n` | |
| C1 | yes | `sop_n` | `data[7:0] == 8'hAB` (start-of-frame delimiter) |
| C2 | yes | `eop_n` | `data[7:0] < 124` |
| C3 | yes | `eof_n` | |
| C4 | yes | none (a data word) | |
| C5 | no (either side not ready) | any | |

A transfer with more than one delimiter low is illegal. States: S0 between
frames, S1 header, S2 payload, S3 footer:

```
S0 --C0--> S1 --C1--> S2 --C2--> S3 --C3--> S0
S0 loops on C5; S1, S2, S3 loop on C4 and C5; everything else -> Serr
```

`CHECK_LEVEL` sets how much is checked, after the three levels the paper
compares: 1 = only that each transfer beat has a legal combination (no state
kept), 2 = combinations and their order, 3 = order plus the two data rules
(default). `rst` is synchronous, active high, and is the only way out of Serr.

The C5 condition is printed in the paper as "SRC_RDY_N==0 or DST_RDY_N==0".
Taken literally it overlaps all other symbols. It is implemented as "a side
is *not* ready", which is what its self-loop in every state needs.

The data rules read byte 0 (`data[7:0]`) of the SOP beat and of the EOP beat,
which is how the paper's condition list attaches them. `DATA_WIDTH` (default
32, four-byte words) only sets the port width; the upper bytes are not
inspected, which lint reports as unused bits. REM (the valid-byte count of the
last word) is not checked.

## Segmented LocalLink checker

The segmented checker splits the same protocol into four time segments, each
checked by its own `ll_phase_checker` instance, so that a designer can keep
only the segments worth their area, and so that a fault can be traced to the
phase in which it happened.

```
          +-----------+   +-----------+   +-----------+   +-----------+
 token -> | PH1       |-->| PH2       |-->| PH3       |-->| PH4       |--+
   ^      | header    |   | payload   |   | footer    |   | EOF, idle |  |
   |      +-----------+   +-----------+   +-----------+   +-----------+  |
   +---------------------------------------------------------------------+
              ERROR of each  -->  MAIN CHECKER  -->  error, err_id
```

* Exactly one module holds an activity token (`active`). After reset it is
  PH4, the idle phase.
* The holder checks each clock's control combination against the symbols
  its phase accepts:

  | module | accepts | ended by (token passes on) |
  |---|---|---|
  | PH1 header | C4, C5 | C1 (SOP) |
  | PH2 payload | C4, C5 | C2 (EOP) |
  | PH3 footer | C4, C5 | C3 (EOF) |
  | PH4 idle | C5 | C0 (SOF) |

  Anything else sets the module's ERROR. The module then keeps the token and
  stops until reset.
* **Token timing.** `cntr_out` is high combinationally in the clock whose beat
  ends the phase. The next module takes the token at that clock edge and checks
  from the following beat. There is no combinational path around the ring:
  `cntr_out` depends only on the module's own state and the link.
* Modules without the token ignore the link.
* An assertion in `ll_segment_checker` states the ring's invariant: outside
  reset, exactly one module holds the token.
* `ll_main_checker` registers the OR of the four ERROR outputs as the system
  `error`, and as `err_id` the number (1..4) of the module that raised it (the
  lowest number wins if several did; 0 = no error). Both appear one clock after
  the phase module's ERROR, so two clocks after the faulty beat.

In this checker each segment's symbol set is its slice of the FSM checker's
transition table. It therefore catches the same control-order faults as the
FSM checker at level 2. It does not check data. What it adds is the phase
identification.

## Top level

`online_checkers_top` (parameters `CNT_WIDTH` = 4, `LL_DATA_WIDTH` = 32)
holds the self-checking counter (`rst`, `str` in; `cnt_out`, `cnt_err` out)
and a link monitor. In the monitor, the link between two units that are not
part of this design enters on the `ll_*` ports. It is watched by the FSM
checker (`ll_fsm_error`) and by the segmented checker (`ll_seg_error`,
`ll_seg_err_id`, `ll_seg_phase`). The link checkers share the synchronous
reset `ll_chk_rst`. The two halves share only the clock.

## Where this RTL departs from, or goes beyond, the paper

* The paper builds its checkers in VHDL with an automatic generator. The
  generator is software and is not reproduced here. The RTL is written by hand
  in the same register-plus-transition-logic form.
* Counter checker: the SIDLE state, the start transition, binary-coded
  states and the exit from Serr on reset are choices of this design (see
  above). Where the paper's two printed counter descriptions disagree, the
  condition list in its text is followed, not the one in its flow figure.
* LocalLink FSM checker: the C5 reading, the byte lane of the data rules, the
  way levels 1 and 2 are derived, and the synchronous reset are this design's
  choices.
* Segmented checker: the paper names the four modules, their phases, the
  CNTR links and the main checker's two outputs. The ring order, the token
  protocol, the accepted symbols per phase, the err_id coding and the halt on
  error are this design's choices.
* Not built: the decoders, multiplexers, shifter and loadable counter that
  the paper also measures, and a segmented checker for the counter. The paper
  gives only their slice counts, not how they or their checkers work. The
  PSL/FoCs checkers, which the paper uses only as a comparison, are also not
  built.
* The 8-, 16- and 32-bit counters, as measured in the paper, are the same
  modules with `WIDTH` set. `tb_counter_widths` runs them. The 32-bit counter
  is too long to simulate through a full wrap.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/online_chk_pkg.sv tb/ll_tb_pkg.sv tb/tb_online_checkers_top.sv \
    --top-module tb_online_checkers_top
obj_dir/Vtb_online_checkers_top
```

Replace the testbench name to run another one.

| testbench | what it does |
|---|---|
| `tb_cnt_counter` | compares the counter with a reference over random starts and between-edge asynchronous resets |
| `tb_cnt_fsm_checker` | feeds the checker a model counter. Legal runs must pass. Six injected faults (skip, stuck, early count, RST with STR, reset with nonzero output, wrong first value) must each raise ERR one clock later and hold it |
| `tb_self_checking_counter` | random legal use must give the right count with no error. RST with STR must be flagged and cleared by reset |
| `tb_ll_fsm_checker` | three checkers (levels 1-3) on one link. Legal frames with random lengths and stalls, then each of eight fault kinds, each with the verdict expected per level |
| `tb_ll_phase_checker` | all four phase modules against a reference model under random control combinations, token inputs and resets |
| `tb_ll_main_checker` | every combination of phase errors; checks error and module number |
| `tb_ll_segment_checker` | legal and faulty frames. The token must stay one-hot and visit every phase. Each control fault must be reported with its phase number; data faults must pass |
| `tb_counter_widths` | the self-checking counter at 8, 16 and 32 bits. The 8- and 16-bit counters run through wrap-around; the 32-bit one runs over its first values only. A 32-bit checker must catch a skipped count |
| `tb_online_checkers_top` | the whole top at its default parameters: both halves run at once. Counts starts, wraps, resets, forbidden inputs, stalls, data beats, token visits per phase and fault kinds, and fails if any never happened |

Support files: `tb/ll_frame_source.sv` is a behavioural LocalLink sender with
random stalls and fault injection. `tb/ll_tb_pkg.sv` lists the fault kinds and
the verdicts each checker must give.
