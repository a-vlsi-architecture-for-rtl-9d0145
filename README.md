# Manhattan-distance pattern matcher with a bit-serial winner-take-all

This design finds which of `n` stored template vectors is closest to an input vector `X`.
"Closest" means the smallest Manhattan (L1) distance:

    d_j = sum over i of |t_ij - x_i|,   i = 1..m

The output is the number of the winning template. Typical uses are recognition of an image
from a feature vector, and vector-quantisation compression, where each block of pixels is
replaced by the code of the nearest codebook pattern.

The architecture has two ideas:

* **Element-serial, template-parallel distances.** Every template sits in its own small
  SRAM and has its own absolute-value-and-accumulate unit (AVA). One counter addresses all
  memories at once, so all `n` distances build up together, one element per clock.
* **Bit-serial minimum search.** The `n` finished distances are shifted out MSB first into
  a winner-take-all circuit (WTA). Each clock it drops every candidate that shows a larger
  bit than some other candidate. After the last bit, only the minimum is left. This costs
  one clock per distance bit, regardless of `n`. No tree of magnitude comparators is
  needed.

The two stages form a pipeline. While the WTA searches the distances of one pass, the AVAs
are already accumulating the next pass.

The default configuration recognises 8 letters from 32-element feature vectors of 8-bit
elements. These are projected edge-distribution profiles: horizontal and vertical edge
histograms laid end to end. The distances are 13 bits wide. A new distance set is ready
every 35 clocks, and the WTA needs 13 clocks to decide.

## Block structure

```
             data_in / write_add / ram_sel / enb               data_in_x / write_add_x / wr_en_x
                          |                                                   |
   load --+--> template_memory (wr_decoder, address mux,           x_sram (dual port)
          |      template_sram x N_TEMPL)                                     |
          |               | dout[j]                                           | dout_x
          |               v                                                   v
          |        ava[0] ... ava[N_TEMPL-1]  <------------- same X element --+
          |               | acc[j]                 ^ elem_valid, latch_clr
          +--> counter1 --+------------------------+ rd_add to all memories
                          v latch_clr
                         wta (shift registers, status flags, counter2,
                              winner_observer, result register)
                          |
                        code_o, code_valid_o, winners_o
```

| Module | Role |
|---|---|
| `mdwta_pkg` | Default sizes, and `acc_width()` = DATA_W + clog2(M_ELEM) |
| `mdwta_top` | The whole matcher |
| `template_memory` | The template SRAMs, the address mux (Load chooses the write or the read address), and the write decoder |
| `template_sram` | One template: M_ELEM x DATA_W, single port, registered read |
| `wr_decoder` | Turns ram_sel into one write enable, active only while load and enb are both high |
| `x_sram` | X store with separate write and read ports, registered read |
| `counter1` | Read address, element-valid flag and the Latch-and-Clear pulse |
| `ava` | Computes abs(t - x) and accumulates it |
| `wta` | Bit-serial minimum search and result register |
| `counter2` | Counts the distance bits of a search and latches the result |
| `winner_observer` | Priority encoder: the lowest-numbered surviving template wins |

## Operating it

**Download (`load = 1`).** The address mux gives the template SRAMs the download address
`write_add`. Each clock with `enb = 1` writes `data_in` into element `write_add` of template
`ram_sel`. Counter1 is held at 0, and the AVAs are emptied.

`x_sram` has its own write port (`write_add_x`, `data_in_x`, `wr_en_x`), which works in
either mode. So a new `X` can be written while the matcher runs.

**Matching (`load = 0`).** The matcher runs passes back to back over the current contents
of the memories, one pass every `M_ELEM + 3` clocks. Each pass ends with a one-clock
`latch_clr_o` pulse. Results appear later on `code_o` and `winners_o`, marked by a
one-clock `code_valid_o` pulse.

If `X` is rewritten during a pass, that pass sees a mix of old and new elements. The pass
after it is clean. Templates cannot be changed while matching, because the decoder is shut
off while `load = 0`.

## Pass timing

Clock 0 is the first clock with `load = 0`. With the default `M_ELEM = 32`:

| Clock | What happens |
|---|---|
| k = 0..31 | counter1 puts address k on all memories. |
| k+1 | Element k is at the SRAM outputs (registered read). The AVA subtracts, corrects the sign, and stores abs(t - x) in its difference register. |
| k+2 | The difference is added into the accumulator. |
| 32, 33, 34 | counter1 keeps counting so that the last element can get through the pipeline. These counts are marked not valid, so they add 0. |
| 34 | The accumulators hold the complete distances (also visible on `dist_o`). `latch_clr_o` = 1. |
| end of 34 | The distances are copied into the WTA shift registers, and the accumulators are cleared, on the same edge. counter1 goes back to 0. |
| 35..47 | The WTA handles one distance bit per clock, MSB first. Meanwhile pass 2 is reading elements 0..12. |
| end of 47 | On the 13th edge after the latch, the result register is written. |
| 48 | `code_o` and `winners_o` are valid, and `code_valid_o` = 1. |
| 69 | The next `latch_clr_o` (35 clocks after the previous one). |

The search must finish before the next set of distances arrives. So `M_ELEM + 3` must be
at least `ACC_W`. `mdwta_top` checks this at elaboration, and an assertion checks it at run
time.

## The absolute-value unit (`ava`)

The difference is formed as `t + ~x + 1`. Its carry-out is 1 when `t >= x` (no borrow).
The inverted carry drives the add/subtract control of a second adder, whose other operand
is 0:

* If `t >= x`, the second adder computes 0 + diff.
* If `t < x`, it computes 0 - diff, which is the two's-complement negation of the
  difference.

The result, `|t - x|`, goes into a register. A second register accumulates it.

The accumulator is `DATA_W + clog2(M_ELEM)` bits wide, 13 bits by default. The largest
possible sum, 32 x 255 = 8160, fits, so it cannot overflow.

`latch_clr` sets the accumulator to zero instead of adding. No clock is lost between passes,
because the difference register holds one of the three invalid, zero-valued counts at that
moment.

## The bit-serial winner-take-all (`wta`)

The WTA is the least obvious part of the design.

**Start.** On the latch pulse:

* Each distance is copied into a 13-bit shift register.
* Every status flag is set to 1. A 1 means "still a candidate".
* `counter2` is restarted.

**Each of the next 13 clocks.** Let `b_j` be the current MSB of shift register `j`, and
`F` the set of templates whose flag is still 1.

* If some candidate in `F` shows `b_j = 0`, then every candidate showing `b_j = 1` is
  larger. Those candidates clear their flags.
* If all candidates in `F` show the same bit, nothing changes.
* Then all shift registers move left by one bit.

Because the bits are judged from the most significant one down, a candidate is removed
exactly when its value is larger than some other remaining candidate, judged on the
leading bits. A flag, once cleared, stays cleared.

**End.** After the LSB, the flags still at 1 mark all templates at the minimum distance.
There is always at least one.

**Result.** `winner_observer` turns the flags into a number. The lowest-numbered template
with a set flag wins, so ties go to the smaller position. `counter2` raises its latch
signal on the LSB step. On that edge, the result register takes the code, and also the
flags (`winners_o`).

The observer works on the flags as they will be *after* the LSB step, which is why the
result is ready 13 edges after the latch, not 14. Codes count from 0: the fourth template
is code `3` (`011`).

A new latch pulse in the middle of a search restarts the search. In the full matcher this
cannot happen, because of the size rule given under Pass timing.

## Parameters

All parameters are set on `mdwta_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `N_TEMPL` | 8 | Number of templates. The code is `clog2(N_TEMPL)` bits. |
| `M_ELEM` | 32 | Elements per vector. The pass takes `M_ELEM + 3` clocks. |
| `DATA_W` | 8 | Bits per element, unsigned. |
| `ACC_W` (derived) | 13 | Distance width, which is also the WTA search time in clocks. |

Other vector lengths need only new parameter values. The counters follow `M_ELEM`, and
`ACC_W` follows from `M_ELEM` and `DATA_W`.

## Choices made in this implementation

These points are filled in here. They are not part of the architecture itself:

* **Clock and reset.** There is one clock for everything, including both ports of the X
  memory, which could in principle run on separate write and read clocks. The reset is
  asynchronous and active low (`rst_n`). Memory contents are not reset.
* **X memory.** It is a dual-port RAM with registered reads. A FIFO could take its place.
  If the same word is read and written in one clock, the read returns the old word.
* **Load gating.** Templates are written only while `load = 1`. Raising `load` holds
  counter1 at 0 and clears the AVAs, so a pass that is cut short leaves nothing behind.
  A WTA search already running still finishes.
* **Element-valid flag.** counter1 counts past the last address to let the pipeline drain.
  A valid flag, delayed one clock to line up with the SRAM outputs, stops those extra
  counts from adding anything.
* **Behavioural elimination rule.** The WTA's elimination rule is written as behaviour:
  "clear a flag on 1 if any remaining flag sees 0". It is not written out gate by gate.
* **Extra outputs.** `dist_o`, `winners_o`, `code_valid_o` and `latch_clr_o` are
  observation outputs. The matcher's essential output is `code_o`.
* **Not included.** The host that downloads the vectors, for example a PC on a PCI bus,
  is not part of this RTL. Its signals are the top-level download ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against values it
computes itself, and ends with a `TB_RESULT checks=N failures=M` line.

* `tb_template_sram`, `tb_x_sram` check:
  * data and the one-clock read latency;
  * read-during-write behaviour;
  * that the two ports are independent.
* `tb_template_memory` checks:
  * a download into all templates, followed by a read of every address from every
    template;
  * that strobes are ignored outside download mode;
  * the address mux.
* `tb_wr_decoder`, `tb_winner_observer` check every input exhaustively.
* `tb_counter1` checks:
  * the address sequence;
  * the 35-clock period and the position of the latch pulse;
  * that `elem_valid` is `rd_valid` delayed by one clock;
  * a restart caused by `load`.
* `tb_counter2` checks the 13-step run, the latch position, and a restart.
* `tb_ava` checks:
  * all-0 against all-255 in both orders;
  * equal vectors;
  * random vectors passed back to back with the real pass timing;
  * a clear in mid-pass.
* `tb_wta` checks random distances, many ties, all-equal distances, and values near the
  maximum. It checks the 13-clock latency, the code, and the winner set.
* `tb_mdwta_top` runs the whole matcher at its default size. It checks:
  * **Letter scenario.** The 32-element profile of one letter is stored as template 3 and
    also used as `X`. The other seven templates are close, perturbed copies of it. The
    result must be code `011` with distance 0.
  * **Timing.** The first distances must appear 34 clocks after `load` falls, one pass
    every 35 clocks, each result 13 edges after its latch.
  * **Other scenarios.** `X` rewritten while running, ties, and random rounds with reloads.
  * **Every checked pass.** All eight distances on `dist_o` are compared with reference
    values.
  * **Mechanisms.** The test counts how often each of these happened and fails if any
    never did:
    * template downloads;
    * X writes during matching;
    * negative differences;
    * WTA/accumulation overlap;
    * ties;
    * returns to download mode.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/mdwta_pkg.sv \
          tb/tb_mdwta_top.sv --top-module tb_mdwta_top -Mdir obj
./obj/Vtb_mdwta_top
```

Each testbench runs in well under a second.

## Limits of trust

* Only one feature vector is given numerically: the letter profile used as `X` above. The
  other seven letter templates were available only as charts. The letter scenario
  therefore uses synthetic neighbours instead of the real letter set. The distance of
  85 (0055h) between that letter and the first template, quoted for the original
  experiment, is not reproduced.
* The cycle timing above is derived from the stated latencies:
  * distance complete after the 34th clock, and available at 35 clocks;
  * a counter that counts to 31 + 3 before returning to 0;
  * a WTA result valid 13 clocks after the latch.

  The exact clock on which each register loads is this implementation's reading of
  those latencies.
