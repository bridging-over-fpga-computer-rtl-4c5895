# w_messen: one line for four position pulses of a spiral CT scanner

A CT scanner reports two kinds of position to its image reconstruction:

- **the angle of the rotating gantry.** A slotted wheel interrupts a light beam and gives a pulse on the line `rot_in`:
  - *Ap*, about 200 µs, at every angular step, which comes every 700 µs to 1.3 ms;
  - *Apr*, about 400 µs, once per revolution.
- **the position of the patient table.** It gives a pulse on `phs_in`:
  - *Htp*, about 200 µs, per table step;
  - *Htpr*, about 400 µs, as its reset mark.

  Table pulses are about ten times rarer than gantry pulses.

For spiral scanning both streams must reach the receiver over a single wire. `w_messen` decodes each incoming pulse by its length. It then sends it again on `mux_out` with a new, distinct length, inside a fixed time window, so that a receiver can tell all four kinds apart. It also reports pulses of the wrong length, and table pulses that had to be dropped, through nine latched flags that a supervising controller reads and clears.

The same RTL set holds three small, unrelated examples: the counters `count_demo` and `sm_counter`, and a single NAND gate, `nand_gate`. They are described at the end. The top `fpga_designs_top` puts all four designs side by side. The clocked ones share only `clk` and `rst_n`.

## Clocking

- The design runs from one 1 MHz clock.
- Every state machine advances only on `tick`, a one-cycle enable. `clk_divide` produces it every second clock, which gives 500 kHz, or one step per 2 µs.
- All times below are counted in these 2 µs steps.
- `rst_n` is asynchronous and active low.
- `rot_in` and `phs_in` are asynchronous to the clock. Each passes through two flip-flops before use.

## The output window

`control` sends pulses on `mux_out` in windows of 650 µs:

```
 0 us                    400 us          650 us
 |--- Ap / Apr slot -----|-- Htp / Htpr --|
 Ap   : high 200 us, low 200 us      Htp  : high 100 us, low 150 us
 Apr  : high 250 us, low 150 us      Htpr : high 150 us, low 100 us
```

A receiver tells the four kinds apart by their high time: 200, 250, 100 and 150 µs. The low times make the slots fixed, so the next window can start straight after this one.

`mode_sp` chooses how table pulses are sent:

- **`mode_sp = 0`, spiral.** A window always opens with a gantry pulse. A waiting table pulse rides in the second slot of the next gantry window. A table pulse alone never opens a window.
- **`mode_sp = 1`, single axis (tomogram/topogram).** A waiting table pulse may open a window by itself. It is then sent at once in an Htp/Htpr slot of 250 µs. If a gantry pulse and a table pulse are ready in the same step, the gantry pulse wins.

`ap_akt`, `apr_akt`, `htp_akt` and `htpr_akt` are high while `mux_out` is high for that kind of pulse. They feed the activity flags.

## Decoding a pulse by its length (`rot`, `phs`)

The two decoders work the same way. A rising input starts a counter at step 0. The input is then examined at fixed steps:

| step (µs) | what happens |
|---|---|
| 0–15 (0–31 µs) | the input may drop without effect; this is taken as a ripple |
| 16–62 (32–127 µs) | if the input drops: *too short*. Kurz flag set, back to idle |
| 63 (128 µs) | `phs` only: if the buffer still holds the previous table pulse, Htp_n_m is set and this pulse is dropped |
| 127 (256 µs) | decision: input low means Ap/Htp, input high means Apr/Htpr; a one-step pulse goes out |
| 225 (450 µs) | if the input is still high: *too long*. Lang flag set |
| 324 (650 µs) | back to idle, ready for the next rising edge |

The decision point at 256 µs separates the nominal 200 µs and 400 µs pulses with a margin of about 50 µs each way.

A pulse that falls within the first 32 µs and does not rise again is not rejected. The decoder runs on and reports an Ap (or an Htp) at 256 µs. This follows the decoder's state diagram, which checks for a drop only from step 16 on. A reader who wants spikes rejected should extend the "too short" window down to step 1 in `rot.sv` and `phs.sv`.

`rot` also brings out its counter as `xs`.

A decoder is busy for 652 µs after a rising edge. Any edge during that time is ignored. This is shorter than the 700 µs minimum spacing of gantry pulses.

## The table-pulse buffer (`speich`)

Gantry and table pulses arrive independently. A table pulse may be decoded while `control` is busy with a gantry window. `speich` holds one decoded Htp or Htpr and shows it on `htp_1` / `htpr_1`. When `control` takes the value into a slot, it pulses `reset_s` for one step. The buffer then passes through a short in-between state, which waits for the decoder's output to be low again, and so never stores the same pulse twice.

Only one table pulse can wait. A second one that arrives while the first still waits is dropped by `phs` and reported as Htp_n_m. In spiral mode a table pulse can wait for up to one gantry period. So at a steady gantry period, table pulses up to every second gantry pulse get through without loss. If the gantry period jumps from short to long just while a table pulse waits, the next table pulse can find the buffer still full.

## Flags (`tony`)

Nine flags, one flip-flop each:

- A flag is set by the rising edge of its message. A message that stays high does not set the flag again after it has been cleared.
- The controller clears a flag by setting its bit in `reset_vektor`, which is sampled at a step. If a set and a clear meet in the same step, the clear wins.

| bit | flag | meaning |
|---|---|---|
| 0 | Phs_Kurz | table pulse too short |
| 1 | Phs_Lang | table pulse too long |
| 2 | Rot_Lang | gantry pulse too long |
| 3 | Rot_Kurz | gantry pulse too short |
| 4 | Ap_akt | an Ap was sent |
| 5 | Apr_akt | an Apr was sent |
| 6 | Htp_akt | an Htp was sent |
| 7 | Htpr_akt | an Htpr was sent |
| 8 | Htp_n_m | a table pulse was dropped because the buffer was full |

## Timing summary

- In spiral mode, or whenever a gantry pulse opens the window, `mux_out` rises 256–262 µs after the rising edge of the gantry pulse. That is the 256 µs decision plus the synchroniser and one register step.
- A table pulse sent on its own in single-axis mode rises about 258–264 µs after its input edge, because it passes through the buffer.
- A table pulse in a gantry window starts 400 µs after that window.

## Where this RTL departs from, or adds to, its source description

- **Ap/Apr slot timing.** In the original, `control` timed the Ap/Apr slot with the gantry decoder's counter (`xs`). Here `control` counts both slots itself. The pulse lengths are the same, and `xs` is still brought out.
- **Ap low time.** The original gives two values for the Ap low time, 200 µs and 100 µs. The window drawing and the 400 µs slot both need 200 µs, so 200 µs is used.
- **Clocking and reset.** The state machines use a clock enable rather than a divided clock. The input synchronisers are added.
- **Short-pulse limits.** The written specification gives the too-short limit loosely, as "< 128 µs", "≤ 127 µs" and elsewhere "< 150 µs". The decoder follows the step numbers of the state diagram: a drop between 32 and 127 µs.
- **Flag bit order** is not specified. The order above is the order in which the flags are listed.
- **Gantry pulses are not queued.** A gantry pulse that is decoded while a window is still running is not taken. At the specified pulse rates this cannot happen.
- **Receiver not included.** The receiver that splits `mux_out` again is not part of this RTL. The testbenches contain a behavioural one that measures high times.

## The small examples

**`count_demo`** (`count_state_m` + `count_macro`). A small state machine drives a counter block only through its two controls:

- `count_enable`, active low: low counts, high holds;
- `load`, active low: low clears.

A pulse on `to_and_from` clears the counter and starts it. The machine stops it when the value reaches 63. The controls are registered, so the value stops at 64. `count_macro` is a plain binary counter, in place of a vendor counter macro.

**`sm_counter`.** A three-state machine:

- reset: clears `stand`;
- count: `stand` increments each clock;
- hold: `stand` is frozen.

The states are selected by `cmd`: 0 reset, 1 count, 2 hold. Code 3 acts as hold. `stand` is 16 bits wide and wraps.

**`nand_gate`.** A two-input NAND, `y = ~(a & b)`, written as plain combinational logic. It shows logic coded directly rather than drawn as a state machine. No propagation delay is modelled.

## Files

- `rtl/messen_pkg.sv` holds the step thresholds, slot lengths, flag indices and state types of `w_messen`. `rtl/sm_counter_pkg.sv` holds the command encoding.
- Each module has its own file with the same name. The opening comment of each file gives its interface and timing.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
- `tb_fpga_designs_top` and `tb_w_messen` run the whole design at its real 1 MHz clock and real microsecond timings. They cover:
  - all four pulse kinds, spiral wait, single-axis pass-through and priority;
  - every error flag, ripple tolerance and flag clearing;
  - in the top testbench only, the small examples.

  They count each of these mechanisms and fail if one never occurs.
- `tb_w_messen_rates` drives long pulse trains at the specified rates:
  - 300 gantry pulses, 700–1300 µs apart, with lengths spread over ±50 µs;
  - table pulses at 1:10, and at 1:2 with a steady gantry period of 700 µs and of 1300 µs;
  - topogram and tomogram runs.

  It checks that every pulse comes out once, in order and at the right time, and that no error flag is raised.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/messen_pkg.sv rtl/sm_counter_pkg.sv tb/tb_fpga_designs_top.sv \
    --top-module tb_fpga_designs_top
./obj_dir/Vtb_fpga_designs_top
```

- Replace the testbench name to run any other testbench.
- Every testbench, including the top one at default parameters, finishes in well under a second of run time. The top testbench covers about 20 ms of simulated time.
- The thresholds and slot lengths are constants in `messen_pkg.sv`, in 2 µs steps. Change them there to adapt the pulse protocol.
