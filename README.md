# Power-efficient FSMDs: clock gating, power gating and partitioning driven by the state

A finite-state machine with datapath (FSMD) knows which registers each state writes, and it knows this at design time. When a generator emits an FSMD from a high-level description, it can turn that knowledge directly into power-saving hardware:

* **Clock gating.** Each datapath register gets a clock pulse only in the states that write it. The gate enable is a decode of the state register and nothing else.
* **Power gating.** A register whose next write is far away along the state graph can have its supply switched off. It keeps its value in a retention latch, and the FSM wakes it early enough for the next write. If the wake-up comes too late, the FSM stalls.
* **Partitioning.** The state machine is split into submachines that are never active together. Only the active one gets a clock, and the idle one may be powered down. Control passes between them through added entry and exit states.

This repository holds SystemVerilog for all three mechanisms. It applies them to the circuits such a generator is usually measured on:

* thirteen DSPstone kernels;
* a 16-bit counter;
* an H.264 4x4 integer transform;
* a one-level 5/3 wavelet transform.

Everything compiles with Verilator 5 and slang, and every module has a self-checking testbench.

## Timing convention: two edges per cycle

The whole design depends on one timing rule:

* The **FSM state register loads on the rising edge** and is never gated.
* **Datapath registers load on the falling edge.** Their clock is `gclk = ~clk & g`, where `g` is decoded from the state.

The state changes at the rising edge, so `g` has half a cycle to settle before `clk` goes low. `gclk` is therefore a clean pulse during the low phase, and only in the cycles whose state writes that register (`rtl/cg_gate.sv`).

Memory writes also land on the falling edge. Memory reads and the fixed-point unit (FXU) are combinational. One FSM state can therefore do all of the following in one cycle:

1. read memory;
2. compute;
3. write a register or a memory word at mid-cycle.

The next rising edge then decides the branch from the values that were just written.

Two consequences are easy to get wrong when changing the kernels:

1. **Loop exit tests see the updated counter.** A loop counter incremented in a state has already changed when the rising edge that leaves the state evaluates the branch. The exit test must therefore compare against the post-increment value. For example, `i != N` after `i = i + 1` runs the body N times.
2. **A gate enable must depend on the state only.** Suppose `g` depends on a register that is itself written at the same falling edge. That register changes while `gclk` is high, and the pulse can be cut short or doubled. Where a register's write depends on a data condition, the condition goes into the register's D input (reload the old value) and not into `g`. `fir2dim` is the example: its coordinate carries are handled this way.

`cg_reg` wraps this rule. It is a register of width `W` that is clock-gated when `W >= XI` and otherwise loaded through an enable on the ungated falling-edge clock. `XI = 3` by default: gating a 1- or 2-bit register costs more than it saves. The package `codel_pkg` holds `XI_DEFAULT`, the Q8.8 word type and the request structs for the FXU and the memory.

## Fixed-point unit and memory

* **`fxu`** is a single-cycle 16-bit Q8.8 unit for add, subtract, multiply, divide and square root, selected by a 3-bit opcode.
  * Add and subtract wrap.
  * Multiply keeps product bits [23:8].
  * Divide by zero gives 0x7FFF.
  * The square root of a negative number is 0.
* **`dp_mem`** is a 1024-word, zero-wait-state, dual-port memory.
  * Reads are asynchronous.
  * Writes happen on the falling edge.
  * If both ports write the same word, port 2 wins.

Every kernel drives one FXU request and two memory requests each cycle. A request is the struct `mem_req_t {addr, wdata, wr}` or `fxu_req_t {opa, opb, op}`.

## The kernels

Each kernel is one module with the same interface:

* `start` / `ready` handshake: the machine waits in a ready state for a start pulse;
* `profile`: high exactly during the measured part of the computation;
* one FXU port and two memory ports.

After `start`, the kernel runs in three phases:

1. It writes its own operands into memory. The values are simple functions of the index and are listed in each file's header.
2. It raises `profile` and runs the computation.
3. It stores the result.

The testbenches recompute every result in a bit-exact Q8.8 reference model (`tb/tb_fx_pkg.sv`) and check the profile length.

| kernel | computation | profiled cycles |
|---|---|---|
| real_update | d = c + a*b | 5 |
| dot_product | 2-element dot product | 5 |
| complex_update | complex d = c + a*b | 10 |
| convolution | 16-tap convolution | 49 |
| n_real_updates | 16 × (d = c + a*b) | 64 |
| fir | 16-tap FIR | 49 |
| mat1x3 | 3x3 matrix times vector | 30 |
| matrix | 10x10 by 10x10 matrix product | 3110 |
| n_complex_updates | 16 complex updates | 160 |
| fir2dim | 3x3 filter over a 4x4 image (zero-padded to 6x6) | 304 |
| iir_one_biquad | one biquad section | 10 |
| iir_n_biquads | 4 cascaded biquads | 37 |
| lms | 16-tap LMS filter: output, error, coefficient update | 66 |

Each state schedule is hand-written from the kernel's operation sequence. Wherever the state allows, a memory read and an FXU operation share a cycle, so most loops are 3 to 5 states per iteration. Compared with a straightforward compilation that issues one operation per state (the usual reference for these kernels: 5, 114, 8, 225, 5, 49, 4751, 63, 99, 565, 8, 73 and 229 cycles in the table's order), the loop kernels here are 30 to 70 % faster. real_update and dot_product match it, and complex_update and iir_one_biquad take two cycles more, because this schedule gives the operand reads and the result write states of their own.

## Power gating with lookahead

Power gating is the hardest part of the design. It lives in four modules. `real_update_pg` applies it to the four registers a, b, c and d of real_update, and `convolution_pg` to the convolution kernel (see the end of this section).

**`mtcmos_reg`** is a behavioural model of a retention register with `D`, `CLK`, `SLEEP` and `Q`:

* While `SLEEP` is high, it ignores its clock.
* Its output keeps the last value, held in the always-on balloon latch.

It models logic only, not leakage or timing.

**`pg_lookahead`** turns the state graph into two constant tables at elaboration time. It takes three parameters:

* `SUCC0` and `SUCC1`: two successors per state;
* `WRITES`: the set of states that write the register.

A constant function walks the graph and produces:

* `sleep_sugg[s]`: state s does not write the register, and no write lies within the next `T_IDLE` transitions;
* `wake_sugg[s]`: a write lies within the next `T_WAKE` transitions.

At a branch, `MODE` picks which paths count:

* 0: all paths;
* 1: forward prediction, the successor with the higher state number;
* 2: backward prediction, the lower one.

A second parameter, `WAKE_MODE`, applies the same choice to the wake table alone. It defaults to `MODE`; setting it to 0 combines backward prediction for sleeping with an all-paths search for waking.

At run time the module is only two multiplexers on the state.

**`pg_ctrl`** is a per-register controller with three states:

* ON goes to OFF on a sleep hint, unless the register is being written.
* OFF goes to WAKING on a wake hint, or on demand when a write arrives.
* WAKING lasts `T_WAKEUP` cycles.

`awake_o` is high in ON only. `stall_o = wr_req & ~awake_o`.

**`pg_reg`** combines `pg_ctrl`, `cg_gate` and `mtcmos_reg` into one register. The gated clock is also held off during a stall.

In `real_update_pg`, the OR of all registers' `stall_o` freezes the FSMD:

* the state register holds;
* all register and memory writes are suppressed.

A late wake-up therefore costs cycles but never corrupts data.

Defaults:

* `T_WAKEUP = 2`: a two-cycle supply restore.
* `T_IDLE = 10`: the shortest idle window worth sleeping for, at the breakeven times considered.
* `T_WAKE = T_WAKEUP + 1`: the controller is a registered stage and needs one cycle to react to a hint.
* `MODE = 2` (backward prediction). Of the prediction choices, it gives the best balance between how long registers sleep and how many cycles are lost waiting for them. In this kernel the idle state loops on itself while it waits for `start`. With all-paths search, the write after `start` is always "near", and the registers would never sleep.

With these defaults, each register sleeps while the kernel waits and wakes in time, and the kernel keeps its 5 cycles. With `T_WAKE = 0`, every register is woken on demand. The run then takes 5 + 3 × (T_WAKEUP + 1) = 14 cycles with nine stall cycles, and the testbench checks both cases.

`convolution_pg` applies the same scheme to a kernel with loops. It power-gates the four 16-bit registers X, H, temp1 and Y; the 5-bit loop indices stay clock-gated only. Here the branch prediction matters:

* With backward prediction, the loop that stores the operands is predicted to run forever, so no wake-up starts before it ends. Y is then woken on demand where it is cleared, which costs 3 stall cycles per run. The stall falls just before the measured window, so the 49 cycles of the kernel proper are unchanged.
* Inside the tap loop, every register is written at least every three cycles, so nothing sleeps there.
* With `MODE = 0` (all paths), every state has a write within 10 states. No register ever sleeps and nothing stalls.

The testbench checks both behaviours. The other eleven kernels use clock gating only.

## The partitioned counter

`part_counter` splits the counter FSMD into two submachines:

* S0: if `inc`, go to S1, else S3.
* S1: `count++`.
* S2: `countOut = count`.
* S3: back to S0.

The split is:

* **P1 = {S0, S3}**, in `part_counter_p1`;
* **P2 = {S1, S2}**, in `part_counter_p2`. It holds the 8-bit `count` and `countOut`.

Each submachine has an added entry state (wait to be woken) and exit state (hand over). The hand-over logic is always on and clocked on the falling edge. While P_k is in its exit state:

* `Sleep_k` pulses for one cycle. It sets P_k's sleep latch (`sleep_latch`, an SR latch that is set with priority and reset by the wake pulse).
* `Awake_j` pulses. It clears P_j's latch and releases P_j from its entry state.
* `Clk_en_j` rises.

`Clk_en_j` falls again at the falling edge that ends P_j's own `Sleep_j` pulse, so the clock stops right after P_j hands back. Each partition runs on `GClk_k = clk & Clk_en_k`. `Clk_en` only moves while `clk` is low, so these clocks are glitch-free.

The sequence for one increment is S0, exit1, S1, S2, exit2, S3: six cycles. With `inc` low, P2 receives no clock at all.

An assertion checks that the two partitions are never active together. `sleep_o` is brought out as the power-switch request.

The parameter `T_PWRUP` models the time a woken partition's supply needs to come back. The woken partition keeps its clock but waits `T_PWRUP` extra cycles in its entry state, after which it takes over. Each change of partition then costs 1 + `T_PWRUP` cycles, and one increment costs 6 + 2·`T_PWRUP` cycles.

* `T_PWRUP = 0` (the default) is the clock-gated counter with six cycles per increment.
* `T_PWRUP = 2`, a typical estimate for the supply, gives three cycles per change and ten per increment. The testbench checks both.

`counter_fsmd` is the same counter without partitioning: 16 bits wide and clock-gated.

## Transform circuits

* **`h264_transform`** is the 4x4 forward integer core transform.
  * It has one shared 4-point butterfly: `y0 = d0+d1+d2+d3`, `y1 = 2(d0-d3)+(d1-d2)` and so on.
  * It takes four row states, then four column states. With the idle cycle, a block takes 9 cycles from `start` to `done`.
  * Rows are requested through `load`/`row_sel`.
  * There are 16 clock-gated 16-bit coefficient registers.
* **`dwt53`** is one level of the reversible 5/3 lifting wavelet (as in JPEG2000) on an 8-sample line.
  * It uses symmetric extension.
  * The predict step is `d = odd - floor((left + right)/2)`.
  * The update step is `s = even + floor((d_left + d + 2)/4)`.
  * It loads the line with `take`/`sample_idx`, then runs N/2 predict and N/2 update states: 17 cycles.

Line length and widths are this design's choice.

## Top level

`codel_top` places everything side by side:

* **15 kernel slots**, each with its own FXU and memory: the 13 kernels, then `real_update_pg` (slot 13, with `pg_sleep`/`pg_stall`) and `convolution_pg` (slot 14, with `cpg_sleep`/`cpg_stall`). Each slot has `start[k]`, `ready[k]` and `profile[k]`.
* **A host port** (`host_sel`, `host_addr`, `host_wdata`, `host_wr`, `host_rdata`). It reaches memory port 2 of the selected slot while that slot is ready, so results can be read back and operands changed.
* **The clock-gated counter** (`cnt_*`).
* **The partitioned counter** (`pc_*`).
* **The H.264 transform** (`h_*`).
* **The DWT** (`w_*`).

The circuits share no data.

## Simulation

Each testbench is one file in `tb/`, named `tb_<module>.sv`. It prints `TB_RESULT checks=N failures=M`, has a watchdog, and drives random stimulus with `$urandom`. The two packages must come first on the command line:

```
verilator --binary --timing -Wno-fatal -j 0 --top-module tb_codel_top \
    -y rtl -y tb +libext+.sv rtl/codel_pkg.sv tb/tb_fx_pkg.sv tb/tb_codel_top.sv
./obj_dir/Vtb_codel_top
```

Any other testbench runs the same way with its own name; `-y` lets Verilator find the modules by file name.

`tb_codel_top` runs the whole design at its default parameters:

* It starts all 15 slots twice and checks every profile length.
* It reads results through the host port.
* It drives both counters with random `inc`.
* It runs a transform block and a DWT line, checking their latencies (9 and 17 cycles).

It fails if any mechanism never occurs:

* kernel runs;
* counter increments;
* partition hand-overs in both directions;
* register sleep and wake-up.

It also fails if the power-gated real_update slot ever stalls with the default lookahead, or if the power-gated convolution does not stall exactly 3 cycles per run. It takes a few seconds.

Simulation is two-state, so every register that is read has a reset.

## Where this design departs from the usual description

* **Memory ports.** The memory is dual-ported. Descriptions of this kind of generator mention both single- and dual-port memories. The kernels here use both ports.
* **FXU format.** The FXU number format (Q8.8) and its corner cases are this design's choice.
* **Operand values.** Kernel operand values are chosen here, and results are also stored where a kernel would otherwise keep them only in registers: `iir_one_biquad` and `iir_n_biquads`.
* **Cycle counts.** Cycle counts come from hand scheduling, not from a compiler, and are lower for most kernels (see the table above).
* **Memory and FXU requests.** These are combinational decodes of the state and the registers. They are not held in gated output latches, so only the datapath registers are gated.
* **Wake lookahead.** The lookahead is one state longer than the wake-up time, because the power-gating controller is registered.
* **Supply wake-up.** The partitioned counter defaults to no supply wake-up time, which matches a clock-gated-only implementation. Set `T_PWRUP` for a powered one.
* **Scope of power gating and partitioning.** Power gating covers two kernels (real_update and convolution), and partitioning covers only the counter.
* **Not built.**
  * The BinDCT application circuit is not built: its lifting coefficients are not available here.
  * The time-based alternatives to state-driven power gating (per-register idle counters, alone or combined with the lookahead hints) are not built; they are the comparison point, not the scheme.
  * No energy accounting is built (leakage, breakeven time, idle-detection baselines); that is analysis, not hardware.
