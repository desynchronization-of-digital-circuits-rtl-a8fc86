# Desynchronized circuits: clocked designs turned into handshake logic

A synchronous circuit keeps its state in flip-flops that all update on the
same clock edge, and the clock period has to cover the slowest path anywhere
in the design. *Desynchronization* keeps the datapath exactly as it is and
only changes how its registers are timed:

1. every flip-flop register becomes a **master latch followed by a slave
   latch**;
2. the clock is removed, and each register pair gets its own **latch
   controller** that talks to its neighbours with four-phase request /
   acknowledge handshakes;
3. where data from several registers meets, a **join** waits for all of them;
   where one register feeds several, a **fork** waits until all of them have
   taken the value;
4. every request that travels alongside combinational logic passes through a
   **matched delay** at least as slow as that logic, so the request arrives
   after the data it announces (bundled data).

The result computes the same sequence of values as the clocked original, but
each register only switches when new data actually reaches it, and each part
runs at the speed of its own logic rather than the slowest path of the chip.

This repository holds the building blocks of that flow and three circuits
built with it: an 8-bit accumulator, a greatest-common-divisor (GCD) unit,
and the register and counter parts of a Sobel edge detector. There is no
clock anywhere in the RTL.

## Handshakes and latches

All channels are four-phase push channels with bundled data: the sender puts
data on the bus, raises `req`; the receiver captures and raises `ack`; the
sender lowers `req`; the receiver lowers `ack`. Data must be stable from
before `req` rises until `ack` rises.

All latches (`dlatch`) are **opaque while their control is 1** and
transparent while it is 0. A controller raises its latch control to capture.

### The latch controller (`semi_decoupled_ctrl`)

Each latch has a semi-decoupled controller. Its inputs are `Ri` (request
from the previous stage) and `Ao` (acknowledge from the next). It has an
internal state `A`, which is both the latch control and the input
acknowledge `Ai`. Its output `Ro` is the request to the next stage. Each of
`A` and `Ro` is a set/reset element:

| signal | set when            | reset when             |
|--------|---------------------|------------------------|
| `A`    | `Ri & !Ro`          | `!Ri & Ro & Ao`        |
| `Ro`   | `A & !Ao`           | `!A`                   |

The controller acknowledges its input as soon as it has captured the data,
without waiting for the next stage. It can also take new data while the next
stage is still lowering its acknowledge. So, unlike a plain Muller-pipeline
controller, a chain of these can hold data in **every** stage: a six-stage
FIFO with a consumer that never acknowledges takes six items before it
stalls, where the simpler controller stops at three.

The two set/reset elements form a loop with no delay in it. The outputs
therefore carry a small delay, `GATE_DELAY_NS` (0.1 ns), that stands for gate
delay. This delay exists only in simulation; it keeps zero-delay races out of
the event-driven model.

### Master/slave pairs and reset tokens (`double_latch_ctrl`, `double_latch_reg`)

A register becomes two latches driven by two controllers in series, the
master's output channel feeding the slave's input channel. At least one of
the two latches is always opaque, so a combinational block never sees a
transparent path from input to output.

Reset decides where the **tokens** are. A token is a value that is held and
offered downstream with its request high. A clocked register holds a
valid value right after reset. The desynchronized version models this by
starting the slave *opaque, with its request already up*, while the master
starts empty. This is `INIT_TOKEN = 1`, the default. `INIT_TOKEN = 0` starts
both halves empty; a register that must wait for its first input uses it.

Where the tokens start decides whether the circuit runs at all. A feedback
loop without a token deadlocks: every join waits for a value nobody is going
to produce. A pipeline with too many tokens produces outputs that no input
caused. Each circuit below states where its tokens are.

### Holding registers

In a clocked design a register with an enable keeps its value for as long as
it is not enabled. In this flow the equivalent is a **token that is not
acknowledged**. Once its token is acknowledged, a double latch goes
transparent again, so its output follows its input. The PxMem and savePxl
registers of the edge detector need to keep their value across many other
writes, so they work like this:

* each register holds a token from reset on;
* a handshake multiplexer (`async_mux`) leaves the requests of unselected
  registers pending, so their tokens stay put;
* writing register *k* means first requesting the write (the new word
  enters the master latch), then acknowledging *k*'s old token on the output
  channel. The slave then takes the new word and raises its request again.

One output handshake therefore equals one completed write. A consumer must
never acknowledge a token unless a new word for that register has been
requested.

### Matched delay (`matched_delay`)

This is a chain of `STAGES` gates that alternate between NAND(previous, in)
and NOR(previous, not in). A rising input must ripple through every gate,
so it takes `STAGES × STAGE_DELAY_NS`. A falling input resets all gates at
once, so it takes one gate delay. Only the edge that announces new data is
slowed; the return to zero stays fast. The default is 20 gates × 0.1 ns =
2 ns.

This is a **behavioural model**. Its delays are `assign #` delays, and a
synthesis tool turns the module into a wire. In silicon it has to be a
hand-placed chain sized from timing analysis of the path it accompanies.

### Fork, join, multiplexer, de-multiplexer

* `hs_join`: the requests go through a C element, and the acknowledge goes
  back to every input.
* `hs_fork`: the request goes to every output, and the acknowledges go
  through a C element.
* `async_mux`: `out_req` is the OR of `sel[k] & in_req[k]`. Each input's
  acknowledge is a C element of its gated request and `out_ack`. That C
  element keeps the acknowledge high until the output handshake has fully
  returned to zero.
* `async_demux`: `out_req[k] = sel[k] & in_req`, and `in_ack` is the OR of
  the output acknowledges. It has no state, so it stays transparent to the
  handshakes of the stage it steers into.

`sel` is one-hot and comes from datapath control. It must not change during
a handshake. The two-way versions are the ones the flow needs; the RTL takes
any `N`.

`c_element` is the Muller C element. Its output becomes 1 when all inputs
are 1, becomes 0 when all are 0, and holds otherwise. `rst` loads `INIT`.

## Example 1: accumulator (`accu_async`)

The accumulator computes `y <= y + x`:

```
 in_req/din --> [X] --+
                      JOIN --> matched delay --> [Y] --> FORK --> out_req/dout
             +--------+                                  |
             +------------------ y ----------------------+
```

* X is the input register and starts empty (`INIT_TOKEN = 0`).
* Y starts with the token 0, offered on the output first.
* The join waits for both X and the fed-back copy of Y. Only then is the
  sum (`accu_adder`) stable.
* The fork sends Y's new value to the output and back to the join. The next
  step cannot start until the consumer has taken the value.

The output sequence is 0, x0, x0+x1, … (mod 256).

The matched delay is 4 × 0.1 ns = 0.4 ns. That is the shortest even chain
above the 300 ps chosen for an adder measured at 200 ps after synthesis. A
first, unsynthesized version of this circuit used 8 ns.

## Example 2: greatest common divisor (`gcd_core`, `gcd_async`)

`gcd_core` is the combinational half of a two-process FSM. It computes GCD
by repeated subtraction and takes its operands over a four-phase `req/ack`
exchange on an 8-bit bus: A first, then B, then the result on `c` with `ack`
high. The states and their codes are in `gcd_pkg`:

```
WAIT_A(000) -> SET_ACKA(001) -> WAIT_B(010) -> EQUAL_CHECK(100)
EQUAL_CHECK: A == B ? RESET_ACK(011) : A_GREATER_CHECK(101)
A_GREATER_CHECK: A > B ? WRITE_A(110) : B := B - A, EQUAL_CHECK
WRITE_A: A := A - B, EQUAL_CHECK
RESET_ACK: ack = 1 until req falls, then WAIT_A
```

`gcd_async` is the coarse-grained version. The A, B and state registers
share one double latch controller, in a loop through a 10 ns matched delay
(100 gates). The delay is twice the roughly 5 ns that one step takes:

```
in_req --> JOIN --> [A,B,state] --> FORK --> out_req
            ^                         |
            +----- matched delay -----+
```

Each handshake on the external channels is one step of the algorithm, that
is, one clock cycle of the original. The environment reads `output_valid`
(the original `ack`) and `data_out` on every output token. It then sets
`input_valid` (the original `req`) and `data_in` for the next step and
completes both handshakes. After reset the registers hold the token
WAIT_A / 0 / 0.

An operand of 0 makes the subtraction loop run forever, as in the original
algorithm; operands must be non-zero.

## Example 3: edge detector parts

The edge detector runs a Sobel filter over a monochrome CIF image
(352 × 288 pixels, 8 bits each). It reads and writes 32-bit words of four
pixels over a shared bus. Its control consists of an FSM and five counters.
The parts built here are:

* **`offset_counter_next` / `offset_counter_async`**: the memory offset
  counter. A low part counts 0–2 and a column part counts 0–89; `clr` and
  `pause` are control inputs, with clear taking priority.
  * The logic is split from its register; the register is a double latch
    with its own controller.
  * A join merges the request of whoever drives `clr`/`pause` with the
    counter's own fed-back value, as for the GCD. A fork sends each new
    count out and back.
  * The count 0/0 is the reset token.
  * The loop delay is 2 ns.
* **`bit_flipper`**: reverses the four pixels of a word (ABCD → DCBA)
  when `flip` is 1.
* **`pxmem_group`, `pxmem_async` (PxMem)**: the nine 32-bit input
  registers, in three groups of three.
  * Each group receives a 2-bit code: `00` means none of its registers,
    and `01`/`10`/`11` select register 0/1/2. A 2:3 decoder turns the code
    into the select of the group's 1:3 de-multiplexer and 3:1 multiplexer.
  * The OR of a group's two code bits selects the group in the outer
    1:3 / 3:1 pair.
  * Only one register is written at a time, so a single 2 ns matched delay
    after the outer multiplexer is enough.
  * The registers are holding registers, as described above.
* **`sobel_filter`**: edge strength `|Gx| + |Gy|` of a 3×3 window with the
  usual Sobel kernels, saturated to 255.
* **`savepxl_async` (savePxl)**: two registers.
  * Four separate 8-bit pixel registers, written through a 1:4 de-mux and
    read through a 4:1 mux selected by `addr`. They are holding registers
    with a 2 ns delay after the mux.
  * `pxl2bus`, a 32-bit register with its own channel. It packs the four
    pixels (address 0 in the low byte) into a bus word.

The edge detector's FSM, its other four counters, and the multiplexer that
picks the 9 window pixels out of the 36 stored ones are **not** included,
because their behaviour is not specified. The top therefore wires the
datapath in a simplified way:

```
memory word --> bit_flipper --> PxMem --> (low byte of each register) --> sobel_filter --> savePxl --> bus word
```

The handshake channels that the FSM would drive are ports of the top.

## Top level (`desync_top`)

The three circuits sit side by side and share no signals. Each has its own
reset (`accu_rst`, `gcd_rst`, `edge_rst`, active high) and its own channels:

| prefix       | circuit |
|--------------|---------|
| `accu_`      | accumulator: input channel with `accu_din`, output channel with `accu_dout` |
| `gcd_`       | GCD: `gcd_input_valid`/`gcd_data_in` with the input channel, `gcd_output_valid`/`gcd_data_out` with the output channel |
| `edge_cnt_`  | offset counter: `clr`/`pause` with the input channel, count with the output channel |
| `edge_mem_`, `edge_pxm_` | PxMem write: word, flip, group codes; write channel and token channel |
| `edge_sav_`, `edge_word_`, `edge_bus_` | savePxl: pixel write, pixel token, pxl2bus load, bus word |

`edge_pixel` shows the Sobel output that savePxl stores.

## Simulating

The RTL uses `timescale 1ns/1ps` and real-valued delays, so it needs an
event-driven simulator with timing. Verilator 5 works with `--timing`. The
two packages must be read first:

```
verilator --binary --timing -Wno-fatal \
    rtl/gcd_pkg.sv rtl/edge_pkg.sv tb/desync_top_tb.sv -y rtl \
    --top-module desync_top_tb
./obj_dir/Vdesync_top_tb
```

Any other testbench works the same way; `-y rtl` lets Verilator find the
modules it uses. Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that ends a
deadlocked run with a failure. Verilator has two signal states, so
everything that is read is reset first, and the results do not depend on
`+verilator+rand+reset+2`.

| testbench | what it shows |
|-----------|---------------|
| `c_element_tb`, `dlatch_tb`, `double_latch_reg_tb` | truth table / hold behaviour |
| `semi_decoupled_ctrl_tb` | each controller transition; the six-stage FIFO fills all six stages and drains in order |
| `double_latch_ctrl_tb` | reset tokens; a two-register pipeline takes three items against a stopped consumer; stream order |
| `matched_delay_tb` | 2 ns / 10 ns rise, one-gate fall, short pulses swallowed |
| `hs_fork_tb`, `hs_join_tb`, `async_mux_tb`, `async_demux_tb` | handshake rules over random timing |
| `accu_adder_tb`, `accu_async_tb` | sums; the input sequence 0, 1, 5 then 200 random bytes, latency at least the matched delay, back-pressure stalls |
| `gcd_core_tb`, `gcd_async_tb` | GCD(56,12)=4, GCD(156,30)=6 and random pairs, state codes, ack protocol |
| `offset_counter_next_tb`, `offset_counter_async_tb` | all counts and controls; 300+ steps over a column wrap, loop delay respected |
| `bit_flipper_tb`, `sobel_filter_tb` | against reference models |
| `pxmem_group_tb`, `pxmem_async_tb`, `savepxl_async_tb` | writes never disturb other registers; new token no sooner than the delay; bus word packing |
| `desync_top_tb` | everything at once, at default parameters; counts each mechanism (initial token, join waiting, fork waiting, delay holding a request, back-pressure, GCD operand exchange / A−B / B−A / equality exit, counter wraps, pause and clear, flipped and unflipped words, all nine PxMem registers, all four savePxl addresses, bus words) and fails if one never happened |

`desync_top_tb` runs in a few seconds.

## How far to trust it, and where it departs from the source design

* **Timing is simulation-only.** The matched delays and the controllers'
  gate delays are `assign #` delays. Synthesis keeps the latches and the
  set/reset loops (lint reports them as combinational loops and latches, and
  they are intended), but drops every delay. A real implementation needs
  delay chains inserted and sized after place-and-route, and the
  relative-timing assumptions have to be checked there.
* **Controller equations.** The set condition of `A` is taken as
  `Ri & !Ro`. That is the only reading consistent with the controller's
  described behaviour and with its behavioural model.
* **Controllers are behavioural, not the gate-level master/slave cell.**
  `double_latch_ctrl` is two instances of `semi_decoupled_ctrl`. A compact
  gate-level implementation of the pair exists, but its netlist is not
  reproduced here.
* **GCD transitions** are reconstructed from the state names, the
  handshake protocol and the algorithm. The state codes follow the original.
* **Delays.** The GCD delay is 10 ns (an earlier model used 5 ns). The
  accumulator uses 0.4 ns (chosen value 300 ps). The edge detector's delays
  (2 ns) are this design's choice.
* **Own choices in the edge detector:**
  * the PxMem code-to-register mapping;
  * the savePxl byte order;
  * combining `|Gx| + |Gy|` with saturation;
  * the window taken from the low byte of each PxMem register;
  * the handshake delay placed on the counter's loop request rather than
    on an acknowledge wire.
* **Not built.** The following are not included because their behaviour is
  not specified: the edge detector's FSM and remaining counters, the pixel
  selection, the bus and CPU side, and a fine-grained GCD with separately
  controlled registers. The GCD also lacks the optional gating that hides
  intermediate steps from the environment, so it handshakes with its
  environment on every step. The complete edge detector was never finished as a
  working model in the original work either.
* **Left out on purpose.** The simple and the fully-decoupled latch
  controllers are alternatives that the flow rejects in favour of the
  semi-decoupled one.
