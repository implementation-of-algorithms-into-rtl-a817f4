# Algorithms as controller-plus-datapath hardware

This design turns small algorithms, written as register-transfer steps, into hardware. Every design is
split the same way:

- a **datapath** of registers, operators (ALUs), multiplexers and memories that does the arithmetic;
- a **controller**, a Moore state machine, whose present state decides what the datapath does in
  this cycle: which registers load, what the multiplexers select, which operation the ALU performs.

The datapath sends status bits back to the controller (comparison results, "done" flags), and the
controller picks its next state from them. Loops and branches of the algorithm are built the same
way throughout: a FOR loop is a counting module, a WHILE loop and an if/CASE are token switches.

Five worked examples are included, each a complete unit with its own ports. They sit side by side
in the top module `alg_hw_top`:

| Unit | Module | What it does |
|---|---|---|
| Quadratic-formula processors | `abc_processor`, `abc_processor2` | Roots of a*x^2 + b*x + c: four registers and one ALU in 12 control steps, or five registers and two ALUs in 7 |
| Shared-resource datapath | `dp_example` | A looping four-line code sequence on 8 registers and 3 ALUs, chosen by merging registers, operators and wires whose uses never overlap |
| Serial receivers | `serial_receiver`, `serial_receiver_m1`, `serial_receiver_alg2` | Collect a 5 to 8 bit serial package into an 8-bit word and fill the rest with zeros; three implementations of one specification |
| Text video controllers | `video_controller`, `video_controller_m2` | Scan an 80 x 25 character screen memory and a character-pattern ROM, and output pixel rows; one central state machine, or three nested loop modules |
| Handshake load port | `handshake_slave` | Four-phase ready/accepted handshake that fills the video memory from an asynchronous source |

The control-statement modules (`for_module`, `while_module`, `token_switch`), the simple
operational network (`ops_network`) and the decrementing registers are also brought out at the top.

## Timing convention

Everything runs on one clock, rising edge, with a synchronous active-high reset. A controller's
outputs come only from its present state. A register load selected in state S happens at the edge
that also moves the controller out of S. So one control step takes one clock unless it waits for a
multi-cycle operator. This single-edge scheme gives the same order of events as a two-phase clock,
where the controller changes state on one phase and the datapath on the other.

## Quadratic-formula processor (`abc_processor`, `abc_alu`)

**Datapath.** Four registers hold the values:

- A = a, B = b, C = c, and E is a scratch register.
- MUX1 feeds the first ALU input and chooses from {constant 2, C, B, E}.
- MUX2 feeds the second ALU input and chooses from {B, A, E, constant 4}.
- The ALU result can be written into any of the four registers.

A control word in `alg_pkg::abc_ctrl_t` holds four load bits, the two multiplexer selects and the ALU
code. The ALU codes are 0 pass, 1 multiply, 2 divide, 3 square root, 4 add, 5 subtract and 6 negate.

**Program.** The controller steps through 12 control words:

| Step | Operation |
|---|---|
| 1 | E = C*4 |
| 2 | E = E*A (= 4ac) |
| 3 | C = B |
| 4 | C = C*B (b^2) |
| 5 | C = C - E (discriminant) |
| 6 | C = sqrt(C) |
| 7 | A = 2*A |
| 8 | E = C - B (sqrt - b) |
| 9 | C = -C |
| 10 | C = C - B (-sqrt - b) |
| 11 | B = E/A (x1) |
| 12 | C = C/A (x2) |

The roots end up in B (x1) and C (x2). Step 2 is written as E*A. Printing it as C*E would give 4c^2
instead of 4ac, so the multiplexer selects of that one step differ from what a literal reading of
the control table gives.

**Timing.**

- START in the idle state loads a, b and c, and the first step is issued on the next cycle.
- Each step starts the ALU and then waits for the ALU's DONE before it loads the result.
- Add, subtract, multiply, negate and pass take one cycle.
- Divide is a restoring division on magnitudes. It takes W+1 cycles and truncates toward zero.
- Square root uses the bit-pair method and takes W/2+1 cycles.
- A whole solve takes 24 + 5W/2 cycles (64 at W = 16), or W/2 fewer when the discriminant is
  negative. In that case the square root returns 0.
- Divide by zero returns 0.
- Results are 16-bit two's complement, so b*b - 4ac must fit in 16 bits. This holds for
  coefficients up to about 90 in magnitude.

### Two-ALU version (`abc_processor2`)

The same formula can trade area for speed. With five registers (A, B, C, E, F) and two ALUs, the
program shrinks to seven steps. Two operations run in one step wherever the data allow:

| Step | ALU1 | ALU2 / transfer |
|---|---|---|
| 1 | E = 4*A | F = B (direct) |
| 2 | C = B*F (b^2) | E = E*C (4ac) |
| 3 | C = C - E | |
| 4 | C = 2*A | A = sqrt(C) |
| 5 | F = A - B | A = -A |
| 6 | B = A - B (-sqrt - b) | A = F/C (x1) |
| 7 | B = B/C (x2) | |

Both operations of a step read the values from before the step. A step starts the ALUs it needs
and ends when every started ALU has reported DONE. All destination registers then load on the same
edge.

The multiplexers in front of the two ALUs were derived from the program:

- ALU1's first input comes from A, B or C.
- ALU1's second input comes from 4, 2, F, E, B or C.
- ALU2's first input comes from E, C, A or F.
- ALU2's second input is always C.

A solution takes 14 + 5W/2 cycles, which is 54 at W = 16 against 64 for the one-ALU version. The
roots end up in A (x1) and B (x2).

## Shared-resource datapath (`dp_example`)

The code sequence is a loop of four lines. Statements on one line run in the same cycle:

1. R3 = R1 + R2, and R12 = R1
2. R5 = R3 - R4, and R2 = R3 * R6
3. R3 = R3 + R5, R2 = R1 + R2, and R5 = R10 / R5
4. R1 = R3 AND R5, and R2 = R12 OR R2

It started as a longer sequence with fifteen variables. Any variables whose lifetimes never overlap
were merged into one register, and a fifth line was removed.

The allocation step found that:

- 8 registers are enough: R1, R2, R3, R4, R5, R6, R10 and R12.
- 3 operators are enough:
  - ALU1 does add, multiply and OR.
  - ALU2 does subtract, add and AND.
  - ALU3 divides.
- 4 multiplexers are enough:
  - MUX1 chooses ALU1 or ALU2 for the R1/R3/R5 inputs.
  - MUX2 chooses R1, R3 or R12 for ALU1's first input and for R12.
  - MUX3 chooses R4 or R5 for the second input of ALU2 and ALU3.
  - MUX4 chooses R2 or R6 for ALU1's second input.

Fixed links take R3 to ALU2, R10 to ALU3 and ALU1's result to R2. ALU3's quotient goes to R5, which needs one extra 2-way select in front of R5.

**Controller.** The controller has four states, one per line, and executes one line per clock while
RUN is high.

**Ports.**

- INIT loads R1, R2, R4, R6 and R10, the values that are live when the loop starts.
- `regs` shows all eight registers. New values of R1 and R2 appear one cycle after `iter_done`.
- `iter_done` marks the cycle in which line 4 executes.

**Division by zero** gives all ones.

## Control-statement modules

**`for_module`: FOR loop.** LOAD stores the initial value into the counter i and the end value into
the end register. While START is high, the loop alternates between two steps:

1. Compare i with the end value. If they differ, ENABLE goes high and the loop waits for NEXT from
   the enabled process. If they are equal, DONE goes high.
2. After NEXT, a step flip-flop moves the module to step 2 for one clock, and the counter
   decrements.

The counter is the bit-slice decrementing register, so the loop counts down. From a NEXT to the
following ENABLE takes two clocks.

**`while_module`: WHILE loop.** A token enters at START and reaches the test place:

- If the condition is true, NEXT pulses and the loop is left.
- If it is false, the token walks through NSTEPS body enables, one clock each, and returns to the
  test.

**`token_switch`: if-then-else / CASE.** An incoming token is routed to one of N statement enables
by SEL. Index 0 is the "true" branch, so for if-then-else drive SEL = !condition. The enable stays
high until ACK. Tokens that arrive while the switch is busy are ignored.

**`decr_reg_bitslice` and `subtractor_bit`.** A decrementing register is built from one-bit
subtractors:

- Slice 0 subtracts 1 and the others subtract 0.
- Each slice's borrow-out feeds the next slice's borrow-in.
- L loads a value and has priority. D decrements.
- The borrow out of the top slice is high when the register is zero.

**`decr_reg_moore`** does the same job as a word-wide state register.

**`comparator`.** C = S and (X == Y). A second output gives S and (X == 0).

## Serial receivers (`serial_receiver`, `serial_receiver_m1`, `serial_receiver_alg2`)

A receiver takes packages of 5, 6, 7 or 8 bits, sent serially LSB first, and delivers each one as
an 8-bit word with zeros above the package. The same job is built three ways. This shows how the
way a loop is turned into hardware shapes the result. All three mark each sampled data bit with
DATA_TAKE, one sample every two clocks, and mark the finished word in PKT with a one-cycle
PKT_VALID.

**`serial_receiver`: loops as FOR modules.** The algorithm has two loops:

- shift in `size` data bits
- shift in `8 - size` zeros

The two loops never run at the same time, so they share one `for_module`. A five-state controller
sequences them:

- **S0** stores the size, 5 to 8. This happens only once, after reset.
- **S1** loads the FOR module with the size.
- **S2** shifts in one data bit per iteration.
- **S3** loads the FOR module with 8 - size.
- **S4** shifts in zeros until the word is full.

Bits are shifted in from the top, so after 8 shifts the first bit is in bit 0. The two loops
together always run 8 iterations, so every package takes 20 cycles whatever its size.

**`serial_receiver_m1`: compiled program.** The same two loops are flattened into seven
register-transfer steps with explicit branches. An eight-state controller runs them:

| State | Step |
|---|---|
| 1 | size = input |
| 2 | i = size |
| 3 | shift in data, i-- |
| 4 | if i != 0 go to 3 |
| 5 | i = 8 - size |
| 6 | shift in 0, i-- |
| 7 | if i != 0 go to 6, else go to 2 |

The status comes from a single comparator, i == 0. The state codes (000, 001, 011, 010, 100, 101,
111, 110) are fixed in the RTL.

A literal "do, then test" loop would run the zero-fill step once even when 8 - size = 0, and the
counter would wrap. So the shift and the decrement are enabled only while i != 0. A package takes
18 cycles, or 20 for size 8.

**`serial_receiver_alg2`: insertion point set by the size.** There is no zero-fill loop. Every
package takes exactly eight shift steps:

- The low four bits always move down one place.
- The data bit enters at bit size-1.
- The bits above it move down, with 0 entering bit 7.

After eight steps the last `size` samples are in the low bits and everything above is zero. The
first 8 - size samples fall out of the bottom, so a sender must put a shorter package in the last
`size` sample times of each group of eight.

The controller has four states:

- It reads the size and sets i = 8.
- It runs the shift step.
- It tests i == 0.
- It returns to idle.

Control lines S31 to S34 pick the routing for sizes 8 down to 5. The size is read again for every
package, so it may change between packages. A package takes 18 cycles.

## Text video controllers (`video_controller`, `video_controller_m2`, `char_rom`, `ram`, `handshake_slave`)

**Memories.**

- The screen memory is a 2048 x 6 RAM. It holds 80 x 25 character codes at address
  row*80 + column.
- The character ROM holds 35 characters of 8 rows each, 8 pixels per row.

**Controller.** It has eight states:

| State | Action |
|---|---|
| V0 | Idle; the RAM can be loaded; wait for RUN |
| V1 | Row x = 0 |
| V2 | Pixel line z = 0 |
| V3 | Column y = 0 |
| V4 | Output ROM[RAM[x,y]][z] with OUT_VALID, then y++ |
| V5 | End of the text line? If not, go back to V4 |
| V6 | Last pixel line? If not, z++ and go back to V3 |
| V7 | Last text row? If not, x++ and go back to V2; if yes, FRAME_DONE and go back to V0 |

One frame takes 1 + ROWS*(2 + LINES*(2 + 2*COLS)) = 32451 clocks at the default size. That is one
pixel row every two clocks.

**Font.** The ROM contents are a placeholder pattern, row = low 8 bits of (code*8 + line) XOR 0x5A.
Pass a real font through `char_rom`'s `FONT` parameter.

**Loading.** The screen memory is loaded through `handshake_slave` with the usual four-phase
protocol:

1. The source raises DATA_READY with a 17-bit word {address[10:0], code[5:0]}.
2. The receiver synchronises DATA_READY through two flip-flops into a flag.
3. The receiver takes the word when the display is idle and raises DATA_ACCEPTED.
4. DATA_ACCEPTED stays high until the source drops DATA_READY.

While a frame is running, no word is taken and the source simply waits.

**Nested-loop version (`video_controller_m2`).** This version does the same scan without a central
state machine. Each of the three loops is a `for_module`:

- The x loop's body enables the z loop.
- The z loop's body enables the y loop.
- The y loop's body outputs one pattern row.

The FOR modules count down, so x = ROWS - i1, z = LINES - i2 and y = COLS - i3.

Nesting loop modules needs a small piece of synchronisation at every level, through a flag ACT:

1. When the outer loop's ENABLE rises and the inner loop is not active, the inner FOR module is
   reloaded and ACT is set.
2. The inner module runs while ACT is high.
3. Its DONE acts as the outer loop's NEXT and clears ACT.

Each level adds a few cycles of overhead. A frame takes 2 + ROWS*(3 + LINES*(3 + 2*COLS)) = 32677
clocks. This version has its own screen memory with a plain write port (LD_WRITE, LD_ADDR, LD_DATA)
that is open while LD_READY is high.

## Operational network (`ops_network`)

Two registers A and B are driven by a command Z:

- **S0** does nothing.
- **S1** sets A = I and B = A.
- **S2** sets A = B and B = A - B.

The status X = {A>B, A==B, A<B} is always valid and does not depend on Z.

## Generic parts

- `register_nbit`: register with LOAD and RESET. RESET wins.
- `ram`: synchronous write, read gated by READ (0 otherwise).
- `mux` and `demux`: out-of-range selects give 0; unselected demux outputs are 0.
- `alg_pkg`: the abc ALU codes and control-word struct.

## Where this design departs from its source, or fills gaps

- **Step 2 of the quadratic program** is E = E*A, not E = C*E (see above).
- **Step 1 of the two-ALU program** is E = 4*A. One listing of that program starts with
  E = 4*C, which would give 4c^2 instead of 4ac.
- **The two-ALU multiplexers** were derived from the seven steps. A published interconnection
  list for this version lacks some paths that the steps need, such as E into ALU1.
- **The abc operand multiplexer input order and the ALU code meanings** were inferred from the
  control words.
- **The dp_example divider** writes R5, which matches the code sequence, rather than R10.
- **The first line of the dp_example loop** is R3 = R1 + R2. The line's register lifetimes show this is the intended statement.
- **The video controller** scans 80 columns (0..79). A literal loop bound of 80 inclusive would
  scan 81 columns and overrun the 80-column memory. It also waits for RUN in its idle state.
- **The operational network's S1** is read as "A = input, B = A".
- **Bit-level timing and the handshake** are this design's own choices, as are all word widths:
  - abc: 16-bit signed
  - dp: 16-bit unsigned
  - counters: 4-bit
  - network: 8-bit
  - pixel rows: 8 bits
- **The one-bit subtractor** is arithmetically correct (R = X xor Y xor BI). It does not follow a
  truth table that drops the 0 - 0 - 1 case.
- **Not built:**
  - microprogrammed and pipelined controllers
  - arbitrated parallel processes
  - The source gives no circuit for these beyond a name or a sketch.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
        -Irtl -y rtl --top-module tb_abc_processor tb/tb_abc_processor.sv
    ./obj_dir/Vtb_abc_processor

`tb_alg_hw_top` runs the whole top at its default parameters. It does the following:

- solves 40 quadratics on both quadratic processors, including ones with no real roots;
- runs 50 loop iterations of the datapath;
- receives packages on all three receivers: size 6, size 8 (where the zero-fill loop is empty), and sizes that change from package to package;
- loads 2000 characters through the handshake and scans a full frame, and does the same on the nested-loop video controller;
- exercises the WHILE, CASE, operational-network and decrementing-register blocks.

It counts each mechanism and fails if any never happens. The two video testbenches also run at full
size. The others use random stimulus against reference models written in the testbench.
