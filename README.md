# A software-configurable LQR coprocessor

A linear-quadratic regulator (LQR) with a state observer must finish a
handful of dense matrix-vector products inside every control period. This
design performs them in hardware in a single pass. It evaluates one matrix
product per sensor sample on a tree of single-precision multipliers and
adders. Software sets the tree's behaviour for the plant at hand: the number
of states N, control outputs M and sensor values P, plus the matrix T. No new
hardware build is needed when the plant changes.

The SystemVerilog includes:

- the coprocessor;
- a *Plant-on-Chip*, a hardware emulation of the linear plant, used to close
  the loop;
- a UART logger;
- a top level that wires them together, as on a Zynq-style FPGA. The
  processor and the AXI interconnect are left outside; the top brings out
  their two AXI4-Lite slave ports.

## The control law as one product

For a plant `x_{k+1} = A x_k + B u_k`, `y_k = C x_k`, the design uses three
things:

- an LQR gain `K`;
- a current estimator with gain `G`;
- the estimate update `xhat <- xhat + G (y - C xhat)`, followed by
  `u = -K xhat` and the prediction `xhat_{k+1} = (A - B K) xhat`.

Together these collapse into one product:

```
[ u_k       ]   [ -K G       K G C - K          ] [ y_k    ]
[ xhat_{k+1}] = [ (A-BK) G   (A-BK) - (A-BK) G C ] [ xhat_k ]
                 \________________ T _______________/
```

T has `l = M + N` rows and `c = P + N` columns:

- rows `0..M-1` give u, and rows `M..` give the next estimate;
- columns `0..P-1` multiply the sensor vector, and columns `P..` the
  current estimate.

Software computes T offline. The hardware knows nothing about K, G or the
plant; it evaluates `T * [y; xhat]` and feeds the second part of the result
back as the next input.

## The multiply-accumulate tree

The tree has `2^D` pipelined multipliers (D = 6 by default, so 64 of them).
They feed a binary tree of `2^D - 1` pipelined adders (`mac_tree`). Every
cycle a *fetch* puts one T element and one vector element on every
multiplier. A result at adder level `l` (root = level 0) appears
`L_M + (D - l) L_A` cycles after the fetch. L_M is the multiplier latency
(6 cycles here) and L_A the adder latency (11 cycles). Every adder output is
brought out, and this is what the two mechanisms use.

**Merge (rows narrower than the tree).** If `c <= 2^D`, let
`glog = ceil(log2 c)`:

- a fetch carries `N_f = 2^(D - glog)` rows side by side, each in a group of
  `2^glog` multipliers;
- their dot products are read from the `N_f` adders at level `D - glog`,
  after `L_M + glog L_A` cycles;
- an iteration needs `ceil(l / N_f)` fetches.

For the pendulum below (T is 5 x 6), all five rows fit in one fetch, which
gives eight groups of eight.

**Reduce (rows wider than the tree).** If `c > 2^D`:

- each row takes `N_g = ceil(c / 2^D)` consecutive fetches;
- each fetch yields a partial sum at the root;
- `reduce_circuit` adds the N_g partial sums with `N_g - 1` stages. Each
  stage holds the first value of a pair, adds the second to it, or adds 0
  to a lone value through a multiplexer;
- each stage costs `L_A + 2` cycles, and a new row can follow every N_g
  cycles;
- an iteration needs `l N_g` fetches.

Software chooses the mechanism. It writes the mechanism bit, glog and N_g
into the MECH register. The hardware does not derive them.

## Where T and the estimate live

Each multiplier owns one BRAM of 1024 words (`lqr_storage`). All BRAMs are
read at the same address, one fetch per cycle. With `K = 2^D` and
`G = 2^glog`, software must store T as follows. Positions not listed hold 0.

| mode   | word of BRAM j        | holds                      |
|--------|-----------------------|----------------------------|
| merge  | `t_base + f`          | `T[f*N_f + j/G][j mod G]`  |
| reduce | `t_base + r*N_g + g`  | `T[r][g*K + j]`            |

**Vector operand of multiplier j.** It is found from its column index:
`j mod G` in merge mode, or `g*K + j` in reduce mode.

- If the column is below P, the operand is `y[col]`.
- If the column is below `P + N`, it is the estimate element `col - P`.
- Otherwise it is zero.

**Estimate copies.** Every multiplier keeps its own copy of the estimate
elements it can need, one per reduce group.

**Double buffering.** The copies are double-buffered. An iteration reads one
page. New estimate rows are written into the other page, to every lane with
a matching column, as they leave the tree. The page flips when the
iteration ends. This lets the estimate update start before all rows have
read the old estimate.

## Output arrangement and timing

`lqr_output` counts rows as they arrive:

- Rows `0..M-1` collect into a working copy of u. Once all M are in, the
  copy goes to a hold register, and `u_valid_o` pulses. The plant never
  sees a half-updated u.
- Later rows go back into storage as the next estimate.
- Software can read u and the latest estimate.

`lqr_ctrl` does not watch the arithmetic. It predicts when each fetch's
result is due from the latencies and depth held in the configuration
registers. **These must equal the values the hardware was built with.**
They reset to those values.

The time from the start of an iteration to a valid u, in clock cycles, is:

```
merge:   3 + f_u + 1 + L_M + glog*L_A
reduce:  3 + f_u + 1 + L_M + D*L_A + (N_g - 1)(L_A + 2)
```

- `f_u` is the index of the fetch that completes row M-1.
- The constant `3 + 1` covers sampling y, the BRAM read, the output
  arrangement and the hold register.
- The time to the end of the iteration is the same, with the last fetch in
  place of `f_u`.

Both times are counted in hardware and can be read as CYC_U and CYC_END.
For the pendulum at the defaults, u is ready after 43 cycles, which is
430 ns at 100 MHz.

## Register and address map (coprocessor)

The AXI4-Lite port takes byte addresses (20 bits). The word address is split
by bits 17:16:

| region | bits 15:0            | access                                                           |
|--------|----------------------|------------------------------------------------------------------|
| 0      | register index       | registers below                                                  |
| 1      | `{lane[5:0], word[9:0]}` | write T word into the BRAM of multiplier `lane`              |
| 2      | state index          | write: initial estimate; read: latest estimate                   |
| 3      | output index         | read: held u                                                     |

| idx | name    | meaning                                                           |
|-----|---------|-------------------------------------------------------------------|
| 0   | CTRL    | bit0: start one iteration; bit1: auto-start on every sensor strobe |
| 1   | STATUS  | bit0 busy, bit1 done, bit2 u ready, bit3 estimate page           |
| 2-4 | N, M, P | sizes (up to 128 each)                                           |
| 5   | DEPTH   | tree depth (must equal the built depth)                          |
| 6-7 | LAT_ADD, LAT_MUL | latencies (must equal the built ones)                   |
| 8   | MECH    | bit0 reduce, bits 7:4 glog, bits 15:8 N_g                        |
| 9   | T_BASE  | base word of T in every BRAM                                     |
| 10-12 | CYC_U, CYC_END, ITER | cycles to u, cycles to done, completed iterations |

**Start-up sequence.** Write the sizes and MECH. Write T (region 1). Write
the initial estimate (region 2). Then either start with CTRL bit 0, or set
bit 1 so that every sensor strobe from the plant starts an iteration.

## Plant-on-Chip and logging

`plant_on_chip` emulates `y = C x`, `x' = A x + B u` in single precision. It
handles up to 8 states, 4 inputs and 4 outputs, and uses one shared
multiplier and adder stepping through the terms in a fixed order.

Each sample, after PERIOD cycles:

1. It presents y in parallel with a `y_valid` strobe.
2. It waits for the controller's `u_valid`.
3. It updates x and pulses `step_o`.

Its registers are: 0 CTRL (run), 1 N, 2 M, 3 P, 4 PERIOD, 5 STEPS. Region 1
writes A, B, C and x, with bits 15:14 selecting the matrix and bits 7:4/3:0
giving row and column.

`uart_logger` sends a frame after every plant step: byte 0xA5, then the
state and the input as 32-bit words, least significant byte first, 8N1, at
115200 baud from 100 MHz. A step that comes while a frame is still being
sent is dropped and counted.

`lqr_system` connects these: plant y into the coprocessor, coprocessor u
back to the plant, and plant state and input into the logger.

## What follows the document and what does not

Taken from the document:

- the transformed single-product control law;
- the binary tree with taps (merge) and the reduction circuit (reduce), with
  its `N_g - 1` stages of latency `L_A + 2`;
- one BRAM per multiplier with the memory map above;
- software-set sizes, depth and latencies;
- the direct parallel sensor/actuator link to a Plant-on-Chip;
- AXI4-Lite slave ports and UART logging;
- a 64-multiplier, 100 MHz main configuration, with sizes up to N = M = P =
  128.

This design's own choices:

- **Arithmetic.** Latencies L_M = 6 and L_A = 11. Round-to-nearest-even with
  flush-to-zero for subnormal numbers.
- **Pipeline timing.** The result timing is predicted from the configured
  latencies; the arithmetic is not observed.
- **Reduction circuit.** The exact sequencing of its stages (the document
  shows only registers, a 0-multiplexer and an adder per stage).
- **Vector operand.** The column arithmetic that chooses each multiplier's
  vector operand.
- **Estimate storage.** The per-lane, double-buffered estimate copies.
- **Interfaces.** The register map, address map and status bits, and the
  start/valid handshakes.
- **Plant and logger.** The Plant-on-Chip's sequential insides, sizes and
  period timer. The UART frame format and baud rate.

**Timing differences.**

- For the pendulum, u arrives after 430 ns, against the 530 ns reported for
  the original. The latencies of the original floating-point cores are not
  known, so absolute times differ.
- The published cycle formula for reduce mode uses `L_A + 1` per stage in
  one place and `L_A + 2` in another. This design has `L_A + 2`.

**Not built:** the processor, the AXI interconnect, and a physical-plant I/O
controller.

**Depth is fixed at build time.** Other tree depths (the document compares 2
to 8) are separate builds with a different `DEPTH`; the depth register is
not a way to change it at run time.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=<n> failures=<n>` line and has a watchdog.
`tb/fp_ref_pkg.sv` supplies the reference rounding (round-to-nearest-even,
flush-to-zero) for expected values.

- **Arithmetic units.** `tb_fp_mul` and `tb_fp_add` compare thousands of
  random operands bit-exactly, plus special cases.
- **Datapath blocks.** `tb_mac_tree`, `tb_reduce_circuit`, `tb_lqr_storage`,
  `tb_lqr_output`, `tb_lqr_ctrl`, `tb_lqr_regs` and `tb_axil_slave` check
  values and cycle timing.
- **Coprocessor.** `tb_lqr_coprocessor` (a small build: depth 3) runs sizes
  from 1x1 to 16 states, in both merge and reduce mode. It compares u and
  the estimate bit-exactly with a model of the tree's summation order, and
  checks the cycle counters.
- **Plant and logger.** `tb_plant_on_chip` and `tb_uart_logger` check the
  plant equations, the sample spacing and the frame bytes.
- **Whole system.** `tb_lqr_system` uses the default, full-size parameters.
  It closes the loop on an inverted pendulum on a cart:
  - cart 2.725 kg, pendulum 1.09 kg, friction 0.1, 0.2 m to the centre of
    mass, 0.006 kg m^2;
  - N = 4, M = 1, P = 2, a 10 ms sample, starting at -5 degrees;
  - 300 samples, each compared bit-exactly;
  - it requires the pendulum upright within 1 degree;
  - it checks the UART frame and counts each mechanism that occurred.

  The pendulum exercises merge only, so a second phase covers reduce. It
  reloads the same coprocessor for the largest size it is built for,
  N = M = P = 128:
  - T is 256 x 256, and each row spans four fetches through the reduction
    circuit;
  - the 1024 words of every BRAM are all in use;
  - two iterations are compared bit-exactly, along with their cycle counts.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lqr_system \
    -y rtl -y tb +libext+.sv rtl/lqr_pkg.sv tb/fp_ref_pkg.sv tb/tb_lqr_system.sv
./obj_dir/Vtb_lqr_system
```

Replace the testbench name to run any other. The full-size system testbench
takes about a minute to compile and about five seconds to run.
