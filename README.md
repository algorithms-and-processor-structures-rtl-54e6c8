# Motion-picture compression engines: a bit-serial DCT, an edge-masked motion estimator and a multi-bus frame memory

Two operations dominate the cost of a video encoder: the 8-point discrete cosine transform (DCT) applied to the rows and columns of every 8x8 block, and block-matching motion estimation. This repository holds synthesizable SystemVerilog for three hardware structures that make these operations cheap.

1. **A bit-serial 1-D DCT processor.** No multiplier is a real multiplier. Every cosine coefficient is written as a short sum of signed powers of two. A product then becomes a delay line, tapped at the right powers and summed by one-bit serial adders. The whole 8-point transform fits in a few hundred gates of full adders and flip-flops. It completes one transform every 32 clock cycles over a single shared 12-bit bus.
2. **An edge-masked motion estimator.** Plain mean-absolute-difference (MAD) matching predicts moving edges poorly. This estimator weights the absolute difference by beta = 2^n wherever the current block has an edge, and the weighting is only a shifter. The edge map comes from a 5x5 smoothing filter, a 3x3 Sobel operator and a threshold, computed on the fly from the pixel stream. A 16-PE broadcast array then searches 16 x 16 candidate positions.
3. **The memory and switching side of a four-processor motion-estimation system.** A 64K x 8 frame memory is split into 1024 modules of 8x8 words. Two single-stage crossbars connect four processors to them:
   - an address network carries each processor's address to a module;
   - a data network returns each module's word to its processor.

   Every processor can therefore read from a different module in every cycle.

The three structures are independent. The top module `mpc_top` places them side by side, each with its own ports, on one clock and one reset.

## 1. The bit-serial DCT processor

### 1.1 Arithmetic

All data inside the processor travels as two's-complement bit streams, least significant bit (LSB) first. A serial adder (`serial_addsub`) is a full adder with its carry kept in a flip-flop.
- The sum bit is combinational, so an adder adds no latency. Any tree of adders therefore stays bit-aligned without extra registers.
- `start` marks bit 0 and presets the carry: 0 for an add, 1 for a subtract. A subtract also inverts b.

The transform uses the usual even/odd split of the 8-point DCT:

```
e(j) = x(j) + x(7-j),  o(j) = x(j) - x(7-j),  j = 0..3
[z0 z2 z4 z6] = E * e,   [z1 z3 z5 z7] = O * o
```

Here E and O are 4x4 matrices built from seven constants a..g, where a..g = cos(k*pi/16)/2 for k = 1..7. Each constant is a signed-digit sum of powers of two down to 2^-14:

| constant | value x 2^14 | digits |
|---|---|---|
| a | 8034 | 2^-1 + 2^-13 - 2^-7 - 2^-9 |
| b | 7568 | 2^-1 + 2^-10 - 2^-5 - 2^-7 |
| c | 6812 | 2^-2 + 2^-3 + 2^-5 + 2^-7 + 2^-9 - 2^-12 |
| d | 5792 | 2^-2 + 2^-4 + 2^-5 + 2^-7 + 2^-9 |
| e | 4552 | 2^-5 - 2^-8 + 2^-2 + 2^-11 |
| f | 3135 | 2^-3 + 2^-4 + 2^-8 - 2^-14 |
| g | 1598 | 2^-4 - 2^-13 + 2^-5 + 2^-8 |

For f, the source material prints two different forms. The form used here is the one whose value matches cos(3*pi/8)/2 = 0.19134.

### 1.2 Multiplier cells and tap masking

A serial operand x runs down a 13-stage delay line (`even_kernel_mult`, `odd_kernel_mult`).
- The line input has weight 2^-14, and stage k has weight 2^(k-14).
- Reading the stage for each digit of a coefficient and summing the taps gives the serial product x*C, where C = coefficient x 2^14.
- Each multiplier cell computes all the products of its kernel at once: b, d, f for the even kernel and a, c, e, g for the odd kernel. They share one delay line.

Consecutive transforms follow each other with no gap. When a new word starts, the delay line still holds the top bits of the previous word. The `tap_en` vector masks them out. It is a thermometer code `tap_en[k] = (s >= k)`, where s is the stream cycle. As a result, stage k contributes only once bit 0 of the new word has reached it.

`kernel_row` sums four products with three serial adders, for example z1 = (a*o0 + c*o1) + (e*o2 + g*o3). `even_kernel` and `odd_kernel` each hold four multipliers and four rows.

### 1.3 The 32-cycle frame

`dct_controller` runs a free 32-cycle frame counter. Within it:

| frame cycle | action |
|---|---|
| 0..7 | x(0)..x(7) are written from the bus into the parallel-to-serial (P/S) registers (`ps_converter`). `start` is honoured only in cycle 0. |
| 8..20 | stream cycles s = 0..12: the P/S registers shift out bits 0..11, then repeat the sign. |
| 21.. | s >= 13: the butterfly outputs are frozen by a hold register in `dct_preproc`. The P/S registers are then free for the next transform, while the kernels still see a sign-extended stream. |
| 22..33 | s = 14..25: result bits 14..25 are shifted into the serial-to-parallel registers (`sp_converter`). This is floor(z) modulo 2^12. |
| 8..15 of the next frame | z(0)..z(7) are driven on the bus, one word per cycle, with `d_oe` and `out_valid` high. |
| 31 | `sync` is high: the host may raise `start` in the next cycle. |

The latency from the cycle of x(0) to the cycle of z(0) is 40 clocks. The rate is one transform per 32 clocks. The input window (cycles 0..7) and the output window (cycles 8..15) never overlap, so one bidirectional bus is enough. The design splits it into `d_in`, `d_out` and `d_oe`, the enable of an external tri-state driver.

Interface of `dct_processor`:
- Wait for `sync`.
- Raise `start` with x(0) on `d_in` in the next cycle, then present x(1)..x(7) on the following seven cycles.
- The results appear 40 cycles after x(0).
- A frame without `start` produces no `out_valid`.

### 1.4 Accuracy and range

- Internal streams are never truncated: every adder works on the full sign-extended stream. The only losses are the quantised coefficients and the final floor to an integer. The testbench finds the results within 1.5 LSB of the exact real DCT.
- Outputs are 12-bit and wrap modulo 2^12. Inputs with |x| <= 724 keep every output in range. That is enough for the second pass of a 2-D DCT of 8-bit pixels, because the first pass of 8-bit data stays below 724.
- A real product would round rather than floor; this design floors, as the original does.
- The original design was clocked at 45 MHz in programmable logic. No timing analysis is done here.

## 2. The edge-masked motion estimator

`edge_masked_me` finds the best match of a 16x16 current block in a 31x31 search area. The match criterion is:

```
EMMAD(u,v) = sum over (i,j) of |a(i,j) - b(u+i, v+j)| * B(i,j)
B(i,j)     = 2^n if the pixel is an edge, 1 otherwise
```

### 2.1 Edge mask

- **Smoothing (`smooth_filter`).** A 5x5 box sum, built as a running five-pixel row sum plus four 16-pixel line delays. The sum is not divided by 25. Instead, the threshold is given on the sum scale: the usual T = 40 on pixel values is `thr = 1000`.
- **Sobel operator (`sobel_edge_detector`).** On the one-dimensional raster stream, the operator factors into:
  - a [1 2 1] row filter and a [1 0 -1] row filter;
  - delay lines of 16 and 32 cycles;
  - the combinations hx = P(t) - P(t-32) and hy = Q(t) + 2Q(t-16) + Q(t-32).

  The magnitude |hx| + |hy| goes to a registered comparator.
- **Delays.** The smoothing filter's output centre is 36 cycles behind its input. The Sobel output is 19 cycles further, so the total is 55 cycles.

All windows are taken on the raster stream of the block alone. A window at the edge of the block therefore wraps into the next or previous row, and the top rows wrap onto the bottom ones.

### 2.2 Why the block is streamed three times

The edge bit of a pixel depends on pixels up to three rows below it, so it is known only 55 cycles after the pixel has passed. The estimator solves this by streaming the current block cyclically.
- **Warm-up.** Two passes of 256 cycles fill the filters. The mask generator then sees the block as a periodic signal.
- **Realignment.** The mask bit goes through a further 201-stage delay line (256 - 55). It therefore leaves the line together with the same pixel one pass later.
- **Search.** The search starts after the warm-up and runs 16 more passes. Throughout, the current block must keep repeating on `cur_pix`.

### 2.3 Broadcast PE array (`mv_detector`, `emmad_pe`)

There are 16 processing elements (PEs), and PE v evaluates the horizontal displacement v. Each of the 16 passes handles one vertical displacement u.
- **Current block.** The pixel and its mask bit run down a register chain, so PE v sees pixel a(i,j) at pass cycle 16i + j + v.
- **Reference buses.** Two buses are broadcast to all PEs:
  - `ref_p` carries b(u+i, c) at pass cycle 16i + c, for c = 0..15;
  - `ref_pp` carries b(u+i, 16+c) one line (16 cycles) later.
- **Selection.** PE v takes `ref_p` when the column of the current cycle is at least v, and `ref_pp` otherwise. This gives it b(u+i, j+v). Consecutive passes overlap by 16 cycles on `ref_pp`.
- **PE datapath.** Each PE (`emmad_pe`) forms |a-b|, shifts it left by n when the mask bit is set (a barrel shifter), and accumulates.
- **Comparison.** Start and stop strobes ripple down the chain with the pixels. When PE 15 has finished a pass, all 16 sums are copied into a shift chain and fed into one comparator. The comparator keeps the minimum; on a tie it keeps the smaller u, then the smaller v.

Timing: `mv_valid` pulses 4640 cycles after `start` of `edge_masked_me`, which is 4128 cycles after the search itself starts. `ref_req` is high for the 4112 cycles in which the reference buses must carry the search area.

The search range is 16 x 16 positions, which is the range this style of array is built for (+-7/+8 about the block). A +-15 search needs four such searches over the four quarters of the range.

## 3. Multi-bus frame memory (`mp_switch_system`, `crossbar`, `onehot_mux`)

- **Memory modules.** The memory has K = MEM_WORDS / BLK_WORDS modules, 1024 with the defaults.
- **Processor port.** Processor p presents a module index, a word address within the module, and an enable.
- **Address network.** This is K columns of P-to-1 multiplexers. It routes the word address to the module.
- **Read.** The module reads synchronously.
- **Data network.** This is P columns of K-to-1 multiplexers. One cycle later, it returns the word to the processor.
- **Multiplexer cells.** Every multiplexer is an AND-OR cell with one-hot selects, and the OR side is a binary tree (`onehot_mux`). This is the cheapest and fastest form of a crossbar cell.
- **Conflicts.** Two processors must never address the same module in one cycle; keeping them apart is the job of the task scheduler. The block raises `conflict` when it happens, and an assertion checks that it does not happen while reset is released.
- **Host port.** A host port writes the memory one word per cycle.

## 4. What is not here

- **The processors of the multiprocessor system, and their scheduler.** Only the tasks they run and a table of task times are known, so no architecture can be derived. Their ports are brought out of `mpc_top` as `mp_proc_*`.
- **The PCI bus controller used to attach the DCT board to a PC.** It is a bought-in part.
- **A pattern-based pixel-decimation motion search.** It is an algorithm studied in software only.

## 5. Departures and choices to be aware of

- **DCT schedule.** The exact cycle offsets of the frame, the sign-hold register and the tap masking are this design's. They keep one transform per 32 cycles on a shared bus with zero-latency serial adders. Reset is asynchronous and active low.
- **Coefficient f.** The signed-digit form was chosen from the two forms in the source by checking its value against the cosine.
- **Motion estimator.** The following are all this design's choices:
  - the cyclic streaming with its 512-cycle warm-up;
  - the wrap-around of the filter windows at block edges;
  - the threshold on the 5x5-sum scale;
  - the 20-bit accumulators, which are exact for n <= 4;
  - the tie rule and the S-chain comparator.

  n is a 3-bit port; sums with n > 4 on many edge pixels can overflow 20 bits.
- **Memory system.** The synchronous one-cycle read, the host port and the conflict flag are this design's.
- **Synthesis.** Synthesis of the full 64K-word memory as flip-flops is slow in open-source tools; it is meant to map to RAM.

## 6. Files

| file | role |
|---|---|
| `rtl/dct_pkg.sv`, `rtl/me_pkg.sv` | shared constants |
| `rtl/serial_addsub.sv`, `rtl/kernel_row.sv` | serial adder; four-term serial sum |
| `rtl/even_kernel_mult.sv`, `rtl/odd_kernel_mult.sv` | signed-digit serial multipliers |
| `rtl/even_kernel.sv`, `rtl/odd_kernel.sv` | 4x4 kernel matrix products |
| `rtl/ps_converter.sv`, `rtl/dct_preproc.sv`, `rtl/sp_converter.sv` | P/S registers, butterflies with sign hold, S/P registers |
| `rtl/dct_controller.sv`, `rtl/dct_processor.sv` | frame controller; complete DCT processor with bus interface |
| `rtl/smooth_filter.sv`, `rtl/sobel_edge_detector.sv` | edge-mask generation |
| `rtl/emmad_pe.sv`, `rtl/mv_detector.sv`, `rtl/edge_masked_me.sv` | PE, PE array with comparator, complete estimator |
| `rtl/onehot_mux.sv`, `rtl/crossbar.sv`, `rtl/mp_switch_system.sv` | crossbar cell, crossbar, memory with both networks |
| `rtl/mpc_top.sv` | the three engines side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dct2d_workload.sv`, `tb/tb_me_p15_workload.sv` | workload runs: batched 2-D DCT, +-15 motion search |

## 7. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dct_pkg.sv rtl/me_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/tb_mpc_top.sv --top-module tb_mpc_top -Mdir obj
./obj/Vtb_mpc_top
```

Replace `tb_mpc_top` by any other testbench name.

`tb_mpc_top` runs all three engines at the default sizes, including the full 64K-word memory, and runs in a few seconds:
- 12 DCTs with an idle frame, checked against the real DCT, with their latency;
- two motion searches with edge pixels and beta = 4 and 1, checked against a software model;
- host writes and 500 cycles of four-way parallel reads from distinct modules;
- a forced module conflict.

It counts each of these mechanisms and fails if one never occurs.

Two testbenches run the main evaluated workloads:
- `tb_dct2d_workload` runs 2-D DCTs of twenty 8x8 blocks of 8-bit pixels. It sends the rows, transposes the results in the testbench and sends the columns. The results stay within 3 of the real 2-D DCT. Each block takes 576 cycles, because each pass waits for its results.
- `tb_me_p15_workload` runs a +-15 search with T = 40 and beta = 4. It is done as four 16 x 16-position searches over overlapping quarters of a 46 x 46 area, which takes 18560 cycles per block.

Other testbenches worth knowing:
- `tb_dct_processor` checks bit-exactness against an integer model, and also latency, rate and bus-direction rules.
- `tb_edge_masked_me` and `tb_mv_detector` check the motion vector, the minimum and the result time against exhaustive reference models.
