# Time-to-digital converter with a neural-network decoder

This design measures the interval between a rising edge on `s1` and a later rising edge on `s2` with picosecond resolution on an FPGA. A conventional tapped-delay-line converter has to turn its thermometer codes into a number with hand-made decoding and calibration tables. Those tables must also cope with uneven tap delays, bubbles in the code and clock skew. This design skips that step. The raw sampled state of the delay lines and the coarse counter goes, bit for bit, into a small quantised neural network. The network runs on an on-chip systolic-array accelerator and learns the inverse of the converter's transfer function. Recalibrating means loading new weights. The hardware does not change.

The converter runs in two clock domains that meet only at one FIFO:

```
            clk_tdc (400 MHz)                    |            clk_sys (200 MHz)
 s1 -> delay line 1 -> sampler --+               |
                                 +-> raw vector -+-> CDC FIFO -> pre-processing -> I/O memory
 s2 -> delay line 2 -> sampler --+   (940 bits)  |   1024 x 2048        |            |   ^
         coarse counter ---------+               |                      v            v   |
                                                 |              control unit -> data prep |
                                                 |              (program in        |      |
                                                 |               instr. memory)    v      |
                                                 |   weight memory ---------> 14x14 array |
                                                 |                                 |      |
                                                 |                   vector register file |
                                                 |                                 |      |
                                                 |              bias/requantise/ReLU -----+
                                                 |                                 +--> ts_valid / ts_value
```

Default sizes:

| Part | Size |
|---|---|
| Delay lines | 2 × 464 taps |
| Coarse counter | 12 bits |
| FIFO | 1024 bits × 2048 entries |
| Systolic array | 14 × 14 int8 processing elements |
| Network | 940 inputs → 64 ReLU neurons → 1 linear output, all weights int8 |

## Measuring an interval: T = T1 + T2 − T3

Each input has its own delay line, so neither line is ever multiplexed:

- **T1.** The edge on `s1` runs into delay line 1. The next rising edge of `clk_tdc` freezes the line: all 464 taps are sampled. The number of taps reached measures T1, the time from `s1` to that clock edge.
- **T3.** Delay line 2 does the same for `s2`.
- **T2.** The coarse counter counts the clock periods between the edge that froze line 1 and the edge that froze line 2.

The interval is therefore

    T = T1 + T2 − T3      (T2 = count × 2.5 ns)

The hardware does not form this sum. It emits the raw material as one 940-bit vector, written to the FIFO zero-padded to 1024 bits:

| bits | content |
|---|---|
| `[11:0]` | coarse count (T2 / clock period) |
| `[475:12]` | sampled code of delay line 1 (bit 12 = first tap) |
| `[939:476]` | sampled code of delay line 2 |
| `[1023:940]` | zero |

With ideal taps, T ≈ (ones in line 1) × τ + count × 2.5 ns − (ones in line 2) × τ, where τ ≈ 6.03 ps. The testbenches use exactly this rule as a sanity check on every raw vector. The network learns the real, non-ideal version of the same mapping.

### Front-end details (`tdc_front_end`, `tdl_sampler`, `coarse_counter`)

- **Sampler.** `tdl_sampler` registers all taps on the rising clock edge, then registers them a second time so that metastable taps can settle. The second stage is the code that is used.
- **Event detection.** An event is the first sample in which any of the first `HIT_TAPS` (8) taps is set and none was set the sample before. Looking at several taps instead of tap 0 alone means a bubble at the start of the line cannot hide the edge. A line stays "seen" until its input falls and the line empties.
- **Zero count.** If `s1` and `s2` fall into the same clock period, both lines fire on the same edge and the count is 0.
- **Timeout.** If `s2` does not arrive within 4096 cycles, the counter gives up and raises `meas_timeout`; no vector is written.
- **Stray edges.** An `s2` edge without a preceding `s1` is ignored.
- **Output.** Each line's code is held from its own event. `vec_valid` follows the stop by one cycle.
- **Rate limit.** A measurement needs `s1` and `s2` to be low again before the next one, and the lines to have emptied (about 2.8 ns).

### The delay-line model (`tdl_carry_chain`)

The delay line is timing, not logic, so `tdl_carry_chain` is a behavioural model with real delays. It is not synthesizable.

**Delay of each tap.** Tap *i* changes after the summed delay of elements 0..i:

- 5.5 ps per element;
- plus 4.24 ps at every 8th element, where the chain crosses into the next 8-element carry block;
- plus a fixed pseudo-random offset of up to 6 ps per tap, which stands for the skew of that tap's sampling register.

The mean is 6.03 ps per tap, so 464 taps span about 2.8 ns. This covers one 2.5 ns clock period plus margin.

**Bubbles.** The per-tap offsets make neighbouring taps flip out of order, so sampled codes contain bubbles (a 0 among 1s or vice versa). This is the non-ideality the network absorbs. The two lines use different seeds, so their irregularities differ.

**Limitation.** An edge is modelled as a level travelling the line. Pulses shorter than the line (under about 3 ns) are not represented faithfully.

A real implementation replaces this module with carry primitives under placement constraints that keep each line in one clock region. The ports stay the same: `start` in, `taps` out.

## Crossing into the accelerator: the CDC FIFO

`cdc_fifo` is an asynchronous FIFO:

- Binary and Gray-coded pointers, with two-flop synchronisers on each crossing.
- Registered read data.
- Flags:
  - write side: `full`, `wr_ack` (the previous cycle's write was stored), `overflow` (the previous cycle's write was refused);
  - read side: `empty`, `rd_valid` (one cycle after an accepted `rd_en`).

`full` and `empty` are conservative: `full` can stay up a few cycles after a read, `empty` a few cycles after a write. They are never late.

**Why 2048 entries.** At one measurement per microsecond, 2048 entries buffer about 2 ms of acquisition. The accelerator takes about 108 µs per batch of 14 (see the last section), which works out to about 7.7 µs per measurement. So the FIFO does more than cross clocks: it absorbs bursts and drains in the gaps between them.

A measurement that arrives while the FIFO is full is dropped and counted on `fifo_overflow`.

## Batches and tiles: how a raw vector reaches the array

The array multiplies 14-element slices. Every weight tile loaded into it should serve as many vectors as possible. So the accelerator works on batches of N = 14 measurements.

**Idle: filling a batch.** While idle, the control unit reads one FIFO word at a time, with at most one read in flight. It reads only while the FIFO is not empty and the pre-processing has room. `vector_preproc` then:

1. latches the word;
2. cuts the 940 bits into 68 tiles of 14 bits;
3. writes each bit as an int8 value 0 or 1 into a row of the I/O memory, one tile per cycle.

Tile *t* of the *n*-th vector of the batch lands in I/O row `t·14 + n`. The 14 vectors' copies of the same tile are therefore consecutive rows. After the 14th vector the pre-processing raises `start_exec` and accepts nothing more.

**Running the batch.** The control unit runs the program. Its final HALT pulses `clear`, and the next batch starts filling.

**Measurements during a run.** They wait in the FIFO. Nothing is lost unless the FIFO fills.

## The systolic array (`systolic_array`, `sa_pe`, `systolic_data_prep`)

The array is weight-stationary.

**Loading weights.** Before a multiply, LOADW copies 14 weight-memory rows into the 14 PE rows, one row per cycle. PE(r, c) then holds W[r][c]. That is the weight from input *r* of the current input tile to output *c* of the current output tile.

**Data flow.**

- An I/O row (14 inputs of one vector) enters from the left, input *r* into array row *r*.
- Inputs move one PE to the right per cycle.
- Partial sums move one PE down per cycle. Each PE adds x·w to the sum from above (int8 × int8 into 32 bits).
- Column *c* collects Σ_r x[r]·W[r][c] at its bottom.

**Skew.** Each input row must enter as a diagonal wavefront, so `systolic_data_prep` delays lane *k* by k+1 registers. At the bottom, column *c* gets N−1−c de-skew registers, so all 14 sums of one input row leave together.

**Timing.**

- Throughput: one input row per cycle, and one result row of 14 × 32-bit sums per cycle.
- Latency: a result appears 2N−1 = 27 cycles after its input row is read from the I/O memory.

Results go to the vector register file. It either overwrites a row (first input tile) or adds to it (later tiles), so sums longer than 14 inputs build up there.

## The program

The accelerator has no fixed network. It runs whatever program is stored in the instruction memory. The program is persistent: every batch runs it again from address 0, without reloading. Instructions are 45-bit `instr_t` words (`rtl/tdc_pkg.sv`):

| field | bits | use |
|---|---|---|
| `op` | 3 | NOP 0, LOADW 1, MATMUL 2, ACT 3, HALT 4 |
| `acc` | 1 | MATMUL: add to the VRF rows instead of overwriting |
| `relu` | 1 | ACT: apply ReLU |
| `out` | 1 | ACT: also emit lane 0 of each row as a timestamp |
| `shift` | 5 | ACT: arithmetic right shift used to requantise |
| `bshift` | 5 | ACT: left shift applied to the int8 bias |
| `vrf_addr` | 5 | MATMUL/ACT: first VRF row |
| `io_addr` | 11 | MATMUL: first input row; ACT: first output row |
| `w_addr` | 13 | LOADW: first weight row; ACT: bias row |

What each instruction does:

- **LOADW** loads rows `w_addr..w_addr+13` into the array.
- **MATMUL** streams I/O rows `io_addr..+13` (the 14 vectors' copies of one tile) through the array. It waits for all 14 results before the next fetch.
- **ACT** reads bias row `w_addr`, passes VRF rows `vrf_addr..+13` through the activation unit, and writes the int8 results to I/O rows `io_addr..+13`.
- **HALT** releases the batch.

Each instruction is fetched, decoded and finished before the next one starts. Nothing overlaps.

### Arithmetic of one layer

For each lane, the activation unit computes

    full = acc + (bias <<< bshift)                 32-bit, bias sign-extended
    q    = clamp(relu ? max(full >>> shift, 0)
                      : full >>> shift, -128, 127)

- `q` is the int8 activation that the next layer reads from the I/O memory.
- `full` is the unrounded 32-bit value. For the linear output neuron, with `out` set, lane 0 of `full` is the timestamp on `ts_value`, one per vector, with `ts_index` = 0..13 in FIFO order.

Power-of-two scales keep requantisation to shifts. A trained int8 network must be exported with its scales rounded to powers of two. The unit of `ts_value` is set by the network's training, not by the hardware.

### The 940 → 64 → 1 network as a program

With T = 68 input tiles and H = 5 hidden tiles (64 neurons padded to 70, padding weights zero):

```
for o in 0..4:                      # hidden output tile
    for t in 0..67:                 # input tile
        LOADW  w_addr=(o·68+t)·14
        MATMUL io_addr=t·14  vrf_addr=0  acc=(t≠0)
    ACT  w_addr=B1+o  io_addr=68·14+o·14  relu=1 shift=4 bshift=2
for h in 0..4:
    LOADW  w_addr=W2+h·14
    MATMUL io_addr=68·14+h·14  vrf_addr=0  acc=(h≠0)
ACT  w_addr=B2  io_addr=73·14  out=1 bshift=4
HALT
```

That is 697 instructions.

Weight-memory layout:

- rows 0..4759: the layer-1 tiles, 340 tiles of 14 rows. In the tile for output tile *o* and input tile *t*, row *r* holds the weights from input t·14+r to hidden neurons o·14..o·14+13.
- W2 = 4760: five layer-2 tiles. Lane 0 carries the output weight and the other lanes are zero.
- B1 = 4830: five hidden bias rows.
- B2 = 4835: the output bias.

In total, 4,836 of the 8,192 rows are used.

`tb/tb_mlp_pkg.sv` generates this program and weight image from a formula. It also holds an integer model of the same network. A deeper fully connected network is only a longer program of the same form, within the memory limits below. Each further layer reads its inputs from the I/O rows the previous ACT wrote. `tb/tb_tpu_deep.sv` generates and runs such a program for three layers.

## Top-level ports (`tdc_ml_top`)

| port | dir | domain | meaning |
|---|---|---|---|
| `clk_tdc`, `rst_tdc_n` | in | — | 400 MHz measurement clock, async active-low reset |
| `clk_sys`, `rst_sys_n` | in | — | 200 MHz accelerator clock, async active-low reset |
| `s1`, `s2` | in | async | the two timing inputs (rising edges) |
| `wm_we`, `wm_waddr[12:0]`, `wm_wdata[13:0][7:0]` | in | sys | write one weight-memory row |
| `im_we`, `im_waddr[9:0]`, `im_wdata` (`instr_t`) | in | sys | write one instruction |
| `ts_valid`, `ts_value[31:0]`, `ts_index[3:0]` | out | sys | one timestamp per measurement |
| `busy` | out | sys | a batch is being computed |
| `fifo_wr_ack`, `fifo_overflow`, `fifo_full` | out | tdc | FIFO write status |
| `meas_timeout` | out | tdc | `s1` without `s2` within 4096 cycles |

Load the weights and the program before the first batch completes. Writing them while `busy` is high corrupts the running batch.

## Sizes and what fits

| parameter | default | where set |
|---|---|---|
| taps per line | 464 | `N_TAPS` (`tdc_pkg`, top) |
| counter width | 12 | `CNT_W` |
| FIFO | 1024 × 2048 | `FIFO_W`, `FIFO_DEPTH` |
| array | 14 × 14 | `SA_N` |
| I/O memory | 2048 rows × 14 int8 | `IO_AW` |
| weight memory | 8192 rows × 14 int8 | `WM_AW` |
| instruction memory | 1024 × 45 bits | `IM_AW` |
| vector register file | 32 rows × 14 × 32 bits | `VRF_AW` |

Workloads against these memories:

- **940–64–1 network: fits.**
  - Weights: 60,289, stored in 4,836 weight rows.
  - Program: 697 instructions.
  - I/O memory: 1,036 rows per batch.
- **Deeper 940–128–128–64–64–64–1 network (153,601 weights): does not fit.**
  - Its first layer alone needs 9,520 weight rows and 1,360 instructions.
  - Widening `WM_AW` to 14 and `IM_AW` to 11 would hold it, with no other change.
- **Convolutional networks: cannot run.** The pre-processing only slices the raw vector into tiles; it cannot build overlapping windows. The instruction set has no pooling.

## Where this design departs from the published architecture

The architecture follows a published design: a dual-delay-line TDC whose raw vectors go through a CDC FIFO into a tinyTPU-style accelerator with a persistent instruction memory. The following are this design's own choices or differences:

- **Accelerator internals and instruction set.**
  - The original accelerator's RTL and instruction set are not reproduced. Every accelerator block here is written from its function.
  - The instruction set above is this design's own.
- **FIFO.**
  - The FIFO is a generic asynchronous FIFO, not a vendor IP core. It has the same widths and flag names.
  - In the original, the FIFO's `wr_ack` wakes the control unit and advances the batch counter. Here the control unit watches the FIFO's read-side `empty` flag, and the batch counter counts vectors actually stored. Both are safe in the accelerator's clock domain. `wr_ack` is still brought out as a status output.
- **Numeric details.** Bias scaling, requantisation by shifts, saturation, and using the full 32-bit output neuron as the timestamp are all this design's own. The published network is int8 throughout, with scales not specified.
- **Latency: about 3.6× slower than the published figure.**
  - A batch of 14 takes 21,512 cycles = 107.6 µs at 200 MHz. The published figure is about 30 µs.
  - The cause: each LOADW (14 cycles) and each MATMUL (14 issue cycles plus 27 cycles of array latency) finishes before the next instruction is fetched.
  - Overlapping the weight load of the next tile with the current multiply, through a second weight register in each PE, would close most of the gap. That is not done here.
- **Front-end choices.** Event detection over 8 taps, the second sampling stage, the zero-count and timeout behaviour, and the bit order of the raw vector are this design's choices.
- **Delay line.** The delay line is a model. Its tap delays are chosen to average the published 6.03 ps resolution. They are not measured data.

## Verification

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=… failures=…`. Reference values are computed independently in each testbench. The main ones:

- **Delay line (`tb_tdl_carry_chain`).** Checks that an edge reaches about t/6.03 ps taps after time t, covers the line in under 3 ns, produces bubbles, and clears after a falling edge.
- **Front end (`tb_tdc_front_end`).** Uses full-size lines. Applies known intervals at random clock phases and checks the decoded T = T1 + T2 − T3 to ±40 ps. Also checks T1 and T3 against the known clock phase, and covers zero count and timeout.
- **Array (`tb_systolic_array`).** Checks random int8 products against a direct matrix multiply, and the 27-cycle latency.
- **Accelerator (`tb_tpu_accelerator`).** Runs a reduced 56–20–1 network on several batches and checks every timestamp against the integer model.
- **Deeper network (`tb_tpu_deep`).** Runs a 56–28–20–1 network with two ReLU hidden layers, each layer reading the previous layer's rows back from the I/O memory. Checks every timestamp against an integer model, and that the outputs vary with the input.
- **End to end, reduced (`tb_tdc_ml_top`).** Uses a 16-entry FIFO. Drives the whole converter and counts each mechanism, failing if any never happens:
  - vectors written;
  - FIFO overflow;
  - measurement timeout;
  - zero-count measurements;
  - bubbled codes;
  - batches run;
  - measurements buffered while a batch runs.
- **End to end, full size (`tb_tdc_ml_full`).** Every parameter at its default, the full 940–64–1 network, two batches. It:
  - checks each raw vector against the applied interval, and each timestamp against the model;
  - checks that both batches take the same number of cycles;
  - prints the cycles per batch.

The network weights in the testbenches are a fixed hash, not a trained model. The tests therefore prove that the hardware computes the stored network exactly. They say nothing about calibration accuracy, which depends on training with measured data.

### Running a testbench

All files set `timescale 1ps/1fs`. The package must come first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tdc_ml_full \
    rtl/tdc_pkg.sv $(ls rtl/*.sv | grep -v tdc_pkg) tb/tb_mlp_pkg.sv tb/tb_tdc_ml_full.sv
./obj_dir/Vtb_tdc_ml_full
```

Use the same pattern for any other testbench, substituting its name. The full-size run takes well under a minute.

**Delay warnings.** Verilator warns about the variable delays in the stimulus and the delay-line model. These are intentional, which is why the command passes `-Wno-fatal`.

**Simulation needs.** Testbenches start with `rst_n` high and pull it low at 1 ps, because asynchronous resets need an edge in a two-state simulator.

**Synthesis.** Everything except `tdl_carry_chain` is synthesizable.
