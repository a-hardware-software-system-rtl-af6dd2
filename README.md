# Signal reconstruction kernel for a hybrid adaptive beamformer

A time-domain beamformer aims an array of sensors in one direction. It delays
each sensor's signal by the time the wave takes to reach that sensor, weights
it, and sums:

    y(t) = sum over sensors s of  w[s] * x_s(t + d[s])

In an adaptive beamformer the weights `w[s]` are recomputed from time to time
from recent sensor data and results. Here that work is split in two:

* **Weight adaptation** (a least squares solve) runs as software on a host
  processor. It is irregular and changes from application to application.
* **Signal reconstruction** (the sum above) runs in this FPGA kernel. It is
  regular, has no data dependencies between time steps, and is limited by
  memory bandwidth, so it pipelines well.

The two run concurrently. Now and then the host collects results and sends
back new weights. Every sample, weight and result is a complex IEEE-754
single precision number. Software and hardware therefore use the same number
format, and a pass can run on either.

This repository holds the SystemVerilog of the kernel: its memories and their
organisation, the address generation, the floating point pipeline, and the
control words the host uses to run it.

## Memory organisation

The layout of the memories is what makes the datapath simple, so it comes
first.

The kernel has four external SRAM banks of 2 MB each. Each bank delivers one
32-bit word per cycle, which is half of a complex sample. The banks are paired
so that two whole samples arrive every cycle:

| bank | holds |
|------|-------|
| SRAM0 | real parts of the even numbered sensors (0, 2, 4, ...) |
| SRAM1 | imaginary parts of the even numbered sensors |
| SRAM2 | real parts of the odd numbered sensors (1, 3, 5, ...) |
| SRAM3 | imaginary parts of the odd numbered sensors |

Sensors are handled in pairs. Pair `j` is sensor `2j` (in SRAM0/1) and sensor
`2j+1` (in SRAM2/3). Each bank is cut into equal **partitions**, one per sensor
pair, each `part` words long. Pair `j` owns partition `j`, which starts at word
`j*part`. In a partition, word `k` holds the sensor's sample `k` of the current
buffer. With `N` sensors the natural choice is `part = 2^19 / (N/2)`. For
example, 64 sensors give 16384 samples per sensor per pass, and the sensor
data of a pass is exactly 8 MB.

The delay `d[s]` is a per-sensor **beam offset** in samples. For time step `t`,
the kernel reads sensor `s` at

    SRAM word = j*part + d[s] + t          (j = s / 2, in s's bank pair)

`d[s]` must satisfy `d[s] + steps <= part`. Otherwise the read runs into the
next sensor's partition. Beamforming texts usually write the delay as
`x_s(k - delay_s)`. The stored offset is that delay negated and shifted by a
constant, so that it is never negative, and the kernel only ever adds it.

Four dual ported blockRAMs on the chip hold the beam:

| blockRAM | `bram_sel` | entry `j` holds |
|----------|-----------|-----------------|
| blockRAM0 | 0 | weight of sensor `2j`, 64 bits `{re, im}` |
| blockRAM1 | 1 | weight of sensor `2j+1` |
| blockRAM2 | 2 | beam offset `d[2j]`, 16 bits |
| blockRAM3 | 3 | beam offset `d[2j+1]` |

Each blockRAM has 512 entries, so the kernel takes up to 1024 sensors
(`MAX_SENSORS`). Any sensor count up to that limit works. With an odd count,
software pads one extra partition with zero samples, and the kernel rounds the
count up to whole pairs. The kernel reads the blockRAMs through one port. The
host loads them, and may read them back, through the other port.

Results go to external DRAM as one 64-bit complex word per time step, at
consecutive addresses from a base that the host sets.

The kernel holds one beam at a time. To form several beams from the same
buffer, the host reloads only the weights and offsets and runs another pass.
The 8 MB of samples stays in SRAM.

## The pipeline

```
 sr_ctrl                         SRAM banks        sr_datapath                          result_fifo
 +---------------------------+   +----------+   +-------------------------------------+   +---------+
 | t, j counters, FSM        |   | 0 1 2 3  |   | even: x*w --+                       |   |         |
 | stage 1: read d[2j],d[2j+1]|-->| SRAM_LAT |-->|             +-- reduce -- accumulate|-->| FIFO -->| DRAM
 |   base = j*part + t       |   +----------+   | odd:  x*w --+     (+)       (+=)    |   |         |
 | stage 2: addr = base + d  |   weights from   +-------------------------------------+   +---------+
 | stage 3: drive SRAM addr  |   blockRAM0/1,
 +---------------------------+   read to arrive with the samples
```

**Issue** (`sr_ctrl`). In each cycle of a pass, the controller issues one
sensor pair. The pair counter `j` runs fastest, and the time step `t` moves
on after the last pair. A step therefore takes `ceil(N/2)` cycles. The
partition offset `j*part` is a running sum, so no multiplier is needed. Three
register stages form the two SRAM addresses:

1. read both beam offsets from blockRAM2/3 and add `j*part + t`;
2. add the beam offsets;
3. drive the addresses to the banks.

All four banks get a read strobe at once. Banks 0/1 take the even address and
banks 2/3 the odd address. The weights are read `SRAM_LAT-1` cycles after the
SRAM request, so they come out of blockRAM0/1 on the same edge as the samples
come out of the SRAM. First-of-step and last-of-step tags travel beside the
pair.

**Arithmetic** (`sr_datapath`):

* *Complex multiply.* Each of the two complex multipliers (`cplx_mul`) has
  four single precision multipliers and two adders:
  `re = xr*wr - xi*wi`, `im = xr*wi + xi*wr`. The subtraction inverts a sign
  bit.
* *Reduce.* Two adders add the even product and the odd product.
* *Accumulate.* Two adders sum the reduced values over the pairs of one time
  step. The first pair of a step replaces the accumulator. This adder is
  combinational, so its feedback loop closes in one clock and a new pair can
  enter every cycle. It is the longest combinational path in the design. The
  multipliers and the other adders are pipelined (`MUL_STAGES`,
  `ADD_STAGES`).

The sum for one step is therefore formed in this order:

    ((x0*w0 + x1*w1) + (x2*w2 + x3*w3)) + (x4*w4 + x5*w5) + ...

Each operation is rounded to single precision. A software model has to use the
same order to reproduce the results bit for bit.

**Number format** (`fp_mul`, `fp_add`). The multiplier and the adder are plain
IEEE-754 single precision units:

* They round to nearest, with ties to even.
* Subnormal inputs and outputs are flushed to signed zero, as FPGA
  floating point cores usually do.
* Overflow gives infinity, and invalid operations give a quiet NaN.

Apart from the flush to zero, results equal those of a CPU computing the same
operations in the same order.

**Results** (`result_fifo`). A small FIFO (16 entries) passes step results to
the DRAM's valid/ready write port, and a counter advances the address. The
controller reserves a FIFO slot before it issues the first pair of a step.
When all slots are taken, because the DRAM has stopped accepting writes,
issue **stalls** at the next step boundary (`stall` output). The FIFO
therefore cannot overflow, and the floating point pipeline never has to stop
partway.

### Timing

* The first SRAM read is sampled by the banks on the 4th clock edge after the
  edge that takes `start`.
* A pair enters the datapath `SRAM_LAT` cycles (default 2) after its read.
* A step's result enters the FIFO `MUL_STAGES + 2*ADD_STAGES + 1` = 7 cycles
  after the step's last pair.
* `done` pulses after the last result has been accepted by the DRAM.
* If the DRAM does not stall, a pass of `S` steps with `N` sensors takes
  `S * ceil(N/2)` cycles plus 16 cycles of latency at the default parameters.
  For example, 64 sensors and 16320 steps take 522,256 cycles.

## Running a pass

The host reaches the kernel through two buses. The buses are simple and
synchronous, and they stand in for the board's on-chip network:

* **Control words.** `reg_wr` / `reg_rd` with `reg_addr`, `reg_wdata` and
  `reg_rdata`. Read data is registered and arrives one cycle after the
  request.

  | addr | word | meaning |
  |------|------|---------|
  | 0 | CTRL | write bit 0 = start, bit 1 = soft reset (one-cycle pulses) |
  | 1 | STATUS | bit 0 done (sticky until the next start or soft reset), bit 1 busy |
  | 2 | SENSORS | sensor count, 1..1024 |
  | 3 | STEPS | time steps in this pass |
  | 4 | PARTSIZE | partition length `part` in SRAM words |
  | 5 | RESBASE | DRAM word address of the first result |

* **blockRAMs.** `bram_en`, `bram_we`, `bram_sel`, `bram_addr`, `bram_wdata`
  and `bram_rdata`, with one cycle read latency.

A pass goes like this:

1. Write CTRL = 2 (soft reset). This clears the controller, the pipeline and
   the FIFO, and aborts a running pass. Configuration words and blockRAM
   contents are kept.
2. Load the samples into SRAM. This goes through the board's memory
   controllers, not through this kernel. If only the beam changes, skip this
   step.
3. Load the weights and beam offsets into the blockRAMs.
4. Write SENSORS, STEPS, PARTSIZE and RESBASE.
5. Write CTRL = 1 (start).
6. Wait for `done`, or poll STATUS. Then read the results from DRAM.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MAX_SENSORS` | 1024 | blockRAM capacity; sets the blockRAM depth to `MAX_SENSORS/2` |
| `SRAM_LAT` | 2 | SRAM read latency in cycles; must be at least 1 |
| `MUL_STAGES` | 2 | pipeline registers after each multiplier |
| `ADD_STAGES` | 2 | pipeline registers after each complex multiply or reduce adder |
| `FIFO_DEPTH` | 16 | result slots before issue stalls |

Bank size (2 MB, 19-bit word address), offset width (16 bits) and DRAM result
address width (24 bits) are constants in `sr_pkg`.

## What is taken from the original design, and what is not

These parts follow the original beamformer design:

* the split between software and hardware;
* the four-bank SRAM layout, with real and imaginary parts in separate banks
  and even and odd sensors in separate bank pairs;
* two complex multipliers of four multipliers and two adders each, the reduce
  and accumulate stages, and single precision throughout;
* weights and 16-bit offsets in dual ported blockRAM for up to 1024 sensors;
* the address formula (partition offset + beam offset + step), computed in
  three pipeline stages by a small state machine and counters;
* zero padding for odd sensor counts;
* one beam per pass;
* results stored sequentially in DRAM.

These are choices made for this implementation:

* the register map and both host buses;
* the SRAM and DRAM handshakes and the SRAM latency;
* the pipeline depths of the floating point units and the combinational
  accumulate adder;
* flush to zero;
* the result FIFO and the stall at step boundaries;
* the soft reset mechanism;
* the assignment of pair `j` to partition `j` in both bank pairs.

The original used vendor-generated floating point cores. The units here are
written from scratch, so their latency, and the area and speed of the whole
kernel, will differ.

The weight blockRAMs here hold a full 64-bit complex weight per sensor. That
is twice the 32 bits per sensor that was quoted for the original. A complex
single precision weight needs 64 bits, and a host transfer of 12 bytes per
sensor (8 bytes of weight, 4 of offset) fits that width.

Not included:

* the board vendor's infrastructure: the SRAM and DRAM controllers, the
  DMA endpoint and the on-chip network, whose connections are the top-level
  ports;
* the host software, meaning the weight adaptation and the run-time that
  loads the FPGA and moves data.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and finishes.

| testbench | checks |
|-----------|--------|
| `tb_fp_mul`, `tb_fp_add` | thousands of random and special operands against a double precision reference rounded to single (exact for one multiply or add); latency |
| `tb_cplx_mul` | complex products bit for bit; latency |
| `tb_sr_datapath` | steps of 1 to 8 pairs, with and without gaps; the sum order above; latency 7 |
| `tb_dp_bram` | both ports, reads during writes, hold when disabled |
| `tb_sr_regs` | register read-back, start and soft reset pulses, sticky done |
| `tb_result_fifo` | write order and addresses under random DRAM back-pressure; FIFO full |
| `tb_sr_ctrl` | every SRAM address of several passes, weight and tag alignment, rate of one pair per cycle, stalls, done |
| `tb_sigrec_top` | whole kernel at default size with SRAM and DRAM models |

`tb_sigrec_top` runs four passes:

1. A full-size pass: 64 sensors filling all of SRAM, 16320 steps, with the
   cycle count checked.
2. A second beam over the same samples, with a slow DRAM that forces stalls.
3. A 5-sensor pass with a zero-padded partition.
4. A pass aborted by soft reset, followed by a 2-sensor pass at one step per
   cycle.

It compares every result with a reference model. It runs in a few seconds.

`tb_workloads` runs the array sizes of a typical benchmark set: 4, 8, 16, 32
and 64 sensors. For each size it fills all of SRAM with one buffer and forms
two beams from it. It then loads a second buffer and forms a beam with new
weights. That is 15 full-memory passes, about 8 million cycles and 1.5
million result checks, and it takes about 15 seconds. Every pass takes
`steps * N/2 + 16` cycles. A buffer holds `2^20/N` samples per sensor, so
each pass at these sizes lasts about 524,000 cycles.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sigrec_top \
    -y rtl -y tb +libext+.sv rtl/sr_pkg.sv tb/tb_fp_pkg.sv tb/tb_sigrec_top.sv
./obj_dir/Vtb_sigrec_top
```

`tb/sram_bank_model.sv` is a behavioural model of one SRAM bank with its
controller. It is 32 bits wide and has a fixed read latency. `tb/tb_fp_pkg.sv`
holds the reference arithmetic.

## Files

| file | contents |
|------|----------|
| `rtl/sr_pkg.sv` | types (`f32_t`, `cplx_t`), memory sizes, register map |
| `rtl/sigrec_top.sv` | the kernel: registers, four blockRAMs, controller, datapath, result FIFO |
| `rtl/sr_ctrl.sv` | state machine, counters, three-stage address pipeline, stall logic |
| `rtl/sr_datapath.sv` | complex multiply, reduce, accumulate |
| `rtl/cplx_mul.sv` | complex multiplier |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | single precision multiplier and adder |
| `rtl/sr_pipe.sv` | valid/data delay line used for latencies |
| `rtl/dp_bram.sv` | dual ported blockRAM |
| `rtl/sr_regs.sv` | control and status words |
| `rtl/result_fifo.sv` | result buffer and sequential DRAM writer |
