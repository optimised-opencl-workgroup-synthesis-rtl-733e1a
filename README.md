# Workgroup-synthesised OpenCL convolution device for an ARM + FPGA SoC

An OpenCL kernel describes a huge number of small, independent work-items.
On a GPU each one gets a thread. On the small FPGA of an ARM + FPGA
system-on-chip (a Xilinx Zynq-7000 class part with about 560 KB of block RAM)
that does not work: the data of a whole kernel launch does not fit on chip,
and building a processing element for every work-item would be far too large.
This design groups work-items into *workgroups* sized so their input and
output data just fit in block RAM. Each workgroup is moved on and off chip
with long AXI bursts. Inside a compute unit the merged work-items become a
loop nest. Neighbouring work-items run side by side on parallel processing
elements, fed by a local memory partitioned so that each element has its own
read port.

The RTL implements this structure for the image-convolution kernel

```
out[j][i] = sum over l = 0..m-1, k = 0..m-1 of  mask[l][k] * in[j + k - m/2][i + l - m/2]
```

in IEEE-754 single precision. The defaults are a 7 x 7 mask, five compute
units, two processing elements per unit, and one workgroup of 1 x 1920 output
pixels (one row of an HD frame) per unit at a time.

## Structure

```
compute_device                 N_CU = 5 units, one AXI4 master each
 └─ compute_unit (x N_CU)      load -> compute -> store, per workgroup
     ├─ burst_reader           DDR -> input local memory (AXI4 read bursts)
     ├─ local_bram  (input)    LANES banks, cyclic by column
     ├─ conv_engine            loop nest; mask register file; bank rotation
     │   └─ conv_pe (x LANES)  one work-item lane: fp_mul + fp_add accumulator
     ├─ local_bram  (output)   LANES banks
     └─ burst_writer           output local memory -> DDR (AXI4 write bursts)
ocl_pkg                        AXI channel structs, cu_args_t, binary32 type
```

In the reference system the five AXI masters go to the four high-performance
ports (HP0 to HP3) and to the accelerator coherency port (ACP) of the
processor system. Unit 4 is the ACP unit. Each unit owns its port, so the
device needs no arbiter. The ARM processors, the DDR controller and the
software drivers are outside this RTL. The testbenches model them.

## A kernel launch

The host drives a launch like this:

1. **write data**: it places the input image in DDR with a zero border of
   (m-1)/2 pixels on every side. The padded image is `PW = n + m - 1` pixels
   wide.
2. **activate**: it writes the m x m coefficients through
   `mask_we/mask_addr/mask_data` (index `l*m + k`). This one port reaches
   every unit. It then gives each unit its `args` (a `cu_args_t`) and pulses
   `start[u]`.
3. **wait**: it waits until `done[u]` has pulsed for every unit.
4. **read data**: it reads the output image.

The host splits the work among the units and writes each unit's list into
`args`. A unit runs its `n_groups` workgroups in sequence. After each one it
advances its input and output addresses by `in_group_step` and
`out_group_step`. For an `n`-wide image cut into full-width workgroups of
`gh` rows, the arguments of a unit that starts at output row `r0` are:

| field | value | meaning |
|---|---|---|
| `mem` | buffer base | added to both offsets |
| `a_offset` | `img + 4*r0*PW` | first input row, padded image |
| `in_dn`, `in_ls`, `in_stride` | `gh+m-1`, `4*(gw+m-1)`, `4*PW` | input rows, bytes per row, bytes between rows |
| `b_offset` | `out + 4*r0*n` | first output row |
| `out_dn`, `out_ls`, `out_stride` | `gh`, `4*gw`, `4*n` | output rows, bytes per row, bytes between rows |
| `gw`, `gh` | workgroup width and height | `gw <= GW_MAX`, `gh <= GH_MAX` |
| `n_groups` | workgroups for this unit | |
| `in_group_step`, `out_group_step` | `4*gh*PW`, `4*gh*n` | address step per workgroup |

A workgroup narrower than the image (`gw < n`) works the same way. Its rows
are `in_ls` bytes out of every `in_stride`. The unit does not check the
arguments: a workgroup larger than the local memories overwrites other
words.

## Choosing the workgroup size

A unit's local memories must hold one workgroup's input window and its
output. With `U` units, 4-byte floats, a block-RAM budget `B` and an
efficiency factor `a` (0.7 was found for the vendor tools), the condition is

```
U * 4 * [ (gh + m)(gw + m) + gh*gw ] < a * B
```

Among the sizes that meet it, the widest `gw` is chosen, because wide rows
make long bursts and few transfer set-ups. For the HD frame with a 7 x 7 mask,
five units and 560 KB this gives `gw = 1920`, `gh = 1`. Those are the defaults
(`GW_MAX`, `GH_MAX`). The input memory is sized by the same formula: `GH_MAX + M
= 8` rows of `GW_MAX + M = 1927` words, rounded up to 1928 so each row is a
whole number of lane groups. A unit holds 555,008 bits of local memory, so five
units hold 2,775,040 bits (346,880 bytes), against a budget of 401,408 bytes.

## Inside the compute engine: lanes, banks and the rotation

This is the part that needs the most care.

**Loop nest.** For one workgroup, `conv_engine` loops over output rows `lj`,
over output columns `li` in steps of `LANES`, over `l` (mask column, outer)
and `k` (mask row, inner). It issues one `(l, k)` step per clock. The
`LANES` work-items `li .. li+LANES-1` advance together, one per processing
element. After `m*m` steps every lane holds a finished sum.

**Why the memory is banked.** At step `(l, k)` lane `q` needs input word
`(row lj+k, column li+q+l)`. All lanes read in the same clock, so they need
`LANES` read ports. The input memory is split into `LANES` banks by column:
column `c` lives in bank `c mod LANES` at index `(row*PITCH + c) / LANES`.
The pitch is a multiple of `LANES`, so all words of a bank share the same
column residue. The lanes read `LANES` consecutive columns, so they always
fall in `LANES` different banks: no two lanes ever compete for a port.

**The rotation.** Which bank serves which lane changes with `l`. Lane `q`
reads column `li + q + l`, and `li` is a multiple of `LANES`, so it needs
bank `(q + l) mod LANES`. Turned around, bank `b` serves lane
`(b - l) mod LANES` and is given that lane's address. After the one-clock
RAM latency, a crossbar rotates the bank outputs by `l mod LANES` back into
lane order. With `LANES = 2` the rotation is a swap on odd `l`.

**Output.** Lane `q` always writes output column `li + q`, which is in
output bank `q`. All lanes of a group finish in the same clock and write in
parallel. When `gw` is not a multiple of `LANES`, the lanes past `gw` compute
on whatever lies in the window, but their results are not written.

**Timing.** A workgroup takes `gh * ceil(gw/LANES) * m*m + 3` clocks from the
engine's start to its `done`. That is 47,043 clocks for the default 1 x 1920
group. The extra clocks are the start, the RAM read, the accumulation and the
write.

## Processing element and number format

`conv_pe` multiplies a coefficient by a pixel (`fp_mul`) and adds the product
to its running sum (`fp_add`). Both steps are combinational and finish in one
clock, so the loop-carried sum needs no interleaving. The sum starts from +0.
Every product and every sum is rounded to nearest, ties to even. The result is
therefore bit-identical to a sequential single-precision run of the kernel
in the same `l`-outer, `k`-inner order, and the testbenches check this exactly.

The format conventions follow common FPGA floating-point cores:

* Subnormal inputs count as zero.
* Results below the normal range become a signed zero.
* Overflow gives infinity.
* Any NaN, `inf*0` and `inf-inf` give the quiet NaN `0x7FC00000`.
* An exact zero from opposite signs is +0.

The multiply-add path is long. At 100 MHz on a 7-series part it will probably
need pipelining. That would require interleaving work-items in the
accumulator, which this version does not do.

## Memory transfers

`burst_reader` and `burst_writer` copy `rows` rows of `row_bytes` bytes,
`stride` bytes apart in DDR. Each row is split into INCR bursts of 32-bit
beats. A burst is as long as possible, but at most 256 beats, never past the
end of the row, and never across a 4 KB boundary. One word moves per clock,
which is 400 MB/s per port at 100 MHz. Each master keeps one burst in flight:
the reader issues the next address after the last beat of the current burst,
and the writer issues it after the write response. The writer sends a beat on
every clock the slave is ready, using a two-entry prefetch buffer in front of
the one-clock-latency local RAM. Response codes are not checked. Addresses and
byte counts must be multiples of 4.

## Performance

In simulation the memory model withholds a ready or a valid about one clock
in four. Under that load, a 1 x 1920 workgroup takes about 67,800 clocks in a
unit. Of these, 47,043 clocks compute. The rest move the 13,482 input words
and the 1,920 output words: one word per clock, slowed by the stalls, plus a
few clocks between bursts.

A full 1920 x 1080 frame on five units (216 workgroups each) took
14.64 million clocks, which is 146 ms at 100 MHz. The published
implementation, produced with an HLS tool, reports 96.71 ms for this frame.
It also reports 26,078 clocks for one unit's compute loop with two-way
unrolling, against 47,043 here. The gap is in the compute loop. 1920 x 49
multiply-adds in 26,078 clocks is about 3.6 per clock, which needs both
ports of the two dual-port memory partitions, or four reads per clock. With
`LANES = 4` (four single-read banks, the same read bandwidth) a group
computes in 23,523 clocks. The whole frame then takes 9.56 million clocks, or
95.6 ms, with every pixel still checked. The default stays at the stated
two-way unrolling. Overlapping the transfer of the next workgroup with the
computation of the current one (double-buffered local memories) would
save a further third. It is not built.

## What is not here

* **Other kernels.** The source evaluates matrix multiplication (2048 x 2048),
  n-body (2048 particles) and Black-Scholes (400,000 options) with the same
  framework. It does not give their kernels, so only the convolution
  datapath exists. The transfer and sequencing logic (`burst_reader`,
  `burst_writer`, `local_bram`, the sequencer in `compute_unit`) does not
  depend on the kernel.
* **Control interface.** A unit's arguments are plain ports sampled at
  `start`. A real system would wrap them in an AXI4-Lite register block
  written by the driver.
* **Streaming.** As described above, there is no overlap of transfer and
  computation.
* **The processor system, DDR and drivers.** These are stood in for by
  `tb/axi_mem_model.sv` and the host sequence in `tb/device_harness.sv`.

## Simulating

Everything is SystemVerilog-2017 and runs with Verilator 5 (two-state,
`--timing`). `rtl/ocl_pkg.sv` must come first. Then let Verilator find the
other modules by name:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_compute_device \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ocl_pkg.sv tb/tb_f32_pkg.sv \
    tb/tb_compute_device.sv -o sim && ./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=F`.

| testbench | what it runs |
|---|---|
| `tb_fp_mul`, `tb_fp_add` | 20,000+ random operand pairs and special cases against a double-precision reference rounded to binary32 (`tb_f32_pkg`) |
| `tb_conv_pe` | 300 work-items of random length, with gaps between terms |
| `tb_conv_engine` | LANES = 4, 5 x 5 mask, two workgroups (11 x 3, then 5 x 2), all pixels, idle lanes, clock count; also exercises `local_bram` |
| `tb_burst_reader`, `tb_burst_writer` | strided regions across 4 KB boundaries with a 16-beat limit; every word; burst legality; one beat per clock |
| `tb_compute_unit` | one unit, LANES = 4, 5 x 5 mask, three 3 x 21 workgroups in a row |
| `tb_compute_device` | five units, 7 x 7 mask, two 2 x 37 workgroups each, 16-beat limit; counts every mechanism |
| `tb_compute_device_full` | all parameters at their defaults: five units, one 1 x 1920 row each (about 5 s) |
| `tb_ic_hd_workload` | the full 1920 x 1080 frame at the defaults, every pixel checked (about 30 s) |
| `tb_ic_x1_workload` | the same frame on a one-unit device (`N_CU = 1`), 1080 workgroups in a row: 73.2 million clocks, 732 ms at 100 MHz (about 50 s) |

`device_harness` is the shared host and memory side of the last five
testbenches. It counts these mechanisms and fails if any of them never
happens:

* a burst cut by the length limit;
* a burst cut at a 4 KB boundary;
* AXI stalls;
* all units busy at once;
* a unit moving on to its next workgroup;
* a workgroup with idle lanes.

It also checks that no memory word outside the output image changes.

To change the design, edit the parameters of `compute_device`: `N_CU`,
`LANES` (tested with 2 and 4; the banks follow), `M`, `GW_MAX`, `GH_MAX`
and `MAX_BURST`. The local memories are sized from them.
