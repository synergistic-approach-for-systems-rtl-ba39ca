# Near-memory Adam optimizer for an AXDIMM

Large language models outgrow GPU memory. A common remedy keeps the model
parameters and the optimizer state (Adam's first and second moments `m` and
`v`) outside the GPU and updates them there once per training step. The
update needs little arithmetic but moves a lot of data: per FP32 parameter,
four loads (`theta`, `grad`, `m`, `v`) and three stores (`theta`, `m`, `v`),
28 bytes in all. On a CPU that update is bound by memory bandwidth.

This RTL moves the update into the memory module itself. An AXDIMM is a DDR4
DIMM with an FPGA between the host's DDR4 pins and its DRAM chips. To the
host it looks like an ordinary 32 GB dual-rank DIMM. Inside, the DRAM forms
two independent 16 GB channels, each driven by the FPGA at 200 MHz with a
512-bit data path. The FPGA design holds, per channel:

* a **channel arbiter** that gives the DRAM either to the host or to the
  kernel, never to both at once;
* an **Adam kernel** that streams the four input tensors in from DRAM, runs
  them through 16 FP32 Adam units (one per 32-bit lane of the 512-bit word),
  and streams the three results back.

Both channels are independent. The host can keep using one channel as plain
memory while the kernel of the other channel runs. With one 64-byte beat per
cycle per channel and 7 beats of traffic per 16 parameters, the bound is
2 × 200 MHz × 16/7 = 914.3 M parameters per second. In simulation the kernel
reaches about 98 % of that bound.

```
              host DDR4 (via PHY, 512 bit @ 200 MHz, rank -> channel)
                 |                                   |
        +--------v---------+                +--------v---------+
        | channel_arbiter 0|<-- regs/AXI -->| adam_kernel 0    |
        +--------+---------+                +------------------+
                 | AXI4 512 bit                (same again for channel 1)
                 v
        memory controller / DRAM channel 0 (outside this design)
```

## Files

| File | Contents |
|------|----------|
| `rtl/axdimm_pkg.sv` | widths, AXI4 request/response structs, modes, register maps |
| `rtl/fp32_pkg.sv` | FP32 multiply, add, subtract, divide and square root (round to nearest even) |
| `rtl/adam_fu.sv` | one pipelined Adam functional unit, 128-cycle latency |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO used for the kernel's 7 queues |
| `rtl/adam_kernel.sv` | Adam kernel: registers, bias-correction sequencer, loader, 16 FUs, writer |
| `rtl/channel_arbiter.sv` | two-mode arbiter with a fixed host read latency |
| `rtl/axdimm_fpga_top.sv` | top level: `N_CH` = 2 channels, each an arbiter and a kernel |
| `tb/adam_ref_pkg.sv` | reference Adam step in double precision, rounded to FP32; random operands |
| `tb/axi_mem_model.sv` | behavioural AXI4 DRAM model with latency and protocol checks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Why two exclusive modes

A DDR4 host sets its read latency once at boot. It also assumes it knows
which DRAM rows are open. If the host and the kernel shared DRAM first come,
first served, a kernel access could close a row the host expects open. The
host's next read would then need a precharge and activate on top of the
normal latency. The host's fixed latency would have to cover this worst case
on every read, which would cut host bandwidth badly.

So `channel_arbiter` never mixes the two:

* **NORMAL**: the host owns the channel. Each 64-byte host access becomes a
  single-beat AXI4 read or write to DRAM. The kernel's AXI port gets no
  handshakes at all, so a kernel request just waits.
* **ACCELERATION**: the kernel's AXI port is wired straight to DRAM. Every
  host access becomes a kernel register access instead. The register index is
  address bits `[11:6]`, and the value is the low 64 bits of the line.

The last 4 KB of each channel (address bits 33:12 all ones) always reach the
arbiter's own registers, whatever the mode. This is how the host polls and
flips the mode:

| Index | Name | Access |
|------:|------|--------|
| 0 | `MODE` | write bit 0 = requested mode (0 normal, 1 acceleration); read `{pending, current}` |
| 1 | `STATUS` | read: `[63:32]` dropped host requests, `[31:0]` late host reads |

A mode change does not cut off traffic in flight. Leaving NORMAL waits until
every queued and outstanding host access has finished. Leaving ACCELERATION
waits until the kernel has nothing outstanding and offers no new request, so
DRAM never sees a request withdrawn. The host reads `MODE` until `current`
equals what it asked for.

### Fixed-latency host reads

This is the subtlest part of the arbiter. The host cannot be stalled. It
expects read data exactly `RD_LAT` (32) fabric cycles after the request,
whether the read hit a register or DRAM.

* Register reads are captured at once and ride a `RD_LAT`-stage delay line.
* DRAM reads go through a request queue (`REQ_DEPTH` = 16) and an AXI read.
  Their data waits in a return queue (`RDQ_DEPTH` = 32) until their slot in
  the delay line comes up.

If DRAM data has not arrived by its slot, it is a **late read**. The host
gets zeros and the `STATUS` counter counts it. When that data finally
arrives it is thrown away (the `skip_cnt` logic), so every later read still
lines up with its own data. A host access that finds the request queue full
is dropped and counted too.

`RD_LAT` must cover the memory controller's worst read latency plus queueing.
The host rate also matters. At DDR4-800 the host delivers at most one
64-byte line every two fabric cycles, and the testbenches drive it that way.

All channels use the same `RD_LAT`, and the PHY delivers at most one host
request per cycle. So the top level can merge the channels' read returns with
an OR. An assertion (`a_one_return`) checks that at most one channel returns
data in any cycle.

## The Adam kernel

### Register map (per channel; reached in ACCELERATION mode)

| Index | Name | Meaning |
|------:|------|---------|
| 0 | `CTRL` | write bit 0 = 1 to start (ignored while busy) |
| 1 | `STATUS` | bit 0 busy, bit 1 done |
| 2–5 | `THETA_IN`, `GRAD_IN`, `M_IN`, `V_IN` | 64-byte-aligned byte addresses of the inputs |
| 6–8 | `THETA_OUT`, `M_OUT`, `V_OUT` | byte addresses of the outputs (may equal the inputs: in place) |
| 9 | `NPARAMS` | number of FP32 parameters (32 bits) |
| 10–14 | `LR`, `BETA1`, `BETA2`, `LAMBDA`, `EPS` | FP32 hyper-parameters (low 32 bits) |
| 15 | `STEP` | step number t (32 bits) |
| 16 | `CYCLES` | read-only: cycles taken by the last run |

Programming sequence: switch the channel to ACCELERATION, write the
registers, write `CTRL` = 1, poll `STATUS` until `done`, then switch back to
NORMAL. Register writes are ignored while the kernel is busy, so a running job
cannot be disturbed. Unused register indices read as zero.

### Dataflow and double buffering

A run streams the tensors in **blocks** of `BLOCK_BEATS` beats. The default
is 256 beats = 16 KB, which spans two DRAM rows across all chips.

1. **Bias correction.** On start, a small sequencer computes `1-β1` and `1-β2`.
   It then computes `1-β1^t` and `1-β2^t` by square-and-multiply, one bit of
   `t` per cycle, so at most 34 cycles for a 32-bit `t`. The results stay
   fixed for the run. `CYCLES` counts from the start write, so it includes
   this setup.
2. **Loader.** It requests `theta`, `grad`, `m`, `v` of block 0, then of
   block 1, and so on, round-robin. Each tensor has its own input FIFO. A
   block is requested only after room for the whole block is reserved in its
   FIFO. Bursts are at most 64 beats and never cross a 4 KB boundary. The AXI
   read ID is the tensor number, so returning data is steered by `RID`.
3. **Compute.** Whenever all four input FIFOs hold a beat, one beat of each is
   popped and fed to the 16 functional units. The output FIFOs must also have
   room not yet claimed by results in flight. Results come out 128 cycles
   later and go into the `theta`, `m` and `v` output FIFOs.
4. **Writer.** Once an output FIFO holds a whole block (or the tail of the
   last one), it is written back, `theta`, `m`, `v` in turn. In the last beat,
   the byte strobes cover only the lanes that hold real parameters
   (`NPARAMS mod 16`), so memory past the end of a tensor is not touched.
5. The run ends when every write response has arrived.

Each FIFO holds **two blocks** (`FIFO_DEPTH` = 512 beats × 512 bits). So
block *n+1* is loading while block *n* is in the units and block *n−1* is
being written back. The memory port stays busy, and the 128-cycle unit
latency is hidden. Over a run the port carries 4 reads and 3 writes per beat
of parameters. The run time therefore approaches 7 × (number of beats) cycles
plus a short fill and drain.

### Functional unit and arithmetic

Each `adam_fu` computes one step of Adam with L2 weight decay:

```
g      = grad + λ·θ
m'     = β1·m + (1-β1)·g
v'     = β2·v + (1-β2)·g²
m̂      = m' / (1-β1^t)
v̂      = v' / (1-β2^t)
θ'     = θ - lr · m̂ / (sqrt(v̂) + ε)
```

The unit is fully pipelined: one operand set in per cycle, and the result
out exactly 128 cycles later. Eleven pipeline stages do the arithmetic, one
operation, or a group of independent ones, per stage. A delay line pads the
rest of the 128 cycles.

The arithmetic in `fp32_pkg` is IEEE binary32 with round-to-nearest-even.
Subnormal inputs are read as zero, and subnormal results are flushed to zero.
Overflow gives infinity. Any invalid operation returns the quiet NaN
`0x7FC00000`. The testbench reference computes each operation in double
precision and rounds it to FP32 in the same way. The unit's results are
checked bit for bit.

## Departures from the described hardware

* **Timing closure.** Each arithmetic stage of `adam_fu` holds a whole
  combinational multiplier, divider or square root. The function and the
  128-cycle latency are right, but this would not meet 200 MHz on an FPGA.
  A real build would spread the divide and square root over more of the
  padded stages (or use vendor floating-point cores), and the interface
  would not change. The described unit uses 31 DSP slices. Here the
  multipliers are left to synthesis, so that count is not reproduced.
* **Bias correction** (`1-β^t`) is computed inside the kernel from `t`. The
  host only writes `t` and the raw β values.
* **Flush-to-zero** for subnormals and a single canonical NaN are this
  design's choices.
* **Host side.** The DDR4 PHY, which deserialises the 400 MHz host bus, is
  not part of this RTL. Neither are the memory controllers and the DRAM
  chips. The host appears as a 512-bit request port (`host_valid`, `host_we`,
  `host_rank`, `host_addr`, `host_wdata`), and rank *r* maps directly to
  channel *r*. Each channel's DRAM side is an AXI4 manager port
  (`dram_req`/`dram_rsp`) for a memory controller to attach to. The
  conversion of kernel AXI4 traffic into DDR4 commands belongs to that
  controller.
* **Register window, register maps, the drain-before-switch rule, `RD_LAT`,
  queue depths, ID width, and the late-read and overflow counters** are this
  design's own; only the two modes and an always-reachable register range
  are given.
* **Bank-group interleaving.** The 16 KB block was chosen so that two rows in
  different bank groups are read together. Whether that pays off depends on
  the memory controller's address mapping, which is outside this design.

## Capacity

A training step keeps `theta`, `grad`, `m` and `v` on the module, which is
16 bytes per parameter. Two 16 GB channels (the top 4 KB of each is the
register window) hold 32 GB. That covers about 2 billion parameters, such as
a 760M- or 1.3B-parameter GPT-3 model. Larger models keep only part of their
tensors on the module, and host software swaps the rest to and from NVMe
storage. `NPARAMS` is 32 bits, more than one channel can hold.

## Simulating

Verilator 5 is enough. List the packages first, then the rest:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_axdimm_fpga_top \
  rtl/axdimm_pkg.sv rtl/fp32_pkg.sv tb/adam_ref_pkg.sv \
  rtl/adam_fu.sv rtl/sync_fifo.sv rtl/adam_kernel.sv rtl/channel_arbiter.sv \
  rtl/axdimm_fpga_top.sv tb/axi_mem_model.sv tb/tb_axdimm_fpga_top.sv
./obj_dir/Vtb_axdimm_fpga_top
```

Swap the top module and the testbench file for `tb_adam_fu`, `tb_sync_fifo`,
`tb_adam_kernel` or `tb_channel_arbiter`. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. Each has a watchdog that counts a
failure if the run hangs.

* `tb_adam_fu`: 420 operand sets (first-step cases and random ones). It
  checks every output bit-exact against the reference, and checks the
  latency to be exactly 128 cycles.
* `tb_sync_fifo`: random push and pop against a queue model, plus full,
  empty and simultaneous push and pop.
* `tb_adam_kernel`: three runs of the kernel against the DRAM model.
  * 20,000 parameters at t = 10, with unaligned tensor bases.
  * 1,000 parameters at t = 1, updated in place with zero moments.
  * An empty run.
  It checks every result, that memory past each tensor is untouched, the
  registers, the AXI rules, and that the cycle count stays within 15 % of
  the 7-beats-per-16-parameters bound.
* `tb_channel_arbiter`: both modes and the switches between them. It checks
  exact read latency, that the kernel is blocked in NORMAL, and that host
  accesses become kernel register accesses in ACCELERATION. A second
  instance with a latency too short for its memory provokes late reads and
  dropped requests and checks the counters.
* `tb_axdimm_fpga_top`: the whole design at its default parameters, driven
  only through the host port as software would. It loads tensors for both
  channels with host writes, starts both kernels (20,008 parameters at
  t = 10 and 2,000 at t = 1000), and uses one channel as memory while the
  other computes. It also holds a kernel blocked in NORMAL mode, and then
  reads every result back through the host port. It counts each mechanism,
  and counts a failure for any that never happened: mode switches both ways,
  blocked kernel cycles, host traffic during the other channel's run,
  overlapped block loading, multi-block tensors, a partial last beat, and
  register-window and kernel-register accesses. It also reads channel 0's
  `CYCLES` register: 20,008 parameters take 8,935 cycles against a bound of
  8,757, which is 895.7 M parameters per second for two channels, 98 % of the
  914.3 bound. The run takes about 15 s including the build.

The testbenches assume two-state simulation and initialise everything they
read. Verilator's `shortreal` conversions are not used; the reference rounds
double precision to FP32 by hand.
