# OpenCL compute device for an FPGA coprocessor

This RTL runs OpenCL kernels as hardware. Each work-item of a kernel gets
its own small processing element: a finite-state machine with a datapath
that does what the kernel's C body does for one global ID. A work-group is
as large as the number of these cores, and all of its work-items run at the
same moment. Nothing is serialised inside the group. A compute unit runs
one work-group at a time. The device has four compute units, one per FPGA
of the coprocessor board. The host program hands out work-groups by
polling. Global memory is external DRAM behind sixteen memory-controller
ports per compute unit, and round-robin arbiters share those ports among
the cores.

Two kernels are provided, selected by a parameter:

| kernel | OpenCL signature | one work-item does |
|---|---|---|
| `K_VADD` (default) | `VectorAdd(global const long *a, global const long *b, global long *c, int iNumElements)` | `if (gid < iNumElements) c[gid] = a[gid] + b[gid]` |
| `K_MATMUL` | `matrixMul(global long *C, global long *B, global long *A, uint wA, uint wB)` | `C[ty*wA+tx] = sum_k A[ty*wA+k] * B[k*wB+tx]` |

## Running a kernel: the host's view

The device top is `ocl_coproc`. The host talks to it through three
mechanisms:

* **AEG registers.** Every compute unit (an *application engine*, AE) has
  16 registers of 64 bits, the AEGs. Registers 0–9 belong to the device and
  kernel arguments start at register 10. Pointer arguments come first, in
  the order of the kernel's parameter list, as byte addresses. Scalar
  arguments follow. Two device registers are used:
  * `AEG_GRID` (0) holds the work-group number for the next start. For 2-D
    kernels, bits 31:0 hold `group_id_0` and bits 63:32 hold `group_id_1`.
  * `AEG_DONE` (1) is read-only. At the top level it reads as a mask with
    bit *n* set while AE *n* is free.
* **Start.** Pulse `ae_start[n]` for one cycle to start AE *n* on the
  work-group in its `AEG_GRID`. Start an AE only while it is free (an
  assertion checks this).
* **Done.** `ae_done[n]` is the same free bit, also available directly. It
  is high after reset, drops the cycle after a start and rises again when
  the last core of the group has finished.

A kernel launch, as the testbenches' host model performs it:

1. Put the input buffers into global memory.
2. Broadcast each argument to all AEs: `aeg_we=1`, `aeg_wr_bcast=1`,
   `aeg_wr_idx=10+i`.
3. Compute `workgroups = ceil(global_size / local_size)`. The last group may
   hang over the end. `VectorAdd` guards against that with its bounds
   check.
4. If there are more than three groups, start groups 0–3 on AEs 0–3. Then
   keep reading `AEG_DONE`, and give the next group to the lowest-numbered
   free AE (write `AEG_GRID`, pulse `ae_start`) until every group has been
   started. With three groups or fewer, start group *g* on AE *g*.
5. Wait until `AEG_DONE` reads all ones, then read the results.

AEG writes take effect at the clock edge. Reads (`aeg_rd_ae`, `aeg_rd_idx`
→ `aeg_rd_data`) are combinational.

## Inside a compute unit (`ocl_ae`)

```
           AEG regs ──args, AE_GRID──┐
 start ──► wi_dispatch ──IDs, start──► core 0 … core N-1   (vadd_core / matmul_core)
 done  ◄──        ◄──────ap_done──────    │ 3 ap_bus ports each
                                     core_wrapper (one per core)
                                          │ 1 request stream per core
                           mem_arbiter per memory-controller port
                                          │
                                  mc port 0 … 15
```

* **`wi_dispatch`** latches the work-group ID. It computes
  `global_id = group_id * local_size + local_id` for every core, with core
  *c* at local ID `(c mod L0, c div L0)`. It also presents the local IDs
  and the latched group ID, for kernels that read them. All cores are
  started with one common pulse. It collects the cores' `ap_done` pulses
  and pulses `done` one cycle after the last one.
* **Kernel cores** follow the interface style of C-to-HDL generated
  hardware. They have `ap_start`, `ap_done`, `ap_idle` and `ap_ready`, plus
  one *ap_bus* port for each pointer argument. A bus port issues a request
  (`write`, element `idx`, `wdata`) with valid/ready. It then gets exactly
  one response pulse, carrying read data for a read and an acknowledgement
  for a write. A core finishes only after its store has been acknowledged.
  The private variables of the kernel (`tGID`, `value`, `k`) are registers
  inside the core.
* **`core_wrapper`** is the memory access module of one core. It turns the
  element index into a byte address: `pointer + 8 * sign_extend(idx)`. It
  merges the three bus ports into one request stream with a round-robin
  `mem_arbiter`. It returns each response to the bus port that asked.
* **`mem_arbiter`** (with `rr_arbiter` inside) shares one
  memory-controller port among the cores mapped to it. Core *c* uses port
  *c* mod `NUM_MC_PORTS`. With the default 16 cores and 16 ports each core
  has a port to itself. With 32 or 48 cores, two or three cores share a
  port. Port *j* is the even (*j* even) or odd port of memory controller
  *j* div 2.
* **`barrier_sync`** implements the work-group barrier. A core pulses
  `barrier_hit`, and every core receives a one-cycle `barrier_done` once
  all of them have arrived. Neither kernel contains a barrier, so inside
  the AE its inputs are tied to zero. It is tested on its own.

### Tags: how responses find their core

Memory may answer the ports of different cores in any order, so every
request carries a 16-bit tag. Each arbiter level shifts the tag left and
writes the requester's number into the low bits:

* the bus-port number (2 bits), added in `core_wrapper`;
* then the core number within the port, when a port serves more than one
  core.

The memory must return the tag unchanged with the response. Each arbiter
level strips its own bits and routes the response on. Responses have no
back-pressure, and every receiver takes a response in the cycle it arrives.
This is safe because each bus port has at most one request outstanding.

### Handshake rules

* Requests use valid/ready. A request must stay valid and stable until it
  is accepted.
* An arbiter that has forwarded a request freezes its grant until the port
  accepts it. A later request cannot replace one that is already on the
  port. An assertion (`a_hold_stable`) checks this.
* Round-robin: after a requester is served, the search starts at the next
  requester. Under full load the requesters are served in turn.

## Kernel cores and their timing

The cycle counts below assume a memory that always accepts and answers in
one cycle. They are measured from the cycle `ap_start` is sampled to the
cycle `ap_done` is seen.

* **`vadd_core`**: idle → check bounds → issue the `a` and `b` loads
  together → add → store `c` → wait for the acknowledgement → done. That is
  7 cycles for an in-range work-item and 2 cycles for an out-of-range one.
  The bounds check is a signed 32-bit compare, as in C.
* **`matmul_core`**: a loop of {issue `A` and `B` loads together, then
  multiply and accumulate}, 4 cycles per iteration at one-cycle memory.
  After the loop it stores the sum. The arithmetic is 64-bit and wraps
  around. The output index is `ty*wA + tx`, as the kernel source has it,
  which is the row-major index for the square matrices it is used with.

Real memory latency adds to every load and store. With the default
configuration and a 12-cycle memory model, one work-group of `VectorAdd`
takes about 40 cycles, including the host model's register writes. A
1024-element vector needs 64 work-groups and took about 675 cycles in
simulation. That is 4.5 µs at 150 MHz, the clock this architecture was
built for. On a real system the host reaches the AEG registers over the
processor bus, and each poll and each start costs far more than a clock
cycle. Work-group scheduling by the host then dominates the run time, the
more so the smaller the work-groups. Larger work-groups (`LOCAL_SIZE_0` = 32
or 48) mean fewer groups to schedule.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_AE` | 4 | compute units (one per coprocessor FPGA) |
| `KERNEL` | `K_VADD` | replicated kernel core |
| `LOCAL_SIZE_0`, `LOCAL_SIZE_1` | 16, 1 | work-group size; also the number of cores per AE |
| `NUM_MC_PORTS` | 16 | memory-controller ports per AE (8 controllers × even/odd) |

Widths are in `ocl_pkg`: 64-bit data (`long`), 32-bit IDs and scalars
(`int`), 48-bit byte addresses and 16-bit tags. The other configurations
evaluated for this architecture are 32 and 48 cores per AE
(`LOCAL_SIZE_0` = 32 or 48), and for matrix multiplication 4×4 work-groups
(`KERNEL=K_MATMUL`, `LOCAL_SIZE_0=LOCAL_SIZE_1=4`). As with the original
flow, one build serves one kernel and one work-group size. The work-group
size is fixed when the hardware is built.

## What is outside this RTL

The memory-controller ports are brought out of `ocl_coproc`. Connect them
to your memory system:

* a crossbar that lets any port reach any address;
* the memory controllers;
* the DRAM.

The host CPU and its bus, the board's management and dispatch interfaces,
and on-chip local (`__local`) memory are not included either. Local memory
is left out because neither kernel uses it. In the testbenches, the module
`tb/global_mem_model.sv` stands in for the memory side. It accepts any
address on any port, stalls at random and answers after a fixed latency,
in order per port.

## Where this RTL makes its own choices

The structure follows the architecture it implements:

* one core per work-item;
* one work-group per compute unit;
* dispatch, memory access modules and round-robin arbiters;
* arguments in AEG registers from 10 on;
* host scheduling by polling.

The following details are this implementation's own:

* the cores themselves, hand-written to do what the kernel sources say, in
  place of generated ones;
* the ap_bus handshake and the acknowledgement of writes;
* the numbers of `AEG_GRID` and `AEG_DONE`, and reading `AEG_DONE` as a
  mask of all AEs;
* the 2-D packing of `AEG_GRID`;
* the core-to-port mapping and the tag scheme;
* the valid/ready memory port (a real memory-controller interface will
  need a thin adapter);
* asynchronous active-low reset, after which all AEs are free.

On size: the original vector-add core is reported at about 99 flip-flops
and 47 LUTs. `vadd_core` here holds about 270 flip-flop bits, because it
keeps both 64-bit operands and the sum in registers.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ocl_coproc \
    -y rtl -y tb +libext+.sv rtl/ocl_pkg.sv tb/tb_ocl_coproc.sv
./obj_dir/Vtb_ocl_coproc
```

| testbench | what it covers |
|---|---|
| `tb_ocl_coproc` | whole device at default parameters. Vectors of 20, 40, 1000, 256, 512, 1024, 2048 and 4096 elements. It counts polling re-dispatch, the small-group path, partial groups, concurrent AEs, port stalls and bus competition |
| `tb_ocl_coproc_wg32`, `tb_ocl_coproc_wg48` | the same with 32- and 48-core work-groups |
| `tb_ocl_coproc_matmul` | whole device with 4×4 matrix-multiply groups, square matrices of width 4–16 |
| `tb_ocl_ae` | one AE of each kernel with 4 ports, so that cores share arbiters |
| `tb_vadd_core`, `tb_matmul_core` | cores against a per-port memory, including the cycle counts above |
| `tb_core_wrapper`, `tb_mem_arbiter`, `tb_rr_arbiter` | address generation, tag routing with out-of-order responses, round-robin order |
| `tb_wi_dispatch`, `tb_barrier_sync`, `tb_aeg_regs` | ID generation, barrier release, register map |

Each testbench takes well under a minute. Simulation has two states, so
every register that is read is reset.
