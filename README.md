# A dual-issue out-of-order RV32IM core with an 8-lane SIMD vector co-processor

This is synthesizable SystemVerilog for a small RISC-V processor built to run
8-bit neural-network inference (for example LeNet-5) much faster than scalar
code can. It has two halves:

* **A superscalar scalar core.** It fetches, decodes and dispatches two RV32IM
  instructions per cycle, executes them out of order using Tomasulo-style
  reservation stations and a common data bus, speculates past up to five
  unresolved branches, and retires two instructions per cycle, in order, from a
  64-entry commit buffer.
* **A vector co-processor.** The core hands it custom "vector" instructions,
  which it treats like any other instruction. The co-processor works on signed
  8-bit elements held in four 4 KB scratchpad banks. It moves data between
  those banks and external memory, adds and compares element-wise, and computes
  vector-matrix products on an 8-lane dot-product unit. One VMM instruction
  replaces a whole fully connected layer's inner loop.

Both halves share one 32-bit external data port through a priority arbiter.
Instructions come from a separate 64-bit instruction port, which delivers two
instructions per fetch.

## The scalar pipeline

The core has six stages: IF, ID, DP, RS, EX and COM (`rtl/ss_core.sv`).

**IF** (`fetch_unit`, `gshare_bp`)
* It reads one 64-bit word, which holds two instructions.
* If the PC points at the second word of the pair, the first slot is dropped.
* A gshare predictor predicts each slot:
  * a 10-bit global history, XORed with PC[11:2], indexes 1024 two-bit counters;
  * a direct-mapped branch target buffer supplies the target.
* If slot 0 is predicted taken, slot 1 is dropped.
* The predictor is updated as soon as a branch or jump resolves in EX, not at commit.

**ID** (`decoder`, `spec_tag_gen`)
* The decoder picks one of six reservation stations for each instruction, plus
  the operation, operands and immediate.
* The speculation tag generator gives every instruction the one-hot tag of the
  newest unresolved branch ahead of it, together with a "speculative" bit.
* Each branch rotates the tag. A counter tracks how many branches are
  unresolved, and fetch stalls when a sixth would enter.

**DP** (`rename_file`, `regfile`, `commit_buffer`)
* Both instructions get commit-buffer entries. Their entry numbers are the
  renaming tags.
* Each operand is taken from one of four places:
  * the register file, when no unretired writer exists;
  * a finished commit-buffer entry;
  * the tag of its producer, to be captured later from the result bus;
  * the first instruction of the same pair, when it writes that register.

**RS** (`reservation_station`): there are six stations.

| station | entries | issue order | issues speculative instructions? |
|---|---|---|---|
| two ALU stations | 8 each | oldest ready first | yes |
| multiply/divide | 4 | oldest ready first | yes |
| branch/jump | 4 | in order | yes |
| load/store | 4 | in order | no |
| CSR | 4 | in order | no |
| vector | 4 | in order | no |

"Oldest" means the smallest distance between an entry's commit tag and the
commit pointer.

**EX** (`alu`, `brj_unit`, `mldv_unit`, `ldst_unit`, `csr_unit`)
* Multiply takes 1 cycle. Divide is a restoring divider of 32 steps, 33 cycles
  in total.
* Each unit drives its own registered lane of the six-lane result bus: ALU0,
  ALU1, BRJ, MLDV, LDST and CSR.

**COM** (`commit_buffer`): up to two finished entries at the head retire per
cycle. They write the register file and decrement the busy counters.

### Renaming with busy counters and five checkpoints

This is the least conventional part of the design, and the part to read first
when changing the core (`rtl/rename_file.sv`).

**The counters.** Each register has a renaming tag and a 4-bit *busy counter*,
not a busy bit. The rules:
* dispatching a writer increments the counter and records the new tag;
* committing a writer decrements it;
* a register is valid in the register file when its counter is zero;
* dispatch stalls if a counter would overflow.

**The checkpoints.** There are five backup copies ("sheets") of the counters
and tags, one per speculation tag.
* A branch dispatched with tag *k* freezes a copy of the sheet into backup *k*.
  The backup keeps applying commits, but not dispatches.
* **Hit:** that backup is simply released. The reservation stations and the
  tag generator clear the branch's speculative bit in the same cycle.
* **Miss:** the sheet is restored from backup *k* with the current cycle's
  commits applied. At the same time:
  * the commit buffer moves its tail to the entry after the branch;
  * every station drops its entries that depended on the branch;
  * the tag generator rolls back to the branch's tag;
  * fetch restarts at the correct address.

The vector, load/store and CSR stations never issue speculative work. So
memory, CSR state and the co-processor never need to be undone.

## The vector co-processor

**Instructions.** The vector instructions use the three RISC-V custom opcodes.
Their register operands carry scratchpad addresses, sizes and external
addresses.

| opcode | funct3 | instruction | operands |
|---|---|---|---|
| `0001011` | 0 | VLOAD | reg0 = bank address, reg1 = size, reg2 = external address |
| `0001011` | 1 | VSTORE | reg0 = external address, reg1 = size, reg2 = bank address |
| `0001011` | 2 | VCOPY | reg0 = destination, reg1 = size, reg2 = source |
| `0001011` | 3 | VSCOPY | fill reg1 bytes at reg0 with the low byte of reg2 |
| `0101011` | 0 | VADD | reg0 = reg2 + reg3, element-wise, reg1 elements |
| `0101011` | 1 | VGTM | reg0 = max(reg2, reg3), element-wise (greater-than merge) |
| `0101011` | 2 | VMUL | reg0 = reg2 * reg3, element-wise, low byte |
| `0101011` | 3 | VSMUL | reg0 = reg2 * (the byte at reg3) |
| `1011011` | — | VMM | reg0[o] = sum over i of reg2[i] * reg3[o*reg1 + i], for o < reg4 |

The VMM fields are: reg1 = in_size, reg4 = out_size. The reg4 register number
is split across instruction bits {[31:30],[14:12]}. All results keep the low
8 bits.

**Addresses.** Bits [29:28] of a scratchpad address select the bank. For
example, 0x1000_0008 is byte 8 of bank 1.

An arithmetic instruction may read two banks. Its destination bank must be one
of its source banks; otherwise the vector decoder flags an exception and the
instruction is dropped.

**Block structure** (`rtl/vec_coproc.sv`):

* **Instruction board** (`vec_board`, `vec_decoder`)
  * Four entries. A leading-zero count picks a free entry on allocation and a
    ready entry on issue.
  * **Bank renaming:** each bank acts like a register. While an unfinished
    instruction writes a bank, that bank is dirty and tagged with the writer's
    entry. Later users wait for that entry.
  * **Issue:** an entry issues only when its function-unit mask and bank mask
    do not overlap the busy status of the units and banks.
  * **Retire:** when an instruction finishes, the board tells the core, and
    the core commits the matching commit-buffer entry.
* **Sequencers** (`vld_seq`, `vst_seq`, `vec_seq`, `vmul_seq`), four of them.
  * Load and store each move 4 bytes per step over the 32-bit external port.
  * The element-wise and multiply sequencers move 8 bytes per step.
  * VMM feeds the two-stage dot-product unit (`dot_product`): masked products,
    then an accumulate. It rewinds the vector address for each output element.
* **Bus multiplexer** (`vbus_mux`)
  * Gives each bank to one of six master ports: load, store, two
    element-wise, two multiply.
  * The bank stays assigned until the unit finishes.
* **Wrapped banks** (`vmem_bank` over `tdp_ram`)
  * Any 8 consecutive bytes at any byte address can be read or written in one
    cycle.
  * The address is split into a floor word (port A of a 64-bit true dual-port
    RAM) and a ceiling word (port B). The 128-bit pair is then shifted by the
    byte offset.

**Arbiter** (`mem_arbiter`): the external data port gives fixed priority to
the scalar load/store unit, then vector store, then vector load. Before later
scalar loads of vector results, a scalar `FENCE` waits until the co-processor
is idle.

## Departures and choices

The following points are this design's own choices, or are left out:

* **Traps are not implemented.** ECALL, EBREAK and FENCE.I retire as no-ops.
  Misaligned loads, stores and branch targets set an exception bit in the
  commit buffer, but no handler is entered; a misaligned access is simply
  skipped. The CSR unit holds the machine CSRs and the cycle and instret
  counters.
* **Chosen sizes.** The source gives no value for:
  * the BTB size (64 entries);
  * the vector station size (4);
  * the split of the 16 ALU station entries (two stations of 8, one per
    dispatch slot);
  * the vector funct3 numbering above.
* **Extra bank-ordering rule.** Besides the dirty-bank rule, an instruction
  also waits for older unfinished instructions that use the bank it writes. This
  keeps a younger write from overtaking an older read of that bank.
* **External port handshake.** A request is held until it is granted; read data
  arrives one cycle after the grant.
* **Vector loads** assume a word-aligned external address.
* **Circuit.** The assertions in `reservation_station`, `commit_buffer` and
  `vbus_mux` use the asynchronous reset as their disable condition. Lint
  reports this as a reset net used both synchronously and asynchronously; the
  logic itself only uses `rst_n` asynchronously.

## Files

* `rtl/rv_pkg.sv`: all shared constants, types and encodings. Read it first.
* `rtl/rvsv_top.sv`: the whole processor (core, co-processor, arbiter).
  - Ports: 64-bit instruction port (`imem_addr`, a word address, and
    `imem_rdata`, one cycle later); 32-bit data port (`mem` request,
    `mem_rvalid`/`mem_rdata`).
  - Monitor outputs count mispredictions, stalls and vector activity.
* `tb/`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
  - `tb/rv_asm.svh`: tiny assembler functions used by all tests.
  - `tb/sys_env.svh`: a harness with a 64 KB instruction memory at 0x0, 1 MB of
    data memory at 0x1000_0000, and a host word at 0x2000_0000 (a store there
    ends the run).
  - `tb/vec_env.svh`: a byte-accurate model of the vector instructions.
  - The pipeline units (fetch, renaming, stations, commit buffer, load/store,
    CSR) and the vector sequencers are tested with programs on the full
    processor, where their inputs really come from.
  - The combinational and memory blocks are tested alone with random stimulus.
* `tb/tb_rvsv_top.sv`: the end-to-end test at default sizes. It counts each
  mechanism and fails if one never happens: prediction hit and miss, dual
  commit, the busy-counter limit, the speculation limit, the 33-cycle divide,
  vector issue and retire, and arbiter conflict. On the last run: 211 cycles,
  90 instructions retired (IPC 0.42, with the divide and vector waits
  included).
* `tb/tb_lenet_fc_slice.sv`: one 400×8 slice of LeNet-5's first fully connected
  layer.
  - It runs load input, load weights and bias, VMM, bias add, and ReLU (VGTM
    against zero).
  - It takes about 4000 cycles. Most of that is loading the 3200 weight bytes
    over the 32-bit port.
  - The whole 400×120 layer needs 15 such slices, because 48 KB of weights do
    not fit a 4 KB bank.
* `tb/tb_lenet_conv.sv` and `tb/tb_lenet_pool.sv`: the convolution and
  max-pooling layer flows at reduced size.
  - Convolution: a 6×6 input with two 3×3 kernels. Each kernel row is one VMM,
    and VADD sums the partial results. It takes about 1000 cycles.
  - Pooling: 2×2 max pooling of an 8×8×6 map, using VCOPY plus three VGTM per
    output pixel. It takes about 800 cycles.
  - Feature maps are stored depth first.
* `tb/tb_ss_core.sv`: bubble sort, Fibonacci and a divide checksum. IPC is
  about 0.58.

## Simulating

Verilator 5 is needed. Put `rv_pkg.sv` first and let Verilator find the other
modules by name:

```
verilator --binary --timing --top-module tb_rvsv_top -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/rv_pkg.sv tb/tb_rvsv_top.sv
./obj_dir/Vtb_rvsv_top
```

Replace `tb_rvsv_top` with any other testbench name in `tb/`. To run your own
program, build it with the functions of `tb/rv_asm.svh` the way
`tb/tb_ss_core.sv` does. Alternatively, load a binary into the `imem` array of
`tb/sys_env.svh`: two instructions per 64-bit word, the lower address in the
low half.

This is 2-state simulation, so every register that is read has a reset value;
the scratchpad RAMs do not and start undefined. The test tables were checked
against independent models, not against the original hardware. The larger
programs measured for the original design (its Dhrystone runs and test
programs) have not been run on this RTL.
