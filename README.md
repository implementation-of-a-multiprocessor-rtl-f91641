# HEENS multiprocessor array: a SIMD core for spiking neural network emulation

This design is a grid of small 16-bit processors. All of them run the same instruction at the same time (SIMD). Each processor emulates one neuron, or up to eight neurons by time-multiplexing ("virtual layers"). The neuron model is not fixed in hardware: it is a program loaded into the sequencer's instruction memory. The network's connectivity is not wired in logic either. It lives in per-processor associative memories that turn the address of a spike source into a synapse number.

A run alternates between two phases:

1. **Execution.** The sequencer broadcasts the neuron program. Each processing element (PE) accumulates its weighted input spikes, updates the membrane potential, and decides whether it fires.
2. **Distribution.** The array is drained of its output spikes, one per clock cycle. Every spike goes out to the ring that links several FPGAs. It also loops straight back into the associative memories of all PEs on the same chip, where it sets the matching input-spike bits for the next step.

The default configuration is 12 × 12 PEs × 8 virtual layers, which gives 1,152 neurons per chip. Each neuron has up to 100 local synapses (sources on the same chip) and 32 global ones (sources on other chips).

## Hierarchy

```
heens_top
├── sequencer                 program fetch, loops, subroutines, phase control
└── mp_array                  ROWS rows + spike read-out priority logic
    └── mp_row  (× ROWS)      one register stage on all broadcast inputs
        └── processing_element (× COLS)
            ├── register_bank      8 visible + 8 shadow 16-bit registers, R0 = ACC
            ├── alu                saturating add/sub, 16x16 signed multiply, logic, shifts, C/Z
            ├── lfsr               64-bit pseudo-random source
            ├── freeze_lifo        8-deep condition stack (SIMD if/endif)
            ├── snbram             1024 x 32 synapse/neuron memory + block pointer BP
            ├── local_spike_mem    source address -> local synapse index, 100-bit spike register
            └── global_spike_mem   (chip id, address) -> global synapse mask, 32-bit spike register
```

`heens_pkg` holds the shared widths, the opcode enumeration and the bus structures:
- `iword_t`: a program word.
- `pe_instr_t`: the broadcast instruction.
- `cfg_t`: the setup write bus.
- `spike_t`: a spike address.

## Programming model

A program word is 16 bits: `{opcode[15:10], operand[9:0]}`. The 48 opcodes follow the HEENS instruction set. They are listed in `heens_pkg::opcode_e`.

**PE operations.** All of these act on every addressed PE.

| Group | Opcodes |
|---|---|
| Register | `RST`, `SET`, `MOVA` (ACC ← reg), `MOVR` (reg ← ACC), `SWAPS`, `MOVRS` |
| Arithmetic | `ADD` and `SUB` (saturating, signed 16-bit); `MUL` (32-bit product: high word to ACC, low word to R1); `MULS` (high word only); `INC`, `DEC` |
| Logic | `AND`, `OR`, `XOR`, `INV` |
| Shifts and rotates | `SHLN`, `SHRN` (1–8 positions); `RTL`, `RTR` (rotate through the carry) |
| Flags | `SETC`, `CLRC`, `SETZ`, `CLRZ` |
| Conditions | `FREEZEC`, `FREEZENC`, `FREEZEZ`, `FREEZENZ`, `UNFREEZE` |
| Memory | `LOADSP`, `LOADSN`, `STORESP`, `STOREPS`, `STOREB` |
| Random | `LLFSR`, `RANDON`, `RANDOFF`, `SEED` |

**Sequencer operations.**
- Broadcast a data word: `LDALL` (operand `{dmem_index[6:0], reg[2:0]}`; the low half of that DMEM word goes into the register).
- Loops: `LOOP n` and `LOOPV` (count taken from DMEM), closed by `ENDL`.
- Subroutines and jumps: `GOSUB`, `RET`, `GOTO`. `GOTO` has code 48. It is this design's addition, because the reference neuron program uses a jump but the original opcode table gives it no code.
- `HALT`: raises `int_o` until the host pulses `int_ack`.
- `SPKDIS`: ends an execution pass.
- `READMP`: copies word BP of the PE addressed by `sel_row`/`sel_col` into DMEM word `operand[9:3]`.

### Conditional execution: the freeze stack

SIMD hardware has no branches per PE. Instead, `FREEZE<cond>` pushes one bit onto a PE's 8-deep stack: 1 means "this PE skips what follows". `UNFREEZE` pops it.

A PE writes registers, flags, memories and spike bits only while every entry of its stack is 0. The freeze instructions themselves always execute, so nested conditions unwind correctly. For example, `FREEZEC` freezes the PEs whose carry flag is set.

### Synapse walking with BP

`LOADSP` reads the word at block pointer BP of the synapse/neuron memory:
- R1 gets the upper half of the word, normally the synaptic weight.
- ACC[15:1] gets bits 15:1 of the word.
- ACC[0] gets input-spike bit BP[7:0]. The bits are numbered with local synapses first (0–99), then global ones (100–131).

`STORESP` writes `{R1, ACC}` back and advances BP. `LOADSN` is a read that does not move BP.

BP returns to 0 at the start of every distribution phase. A program therefore lays out each neuron's memory as a run of synapse words followed by its state words. Virtual layer `l` then starts where layer `l-1` left off.

### Virtual layers and `SPKDIS`

`n_layers` is the number of virtual layers in use, minus one. The first `n_layers` times `SPKDIS` executes, the sequencer simply advances the layer number (`instr.virt`) and continues at the next instruction. The program normally loops back with `GOTO` to run the same neuron code for the next layer.

On the last layer, `SPKDIS` starts the distribution:
1. It pulses `spk_clr`, which clears all input-spike registers and BP.
2. It holds `en_spike` until the array reports that every layer has been emptied.
3. It raises `eo_exec` and waits for `cam_en` (the ring controller's busy signal) to drop.
4. It restarts at layer 0.

`STOREPS` writes ACC[0] into the output-spike bit of the current layer.

## Spike read-out: the part that needs care

Each PE offers the spike bit of the layer being drained. Two OR chains run through the array:

- **Row chain.** `row_out = row_in | spike`, chained along each row. The end of the chain (`row_any`) tells the array which rows still hold spikes.
- **Column chain.** `col_out = col_in | (spike & row_en)`, chained from row 0 to the last row. Only the one enabled row contributes. The end of the chain is a COLS-wide vector of columns that have a spike in that row.

The array picks the lowest-numbered column of that vector in the same cycle. It then outputs the spike's address (registered, so one cycle later), and the selected PE clears its bit at the next edge. The result is one spike per clock cycle inside a row.

The row choice (lowest row with spikes) passes through a register. This shortens the critical path across a 12 × 12 array, but it costs one empty cycle (`spike_out.valid = 0`) each time the read-out moves to another row. When no row holds a spike of the current layer, the next layer is taken. After layer `n_layers`, `dist_done` is raised.

**Spike address.** A spike is `{chip id, linear address}`, where `linear = (layer*ROWS + row)*COLS + col`. This is 11 bits, enough for 2,048 neurons per chip. The row, column and layer also come out separately.

**Loopback and ring input.** Spikes from the ring (`aer_in`) enter only in cycles when the array is not producing a spike (`aer_in_ready`). A PE routes an incoming spike by its chip id:
- If the chip id is its own, the spike goes to the local memory.
- Otherwise it goes to the global memory.

### The associative memories

**Local memory.** 2,048 × 7 bits, indexed by the source's linear address.
- Entry 0 means "not connected".
- Entry k means "this is my local synapse k-1". That bit of the 100-bit local spike register is then set one cycle later.

**Global memory.** Two lookup paths, each an encoding memory followed by a conversion memory:
- Chip id → 5-bit code → 32-bit synapse mask.
- Linear address → 5-bit code → 32-bit synapse mask.

The two masks are ANDed and ORed into the 32-bit global spike register, three cycles after the spike arrives.

All of these memories are written during setup through `cfg` (`cfg.mem` selects the memory, and `cfg.row`/`cfg.col` select the PE).

## Timing summary

| Path | Latency |
|---|---|
| Program word fetched → instruction at the PEs | 2 cycles (sequencer register, then row register) |
| Most instructions | 1 cycle, result visible next cycle |
| `MUL`, `MULS` | 2 cycles: the operands are registered and the result is written in the second cycle |
| Spike read-out inside a row | 1 spike/cycle |
| Spike read-out, row change | +1 empty cycle |
| `spike_out` after the PE is selected | 1 cycle |
| Local spike register set after the spike | 1 cycle |
| Global spike register set after the spike | 3 cycles |
| `READMP` | 3 cycles until the word is in DMEM |

## Using the top

1. Reset (`rst_n` low, asynchronous).
2. Load the program (`imem_we/addr/data`) and the data memory (`dmem_*`).
3. Write each PE's memories through `cfg`.
4. Set `own_chip`, `n_layers` and `sel_all=1`.
5. Pulse `start`.

During a run, `busy` is high. Between phases, the host talks to the design in two places:
- At `HALT`, through `int_o`/`int_ack`.
- After each distribution, through `eo_exec`/`cam_en`.

Use `sel_all=0` with `sel_row/sel_col` to run instructions on a single PE, for example to preload per-neuron parameters with `LDALL`/`STORESP`. The same two signals also choose the PE that `READMP` and `ext_buffer` read.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Units.** ALU, registers, LFSR, freeze stack, memories, associative memories: random stimulus compared against an independent model written in the testbench.
- **`tb_processing_element`, `tb_mp_row`, `tb_mp_array`, `tb_sequencer`.** Instruction semantics, the freeze rule, `MUL` timing, spike-chain behaviour, read-out order, and the one-cycle gap at every row change.
- **`tb_heens_top`.** A 2 × 3 array over 10 time steps, running a leaky integrate-and-fire program. It has several virtual layers, local and global synapses, and remote spikes injected on `aer_in`. A behavioural model in the testbench computes every membrane potential and spike, and every spike the chip emits is checked against it. The testbench also counts each mechanism and fails if any never happened:
  - multiply hold, freeze, row gap, layer advance, distribution;
  - local and global delivery, ring back-pressure;
  - `HALT` and `READMP`.
- **`tb_all_to_one`.** The classic demonstration network on a 4 × 4 array, running the same program over 24 steps. All 15 other neurons project onto the neuron at row 0, column 0.
  - Odd-numbered sources keep themselves firing through a strong self-synapse.
  - Even-numbered sources fire once and fall silent.

  Every spike is checked against a reference model, and the test fails if the target neuron never fires.
- **`tb_heens_full`.** The same kind of run with the top at its default parameters (12 × 12 × 8, 100 + 32 synapses), over 3 time steps. Building it with verilator takes a few minutes; the run itself takes about a second.

To run one with verilator:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/heens_pkg.sv rtl/*.sv tb/tb_heens_top.sv --top-module tb_heens_top
./obj_dir/Vtb_heens_top
```

Put `heens_pkg.sv` first (as shown; the duplicate from the wildcard is harmless) so the package is compiled before its users.

## Where this design departs from, or fills in, its source

The overall structure comes from the HEENS description:
- the sequencer and the array of rows of PEs;
- the PE contents and the instruction set;
- the per-row pipeline register and the two-cycle multiply;
- the row-priority register with its one-cycle gap;
- eight virtual layers and 100 + 32 synapses per neuron.

Many details were not specified and are choices of this design:

**Instructions and flags**
- The 16-bit instruction word format, the `LDALL`/`READMP` operand layout, and `GOTO` as code 48.
- How flags are set: carry/borrow for add, subtract, increment and decrement; Z for every result; rotates go through the carry; shifts are logical.
- `RST`/`SET` clear or set the whole register. One description of these instructions speaks of a single selected bit, but the opcode table gives whole-register values, and that is what is built.
- A `BITSET` instruction used once in a published example program has no opcode and is not implemented.

**Spike handling**
- `LOADSP` indexes the input spikes with BP[7:0] instead of the 4 bits in the original table, so that all 132 synapses can be reached.
- BP is cleared at the start of each distribution phase.
- The spike address format, the loopback path, and the rule that local spikes take priority over ring input.
- The contents of the associative memories:
  - the "0 = unconnected" local encoding;
  - the code/mask scheme of the global encoding and conversion memories, joined by an AND.

  The global memory is the least certain part: only its block structure is known.

**Sequencer**
- The stack depths (8) and the overflow behaviour.
- The single-PE select scheme (`sel_all`, `sel_row`, `sel_col`).
- The LFSR feedback polynomial: x^64 + x^63 + x^61 + x^60 + 1.

**Not included**
- The ring (AER) controller.
- Clock generation.
- The host board.

Their signals are ports of `heens_top`.

**Size limits**
- The row/column ports are 5 bits wide, so up to 31 × 31 can be addressed.
- The 11-bit spike address limits `ROWS*COLS*VIRT_LAYERS` to 2,048.

## Known tool warnings

Verilator reports unused bits that are kept on purpose:
- the upper half of DMEM words (only the low 16 bits are broadcast);
- the shadow registers at the PE boundary;
- the upper LFSR bits (only the low word is read by `LLFSR`);
- the freeze stack contents (only its all-zero flag is used);
- the high bits of BP at the spike index.

It also reports unconnected debug outputs (`regs_o`, `si_o`, `pc_o`). The read-out assertion uses `rst_n` in its `disable iff`, which verilator reports as a mixed synchronous/asynchronous use of the reset.
