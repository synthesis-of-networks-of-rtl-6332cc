# A network of custom ODE processing elements

Many physical systems can be modelled as thousands of copies of the same small
ordinary differential equation (ODE), each coupled only to its neighbours.
Examples are heart tissue, where each cell's membrane potential follows the
potentials of its six neighbours, or a lung airway tree. To run such a model
in real time, this design stops treating the model as one big program. Each
*processing element* (PE) owns a block of neighbouring variables. It advances
them with a datapath built for that one equation. Each PE exchanges only its
boundary values with the PEs next to it, over point-to-point links.

The PEs are small and deeply pipelined. A PE starts one variable update every
clock cycle. It has no instruction decoding and no branches: a static schedule,
produced off-line, says what every PE does in every cycle. All PEs run on one
clock and meet at barriers, so the network's result matches a sequential Euler
integration of the whole model bit for bit. The testbenches check exactly this.

The default configuration is the 3-D atrial-cell model. It is a 15 × 15 × 15
grid of 3,375 cells on a 5 × 5 × 5 mesh of 125 PEs, with 27 cells per PE. Each
cell follows

    dV_i/dt = (-I_tot + G · Σ_j (V_j - V_i)) / C_i     (j over the 6 neighbours)

Four other datapaths are included:

- the Lutchen airway (a line of cells);
- a 2-D wave mesh;
- the Weibel lung (a binary tree of branches);
- a neuron mesh.

## How one time step runs

One Euler step has two phases, each closed by a barrier.

1. **Compute and store.** The PE issues one *compute* per cycle, one for each
   resident variable. A compute reads the variable and its neighbours from the
   data RAM. The result comes out of the datapath 4 cycles later. A *store* in
   that cycle writes it back.
2. **Barrier.** Every PE waits until all PEs have stored all their results.
3. **Data transfer.** The PEs send their updated boundary values to the
   neighbours that need them. A PE runs an *output* in cycle t, which loads
   the variable into its output register. In cycle t + 1 the neighbour runs a
   *store* that takes the value from its link input. The neighbour writes it
   into its local copy, called a halo word.
4. **Barrier.** All PEs start the next step together.

The hard part is the write-after-read hazard. The data RAM reads
asynchronously and writes at the clock edge, so a read in the same cycle as a
write still sees the old word. A compute issued in cycle c stores in cycle c + 4.
In a 3 × 3 × 3 block, cell r's +z neighbour (r + 9) is computed in cycle
c + 9. If cell r were written back in place, that compute would read the
*new* value of r, and the result would be wrong.

The schedule therefore keeps **two buffers** of resident variables. Step 2k
reads buffer 0 and writes buffer 1. Step 2k+1 does the reverse. The program in
the instruction RAM covers two steps and then wraps to the start. The halo
words need only one copy, because they are written only during the transfer
phase, after all computes of the step are done.

For the wave model, the second buffer also holds U(t-1). Each node reads its
own U(t-1) before its store overwrites that word.

Cycle counts with the schedule the testbenches generate:

| model, PEs, variables per PE | cycles per step |
|---|---|
| atrial 5×5×5, 27 | 27 computes + 4 latency + 1 barrier + 6×9 transfers + 1 + 1 barrier = **88** |
| Lutchen 160 in a line, 25 | **34** |
| wave 16×16, 25 | **52** |
| neuron 10×10, 16 neurons × 3 variables | **71** |
| Weibel lung, tree of 73 PEs, 31 branches × 2 variables per leaf PE | **90** |

Data transfer runs in phases, one per link direction. In the phase for
direction d, every PE outputs its face cells that lie on side d. Each PE then
receives from exactly one neighbour per cycle, which suits the RAM's single
write port. A PE outputs a corner cell once per face it lies on.

## The custom PE (`custom_pe`)

```
   neighbour links din[0..5] ──┐
   own datapath result ───────►├─ input mux (in_sel) ──► data RAM write port
                               │
   controller + instruction RAM ── control word each cycle ──┐
                                                             ▼
   data RAM: 7 async read ports ──► custom ODE datapath ──► result (4 cycles)
             read port 0 ─────────► output register ──► dout (to all neighbours)
             read port 7 ─────────► host read-back
                                    constant ROM (inside the datapath)
```

- **`pe_data_ram`**: 128 × 32-bit RAM with 8 asynchronous read ports and one
  synchronous write port. It is meant to map onto FPGA LUT RAM. Port 0 reads
  the variable being updated and is also the output port. Ports 1–6 read its
  neighbours. Port 7 serves the host.
- **`pe_input_mux`**: chooses the value to store. Input 0 is the PE's own
  datapath result. Inputs 1–6 are the six links.
- **`pe_const_rom`**: holds the per-variable constants (32 entries). It reads
  synchronously and sits inside the datapath. The host loads it before a run.
- **`pe_controller`**: holds the instruction RAM (256 control words) and the
  program counter. The PC only counts up, and returns to 0 after a word marked
  `wrap`. It also runs the barrier, counts time steps and pulses `done`.
- **Output register**: an output word loads `dout` from read port 0. The new
  value is visible to the neighbours in the next cycle.

### Control word (`ode_pkg::ctrl_word_t`, 73 bits)

| field | meaning |
|---|---|
| `rd_addr[0..6]` | data-RAM read addresses: operand 0 (the updated variable), operands 1–6 |
| `crom_addr` | constant-ROM entry of the variable being computed |
| `compute` | start a datapath computation (sets the datapath's valid bit) |
| `mode` | which equation a multi-equation datapath computes (neuron: V, W, S) |
| `wr_en`, `wr_addr`, `in_sel` | store: write the input-mux value at `wr_addr` |
| `out_en` | output: copy read port 0 into the output register |
| `sync` | barrier after this word |
| `step_end` | barrier after this word; it also ends a time step |
| `wrap` | the next word is address 0 |

A compute, a store and an output are independent fields of one control word,
so all three can happen in the same cycle. An all-zero word is a no-op.

### Barrier

A PE that issues a `sync` or `step_end` word raises `at_sync` and then issues
no-ops. The network ANDs every PE's `at_sync` into `all_sync`. When that is
high, every waiting PE resumes on the next cycle, so all PEs stay in lockstep
after every barrier. A barrier costs at least one cycle.

The datapath pipeline keeps running while a PE waits at a barrier. A schedule
must therefore not place a barrier between a compute and its store.

## The datapaths

All datapaths have the same ports and a latency of 4 cycles, and accept a new
operand set every cycle. Numbers are 32-bit two's complement fixed point with
16 fraction bits (Q16.16). Each product is shifted right arithmetically by 16
and truncated to 32 bits, and sums wrap at 32 bits. The time step h is folded
into the constants, so the constants go in the ROM already scaled. A
neighbour that falls outside the model is addressed as the variable itself.

| module | update computed | operands | ROM entry |
|---|---|---|---|
| `ode_dp_atrial` | V − K·Σ_j(V − V_j) − Ioff, with K = G·h/C, Ioff = I_tot·h/C | 0: V, 1–6: neighbours | {K, Ioff} |
| `ode_dp_lutchen` | V + Ka·(V_{i−1} − V) − Kb·(V_{i+1} − V), with Ka = h·C1·C2, Kb = h·C1·C3 | 0: V_i, 1: V_{i−1}, 2: V_{i+1} | {Ka, Kb} |
| `ode_dp_wave` | C1·(U_n+U_s+U_w+U_e) + C2·U − U(t−1) | 0: U, 1–4: neighbours, 5: U(t−1) | {C1, C2} |
| `ode_dp_weibel` | X + a1·o1 + a2·o2 + a3·o3 + a4·o4 | volume: {V, F_parent, V_sib, V, F}; flow: {F, V, F, V_R, V_L} | {a1..a4} (128 bits) |
| `ode_dp_neuron` | V, W or S update, chosen by `mode` (see the module header) | 0: the variable, 1: W or V, 2–5: neighbours' S | {k1..k4} (128 bits) |

The atrial pipeline has four stages:

1. six subtractors, V − V_j;
2. an adder that sums the six differences;
3. a multiplier, with K from the ROM;
4. a final subtractor, with V carried down alongside the pipeline.

The Lutchen ODE, V' = C1·(C2·V_{i−1} − C3·V_{i+1} + (C3 − C2)·V_i), is
rewritten in difference form.

Both Weibel branch equations are linear in four stored values. One
multiply-accumulate datapath therefore computes a branch's volume and its flow,
with coefficient sets:

- volume: {h·C1, h·C2, −h·C2, h};
- flow: {h·C3, −h·(C4+C7), −h·(C5+C6), h·C5}.

## The network (`ode_pe_network`, top)

PEs sit on an NX × NY × NZ mesh (default 5 × 5 × 5). Set NZ = 1 for a 2-D mesh,
or NY = NZ = 1 for a line. PE (x,y,z) has index x + NX·(y + NY·z). Its link
inputs are:

| `in_sel` | link from |
|---|---|
| 1 | (x−1,y,z) |
| 2 | (x+1,y,z) |
| 3 | (x,y−1,z) |
| 4 | (x,y+1,z) |
| 5 | (x,y,z−1) |
| 6 | (x,y,z+1) |

Each PE's `dout` goes to all its neighbours; a link with no neighbour reads
zero. `MODEL` selects the datapath of every PE: `MODEL_ATRIAL` (default),
`MODEL_LUTCHEN`, `MODEL_WAVE`, `MODEL_WEIBEL` or `MODEL_NEURON`.

### Tree networks

With `TREE = 1` the PEs form a `FAN`-ary tree of `TLEV` levels. The defaults,
8 and 3, give 73 PEs: a root, 8 middle PEs and 64 leaves. This tree holds the
Weibel lung, a binary tree of airway branches, where each branch has a volume
V and a flow F. The NX, NY and NZ parameters are then unused.

PEs are numbered level by level: the root is 0, and PE p has the children
FAN·p+1 … FAN·p+FAN. Mux input 1 is the parent's output; inputs 2 … FAN+1 are
the children's outputs. This is why `in_sel` is 4 bits wide. A PE's `dout`
goes to its parent and all its children.

- Each middle PE (and the root) holds a subtree of 3 generations, 7 branches.
  Its 4 bottom branches have the 8 child PEs' subtrees as children.
- Each leaf PE holds 5 generations, 31 branches.

A branch's volume equation needs its sibling's V. The subtree roots of two
sibling PEs have no direct link, so the parent relays the value. The transfer
section of the testbench schedule has two phases:

1. **Upward.** Every PE outputs its subtree root's V. Its parent stores it
   from each child in turn.
2. **Downward.** For each pair of children, the parent outputs three values:
   - the F of their parent branch, which both children store;
   - the V of one child, which the other child stores as its sibling;
   - the V of the other child, stored the same way.

Host ports:

- `cfg_we`, `cfg_pe`, `cfg_target`, `cfg_addr`, `cfg_wdata`: write one word
  of one PE. The target is the instruction RAM (`CFG_INST`), the constant ROM
  (`CFG_CROM`) or the data RAM (`CFG_DATA`). Writes are allowed only while the
  network is idle; an assertion in the controller checks this for the
  instruction RAM.
- `hrd_pe`, `hrd_addr` → `hrd_data`: combinational read of any PE's data RAM.
- `start` (one-cycle pulse) and `num_steps`: run that many time steps.
  `busy` is high during the run, and `done` pulses when it ends.

Reset `rst_n` is synchronous and active low. It clears the controllers, the
valid bits of the datapath pipelines and the output registers. The memories
are not reset; the host loads them.

## Programming it

The RTL holds no schedule. Programs, constants and initial values are data
loaded through the configuration port. A compiler for this network must:

1. partition the variables into blocks, one per PE;
2. lay out each data RAM: two buffers of resident variables, then the halo
   words for each link direction;
3. emit, per PE, the compute words in a fixed order, the stores exactly 4
   words after their computes, a `sync` on the last store, the transfer words,
   and `step_end` on the last transfer word;
4. repeat steps 1–3 for the other buffer parity and put `wrap` on the last
   word;
5. load the halo words with the neighbours' initial values.

Rules a schedule must keep:

- A store of the datapath result is exactly 4 words after its compute. An
  assertion checks that the datapath result is valid at such a store.
- A neighbour's value is stored exactly 1 word after the neighbour outputs it.
  All PEs leave a barrier in the same cycle, so word counts after a barrier
  line up across PEs.
- Two neighbours may not output values that one PE must store in the same
  cycle: each PE has only one write port.

`tb/mesh_net_driver.sv` and `tb/tree_net_driver.sv` are small compilers of
this kind. Each generates, loads and checks such programs, and serves as a
worked example.

## Where this departs from the approach it follows

- **Data RAM depth 128.** RAMs of 32 or 64 words are typical for such PEs.
  The double-buffered 27-cell atrial block needs 108 words, so the default is
  128.
- **Double buffering instead of a longer compute-to-store delay.** A schedule
  could order computes so that every reader of a variable runs before its
  store. For tree-shaped blocks this works with a plain 4-cycle delay. A cubic
  block has no such order, and the datapath holds a result for only 4 cycles,
  so this design buffers instead. The cost is a two-step program and a larger
  RAM.
- **88 cycles per atrial step.** The reference implementation reports 77. The
  difference is the simple transfer schedule here: one phase per direction,
  and corner cells sent more than once.
- **Two fixed topologies.** The network is a mesh or a tree rather than one
  generated from any partition. The two cover the five models. The sibling
  relay through the parent is this design's own scheme.
- **90 cycles per Weibel step** against 51 in the reference implementation.
  A leaf PE computes 62 variables. Constants are shared per generation within
  a PE (10 ROM entries), because 62 entries exceed the 32-entry ROM.
- **Neuron partition.** A 40×40 neuron network on 8×8 PEs (25 neurons each)
  would need 170 data words with double buffering. The tested layout is
  therefore 10×10 PEs of 4×4 neurons (112 words). Only S crosses the links.
  The constants are shared per equation within a PE (3 ROM entries), because
  one entry per neuron variable (48) exceeds the 32-entry ROM.
- **Own choices:**
  - Q16.16 number format;
  - the folding of constants and h into the ROM;
  - the adder and ionic-current placement in the atrial datapath;
  - the barrier scheme (flags in the control word and an AND of all PEs);
  - the host configuration and read-back ports;
  - one shared datapath for the Weibel volume and flow equations;
  - one shared datapath with a mode field for the three neuron equations.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_pe_data_ram` | random writes and reads on all 8 ports; read-during-write returns the old word |
| `tb_pe_input_mux` | every select value; out-of-range select gives 0 |
| `tb_pe_const_rom` | load, then one-cycle registered read |
| `tb_pe_controller` | word order across barriers and wrap, no-ops while waiting, exact cycle count, step count, one `done` pulse |
| `tb_ode_dp_*` (5) | 3,000 random cycles against a 64-bit reference; latency exactly 4 cycles and full throughput |
| `tb_custom_pe` | compute, neighbour store, own store, output timing (value on `dout` one cycle later), write-after-read, cycle count |
| `tb_custom_pe_neuron` | a neuron PE with 4 neurons over 2 steps: the mode field picks the V, W or S equation, and all 12 variables are bit-exact |
| `tb_ode_pe_network` | 2×2×2 atrial PEs with 2×2×2 cells each, 3 steps: every cell bit-exact, cycles per step, and that compute, own store, neighbour store, output, wrap, barrier and barrier wait all occurred |
| `tb_ode_pe_network_full` | the default network (125 PEs, 3,375 cells), 3 steps, same checks |
| `tb_workload_lutchen` | 4,000-cell Lutchen line on 160 PEs, 3 steps |
| `tb_workload_wave` | 80×80 wave mesh on 16×16 PEs, 3 steps |
| `tb_ode_pe_tree` | a 21-PE tree (4-ary, 3 levels) with a 6-generation lung, 3 steps: every V and F bit-exact, cycles per step, and that stores from a child and from the parent both occurred |
| `tb_workload_weibel` | 11-generation lung (2,047 branches) on the 73-PE tree, 3 steps |
| `tb_workload_neuron` | 40×40 neuron network (4,800 variables) on 10×10 PEs, 3 steps; V, W and S all bit-exact, all three modes used |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ode_pkg.sv tb/tb_ode_pe_network.sv \
          --top-module tb_ode_pe_network -o simv
obj_dir/simv
```

The full-size network test takes about 1.5 minutes to build and a second to
run. To try another model or size, instantiate `mesh_net_driver` with the
matching `MODEL`, mesh and block parameters, as the workload testbenches do.
For trees, use `tree_net_driver` with `FAN`, `TLEV` and the number of
generations `G`.
Keep each data-RAM layout within 128 words, each program within 256 words and
each block within 32 constant entries.

## Files

- `rtl/ode_pkg.sv`: widths, depths, the control-word struct, model and
  configuration enums.
- `rtl/pe_data_ram.sv`, `rtl/pe_input_mux.sv`, `rtl/pe_const_rom.sv`,
  `rtl/pe_controller.sv`: the PE's parts.
- `rtl/ode_dp_{atrial,lutchen,wave,weibel,neuron}.sv`: the custom datapaths.
- `rtl/custom_pe.sv`: one PE.
- `rtl/ode_pe_network.sv`: the network (top): a mesh or a tree.
- `tb/`: the testbenches above, plus `mesh_net_driver.sv` and
  `tree_net_driver.sv`, which generate programs and compute the reference.
