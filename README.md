# cGAP: a cellular genetic-algorithm processor

A genetic algorithm improves a population of candidate solutions step by step.
It picks parents, mixes them, mutates the result and lets the child replace a
weaker member. In a *cellular* GA the population does not form one pool. Each
solution can only meet the solutions near it on a grid, so good material
spreads slowly and the population stays diverse.

This design builds that grid in hardware. A ROWS x COLS array of processing
elements (PEs) sits in a mesh of small dual-port memories called spMEMs
(subpopulation memories). Every PE has one spMEM on each of its four sides.
Each spMEM between two PEs belongs to both of them. A PE sees only its four
memories, and neighbouring PEs overlap in the memory they share. That overlap
is the cellular neighbourhood, and it is where children migrate across the
array.

The PEs do not synchronise with one another. Each runs its own GA loop as fast
as its memories let it. Two PEs meet only when they want the same solution in
a shared memory at the same time. A per-solution lock in each spMEM handles
that case.

Three pieces of infrastructure surround the array:

- a cellular-automaton random-number generator whose output is passed from PE
  to PE through a register chain;
- a command ring that connects every PE to a controller;
- the controller itself, a register bank that a host processor drives as a
  memory-mapped device.

The PE in this RTL is written for one problem, **spectrum allocation (SA)**.
N secondary radio users share M channels. A solution is an N x M bit matrix
A, where a(n,m) = 1 means that user n transmits on channel m. Three tables
define an instance:

- `L(n,m)`: channel m is available to user n. Constraint 1: a(n,m) <= l(n,m).
- `C(n,k,m)`: users n and k interfere on channel m. Constraint 2: two users
  that interfere on a channel cannot both use it.
- `B(n,m)`: the reward for giving channel m to user n. The fitness is the sum
  of b(n,m) over every a(n,m) = 1, and higher is better.

The default build is a 5 x 5 array with 25 PEs and 60 spMEMs. It holds
instances of up to 32 users x 32 channels and up to 4 solutions per spMEM.

## Files

| file | what it is |
|---|---|
| `rtl/cgap_pkg.sv` | sizes, spMEM port structs, ring packet, PE address map |
| `rtl/cgap_top.sv` | the array, the spMEM mesh, RNG chain, command ring, controller |
| `rtl/pe.sv` | one processing element: the GA loop for spectrum allocation |
| `rtl/problem_mem.sv` | the L, C, B tables of the instance, one copy per PE |
| `rtl/spmem.sv` | subpopulation memory: solutions, fitness words, two ports |
| `rtl/spmem_arbiter.sv` | per-solution lock between the two ports of a spMEM |
| `rtl/ca_rng.sv` | global cellular-automaton random generator |
| `rtl/rng_link.sv` | one register stage of the random-number chain |
| `rtl/comm_node.sv` | one stop of the command ring |
| `rtl/cgac.sv` | controller: host registers, set-up, run/stop, best-solution search |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two end-to-end ones |
| `tb/cgap_tb_body.svh` | shared body of the two end-to-end testbenches |

## The array and its memories

Number the PEs row-major, `i = r*COLS + c`. There are two kinds of memory:

- **Horizontal** spMEMs `H(r,c)`, for c = 0..COLS, sit between PE(r,c-1) and
  PE(r,c).
- **Vertical** spMEMs `V(r,c)`, for r = 0..ROWS, sit between PE(r-1,c) and
  PE(r,c).

That gives `ROWS*(COLS+1) + (ROWS+1)*COLS` memories. The array does not wrap
around. A spMEM on the outer edge has one PE, and its other port is tied idle.

Port A of every spMEM faces the PE to its west or north. Port B faces the PE
to its east or south. Each PE sees its sides as ports 0 = north, 1 = east,
2 = south and 3 = west.

A spMEM holds `SOLS_MAX` solutions. Each solution is NMAX rows of MMAX bits,
where row n is user n's channels, plus one FW-bit fitness word. The number of
slots actually used (1..SOLS_MAX) is set at run time. The population is
therefore `spMEMs x slots`: 60 x 3 = 180 or 60 x 4 = 240 in the default
array. Reads are synchronous, and data appears one cycle after the request.

## Locking a solution

Two PEs may pick the same solution in a shared spMEM at the same time. Each
spMEM therefore has an arbiter (`spmem_arbiter`) that gives out a lock per
solution slot:

- A port raises `lock` with the slot it wants. It is granted (`gnt`) one cycle
  later, unless the other port already holds that slot.
- The port keeps the lock for as long as it keeps `lock` high on the same
  slot. When it drops `lock`, the other port can be granted on the same clock
  edge.
- Two ports may hold two different slots at the same time.
- If both ports ask for the same free slot in the same cycle, one wins. The
  priority alternates between ports on such ties.
- Every refused request raises `collision` for one cycle. The top counts these
  on its `lock_refusals` output.

A PE reads or writes a solution only while it holds that solution's lock. It
never holds more than one lock, so two PEs can never wait on each other and
the array cannot deadlock. Writes without the lock are caught by an
assertion in `spmem`.

## Inside a PE: one generated solution

Each pass through the PE's state machine produces one child. No cycle is lost
to arbitration unless another PE holds a wanted slot.

| step | states | cycles |
|---|---|---|
| tournament 1: lock and read the fitness of two random neighbourhood solutions, keep the better | `S_TLOCK`, `S_TFIT` | 2 x 2 |
| tournament 2: the same, giving parent p2 | `S_TLOCK`, `S_TFIT` | 2 x 2 |
| read p1 and p2 row by row into the child buffer, with uniform crossover and bit-flip mutation applied as rows arrive | `S_RLOCK`, `S_RROWS` | 2N + a few |
| repair and score each row | `S_EVAL0`, `S_EVAL` | N + 1 |
| lock a random neighbourhood solution and read its fitness | `S_PLOCK`, `S_PFIT` | 2 |
| overwrite it only if the child is strictly better | `S_WLOCK`, `S_WROWS` | N + 1, or 0 |

The total is **3N+21 cycles per child, plus N when the child is written**. It
is one cycle less when both parents come from the same slot. The PE unit
testbench checks these counts.

Candidates are drawn uniformly: a side (2 random bits) and a slot (`random
mod slots-in-use`). The 160-bit random word that arrives each cycle supplies
the following:

- the crossover mask (M bits);
- mutation: a bit flips when 5 random bits are all 1, a probability of
  2^-5 = 3.1%;
- the picks.

**Repair.** A child built from two feasible parents is usually infeasible. The
PE therefore fixes one row per cycle with data from its private copy of the
tables (`problem_mem`), in three steps:

1. It ANDs row n with `L` row n, which removes unavailable channels.
2. On every channel m, it removes the channel from user n if a lower-numbered
   user k < n already holds m and `C(n,k,m)` is set. Users are repaired in
   order, so user 0 always keeps its channels and later users yield.
3. It adds the rewards of the channels that are left to the fitness.

After N+1 cycles the child is feasible and its fitness is known.

**Initial population.** A CTRL=INIT command makes the PE fill every used slot
of all four of its spMEMs with a random row set, repaired and scored the same
way. A shared memory is filled by both neighbours, and the later write wins.

Each PE also keeps the best child it has produced and its fitness, and three
counters:

- generated children;
- accepted replacements;
- cycles spent waiting for a lock beyond the normal grant cycle.

A STOP command takes effect after the current child is finished, so a stop
never cuts a spMEM write short.

## Random numbers

`ca_rng` is a 160-cell ring cellular automaton. Each cell updates as
`c[i-1] XOR (c[i] OR c[i+1]) XOR c[i+2]`, which is rule 30 extended by one
more neighbour. It reloads its seed if the ring ever becomes all zeros or all
ones. Its output enters a chain of `rng_link` registers, one per PE in
row-major order. PE i uses the output of the i-th link, so every PE gets a
fresh word each cycle, and two PEs see words that are some cycles apart.

## Commands and the controller

**Ring.** The controller (`cgac`) sends packets round a ring of `comm_node`
stops, one per PE, and the packet returns to the controller. A packet has the
fields {valid, ack, dest, op, addr, data}.

- Each stop registers the packet, so a trip takes NUM_PE cycles.
- A stop acts when `dest` is its PE index or 255 (broadcast). It hands the
  command to its PE and sets `ack`.
- On a read, the stop replaces `data` with the PE's answer.
- The controller keeps exactly one packet in flight.

**PE address map** (`addr`):

| addr[15:14] | meaning |
|---|---|
| 0 | registers, addr[3:0]: 0 N, 1 M, 2 slots used, 3 CTRL (write 1 init, 2 run, 3 stop), 4 STATUS (bit0 busy), 5 generated, 6 best fitness, 7 lock-wait cycles, 8 replacements |
| 1 | write: L row n (n = addr[13:8], one 32-bit word). Read: row n of the PE's best solution |
| 2 | write: C row n, word w = addr[7:0] holds c(n,k,w) for k = 0..31 |
| 3 | write: B row n, word w holds the 8-bit rewards of channels 4w..4w+3, lowest channel in the low byte |

**Host registers** (`hs_addr` is a byte address, so the word index is
hs_addr[7:2]; reads are combinational):

| word | name | |
|---|---|---|
| 0 | CMD_GO | write: send one packet, op = wdata[1:0] (1 write, 2 read) |
| 1 | CMD_DEST | PE index, or 255 for all |
| 2 | CMD_ADDR | PE address, as above |
| 3 | CMD_DATA | write data |
| 4 | CMD_RDATA | data the last packet brought back |
| 5 | TARGET_GEN | global stop: children to generate in total |
| 6 | START | write: run the whole algorithm |
| 7 | STATUS | bit0 busy, bit1 done, bit2 last packet acknowledged, bits 11:8 phase |
| 8 | BEST_FIT | best fitness in the array |
| 9 | BEST_PE | PE that holds it |
| 10 | TOTAL_GEN | children generated |
| 11 | ABORT | write: stop the run at the next poll |

**A run from the host:**

1. Broadcast N, M and the slots used, then the L, C and B rows. Use CMD_GO
   writes and poll STATUS.busy after each one.
2. Write TARGET_GEN, then START. The controller then works on its own:
   - it broadcasts INIT;
   - it polls every PE's STATUS until none is busy;
   - it broadcasts RUN;
   - it keeps summing the PEs' generation counters until the sum reaches
     TARGET_GEN (or ABORT);
   - it broadcasts STOP and waits until every PE is idle;
   - it adds up the final counts and scans for the best fitness.
3. When STATUS.done is set, read BEST_FIT and BEST_PE. Then read the best
   solution from that PE, row by row (region 1).

The stop is checked once per polling sweep, so a run overshoots TARGET_GEN by
the children made during the last sweep and by those in progress at STOP.

## Sizes and parameters

| name | default | where | meaning |
|---|---|---|---|
| ROWS, COLS | 5, 5 | `cgap_top` | array size (1x1 to 5x5 are the sizes of interest) |
| NMAX, MMAX | 32, 32 | `cgap_pkg` | largest instance: users, channels |
| SOLS_MAX | 4 | `cgap_pkg` | solution slots per spMEM |
| BW | 8 | `cgap_pkg` | reward width |
| FW | 32 | `cgap_pkg` | fitness width |
| MUT_K | 5 | `cgap_pkg` | mutation probability 2^-MUT_K per bit |
| RW | 160 | `cgap_pkg` | random bits per PE per cycle (MUT_K*MMAX) |
| DW | 32 | `cgap_pkg` | host and command data width |
| NUM_PE | 25 | `cgac` | ring length, set by the top |

The 5x5 array and the 32 x 32 instance limit are the published design's
numbers. The published design uses a population of about 200, and this
build's 60 spMEMs x 3 or 4 slots gives 180 or 240. Smaller arrays hold fewer
solutions unless SOLS_MAX is raised: a 1x1 array has 4 spMEMs.

Rough speed at 75 MHz with 25 PEs and no lock waits: 10^6 children of a
5_6 instance (5 users, 6 channels) take about 20 ms. A 32_32 instance takes
about 70 ms.

## Departures and choices

The published machine generates its PE and controller from C++ by high-level
synthesis and does not describe their insides. Everything inside `pe`,
`cgac`, `comm_node` and the arbiter is therefore this design's own:

- **Problem tables per PE.** The published design says read-only problem data
  may be kept in the memories beside the solutions. Here every PE has its own
  copy of L, C and B, loaded by broadcast. This allows a whole row to be
  repaired and scored per cycle. It costs memory: each PE holds 32 x (32 + 1024
  + 256) bits.
- **Repair order.** The published design does not say how constraints are
  enforced. Here lower-numbered users keep their channels.
- **Random generator.** The published generator is a cellular automaton
  adapted for hardware, and its rule is not given. The rule, width and seed
  here are this design's.
- **Mutation** is 3.1% per bit. Bit-flip mutation below 5% is what the
  algorithm calls for.
- **Replacement** happens only on a strictly higher fitness.
- **Widths:** 8-bit rewards and a 32-bit fitness and counters.
- **One clock.** The published system runs the array and a host CPU in
  separate clock domains with a synchronisation circuit. Here everything runs
  on one clock, and the host CPU is outside this RTL. Any bus master that can
  drive `hs_wr/hs_addr/hs_wdata` and read `hs_rdata` can act as the host.
- **Edge memories.** The array does not wrap around. The outer spMEMs serve
  one PE each.

The spMEMs are shared by two free-running PEs, so results depend on exact
timing. Two runs with different array sizes or seeds produce different
(equally valid) populations.

## Simulation

The RTL is plain synthesizable SystemVerilog with assertions. With Verilator
5, compile the package first and pass `-Itb` for the end-to-end include:

```
verilator --binary --timing --assert -Itb \
  rtl/cgap_pkg.sv rtl/spmem_arbiter.sv tb/tb_spmem_arbiter.sv --top-module tb_spmem_arbiter
./obj_dir/Vtb_spmem_arbiter

verilator --binary --timing --assert -Itb rtl/cgap_pkg.sv rtl/spmem_arbiter.sv \
  rtl/spmem.sv rtl/ca_rng.sv rtl/rng_link.sv rtl/comm_node.sv rtl/problem_mem.sv \
  rtl/pe.sv rtl/cgac.sv rtl/cgap_top.sv tb/tb_cgap_full.sv --top-module tb_cgap_full
./obj_dir/Vtb_cgap_full
```

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends itself. A
watchdog ends it with a failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb_spmem_arbiter` | directed cases and random traffic: grant timing, hand-over, exclusivity, alternating priority on ties, collision flag |
| `tb_spmem` | locked writes on one port read back on the other against a plain array; one-cycle read latency; a read waits while the other port holds the slot; reset clears |
| `tb_ca_rng` | 8000 steps against an independent model of the automaton |
| `tb_rng_link` | one cycle of delay, values pass unchanged |
| `tb_comm_node` | a ring of stops: addressed, broadcast and read packets, ack and data |
| `tb_problem_mem` | table words written and read back as rows |
| `tb_pe` | one PE with its four spMEMs on a 5-user, 6-channel instance: every stored child feasible and correctly scored, best tracking, cycle counts 3N+21 (+N) per child |
| `tb_cgac` | the controller with model PEs: host packets, START sequence, global stop, best search, ABORT |
| `tb_cgap_top` | 2x2 array, 5 users x 6 channels, 2 slots, 2000 children |
| `tb_cgap_full` | the default 5x5 array, 32 users x 32 channels, 3 slots, 2000 children (about 1.5 minutes including the build) |

The two end-to-end tests load a random instance and run START. They then copy
out every spMEM and check that every solution is feasible and that its stored
fitness matches its rewards. They read the counters and the best solution back
over the ring, then run again and ABORT. Each mechanism has to be seen at
least once, or the test fails: INIT, RUN, global stop, ABORT, broadcast,
addressed read, lock refusal, lock wait, accepted and refused replacement, and
best retrieval.

Measured: with the 2x2 array, about 2.5% of PE time goes to lock waits. With
the 5x5 array on a 32 x 32 instance the figure is 2.2%, and 535 of 2103
children replaced a solution.
