# Micro-programmed automaton with a split address circuit

A micro-programmed controller with *combined addressing* stores, in every
microinstruction, the micro-operations to issue, the code of one logical
condition to test, and a "false address" to jump to when that condition is 0;
when it is 1 the address simply increments. That format is small, but it can
only express two-way branches. A state of the algorithm that branches on
several conditions, and every place where a state has to continue somewhere
other than the next address, costs extra microinstructions that do nothing but
jump.

This design removes most of those extra words by giving the sequencer two
address circuits:

* **CA2** handles every state whose successor depends on at most one condition
  (including unconditional successors): it is the usual combined-addressing
  logic, a condition multiplexer that chooses between *increment* and *load
  the false address*.
* **CA1** handles the states with multi-way branches: a PLA maps
  {present address, conditions} directly to the next address.

A one-bit **flag field (FF)** in each microinstruction says which of the two
circuits forms the next address. The memory then holds exactly one
microinstruction per state of the algorithm. The RTL is programmed with a
worked example, the flowchart **G1** (eleven states, seven conditions, six
micro-operations). It needs 11 words of 14 bits (154 bits). Plain combined
addressing needs 17 words of 15 bits (255 bits) for the same flowchart. That
baseline is not part of this RTL.

## Block diagram

```
             x1..x6 ─────────────┐        x3, x7 ─┐
                                 ▼                ▼
   ┌──────────┐ addr      ┌────────────┐   ┌────────────┐
   │  rampm   │──────────►│    ca1     │   │    ca2     │◄── FLC
   │ (address │           │   (PLA)    │   │ (4:1 mux)  │◄── phi3 = FF
   │ register)│           └─────┬──────┘   └──┬─────┬───┘
   │          │◄─ phi1 ─────────┼─────────────┘     │phi2
   │          │◄─ phi2/phi3 ────┼───────────────────┘
   │          │◄─ start (phi0)  ▼ CA1 address
   │          │           ┌────────────┐
   │          │◄──────────│   m1_mux   │◄── FFA
   └────┬─────┘   load    └────────────┘ ◄── phi3
        │ addr
        ▼
   ┌──────────┐  FF ──► phi3
   │   mpm    │  FMO ─► csc ──► y1..y6, Z, busy
   │  (ROM)   │  FLC ─► ca2
   └──────────┘  FFA ─► m1_mux
```

| module | role |
|---|---|
| `mpa_pkg` | widths, the microinstruction struct `mi_t`, the FLC codes |
| `mpm` | microprogram memory, 11 × 14 bits, combinational read |
| `rampm` | address register: first address on `phi0`, +1 on `phi1`, load on `phi2`/`phi3` |
| `ca1` | PLA next-address circuit for multi-way branches |
| `ca2` | condition multiplexer that forms `phi1`/`phi2` |
| `m1_mux` | chooses the CA1 address or FFA as the register's load value |
| `csc` | control-signal circuit: drives Y and Z from FMO and holds the run flag |
| `mpa_top` | wires the above together |

## The microinstruction

`mi_t`, 14 bits, most significant field first:

| field | bits | meaning |
|---|---|---|
| FF  | 1 | 1: CA1 forms the next address and FLC/FFA are ignored; 0: CA2 does |
| FMO | 7 | Z (stop) and one bit per micro-operation y1..y6 |
| FLC | 2 | condition CA2 tests: `00` none (unconditional), `01` x7, `10` x3 |
| FFA | 4 | address loaded when the tested condition is 0 |

In the struct, `fmo.y[i]` is y*i* (range `[6:1]`).

## How the next address is formed

All of this is combinational from the current address, and the register
updates on the next rising clock edge:

| FF (phi3) | FLC | condition | action |
|---|---|---|---|
| 1 | – | – | load CA1(address, x1..x6) through M1 |
| 0 | 00 | constant 0 | `phi2`: load FFA (unconditional jump) |
| 0 | 01 | x7 = 1 / 0 | `phi1`: address + 1 / `phi2`: load FFA |
| 0 | 10 | x3 = 1 / 0 | `phi1`: address + 1 / `phi2`: load FFA |

FLC code `11` selects a constant 0 too. The microprogram never uses it.

The states are numbered to make the increment useful. A chain of states that
follow each other when a condition is 1 gets consecutive codes, so the "1"
exit costs nothing. For example, a3 → a7 → a10 sit at 0001, 0010 and 0011.

## The example program G1

Flowchart (y-operations issued in each state in brackets):

* a1 (start, none) → a2
* a2 [y1 y2]: x1·x2 → a3; x1·¬x2·¬x3 → a4; x1·¬x2·x3 → a5; ¬x1·x4 → a5; ¬x1·¬x4 → a6
* a3 [y3 y4]: x7 → a7, else stay in a3
* a4 [y2 y3] → a8;  a5 [y1 y4] → a8;  a6 [y1 y5] → a9
* a9 [y2 y3]: x3 → a6, else → a8
* a7 [y1 y5], a8 [y3 y6]: x5 + x6 → a10, else → a11
* a10 [Z y1 y2], a11 [Z y2] → a1 (end)

Memory contents (`rtl/mpm.sv`):

| addr | state | FF | ops | FLC | FFA |
|---|---|---|---|---|---|
| 0000 | a1  | 0 | –        | 00 | 0110 (a2) |
| 0001 | a3  | 0 | y3 y4    | 01 (x7) | 0001 (a3) |
| 0010 | a7  | 1 | y1 y5    | – | – |
| 0011 | a10 | 0 | Z y1 y2  | 00 | 0000 (a1) |
| 0100 | a9  | 0 | y2 y3    | 10 (x3) | 1001 (a8) |
| 0101 | a6  | 0 | y1 y5    | 00 | 0100 (a9) |
| 0110 | a2  | 1 | y1 y2    | – | – |
| 0111 | a4  | 0 | y2 y3    | 00 | 1001 (a8) |
| 1000 | a5  | 0 | y1 y4    | 00 | 1001 (a8) |
| 1001 | a8  | 1 | y3 y6    | – | – |
| 1010 | a11 | 0 | Z y2     | 00 | 0000 (a1) |

CA1 (`rtl/ca1.sv`) holds 11 product terms: five for a2 and three each for a7
and a8. Each term matches one state code and one cube over x1..x6. The OR
plane ORs the next-address codes of the matching terms. The terms of one state
are disjoint, so at most one term fires.

Points to know when reading the program:

* a6 is at 0101 and a9 at 0100. The reverse order would let a6 reach a9 by
  increment. With this order a6 needs an unconditional jump instead, which is
  still a single word.
* a3 waits in place while x7 = 0. It does not re-enter the x2 decision of a2.
* The words at 1011–1111 are not part of the program. They read as "no
  operation, jump to 0000".

## Timing and run protocol

* One rising-edge clock. `rst_n` is an asynchronous active-low reset that
  leaves the machine idle at address 0000.
* A one-cycle `start` pulse (phi0) loads address 0000 and sets `busy` on the
  same edge.
* While `busy` is high, one microinstruction, i.e. one flowchart state,
  executes per clock. `y` and `z` are combinational from the memory word, so
  they are valid in the cycle the state is current. `x` is sampled on the
  rising edge that leaves the state.
* In the stop state (a10 or a11) `z` is high for one cycle. On the next edge
  the register returns to 0000 and `busy` falls.
* A run that visits *k* states takes exactly *k* cycles. The shortest run,
  a1 a2 a5 a8 a10, takes 5 cycles. Nothing is spent on jump-only words.
* While idle, `y` and `z` are 0 and the address stays at 0000.
* `addr` and `phi = {phi3, phi2, phi1}` are brought out for observation.

Two assertions guard the sequencer. `rampm` checks that each enabled cycle
has exactly one address source. `mpa_top` checks that every word with FF = 1
hits a CA1 term.

## Design choices

These follow the worked example:

* the structure
* the four fields and their widths
* the FLC codes
* the memory contents
* the CA1 product terms
* the CA2 multiplexer inputs

These are this implementation's own choices:

* The start/`busy` protocol and the reset. The source design gives the start
  signal and the stop signal Z but no run flag.
* The value of the fourth CA2 multiplexer input (constant 0).
* The contents of unused addresses, and the 0 stored in the ignored FLC/FFA
  fields.
* Combinational memory and PLA with a single clocked address register.
* The `hit` output of `ca1` and the observation ports.

CA1 and CA2 are specific to G1. The CA1 terms, and the conditions wired to
the CA2 multiplexer, must be redesigned for every new flowchart.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mpm` | every field of all 16 addresses against the program table |
| `tb_ca1` | all 16 addresses × 64 condition values against the flowchart's decision tree |
| `tb_ca2` | all 32 combinations of FLC, x7, x3, phi3 |
| `tb_m1_mux` | all 512 input combinations |
| `tb_rampm` | 2000 random cycles against a reference register, including wrap-around and hold |
| `tb_csc` | random FMO words and start pulses against a reference run flag |
| `tb_mpa_top` | end to end (details below) |

`tb_mpa_top` runs 400 complete runs of G1 with random conditions. A reference
model walks the flowchart and, every cycle, checks the address, Y and Z. It
also checks the one-cycle-per-state latency and idle behaviour. It counts each
mechanism and fails if one never happens:

* start
* CA1 branch
* CA2 increment
* CA2 conditional jump
* unconditional jump
* stop
* the a3 self-loop
* idle

It also requires all 11 states and all 20 flowchart transitions to occur.
`mpa_top` has no parameters, so this is a full-size run.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/mpa_pkg.sv tb/tb_mpa_top.sv --top-module tb_mpa_top -o sim
./obj_dir/sim
```

Replace `tb_mpa_top` with any other testbench name. Each one runs in well
under a second.

## Changing the program

1. Number the states so that "condition = 1" successors are consecutive.
2. Put the states with multi-condition branches in CA1: set FF = 1 and add
   their product terms to the `PLA` table in `ca1.sv`.
3. Wire the single conditions that the remaining states test to the CA2
   multiplexer inputs, and give them FLC codes.
4. Fill `mpm.sv`, one word per state.

If the new program needs other field widths, widen `ADDR_W`, `N_X` or `N_Y`
in `mpa_pkg`.
