# Evolvable hardware on a virtual reconfigurable circuit

This design lets a genetic algorithm (GA) find a digital circuit by trial and error, and
then use it. Each candidate circuit is a string of small integers, its *chromosome*. The
chromosome programs a *virtual reconfigurable circuit* (VRC): a small, fixed array of
two-input logic elements (LEs) whose functions and wiring are set by the chromosome, built
from ordinary logic on top of an FPGA. The hardware tests each candidate against the truth
table of the wanted circuit. It returns one fitness number to the host that runs the GA.

The fitness function gives credit for whole output columns as well as single bits. A
*critical path* (CP) is the part of the circuit that drives one external output. Its *CP
vector* is that output's column of the truth table. Rewarding correct CP vectors keeps
outputs that are already solved from being lost. It also rewards partly solved outputs
in a way that a constant 0 or 1 cannot fool.

The second part of the system is an application: a two-state controller for a glue plant.
The combinational logic of each state is such an evolved circuit, and it runs in a VRC of
its own.

```
                 host (runs the GA)
                  |  gene writes (cfg_dest selects the VRC)        fitness
                  v                                                  ^
  +---------------------------------- evo_platform --------------------------+
  |  vrc_config_mem --genes--> vrc_array (4 x 5 LEs) <--vectors-- tt_tester   |
  |        |                        |  outputs -------------------> counts    |
  |        +--> vrc_constraint_check                                  |       |
  |                                                  fitness_calc <---+       |
  +---------------------------------------------------------------------------+
  +---------------------------- tank_controller -------------------------------+
  |  tank_state_reg --state--> selects  VRC(MIXING)  or  VRC(HOLDING)          |
  |  sec_counter --1 s tick--> tank_timer 10 s, tank_timer 5 s --> HOLDING VRC |
  +---------------------------------------------------------------------------+
```

`ehw_top` holds both parts. They share one gene-download bus.

## The VRC

### Logic element (`vrc_le`)

Each LE has inputs A and B and a 3-bit function gene:

| code | 0   | 1  | 2     | 3    | 4   | 5   | 6    | 7            |
|------|-----|----|-------|------|-----|-----|------|--------------|
| y    | A&B | A\|B | ~A  | ~(A&B) | ~(A\|B) | A^B | ~(A^B) | A (wire) |

Codes 0–6 are the seven fundamental gates. The LEs are limited to these gates to keep the
GA's search space small. Code 7 is a *wire LE*. It carries a signal into a later column,
and evolved circuits use such LEs.

### Array and routing (`vrc_array`, `vrc_source_mux`)

The 20 LEs form 4 rows and 5 columns. The routing rules make every configuration
feed-forward, so no chromosome can build a loop or a latch:

* Both inputs of a column-0 LE come from the 4 external inputs, and only column-0 LEs
  may read them.
* Both inputs of an LE in column c > 0 come from any LE in columns 0 to c−1.
* Each of the 4 external outputs is driven by any one of the 20 LEs. An external input
  can therefore never reach an output without passing through an LE.

LEs are numbered column by column, so LE e sits in column e / 4 and row e % 4. A
routing gene holds a source number. If the gene names a source its LE may not use, that
input reads 0 and `route_err` is raised.

Each column is a separate generate block that publishes the outputs of itself and all
earlier columns. That keeps the netlist visibly acyclic for lint and synthesis tools.

### Chromosome layout (`ehw_pkg`, `vrc_config_mem`)

There are 64 genes of 5 bits each:

| gene     | meaning                                   |
|----------|-------------------------------------------|
| 3e       | source of input A of LE e (e = 0..19)      |
| 3e + 1   | source of input B of LE e                  |
| 3e + 2   | function of LE e (low 3 bits)              |
| 60 + k   | LE that drives external output k (k = 0..3) |

The configuration memory is written one gene per clock (`we`, `waddr`, `wdata`). A gene
write reconfigures the array on the next clock. `raddr`/`rdata` read a gene back, so
the host can check a download. Reset clears every gene.

### Evolution constraints (`vrc_constraint_check`)

The GA may only produce chromosomes that obey these rules:

1. The two inputs of an LE are different signals (`same_in`, one bit per LE).
2. No two external outputs share a driver LE (`same_out`).
3. Every source is legal, as listed above (`bad_src`).

`chrom_ok` on the platform is the AND of these checks and the array's own `route_err`.
The rules "only the fundamental gates" and "no external input wired straight to an
output" hold for every chromosome by construction.

## Scoring a phenotype

### Test sequence (`tt_tester`)

`eval_start` starts a test. The tester then drives input vectors 0 to 15 onto the VRC, one
per clock, and compares each output vector with `target[v]`. It counts:

* `vec_ok`: output vectors that are completely correct;
* `elem_ok`: single output bits that are correct (64 in all);
* `cp_ok[k]`: output k is correct on all 16 vectors;
* `t_ok[k]`, `f_ok[k]`: correct 1-bits and correct 0-bits of output k;
* `n_t[k]`, `n_f[k]`: how many 1-bits and 0-bits the target column holds.

### Fitness arithmetic (`fitness_calc`)

All values are fixed point, with 65536 = 100 %:

```
F_Elements  = elem_ok / 64
F_CP        = (number of correct CP vectors) / 4
F_CPpartial = mean over k of ( 0.5 * t_ok[k]/n_t[k] + 0.5 * f_ok[k]/n_f[k] )
F_Overall   = 0.3 * F_Elements + 0.4 * F_CP + 0.3 * F_CPpartial
F_OV        = vec_ok / 16          (reported, not part of F_Overall)
```

The 0.5/0.5 split between 1-bits and 0-bits is what stops a constant output from scoring
well. For the top product bit, which is 1 on only one of 16 rows, a constant 0 would
score 15/16 on plain bit counting. Here it scores 0.5·0 + 0.5·1 = 50 %. Solving one CP
vector adds a step of 10 % through the F_CP term.

Each ratio is worked out as `floor(n * 65536 / d)` on one shared radix-2 restoring
divider (`seq_divider`, 33 clocks per division). The final step is
`F_Overall = floor((24*F_Elements + 32*F_CP + 3*P) / 80)`. Here P is the sum of the eight
half-ratios. If a target column has no 1-bits (or no 0-bits), that half counts as 100 %.
Divisions by zero are skipped.

An evaluation takes at most 462 clocks from `eval_start` to `eval_done`: 17 clocks of
testing, then up to 443 clocks of arithmetic. The chromosome must not be written during
a test; an assertion in `evo_platform` checks this. Outside an evaluation, `ext_in` and
`ext_out` reach the VRC directly, so the evolved circuit can be used.

## The glue-plant controller (`tank_controller`)

The plant mixes and heats starch and water into glue in a mixing tank (state MIXING). It
then keeps the glue warm in a holding tank and pumps it out ten seconds on, five seconds
off (state HOLDING). The controller has five parts:

* **Combinational logic:** two VRCs, one per state, each loaded with that state's evolved
  chromosome. The state line picks which VRC drives the actuators. The other state's
  outputs are held at 0.
  * The MIXING VRC reads `sense_mix[3:0]` and drives `{v_inlet1, v_outlet1, heater1, pump1}`.
  * The HOLDING VRC reads `{t_short_expired, t_long_expired, sense_hold[1:0]}` and drives
    `{v_outlet2, t_s_o2, t_l_o2, heater2}`.
* **Sequential logic (`tank_state_reg`):** MIXING goes to HOLDING on `mix_done`, and
  HOLDING goes back to MIXING on `hold_done`.
* **Counter circuit (`sec_counter`):** a one-second tick from the clock (`TICKS` = 50 000 000).
* **Two timing circuits (`tank_timer`, 10 s and 5 s):** `t_l_o2` and `t_s_o2` start them.
  Each expiry flag is a register, so the loop from the HOLDING VRC's outputs back to its
  inputs always passes a flip-flop.

The pump cycle is a matter of what the HOLDING VRC is loaded with. The testbenches use
`t_l_o2 = ~t_short_expired`, `t_s_o2 = t_long_expired`, `v_outlet2 = ~t_long_expired`,
`heater2 = ~sense_hold[0]`. With that logic the pump runs 10 s, stops for 5 s, and
repeats.

## What is assumed, and where this RTL goes further

Given by the source design:

* the 20-LE array with 4 inputs and 4 outputs;
* the column-based feed-forward routing;
* the seven gate functions and the evolution constraints;
* the sequential truth-table test;
* all the fitness formulas and their weights;
* the two plant states, the names of their outputs, the 10 s / 5 s pump cycle, and the
  five sub-circuits of the controller.

Chosen here:

* The 4 × 5 split of the 20 LEs. Routing from *any* earlier column, not only the
  previous one.
* The wire code, the function encoding and the gene layout.
* The gene-wide download port and the read-back port.
* Illegal routing reads 0.
* Fixed-point rounding, and the rule for empty target columns.
* A 50 MHz clock.
* Reading the "counter circuit" as the one-second time base.
* Reading `T_L_O_2`/`T_S_O_2` as the timer starts.

In the original system, a PC ran the GA and also the test and fitness arithmetic, and
talked to the FPGA through data-acquisition hardware. Here the test and the fitness
arithmetic are hardware. The GA itself is left to the host, which only downloads genes
and reads `f_overall`.

Not built:

* **The GA.** The canonical GA (tournament selection, uniform crossover, mutation) and the
  1 + λ GA (mutation only) were host software. A behavioural 1 + λ GA is part of the system
  testbench.
* **The plant's transition conditions and per-state truth tables.** These are not
  specified. The conditions are the inputs `mix_done`/`hold_done`, and the truth tables
  arrive as chromosomes.
* **The trial configuration with all 16 two-input LE functions.** Only the main
  seven-gate LE is built.

## Files and parameters

`rtl/ehw_pkg.sv` holds the array size (`ROWS`, `COLS`, `N_IN`, `N_OUT`), the fitness
scale and the LE function type. Every module takes its sizes as parameters whose defaults
come from the package. `gene_width()` and `n_genes()` derive the chromosome format from
the sizes. The truth-table tester and the fitness calculator follow `N_IN`/`N_OUT`. The
plant timers take `TICKS`, `LONG_SECS` and `SHORT_SECS`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds reference models written apart
from the RTL: a VRC evaluator, the constraint rules, the fitness function, and the
conventional 2 × 2-bit multiplier chromosome (four ANDs and two half adders). Example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ehw_top \
    -y rtl -y tb +libext+.sv rtl/ehw_pkg.sv tb/tb_ref_pkg.sv tb/tb_ehw_top.sv
./obj_dir/Vtb_ehw_top
```

* `tb_ehw_top` runs the system with a 5-clock second. The conventional multiplier scores
  100 %. The behavioural 1 + λ GA (λ = 5, i.e. a six-individual population) runs 150
  generations, and each of its 750 hardware fitness values matches the model. The test
  also flags a constraint violation, scores a target with an empty column, and runs the
  plant through MIXING → HOLDING (two full pump cycles) → MIXING. It counts each
  mechanism, and a mechanism that never happened counts as a failure.
* `tb_ehw_mult_evolution` runs the multiplier-evolution workload at the default
  parameters. First the 1 + λ GA runs, then a canonical GA. The canonical GA keeps six
  individuals, keeps the fittest unchanged, and breeds five children per generation by
  binary tournament, uniform crossover and mutation. Each GA runs for up to 3000
  generations, the run limit used in the original experiments. The test checks every
  fitness against the model and that the best fitness never falls. Whether a run reaches
  100 % depends on the random seed; the original experiments also needed several runs.
  Runs seen here reached 85–90 %.
* `tb_ehw_top_full` runs at the default parameters (50 MHz, real 10 s / 5 s timers). It
  evaluates the multiplier and starts the pump. It checks only the first 20 ms of the
  ten-second on phase, because a full 15 s cycle is 750 million clocks. The full cycle is
  checked with a shorter second.

The simulator used has two-state logic: all state is reset, and the testbenches drive
every input.
