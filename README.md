# A 440 p-bit probabilistic computer on a Chimera graph

This design samples from a Boltzmann distribution in hardware. It holds 440
probabilistic bits (p-bits). A p-bit is a binary unit m = +1 / -1 that
redraws its value at random, with the odds set by its neighbours:

    I_i = sum_j J_ij * m_j + h_i
    m_i = sgn( tanh(beta * I_i) + r ),   r uniform in (-1, 1)

Run for long enough, the network visits low-energy states of the Ising energy
E = -sum J_ij m_i m_j - sum h_i m_i most often. Three uses follow from that:

- Sampling: the network is a hardware Boltzmann machine.
- Optimisation: raise beta slowly (annealing) until the network settles in a
  low-energy state, for example the solution of a Max-Cut instance.
- Probabilistic logic: choose J and h so that only the valid rows of a truth
  table have low energy.

The RTL follows the architecture of the mixed-signal chip described in "A CMOS
Probabilistic Computing Chip with Hardware-Aware Learning". That chip has:

- 8-bit coupling and bias coefficients;
- analog current-mode neurons;
- an LFSR random-number source in every unit cell;
- LFSR-randomised update timing;
- an SPI port.

Its mismatch is compensated by learning in an external FPGA. On silicon the
neuron is analog. Here it is a real-valued behavioural model. Everything around
it is synthesizable RTL: registers, scan chain, SPI, random numbers, update
scheduling and the learning-loop correlator.

## The array

The p-bits sit in 55 unit cells on a grid of 7 rows and 8 columns. The
bottom-left position (row 6, column 0) holds the analog bias and SPI block
instead of a cell.

Each cell is a 4x4 restricted Boltzmann machine. It has four *vertical* p-bits
v0..v3 and four *horizontal* p-bits h0..h3:

- every v couples to every h in its cell (16 couplings);
- there are no couplings inside a layer;
- v_k couples to v_k of the cells above and below;
- h_k couples to h_k of the cells to the left and right.

So every p-bit has six couplings and a bias, and the whole graph has 1260
couplings. Cells at the grid edge, or next to the bias block, simply lack the
coupling on that side.

### Coefficients and register map

A coefficient is 9 bits: `{en, w[7:0]}`, where `w` is two's complement and full
scale is 127. A cleared `en` bit forces that input of the neuron to zero. This
guards against a zero-code DAC that still leaks current through mismatch.

Each cell holds 32 coefficient registers (`pbit_pkg`):

| registers | content |
|-----------|---------|
| 0..15  | J(v_i, h_j) at index 4i + j |
| 16..19 | J(v_k, v_k of the cell below) |
| 20..23 | J(h_k, h_k of the cell to the right) |
| 24..27 | bias of v_k |
| 28..31 | bias of h_k |

A coupling between two cells is stored once, in the upper or left cell, and
both neurons use it (J is symmetric). At the bottom and right edges the
"below" / "right" registers still exist in the chain but are ignored
(`HAS_DOWN` / `HAS_RIGHT`).

The source chip's cell diagram labels its register bank "9b Reg x28". This
RTL has 32 registers per cell, so that every coupling and bias of the graph has
one. The resulting scan chain is 55 x (32 x 9 + 8) = 16280 bits. That is close
to the 16316 I/O cycles per learning update reported for the chip.

## When p-bits update: randomised block Gibbs

No global lock-step update takes place. `update_clock_gen` holds 16 independent
32-bit LFSRs ("slots"), and each advances 6 steps per clock:

- the low 6 bits of a slot name the cell whose vertical layer updates in that
  clock;
- the top 6 bits, read in reverse order, name the cell whose horizontal layer
  updates.

Indices 55..63 name no cell. The consequences:

- At most 16 cells update each layer per clock, the bound the chip reports.
- Each cell updates a layer about 22 % of clocks.
- Which cells update is uncorrelated from clock to clock.
- The two layers of a cell sometimes update together. That is allowed because
  a layer has no internal couplings.

Two cells that update together may be neighbours. The resulting update is
quasi-asynchronous block Gibbs rather than exact sequential Gibbs.

The two index fields must be disjoint. If the same six bits were read forwards
and backwards, palindromic indices (cell 0, for one) would always update both
layers in the same clock. That cell's RBM would split into two independent
chains, and its v-h correlations would vanish.

A p-bit latches its neuron's output on a clock edge at which its layer's strobe
is high, so one update takes one clock. The strobes are gated off at once when
`run` is low or an SPI transaction is in progress. The silicon uses randomised
gated clocks; this RTL uses clock enables in one clock domain.

## The neuron model (`pbit_neuron`)

The silicon neuron is a chain of analog stages:

1. six 8-bit R-2R current DACs for the couplings, plus one for the bias;
2. current-mode Gilbert multipliers that apply the neighbour spin's sign;
3. current summation on a shared node;
4. a differential tanh stage whose gain is set by V_temp;
5. an 8-bit random-number DAC fed by PRBS<7:0> and its complement;
6. a comparator.

The model computes the same with real numbers:

    I     = k_weight * sum_j en_j * w_j * m_j / 127 + k_bias * en_h * w_h / 127
    t     = tanh(GAIN * v_temp * I + OFFSET)
    r     = k_rng * (PRBS - PRBSN) / 255
    m_out = (t + r > 0)

`k_weight`, `k_bias`, `k_rng` and `v_temp` stand for the chip's externally set
global bias inputs. They are `real` ports on `pbit_chip`. `v_temp` is the
inverse temperature, the knob that annealing turns.

`OFFSET` and `GAIN` model static mismatch. `pbit_chip #(.MISMATCH(x))` gives
every neuron a fixed pseudo-random offset and slope error of relative size x.
The default, 0, is ideal.

The model settles instantly; the analog settling time is not modelled. The
bias enters as +h (not h * m_i).

Random numbers come from `cell_rng`, one 32-bit LFSR per cell read as four
bytes. The LFSR advances 32 steps per clock, so all four bytes are fresh each
clock. Vertical p-bit k uses byte k; horizontal p-bit k uses the same byte
bit-reversed.

## Programming and reading: the scan chain and SPI

Each cell's coefficient registers are also its scan register. On top of them
sit 8 capture bits holding a copy of the cell's spins. The chip-wide chain runs:

    MOSI -> cell 0 [reg0 bit0 ... reg31 bit8, v0..v3, h0..h3] -> cell 1 -> ... -> cell 54 -> MISO

Cells are numbered row-major from the top-left, skipping the bias block
(`pbit_pkg::cell_index`).

In chain-image terms, bit `c*296 + 9*r + b` is bit b of register r of cell c,
and bits `c*296 + 288 + k` are cell c's spins, v0..v3 then h0..h3. Shift the
image in most-significant bit first.

`spi_slave` speaks SPI mode 0 with no command word. Every transaction shifts
the whole chain:

- **CS_N falls:** all 440 spins are captured into the chain, and updates
  freeze.
- **Each SCLK rising edge:** one shift. MISO shows the next captured or old
  bit; MOSI enters the chain.
- **After 16280 SCLK periods:** the host has read every spin and the old
  coefficients, and written new ones. Re-sending the same image reads the spins
  without changing anything.

SCLK, CS_N and MOSI are synchronised into the system clock, so SCLK must be at
most 1/8 of the clock.

## The learning loop (`hw_correlator`, `pbit_system`)

Mismatch gives every p-bit its own offset and slope. Instead of calibrating
each one, the couplings are learned with the chip in the loop:

1. Write J, h.
2. Take S samples.
3. Compute the model statistics:
   - bias_i = mean(2 m_i - 1)
   - corr_ij = mean(2 XNOR(m_i, m_j) - 1)
4. Update the coefficients:
   - J += eps (corr_ideal - corr_model)
   - h += eps (bias_ideal - bias_model)
5. Repeat.

`hw_correlator` does step 3 in hardware for N (8) observed spins. It counts the
samples, the +1 values per spin and the agreements (XNOR) per pair, in
saturating 14-bit counters. The processor that normalises the counts and
updates J and h is host software and not part of the RTL.

`pbit_system`, the top, puts the chip and the correlator side by side. Both
connect to the host: the chip's pins and the correlator's sample input and
counts are ports.

## Module hierarchy

    pbit_system                  top: chip + correlator
      pbit_chip                  55 cells, strobes, SPI
        spi_slave
        update_clock_gen
        chimera_cell x55
          cell_rng
          pbit_neuron x8         behavioural (real arithmetic)
      hw_correlator
    pbit_pkg                     constants, coef_t, cell_index, rev8, mismatch hash

Everything except `pbit_neuron` is synthesizable. A module that instantiates
the neuron (`chimera_cell`, `pbit_chip`, `pbit_system`) carries real-valued
ports and cannot be synthesised as is. A netlist flow would replace the
neuron with the analog cell.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/pbit_pkg.sv \
        tb/tb_pbit_system.sv --top-module tb_pbit_system -o sim && obj_dir/sim

| testbench | what it shows | run time |
|-----------|---------------|----------|
| tb_cell_rng, tb_update_clock_gen, tb_pbit_neuron, tb_chimera_cell, tb_spi_slave, tb_hw_correlator | each block against an independent reference | seconds |
| tb_pbit_chip | full array, pins only. Bias patterns, freeze by `run` and by CS_N, couplings across cells, edge masking. | ~30 s |
| tb_pbit_system | full size, end to end. Max-Cut-style rank-1 instance whose ground state draws "IEEE". The anneal must reach the exact ground state, then SPI samples go through the correlator. Counts each mechanism. | ~2 min |
| tb_and_learning | AND gate with copy output learned on a chip with 15 % mismatch. KL divergence falls from 1.27 to about 0.27; about 77 % of samples are valid rows. | ~1 min |
| tb_bias_sweep | all 440 p-bits swept from -127 to +127 with mismatch. The chip mean follows tanh; the per-p-bit spread is visible. | ~40 s |
| tb_sk_anneal | spin glass with Gaussian couplings. Energy falls from about 0 to about -0.66 sum\|J\| during annealing. | ~10 s |

The workload testbenches read the spin latches hierarchically instead of over
SPI, because one SPI pass takes 130k clocks. `tb_and_learning` uses 1000
samples per iteration, where the silicon flow used 10,000.

## Departures from the source chip, and what is not modelled

- **Analog circuits:** DACs, multipliers, tanh, RNG DAC, comparator and bias
  generation are a behavioural model. Power, noise, settling time and the pads
  are not modelled.
- **Registers per cell:** 32, not the 28 the source labels, so that every edge
  of the Chimera graph has a register. The register map is this design's.
- **Update scheduling:** the slot scheme and the LFSR polynomials are this
  design's. They reproduce the stated properties: at most 16 cells per clock,
  forward and reversed bit sequences for the two layers, and joint layer
  updates allowed. Clock enables replace randomised clocks.
- **SPI protocol, capture-on-select and the `run` pin:** this design's
  choices. The source only states that SPI loads weights and reads spins.
- **Coupling range:** at `v_temp = 1` a full-scale coupling contributes
  tanh(1) = 0.76. This limits how strong a learned correlation can get, for
  example C1-C2 reaches about 0.7 instead of 1 in `tb_and_learning`. Raise
  `k_weight` or `v_temp` for stiffer couplings.
- **Full adder:** the source also learns a full-adder distribution. Its graph
  embedding is not specified, so no testbench for it is provided.
