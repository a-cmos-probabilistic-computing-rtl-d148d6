// cell_rng: the random-number source of one Chimera unit cell.
//
// A 32-bit Fibonacci LFSR (taps 32, 22, 2, 1, a maximal-length polynomial) is
// read as four 8-bit uniform random numbers, one per pair of p-bits. The
// source chip lists the block as "32b LFSR, 4x8b RNG" and runs the LFSRs from
// a 200 MHz clock; the polynomial, the number of LFSR steps per clock (STEPS,
// 32 by default so every clock gives four fresh bytes) and the seed are this
// design's choices. The seed must be nonzero; each cell gets its own seed.
//
// Interface: rnd[k] is byte k of the LFSR state, bits 8k+7..8k. The neuron
// takes it as PRBS<7:0> and its complement as PRBSN<7:0>.
// Timing: the state is loaded with SEED during reset and advances STEPS
// shifts on every rising clock edge while en is high.
module cell_rng #(
  parameter logic [31:0] SEED  = 32'hACE1_2468,
  parameter int unsigned STEPS = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  output logic [3:0][7:0] rnd
);

  logic [31:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int s = 0; s < int'(STEPS); s++)
      nxt = {nxt[30:0], nxt[31] ^ nxt[21] ^ nxt[1] ^ nxt[0]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;

  assign rnd = state;

  // An all-zero state would lock the LFSR.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
