// pbit_system: the probabilistic computer with the correlator of its learning
// loop.
//
// The chip (pbit_chip) samples the Boltzmann distribution set by its 8-bit
// couplings and biases. In the learning loop the host reads spin samples over
// SPI, the correlator (hw_correlator) accumulates their bias and pair
// statistics, and a processor computes new coefficients J += eps*(W_ideal -
// W_model), h += eps*(B_ideal - B_model) and writes them back over SPI. The
// host's SPI master and its processor are outside this RTL, so the chip's SPI
// pins and the correlator's sample input and counts are ports of this top:
// the host connects them. N_OBS sets how many spins the correlator observes.
module pbit_system
  import pbit_pkg::*;
#(
  parameter real         MISMATCH = 0.0,
  parameter int unsigned N_OBS    = 8,
  parameter int unsigned CNT_W    = 14,
  localparam int unsigned NPAIR   = N_OBS * (N_OBS - 1) / 2
) (
  input  logic clk,
  input  logic rst_n,
  // chip
  input  logic run,
  input  logic spi_sclk,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  input  real  k_weight,
  input  real  k_bias,
  input  real  k_rng,
  input  real  v_temp,
  // correlator
  input  logic                        corr_clear,
  input  logic                        corr_valid,
  input  logic [N_OBS-1:0]            corr_sample,
  output logic [CNT_W-1:0]            corr_n,
  output logic [N_OBS-1:0][CNT_W-1:0] corr_ones,
  output logic [NPAIR-1:0][CNT_W-1:0] corr_agree
);

  pbit_chip #(.MISMATCH(MISMATCH)) u_chip (
    .clk, .rst_n, .run, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .k_weight, .k_bias, .k_rng, .v_temp
  );

  hw_correlator #(.N(N_OBS), .CNT_W(CNT_W)) u_corr (
    .clk, .rst_n, .clear(corr_clear), .valid(corr_valid), .sample(corr_sample),
    .n_samples(corr_n), .ones(corr_ones), .agree(corr_agree)
  );

endmodule
