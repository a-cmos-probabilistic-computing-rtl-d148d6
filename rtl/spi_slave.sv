// spi_slave: the chip's SPI port, which loads the coefficient registers and
// reads the spins through the scan chain of the unit cells.
//
// The source chip has an SPI interface for loading weights and reading
// spin values; its protocol is this design's. SPI mode 0 (clock idles low, data
// sampled on the rising edge), one bit per SCLK period, no command word: every
// transaction simply shifts the chip-wide scan chain. SCLK, CS_N and MOSI are
// brought into the system clock domain by two-flop synchronisers, so SCLK must
// be slower than the system clock by at least 8x.
//   * CS_N falling: one capture pulse copies all spins into the scan chain,
//     and busy goes high, which freezes the spin updates.
//   * each SCLK rising edge: one shift_en pulse with shift_in = MOSI.
//   * MISO shows the chain's last bit; it changes a few system clocks after
//     each rising SCLK edge, in time for the next one.
// A full transaction is CHAIN_BITS (16280) SCLK periods: the host reads the
// captured spins and the old coefficients and writes new ones in the same pass.
module spi_slave (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  // scan-chain side
  output logic shift_en,
  output logic shift_in,
  output logic capture,
  output logic busy,
  input  logic chain_out
);

  logic [2:0] sclk_q, cs_q;
  logic [1:0] mosi_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sclk_q <= '0;
      cs_q   <= '1;
      mosi_q <= '0;
    end else begin
      sclk_q <= {sclk_q[1:0], sclk};
      cs_q   <= {cs_q[1:0], cs_n};
      mosi_q <= {mosi_q[0], mosi};
    end

  assign busy     = ~cs_q[1];
  assign capture  = cs_q[2] & ~cs_q[1];
  assign shift_en = busy & sclk_q[1] & ~sclk_q[2];
  assign shift_in = mosi_q[1];
  assign miso     = chain_out;

endmodule
