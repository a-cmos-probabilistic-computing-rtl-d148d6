// tb_and_learning: hardware-aware learning of a probabilistic AND gate on the
// full 440 p-bit system, with every neuron given a static offset and slope
// error (MISMATCH = 0.15).
//
// The gate C = A AND B is embedded with a copy of C on a 4-cycle of unit cell
// 0: A = v0, B = h0, C2 = v1, C1 = h1, using the couplings A-B, A-C1, B-C2
// and C1-C2. The targets are the statistics of the four valid states, each
// with probability 1/4: mean spins A = B = 0, C1 = C2 = -0.5; correlations
// A-B = 0, A-C1 = B-C2 = 0.5, C1-C2 = 1.
// Each iteration the testbench, acting as the host: writes the coefficients
// over SPI, lets the chip run, takes S samples of cell 0 into the hardware
// correlator, reads its counts, and updates
//   J += eps * (corr_ideal - corr_model),  h += eps * (bias_ideal - bias_model)
// on 8-bit codes. Samples are taken from the spin latches directly rather than
// over SPI (one SPI read takes 130k clocks), and S is 1000 instead of the
// 10,000 used on silicon, to keep the simulation short.
// Checks: the KL divergence of the sampled (A, B, C1, C2) distribution from the
// ideal one falls well below its first value, and at the end most samples
// are valid AND states.
module tb_and_learning;
  import pbit_pkg::*;
  localparam int S = 1000, ITERS = 24, NOBS = 8, NP = 28;
  localparam int IA = 0, IB = 4, IC2 = 1, IC1 = 5;   // positions in {h, v} of cell 0
  logic clk = 0, rst_n = 0, run = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 1.0, v_temp = 1.0;
  logic corr_clear = 0, corr_valid = 0;
  logic [NOBS-1:0] corr_sample = 0;
  logic [13:0] corr_n;
  logic [NOBS-1:0][13:0] corr_ones;
  logic [NP-1:0][13:0] corr_agree;
  int checks = 0, failures = 0;
  logic [CHAIN_BITS-1:0] img;
  real jab, jac1, jbc2, jc1c2, ha, hb, hc1, hc2;
  int hist [16];

  pbit_system #(.MISMATCH(0.15)) dut (
    .clk, .rst_n, .run, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .k_weight, .k_bias, .k_rng, .v_temp,
    .corr_clear, .corr_valid, .corr_sample, .corr_n, .corr_ones, .corr_agree
  );

  always #5 clk = ~clk;
  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t code(real x);
    int c;
    c = int'(x * 127.0);
    if (c > 127) c = 127;
    if (c < -127) c = -127;
    return '{en: 1'b1, w: 8'(c)};
  endfunction

  function automatic real clip(real x);
    return (x > 1.0) ? 1.0 : (x < -1.0) ? -1.0 : x;
  endfunction

  task automatic set_reg(int c, int r, coef_t v);
    img[c * CELL_SCAN_BITS + r * REG_BITS +: REG_BITS] = v;
  endtask

  task automatic spi_write();
    img = '0;
    set_reg(0, 4 * 0 + 0, code(jab));     // J(v0 = A, h0 = B)
    set_reg(0, 4 * 0 + 1, code(jac1));    // J(v0 = A, h1 = C1)
    set_reg(0, 4 * 1 + 0, code(jbc2));    // J(v1 = C2, h0 = B)
    set_reg(0, 4 * 1 + 1, code(jc1c2));   // J(v1 = C2, h1 = C1)
    set_reg(0, REG_BV + 0, code(ha));
    set_reg(0, REG_BH + 0, code(hb));
    set_reg(0, REG_BV + 1, code(hc2));
    set_reg(0, REG_BH + 1, code(hc1));
    cs_n = 0; repeat (8) @(posedge clk);
    for (int b = CHAIN_BITS - 1; b >= 0; b--) begin
      mosi = img[b]; repeat (4) @(posedge clk);
      sclk = 1; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (4) @(posedge clk);
  endtask

  // pair index of (i, j), i < j, in the correlator's order
  function automatic int pidx(int i, int j);
    int p = 0;
    for (int a = 0; a < NOBS; a++)
      for (int b = a + 1; b < NOBS; b++) begin
        if (a == i && b == j) return p;
        p++;
      end
    return -1;
  endfunction

  function automatic real corr(int i, int j);
    int a, b;
    a = (i < j) ? i : j; b = (i < j) ? j : i;
    return 2.0 * real'(corr_agree[pidx(a, b)]) / real'(S) - 1.0;
  endfunction
  function automatic real bias(int i);
    return 2.0 * real'(corr_ones[i]) / real'(S) - 1.0;
  endfunction

  initial begin
    real eps, kl, kl_first, valid_frac;
    eps = 0.6;
    jab = 0; jac1 = 0; jbc2 = 0; jc1c2 = 0; ha = 0; hb = 0; hc1 = 0; hc2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < ITERS; it++) begin
      spi_write();
      run = 1;
      repeat (200) @(posedge clk);
      #1 corr_clear = 1; @(posedge clk); #1 corr_clear = 0;
      for (int k = 0; k < 16; k++) hist[k] = 0;
      for (int n = 0; n < S; n++) begin
        logic [7:0] smp;
        repeat (16) @(posedge clk);
        #1 smp = {dut.u_chip.sh[0], dut.u_chip.sv[0]};
        corr_sample = smp; corr_valid = 1;
        hist[{smp[IA], smp[IB], smp[IC1], smp[IC2]}]++;
        @(posedge clk); #1 corr_valid = 0;
      end
      run = 0;
      @(posedge clk); #1;
      // KL(P_ideal || P_exp) over (A, B, C1, C2); empty bins get half a count
      kl = 0.0;
      foreach (hist[k]) begin
        logic a, b, c1, c2;
        {a, b, c1, c2} = 4'(k);
        if (c1 == (a & b) && c2 == (a & b))
          kl += 0.25 * $ln(0.25 / ((hist[k] == 0 ? 0.5 : real'(hist[k])) / real'(S)));
      end
      valid_frac = real'(hist[4'b0000] + hist[4'b0100] + hist[4'b1000] + hist[4'b1111]) / real'(S);
      if (it == 0) kl_first = kl;
      $display("iter %0d: KL %f valid %f  bias A %f B %f C1 %f C2 %f  corr AB %f AC1 %f BC2 %f C1C2 %f",
               it, kl, valid_frac, bias(IA), bias(IB), bias(IC1), bias(IC2),
               corr(IA, IB), corr(IA, IC1), corr(IB, IC2), corr(IC1, IC2));
      // host update
      ha    = clip(ha    + eps * (0.0  - bias(IA)));
      hb    = clip(hb    + eps * (0.0  - bias(IB)));
      hc1   = clip(hc1   + eps * (-0.5 - bias(IC1)));
      hc2   = clip(hc2   + eps * (-0.5 - bias(IC2)));
      jab   = clip(jab   + eps * (0.0  - corr(IA, IB)));
      jac1  = clip(jac1  + eps * (0.5  - corr(IA, IC1)));
      jbc2  = clip(jbc2  + eps * (0.5  - corr(IB, IC2)));
      jc1c2 = clip(jc1c2 + eps * (1.0  - corr(IC1, IC2)));
    end
    checks++;
    if (!(kl < 0.5 * kl_first)) begin failures++; $display("KL did not fall: %f -> %f", kl_first, kl); end
    checks++;
    if (!(valid_frac > 0.7)) begin failures++; $display("only %f of samples are valid AND states", valid_frac); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
