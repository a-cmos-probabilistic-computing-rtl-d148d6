// tb_bias_sweep: the bias characterisation of all 440 p-bits, with every
// neuron given a static offset and slope error (MISMATCH = 0.15).
// All couplings are disabled and every bias is set to the same code, swept
// from -127 to +127 in 11 points. At each point the testbench samples every
// p-bit 200 times and forms its mean spin. Checks: the chip-wide mean follows
// tanh(code / 127) (the mismatch averages out), every p-bit's mean rises from
// the first point to the last, and at code 0 the p-bits visibly disagree (the
// spread across p-bits is well above the sampling noise).
module tb_bias_sweep;
  import pbit_pkg::*;
  localparam int NS = 200, NPTS = 11;
  logic clk = 0, rst_n = 0, run = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 1.0, v_temp = 1.0;
  int checks = 0, failures = 0;
  logic [CHAIN_BITS-1:0] img;
  int cnt [NPBITS];
  real first_mean [NPBITS];

  pbit_chip #(.MISMATCH(0.15)) dut (
    .clk, .rst_n, .run, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .k_weight, .k_bias, .k_rng, .v_temp
  );

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic spi_write();
    cs_n = 0; repeat (8) @(posedge clk);
    for (int b = CHAIN_BITS - 1; b >= 0; b--) begin
      mosi = img[b]; repeat (4) @(posedge clk);
      sclk = 1; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pt = 0; pt < NPTS; pt++) begin
      int code;
      real avg, ideal, sd, m;
      code = -127 + pt * 254 / (NPTS - 1);
      img = '0;
      for (int c = 0; c < NCELLS; c++)
        for (int k = 0; k < 8; k++)
          img[c * CELL_SCAN_BITS + (REG_BV + k) * REG_BITS +: REG_BITS] = {1'b1, 8'(code)};
      spi_write();
      run = 1;
      repeat (100) @(posedge clk);
      foreach (cnt[p]) cnt[p] = 0;
      for (int n = 0; n < NS; n++) begin
        repeat (8) @(posedge clk);
        for (int c = 0; c < NCELLS; c++)
          for (int k = 0; k < 4; k++) begin
            cnt[c * 8 + k]     += int'(dut.sv[c][k]);
            cnt[c * 8 + 4 + k] += int'(dut.sh[c][k]);
          end
      end
      run = 0;
      avg = 0.0; sd = 0.0;
      foreach (cnt[p]) avg += 2.0 * cnt[p] / NS - 1.0;
      avg /= NPBITS;
      foreach (cnt[p]) begin m = 2.0 * cnt[p] / NS - 1.0; sd += (m - avg) * (m - avg); end
      sd = $sqrt(sd / NPBITS);
      ideal = $tanh(real'(code) / 127.0);
      $display("bias %4d: mean spin %7.3f (tanh %7.3f), spread across p-bits %6.3f", code, avg, ideal, sd);
      checks++;
      if (avg < ideal - 0.08 || avg > ideal + 0.08) begin failures++; $display("chip mean off the tanh curve"); end
      if (pt == 0) foreach (cnt[p]) first_mean[p] = 2.0 * cnt[p] / NS - 1.0;
      if (pt == NPTS - 1) begin
        int bad = 0;
        foreach (cnt[p]) if (2.0 * cnt[p] / NS - 1.0 <= first_mean[p]) bad++;
        checks++; if (bad != 0) begin failures++; $display("%0d p-bits not rising", bad); end
      end
      // at code 0 sampling noise alone gives a spread of about 1/sqrt(NS) = 0.07
      if (code == 0) begin
        checks++; if (sd < 0.1) begin failures++; $display("no visible mismatch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
