// tb_sk_anneal: simulated annealing of a spin glass on all 440 p-bits.
// Every edge of the Chimera graph gets a random coupling drawn from a Gaussian
// (standard deviation 60 codes, clipped to +-127); biases are disabled. The
// testbench loads the couplings over SPI, then raises v_temp (the inverse
// temperature) from 0.05 to 4.0 in 40 geometric steps of 300 clocks, and after
// each step computes the energy E = -sum J_ij m_i m_j (in units of full-scale
// couplings) from the spin latches. Checks: the energy falls from the hot
// start to the cold end, the cold third lies below the hot third, and the
// final energy is below -0.5 * sum |J_ij| (a hot, random state sits near 0).
module tb_sk_anneal;
  import pbit_pkg::*;
  localparam int NSTEP = 40;
  logic clk = 0, rst_n = 0, run = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 1.0, v_temp = 0.05;
  int checks = 0, failures = 0;
  logic [CHAIN_BITS-1:0] img;
  real e [NSTEP];
  real sum_abs;

  pbit_chip dut (
    .clk, .rst_n, .run, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .k_weight, .k_bias, .k_rng, .v_temp
  );

  always #5 clk = ~clk;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wcode(int c, int r);
    return int'($signed(img[c * CELL_SCAN_BITS + r * REG_BITS +: 8]));
  endfunction

  function automatic real spin(logic b); return b ? 1.0 : -1.0; endfunction

  // energy from the chip's spin latches and the loaded couplings
  function automatic real energy();
    real en = 0.0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int ci, dn, rt;
        ci = cell_index(r, c); dn = cell_index(r + 1, c); rt = cell_index(r, c + 1);
        if (ci < 0) continue;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++)
            en -= wcode(ci, 4 * i + j) / 127.0 * spin(dut.sv[ci][i]) * spin(dut.sh[ci][j]);
          if (dn >= 0) en -= wcode(ci, REG_JDOWN + i) / 127.0 * spin(dut.sv[ci][i]) * spin(dut.sv[dn][i]);
          if (rt >= 0) en -= wcode(ci, REG_JRIGHT + i) / 127.0 * spin(dut.sh[ci][i]) * spin(dut.sh[rt][i]);
        end
      end
    return en;
  endfunction

  function automatic int gauss_code();
    real u1, u2, g;
    int c;
    u1 = (real'($urandom % 1000000) + 0.5) / 1000000.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    g = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
    c = int'(60.0 * g);
    return (c > 127) ? 127 : (c < -127) ? -127 : c;
  endfunction

  task automatic put(int c, int r, int w);
    img[c * CELL_SCAN_BITS + r * REG_BITS +: REG_BITS] = {1'b1, 8'(w)};
    sum_abs += ((w < 0) ? -w : w) / 127.0;
  endtask

  initial begin
    real hot, cold;
    img = '0; sum_abs = 0.0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int ci;
        ci = cell_index(r, c);
        if (ci < 0) continue;
        for (int i = 0; i < 16; i++) put(ci, i, gauss_code());
        if (cell_index(r + 1, c) >= 0) for (int i = 0; i < 4; i++) put(ci, REG_JDOWN + i, gauss_code());
        if (cell_index(r, c + 1) >= 0) for (int i = 0; i < 4; i++) put(ci, REG_JRIGHT + i, gauss_code());
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cs_n = 0; repeat (8) @(posedge clk);
    for (int b = CHAIN_BITS - 1; b >= 0; b--) begin
      mosi = img[b]; repeat (4) @(posedge clk);
      sclk = 1; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (4) @(posedge clk);
    run = 1;
    for (int t = 0; t < NSTEP; t++) begin
      v_temp = 0.05 * $pow(80.0, real'(t) / real'(NSTEP - 1));
      repeat (300) @(posedge clk);
      e[t] = energy();
      if (t % 5 == 0 || t == NSTEP - 1) $display("step %0d v_temp %6.3f energy %8.2f", t, v_temp, e[t]);
    end
    hot = 0.0; cold = 0.0;
    for (int t = 0; t < NSTEP / 3; t++) begin hot += e[t]; cold += e[NSTEP - 1 - t]; end
    $display("sum |J| = %0.2f", sum_abs);
    checks++; if (!(e[NSTEP-1] < e[0])) begin failures++; $display("energy did not fall"); end
    checks++; if (!(cold < hot)) begin failures++; $display("cold third not below hot third"); end
    checks++; if (!(e[NSTEP-1] < -0.5 * sum_abs)) begin failures++; $display("final energy too high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
