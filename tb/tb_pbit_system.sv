// tb_pbit_system: end-to-end run of the whole system at its default size
// (440 p-bits), driven the way the host drives it.
//
// Problem: a rank-1 Max-Cut-style instance on the full Chimera graph. Every
// edge (p, q) gets J = +127 when the target picture s gives p and q the same
// value and -127 otherwise, so the two ground states are s and its inverse.
// The picture is the word "IEEE" drawn on a 32 x 14 grid of spin indices.
// Biases are loaded with their enable bit cleared and large weights, and the
// registers for missing neighbours at the array edge hold large enabled
// weights: neither may change the result.
// Flow: load over SPI; run with v_temp ramped from hot (0.05) to cold (4.0),
// the on-chip annealing knob, over 40 steps; read the spins over SPI and check that they are
// a ground state. Then sample at high temperature and at low temperature over
// SPI, feed 8 observed spins to the correlator and check its counts against
// counts kept here. Each mechanism (SPI load, SPI read, freeze by run, freeze
// by CS_N, randomised update, joint layer update, annealing step, correlator
// count and clear) is counted and must happen at least once.
module tb_pbit_system;
  import pbit_pkg::*;
  localparam int ANNEAL_STEP = 500;
  localparam int NOBS = 8, CW = 14, NP = NOBS * (NOBS - 1) / 2;
  logic clk = 0, rst_n = 0, run = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 1.0, v_temp = 0.05;
  logic corr_clear = 0, corr_valid = 0;
  logic [NOBS-1:0] corr_sample = 0;
  logic [CW-1:0] corr_n;
  logic [NOBS-1:0][CW-1:0] corr_ones;
  logic [NP-1:0][CW-1:0] corr_agree;
  int checks = 0, failures = 0;
  logic [CHAIN_BITS-1:0] img, rd;
  logic [NPBITS-1:0] s, spins;
  int n_load = 0, n_read = 0, n_freeze_run = 0, n_freeze_cs = 0, n_upd = 0, n_joint = 0;
  int n_anneal = 0, n_corr = 0, n_clear = 0, max_upd = 0;
  int r_n, r_ones [NOBS], r_agree [NP];

  pbit_system dut (
    .clk, .rst_n, .run, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .k_weight, .k_bias, .k_rng, .v_temp,
    .corr_clear, .corr_valid, .corr_sample, .corr_n, .corr_ones, .corr_agree
  );

  always #5 clk = ~clk;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the chip's update strobes
  always @(posedge clk) if (rst_n) begin
    automatic int nv = $countones(dut.u_chip.upd_v);
    if (nv > max_upd) max_upd = nv;
    if (dut.u_chip.upd_v != 0 || dut.u_chip.upd_h != 0) n_upd++;
    if ((dut.u_chip.upd_v & dut.u_chip.upd_h) != 0) n_joint++;
    if (!run && !dut.u_chip.busy) n_freeze_run++;
    if (run && dut.u_chip.busy) begin
      n_freeze_cs++;
      if (dut.u_chip.upd_v != 0 || dut.u_chip.upd_h != 0) begin
        failures++; $display("update during SPI");
      end
    end
  end

  function automatic coef_t cf(int w); return '{en: 1'b1, w: 8'(w)}; endfunction

  task automatic set_reg(int c, int r, coef_t v);
    img[c * CELL_SCAN_BITS + r * REG_BITS +: REG_BITS] = v;
  endtask

  // the "IEEE" picture: spin p sits at column p % 32, row p / 32
  function automatic logic pixel(int p);
    int x, y, letter;
    letter = (p % 32) / 8; x = (p % 32) % 8; y = p / 32;
    if (y < 4 || x < 1 || x > 6) return 1'b0;
    if (letter == 0) return (y <= 5 || y >= 12 || x == 3 || x == 4);
    return (x <= 2 || y <= 5 || y >= 12 || y == 8 || y == 9);
  endfunction

  function automatic logic [NPBITS-1:0] spins_of(logic [CHAIN_BITS-1:0] r);
    logic [NPBITS-1:0] v;
    for (int c = 0; c < NCELLS; c++) v[c * 8 +: 8] = r[c * CELL_SCAN_BITS + CFG_BITS +: 8];
    return v;
  endfunction

  task automatic spi_pass();
    cs_n = 0; repeat (8) @(posedge clk);
    for (int b = CHAIN_BITS - 1; b >= 0; b--) begin
      mosi = img[b]; repeat (4) @(posedge clk);
      sclk = 1; rd[b] = miso; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (4) @(posedge clk);
    n_load++; n_read++;
  endtask

  // energy -sum J m m over the programmed edges, in units of one coupling
  function automatic int energy(logic [NPBITS-1:0] m);
    int e = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int ci = cell_index(r, c);
        if (ci < 0) continue;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++)
            e -= ((s[ci*8+i] == s[ci*8+4+j]) ? 1 : -1) * ((m[ci*8+i] == m[ci*8+4+j]) ? 1 : -1);
          if (cell_index(r + 1, c) >= 0) begin
            int d = cell_index(r + 1, c);
            e -= ((s[ci*8+i] == s[d*8+i]) ? 1 : -1) * ((m[ci*8+i] == m[d*8+i]) ? 1 : -1);
          end
          if (cell_index(r, c + 1) >= 0) begin
            int d = cell_index(r, c + 1);
            e -= ((s[ci*8+4+i] == s[d*8+4+i]) ? 1 : -1) * ((m[ci*8+4+i] == m[d*8+4+i]) ? 1 : -1);
          end
        end
      end
    return e;
  endfunction

  task automatic sample_to_correlator(logic [NOBS-1:0] smp);
    int p = 0;
    #1 corr_sample = smp; corr_valid = 1;
    @(posedge clk); #1 corr_valid = 0;
    r_n++;
    for (int i = 0; i < NOBS; i++) begin
      r_ones[i] += int'(smp[i]);
      for (int j = i + 1; j < NOBS; j++) begin r_agree[p] += int'(smp[i] == smp[j]); p++; end
    end
    n_corr++;
  endtask

  task automatic check_corr(string what);
    checks++;
    if (int'(corr_n) != r_n) begin failures++; $display("%s: sample count", what); end
    for (int i = 0; i < NOBS; i++) begin
      checks++; if (int'(corr_ones[i]) != r_ones[i]) begin failures++; $display("%s: ones[%0d]", what, i); end
    end
    for (int p = 0; p < NP; p++) begin
      checks++; if (int'(corr_agree[p]) != r_agree[p]) begin failures++; $display("%s: agree[%0d]", what, p); end
    end
  endtask

  initial begin
    int e_hot, e_cold, e_ground;
    img = '0;
    for (int p = 0; p < NPBITS; p++) s[p] = pixel(p);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int ci = cell_index(r, c);
        if (ci < 0) continue;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++)
            set_reg(ci, 4 * i + j, cf(s[ci*8+i] == s[ci*8+4+j] ? 127 : -127));
          if (cell_index(r + 1, c) >= 0)
            set_reg(ci, REG_JDOWN + i, cf(s[ci*8+i] == s[cell_index(r + 1, c)*8+i] ? 127 : -127));
          else
            set_reg(ci, REG_JDOWN + i, cf(-127));      // no cell below: must be ignored
          if (cell_index(r, c + 1) >= 0)
            set_reg(ci, REG_JRIGHT + i, cf(s[ci*8+4+i] == s[cell_index(r, c + 1)*8+4+i] ? 127 : -127));
          else
            set_reg(ci, REG_JRIGHT + i, cf(127));      // no cell to the right: must be ignored
          set_reg(ci, REG_BV + i, '{en: 1'b0, w: 8'sd127});   // disabled biases
          set_reg(ci, REG_BH + i, '{en: 1'b0, w: -8'sd127});
        end
      end
    e_ground = energy(s);
    for (int i = 0; i < NOBS; i++) r_ones[i] = 0;
    for (int p = 0; p < NP; p++) r_agree[p] = 0;
    r_n = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    spi_pass();                                  // load
    // hot phase
    run = 1; repeat (500) @(posedge clk); run = 0;
    spi_pass();
    e_hot = energy(spins_of(rd));
    sample_to_correlator(spins_of(rd)[NOBS-1:0]);
    // anneal: v_temp from 0.05 up to 4.0 in 40 geometric steps
    run = 1;
    for (int t = 0; t < 40; t++) begin
      v_temp = 0.05 * $pow(80.0, real'(t) / 39.0);
      n_anneal++;
      repeat (ANNEAL_STEP) @(posedge clk);
    end
    run = 0;
    repeat (20) @(posedge clk);                  // held by run low
    spi_pass();
    spins = spins_of(rd);
    e_cold = energy(spins);
    $display("energy: hot %0d, after annealing %0d, ground %0d", e_hot, e_cold, e_ground);
    checks++;
    if (spins !== s && spins !== ~s) begin
      int bad = 0;
      for (int p = 0; p < NPBITS; p++) bad += int'(spins[p] != s[p]);
      failures++; $display("not a ground state: %0d of 440 spins differ from the picture", bad);
    end
    checks++; if (e_cold != e_ground) failures++;
    checks++; if (e_cold >= e_hot) begin failures++; $display("annealing did not lower the energy"); end
    sample_to_correlator(spins[NOBS-1:0]);
    // one more cold sample, taken with run held high through the SPI pass
    run = 1; repeat (200) @(posedge clk);
    spi_pass(); run = 0;
    sample_to_correlator(spins_of(rd)[NOBS-1:0]);
    @(posedge clk); #1;
    check_corr("samples");
    corr_clear = 1; @(posedge clk); #1 corr_clear = 0; n_clear++;
    r_n = 0;
    for (int i = 0; i < NOBS; i++) r_ones[i] = 0;
    for (int p = 0; p < NP; p++) r_agree[p] = 0;
    check_corr("clear");

    // every mechanism must have happened
    begin
      int cnt [10];
      string nm [10];
      cnt = '{n_load, n_read, n_freeze_run, n_freeze_cs, n_upd, n_joint, n_anneal, n_corr, n_clear, max_upd};
      nm  = '{"SPI load", "SPI read", "freeze by run", "freeze by CS_N", "randomised update",
              "joint layer update", "annealing step", "correlator sample", "correlator clear", "cells per cycle"};
      for (int k = 0; k < 10; k++) begin
        $display("%-20s %0d", nm[k], cnt[k]);
        checks++; if (cnt[k] == 0) begin failures++; $display("mechanism %s never happened", nm[k]); end
      end
      checks++; if (max_upd > 16) begin failures++; $display("more than 16 cells updated in a cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
