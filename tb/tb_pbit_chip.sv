// tb_pbit_chip: the full 440 p-bit array, driven only through its pins.
// At a near-zero temperature (v_temp = 20) the spins become deterministic, so
// the test can predict them:
//   1. biases of +-100 on every p-bit in a random pattern: after running, an
//      SPI read returns exactly that pattern, and the coefficients come back;
//   2. run low: new biases are loaded but the spins hold; run high: they follow;
//   3. couplings across cells: column 0 forms a ferromagnetic chain of vertical
//      p-bits from a biased cell at the top, row 0 an anti-ferromagnetic chain
//      of horizontal p-bits; the registers for the missing neighbours at the
//      array edge (below cell (5,0), right of cell (0,7)) are loaded with
//      values that would flip the result if they were used.
// Also checks that no p-bit updates while CS_N is low.
module tb_pbit_chip;
  import pbit_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 0.99, v_temp = 20.0;
  int checks = 0, failures = 0, busy_updates = 0;
  logic [CHAIN_BITS-1:0] img, rd;
  logic [NPBITS-1:0] pat, spins;

  pbit_chip dut (.clk, .rst_n, .run, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
                 .k_weight, .k_bias, .k_rng, .v_temp);

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.busy && (dut.upd_v != 0 || dut.upd_h != 0)) busy_updates++;

  function automatic coef_t cf(int w); return '{en: 1'b1, w: 8'(w)}; endfunction

  // register r of cell c in the chain image
  task automatic set_reg(int c, int r, coef_t v);
    img[c * CELL_SCAN_BITS + r * REG_BITS +: REG_BITS] = v;
  endtask

  // p-bit p = 8 * cell + (0..3 vertical, 4..7 horizontal)
  function automatic int bias_reg(int p);
    return (p % 8 < 4) ? REG_BV + p % 8 : REG_BH + p % 8 - 4;
  endfunction

  // spins of all cells out of a read-back image
  function automatic logic [NPBITS-1:0] spins_of(logic [CHAIN_BITS-1:0] r);
    logic [NPBITS-1:0] s;
    for (int c = 0; c < NCELLS; c++) s[c * 8 +: 8] = r[c * CELL_SCAN_BITS + CFG_BITS +: 8];
    return s;
  endfunction

  // one full SPI pass: write img, read the chain
  task automatic spi_pass();
    cs_n = 0; repeat (8) @(posedge clk);
    for (int b = CHAIN_BITS - 1; b >= 0; b--) begin
      mosi = img[b]; repeat (4) @(posedge clk);
      sclk = 1; rd[b] = miso; repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk); cs_n = 1; repeat (4) @(posedge clk);
  endtask

  task automatic check_cfg(string what);
    checks++;
    for (int c = 0; c < NCELLS; c++)
      if (rd[c * CELL_SCAN_BITS +: CFG_BITS] !== img[c * CELL_SCAN_BITS +: CFG_BITS]) begin
        failures++; $display("%s: coefficients of cell %0d read back wrong", what, c); break;
      end
  endtask

  task automatic check_spins(logic [NPBITS-1:0] want, logic [NPBITS-1:0] mask, string what);
    int bad = 0;
    spins = spins_of(rd);
    for (int p = 0; p < NPBITS; p++) if (mask[p] && spins[p] !== want[p]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d spins wrong", what, bad); end
  endtask

  initial begin
    img = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: bias pattern
    for (int p = 0; p < NPBITS; p++) begin
      pat[p] = $urandom % 2;
      set_reg(p / 8, bias_reg(p), cf(pat[p] ? 100 : -100));
    end
    spi_pass();
    run = 1; repeat (300) @(posedge clk); run = 0;
    spi_pass();
    check_spins(pat, '1, "bias pattern");
    check_cfg("bias pattern");
    // 2: run low holds the spins
    for (int p = 0; p < NPBITS; p++) set_reg(p / 8, bias_reg(p), cf(pat[p] ? -100 : 100));
    spi_pass();
    repeat (300) @(posedge clk);
    spi_pass();
    check_spins(pat, '1, "run low");
    run = 1; repeat (300) @(posedge clk); run = 0;
    spi_pass();
    check_spins(~pat, '1, "inverted pattern");
    // an SPI pass with run high: the array must stay frozen while CS_N is low
    run = 1;
    spi_pass();
    run = 0;
    check_spins(~pat, '1, "pass with run high");

    // 3: chains across cells
    img = '0;
    begin
      logic [NPBITS-1:0] want, mask;
      want = '0; mask = '0;
      for (int k = 0; k < 4; k++) begin
        set_reg(cell_index(0, 0), REG_BV + k, cf(120));
        set_reg(cell_index(0, 0), REG_BH + k, cf(120));
      end
      for (int r = 0; r < 6; r++)
        for (int k = 0; k < 4; k++) begin
          set_reg(cell_index(r, 0), REG_JDOWN + k, cf(r == 5 ? 127 : 100));
          want[cell_index(r, 0) * 8 + k] = 1'b1; mask[cell_index(r, 0) * 8 + k] = 1'b1;
        end
      for (int c = 0; c < 8; c++)
        for (int k = 0; k < 4; k++) begin
          set_reg(cell_index(0, c), REG_JRIGHT + k, cf(c == 7 ? -127 : -100));
          want[cell_index(0, c) * 8 + 4 + k] = (c % 2 == 0); mask[cell_index(0, c) * 8 + 4 + k] = 1'b1;
        end
      spi_pass();
      run = 1; repeat (2000) @(posedge clk); run = 0;
      spi_pass();
      check_spins(want, mask, "coupling chains");
      check_cfg("coupling chains");
    end
    checks++;
    if (busy_updates != 0) begin failures++; $display("%0d updates during SPI", busy_updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
