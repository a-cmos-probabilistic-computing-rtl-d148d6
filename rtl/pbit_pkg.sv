// pbit_pkg: constants and types shared by the p-bit Chimera chip.
//
// The chip holds 440 p-bits in 55 Chimera unit cells. The cells sit on a grid of
// 7 rows by 8 columns; the cell position at the bottom-left corner (row 6,
// column 0) is taken by the bias and SPI block, so it holds no p-bits. Each cell
// is a 4x4 restricted Boltzmann machine: four "vertical" p-bits (v0..v3) and four
// "horizontal" p-bits (h0..h3). Every vertical p-bit couples to every horizontal
// p-bit of its cell; vertical p-bit k also couples to vertical p-bit k of the
// cells above and below, horizontal p-bit k to horizontal p-bit k of the cells to
// the left and right. Each p-bit thus sees six couplings plus its own bias.
//
// Coefficients are 9-bit registers: bit 8 is the enable bit, bits 7:0 an 8-bit
// two's-complement weight. A cleared enable bit forces the coupling current to
// zero whatever the weight. The register map of one cell (32 registers) is a
// choice of this design:
//   0..15  intra-cell coupling J(v_i, h_j), register 4*i + j
//   16..19 coupling of v_k to v_k of the cell below
//   20..23 coupling of h_k to h_k of the cell to the right
//   24..27 bias of v_k
//   28..31 bias of h_k
// A coupling across two cells is stored once, in the cell above or to the left.
// A spin is 1 for +1 and 0 for -1.
package pbit_pkg;

  localparam int unsigned ROWS        = 7;
  localparam int unsigned COLS        = 8;
  localparam int unsigned BIAS_ROW    = 6;   // cell position given to the bias block
  localparam int unsigned BIAS_COL    = 0;
  localparam int unsigned NCELLS      = ROWS * COLS - 1;   // 55
  localparam int unsigned PBITS_PER_CELL = 8;
  localparam int unsigned NPBITS      = NCELLS * PBITS_PER_CELL;  // 440
  localparam int unsigned NREGS       = 32;  // coefficient registers per cell
  localparam int unsigned WBITS       = 8;   // weight precision
  localparam int unsigned REG_BITS    = WBITS + 1;  // weight plus enable bit
  localparam int unsigned CFG_BITS    = NREGS * REG_BITS;          // 288
  localparam int unsigned CELL_SCAN_BITS = CFG_BITS + PBITS_PER_CELL;  // 296
  localparam int unsigned CHAIN_BITS  = NCELLS * CELL_SCAN_BITS;   // 16280
  localparam int unsigned NFANIN      = 6;   // coupling inputs per p-bit

  // Register indices inside a cell.
  localparam int unsigned REG_JDOWN  = 16;
  localparam int unsigned REG_JRIGHT = 20;
  localparam int unsigned REG_BV     = 24;
  localparam int unsigned REG_BH     = 28;

  // One coefficient register.
  typedef struct packed {
    logic              en;
    logic signed [7:0] w;
  } coef_t;

  // Linear index of the cell at (row, col), or -1 where no cell sits.
  function automatic int cell_index(input int row, input int col);
    int idx;
    if (row < 0 || col < 0 || row >= int'(ROWS) || col >= int'(COLS)) return -1;
    if (row == int'(BIAS_ROW) && col == int'(BIAS_COL)) return -1;
    idx = row * int'(COLS) + col;
    if (row > int'(BIAS_ROW) || (row == int'(BIAS_ROW) && col > int'(BIAS_COL))) idx = idx - 1;
    return idx;
  endfunction

  // Bit-reversal of a byte.
  function automatic logic [7:0] rev8(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  // Deterministic pseudo-random number in [-1, 1) for instance n and stream k,
  // used to give every neuron model its own static mismatch.
  function automatic real mismatch_u(input int n, input int k);
    logic [31:0] x;
    x = 32'(n) * 32'h9E37_79B9 + 32'(k) * 32'h85EB_CA6B + 32'h2545_F491;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return real'(x[23:0]) / 8388608.0 - 1.0;
  endfunction

endpackage
