// pbit_chip: the 440 p-bit probabilistic computer, 55 Chimera unit cells on a
// 7 x 8 grid whose bottom-left position holds the bias and SPI block.
//
// Each p-bit samples sgn(tanh(beta * I) + r) from its six neighbours and its
// bias (see pbit_neuron). The update_clock_gen strobes pick, every clock, at
// most 16 cells whose vertical layer latches new spins and at most 16 whose
// horizontal layer does, so the array performs a quasi-asynchronous block-Gibbs
// sampling of the Boltzmann distribution set by the coefficients. All of this
// follows the source chip description; the strobe scheme's details are this design's.
//
// Cell (row, col), rows counted from the top, has the linear index given by
// pbit_pkg::cell_index (row-major, skipping the bias block). Cells at the edge
// of the grid or next to the bias block have no neighbour on that side: the
// coupling is disabled and the neighbour spin reads 0.
//
// Configuration and read-out go through one scan chain that runs from the SPI
// MOSI pin through cells 0, 1, ..., 54 to MISO (see spi_slave and
// chimera_cell for the bit order). While CS_N is low, and whenever run is low,
// no p-bit updates; the cell LFSRs keep running.
//
// The four global scales (k_weight, k_bias, k_rng, v_temp) stand for the
// externally set analog bias inputs; v_temp sets the inverse temperature and
// is what an annealing schedule changes. MISMATCH (0 = ideal) gives each neuron
// model a fixed pseudo-random offset and slope error of that relative size.
module pbit_chip
  import pbit_pkg::*;
#(
  parameter real MISMATCH = 0.0
) (
  input  logic clk,         // LFSR and update clock (200 MHz on silicon)
  input  logic rst_n,
  input  logic run,         // 1: p-bits sample; 0: spins held
  input  logic spi_sclk,
  input  logic spi_cs_n,
  input  logic spi_mosi,
  output logic spi_miso,
  input  real  k_weight,
  input  real  k_bias,
  input  real  k_rng,
  input  real  v_temp
);

  logic [NCELLS-1:0] upd_v, upd_h;
  logic [NCELLS-1:0][3:0] sv, sh;
  coef_t [NCELLS-1:0][3:0] jdown, jright;
  logic [NCELLS:0] chain;
  logic shift_en, shift_in, capture, busy;

  spi_slave u_spi (
    .clk, .rst_n, .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .shift_en, .shift_in, .capture, .busy, .chain_out(chain[NCELLS])
  );

  update_clock_gen #(.NCELLS(NCELLS)) u_clkgen (
    .clk, .rst_n, .en(run & ~busy), .upd_v, .upd_h
  );

  assign chain[0] = shift_in;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      localparam int IDX = cell_index(r, c);
      localparam int UP  = cell_index(r - 1, c);
      localparam int DN  = cell_index(r + 1, c);
      localparam int LF  = cell_index(r, c - 1);
      localparam int RT  = cell_index(r, c + 1);
      if (IDX >= 0) begin : g_cell
        logic [3:0] v_up, v_dn, h_lf, h_rt;
        coef_t [3:0] j_up, j_left;
        if (UP >= 0) begin : g_up
          assign v_up = sv[UP];
          assign j_up = jdown[UP];
        end else begin : g_noup
          assign v_up = '0;
          assign j_up = '0;
        end
        if (LF >= 0) begin : g_lf
          assign h_lf   = sh[LF];
          assign j_left = jright[LF];
        end else begin : g_nolf
          assign h_lf   = '0;
          assign j_left = '0;
        end
        if (DN >= 0) begin : g_dn
          assign v_dn = sv[DN];
        end else begin : g_nodn
          assign v_dn = '0;
        end
        if (RT >= 0) begin : g_rt
          assign h_rt = sh[RT];
        end else begin : g_nort
          assign h_rt = '0;
        end

        chimera_cell #(
          .CELL_ID (IDX),
          .RNG_SEED(32'h1F2E_3D4C ^ (32'(IDX + 1) * 32'h0101_7F3B)),
          .MISMATCH(MISMATCH),
          .HAS_DOWN (DN >= 0),
          .HAS_RIGHT(RT >= 0)
        ) u_cell (
          .clk, .rst_n,
          .upd_v(upd_v[IDX]), .upd_h(upd_h[IDX]), .rng_en(1'b1),
          .scan_en(shift_en), .capture, .scan_in(chain[IDX]), .scan_out(chain[IDX+1]),
          .v(sv[IDX]), .h(sh[IDX]),
          .v_up_i(v_up), .v_dn_i(v_dn), .h_lf_i(h_lf), .h_rt_i(h_rt),
          .j_up_i(j_up), .j_left_i(j_left),
          .j_down_o(jdown[IDX]), .j_right_o(jright[IDX]),
          .k_weight, .k_bias, .k_rng, .v_temp
        );
      end
    end
  end


endmodule
