// chimera_cell: one Chimera unit cell, a 4x4 restricted Boltzmann machine of
// eight p-bits.
//
// The cell holds four vertical p-bits v0..v3 and four horizontal p-bits h0..h3.
// Every v couples to every h; there is no coupling inside a layer, so both
// layers may update in the same clock. v_k also couples to v_k of the cells
// above and below, h_k to h_k of the cells left and right: six couplings per
// p-bit, as in the source chip. Its parts, after the source chip's block
// list for a cell: 9-bit coefficient registers (8-bit weight plus enable), the analog
// neurons (pbit_neuron), a 32-bit LFSR giving four 8-bit random numbers
// (cell_rng), and a scan register. The source chip labels the bank "9b Reg x28" for
// a cell; this design holds 32 registers so that every coupling of the Chimera
// graph (16 inside the cell, 4 down, 4 right) and every bias (8) has one, see
// pbit_pkg for the map. A coupling shared by two cells is stored once, in the
// cell above or to the left, and sent to the other cell (j_up_i, j_left_i),
// as the source chip sends one bias voltage to both nodes of a symmetric
// weight.
//
// Random numbers: vertical p-bit k takes byte k of the LFSR, horizontal p-bit
// k the same byte in reverse bit order (this design's sharing of four bytes
// among eight p-bits). PRBSN is the complement of PRBS.
//
// Scan register: the coefficient registers are themselves the shift register.
// scan[287:0] holds registers 31..0 (register r at bits 9r+8..9r), and
// scan[295:288] holds a copy of the spins {h3..h0, v3..v0}. While scan_en is
// high the whole vector shifts one place toward bit 295 per clock, taking
// scan_in into bit 0; scan_out is bit 295. capture copies the spins into
// scan[295:288] (it wins over scan_en).
//
// At the edge of the array (HAS_DOWN / HAS_RIGHT cleared) the registers for the
// missing side stay in the scan chain but are not used.
//
// Timing: a p-bit latches its neuron's comparator output on a clock edge at
// which its layer's strobe (upd_v / upd_h) is high, which makes one update a
// single clock. Spins reset to 0 (-1); registers reset to 0 (disabled).
module chimera_cell
  import pbit_pkg::*;
#(
  parameter int unsigned CELL_ID  = 0,
  parameter logic [31:0] RNG_SEED = 32'hACE1_2468,
  parameter real         MISMATCH = 0.0,  // spread of neuron offset and slope
  parameter bit          HAS_DOWN  = 1'b1, // a cell exists below
  parameter bit          HAS_RIGHT = 1'b1  // a cell exists to the right
) (
  input  logic            clk,
  input  logic            rst_n,
  // update strobes from the clock randomiser
  input  logic            upd_v,
  input  logic            upd_h,
  input  logic            rng_en,
  // scan chain
  input  logic            scan_en,
  input  logic            capture,
  input  logic            scan_in,
  output logic            scan_out,
  // spins of this cell, 1 = +1
  output logic [3:0]      v,
  output logic [3:0]      h,
  // neighbour spins
  input  logic [3:0]      v_up_i,
  input  logic [3:0]      v_dn_i,
  input  logic [3:0]      h_lf_i,
  input  logic [3:0]      h_rt_i,
  // couplings stored in the neighbours above and to the left
  input  coef_t [3:0]     j_up_i,
  input  coef_t [3:0]     j_left_i,
  // couplings stored here for the neighbours below and to the right
  output coef_t [3:0]     j_down_o,
  output coef_t [3:0]     j_right_o,
  // global analog bias inputs
  input  real             k_weight,
  input  real             k_bias,
  input  real             k_rng,
  input  real             v_temp
);

  logic [CELL_SCAN_BITS-1:0] scan;
  coef_t [NREGS-1:0]         regs;
  logic  [3:0][7:0]          rnd;
  logic  [3:0]               mv, mh;

  assign regs     = scan[CFG_BITS-1:0];
  assign scan_out = scan[CELL_SCAN_BITS-1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        scan <= '0;
    else if (capture)  scan[CELL_SCAN_BITS-1:CFG_BITS] <= {h, v};
    else if (scan_en)  scan <= {scan[CELL_SCAN_BITS-2:0], scan_in};

  cell_rng #(.SEED(RNG_SEED)) u_rng (.clk, .rst_n, .en(rng_en), .rnd);

  for (genvar k = 0; k < 4; k++) begin : g_pbit
    coef_t [NFANIN-1:0] jv, jh;
    logic  [NFANIN-1:0] nv, nh;
    always_comb begin
      for (int i = 0; i < 4; i++) begin
        jv[i] = regs[4*k + i];   // J(v_k, h_i)
        nv[i] = h[i];
        jh[i] = regs[4*i + k];   // J(v_i, h_k)
        nh[i] = v[i];
      end
      jv[4] = j_up_i[k];             nv[4] = v_up_i[k];
      jv[5] = HAS_DOWN  ? regs[REG_JDOWN + k]  : '0;  nv[5] = v_dn_i[k];
      jh[4] = j_left_i[k];           nh[4] = h_lf_i[k];
      jh[5] = HAS_RIGHT ? regs[REG_JRIGHT + k] : '0;  nh[5] = h_rt_i[k];
    end

    pbit_neuron #(
      .OFFSET(MISMATCH * mismatch_u(int'(CELL_ID) * 8 + k, 0)),
      .GAIN  (1.0 + MISMATCH * mismatch_u(int'(CELL_ID) * 8 + k, 1))
    ) u_nv (
      .j_coef(jv), .m_nb(nv), .h_coef(regs[REG_BV + k]),
      .prbs(rnd[k]), .prbsn(~rnd[k]),
      .k_weight, .k_bias, .k_rng, .v_temp, .m_out(mv[k])
    );

    pbit_neuron #(
      .OFFSET(MISMATCH * mismatch_u(int'(CELL_ID) * 8 + 4 + k, 0)),
      .GAIN  (1.0 + MISMATCH * mismatch_u(int'(CELL_ID) * 8 + 4 + k, 1))
    ) u_nh (
      .j_coef(jh), .m_nb(nh), .h_coef(regs[REG_BH + k]),
      .prbs(rev8(rnd[k])), .prbsn(~rev8(rnd[k])),
      .k_weight, .k_bias, .k_rng, .v_temp, .m_out(mh[k])
    );

    assign j_down_o[k]  = regs[REG_JDOWN + k];
    assign j_right_o[k] = regs[REG_JRIGHT + k];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v <= '0;
      h <= '0;
    end else begin
      if (upd_v) v <= mv;
      if (upd_h) h <= mh;
    end

endmodule
