// update_clock_gen: LFSR-randomised update strobes for the Chimera cells.
//
// The p-bits do not update in lock-step. Each clock, a pseudo-random subset of
// the unit cells is told to latch new spin values, which gives a quasi-
// asynchronous block-Gibbs update. The source chip's update clocks
// come from LFSRs, that at most 16 RBM cells update together in any clock
// cycle, that the vertical nodes receive a normal bit sequence and the
// horizontal nodes a reversed one, and that the two layers of a cell may update
// in the same cycle because a cell has no coupling inside a layer.
//
// This design realises that with NSLOTS (16) independent 32-bit LFSRs. Each
// advances IDX_W (6) steps per clock; its low IDX_W bits name the cell whose
// vertical layer updates, and its top IDX_W bits, read in reverse order (bit
// 31 as the index LSB), name the cell whose horizontal layer updates. The two
// fields are disjoint, so the two layers of a cell are chosen independently;
// reading the same field twice would make some cells (the palindromic
// indices) always update both layers together, which would split their RBM
// into two independent chains. Indices at or above NCELLS (55..63) select no
// cell. So at most 16 cells update each layer per clock, and a cell may get
// both. Per-cell clock enables replace the gated clocks of the silicon; the
// slot structure, the polynomial and the seeds are this design's choices.
//
// Interface: upd_v[c] / upd_h[c] are high for one clock when the vertical /
// horizontal p-bits of cell c are to latch their comparator outputs. They are
// decoded from registered LFSR state and are all zero while en is low.
module update_clock_gen #(
  parameter int unsigned NCELLS = 55,
  parameter int unsigned NSLOTS = 16,
  parameter int unsigned IDX_W  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic [NCELLS-1:0] upd_v,
  output logic [NCELLS-1:0] upd_h
);

  function automatic logic [31:0] slot_seed(input int unsigned k);
    logic [31:0] s;
    s = 32'h5EED_0001 ^ (32'(k + 1) * 32'h9E37_79B9);
    return (s == '0) ? 32'h1 : s;
  endfunction

  logic [NSLOTS-1:0][31:0] lfsr, lfsr_nxt;
  logic [NSLOTS-1:0][IDX_W-1:0] idx_v, idx_h;
  logic [NCELLS-1:0] sel_v, sel_h;

  always_comb begin
    for (int k = 0; k < int'(NSLOTS); k++) begin
      lfsr_nxt[k] = lfsr[k];
      for (int s = 0; s < int'(IDX_W); s++)
        lfsr_nxt[k] = {lfsr_nxt[k][30:0],
                       lfsr_nxt[k][31] ^ lfsr_nxt[k][21] ^ lfsr_nxt[k][1] ^ lfsr_nxt[k][0]};
      idx_v[k] = lfsr[k][IDX_W-1:0];
      for (int b = 0; b < int'(IDX_W); b++) idx_h[k][b] = lfsr[k][31-b];
    end
    sel_v = '0;
    sel_h = '0;
    for (int k = 0; k < int'(NSLOTS); k++)
      for (int c = 0; c < int'(NCELLS); c++) begin
        if (int'(idx_v[k]) == c) sel_v[c] = 1'b1;
        if (int'(idx_h[k]) == c) sel_h[c] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < int'(NSLOTS); k++) lfsr[k] <= slot_seed(k);
    end else begin
      lfsr <= lfsr_nxt;
    end

  // Decoded from the registered LFSR state; en acts in the same clock, so a
  // freeze (run low or an SPI transaction) stops updates at once.
  assign upd_v = en ? sel_v : '0;
  assign upd_h = en ? sel_h : '0;

  a_max_v: assert property (@(posedge clk) disable iff (!rst_n) $countones(upd_v) <= NSLOTS);
  a_max_h: assert property (@(posedge clk) disable iff (!rst_n) $countones(upd_h) <= NSLOTS);

endmodule
