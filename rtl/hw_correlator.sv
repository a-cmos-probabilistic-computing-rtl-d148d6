// hw_correlator: the sample correlator of the learning loop.
//
// In hardware-aware learning, the host collects S spin samples from the chip
// and compares their statistics with the ideal ones. This block accumulates
// those statistics for N observed spins: per spin, the number of samples in
// which it is +1; per pair (i, j), the number of samples in which the two
// agree (XNOR). From these the host forms
//   bias_i = 2 * ones_i / S - 1          (mean of 2*m_i - 1)
//   corr_ij = 2 * agree_ij / S - 1       (mean of 2*XNOR(m_i, m_j) - 1)
// which are the normalised B_model and W_model of the learning algorithm.
// The source design shows an XNOR feeding an accumulator and gives the
// statistics;
// the counter widths, the saturation and the pair ordering are this design's.
// With CNT_W = 14, up to 16383 samples (10,000 per learning iteration on the
// source chip) are counted.
//
// Interface: a sample is taken on a clock edge with valid high; clear zeroes
// all counters (and wins over valid). Pair p enumerates (0,1), (0,2), ...,
// (0,N-1), (1,2), ... in that order. Counters saturate at their maximum.
// Timing: counts are registered, visible the clock after the sample.
module hw_correlator #(
  parameter int unsigned N     = 8,
  parameter int unsigned CNT_W = 14,
  localparam int unsigned NPAIR = N * (N - 1) / 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        valid,
  input  logic [N-1:0]                sample,
  output logic [CNT_W-1:0]            n_samples,
  output logic [N-1:0][CNT_W-1:0]     ones,
  output logic [NPAIR-1:0][CNT_W-1:0] agree
);

  localparam logic [CNT_W-1:0] MAXC = '1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      n_samples <= '0;
      ones      <= '0;
      agree     <= '0;
    end else if (clear) begin
      n_samples <= '0;
      ones      <= '0;
      agree     <= '0;
    end else if (valid) begin
      int p;
      if (n_samples != MAXC) n_samples <= n_samples + 1'b1;
      for (int i = 0; i < int'(N); i++)
        if (sample[i] && ones[i] != MAXC) ones[i] <= ones[i] + 1'b1;
      p = 0;
      for (int i = 0; i < int'(N); i++)
        for (int j = i + 1; j < int'(N); j++) begin
          if (!(sample[i] ^ sample[j]) && agree[p] != MAXC) agree[p] <= agree[p] + 1'b1;
          p++;
        end
    end

endmodule
