// pbit_neuron: behavioural model of the analog current-mode p-bit neuron (not
// synthesizable logic; on silicon this is a set of pitch-matched analog
// standard cells).
//
// The neuron evaluates m = sgn(tanh(beta * I) + r), with
//   I = sum_j J_j * m_j + h,
// where the J_j are the six coupling weights, m_j the six neighbour spins
// (+1/-1), h the bias and r a uniform random number in (-1, 1). On silicon each
// 9-bit coefficient drives a MOS R-2R (W-2W) current DAC; a current-mode Gilbert
// multiplier multiplies each coupling current by the neighbour spin, giving a
// differential current; the six products and the bias current are summed on
// shared nodes; a differential tanh stage, whose gain is set by V_temp, shapes
// the sum; an 8-bit RNG DAC turns PRBS<7:0> and PRBSN<7:0> into a differential
// random current that is added to the tanh output; a comparator and buffers
// give the new spin. A cleared enable bit forces the DAC current to zero.
// All of this is the source chip's. Modelled here with real arithmetic:
//   * DAC output = weight code / 127 times a global scale (k_weight for
//     couplings, k_bias for the bias), the enable bit gating it;
//   * random term = k_rng * (PRBS - PRBSN) / 255, which lies in (-1, 1) when
//     PRBSN is the complement of PRBS and k_rng = 1;
//   * tanh input = GAIN * v_temp * I + OFFSET, where OFFSET and GAIN model the
//     static mismatch of this instance (ideal: 0.0 and 1.0);
//   * m_out = 1 when tanh(...) + random term > 0.
// The four global scales stand for the externally set bias inputs; their
// units (full scale = 1.0) are this model's choice. The published equations
// write the bias term once as h_i * m_i and once, in the learning algorithm,
// as h_i; the model uses h_i.
//
// Timing: m_out follows its inputs with no delay (the analog settling time is
// not modelled); the cell latches it on its update strobe.
module pbit_neuron
  import pbit_pkg::*;
#(
  parameter real OFFSET = 0.0,
  parameter real GAIN   = 1.0
) (
  input  coef_t [NFANIN-1:0] j_coef,   // coupling coefficients
  input  logic  [NFANIN-1:0] m_nb,     // neighbour spins, 1 = +1
  input  coef_t              h_coef,   // bias coefficient
  input  logic  [7:0]        prbs,
  input  logic  [7:0]        prbsn,
  input  real                k_weight, // global coupling scale
  input  real                k_bias,   // global bias scale
  input  real                k_rng,    // global random-number scale
  input  real                v_temp,   // tanh gain (inverse temperature)
  output logic               m_out
);

  real i_sum, t_out, r_val;

  always_comb begin
    i_sum = 0.0;
    for (int j = 0; j < int'(NFANIN); j++)
      if (j_coef[j].en)
        i_sum += (m_nb[j] ? 1.0 : -1.0) * k_weight * real'(j_coef[j].w) / 127.0;
    if (h_coef.en)
      i_sum += k_bias * real'(h_coef.w) / 127.0;
    t_out = $tanh(GAIN * v_temp * i_sum + OFFSET);
    r_val = k_rng * (real'(prbs) - real'(prbsn)) / 255.0;
    m_out = (t_out + r_val) > 0.0;
  end

endmodule
