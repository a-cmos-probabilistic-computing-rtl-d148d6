// tb_pbit_neuron: drives the neuron with chosen coefficients and spins, runs the
// random input through all 256 codes and checks that the fraction of +1
// outputs follows (1 + tanh(beta*I)) / 2. Also checks the enable bits, the sign
// of the spin product and a few single decisions worked out by hand.
module tb_pbit_neuron;
  import pbit_pkg::*;
  coef_t [NFANIN-1:0] j_coef;
  logic  [NFANIN-1:0] m_nb;
  coef_t h_coef;
  logic [7:0] prbs, prbsn;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 1.0, v_temp = 1.0;
  logic m_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  pbit_neuron dut (.j_coef, .m_nb, .h_coef, .prbs, .prbsn, .k_weight, .k_bias, .k_rng, .v_temp, .m_out);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // number of the 256 random codes for which the output is +1
  task automatic sweep(output int ones);
    ones = 0;
    for (int p = 0; p < 256; p++) begin
      prbs = 8'(p); prbsn = ~8'(p);
      #1;
      ones += int'(m_out);
    end
  endtask

  // expected count: codes with (2p - 255)/255 > -t
  function automatic int expect_ones(real local_field);
    real t;
    int n;
    t = $tanh(local_field);
    n = 0;
    for (int p = 0; p < 256; p++) if ((2.0 * p - 255.0) / 255.0 > -t) n++;
    return n;
  endfunction

  task automatic check_sweep(real field, string what);
    int ones, e;
    sweep(ones);
    e = expect_ones(field);
    checks++;
    if (ones < e - 1 || ones > e + 1) begin
      failures++;
      $display("%s: %0d ones, expected %0d", what, ones, e);
    end
  endtask

  initial begin
    for (int j = 0; j < NFANIN; j++) begin j_coef[j] = '{en: 1'b0, w: 8'sd0}; m_nb[j] = 1'b0; end
    h_coef = '{en: 1'b0, w: 8'sd0};
    #1;
    check_sweep(0.0, "all disabled");
    // bias only, swept from -127 to +127 as in the bias characterisation
    for (int b = -127; b <= 127; b += 254 / 10) begin
      h_coef = '{en: 1'b1, w: 8'(b)};
      check_sweep(real'(b) / 127.0, "bias sweep");
    end
    // bias present but disabled
    h_coef = '{en: 1'b0, w: 8'sd100};
    check_sweep(0.0, "bias disabled");
    // couplings: +60 with spin +1, +40 with spin -1, -20 with spin -1, bias +10
    j_coef[0] = '{en: 1'b1, w: 8'sd60};  m_nb[0] = 1'b1;
    j_coef[1] = '{en: 1'b1, w: 8'sd40};  m_nb[1] = 1'b0;
    j_coef[2] = '{en: 1'b1, w: -8'sd20}; m_nb[2] = 1'b0;
    j_coef[3] = '{en: 1'b0, w: 8'sd127}; m_nb[3] = 1'b1;   // disabled coupling
    h_coef = '{en: 1'b1, w: 8'sd10};
    check_sweep((60.0 - 40.0 + 20.0 + 10.0) / 127.0, "couplings");
    // inverse temperature 3: sharper tanh
    v_temp = 3.0;
    check_sweep(3.0 * 50.0 / 127.0, "v_temp 3");
    // v_temp 0: output depends only on the random number, half are +1
    v_temp = 0.0;
    check_sweep(0.0, "v_temp 0");
    v_temp = 1.0;
    // strong field beats any random number
    for (int j = 0; j < 6; j++) begin j_coef[j] = '{en: 1'b1, w: -8'sd127}; m_nb[j] = 1'b1; end
    h_coef = '{en: 1'b1, w: -8'sd127};
    prbs = 8'hFE; prbsn = 8'h01; #1;
    checks++; if (m_out !== 1'b0) begin failures++; $display("strong negative field gave +1"); end
    for (int j = 0; j < 6; j++) m_nb[j] = 1'b0;   // products flip sign: +6*127 - 127
    prbs = 8'h01; prbsn = 8'hFE; #1;
    checks++; if (m_out !== 1'b1) begin failures++; $display("strong positive field gave -1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
