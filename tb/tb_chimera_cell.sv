// tb_chimera_cell: one unit cell on its own. Loads coefficients through the
// scan chain, reads spins and coefficients back, and checks with a near-zero
// temperature (v_temp = 20) that each p-bit follows its bias, the intra-cell
// couplings, the couplings to all four neighbours, the enable bits and the
// update strobes. Then checks at v_temp = 1 that a bias of +40 gives a +1
// fraction near (1 + tanh(40/127)) / 2 = 0.65.
module tb_chimera_cell;
  import pbit_pkg::*;
  logic clk = 0, rst_n = 0;
  logic upd_v = 0, upd_h = 0, scan_en = 0, capture = 0, scan_in = 0, scan_out;
  logic [3:0] v, h, v_up_i = 0, v_dn_i = 0, h_lf_i = 0, h_rt_i = 0;
  coef_t [3:0] j_up_i, j_left_i, j_down_o, j_right_o;
  real k_weight = 1.0, k_bias = 1.0, k_rng = 0.99, v_temp = 20.0;
  int checks = 0, failures = 0;
  coef_t [NREGS-1:0] regs;
  logic [CELL_SCAN_BITS-1:0] rd;

  chimera_cell dut (
    .clk, .rst_n, .upd_v, .upd_h, .rng_en(1'b1), .scan_en, .capture, .scan_in, .scan_out,
    .v, .h, .v_up_i, .v_dn_i, .h_lf_i, .h_rt_i, .j_up_i, .j_left_i, .j_down_o, .j_right_o,
    .k_weight, .k_bias, .k_rng, .v_temp
  );

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] got, input logic [3:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %b want %b", what, got, want); end
  endtask

  // shift the register image in, most significant bit first
  task automatic load();
    logic [CELL_SCAN_BITS-1:0] img;
    img = {8'h00, regs};
    for (int b = CELL_SCAN_BITS - 1; b >= 0; b--) begin
      scan_in = img[b]; scan_en = 1;
      @(posedge clk); #1;
    end
    scan_en = 0;
  endtask

  task automatic step_v(); upd_v = 1; @(posedge clk); #1; upd_v = 0; endtask
  task automatic step_h(); upd_h = 1; @(posedge clk); #1; upd_h = 0; endtask

  function automatic coef_t cf(int w); return '{en: 1'b1, w: 8'(w)}; endfunction

  initial begin
    j_up_i = '0; j_left_i = '0;
    regs = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(v, 4'b0000, "reset v"); check(h, 4'b0000, "reset h");

    // biases only
    regs[REG_BV+0] = cf(127);  regs[REG_BV+1] = cf(-127);
    regs[REG_BV+2] = cf(90);   regs[REG_BV+3] = cf(-90);
    regs[REG_BH+0] = cf(-127); regs[REG_BH+1] = cf(127);
    regs[REG_BH+2] = cf(-60);  regs[REG_BH+3] = cf(60);
    load();
    repeat (5) @(posedge clk);
    #1 check(v, 4'b0000, "no strobe v"); check(h, 4'b0000, "no strobe h");
    step_v();
    check(v, 4'b0101, "bias v"); check(h, 4'b0000, "h held while v updates");
    step_h();
    check(h, 4'b1010, "bias h");

    // read back: spins then the coefficients, recirculated
    capture = 1; @(posedge clk); #1; capture = 0;
    for (int b = CELL_SCAN_BITS - 1; b >= 0; b--) begin
      rd[b] = scan_out; scan_in = scan_out; scan_en = 1;
      @(posedge clk); #1;
    end
    scan_en = 0;
    checks++;
    if (rd !== {4'b1010, 4'b0101, regs}) begin failures++; $display("scan read-back wrong"); end
    check(j_down_o[0], 4'b0000, "down coefficient");

    // intra-cell: v fixed by biases, h driven only by J(v0, h_k)
    for (int k = 0; k < 4; k++) regs[REG_BH+k] = '0;
    regs[0] = cf(100); regs[1] = cf(-100); regs[2] = cf(100); regs[3] = cf(-100);
    load();
    for (int n = 0; n < 5; n++) begin step_h(); step_v(); end
    check(v, 4'b0101, "v stays"); check(h, 4'b0101, "h from J(v0,h)");
    // disabling J(v0,h0) and giving h0 a bias of -50 flips it
    regs[0].en = 1'b0; regs[REG_BH+0] = cf(-50);
    load(); step_h();
    check(h, 4'b0100, "enable bit");

    // neighbours: v from above (+) and below (-), h from left (+) and right (-)
    regs = '0;
    for (int k = 0; k < 4; k++) begin
      j_up_i[k] = cf(80);  j_left_i[k] = cf(80);
      regs[REG_JDOWN+k] = cf(-20); regs[REG_JRIGHT+k] = cf(-20);
    end
    load();
    v_up_i = 4'b0110; v_dn_i = 4'b1111; h_lf_i = 4'b1001; h_rt_i = 4'b0000;
    step_v(); step_h();
    check(v, 4'b0110, "v from up"); check(h, 4'b1001, "h from left");
    check({j_down_o[3].w[7], j_right_o[0].w[7], j_down_o[1].en, j_right_o[2].en}, 4'b1111, "coefficients out");
    for (int k = 0; k < 4; k++) begin j_up_i[k] = '0; j_left_i[k] = '0; end
    v_dn_i = 4'b0011; h_rt_i = 4'b1100;
    step_v(); step_h();
    check(v, 4'b1100, "v from down"); check(h, 4'b0011, "h from right");

    // statistics at v_temp = 1
    regs = '0;
    for (int k = 0; k < 4; k++) begin regs[REG_BV+k] = cf(40); regs[REG_BH+k] = cf(40); end
    load();
    v_temp = 1.0; k_rng = 1.0;
    begin
      int ones = 0;
      upd_v = 1; upd_h = 1;
      for (int n = 0; n < 2000; n++) begin
        @(posedge clk); #1;
        ones += $countones({v, h});
      end
      upd_v = 0; upd_h = 0;
      checks++;
      if (ones < 16000 * 60 / 100 || ones > 16000 * 70 / 100) begin
        failures++; $display("bias 40: %0d of 16000 ones", ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
