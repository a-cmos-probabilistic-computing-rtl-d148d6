// tb_cell_rng: checks the cell LFSR against a bit-serial reference model, that
// it holds while disabled, and that its bytes are roughly uniform.
module tb_cell_rng;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0][7:0] rnd;
  int checks = 0, failures = 0;
  logic [31:0] ref_s;
  int hist [4];

  cell_rng #(.SEED(32'h1234_5678), .STEPS(32)) dut (.clk, .rst_n, .en, .rnd);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: one feedback bit per step, computed as the parity of the taps
  function automatic logic [31:0] ref_step(input logic [31:0] s);
    logic fb;
    fb = ^(s & 32'h8020_0003);
    return (s << 1) | 32'(fb);
  endfunction

  initial begin
    ref_s = 32'h1234_5678;
    repeat (3) @(posedge clk);
    #1 checks++; if (rnd !== 32'h1234_5678) begin failures++; $display("seed wrong %h", rnd); end
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (rnd !== 32'h1234_5678) begin failures++; $display("moved while disabled"); end
    en = 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 32; k++) ref_s = ref_step(ref_s);
      checks++;
      if (rnd !== ref_s) begin
        failures++;
        if (failures < 5) $display("cycle %0d: got %h want %h", n, rnd, ref_s);
      end
      for (int b = 0; b < 4; b++) hist[rnd[b][7:6]]++;
    end
    // each quarter of the byte range should get close to a quarter of 8000 draws
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (hist[q] < 1700 || hist[q] > 2300) begin failures++; $display("histogram bin %0d = %0d", q, hist[q]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
