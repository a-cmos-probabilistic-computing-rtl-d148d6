// tb_hw_correlator: feeds random samples, with a few correlated spins, and
// compares every count with a reference kept in the testbench. Also checks
// clear, that samples without valid are ignored and saturation.
module tb_hw_correlator;
  localparam int N = 5, W = 10, NP = N * (N - 1) / 2;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [N-1:0] sample = 0;
  logic [W-1:0] n_samples;
  logic [N-1:0][W-1:0] ones;
  logic [NP-1:0][W-1:0] agree;
  int checks = 0, failures = 0;
  int r_n, r_ones [N], r_agree [N][N];

  hw_correlator #(.N(N), .CNT_W(W)) dut (.clk, .rst_n, .clear, .valid, .sample, .n_samples, .ones, .agree);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    int p = 0;
    checks++; if (int'(n_samples) != r_n) begin failures++; $display("%s: n %0d want %0d", what, n_samples, r_n); end
    for (int i = 0; i < N; i++) begin
      checks++; if (int'(ones[i]) != r_ones[i]) begin failures++; $display("%s: ones[%0d]", what, i); end
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        checks++;
        if (int'(agree[p]) != r_agree[i][j]) begin
          failures++; $display("%s: agree(%0d,%0d) %0d want %0d", what, i, j, agree[p], r_agree[i][j]);
        end
        p++;
      end
  endtask

  task automatic reset_ref();
    r_n = 0;
    for (int i = 0; i < N; i++) begin r_ones[i] = 0; for (int j = 0; j < N; j++) r_agree[i][j] = 0; end
  endtask

  initial begin
    reset_ref();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [N-1:0] s;
      s = N'($urandom);
      s[3] = s[2];          // a copy pair
      s[4] = ~s[0];         // an anti-correlated pair
      sample = s;
      valid = ($urandom % 4) != 0;
      if (valid) begin
        r_n++;
        for (int i = 0; i < N; i++) begin
          r_ones[i] += int'(s[i]);
          for (int j = i + 1; j < N; j++) r_agree[i][j] += int'(s[i] == s[j]);
        end
      end
      @(posedge clk); #1;
    end
    valid = 0;
    @(posedge clk); #1;
    compare("run");
    checks++; if (int'(agree[2 + 1 + 1 + 2]) != 0 && r_agree[2][3] != r_n) failures++;
    // clear
    clear = 1; valid = 1; @(posedge clk); #1; clear = 0; valid = 0;
    reset_ref();
    compare("clear");
    // saturation at 2^W - 1
    sample = '1; valid = 1;
    repeat (1100) @(posedge clk);
    #1 valid = 0;
    r_n = 1023;
    for (int i = 0; i < N; i++) begin r_ones[i] = 1023; for (int j = i + 1; j < N; j++) r_agree[i][j] = 1023; end
    compare("saturate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
