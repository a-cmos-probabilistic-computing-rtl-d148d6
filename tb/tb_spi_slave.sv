// tb_spi_slave: an SPI mode-0 master drives the port, which shifts a 40-bit
// model scan chain. Checks that the chain is captured once when CS_N falls,
// that MISO returns the captured bits in order, that the MOSI bits land in the
// chain, that there is one shift per SCLK edge, that busy covers the
// transaction and that SCLK toggling with CS_N high shifts nothing.
module tb_spi_slave;
  localparam int L = 40;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic shift_en, shift_in, capture, busy;
  logic [L-1:0] chain, pattern, wdata, rdata;
  int checks = 0, failures = 0, shifts = 0, captures = 0;

  spi_slave dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .shift_en, .shift_in, .capture, .busy,
                 .chain_out(chain[L-1]));

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model chain: capture loads the pattern, shift moves toward the MSB
  always_ff @(posedge clk) begin
    if (capture) chain <= pattern;
    else if (shift_en) chain <= {chain[L-2:0], shift_in};
    if (shift_en) shifts++;
    if (capture) captures++;
  end

  task automatic half(); repeat (8) @(posedge clk); endtask

  task automatic transfer(input logic [L-1:0] wd, output logic [L-1:0] rdv);
    cs_n = 0; half();
    checks++; if (!busy) begin failures++; $display("busy low in transaction"); end
    for (int b = L - 1; b >= 0; b--) begin
      mosi = wd[b]; half();
      sclk = 1; rdv[b] = miso; half();
      sclk = 0;
    end
    half(); cs_n = 1; half();
    checks++; if (busy) begin failures++; $display("busy high after transaction"); end
  endtask

  initial begin
    chain = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int s0, c0;
      pattern = {$urandom, $urandom};
      wdata   = {$urandom, $urandom};
      s0 = shifts; c0 = captures;
      transfer(wdata, rdata);
      checks++; if (rdata !== pattern) begin failures++; $display("read %h want %h", rdata, pattern); end
      checks++; if (chain !== wdata) begin failures++; $display("chain %h want %h", chain, wdata); end
      checks++; if (shifts - s0 != L) begin failures++; $display("%0d shifts", shifts - s0); end
      checks++; if (captures - c0 != 1) begin failures++; $display("%0d captures", captures - c0); end
    end
    // SCLK without chip select
    begin
      int s0;
      s0 = shifts;
      for (int b = 0; b < 10; b++) begin half(); sclk = 1; half(); sclk = 0; end
      checks++; if (shifts != s0) begin failures++; $display("shifted without CS"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
