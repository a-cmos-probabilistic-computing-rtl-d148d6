// tb_update_clock_gen: compares the update strobes with a reference model of
// the 16 slot LFSRs, and checks the per-cycle bound of 16 cells per layer, that
// every cell is reached, that both layers of a cell sometimes update together
// and that nothing updates while disabled.
module tb_update_clock_gen;
  localparam int NC = 55, NS = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [NC-1:0] upd_v, upd_h;
  int checks = 0, failures = 0;
  logic [31:0] ref_l [NS];
  logic [NC-1:0] exp_v, exp_h;
  int hits_v [NC], hits_h [NC];
  int both = 0, maxcnt = 0;

  update_clock_gen #(.NCELLS(NC), .NSLOTS(NS), .IDX_W(6)) dut (.clk, .rst_n, .en, .upd_v, .upd_h);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] step(input logic [31:0] s);
    return {s[30:0], ^(s & 32'h8020_0003)};
  endfunction

  initial begin
    for (int k = 0; k < NS; k++) begin
      ref_l[k] = 32'h5EED_0001 ^ ((k + 1) * 32'h9E37_79B9);
      if (ref_l[k] == 0) ref_l[k] = 1;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // disabled: LFSRs advance, strobes stay low
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      for (int k = 0; k < NS; k++) for (int s = 0; s < 6; s++) ref_l[k] = step(ref_l[k]);
      checks++; if (upd_v != 0 || upd_h != 0) begin failures++; $display("strobe while disabled"); end
    end
    en = 1; #1;
    for (int n = 0; n < 4000; n++) begin
      exp_v = 0; exp_h = 0;
      for (int k = 0; k < NS; k++) begin
        int iv, ih;
        iv = int'(ref_l[k][5:0]);
        ih = 0;
        for (int b = 0; b < 6; b++) ih |= int'(ref_l[k][31 - b]) << b;
        if (iv < NC) exp_v[iv] = 1;
        if (ih < NC) exp_h[ih] = 1;
      end
      checks++;
      if (upd_v !== exp_v || upd_h !== exp_h) begin
        failures++;
        if (failures < 5) $display("cycle %0d strobes differ", n);
      end
      checks++;
      if ($countones(upd_v) > NS || $countones(upd_h) > NS) failures++;
      if ($countones(upd_v) > maxcnt) maxcnt = $countones(upd_v);
      for (int c = 0; c < NC; c++) begin
        hits_v[c] += int'(upd_v[c]);
        hits_h[c] += int'(upd_h[c]);
        if (upd_v[c] && upd_h[c]) both++;
      end
      @(posedge clk); #1;
      for (int k = 0; k < NS; k++) for (int s = 0; s < 6; s++) ref_l[k] = step(ref_l[k]);
    end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (hits_v[c] == 0 || hits_h[c] == 0) begin failures++; $display("cell %0d never updated", c); end
    end
    checks++; if (both == 0) begin failures++; $display("layers never updated together"); end
    $display("max cells per cycle %0d, joint layer updates %0d", maxcnt, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
