// Checks both variants of the efficient Golay correlator against direct
// 16-tap correlations with the PSC inner sequence a and the SSC inner
// sequence b (a with its second half negated), on random 4-bit chips.
module tb_egc16;
  logic clk = 0, rst_n = 0, chip_en = 0;
  logic signed [3:0] x = '0;
  logic signed [7:0] ya, yb;
  int checks = 0, failures = 0;
  int a [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int hist [$];
  egc16 #(.IW(4), .SEL_B(1'b0)) dut_a (.clk, .rst_n, .chip_en, .x, .y(ya));
  egc16 #(.IW(4), .SEL_B(1'b1)) dut_b (.clk, .rst_n, .chip_en, .x, .y(yb));
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < 15; k++) hist.push_back(0);
    for (int k = 0; k < 1000; k++) begin
      int v, ea, eb, n0;
      v = int'($urandom % 16) - 8;
      hist.push_back(v);
      x <= 4'(v); chip_en <= 1;
      @(negedge clk);
      ea = 0; eb = 0; n0 = hist.size() - 16;
      for (int n = 0; n < 16; n++) begin
        ea += a[n] * hist[n0+n];
        eb += ((n < 8) ? a[n] : -a[n]) * hist[n0+n];
      end
      checks += 2;
      if (ya != 8'(ea)) begin failures++; $display("FAIL a k=%0d %0d %0d", k, ya, ea); end
      if (yb != 8'(eb)) begin failures++; $display("FAIL b k=%0d %0d %0d", k, yb, eb); end
      @(posedge clk); chip_en <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
