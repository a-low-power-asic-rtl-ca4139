// Checks the PSC detector against direct correlation with the 256-chip PSC
// of W-CDMA (outer code times inner sequence a), split into four 64-chip
// partial symbols, saturated to 10 bits. Random chips are mixed with whole
// PSC copies so that large correlation peaks occur.
module tb_psc_detector;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, chip_en = 0;
  sample_t x = '0;
  logic out_vld;
  det_t y [NPART];
  int checks = 0, failures = 0, peaks = 0;
  int a [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int outer [16] = '{1,1,1,-1,-1,1,-1,-1,1,1,1,-1,1,-1,1,1};
  int hist [$];
  psc_detector dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int sat10(input int v); return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < 255; k++) hist.push_back(0);
    for (int k = 0; k < 3000; k++) begin
      int v, n0;
      if ((k / 256) % 3 == 1) v = 7 * a[k % 16] * outer[(k % 256) / 16];
      else v = int'($urandom % 16) - 8;
      hist.push_back(v);
      x <= 4'(v); chip_en <= 1; @(posedge clk); chip_en <= 0; #1;
      n0 = hist.size() - 256;
      for (int l = 0; l < 4; l++) begin
        int e;
        e = 0;
        for (int c = 64*l; c < 64*l + 64; c++) e += outer[c/16] * a[c%16] * hist[n0+c];
        checks++;
        if (y[l] != 10'(sat10(e))) begin failures++; $display("FAIL k=%0d l=%0d %0d %0d", k, l, y[l], e); end
        if (e >= 448) peaks++;
      end
      checks++; if (!out_vld) failures++;
      @(posedge clk);
    end
    checks++; if (peaks < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
