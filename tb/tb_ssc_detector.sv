// Checks the SSC detector against direct correlation of the 256 chips of a
// window with every SSC (chip 16p+q = b(q) z(p) H16[k](p)), four 64-chip
// partial symbols each. Windows of random chips and windows holding a
// transmitted SSC are tested, at random distances.
module tb_ssc_detector;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, chip_en = 0, win_start = 0;
  sample_t x = '0;
  logic done;
  det_t s [NSSC][NPART];
  int checks = 0, failures = 0;
  int a [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  int z [16] = '{1,1,1,-1,1,1,-1,-1,1,-1,1,-1,-1,-1,-1,-1};
  int hist [$];
  ssc_detector dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int code(input int k, input int c);
    int p, q, hs;
    p = c / 16; q = c % 16;
    hs = ($countones(k & p) % 2) ? -1 : 1;
    return ((q < 8) ? a[q] : -a[q]) * z[p] * hs;
  endfunction
  function automatic int sat10(input int v); return v > 511 ? 511 : (v < -512 ? -512 : v); endfunction
  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1;
    n = 0;
    for (int w = 0; w < 12; w++) begin
      int gap, start, tk;
      gap = 20 + int'($urandom % 200);
      tk = w % 16;
      for (int c = 0; c < gap + 256 + 3; c++) begin
        int v;
        if (w % 2 == 1 && c >= gap && c < gap + 256) v = 7 * code(tk, c - gap);
        else v = int'($urandom % 16) - 8;
        @(negedge clk);
        chip_en = 1; x = 4'(v); win_start = (c == gap + 15);
        hist.push_back(v);
        @(negedge clk); chip_en = 0; win_start = 0;
        if (c == gap + 255) begin
          int n0;
          checks++; if (!done) begin failures++; $display("FAIL no done w=%0d", w); end
          n0 = hist.size() - 256;
          for (int k = 0; k < NSSC; k++)
            for (int l = 0; l < NPART; l++) begin
              int e; e = 0;
              for (int cc = 64*l; cc < 64*l+64; cc++) e += code(k, cc) * hist[n0+cc];
              checks++;
              if (s[k][l] != 10'(sat10(e))) begin failures++; if (failures < 6) $display("FAIL w=%0d k=%0d l=%0d %0d %0d", w, k, l, s[k][l], e); end
            end
        end else if (done) begin checks++; failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
