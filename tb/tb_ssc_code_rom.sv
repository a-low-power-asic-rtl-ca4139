// Checks the SSC outer-code table against z(p) * H16[k](p) with the
// Hadamard matrix built here by the Sylvester recursion, and that the 16
// codes are mutually orthogonal.
module tb_ssc_code_rom;
  logic [3:0] k;
  logic [15:0] row;
  int checks = 0, failures = 0;
  int z [16] = '{1,1,1,-1,1,1,-1,-1,1,-1,1,-1,-1,-1,-1,-1};
  int h [16][16];
  int rows [16][16];
  ssc_code_rom dut (.*);
  initial begin
    h[0][0] = 1;
    for (int n = 1; n < 16; n *= 2)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          h[i][j+n] = h[i][j]; h[i+n][j] = h[i][j]; h[i+n][j+n] = -h[i][j];
        end
    for (int kk = 0; kk < 16; kk++) begin
      k = 4'(kk); #1;
      for (int p = 0; p < 16; p++) begin
        rows[kk][p] = row[p] ? 1 : -1;
        checks++;
        if (rows[kk][p] != z[p] * h[kk][p]) begin failures++; $display("FAIL k=%0d p=%0d", kk, p); end
      end
    end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int d; d = 0;
        for (int p = 0; p < 16; p++) d += rows[i][p] * rows[j][p];
        checks++; if (d != ((i == j) ? 16 : 0)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
