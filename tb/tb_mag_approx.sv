// Checks the magnitude approximation against y = alpha|a| + beta|b| with
// alpha the smallest power of two above |a| (alpha = 2^d, 2^(d-1) <= |a| < 2^d),
// over all extreme values and many random pairs, and that it tracks a^2 + b^2
// within a factor of two.
module tb_mag_approx;
  localparam int W = 10;
  logic signed [W-1:0] a, b;
  logic [2*W:0] y;
  int checks = 0, failures = 0;
  mag_approx #(.W(W)) dut (.*);
  function automatic longint ref_term(input int v);
    longint m, p;
    m = (v < 0) ? -v : v;
    if (m == 0) return 0;
    p = 1;
    while (p <= m) p *= 2;      // smallest power of two above |v|
    return p * m;
  endfunction
  initial begin
    for (int t = 0; t < 20000; t++) begin
      int va, vb;
      longint e, sq;
      if (t < 4) begin va = (t & 1) ? -512 : 511; vb = (t & 2) ? -512 : 0; end
      else begin va = int'($urandom % 1024) - 512; vb = int'($urandom % 1024) - 512; end
      a = W'(va); b = W'(vb); #1;
      e = ref_term(va) + ref_term(vb);
      checks++;
      if (longint'(y) != e) begin failures++; $display("FAIL %0d %0d: %0d %0d", va, vb, y, e); end
      sq = longint'(va) * va + longint'(vb) * vb;
      checks++;
      if (longint'(y) < sq || longint'(y) > 2 * sq) begin failures++; $display("FAIL bound %0d %0d", va, vb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
