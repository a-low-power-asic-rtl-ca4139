// Checks the non-coherent combiner: the 23-bit sum must equal the sum over
// the four partial symbols of the shift-based magnitudes, and the 11-bit
// output the sum shifted right by TRUNC and saturated.
module tb_noncoherent_combiner;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0;
  det_t yi [NPART], yq [NPART];
  logic out_vld;
  logic [S1_IN_W-1:0] out;
  logic [NC_W-1:0] sum;
  int checks = 0, failures = 0, sats = 0;
  noncoherent_combiner #(.TRUNC(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic longint t(input int v);
    longint m, p; m = (v < 0) ? -v : v; if (m == 0) return 0; p = 1; while (p <= m) p *= 2; return p * m;
  endfunction
  initial begin
    for (int l = 0; l < NPART; l++) begin yi[l] = '0; yq[l] = '0; end
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < 2000; k++) begin
      longint e, o;
      int sc;
      sc = (k % 4 == 0) ? 1024 : 64;
      e = 0;
      for (int l = 0; l < NPART; l++) begin
        int vi, vq;
        vi = int'($urandom % sc) - sc/2; vq = int'($urandom % sc) - sc/2;
        if (vi > 511) vi = 511; if (vq > 511) vq = 511;
        yi[l] = 10'(vi); yq[l] = 10'(vq);
        e += t(vi) + t(vq);
      end
      in_vld <= 1; @(posedge clk); in_vld <= 0; #1;
      o = e >> 8; if (o > 2047) begin o = 2047; sats++; end
      checks += 3;
      if (!out_vld) failures++;
      if (longint'(sum) != e) begin failures++; $display("FAIL sum %0d %0d", sum, e); end
      if (longint'(out) != o) begin failures++; $display("FAIL out %0d %0d", out, o); end
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
