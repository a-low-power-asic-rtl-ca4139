// Checks the active despreader against a reference: from the restart chip,
// each 64 chips the complex sum of r * conj(c) is formed, its shift-based
// magnitude added, and every 256 chips the total (saturated to 21 bits) must
// appear. A pilot spread with the matching code must give a large value,
// random data a small one, a full-scale match must saturate; stop must end
// the output.
module tb_active_despreader;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, chip_en = 0, restart = 0, stop = 0, c_i = 0, c_q = 0;
  sample_t r_i = '0, r_q = '0;
  logic out_vld;
  logic [DESP_W-1:0] out;
  int checks = 0, failures = 0, nout = 0;
  longint exp_q [$];
  active_despreader dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic longint t(input longint v);
    longint m, p; m = (v < 0) ? -v : v; if (m == 0) return 0; p = 1; while (p <= m) p *= 2; return p * m;
  endfunction
  always @(negedge clk) if (out_vld) begin
    longint e;
    e = exp_q.pop_front(); nout++;
    checks++;
    if (longint'(out) != e) begin failures++; $display("FAIL %0d %0d", out, e); end
  end
  initial begin
    longint ai, aq, en;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin @(negedge clk); chip_en = 1; r_i = 4'(7); @(negedge clk); chip_en = 0; end
    checks++; if (nout != 0) failures++;          // nothing before restart
    ai = 0; aq = 0; en = 0;
    for (int i = 0; i < 256 * 40; i++) begin
      int ci, cq, ri, rq;
      ci = $urandom % 2; cq = $urandom % 2;
      if (i < 512) begin
        // pilot (1+j) * code, amplitude 2, plus a little noise
        int si, sq;
        si = ci ? -1 : 1; sq = cq ? -1 : 1;
        ri = 2 * (si - sq) + int'($urandom % 3) - 1; rq = 2 * (si + sq) + int'($urandom % 3) - 1;
      end else if (i >= 256 * 36) begin
        // strongest possible match: the symbol energy must saturate
        ri = ci ? -7 : 7; rq = cq ? -7 : 7;
      end else begin
        ri = int'($urandom % 16) - 8; rq = int'($urandom % 16) - 8;
      end
      @(negedge clk);
      chip_en = 1; restart = (i == 0); c_i = ci[0]; c_q = cq[0]; r_i = 4'(ri); r_q = 4'(rq);
      begin
        int si, sq;
        si = ci ? -1 : 1; sq = cq ? -1 : 1;
        ai += ri * si + rq * sq; aq += rq * si - ri * sq;
      end
      if (i % 64 == 63) begin en += t(ai) + t(aq); ai = 0; aq = 0; end
      if (i % 256 == 255) begin
        if (i < 512) begin checks++; if (en < 500000) failures++; end
        if (i >= 512 && i < 256 * 36) begin checks++; if (en > 300000) failures++; end
        if (i >= 256 * 36) begin checks++; if (en <= 2097151) failures++; end
        exp_q.push_back(en > 2097151 ? 2097151 : en); en = 0;
      end
      @(negedge clk); chip_en = 0; restart = 0;
    end
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    for (int i = 0; i < 300; i++) begin @(negedge clk); chip_en = 1; @(negedge clk); chip_en = 0; end
    checks++; if (nout != 40 || exp_q.size() != 0) begin failures++; $display("FAIL nout %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
