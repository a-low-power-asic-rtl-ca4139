// Checks the coherent combiner: for every SSC k the output must be
// sum_l (sI[k][l] pI[l] + sQ[k][l] pQ[l]) shifted right by TRUNC and
// saturated to 13 signed bits, delivered for k = 0..15 in order with
// out_last on k = 15.
module tb_coherent_combiner;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, ref_load = 0, start = 0;
  det_t p_i [NPART], p_q [NPART];
  det_t s_i [NSSC][NPART], s_q [NSSC][NPART];
  logic out_vld, out_last;
  logic [3:0] out_k;
  logic signed [S2_W-1:0] out_val;
  int checks = 0, failures = 0, nsat = 0;
  coherent_combiner #(.TRUNC(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int rnd(input int sc); return int'($urandom % (2*sc)) - sc; endfunction
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int ri [NPART], rq [NPART];
      longint e [NSSC];
      int sc, nout;
      sc = (t % 3 == 0) ? 512 : 100;
      for (int l = 0; l < NPART; l++) begin
        ri[l] = (t == 0) ? 500 : rnd(sc); rq[l] = (t == 0) ? 500 : rnd(sc); p_i[l] = 10'(ri[l]); p_q[l] = 10'(rq[l]);
      end
      @(negedge clk); ref_load = 1; @(negedge clk); ref_load = 0;
      for (int l = 0; l < NPART; l++) begin p_i[l] = 10'(rnd(512)); p_q[l] = 10'(rnd(512)); end  // must not matter
      for (int k = 0; k < NSSC; k++) begin
        e[k] = 0;
        for (int l = 0; l < NPART; l++) begin
          int vi, vq;
          vi = (t == 0) ? 500 - 60 * k : rnd(sc); vq = (t == 0) ? 500 : rnd(sc);
          s_i[k][l] = 10'(vi); s_q[k][l] = 10'(vq);
          e[k] += longint'(vi) * ri[l] + longint'(vq) * rq[l];
        end
        e[k] = e[k] >>> 8;
        if (e[k] > 4095) begin e[k] = 4095; nsat++; end
        if (e[k] < -4096) begin e[k] = -4096; nsat++; end
      end
      start = 1; @(negedge clk); start = 0;
      nout = 0;
      while (nout < NSSC) begin
        if (out_vld) begin
          checks++;
          if (int'(out_k) != nout || out_last != (nout == NSSC-1) || longint'(out_val) != e[nout]) begin
            failures++; $display("FAIL t=%0d k=%0d %0d %0d", t, out_k, out_val, e[nout]);
          end
          nout++;
        end
        @(negedge clk);
      end
    end
    checks++; if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
