// Checks compare & vote: for random despreader outputs the counter of the
// largest (lowest index on ties) must count up by one per vote, counters
// saturate at 1023, and clear resets them.
module tb_compare_vote;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_vld = 0;
  logic [DESP_W-1:0] in [NCAND];
  logic [VOTE_W-1:0] cnt [NCAND];
  logic [2:0] winner;
  int checks = 0, failures = 0;
  int ref_cnt [NCAND];
  compare_vote dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < NCAND; k++) begin in[k] = '0; ref_cnt[k] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int best, bk;
      best = -1; bk = 0;
      for (int k = 0; k < NCAND; k++) begin
        int v;
        v = (t < 1500) ? int'($urandom % 2000000) : ((k == 3) ? 2000000 : int'($urandom % 1000));
        if (t % 7 == 0 && k == 6) v = best;        // tie with the current best
        in[k] = 21'(v);
        if (v > best) begin best = v; bk = k; end
      end
      @(negedge clk); in_vld = 1; @(negedge clk); in_vld = 0;
      if (ref_cnt[bk] < 1023) ref_cnt[bk]++;
      for (int k = 0; k < NCAND; k++) begin
        checks++; if (int'(cnt[k]) != ref_cnt[k]) begin failures++; if (failures < 5) $display("FAIL t=%0d k=%0d", t, k); end
      end
    end
    checks++; if (cnt[3] != 10'd1023) failures++;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < NCAND; k++) begin checks++; if (cnt[k] != '0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
