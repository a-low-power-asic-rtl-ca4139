// Checks the majority selector: for random vote counts, one clock after
// elect it must report the index and count of the largest, lowest index on
// ties.
module tb_majority_selector;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, elect = 0;
  logic [VOTE_W-1:0] cnt [NCAND];
  logic done;
  logic [2:0] k_hat;
  logic [VOTE_W-1:0] votes;
  int checks = 0, failures = 0;
  majority_selector dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int best, bk;
      best = -1; bk = 0;
      for (int k = 0; k < NCAND; k++) begin
        int v;
        v = int'($urandom % ((t % 2) ? 1024 : 8));
        cnt[k] = 10'(v);
        if (v > best) begin best = v; bk = k; end
      end
      @(negedge clk); elect = 1; @(negedge clk); elect = 0;
      checks++;
      if (!done || int'(k_hat) != bk || int'(votes) != best) begin failures++; $display("FAIL t=%0d %0d %0d", t, k_hat, bk); end
      @(negedge clk);
      checks++; if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
