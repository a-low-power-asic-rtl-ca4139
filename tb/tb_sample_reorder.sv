// Checks the sample reorder: for each mux position -2..+2 the output must be
// the input delayed by 2 - sel samples (plus the output register), compared
// with a history of the driven samples.
module tb_sample_reorder;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0;
  sample_t in_i = '0, in_q = '0, out_i, out_q;
  logic signed [2:0] sel = '0;
  logic out_vld;
  int checks = 0, failures = 0;
  sample_t hi [$], hq [$];
  sample_reorder dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int s = 0; s < 6; s++) begin hi.push_back('0); hq.push_back('0); end
    for (int s = 0; s < 500; s++) begin
      sample_t a, b; int d;
      a = sample_t'($urandom); b = sample_t'($urandom);
      if (s % 50 == 0) sel <= 3'(int'($urandom % 5) - 2);
      in_vld <= 1; in_i <= a; in_q <= b;
      @(posedge clk); in_vld <= 0;
      hi.push_back(a); hq.push_back(b);
      #1;
      d = 2 - int'(sel);
      if (s > 6) begin
        checks++;
        if (!out_vld || out_i != hi[hi.size()-1-d] || out_q != hq[hq.size()-1-d]) begin
          failures++; $display("FAIL s=%0d sel=%0d", s, sel);
        end
      end
      if ($urandom % 2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
