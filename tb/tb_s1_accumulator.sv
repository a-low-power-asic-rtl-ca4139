// Checks the stage-1 accumulator over one full 15-slot period of 2560
// positions (one input every two clocks): each output must be the running
// sum of the inputs at that position since the period's first slot,
// saturated to 15 bits, with the flags passed along; then a second period
// must start afresh.
module tb_s1_accumulator;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0, in_first = 0, in_last = 0, in_fin = 0;
  logic [S1_IN_W-1:0] in_val = '0;
  chip_idx_t in_idx = '0, out_idx;
  logic out_vld, out_last, out_fin;
  logic [S1_ACC_W-1:0] out_val;
  int checks = 0, failures = 0, nsat = 0;
  int ref_acc [SLOT_CHIPS];
  int exp_q [$];
  s1_accumulator dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(negedge clk) if (out_vld) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (int'(out_val) != e) begin failures++; if (failures < 5) $display("FAIL idx=%0d %0d %0d", out_idx, out_val, e); end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int per = 0; per < 2; per++)
      for (int s = 0; s < SLOTS; s++)
        for (int c = 0; c < SLOT_CHIPS; c++) begin
          int v;
          v = (c == 77) ? 2047 : (c < 40 ? int'($urandom % 2048) : int'($urandom % 64));
          if (s == 0) ref_acc[c] = v; else ref_acc[c] = ref_acc[c] + v;
          if (ref_acc[c] > 32767) begin ref_acc[c] = 32767; nsat++; end
          exp_q.push_back(ref_acc[c]);
          @(negedge clk);
          in_vld = 1; in_val = 11'(v); in_idx = chip_idx_t'(c);
          in_first = (s == 0); in_last = (s == SLOTS-1); in_fin = (s == SLOTS-1) && (c == SLOT_CHIPS-1);
          @(negedge clk); in_vld = 0;
        end
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
