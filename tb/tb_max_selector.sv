// Checks the maximum selector: over several periods of random values (with
// values in non-last slots that must be ignored), done must report the
// position and value of the largest value of the last slot, earliest on ties.
module tb_max_selector;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0, in_last = 0, in_fin = 0;
  logic [S1_ACC_W-1:0] in_val = '0, h_val;
  chip_idx_t in_idx = '0, h_idx;
  logic done;
  int checks = 0, failures = 0;
  max_selector dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int per = 0; per < 6; per++) begin
      int best, bidx;
      best = -1; bidx = 0;
      for (int s = 0; s < 2; s++)
        for (int c = 0; c < SLOT_CHIPS; c++) begin
          int v;
          v = (s == 0) ? 32767 : int'($urandom % 30000);
          if (s == 1 && c == 100 * per + 7) v = 31000;
          if (s == 1 && per == 5 && c == 1000) v = 31000;   // tie, later: ignored
          if (s == 1 && v > best) begin best = v; bidx = c; end
          @(negedge clk);
          in_vld = 1; in_val = 15'(v); in_idx = chip_idx_t'(c); in_last = (s == 1);
          in_fin = (s == 1) && (c == SLOT_CHIPS-1);
          @(negedge clk); in_vld = 0;
          if (in_fin) begin
            checks += 3;
            if (!done) failures++;
            if (int'(h_idx) != bidx) begin failures++; $display("FAIL idx %0d %0d", h_idx, bidx); end
            if (int'(h_val) != best) failures++;
          end else begin
            checks++; if (done) failures++;
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
