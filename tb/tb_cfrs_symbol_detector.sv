// Checks the CFRS symbol detector: for each of 15 slots, 16 random signed
// values are presented; the register file entry of the slot must receive the
// index and value of the largest (lowest index on ties).
module tb_cfrs_symbol_detector;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0, in_last = 0;
  logic [3:0] in_k = '0;
  logic signed [S2_W-1:0] in_val = '0;
  slot_idx_t slot = '0;
  logic sym_done;
  logic [3:0] x [SLOTS];
  logic signed [S2_W-1:0] w [SLOTS];
  int checks = 0, failures = 0;
  int ex [SLOTS], ew [SLOTS];
  cfrs_symbol_detector dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int sl = 0; sl < SLOTS; sl++) begin
        int best, bk;
        best = -100000; bk = 0;
        for (int k = 0; k < 16; k++) begin
          int v;
          v = (rep == 0) ? int'($urandom % 4000) - 4096 : int'($urandom % 8000) - 4096;
          if (k == (sl + rep) % 16) v = (rep == 3) ? best : v;
          if (v > best) begin best = v; bk = k; end
          @(negedge clk);
          in_vld = 1; in_k = 4'(k); in_val = 13'(v); in_last = (k == 15); slot = slot_idx_t'(sl);
        end
        @(negedge clk); in_vld = 0; in_last = 0;
        checks++; if (!sym_done) failures++;
        ex[sl] = bk; ew[sl] = best;
        @(negedge clk);
        checks++; if (sym_done) failures++;
        if (sl == SLOTS-1)
          for (int i = 0; i < SLOTS; i++) begin
            checks++;
            if (int'(x[i]) != ex[i] || int'(w[i]) != ew[i]) begin failures++; $display("FAIL rep=%0d slot %0d: %0d %0d", rep, i, x[i], ex[i]); end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
