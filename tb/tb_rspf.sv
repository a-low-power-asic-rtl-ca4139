// Checks RSPF: every chip_en must carry the sample at the current phase
// within that chip's pair of samples, the phase must only change after a
// frame tick, and over many ticks both phases must be used.
module tb_rspf;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0, frame_tick = 0;
  sample_t in_i = '0, in_q = '0, chip_i, chip_q;
  logic chip_en;
  logic [0:0] phase;
  int checks = 0, failures = 0, seen0 = 0, seen1 = 0;
  rspf dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    sample_t si [2], sq [2];
    logic [0:0] ph;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (c % 40 == 0) begin frame_tick = 1; @(negedge clk); frame_tick = 0; @(negedge clk); end
      ph = phase;
      for (int k = 0; k < 2; k++) begin
        si[k] = sample_t'($urandom); sq[k] = sample_t'($urandom);
        in_vld = 1; in_i = si[k]; in_q = sq[k]; @(negedge clk);
      end
      in_vld = 0;
      checks++;
      if (!chip_en || chip_i != si[ph] || chip_q != sq[ph]) begin failures++; $display("FAIL c=%0d", c); end
      checks++;
      if (phase != ph) begin failures++; $display("FAIL phase moved without tick"); end
      if (ph == 0) seen0++; else seen1++;
    end
    checks++; if (seen0 == 0 || seen1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
