// Checks the CFRS decoder: a random code word, cyclically shifted by a
// random s and with up to 4 symbol errors, must decode to its group and s,
// reporting 15 minus the number of errors as matches, within 960 + a few
// clocks.
module tb_cfrs_decoder;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] x [SLOTS];
  logic done;
  logic [5:0] g_hat;
  slot_idx_t s_hat;
  logic [3:0] n_match;
  int checks = 0, failures = 0;
  cfrs_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int g, s, ne, cyc;
      g = int'($urandom % 64); s = int'($urandom % 15); ne = t % 5;
      for (int i = 0; i < SLOTS; i++) x[i] = cfrs_symbol(g, (i + s) % 15);
      for (int e = 0; e < ne; e++) x[(3 * e + t) % 15] = x[(3 * e + t) % 15] + 4'd1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
      checks += 3;
      if (int'(g_hat) != g || int'(s_hat) != s) begin failures++; $display("FAIL t=%0d g %0d/%0d s %0d/%0d", t, g_hat, g, s_hat, s); end
      if (int'(n_match) != 15 - ne) begin failures++; $display("FAIL matches %0d", n_match); end
      if (cyc > 64 * 15 + 4) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
