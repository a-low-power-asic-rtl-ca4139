// Checks the scrambling-code generator against the W-CDMA Gold code built
// here from its two m-sequences: after load with a group g and a frame start,
// candidate k must give z_n(i) = x(i+n) + y(i) on I and
// x(i+n+131072) + y(i+131072) on Q, n = 16*(8g+k), for the first chips of
// the frame; a second frame start must restart the codes.
module tb_scr_code_gen;
  import cs_pkg::*;
  localparam int N18 = 262143;
  logic clk = 0, rst_n = 0, load = 0, chip_en = 0, frame_start = 0;
  logic [5:0] g = '0;
  logic ready;
  logic [NCAND-1:0] c_i, c_q;
  int checks = 0, failures = 0;
  bit xs [N18 + 18];
  bit ys [N18 + 18];
  scr_code_gen dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1'b1; end
    for (int i = 0; i < N18; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int gg, cyc;
      gg = (t == 0) ? 63 : ((t == 1) ? 0 : 37);
      @(negedge clk); g = 6'(gg); load = 1; @(negedge clk); load = 0;
      cyc = 0;
      while (!ready && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++; if (!ready || cyc > 8 * 64 + 10) begin failures++; $display("FAIL ready after %0d", cyc); end
      for (int rep = 0; rep < 2; rep++)
        for (int i = 0; i < 1200; i++) begin
          @(negedge clk);
          chip_en = 1; frame_start = (i == 0);
          #1;
          for (int k = 0; k < NCAND; k++) begin
            int n;
            bit ei, eq;
            n = 16 * (8 * gg + k);
            ei = xs[(i + n) % N18] ^ ys[i];
            eq = xs[(i + n + 131072) % N18] ^ ys[(i + 131072) % N18];
            checks++;
            if (c_i[k] != ei || c_q[k] != eq) begin failures++; if (failures < 5) $display("FAIL g=%0d k=%0d i=%0d", gg, k, i); end
          end
          @(negedge clk); chip_en = 0; frame_start = 0;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
