// Checks the sampling-point reordering controller against a reference phase
// accumulator: with a drift of 1/10 sample per sample the selection must step
// towards "+" every 10 samples (drop) and saturate at +2; after clear and with
// a negative drift it must step towards "-" (stuff) and saturate at -2.
module tb_spr_controller;
  logic clk = 0, rst_n = 0, clear = 0, sample_vld = 0;
  logic signed [19:0] drift_inc = '0;
  logic signed [2:0] sel;
  logic drop, stuff;
  int checks = 0, failures = 0;
  spr_controller dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int inc, input int nsmp);
    longint acc = 0; int exp_sel = 0; int ndrop = 0, nstuff = 0;
    drift_inc <= 20'(inc);
    clear <= 1; @(posedge clk); clear <= 0;
    for (int s = 0; s < nsmp; s++) begin
      sample_vld <= 1; @(posedge clk); sample_vld <= 0;
      acc += inc;
      if (acc >= (1 << 20)) begin acc -= (1 << 20); if (exp_sel < 2) begin exp_sel++; ndrop++; end end
      else if (acc <= -(1 << 20)) begin acc += (1 << 20); if (exp_sel > -2) begin exp_sel--; nstuff++; end end
      #1;
      checks++; if (sel != 3'(exp_sel)) begin failures++; $display("FAIL s=%0d sel=%0d exp=%0d", s, sel, exp_sel); end
      checks++; if (drop != (ndrop > 0) || stuff != (nstuff > 0)) begin failures++; $display("FAIL pulse s=%0d", s); end
      ndrop = 0; nstuff = 0;
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    run((1 << 20) / 10 + 1, 50);
    checks++; if (sel != 3'sd2) failures++;
    run(-((1 << 20) / 7 + 1), 40);
    checks++; if (sel != -3'sd2) failures++;
    run(12345, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
