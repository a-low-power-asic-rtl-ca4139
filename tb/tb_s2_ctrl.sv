// Checks the stage-2 control unit with a stand-in for the datapath: after a
// stage-1 result h it must wait for the slot start (h-255), then in each of
// 15 slots start the SSC window at chip h-240 and load the PSC reference one
// clock after chip h; the test answers each reference load with a symbol
// done, checks the slot index, and after the 15th expects the decoder start;
// a decoder result must come out as s2_done with h. A second stage-1 result
// arriving while busy must be processed next (pending), with h near 0 so
// that the window wraps around the slot.
module tb_s2_ctrl;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, chip_en = 0, s1_done = 0, sym_done = 0, dec_done = 0;
  chip_idx_t chip_cnt = '0, s1_h = '0, h_used;
  logic [5:0] dec_g = '0, g_hat;
  slot_idx_t dec_s = '0, slot, s_hat;
  logic win_start, ref_load, dec_start, s2_done, busy;
  int checks = 0, failures = 0;
  int n_win = 0, n_ref = 0, n_dec = 0, n_done = 0;
  int h_list [2] = '{1000, 100};
  int run = 0;
  int exp_slot = 0;
  s2_ctrl dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int cur_chip;
  always @(negedge clk) if (rst_n) begin
    if (win_start) begin
      n_win++; checks++;
      if (cur_chip != (h_list[run] - 240 + SLOT_CHIPS) % SLOT_CHIPS) begin failures++; $display("FAIL win at %0d", cur_chip); end
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < SLOT_CHIPS * 34; n++) begin
      @(negedge clk);
      cur_chip = n % SLOT_CHIPS;
      chip_en = 1; chip_cnt = chip_idx_t'(cur_chip);
      s1_done = (n == 500) || (n == 3000);
      s1_h = chip_idx_t'((n == 500) ? h_list[0] : h_list[1]);
      @(negedge clk); chip_en = 0; s1_done = 0;
      if (ref_load) begin
        n_ref++; checks += 2;
        if (cur_chip != h_list[run]) begin failures++; $display("FAIL ref at %0d", cur_chip); end
        if (int'(slot) != exp_slot) begin failures++; $display("FAIL slot %0d exp %0d", slot, exp_slot); end
        @(negedge clk); sym_done = 1; @(negedge clk); sym_done = 0;
        exp_slot++;
        checks++;
        if (dec_start != (exp_slot == 15)) begin failures++; $display("FAIL dec_start at slot %0d", exp_slot); end
        if (dec_start) begin
          n_dec++;
          repeat (5) @(negedge clk);
          dec_g = 6'(20 + run); dec_s = slot_idx_t'(3 + run); dec_done = 1; @(negedge clk); dec_done = 0;
          checks += 2;
          if (!s2_done) failures++;
          if (g_hat != 6'(20 + run) || s_hat != slot_idx_t'(3 + run) || int'(h_used) != h_list[run]) failures++;
          n_done++; run++; exp_slot = 0;
          if (run == 2) break;
        end
      end
    end
    checks += 4;
    if (n_done != 2) failures++;
    if (n_win != 30) begin failures++; $display("FAIL n_win %0d", n_win); end
    if (n_ref != 30) begin failures++; $display("FAIL n_ref %0d", n_ref); end
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
