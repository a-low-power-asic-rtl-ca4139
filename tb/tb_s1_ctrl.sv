// Checks the stage-1 control unit: chip and slot counters over more than one
// 15-slot period, the period tick at chip 0 of slot 0, the first / last / fin
// flags and their PIPE-clock delay, and clear.
module tb_s1_ctrl;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, chip_en = 0;
  chip_idx_t chip_cnt, tag_idx;
  slot_idx_t slot_cnt;
  logic period_tick, tag_vld, tag_first, tag_last, tag_fin;
  int checks = 0, failures = 0, nticks = 0, nfin = 0;
  int exp_tag [$];
  s1_ctrl #(.PIPE(2)) dut (.*);
  // two clocks after a chip its tag comes out
  logic en_d1 = 0, en_d2 = 0;
  always @(posedge clk) begin en_d1 <= chip_en; en_d2 <= en_d1; end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (tag_vld != en_d2) begin failures++; $display("FAIL tag_vld"); end
    if (tag_vld) begin
      int n, c, s;
      n = exp_tag.pop_front(); c = n % SLOT_CHIPS; s = (n / SLOT_CHIPS) % SLOTS;
      checks++;
      if (!(int'(tag_idx) == c && tag_first == (s == 0) && tag_last == (s == SLOTS-1)
            && tag_fin == (s == SLOTS-1 && c == SLOT_CHIPS-1))) begin failures++; if (failures < 5) $display("FAIL tag n=%0d", n); end
      if (tag_fin) nfin++;
    end
  end
  always #5 clk = ~clk;
  initial begin repeat (300000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < SLOT_CHIPS * SLOTS + 5000; n++) begin
      int c, s;
      c = n % SLOT_CHIPS; s = (n / SLOT_CHIPS) % SLOTS;
      @(negedge clk); chip_en = 1;
      #1;
      checks += 3;
      if (int'(chip_cnt) != c || int'(slot_cnt) != s) begin failures++; if (failures < 5) $display("FAIL cnt n=%0d", n); end
      if (period_tick != (c == 0 && s == 0)) failures++;
      if (period_tick) nticks++;
      exp_tag.push_back(n);
      @(negedge clk); chip_en = 0;
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0; #1;
    checks++; if (chip_cnt != '0 || slot_cnt != '0) failures++;
    checks++; if (nticks != 2 || nfin != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
