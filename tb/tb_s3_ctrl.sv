// Checks the stage-3 control unit (NVOTE reduced to 5): a stage-2 result
// (g, s, h) must load the code generator with g; the frame start must come
// at the first chip of the slot numbered 0, i.e. at chip h-255 after 15-s
// slot starts, and only once the generator is ready; after NVOTE symbols it
// must elect and report 8g+k from the majority selector.
module tb_s3_ctrl;
  import cs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, chip_en = 0, s2_done = 0, gen_ready = 0, sym_vld = 0, maj_done = 0;
  chip_idx_t chip_cnt = '0, s2_h = '0;
  logic [5:0] s2_g = '0, gen_g, g_out;
  slot_idx_t s2_s = '0;
  logic [2:0] maj_k = '0, k_out;
  logic gen_load, frame_start, vote_en, desp_stop, elect, s3_done;
  logic [8:0] code_idx;
  int checks = 0, failures = 0;
  s3_ctrl #(.NVOTE(5)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (800000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      int h, s, g, nss, fs_n, nsym;
      bit got_fs;
      h = (t == 0) ? 700 : 100; s = (t == 0) ? 4 : 14; g = (t == 0) ? 45 : 2;
      @(negedge clk); s2_done = 1; s2_h = chip_idx_t'(h); s2_s = slot_idx_t'(s); s2_g = 6'(g);
      @(negedge clk); s2_done = 0;
      checks++; if (!gen_load || gen_g != 6'(g)) failures++;
      nss = 0; got_fs = 0; nsym = 0;
      for (int n = 0; n < SLOT_CHIPS * 20 && !got_fs; n++) begin
        int c;
        c = (h + 300 + n) % SLOT_CHIPS;   // chips continue after the stage-2 result
        if (n == 100) gen_ready = 1;
        @(negedge clk); chip_en = 1; chip_cnt = chip_idx_t'(c);
        #1;
        if (c == (h - 255 + SLOT_CHIPS) % SLOT_CHIPS) begin
          // slot starts: the first is slot s, so slot 0 is start number (15 - s) % 15
          checks++;
          if (frame_start != (nss == (15 - s) % 15)) begin failures++; $display("FAIL fs at start %0d", nss); end
          nss++;
        end else begin
          checks++; if (frame_start) failures++;
        end
        if (frame_start) got_fs = 1;
        @(negedge clk); chip_en = 0;
      end
      checks++; if (!got_fs) failures++;
      for (int v = 0; v < 5; v++) begin
        checks++; if (!vote_en) failures++;
        repeat (20) @(negedge clk);
        sym_vld = 1; @(negedge clk); sym_vld = 0;
      end
      @(negedge clk);
      checks++; if (!elect && vote_en) failures++;
      maj_k = 3'(t + 5); maj_done = 1; @(negedge clk); maj_done = 0;
      checks++; if (!s3_done || code_idx != 9'(8 * g + t + 5) || g_out != 6'(g) || k_out != 3'(t + 5)) failures++;
      gen_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
