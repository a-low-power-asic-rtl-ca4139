// End-to-end test of the cell search engine at its default size.
// A downlink signal generator builds, chip by chip, the synchronisation
// channel (PSC from the hierarchical Golay construction, SSC k from the
// Hadamard/z construction with the code-group's comma-free symbol per slot)
// and the common pilot scrambled with primary code 16*(8G+K), generated here
// from the two m-sequences of the W-CDMA Gold code. Each chip is sent as two
// equal 4-bit samples with a little random noise and an arbitrary frame
// offset. Two searches are run: one with a fast sampling clock (the generator
// inserts one extra sample every DRIFT_PERIOD samples and the reorder
// controller is told the matching drift, so it must drop samples) and one
// with a slow clock (samples removed, the controller must stuff). Each search
// must report group G, code K and frame offset consistent with the signal.
// Mechanisms counted: sample drop, sample stuff, RSPF phase change, stage-1,
// stage-2 and stage-3 results, frame-start alignment.
module tb_cell_search_top;
  import cs_pkg::*;

  localparam int N18 = 262143;
  localparam int FRAME = SLOT_CHIPS * SLOTS;
  localparam int DRIFT_INC = 7;                  // 2^-20 sample per sample, ~6.7 ppm
  localparam int DRIFT_PERIOD = (1 << 20) / DRIFT_INC;

  logic clk = 1'b0, rst_n = 1'b0, search_restart = 1'b0, sample_vld = 1'b0;
  sample_t r_i = '0, r_q = '0;
  logic signed [19:0] spr_drift = '0;
  logic s1_done, s2_done, s3_done, spr_drop, spr_stuff, frame_start, rspf_phase;
  chip_idx_t s1_h;
  logic [S1_ACC_W-1:0] s1_peak;
  logic [5:0] s2_group, s3_group;
  slot_idx_t s2_slot;
  logic [3:0] s2_match;
  logic [2:0] s3_code;
  logic [8:0] s3_code_idx;
  logic [VOTE_W-1:0] s3_votes;
  logic signed [2:0] spr_sel;

  cell_search_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_drop = 0, n_stuff = 0, n_phase = 0, n_s1 = 0, n_s2 = 0, n_s3 = 0, n_fs = 0, n_fs_ok = 0;
  logic last_phase = 1'b0;
  int n_s3_run = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference sequences ----
  bit xs [N18 + 18];
  bit ys [N18 + 18];
  localparam logic [15:0] A_SEQ = 16'b1001_0101_0011_1111; // bit n = a(n), 1 = +1

  initial begin
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1'b1; end
    for (int i = 0; i < N18; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
  end

  function automatic int a_chip(input int q);  return A_SEQ[q] ? 1 : -1; endfunction
  function automatic int b_chip(input int q);  return (q < 8) ? a_chip(q) : -a_chip(q); endfunction

  int G, K, OFF;
  // chip value of the downlink at frame chip i
  task automatic chip_value(input int i, output int vi, output int vq);
    int slot, c, p, q, cp, cs, k, n, si, sq;
    slot = i / SLOT_CHIPS; c = i % SLOT_CHIPS;
    vi = 0; vq = 0;
    if (c < SYNC_LEN) begin
      p = c / 16; q = c % 16;
      cp = a_chip(q) * (PSC_OUTER[p] ? 1 : -1);
      k  = int'(cfrs_symbol(G, slot));
      cs = b_chip(q) * (ssc_outer_sign(4'(k), 4'(p)) ? 1 : -1);
      vi += 2 * cp + 2 * cs; vq += 2 * cp + 2 * cs;
    end
    n  = 16 * (8 * G + K);
    si = (xs[(i + n) % N18] ^ ys[i]) ? -1 : 1;
    sq = (xs[(i + n + 131072) % N18] ^ ys[(i + 131072) % N18]) ? -1 : 1;
    vi += si - sq; vq += si + sq;
  endtask

  function automatic sample_t clip(input int v);
    if (v > 7) return 4'sd7;
    if (v < -8) return -4'sd8;
    return sample_t'(v);
  endfunction

  // sample stream: mode 0 = ideal, 1 = fast clock (extra samples), -1 = slow (missing samples)
  int mode = 0;
  longint smp = 0;        // ideal sample index
  int vi_c, vq_c, drift_acc = 0;
  int sub_cnt = 0;

  task automatic send_one(input int vi, input int vq);
    int ni, nq;
    ni = ($urandom % 4 == 0) ? (($urandom % 2) ? 1 : -1) : 0;
    nq = ($urandom % 4 == 0) ? (($urandom % 2) ? 1 : -1) : 0;
    r_i <= clip(vi + ni); r_q <= clip(vq + nq); sample_vld <= 1'b1;
    @(posedge clk);
  endtask

  task automatic run_samples(input int nsamples, input bit stop_on_s3);
    for (int s = 0; s < nsamples; s++) begin
      int ci;
      ci = int'(((smp / OSR) + OFF) % FRAME);
      chip_value(ci, vi_c, vq_c);
      drift_acc += DRIFT_INC;
      if (mode != 0 && drift_acc >= (1 << 20)) begin
        drift_acc -= (1 << 20);
        if (mode > 0) begin send_one(vi_c, vq_c); send_one(vi_c, vq_c); end  // extra sample
        // mode < 0: this ideal sample is not taken by the slow clock
      end else begin
        send_one(vi_c, vq_c);
      end
      smp++;
      if (stop_on_s3 && n_s3_run > 0) break;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (spr_drop)  n_drop++;
    if (spr_stuff) n_stuff++;
    if (rspf_phase != last_phase) begin n_phase++; last_phase <= rspf_phase; end
    if (s1_done) begin n_s1++; $display("[%0t] stage 1: h=%0d peak=%0d", $time, s1_h, s1_peak); end
    if (s2_done) begin
      n_s2++;
      $display("[%0t] stage 2: group=%0d slot=%0d matches=%0d", $time, s2_group, s2_slot, s2_match);
      check(s2_group == 6'(G), "stage-2 group");
      check(s2_match >= 4'd12, "stage-2 symbol matches");
    end
    if (frame_start) begin
      int ci;
      n_fs++;
      ci = int'(((smp / OSR) + OFF) % FRAME);
      // the chip now entering stage 3 left the generator a few samples ago
      if (ci < 8 || ci > FRAME - 8) n_fs_ok++;
      else $display("frame start at frame chip %0d", ci);
    end
    if (s3_done) begin
      n_s3++; n_s3_run++;
      $display("[%0t] stage 3: group=%0d code=%0d idx=%0d votes=%0d", $time, s3_group, s3_code, s3_code_idx, s3_votes);
      check(s3_group == 6'(G), "stage-3 group");
      check(s3_code == 3'(K), "stage-3 code");
      check(s3_code_idx == 9'(8 * G + K), "scrambling code index");
    end
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    // run 1: fast sampling clock, controller drops samples
    G = 37; K = 5; OFF = 12345; mode = 1; spr_drift <= 20'(DRIFT_INC);
    n_s3_run = 0;
    run_samples(900_000, 1'b1);
    check(n_s3_run == 1, "run 1 finished");
    // run 2: slow sampling clock, controller stuffs samples
    G = 11; K = 2; OFF = 30000; mode = -1; spr_drift <= -20'(DRIFT_INC); drift_acc = 0;
    search_restart <= 1'b1; @(posedge clk); search_restart <= 1'b0;
    n_s3_run = 0;
    run_samples(900_000, 1'b1);
    check(n_s3_run == 1, "run 2 finished");
    // mechanisms
    check(n_drop > 0,  "sample drop happened");
    check(n_stuff > 0, "sample stuff happened");
    check(n_phase > 0, "RSPF phase changed");
    check(n_s1 > 1,    "stage 1 results");
    check(n_s2 > 1,    "stage 2 results");
    check(n_fs >= 2 && n_fs_ok == n_fs, "frame starts aligned");
    $display("drops=%0d stuffs=%0d rspf_changes=%0d s1=%0d s2=%0d s3=%0d frame_starts=%0d",
             n_drop, n_stuff, n_phase, n_s1, n_s2, n_s3, n_fs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
