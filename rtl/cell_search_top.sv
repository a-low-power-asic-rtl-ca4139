// W-CDMA cell search engine: preprocessing plus a pipelined three-stage
// search (slot synchronisation, frame synchronisation with code-group
// identification, scrambling-code identification) that all run at the same
// time on the same chip stream.
//
// Preprocessing: the 4-bit I/Q samples (OSR = 2 per chip) pass the sample
// reorder, whose controller drops or stuffs one sample whenever the presumed
// clock drift of the current search bin (spr_drift) adds up to one sample,
// and then RSPF, which keeps one sample per chip, re-chosen at random every
// 15-slot period. Stage 1: two hybrid EGC/matched-filter PSC detectors,
// non-coherent combining of four 64-chip partial symbols with the shift-based
// magnitude calculator, accumulation over 15 slots of 2560 slot-boundary
// hypotheses in SRAM and a maximum search give h. Stage 2: two hybrid SSC
// detectors, coherent combining with the PSC correlations as phase
// reference, hard decision per slot and CFRS decoding over 15 slots give the
// code group g and the frame offset s. Stage 3: the eight scrambling codes of
// group g are despread on the pilot from the next frame start, the
// strongest wins one vote per symbol, and the majority gives the code k.
//
// Interface: sample_vld strobes one sample pair (at most every clock; the
// design runs at 15.36 MHz with 7.68 Msample/s). search_restart clears the
// controllers and the reorder position. Results appear as pulses s1_done,
// s2_done, s3_done with their values; s3_code_idx = 8g+k identifies primary
// scrambling code 16*(8g+k). Chip positions refer to the internal slot
// counter, which counts the chips leaving RSPF.
//
// Follows the design: the block structure, the bit widths (4-bit samples,
// 10-bit detector outputs, 23 -> 11 and 23 -> 13 bit truncations, 15-bit
// accumulation, 21-bit despreader outputs, 10-bit vote counters), the
// pointer-based delay lines and the shift-based magnitude. Own choices: the
// pipelined scheduling of the stages, the control timing, the truncation
// points, the 150-symbol vote, the stand-in comma-free codebook and the
// computed (not stored) scrambling-code start states.
//
// Some sub-block outputs are left unconnected on purpose and show up as
// unused signals in lint: the Q-branch copies of valid/done strobes (the I
// branch runs in lock step), the combiner valid (the accumulator takes its
// strobe from the stage-1 control tags), the untruncated combiner sum and slot counter
// (test visibility only), the stage-2 busy flag, the symbol weights w_i
// (the decoder makes hard decisions) and the per-symbol vote winner.
module cell_search_top
  import cs_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     search_restart,
  input  logic                     sample_vld,
  input  sample_t                  r_i,
  input  sample_t                  r_q,
  input  logic signed [19:0]       spr_drift,
  output logic                     s1_done,
  output chip_idx_t                s1_h,
  output logic [S1_ACC_W-1:0]      s1_peak,
  output logic                     s2_done,
  output logic [5:0]               s2_group,
  output slot_idx_t                s2_slot,
  output logic [3:0]               s2_match,
  output logic                     s3_done,
  output logic [5:0]               s3_group,
  output logic [2:0]               s3_code,
  output logic [8:0]               s3_code_idx,
  output logic [VOTE_W-1:0]        s3_votes,
  output logic signed [2:0]        spr_sel,
  output logic                     spr_drop,
  output logic                     spr_stuff,
  output logic                     frame_start,
  output logic                     rspf_phase
);
  // ---------------- preprocessing ----------------
  logic    ro_vld;
  sample_t ro_i, ro_q;
  logic    chip_en;
  sample_t chip_i, chip_q;
  logic    period_tick;

  spr_controller #(.FRAC_W(20), .MAXSEL(2)) u_sprc (
    .clk, .rst_n, .clear(search_restart), .sample_vld, .drift_inc(spr_drift),
    .sel(spr_sel), .drop(spr_drop), .stuff(spr_stuff));

  sample_reorder u_reorder (
    .clk, .rst_n, .in_vld(sample_vld), .in_i(r_i), .in_q(r_q), .sel(spr_sel),
    .out_vld(ro_vld), .out_i(ro_i), .out_q(ro_q));

  rspf u_rspf (
    .clk, .rst_n, .in_vld(ro_vld), .in_i(ro_i), .in_q(ro_q), .frame_tick(period_tick),
    .chip_en, .chip_i, .chip_q, .phase(rspf_phase));

  // ---------------- stage 1 ----------------
  chip_idx_t chip_cnt;
  slot_idx_t slot_cnt;
  logic      tag_vld, tag_first, tag_last, tag_fin;
  chip_idx_t tag_idx;
  logic      psc_vld_i, psc_vld_q;
  det_t      psc_i [NPART];
  det_t      psc_q [NPART];
  logic      nc_vld;
  logic [S1_IN_W-1:0] nc_out;
  logic [NC_W-1:0]    nc_sum;
  logic      acc_vld, acc_last, acc_fin;
  logic [S1_ACC_W-1:0] acc_val;
  chip_idx_t acc_idx;

  s1_ctrl #(.PIPE(2)) u_s1ctrl (
    .clk, .rst_n, .clear(search_restart), .chip_en, .chip_cnt, .slot_cnt, .period_tick,
    .tag_vld, .tag_idx, .tag_first, .tag_last, .tag_fin);

  psc_detector u_psc_i (.clk, .rst_n, .chip_en, .x(chip_i), .out_vld(psc_vld_i), .y(psc_i));
  psc_detector u_psc_q (.clk, .rst_n, .chip_en, .x(chip_q), .out_vld(psc_vld_q), .y(psc_q));

  noncoherent_combiner u_nc (
    .clk, .rst_n, .in_vld(psc_vld_i), .yi(psc_i), .yq(psc_q),
    .out_vld(nc_vld), .out(nc_out), .sum(nc_sum));

  s1_accumulator u_acc (
    .clk, .rst_n, .in_vld(tag_vld), .in_val(nc_out), .in_idx(tag_idx),
    .in_first(tag_first), .in_last(tag_last), .in_fin(tag_fin),
    .out_vld(acc_vld), .out_val(acc_val), .out_idx(acc_idx), .out_last(acc_last), .out_fin(acc_fin));

  max_selector u_max (
    .clk, .rst_n, .in_vld(acc_vld), .in_val(acc_val), .in_idx(acc_idx),
    .in_last(acc_last), .in_fin(acc_fin), .done(s1_done), .h_idx(s1_h), .h_val(s1_peak));

  // ---------------- stage 2 ----------------
  logic      win_start, ref_load, sym_done, dec_start, dec_done, s2_busy;
  logic      ssc_done_i, ssc_done_q;
  slot_idx_t s2_cur_slot, dec_s;
  logic [5:0] dec_g;
  chip_idx_t s2_h;
  det_t      ssc_i [NSSC][NPART];
  det_t      ssc_q [NSSC][NPART];
  logic      cc_vld, cc_last;
  logic [3:0] cc_k;
  logic signed [S2_W-1:0] cc_val;
  logic [3:0] sym_x [SLOTS];
  logic signed [S2_W-1:0] sym_w [SLOTS];

  s2_ctrl u_s2ctrl (
    .clk, .rst_n, .clear(search_restart), .chip_en, .chip_cnt, .s1_done, .s1_h,
    .sym_done, .dec_done, .dec_g, .dec_s, .win_start, .ref_load, .slot(s2_cur_slot),
    .dec_start, .s2_done, .g_hat(s2_group), .s_hat(s2_slot), .h_used(s2_h), .busy(s2_busy));

  ssc_detector u_ssc_i (.clk, .rst_n, .chip_en, .x(chip_i), .win_start, .done(ssc_done_i), .s(ssc_i));
  ssc_detector u_ssc_q (.clk, .rst_n, .chip_en, .x(chip_q), .win_start, .done(ssc_done_q), .s(ssc_q));

  coherent_combiner u_cc (
    .clk, .rst_n, .ref_load, .p_i(psc_i), .p_q(psc_q), .start(ssc_done_i),
    .s_i(ssc_i), .s_q(ssc_q), .out_vld(cc_vld), .out_k(cc_k), .out_val(cc_val), .out_last(cc_last));

  cfrs_symbol_detector u_symdet (
    .clk, .rst_n, .in_vld(cc_vld), .in_k(cc_k), .in_val(cc_val), .in_last(cc_last),
    .slot(s2_cur_slot), .sym_done, .x(sym_x), .w(sym_w));

  cfrs_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .x(sym_x), .done(dec_done), .g_hat(dec_g), .s_hat(dec_s),
    .n_match(s2_match));

  // ---------------- stage 3 ----------------
  logic       gen_load, gen_ready, vote_en, desp_stop, elect, maj_done;
  logic [5:0] gen_g;
  logic [NCAND-1:0] code_i, code_q;
  logic [NCAND-1:0] desp_vld;
  logic [DESP_W-1:0] desp_out [NCAND];
  logic [VOTE_W-1:0] votes [NCAND];
  logic [2:0] vote_winner, maj_k;

  s3_ctrl #(.NVOTE(150)) u_s3ctrl (
    .clk, .rst_n, .clear(search_restart), .chip_en, .chip_cnt,
    .s2_done, .s2_g(s2_group), .s2_s(s2_slot), .s2_h, .gen_ready, .sym_vld(desp_vld[0]),
    .maj_done, .maj_k, .gen_load, .gen_g, .frame_start, .vote_en, .desp_stop, .elect,
    .s3_done, .g_out(s3_group), .k_out(s3_code), .code_idx(s3_code_idx));

  scr_code_gen u_scr (
    .clk, .rst_n, .load(gen_load), .g(gen_g), .chip_en, .frame_start,
    .ready(gen_ready), .c_i(code_i), .c_q(code_q));

  for (genvar k = 0; k < NCAND; k++) begin : g_desp
    active_despreader u_desp (
      .clk, .rst_n, .chip_en, .restart(frame_start), .stop(desp_stop),
      .r_i(chip_i), .r_q(chip_q), .c_i(code_i[k]), .c_q(code_q[k]),
      .out_vld(desp_vld[k]), .out(desp_out[k]));
  end

  compare_vote u_vote (
    .clk, .rst_n, .clear(frame_start), .in_vld(desp_vld[0] && vote_en), .in(desp_out),
    .cnt(votes), .winner(vote_winner));

  majority_selector u_maj (
    .clk, .rst_n, .elect, .cnt(votes), .done(maj_done), .k_hat(maj_k), .votes(s3_votes));
endmodule
