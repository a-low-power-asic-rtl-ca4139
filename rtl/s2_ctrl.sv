// Stage-2 control unit. Takes the slot-boundary estimate h of stage 1 (the
// chip position where the 256-chip synchronisation window ends) and, over the
// next 15 slots, drives the SSC detectors and the coherent combiner once per
// slot: the SSC window is started at h-240 (end of its first 16-chip
// segment), the PSC partial correlations of the same window are loaded as
// phase reference one clock after chip h, and the symbol detector writes the
// slot's SSC decision into entry `slot`. After 15 symbols it starts the CFRS
// decoder and reports code group g, frame offset s and the h it used.
// A new stage-1 result that arrives while busy is kept and used next.
// Interface: all events are qualified by chip_en and the chip position
// chip_cnt of the chip being presented. s2_done pulses with g_hat / s_hat /
// h_used once the decoder has finished.
// The sequencing of stage 2 follows the pipelined three-stage search of the
// design; the encoding of states and the pending register are this
// implementation's.
module s2_ctrl
  import cs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      chip_en,
  input  chip_idx_t chip_cnt,
  input  logic      s1_done,
  input  chip_idx_t s1_h,
  input  logic      sym_done,
  input  logic      dec_done,
  input  logic [5:0] dec_g,
  input  slot_idx_t dec_s,
  output logic      win_start,
  output logic      ref_load,
  output slot_idx_t slot,
  output logic      dec_start,
  output logic      s2_done,
  output logic [5:0] g_hat,
  output slot_idx_t s_hat,
  output chip_idx_t h_used,
  output logic      busy
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_COLLECT, S_DECODE} state_t;
  state_t    st;
  chip_idx_t h, ss, ws, pend_h;
  logic      pend;
  logic [4:0] nwin, nsym;

  function automatic chip_idx_t sub_mod(input chip_idx_t pos, input int off);
    int v;
    v = int'(pos) - off;
    if (v < 0) v += SLOT_CHIPS;
    return chip_idx_t'(v);
  endfunction

  always_comb begin
    ss = sub_mod(h, SYNC_LEN - 1);
    ws = sub_mod(h, SYNC_LEN - 16);
    win_start = (st == S_COLLECT) && chip_en && (chip_cnt == ws) && (nwin < 5'(SLOTS));
    busy = (st != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; h <= '0; pend <= 1'b0; pend_h <= '0; nwin <= '0; nsym <= '0;
      ref_load <= 1'b0; slot <= '0; dec_start <= 1'b0; s2_done <= 1'b0;
      g_hat <= '0; s_hat <= '0; h_used <= '0;
    end else begin
      ref_load <= 1'b0; dec_start <= 1'b0; s2_done <= 1'b0;
      if (s1_done && st != S_IDLE) begin pend <= 1'b1; pend_h <= s1_h; end
      if (clear) begin
        st <= S_IDLE; pend <= 1'b0;
      end else begin
        unique case (st)
          S_IDLE: begin
            if (s1_done) begin h <= s1_h; st <= S_WAIT; end
            else if (pend) begin h <= pend_h; pend <= 1'b0; st <= S_WAIT; end
          end
          S_WAIT: if (chip_en && chip_cnt == ss) begin
            slot <= '0; nwin <= '0; nsym <= '0; st <= S_COLLECT;
          end
          S_COLLECT: begin
            if (chip_en && chip_cnt == ss) slot <= slot + 1'b1;
            if (win_start) nwin <= nwin + 5'd1;
            if (chip_en && chip_cnt == h && nwin != '0) ref_load <= 1'b1;
            if (sym_done) begin
              nsym <= nsym + 5'd1;
              if (nsym == 5'(SLOTS-1)) begin dec_start <= 1'b1; st <= S_DECODE; end
            end
          end
          S_DECODE: if (dec_done) begin
            s2_done <= 1'b1; g_hat <= dec_g; s_hat <= dec_s; h_used <= h; st <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
