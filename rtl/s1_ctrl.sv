// Stage-1 control unit. Counts chips within a slot (0..2559) and slots
// within a 15-slot accumulation period, and generates the stage-1 control
// signals: the flags first / last / fin that travel with every chip position
// through the detector and combiner pipeline (delayed by PIPE clocks to meet
// the data at the accumulator), and a period tick at the first chip of each
// period, used to re-draw the RSPF sampling phase.
// Interface: chip_en strobes each chip; chip_cnt / slot_cnt give the position
// of the chip being presented in that clock. tag_* are chip_en and the flags
// delayed by PIPE clocks. clear restarts the counters.
// The counting over 2560 hypotheses and 15 slots follows the design; the
// tag pipeline is this implementation's way of lining up the control signals.
module s1_ctrl
  import cs_pkg::*;
#(
  parameter int PIPE = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      chip_en,
  output chip_idx_t chip_cnt,
  output slot_idx_t slot_cnt,
  output logic      period_tick,
  output logic      tag_vld,
  output chip_idx_t tag_idx,
  output logic      tag_first,
  output logic      tag_last,
  output logic      tag_fin
);
  typedef struct packed {
    logic      vld;
    chip_idx_t idx;
    logic      first, last, fin;
  } tag_t;

  tag_t pipe [PIPE];
  tag_t cur;

  always_comb begin
    cur.vld   = chip_en;
    cur.idx   = chip_cnt;
    cur.first = (slot_cnt == '0);
    cur.last  = (slot_cnt == slot_idx_t'(SLOTS-1));
    cur.fin   = cur.last && (chip_cnt == chip_idx_t'(SLOT_CHIPS-1));
    period_tick = chip_en && (slot_cnt == '0) && (chip_cnt == '0);
  end

  assign tag_vld   = pipe[PIPE-1].vld;
  assign tag_idx   = pipe[PIPE-1].idx;
  assign tag_first = pipe[PIPE-1].first;
  assign tag_last  = pipe[PIPE-1].last;
  assign tag_fin   = pipe[PIPE-1].fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_cnt <= '0; slot_cnt <= '0;
      for (int k = 0; k < PIPE; k++) pipe[k] <= '0;
    end else begin
      pipe[0] <= cur;
      for (int k = 1; k < PIPE; k++) pipe[k] <= pipe[k-1];
      if (clear) begin
        chip_cnt <= '0; slot_cnt <= '0;
      end else if (chip_en) begin
        if (chip_cnt == chip_idx_t'(SLOT_CHIPS-1)) begin
          chip_cnt <= '0;
          slot_cnt <= (slot_cnt == slot_idx_t'(SLOTS-1)) ? '0 : slot_cnt + 1'b1;
        end else begin
          chip_cnt <= chip_cnt + 1'b1;
        end
      end
    end
  end
endmodule
