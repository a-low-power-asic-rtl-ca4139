// Stage-3 control unit. On a stage-2 result (group g, frame offset s, slot
// boundary h) it loads the scrambling-code generator with g and follows the
// slot numbering of the cell: the slot that starts after the stage-2 result
// is slot s, a slot starts at chip h-255. At the first chip of the next slot 0
// (frame start) it restarts the code generator and the eight despreaders,
// clears the vote counters and lets NVOTE pilot symbols be voted on; then it
// asks the majority selector for the winner and reports the scrambling code
// index 8g+k (primary code number 16*(8g+k)).
// Interface: chip_en / chip_cnt as for the other controllers; frame_start is
// combinational and coincides with the chip_en of the frame's first chip;
// s3_done pulses with g_out, k_out, code_idx.
// Frame alignment from the stage-2 result follows the design; the vote
// length NVOTE (one frame of pilot symbols) is this implementation's choice.
module s3_ctrl
  import cs_pkg::*;
#(
  parameter int NVOTE = 150
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        chip_en,
  input  chip_idx_t   chip_cnt,
  input  logic        s2_done,
  input  logic [5:0]  s2_g,
  input  slot_idx_t   s2_s,
  input  chip_idx_t   s2_h,
  input  logic        gen_ready,
  input  logic        sym_vld,
  input  logic        maj_done,
  input  logic [2:0]  maj_k,
  output logic        gen_load,
  output logic [5:0]  gen_g,
  output logic        frame_start,
  output logic        vote_en,
  output logic        desp_stop,
  output logic        elect,
  output logic        s3_done,
  output logic [5:0]  g_out,
  output logic [2:0]  k_out,
  output logic [8:0]  code_idx
);
  typedef enum logic [1:0] {S_IDLE, S_ARM, S_VOTE, S_ELECT} state_t;
  state_t     st;
  chip_idx_t  ss;
  slot_idx_t  next_slot;
  logic [$clog2(NVOTE+1)-1:0] nsym;

  always_comb begin
    frame_start = (st == S_ARM) && gen_ready && chip_en && (chip_cnt == ss) && (next_slot == '0);
    vote_en     = (st == S_VOTE);
    desp_stop   = (st == S_IDLE) || (st == S_ELECT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ss <= '0; next_slot <= '0; nsym <= '0; gen_load <= 1'b0; gen_g <= '0;
      elect <= 1'b0; s3_done <= 1'b0; g_out <= '0; k_out <= '0; code_idx <= '0;
    end else begin
      gen_load <= 1'b0; elect <= 1'b0; s3_done <= 1'b0;
      if (st != S_IDLE && chip_en && chip_cnt == ss)
        next_slot <= (next_slot == slot_idx_t'(SLOTS-1)) ? '0 : next_slot + 1'b1;
      if (clear) st <= S_IDLE;
      else begin
        unique case (st)
          S_IDLE: if (s2_done) begin
            gen_load <= 1'b1; gen_g <= s2_g; next_slot <= s2_s;
            ss <= (s2_h >= chip_idx_t'(SYNC_LEN-1)) ? s2_h - chip_idx_t'(SYNC_LEN-1)
                                                    : s2_h + chip_idx_t'(SLOT_CHIPS-SYNC_LEN+1);
            st <= S_ARM;
          end
          S_ARM: if (frame_start) begin nsym <= '0; st <= S_VOTE; end
          S_VOTE: if (sym_vld) begin
            nsym <= nsym + 1'b1;
            if (nsym == ($clog2(NVOTE+1))'(NVOTE-1)) begin elect <= 1'b1; st <= S_ELECT; end
          end
          S_ELECT: if (maj_done) begin
            s3_done <= 1'b1; g_out <= gen_g; k_out <= maj_k; code_idx <= {gen_g, maj_k}; st <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end
endmodule
