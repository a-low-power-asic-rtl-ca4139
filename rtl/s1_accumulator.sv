// Stage-1 accumulator. The truncated correlation energy of every chip
// position of a slot (one slot-boundary hypothesis each) is added into the
// SRAM word of that position, over the 15 slots of an accumulation period.
// In the first slot of a period the value is written directly (no read),
// in the others the old word is read, the new value added with saturation,
// and written back.
// Interface: in_vld with value, position idx and the period flags first /
// last / fin; a read is issued in that clock, the sum written in the next,
// and out_vld with the accumulated word follows two clocks after in_vld.
// in_vld must not come on two consecutive clocks (one chip per two or more
// clocks). The read-modify-write accumulation into a 2560-word SRAM follows
// the design; the timing and the saturation are this implementation's.
module s1_accumulator
  import cs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_vld,
  input  logic [S1_IN_W-1:0]   in_val,
  input  chip_idx_t            in_idx,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic                 in_fin,
  output logic                 out_vld,
  output logic [S1_ACC_W-1:0]  out_val,
  output chip_idx_t            out_idx,
  output logic                 out_last,
  output logic                 out_fin
);
  logic                 p_vld, p_first, p_last, p_fin;
  logic [S1_IN_W-1:0]   p_val;
  chip_idx_t            p_idx;
  logic [S1_ACC_W-1:0]  rdata, sum;
  logic [S1_ACC_W:0]    full_sum;

  always_comb begin
    full_sum = (S1_ACC_W+1)'(rdata) + (S1_ACC_W+1)'(p_val);
    if (p_first)             sum = S1_ACC_W'(p_val);
    else if (full_sum[S1_ACC_W]) sum = '1;
    else                     sum = full_sum[S1_ACC_W-1:0];
  end

  sram_sp #(.W(S1_ACC_W), .DEPTH(SLOT_CHIPS)) u_sram (
    .clk, .re(in_vld && !in_first), .we(p_vld),
    .addr(p_vld ? p_idx : in_idx), .wdata(sum), .rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_vld <= 1'b0; p_first <= 1'b0; p_last <= 1'b0; p_fin <= 1'b0; p_val <= '0; p_idx <= '0;
      out_vld <= 1'b0; out_val <= '0; out_idx <= '0; out_last <= 1'b0; out_fin <= 1'b0;
    end else begin
      p_vld <= in_vld;
      if (in_vld) begin
        p_val <= in_val; p_idx <= in_idx; p_first <= in_first; p_last <= in_last; p_fin <= in_fin;
      end
      out_vld <= p_vld;
      if (p_vld) begin
        out_val <= sum; out_idx <= p_idx; out_last <= p_last; out_fin <= p_fin;
      end
    end
  end

  // one chip per two clocks at most: the SRAM port is shared by read and write
  assert property (@(posedge clk) p_vld |-> !in_vld);   // p_vld is 0 in reset
endmodule
