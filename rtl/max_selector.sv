// Stage-1 maximum selector: a comparator/mux and a max register. During the
// last slot of an accumulation period each finished accumulation is compared
// with the largest so far; the first word of that slot loads the register.
// With the final word of the period (fin) the position of the maximum, the
// estimated end of the PSC (slot-boundary hypothesis h), is presented on
// h_idx/h_val and done pulses.
// Interface: in_vld with the accumulated value, its position and the last /
// fin flags; done comes one clock after the in_vld that carries fin.
// Ties keep the earlier position (this implementation's choice).
module max_selector
  import cs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_vld,
  input  logic [S1_ACC_W-1:0]  in_val,
  input  chip_idx_t            in_idx,
  input  logic                 in_last,
  input  logic                 in_fin,
  output logic                 done,
  output chip_idx_t            h_idx,
  output logic [S1_ACC_W-1:0]  h_val
);
  logic [S1_ACC_W-1:0] max_val, nxt_val;
  chip_idx_t           max_idx, nxt_idx;
  logic                have;

  always_comb begin
    nxt_val = max_val; nxt_idx = max_idx;
    if (!have || in_val > max_val) begin
      nxt_val = in_val; nxt_idx = in_idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_val <= '0; max_idx <= '0; have <= 1'b0;
      done <= 1'b0; h_idx <= '0; h_val <= '0;
    end else begin
      done <= 1'b0;
      if (in_vld && in_last) begin
        max_val <= nxt_val; max_idx <= nxt_idx; have <= 1'b1;
        if (in_fin) begin
          done <= 1'b1; h_idx <= nxt_idx; h_val <= nxt_val; have <= 1'b0;
        end
      end
    end
  end
endmodule
