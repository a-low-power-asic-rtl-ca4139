// Stage-2 coherent combiner. The PSC partial correlations of the same window
// serve as channel phase reference: for each SSC k it forms
// sum_l Re{ s[k][l] * conj(p[l]) } = sum_l (sI[k][l]*pI[l] + sQ[k][l]*pQ[l])
// with two multipliers and an adder, one (k, l) pair per clock, so the
// reference is renewed for every 64-chip partial symbol and a frequency error
// costs little. The 23-bit result is truncated to a signed 13-bit value:
// TRUNC low bits dropped, the rest saturated.
// Interface: ref_load latches pI/pQ; start (any time after) begins the
// 64-clock pass over sI/sQ, which must stay stable during it. For each code,
// out_vld pulses with out_k and out_val; the last code also raises out_last.
// The multiply-add structure and the 23 / 13-bit widths follow the design;
// the sequencing and TRUNC are this implementation's.
module coherent_combiner
  import cs_pkg::*;
#(
  parameter int TRUNC = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ref_load,
  input  det_t                   p_i [NPART],
  input  det_t                   p_q [NPART],
  input  logic                   start,
  input  det_t                   s_i [NSSC][NPART],
  input  det_t                   s_q [NSSC][NPART],
  output logic                   out_vld,
  output logic [3:0]             out_k,
  output logic signed [S2_W-1:0] out_val,
  output logic                   out_last
);
  det_t ref_i [NPART];
  det_t ref_q [NPART];
  logic        busy;
  logic [3:0]  k;
  logic [1:0]  l;
  logic signed [NC_W-1:0] acc, prod, sum;

  always_comb begin
    prod = NC_W'(s_i[k][l] * ref_i[l]) + NC_W'(s_q[k][l] * ref_q[l]);
    sum  = ((l == 2'd0) ? '0 : acc) + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; k <= '0; l <= '0; acc <= '0;
      out_vld <= 1'b0; out_k <= '0; out_val <= '0; out_last <= 1'b0;
      for (int i = 0; i < NPART; i++) begin ref_i[i] <= '0; ref_q[i] <= '0; end
    end else begin
      out_vld <= 1'b0; out_last <= 1'b0;
      if (ref_load) begin
        for (int i = 0; i < NPART; i++) begin ref_i[i] <= p_i[i]; ref_q[i] <= p_q[i]; end
      end
      if (start && !busy) begin
        busy <= 1'b1; k <= '0; l <= '0;
      end else if (busy) begin
        acc <= sum;
        l   <= l + 2'd1;
        if (l == 2'd3) begin
          out_vld  <= 1'b1;
          out_k    <= k;
          out_val  <= S2_W'(sat_s(32'(sum >>> TRUNC), S2_W));
          out_last <= (k == 4'd15);
          k <= k + 4'd1;
          if (k == 4'd15) busy <= 1'b0;
        end
      end
    end
  end
endmodule
