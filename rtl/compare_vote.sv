// Stage-3 compare & vote. For every pilot symbol the outputs of the eight
// active despreaders are compared (comparator/mux tree) and the counter
// (incrementor) of the strongest candidate is raised by one; counters
// saturate at their 10-bit maximum.
// Interface: clear zeroes the counters; in_vld with in[] counts one vote,
// visible on cnt[] one clock later. Ties go to the lower index.
// The compare/mux plus eight 10-bit incrementors follow the design.
module compare_vote
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_vld,
  input  logic [DESP_W-1:0] in [NCAND],
  output logic [VOTE_W-1:0] cnt [NCAND],
  output logic [2:0]        winner
);
  always_comb begin
    logic [DESP_W-1:0] best;
    best = in[0]; winner = '0;
    for (int k = 1; k < NCAND; k++)
      if (in[k] > best) begin best = in[k]; winner = 3'(k); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCAND; k++) cnt[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < NCAND; k++) cnt[k] <= '0;
    end else if (in_vld && cnt[winner] != '1) begin
      cnt[winner] <= cnt[winner] + 1'b1;
    end
  end
endmodule
