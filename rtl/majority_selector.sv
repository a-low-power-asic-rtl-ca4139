// Stage-3 majority election: picks the candidate with the most votes.
// Interface: elect samples cnt[]; one clock later done pulses with k_hat and
// its vote count. Ties go to the lower index.
// The majority comparison follows the design; tie handling is this
// implementation's choice.
module majority_selector
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              elect,
  input  logic [VOTE_W-1:0] cnt [NCAND],
  output logic              done,
  output logic [2:0]        k_hat,
  output logic [VOTE_W-1:0] votes
);
  logic [2:0]        bk;
  logic [VOTE_W-1:0] bv;
  always_comb begin
    bv = cnt[0]; bk = '0;
    for (int k = 1; k < NCAND; k++)
      if (cnt[k] > bv) begin bv = cnt[k]; bk = 3'(k); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; k_hat <= '0; votes <= '0;
    end else begin
      done <= elect;
      if (elect) begin k_hat <= bk; votes <= bv; end
    end
  end
endmodule
