// CFRS symbol detector (stage-2 hard decision). A comparator/mux and a max
// register pick, among the 16 combined SSC values of one slot, the largest;
// its SSC index is stored as the slot's code symbol x[slot] and its value as
// the weight w[slot] in a 15-entry register file that feeds the CFRS decoder.
// Interface: in_vld with in_k / in_val for k = 0..15 in order, in_last with
// k = 15; slot selects the register-file entry. sym_done pulses one clock
// after the last value, with the entry written. Ties keep the lower index.
// The max register and the x/w register file follow the design.
module cfrs_symbol_detector
  import cs_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_vld,
  input  logic [3:0]             in_k,
  input  logic signed [S2_W-1:0] in_val,
  input  logic                   in_last,
  input  slot_idx_t              slot,
  output logic                   sym_done,
  output logic [3:0]             x [SLOTS],
  output logic signed [S2_W-1:0] w [SLOTS]
);
  logic signed [S2_W-1:0] max_val, nv;
  logic [3:0]             max_k, nk;

  always_comb begin
    nv = max_val; nk = max_k;
    if (in_k == 4'd0 || in_val > max_val) begin nv = in_val; nk = in_k; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_val <= '0; max_k <= '0; sym_done <= 1'b0;
      for (int i = 0; i < SLOTS; i++) begin x[i] <= '0; w[i] <= '0; end
    end else begin
      sym_done <= 1'b0;
      if (in_vld) begin
        max_val <= nv; max_k <= nk;
        if (in_last) begin
          x[slot] <= nk; w[slot] <= nv; sym_done <= 1'b1;
        end
      end
    end
  end
endmodule
