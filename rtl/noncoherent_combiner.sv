// Stage-1 non-coherent combiner. For each of the four 64-chip partial
// symbols the magnitude of the complex correlation (I from one PSC detector,
// Q from the other) is estimated with the shift-based magnitude calculator,
// and the four magnitudes are added, which removes the phase rotation caused
// by a frequency error between partial symbols. The 23-bit sum is truncated
// to 11 bits: TRUNC least significant bits are dropped and the rest
// saturates.
// Interface: in_vld with the eight partial correlations; one clock later
// out_vld, the 11-bit value and the full 23-bit sum.
// Partial-symbol combining, 23-bit sum and 11-bit output follow the design;
// which bits the truncation keeps (TRUNC) is this implementation's choice.
module noncoherent_combiner
  import cs_pkg::*;
#(
  parameter int TRUNC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_vld,
  input  det_t                 yi [NPART],
  input  det_t                 yq [NPART],
  output logic                 out_vld,
  output logic [S1_IN_W-1:0]   out,
  output logic [NC_W-1:0]      sum
);
  logic [2*DET_W:0] mag [NPART];
  logic [NC_W-1:0]  s, st;

  for (genvar l = 0; l < NPART; l++) begin : g_mag
    mag_approx #(.W(DET_W)) u_mag (.a(yi[l]), .b(yq[l]), .y(mag[l]));
  end

  always_comb begin
    s = '0;
    for (int l = 0; l < NPART; l++) s = s + NC_W'(mag[l]);
    st = s >> TRUNC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0; out <= '0; sum <= '0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        sum <= s;
        out <= (st > NC_W'({S1_IN_W{1'b1}})) ? {S1_IN_W{1'b1}} : S1_IN_W'(st);
      end
    end
  end
endmodule
