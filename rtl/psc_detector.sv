// Hybrid EGC / hierarchical matched-filter PSC detector (one per I and Q).
// The inner EGC correlates each 16-chip segment with the inner sequence a.
// Its output runs through a chain of fifteen 16-chip pointer-based FIFOs, so
// the correlations of all sixteen 16-chip segments of the last 256 chips are
// available at once. Four outer matched-filter segments weight four of them
// each with the PSC outer code and add them (3 adders per segment), giving
// the four 64-chip partial-symbol correlations y[l], l = 0..3, of the
// 256-chip window that ends with the current chip. Together with the 6 EGC
// adders the detector needs 18 additions per chip.
// Interface: chip_en strobes chip x; one clock later y[] holds the partial
// correlations of the window ending with that chip (saturated to DET_W bits)
// and out_vld pulses. y[] holds until the next chip.
// EGC, 4 segments of 64 chips, 18 additions and 10-bit outputs follow the
// design; the segment delays are arranged in direct form (one FIFO chain
// shared by all segments) so that all four partial symbols refer to the same
// window.
module psc_detector
  import cs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    chip_en,
  input  sample_t x,
  output logic    out_vld,
  output det_t    y [NPART]
);
  localparam int EW = SAMPLE_W + 4;
  logic signed [EW-1:0] e [16];    // e[j] = EGC output j*16 chips ago

  egc16 #(.IW(SAMPLE_W), .SEL_B(1'b0)) u_egc (.clk, .rst_n, .chip_en, .x, .y(e[0]));

  for (genvar j = 1; j < 16; j++) begin : g_chain
    ptr_fifo #(.W(EW), .DEPTH(16)) u_d16 (.clk, .rst_n, .en(chip_en), .din(e[j-1]), .dout(e[j]));
  end

  logic signed [EW+1:0] seg [NPART];
  always_comb begin
    for (int l = 0; l < NPART; l++) begin
      seg[l] = '0;
      for (int m = 0; m < 4; m++) begin
        // outer code entry p = 4l+m belongs to the segment that ended 16*(15-p) chips ago
        if (PSC_OUTER[4*l+m]) seg[l] = seg[l] + (EW+2)'(e[15-(4*l+m)]);
        else                  seg[l] = seg[l] - (EW+2)'(e[15-(4*l+m)]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0;
      for (int l = 0; l < NPART; l++) y[l] <= '0;
    end else begin
      out_vld <= chip_en;
      if (chip_en)
        for (int l = 0; l < NPART; l++) y[l] <= DET_W'(sat_s(32'(seg[l]), DET_W));
    end
  end
endmodule
