// Hybrid SSC detector (one per I and Q): an efficient Golay correlator for
// the 16-chip SSC inner sequence b, followed by an active correlator that
// builds the correlations with all 16 SSCs from the 16 inner-correlator
// outputs of one 256-chip window. Every 16 chips the inner output is added to
// or subtracted from 16 accumulators according to the outer-code table; the
// accumulators are unloaded at the end of each 64-chip partial symbol, giving
// s[k][l] for code k and partial symbol l.
// Interface: win_start is raised with the chip_en of the chip that ends the
// first 16-chip segment of the window (window end - 240). The following 15
// segment ends are taken every 16 chips; one clock after the chip that ends
// the window, done pulses and s[][] holds the results (saturated to DET_W)
// until the next window completes.
// EGC plus active correlator and the 10-bit outputs follow the design; the
// window timing interface is this implementation's.
module ssc_detector
  import cs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    chip_en,
  input  sample_t x,
  input  logic    win_start,
  output logic    done,
  output det_t    s [NSSC][NPART]
);
  localparam int EW = SAMPLE_W + 4;
  localparam int AW = EW + 3;
  logic signed [EW-1:0] e;
  logic signed [AW-1:0] acc [NSSC];
  logic signed [AW-1:0] nxt [NSSC];
  logic [3:0]  chip16, seg;
  logic        active, take;
  logic [15:0] row [NSSC];

  egc16 #(.IW(SAMPLE_W), .SEL_B(1'b1)) u_egc (.clk, .rst_n, .chip_en, .x, .y(e));

  for (genvar k = 0; k < NSSC; k++) begin : g_rom
    ssc_code_rom u_rom (.k(4'(k)), .row(row[k]));
  end

  logic [3:0] cur_seg;
  always_comb begin
    take    = chip_en && (win_start || (active && chip16 == 4'd15));
    cur_seg = win_start ? 4'd0 : seg + 4'd1;
    for (int k = 0; k < NSSC; k++) begin
      logic signed [AW-1:0] base;
      base   = (cur_seg[1:0] == 2'd0) ? '0 : acc[k];
      nxt[k] = row[k][cur_seg] ? base + AW'(e) : base - AW'(e);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; chip16 <= '0; seg <= '0; done <= 1'b0;
      for (int k = 0; k < NSSC; k++) begin
        acc[k] <= '0;
        for (int l = 0; l < NPART; l++) s[k][l] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (chip_en && (active || win_start)) chip16 <= take ? 4'd0 : chip16 + 4'd1;
      if (take) begin
        seg <= cur_seg;
        for (int k = 0; k < NSSC; k++) acc[k] <= nxt[k];
        if (cur_seg[1:0] == 2'd3)
          for (int k = 0; k < NSSC; k++) s[k][cur_seg[3:2]] <= DET_W'(sat_s(32'(nxt[k]), DET_W));
        if (cur_seg == 4'd15) begin
          active <= 1'b0; done <= 1'b1;
        end else begin
          active <= 1'b1;
        end
      end
    end
  end
endmodule
