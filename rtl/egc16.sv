// Efficient Golay correlator (EGC) for a 16-chip inner sequence.
// Four butterfly stages with delays of 8, 1, 4 and 2 chips and all weights +1
// replace a 16-tap correlator, using 6 adders: stages one and three form a sum
// and a difference of the delayed and current input, stages two and four add
// the delayed sum path to the difference path. With SEL_B = 0 the output is
// the correlation with the PSC inner sequence a of W-CDMA; SEL_B = 1 swaps the
// first-stage outputs, which gives the correlation with the SSC inner sequence
// b (a with its second half negated). The delays are pointer-based FIFOs.
// Interface: chip_en steps the delays; y is combinational from x and the
// stored state and equals sum_n s(n) * x(k-15+n) for the chip k presented on x
// (s = a or b), i.e. the correlation of the 16 chips ending with the current one.
// The butterfly structure and the 6-adder count follow the design; the delay
// order 8,1,4,2 is the one that reproduces the W-CDMA inner sequence.
module egc16
  import cs_pkg::*;
#(
  parameter int  IW    = SAMPLE_W,
  parameter bit  SEL_B = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chip_en,
  input  logic signed [IW-1:0]   x,
  output logic signed [IW+3:0]   y
);
  logic signed [IW-1:0] x_d8;
  logic signed [IW:0]   s1_sum, s1_dif, s1_p, s1_m, s1_p_d1;
  logic signed [IW+1:0] e2, e2_d4;
  logic signed [IW+2:0] s3_p, s3_m, s3_p_d2;

  ptr_fifo #(.W(IW),   .DEPTH(8)) u_d8 (.clk, .rst_n, .en(chip_en), .din(x),    .dout(x_d8));
  ptr_fifo #(.W(IW+1), .DEPTH(1)) u_d1 (.clk, .rst_n, .en(chip_en), .din(s1_p), .dout(s1_p_d1));
  ptr_fifo #(.W(IW+2), .DEPTH(4)) u_d4 (.clk, .rst_n, .en(chip_en), .din(e2),   .dout(e2_d4));
  ptr_fifo #(.W(IW+3), .DEPTH(2)) u_d2 (.clk, .rst_n, .en(chip_en), .din(s3_p), .dout(s3_p_d2));

  always_comb begin
    s1_sum = (IW+1)'(x_d8) + (IW+1)'(x);
    s1_dif = (IW+1)'(x_d8) - (IW+1)'(x);
    s1_p   = SEL_B ? s1_dif : s1_sum;
    s1_m   = SEL_B ? s1_sum : s1_dif;
    e2     = (IW+2)'(s1_p_d1) + (IW+2)'(s1_m);
    s3_p   = (IW+3)'(e2_d4) + (IW+3)'(e2);
    s3_m   = (IW+3)'(e2_d4) - (IW+3)'(e2);
    y      = (IW+4)'(s3_p_d2) + (IW+4)'(s3_m);
  end
endmodule
