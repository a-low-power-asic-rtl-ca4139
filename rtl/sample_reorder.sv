// Sample-point reorder: a pair of tapped delay lines (I and Q) with 5-way
// multiplexers. Tap "+2" is the undelayed input and each further tap adds one
// sample of delay, down to "-2". The selection comes from the sampling-point
// reordering controller and starts at "0"; moving it one step towards "+"
// drops one sample from the stream, one step towards "-" stuffs (repeats) one.
// Interface: in_vld strobes a new input sample; the selected output sample is
// registered and out_vld follows in_vld by one clock.
// Four delay elements and taps +2..-2 follow the block diagram; the output
// register is this implementation's choice.
module sample_reorder
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_vld,
  input  sample_t           in_i,
  input  sample_t           in_q,
  input  logic signed [2:0] sel,      // -2 .. +2
  output logic              out_vld,
  output sample_t           out_i,
  output sample_t           out_q
);
  sample_t dl_i [4];
  sample_t dl_q [4];
  sample_t tap_i [5];   // index 0 = "+2" ... 4 = "-2"
  sample_t tap_q [5];
  logic [2:0] idx;

  always_comb begin
    tap_i[0] = in_i; tap_q[0] = in_q;
    for (int k = 0; k < 4; k++) begin
      tap_i[k+1] = dl_i[k]; tap_q[k+1] = dl_q[k];
    end
    idx = 3'(3'sd2 - sel);
    if (idx > 3'd4) idx = 3'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) begin dl_i[k] <= '0; dl_q[k] <= '0; end
      out_vld <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        dl_i[0] <= in_i; dl_q[0] <= in_q;
        for (int k = 1; k < 4; k++) begin dl_i[k] <= dl_i[k-1]; dl_q[k] <= dl_q[k-1]; end
        out_i <= tap_i[idx];
        out_q <= tap_q[idx];
      end
    end
  end
endmodule
