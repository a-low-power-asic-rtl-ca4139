// Sampling-point reordering controller.
// Each received sample adds the presumed clock drift of the current search bin
// (drift_inc, signed, in units of 2^-FRAC_W sample) to a phase accumulator.
// When the accumulated error reaches one whole sample the reorder multiplexer
// selection moves by one position: towards "+" (less delay, one sample
// dropped) for a fast sampling clock, towards "-" (more delay, one sample
// stuffed) for a slow one. The selection saturates at +/-MAXSEL and returns to
// the centre position "0" on clear (start of a new search).
// Interface: sample_vld marks an input sample; sel is the signed mux position
// (-MAXSEL..+MAXSEL), updated one cycle after the sample that completes a
// sample interval. drop / stuff pulse with each adjustment.
// The drop/stuff rule and the 5-position range follow the design; the phase
// accumulator, its resolution and the saturation are this implementation's.
module spr_controller #(
  parameter int FRAC_W = 20,
  parameter int MAXSEL = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      sample_vld,
  input  logic signed [FRAC_W-1:0]  drift_inc,
  output logic signed [2:0]         sel,
  output logic                      drop,
  output logic                      stuff
);
  logic signed [FRAC_W+1:0] acc, acc_nxt;
  localparam logic signed [FRAC_W+1:0] ONE = (FRAC_W+2)'(1) <<< FRAC_W;

  always_comb acc_nxt = acc + (FRAC_W+2)'(drift_inc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; sel <= '0; drop <= 1'b0; stuff <= 1'b0;
    end else begin
      drop <= 1'b0; stuff <= 1'b0;
      if (clear) begin
        acc <= '0; sel <= '0;
      end else if (sample_vld) begin
        if (acc_nxt >= ONE) begin
          acc <= acc_nxt - ONE;
          if (sel < 3'(MAXSEL)) begin sel <= sel + 3'sd1; drop <= 1'b1; end
        end else if (acc_nxt <= -ONE) begin
          acc <= acc_nxt + ONE;
          if (sel > -3'(MAXSEL)) begin sel <= sel - 3'sd1; stuff <= 1'b1; end
        end else begin
          acc <= acc_nxt;
        end
      end
    end
  end
endmodule
