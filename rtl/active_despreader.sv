// Complex active despreader for one candidate scrambling code. Each chip
// r = rI + j rQ is multiplied by the conjugate code chip (signs from c_i,
// c_q) and accumulated coherently over a 64-chip partial symbol of the
// common pilot channel (all-ones symbols, channelisation code of all ones).
// At the end of each partial symbol the magnitude of the complex sum is
// estimated with the shift-based magnitude calculator and added into the
// symbol energy; after 256 chips (one pilot symbol) the energy is output,
// saturated to 21 bits.
// Interface: restart with the chip_en of the first chip of a symbol (frame
// start) begins despreading with that chip; thereafter out_vld pulses one
// clock after every 256th chip with out. stop halts it.
// Complex despreading of the pilot and the 21-bit output follow the design;
// the partial-symbol length and the non-coherent combination of the four
// partial symbols (like stages 1 and 2) are this implementation's choices.
module active_despreader
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chip_en,
  input  logic              restart,
  input  logic              stop,
  input  sample_t           r_i,
  input  sample_t           r_q,
  input  logic              c_i,
  input  logic              c_q,
  output logic              out_vld,
  output logic [DESP_W-1:0] out
);
  localparam int PW = 12;                   // partial sum width
  localparam int MW = 2*PW + 1;
  logic              active;
  logic [7:0]        cnt;
  logic signed [PW-1:0] acc_i, acc_q, nxt_i, nxt_q;
  logic signed [5:0] d_i, d_q;
  logic [MW-1:0]     mag;
  logic [MW+1:0]     energy, nxt_e;
  logic [7:0]        cur;
  logic              run;

  always_comb begin
    // Re/Im of r * conj(c), c = (1-2c_i) + j(1-2c_q)
    logic signed [5:0] ri, rq;
    ri  = 6'(r_i); rq = 6'(r_q);
    d_i = (c_i ? -ri : ri) + (c_q ? -rq : rq);
    d_q = (c_i ? -rq : rq) - (c_q ? -ri : ri);
    run = chip_en && (active || restart) && !stop;
    cur = restart ? 8'd0 : cnt;
    nxt_i = ((cur[5:0] == 6'd0) ? '0 : acc_i) + PW'(d_i);
    nxt_q = ((cur[5:0] == 6'd0) ? '0 : acc_q) + PW'(d_q);
  end

  always_comb nxt_e = ((cur[7:6] == 2'd0) ? '0 : energy) + (MW+2)'(mag);

  mag_approx #(.W(PW)) u_mag (.a(nxt_i), .b(nxt_q), .y(mag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; cnt <= '0; acc_i <= '0; acc_q <= '0; energy <= '0;
      out_vld <= 1'b0; out <= '0;
    end else begin
      out_vld <= 1'b0;
      if (stop) active <= 1'b0;
      else if (run) begin
        active <= 1'b1;
        cnt    <= cur + 8'd1;
        acc_i  <= nxt_i; acc_q <= nxt_q;
        if (cur[5:0] == 6'd63) energy <= nxt_e;
        if (cur == 8'd255) begin
          out_vld <= 1'b1;
          out     <= (nxt_e > (MW+2)'({DESP_W{1'b1}})) ? {DESP_W{1'b1}} : DESP_W'(nxt_e);
        end
      end
    end
  end
endmodule
