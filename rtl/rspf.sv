// Random sampling per frame (RSPF). The samples of one chip are gathered
// serial-to-parallel (OSR samples per chip) and one of them is passed on as
// the chip sample for all three search stages. Which one is chosen is drawn
// from a 16-bit maximal-length LFSR at every frame tick and held for the
// whole frame.
// Interface: in_vld strobes a sample; chip_en pulses for one clock with the
// chosen chip sample on chip_i/chip_q once the last sample of a chip has
// arrived. frame_tick (any cycle) draws a new phase, applied from the next
// chip on. phase shows the current selection.
// The S/P plus mux structure and the per-frame random choice follow the
// design; OSR = 2 is read from the two mux inputs of the diagram; the LFSR is
// this implementation's choice.
module rspf
  import cs_pkg::*;
#(
  parameter int NSMP = OSR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_vld,
  input  sample_t     in_i,
  input  sample_t     in_q,
  input  logic        frame_tick,
  output logic        chip_en,
  output sample_t     chip_i,
  output sample_t     chip_q,
  output logic [$clog2(NSMP)-1:0] phase
);
  localparam int PW = $clog2(NSMP);
  sample_t sp_i [NSMP];
  sample_t sp_q [NSMP];
  logic [PW-1:0] cnt;
  logic [15:0]   lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; chip_en <= 1'b0; chip_i <= '0; chip_q <= '0;
      lfsr <= 16'hACE1; phase <= '0;
      for (int k = 0; k < NSMP; k++) begin sp_i[k] <= '0; sp_q[k] <= '0; end
    end else begin
      chip_en <= 1'b0;
      if (frame_tick) begin
        lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        phase <= PW'(lfsr % NSMP);
      end
      if (in_vld) begin
        sp_i[cnt] <= in_i; sp_q[cnt] <= in_q;
        if (cnt == PW'(NSMP-1)) begin
          cnt     <= '0;
          chip_en <= 1'b1;
          chip_i  <= (phase == PW'(NSMP-1)) ? in_i : sp_i[phase];
          chip_q  <= (phase == PW'(NSMP-1)) ? in_q : sp_q[phase];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
