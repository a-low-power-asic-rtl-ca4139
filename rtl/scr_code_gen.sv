// Scrambling-code generator for stage 3. Produces, chip by chip, the eight
// primary downlink scrambling codes n = 16*(8g+k), k = 0..7, of code group g,
// each as a pair of bits (I, Q) with 0 meaning +1 and 1 meaning -1.
// The W-CDMA Gold code uses an x m-sequence (x^18+x^7+1) shifted by n and a
// y m-sequence (x^18+x^10+x^7+x^5+1); I = x_n(i)+y(i) and Q is the same
// sequence 131072 chips later, formed from taps 4, 6, 15 of x_n and 5, 6,
// 8..15 of y. Each candidate keeps its own x register; the y register is
// shared.
// The initial x states ("initial phases") of the eight codes are computed on
// load: a master register starts from the x seed and jumps 16 chips per
// clock, 8g jumps to the group's first code and one more jump per further
// code (at most 512 clocks), after which ready rises.
// Interface: load with g; chip_en steps the codes; frame_start, given with the
// chip_en of a frame's first chip, restarts all registers so that this chip
// gets code phase 0. c_i / c_q are combinational for the current chip.
// The design stores the initial phases in a ROM; computing them on load is
// this implementation's choice.
module scr_code_gen
  import cs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [5:0]  g,
  input  logic        chip_en,
  input  logic        frame_start,
  output logic        ready,
  output logic [NCAND-1:0] c_i,
  output logic [NCAND-1:0] c_q
);
  localparam logic [17:0] X_SEED = 18'h00001;
  localparam logic [17:0] Y_SEED = 18'h3FFFF;

  function automatic logic [17:0] x_step(input logic [17:0] s);
    return {s[7] ^ s[0], s[17:1]};
  endfunction
  function automatic logic [17:0] y_step(input logic [17:0] s);
    return {s[10] ^ s[7] ^ s[5] ^ s[0], s[17:1]};
  endfunction
  function automatic logic [17:0] x_jump16(input logic [17:0] s);
    logic [17:0] t;
    t = s;
    for (int i = 0; i < 16; i++) t = x_step(t);
    return t;
  endfunction

  logic [17:0] init [NCAND];
  logic [17:0] xs [NCAND];
  logic [17:0] ys;
  logic [17:0] master;
  logic [8:0]  jumps;
  logic [3:0]  kcap;
  logic        filling;

  logic [17:0] xc [NCAND];
  logic [17:0] yc;
  always_comb begin
    yc = frame_start ? Y_SEED : ys;
    for (int k = 0; k < NCAND; k++) begin
      xc[k]  = frame_start ? init[k] : xs[k];
      c_i[k] = xc[k][0] ^ yc[0];
      c_q[k] = (xc[k][4] ^ xc[k][6] ^ xc[k][15]) ^
               (yc[5] ^ yc[6] ^ yc[8] ^ yc[9] ^ yc[10] ^ yc[11] ^ yc[12] ^ yc[13] ^ yc[14] ^ yc[15]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0; filling <= 1'b0; master <= X_SEED; jumps <= '0; kcap <= '0;
      ys <= Y_SEED;
      for (int k = 0; k < NCAND; k++) begin init[k] <= X_SEED; xs[k] <= X_SEED; end
    end else begin
      if (load) begin
        ready <= 1'b0; filling <= 1'b1; master <= X_SEED; jumps <= {g, 3'b000}; kcap <= '0;
      end else if (filling) begin
        if (jumps != '0) begin
          master <= x_jump16(master);
          jumps  <= jumps - 9'd1;
        end else begin
          init[kcap[2:0]] <= master;
          master <= x_jump16(master);
          kcap   <= kcap + 4'd1;
          if (kcap == 4'(NCAND-1)) begin filling <= 1'b0; ready <= 1'b1; end
        end
      end
      if (chip_en) begin
        ys <= y_step(yc);
        for (int k = 0; k < NCAND; k++) xs[k] <= x_step(xc[k]);
      end
    end
  end
endmodule
