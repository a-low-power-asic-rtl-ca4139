// SSC outer-code table: 16 codes of 16 signs. Code k (SSC number k+1) at
// 16-chip segment p has the sign z(p) * H16[k](p), where z is the W-CDMA SSC
// outer scrambling sequence and H16 the 16x16 Sylvester-Hadamard matrix, so
// the full SSC chip 16p+q equals b(q) times this sign. The table holds
// 16 x 16 bits as in the design; its contents are computed from that formula.
// Interface: combinational, k in, row out (bit p = sign at segment p, 1 = +1).
module ssc_code_rom
  import cs_pkg::*;
(
  input  logic [3:0]  k,
  output logic [15:0] row
);
  function automatic logic [16*16-1:0] build();
    logic [16*16-1:0] t;
    for (int kk = 0; kk < 16; kk++)
      for (int p = 0; p < 16; p++)
        t[kk*16+p] = ssc_outer_sign(4'(kk), 4'(p));
    return t;
  endfunction
  localparam logic [16*16-1:0] TABLE = build();

  assign row = TABLE[k*16 +: 16];
endmodule
