// Comma-free Reed-Solomon codebook ROM, 64 code words of 15 four-bit symbols
// (64 x 60 bits), symbol value v standing for SSC number v+1. Word g is the
// code-group signature; symbol i is sent in slot i of every frame.
// The size follows the design. The W-CDMA table itself is not reproduced
// here: the contents are computed by cs_pkg::cfrs_symbol, a (15,3)
// Reed-Solomon construction over GF(16) with an added coset offset, whose
// words and all their cyclic shifts differ in at least 10 of 15 symbols.
// For operation on real W-CDMA signals this table must be replaced by the
// standard's.
// Interface: combinational, g in, word out (symbol i in bits 4i+3..4i).
module cfrs_rom
  import cs_pkg::*;
(
  input  logic [5:0]  g,
  output logic [59:0] word
);
  function automatic logic [NGROUP*60-1:0] build();
    logic [NGROUP*60-1:0] t;
    for (int gg = 0; gg < NGROUP; gg++)
      for (int i = 0; i < SLOTS; i++)
        t[gg*60 + 4*i +: 4] = cfrs_symbol(gg, i);
    return t;
  endfunction
  localparam logic [NGROUP*60-1:0] TABLE = build();

  assign word = TABLE[g*60 +: 60];
endmodule
