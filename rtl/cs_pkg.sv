// Shared constants and helper functions of the W-CDMA cell search datapath.
// Timing constants are those of the W-CDMA downlink (3.84 Mchip/s, 2560-chip
// slots, 15-slot frames, 256-chip synchronisation codes). Word widths follow
// the bit widths printed in the block diagram of the design (4-bit samples,
// 10-bit detector outputs, 23-bit combiner sums truncated to 11 and 13 bits,
// 15-bit stage-1 accumulations, 21-bit despreader outputs, 10-bit vote
// counters). Code tables that the hardware keeps in ROM are given here as
// functions so that every table is computed from its formula.
package cs_pkg;

  localparam int SAMPLE_W   = 4;     // ADC sample width (I and Q each)
  localparam int OSR        = 2;     // samples per chip
  localparam int SLOT_CHIPS = 2560;  // chips per slot = slot-boundary hypotheses
  localparam int SLOTS      = 15;    // slots per frame
  localparam int SYNC_LEN   = 256;   // PSC / SSC / CPICH symbol length in chips
  localparam int NPART      = 4;     // partial symbols per 256-chip symbol
  localparam int DET_W      = 10;    // PSC / SSC partial correlation width
  localparam int NC_W       = 23;    // non-coherent / coherent combiner sum width
  localparam int S1_IN_W    = 11;    // stage-1 value after truncation
  localparam int S1_ACC_W   = 15;    // stage-1 accumulation width
  localparam int S2_W       = 13;    // stage-2 value after truncation
  localparam int NSSC       = 16;    // number of secondary synchronisation codes
  localparam int NGROUP     = 64;    // scrambling code groups
  localparam int NCAND      = 8;     // primary scrambling codes per group
  localparam int DESP_W     = 21;    // active despreader output width
  localparam int VOTE_W     = 10;    // vote counter width

  localparam int CHIP_CNT_W = $clog2(SLOT_CHIPS);
  localparam int SLOT_W     = $clog2(SLOTS);

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DET_W-1:0]    det_t;
  typedef logic [CHIP_CNT_W-1:0]      chip_idx_t;
  typedef logic [SLOT_W-1:0]          slot_idx_t;

  // PSC outer code, 16 entries (1 = +1, 0 = -1), entry 0 transmitted first.
  localparam logic [15:0] PSC_OUTER = 16'b1101_0111_0010_0111; // bit p = entry p
  // SSC outer scrambling z, 16 entries (1 = +1), bit p = entry p.
  localparam logic [15:0] SSC_Z     = 16'b0000_0101_0011_0111;

  // Saturate a signed value to OW bits.
  function automatic logic signed [31:0] sat_s(input logic signed [31:0] v, input int ow);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (ow-1)) - 1;
    lo = -(32'sd1 <<< (ow-1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  // Sign of outer SSC code k at position p: z(p) * H16[k](p), 1 = +1.
  function automatic logic ssc_outer_sign(input logic [3:0] k, input logic [3:0] p);
    return SSC_Z[p] ^ (^(k & p));
  endfunction

  // GF(16) multiply, primitive polynomial x^4 + x + 1.
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r, aa;
    r = '0; aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= aa;
      aa = {aa[2:0], 1'b0} ^ (aa[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction

  // GF(16) power of the primitive element 2.
  function automatic logic [3:0] gf16_pow(input int e);
    logic [3:0] r;
    r = 4'd1;
    for (int i = 0; i < (e % 15); i++) r = gf16_mul(r, 4'd2);
    return r;
  endfunction

  // Symbol i (0..14) of comma-free code word g (0..63), value 0..15 standing
  // for SSC number 1..16. Stand-in construction: a (15,3) Reed-Solomon word
  // f(x) = m1*x + m2*x^2 over GF(16) evaluated at gamma^i, plus the coset
  // offset i that removes the cyclic property.
  function automatic logic [3:0] cfrs_symbol(input int g, input int i);
    logic [3:0] m1, m2, x;
    m1 = 4'((g % 15) + 1);
    m2 = 4'((g / 15) + 1);
    x  = gf16_pow(i);
    return gf16_mul(m1, x) ^ gf16_mul(m2, gf16_mul(x, x)) ^ 4'(i);
  endfunction

endpackage
