// Low-power magnitude calculator: y = alpha*|a| + beta*|b| with
// alpha = 2^d when 2^(d-1) <= |a| < 2^d (likewise beta for |b|), so each term
// approximates a^2 (resp. b^2) using a priority encoder and a shifter instead
// of a multiplier. Used wherever magnitudes are only compared with each other.
// Purely combinational. Output width 2*W+1 holds the largest possible value
// (|a| = 2^(W-1) gives 2^(2W-1) per term).
// The formula follows the design (its equation (1)); each operand gets its
// own exponent, and the shift is written as a left shift of |a| by d, which
// equals alpha*|a|.
module mag_approx #(
  parameter int W = 10
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic [2*W:0]        y
);
  logic [W-1:0] abs_a, abs_b;
  logic [$clog2(W+1)-1:0] da, db;

  // number of significant bits: 2^(d-1) <= v < 2^d, 0 for v = 0
  function automatic logic [$clog2(W+1)-1:0] prio(input logic [W-1:0] v);
    prio = '0;
    for (int i = 0; i < W; i++) if (v[i]) prio = ($clog2(W+1))'(i + 1);
  endfunction

  always_comb begin
    abs_a = a[W-1] ? W'(-a) : W'(a);
    abs_b = b[W-1] ? W'(-b) : W'(b);
    da = prio(abs_a);
    db = prio(abs_b);
    y  = ((2*W+1)'(abs_a) << da) + ((2*W+1)'(abs_b) << db);
  end
endmodule
