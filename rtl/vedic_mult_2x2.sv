// vedic_mult_2x2: 2x2 unsigned multiplier by the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule, the leaf of the Vedic multiplier tree.
//
// Vertical: p[0] = a0 b0. Crosswise: a1 b0 + a0 b1 in a half adder gives
// p[1] and a carry. Vertical again: a1 b1 plus that carry in a second half
// adder gives p[2] and p[3]. Four AND gates, two half adders, purely
// combinational. This leaf is the usual one for Vedic multipliers and is this
// design's choice: the published design starts at the 4x4 level.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic cross_lo, cross_hi, vert_hi, c1;

  always_comb begin
    p[0]     = a[0] & b[0];
    cross_lo = a[1] & b[0];
    cross_hi = a[0] & b[1];
    vert_hi  = a[1] & b[1];
    p[1]     = cross_lo ^ cross_hi;
    c1       = cross_lo & cross_hi;
    p[2]     = vert_hi ^ c1;
    p[3]     = vert_hi & c1;
  end

endmodule
