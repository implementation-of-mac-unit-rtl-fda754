// vedic_mult_4x4: 4x4 unsigned Vedic multiplier with an 8-bit product.
//
// The same decomposition as the 8x8 multiplier one level down. The 2-bit
// halves of the operands feed four 2x2 Urdhva-Tiryagbhyam multipliers:
//   q0 = a[1:0]*b[1:0]   q1 = a[3:2]*b[1:0]   q2 = a[1:0]*b[3:2]   q3 = a[3:2]*b[3:2]
// and three 4-bit square-root carry select adders combine them:
//   adder 1: q1 + q2                        -> s1, c1
//   adder 2: s1 + {00, q0[3:2]}             -> s2, c2     p[3:2] = s2[1:0]
//   adder 3: q3 + {0, c1|c2, s2[3:2]}       -> p[7:4]
// with p[1:0] = q0[1:0]. c1 and c2 both weigh 2^6 and are never 1 together,
// so an OR gate merges them; adder 3 never carries out (both checked by an
// assertion). Purely combinational.
//
// The published design uses 4x4 Vedic multipliers as its building blocks
// without showing their insides; this recursive structure is this design's
// own choice, made to match the 8x8 level.
module vedic_mult_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2;
  logic       c1, c2, c3;

  vedic_mult_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mult_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mult_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mult_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  sqrt_csla #(.WIDTH(4)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  sqrt_csla #(.WIDTH(4)) u_add2 (
    .a(s1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  sqrt_csla #(.WIDTH(4)) u_add3 (
    .a(q3), .b({1'b0, c1 | c2, s2[3:2]}), .cin(1'b0), .sum(p[7:4]), .cout(c3)
  );

  assign p[3:2] = s2[1:0];
  assign p[1:0] = q0[1:0];

  always_comb begin
    assert final (!(c1 && c2) && !c3)
      else $error("vedic_mult_4x4: impossible carry (c1=%b c2=%b c3=%b)", c1, c2, c3);
  end

endmodule
