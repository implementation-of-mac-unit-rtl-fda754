// vedic_mult_8x8: 8x8 unsigned Vedic multiplier with a 16-bit product.
//
// Each operand is split into nibbles and four 4x4 Vedic multipliers form
// the partial products in parallel:
//   q0 = a[3:0]*b[3:0]   q1 = a[7:4]*b[3:0]   q2 = a[3:0]*b[7:4]   q3 = a[7:4]*b[7:4]
// Three 8-bit square-root carry select adders combine them:
//   adder 1: q1 + q2                          -> s1, Co1
//   adder 2: s1 + {0000, q0[7:4]}             -> s2, Co2     p[7:4]  = s2[3:0]
//   adder 3: q3 + {000, Co1|Co2, s2[7:4]}     -> p[15:8], Co3
// and p[3:0] = q0[3:0]. Co1 and Co2 both carry weight 2^12; they are never
// 1 together (adder 1 can only carry when its sum is small), so one OR gate
// merges them into bit 4 of adder 3's second operand. Co3 is always 0
// because the product fits in 16 bits. Both facts are checked by an
// assertion.
//
// Purely combinational. The nibble split, the four 4x4 multipliers, the
// three 8-bit SQRT-CSLA adders and the zero-filled inputs follow the
// published structure; merging Co1 and Co2 with an OR gate into adder 3's
// operand is this design's own reading of where the two carries go.
module vedic_mult_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] q0, q1, q2, q3;
  logic [7:0] s1, s2;
  logic       co1, co2, co3;

  vedic_mult_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mult_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mult_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mult_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  sqrt_csla #(.WIDTH(8)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(co1)
  );

  sqrt_csla #(.WIDTH(8)) u_add2 (
    .a(s1), .b({4'b0000, q0[7:4]}), .cin(1'b0), .sum(s2), .cout(co2)
  );

  sqrt_csla #(.WIDTH(8)) u_add3 (
    .a(q3), .b({3'b000, co1 | co2, s2[7:4]}), .cin(1'b0), .sum(p[15:8]), .cout(co3)
  );

  assign p[7:4] = s2[3:0];
  assign p[3:0] = q0[3:0];

  // The two middle carries are exclusive and the top adder never overflows.
  always_comb begin
    assert final (!(co1 && co2) && !co3)
      else $error("vedic_mult_8x8: impossible carry (co1=%b co2=%b co3=%b)", co1, co2, co3);
  end

endmodule
