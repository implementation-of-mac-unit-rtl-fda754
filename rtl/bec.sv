// bec: binary to excess-1 converter (BEC).
//
// Outputs its input plus one, modulo 2^WIDTH. In the carry select adder it
// replaces the second ripple carry adder that would compute a group's sum
// with carry-in 1: that sum is the carry-in-0 sum plus one. Gate equations:
// x[0] = ~b[0], x[i] = b[i] ^ (b[0] & ... & b[i-1]), one AND chain and one
// XOR per bit. Purely combinational. The equations are the usual ones for
// this converter; the width is set by each instance (WIDTH = group width + 1,
// so the group's carry is included).
module bec #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);

  logic [WIDTH-1:0] all_ones_below;  // AND of b[i-1:0]

  assign all_ones_below[0] = 1'b1;

  for (genvar i = 1; i < WIDTH; i++) begin : g_and
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign x = b ^ all_ones_below;

endmodule
