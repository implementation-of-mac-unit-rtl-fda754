// rca: ripple carry adder, the RCA blocks of the square-root carry select
// adder.
//
// A chain of full adders: bit i produces sum = a ^ b ^ c and passes on
// carry = a&b | c&(a^b) to bit i+1. Purely combinational; the carry ripples
// through all WIDTH stages. Interface: a, b and cin in, sum and cout out.
// The full-adder chain is the textbook RCA; the default width is arbitrary
// because every instance sets it.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];

endmodule
