// mac_unit: multiply-accumulate processing unit for a neuron of an
// artificial neural network.
//
// Each clock with en high computes Z <= Z' + A*B in a single cycle. The
// 8x8 Vedic multiplier forms the 16-bit product A*B, the BEC-based
// square-root carry select adder adds it to the feedback operand Z', and the
// accumulator stores the sum and its carry out. Z' is chosen by two
// controls:
//   clear     : Z' = 0, starting a new sum (Z = A*B)
//   psum_load : Z' = z_in, a partial sum read from an external memory, so the
//               unit can update partial sums kept in memory
//   otherwise : Z' = the accumulator, summing a stream of products
// clear wins when both are high. With en low the accumulator holds.
//
// Timing: operands, controls and z_in are sampled at the rising edge; z and
// z_cout show the new sum right after that edge (one clock of latency, one
// multiply-accumulate per clock). z_cout is the adder's carry out for the
// sum in z: 1 means the ACC_W-bit sum wrapped around. product is the
// multiplier's combinational output. Reset is asynchronous, active low.
//
// Operands are unsigned. The multiplier -> adder -> accumulator loop, the
// memory read/update/write use of the partial sum, the single-clock
// operation and the 16-bit adder follow the published unit; the enable,
// clear and psum_load controls, the reset and the carry flag are this
// design's own.
module mac_unit #(
  parameter int unsigned ACC_W = mac_pkg::ACC_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       clear,
  input  logic                       psum_load,
  input  logic [mac_pkg::DATA_W-1:0] a,
  input  logic [mac_pkg::DATA_W-1:0] b,
  input  logic [ACC_W-1:0]           z_in,
  output logic [ACC_W-1:0]           z,
  output logic                       z_cout,
  output logic [mac_pkg::PROD_W-1:0] product
);

  if (ACC_W < mac_pkg::PROD_W) begin : g_bad_width
    $error("mac_unit: ACC_W (%0d) must be at least the product width (%0d)", ACC_W, mac_pkg::PROD_W);
  end

  logic [ACC_W-1:0] feedback;
  logic [ACC_W-1:0] sum;
  logic             sum_cout;

  vedic_mult_8x8 u_mult (
    .a (a),
    .b (b),
    .p (product)
  );

  always_comb begin
    if (clear)          feedback = '0;
    else if (psum_load) feedback = z_in;
    else                feedback = z;
  end

  sqrt_csla #(.WIDTH(ACC_W)) u_adder (
    .a    (feedback),
    .b    (ACC_W'(product)),
    .cin  (1'b0),
    .sum  (sum),
    .cout (sum_cout)
  );

  accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .d     (sum),
    .cin   (sum_cout),
    .q     (z),
    .cout  (z_cout)
  );

endmodule
