// sqrt_csla: BEC-based square-root carry select adder.
//
// The operands are cut into groups whose widths grow towards the most
// significant end (2, 2, 3, 4, 5 bits for the 16-bit default). The lowest
// group is a plain ripple carry adder fed by cin. Every higher group computes
// its sum once, with an RCA whose carry-in is 0, and derives the carry-in-1
// sum from it with a binary to excess-1 converter (BEC) one bit wider than
// the group, so that the group's carry is converted too. A 2:1 multiplexer
// per group picks the RCA or the BEC result according to the carry out of
// the group below, which is itself a multiplexer output. All groups add in
// parallel and only the multiplexers are chained, which is what makes the
// adder faster than one long RCA.
//
// Interface: a, b, cin in; sum (WIDTH bits) and cout out. Purely
// combinational. The 16-bit grouping and the RCA/BEC/multiplexer structure
// follow the published adder; the grouping for other widths (see mac_pkg)
// and the cin port are this design's own.
module sqrt_csla
  import mac_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = csla_num_groups(WIDTH);

  // carry[g] is the carry into group g; carry[NG] is the adder's carry out.
  logic [NG:0] carry;
  assign carry[0] = cin;

  // Lowest group: a single RCA fed by cin.
  localparam int unsigned W0 = csla_grp_w(WIDTH, 0);
  rca #(.WIDTH(W0)) u_rca0 (
    .a    (a[W0-1:0]),
    .b    (b[W0-1:0]),
    .cin  (carry[0]),
    .sum  (sum[W0-1:0]),
    .cout (carry[1])
  );

  for (genvar g = 1; g < NG; g++) begin : g_grp
    localparam int unsigned LO = csla_grp_lo(WIDTH, g);
    localparam int unsigned GW = csla_grp_w(WIDTH, g);

    logic [GW:0] s0;   // {carry, sum} with carry-in 0 (RCA)
    logic [GW:0] s1;   // {carry, sum} with carry-in 1 (BEC of s0)

    rca #(.WIDTH(GW)) u_rca (
      .a    (a[LO+GW-1:LO]),
      .b    (b[LO+GW-1:LO]),
      .cin  (1'b0),
      .sum  (s0[GW-1:0]),
      .cout (s0[GW])
    );

    bec #(.WIDTH(GW+1)) u_bec (
      .b (s0),
      .x (s1)
    );

    // Group multiplexer, selected by the carry from the group below.
    assign {carry[g+1], sum[LO+GW-1:LO]} = carry[g] ? s1 : s0;
  end

  assign cout = carry[NG];

endmodule
