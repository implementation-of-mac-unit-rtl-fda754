// accumulator: the register that holds the MAC unit's running sum.
//
// On a rising clock edge with en high it stores the adder's sum d and the
// adder's carry out cin; otherwise it holds. q and cout are the stored
// values, so they change one clock after d is presented. An asynchronous
// active-low reset clears both. Storing the carry next to the sum, the
// enable and the reset are this design's choices.
module accumulator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  input  logic             cin,
  output logic [WIDTH-1:0] q,
  output logic             cout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      cout <= 1'b0;
    end else if (en) begin
      q    <= d;
      cout <= cin;
    end
  end

endmodule
