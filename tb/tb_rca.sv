// tb_rca: exhaustive self-check of the ripple carry adder at the group
// widths the 16-bit carry select adder uses (2, 3, 4 and 5 bits). Every
// a, b and carry-in combination is applied and sum/cout are compared with
// the integer sum a + b + cin.
module tb_rca;

  int checks = 0;
  int failures = 0;

  logic [4:0] a, b;
  logic       cin;
  logic [1:0] s2; logic c2;
  logic [2:0] s3; logic c3;
  logic [3:0] s4; logic c4;
  logic [4:0] s5; logic c5;

  rca #(.WIDTH(2)) u2 (.a(a[1:0]), .b(b[1:0]), .cin(cin), .sum(s2), .cout(c2));
  rca #(.WIDTH(3)) u3 (.a(a[2:0]), .b(b[2:0]), .cin(cin), .sum(s3), .cout(c3));
  rca              u4 (.a(a[3:0]), .b(b[3:0]), .cin(cin), .sum(s4), .cout(c4));
  rca #(.WIDTH(5)) u5 (.a(a),      .b(b),      .cin(cin), .sum(s5), .cout(c5));

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0d got=%0d exp=%0d", name, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int k = 0; k < 2; k++) begin
          a = 5'(i); b = 5'(j); cin = k[0];
          #1;
          check("w2", int'({c2, s2}), (i % 4) + (j % 4) + k);
          check("w3", int'({c3, s3}), (i % 8) + (j % 8) + k);
          check("w4", int'({c4, s4}), (i % 16) + (j % 16) + k);
          check("w5", int'({c5, s5}), i + j + k);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
