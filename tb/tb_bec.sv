// tb_bec: exhaustive self-check of the binary to excess-1 converter at the
// widths the 16-bit carry select adder uses (3 to 6 bits): x must equal
// b + 1 modulo 2^WIDTH for every input, including the all-ones wrap.
module tb_bec;

  int checks = 0;
  int failures = 0;

  logic [5:0] b;
  logic [2:0] x3;
  logic [3:0] x4;
  logic [4:0] x5;
  logic [5:0] x6;

  bec #(.WIDTH(3)) u3 (.b(b[2:0]), .x(x3));
  bec              u4 (.b(b[3:0]), .x(x4));
  bec #(.WIDTH(5)) u5 (.b(b[4:0]), .x(x5));
  bec #(.WIDTH(6)) u6 (.b(b),      .x(x6));

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s b=%0d got=%0d exp=%0d", name, b, got, exp);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      b = 6'(i);
      #1;
      check("w3", int'(x3), (i + 1) % 8);
      check("w4", int'(x4), (i + 1) % 16);
      check("w5", int'(x5), (i + 1) % 32);
      check("w6", int'(x6), (i + 1) % 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
