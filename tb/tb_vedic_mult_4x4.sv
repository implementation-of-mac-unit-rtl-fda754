// tb_vedic_mult_4x4: exhaustive self-check of the 4x4 Vedic multiplier
// against the integer product for all 256 operand pairs.
module tb_vedic_mult_4x4;

  int checks = 0;
  int failures = 0;

  logic [3:0] a, b;
  logic [7:0] p;

  vedic_mult_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d got=%0d exp=%0d", i, j, p, i * j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
