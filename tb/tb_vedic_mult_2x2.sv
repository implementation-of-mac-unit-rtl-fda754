// tb_vedic_mult_2x2: exhaustive self-check of the 2x2 Urdhva-Tiryagbhyam
// leaf multiplier against the integer product for all 16 operand pairs.
module tb_vedic_mult_2x2;

  int checks = 0;
  int failures = 0;

  logic [1:0] a, b;
  logic [3:0] p;

  vedic_mult_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
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
