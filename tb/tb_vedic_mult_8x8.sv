// tb_vedic_mult_8x8: exhaustive self-check of the 8x8 Vedic multiplier
// against the integer product for all 65,536 operand pairs.
module tb_vedic_mult_8x8;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_mult_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got=%0d exp=%0d", i, j, p, i * j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
