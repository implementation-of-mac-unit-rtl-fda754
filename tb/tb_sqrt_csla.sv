// tb_sqrt_csla: self-check of the BEC-based square-root carry select adder.
// The 16-bit default is driven with operands that make each group's carry
// select path switch (all-ones and carry-chain patterns) and with random
// operands; the 8-bit and 4-bit widths used inside the multiplier are
// checked exhaustively with both carry-in values. Expected results are
// integer sums.
module tb_sqrt_csla;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16;  logic cin16;  logic [15:0] s16;  logic c16;
  logic [7:0]  a8,  b8;   logic cin8;   logic [7:0]  s8;   logic c8;
  logic [3:0]  a4,  b4;   logic cin4;   logic [3:0]  s4;   logic c4;

  sqrt_csla             u16 (.a(a16), .b(b16), .cin(cin16), .sum(s16), .cout(c16));
  sqrt_csla #(.WIDTH(8)) u8 (.a(a8),  .b(b8),  .cin(cin8),  .sum(s8),  .cout(c8));
  sqrt_csla #(.WIDTH(4)) u4 (.a(a4),  .b(b4),  .cin(cin4),  .sum(s4),  .cout(c4));

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", name, got, exp);
    end
  endtask

  task automatic try16(logic [15:0] x, logic [15:0] y, logic ci);
    a16 = x; b16 = y; cin16 = ci;
    #1;
    check($sformatf("w16 %0d+%0d+%0d", x, y, ci), longint'({c16, s16}),
          longint'(x) + longint'(y) + longint'(ci));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; cin16 = 1'b0;
    a8 = '0; b8 = '0; cin8 = 1'b0;
    a4 = '0; b4 = '0; cin4 = 1'b0;
    // Carry rippling from bit 0 through every group boundary.
    try16(16'hFFFF, 16'h0001, 1'b0);
    try16(16'hFFFF, 16'h0000, 1'b1);
    try16(16'hFFFF, 16'hFFFF, 1'b1);
    try16(16'h0000, 16'h0000, 1'b0);
    // A carry generated at the top of each group (bits 1, 3, 6, 10, 15)
    // into a following group that is all ones.
    for (int g = 0; g < 16; g++) begin
      try16(16'hFFFF >> g, 16'h0001 << 0, 1'b0);
      try16(16'(1) << g, 16'(1) << g, 1'b0);
      try16(~(16'(1) << g), 16'(1) << g, 1'b1);
    end
    for (int n = 0; n < 20000; n++)
      try16(16'($urandom), 16'($urandom), 1'($urandom));

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a8 = 8'(i); b8 = 8'(j); cin8 = k[0];
          #1;
          check($sformatf("w8 %0d+%0d+%0d", i, j, k), longint'({c8, s8}), longint'(i + j + k));
        end

    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 2; k++) begin
          a4 = 4'(i); b4 = 4'(j); cin4 = k[0];
          #1;
          check($sformatf("w4 %0d+%0d+%0d", i, j, k), longint'({c4, s4}), longint'(i + j + k));
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
