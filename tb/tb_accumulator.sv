// tb_accumulator: self-check of the accumulator register. Random data,
// carry and enable are applied for many clocks; after each edge q and cout
// must equal a reference copy that loads only when en was high, and both
// must be 0 after the asynchronous reset.
module tb_accumulator;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en;
  logic [15:0] d;
  logic        cin;
  logic [15:0] q;
  logic        cout;

  logic [15:0] ref_q;
  logic        ref_c;

  accumulator dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .cin(cin), .q(q), .cout(cout));

  always #5 clk = ~clk;

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t got=%0d exp=%0d", name, $time, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; d = '0; cin = 1'b0;
    rst_n = 1'b0;
    #12;
    check("reset q", int'(q), 0);
    check("reset cout", int'(cout), 0);
    rst_n = 1'b1;
    ref_q = '0; ref_c = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en  = 1'($urandom);
      d   = 16'($urandom);
      cin = 1'($urandom);
      if (en) begin ref_q = d; ref_c = cin; end
      @(posedge clk); #1;
      check("q", int'(q), int'(ref_q));
      check("cout", int'(cout), int'(ref_c));
    end
    // Asynchronous reset in the middle of a clock period.
    @(negedge clk); #2; rst_n = 1'b0; #1;
    check("async reset q", int'(q), 0);
    check("async reset cout", int'(cout), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
