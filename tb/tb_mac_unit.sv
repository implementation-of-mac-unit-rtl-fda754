// tb_mac_unit: end-to-end self-check of the multiply-accumulate unit at its
// default sizes (8-bit operands, 16-bit accumulator).
//
// Three phases, all compared with a reference model computed in integers:
//  1. Neuron dot products: for several neurons, clear on the first input and
//     accumulate input*weight over 16 inputs; the final z must equal the dot
//     product modulo 2^16 and the carry flag must match the last addition.
//  2. Partial sums in memory: a small array in this testbench stands for the
//     memory around the unit. Each step reads a partial sum, applies it on
//     z_in with psum_load, and writes the updated z back, tile by tile, so
//     the memory ends holding complete dot products.
//  3. Random stimulus on every control (en, clear, psum_load, operands).
// After every clock edge z and z_cout must show the result of the operation
// sampled at that edge (one multiply-accumulate per clock, one clock of
// latency) and product must equal a*b. The testbench counts how often each
// mechanism happened (accumulate, clear, partial-sum load, hold with en low,
// clear overriding psum_load, wrap-around with carry out) and counts a
// failure for any that never did.
module tb_mac_unit;

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en, clear, psum_load;
  logic [7:0]  a, b;
  logic [15:0] z_in;
  logic [15:0] z;
  logic        z_cout;
  logic [15:0] product;

  mac_unit dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .psum_load(psum_load),
    .a(a), .b(b), .z_in(z_in), .z(z), .z_cout(z_cout), .product(product)
  );

  always #5 clk = ~clk;

  // Reference model state.
  int unsigned ref_z;
  bit          ref_c;

  // Mechanism counters.
  int n_acc, n_clear, n_psum, n_hold, n_prio, n_wrap;

  task automatic check(string name, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t got=%0d exp=%0d", name, $time, got, exp);
    end
  endtask

  // Apply one set of inputs before a rising edge, then check the outputs
  // just after it against the reference model.
  task automatic step(bit e, bit c, bit p, logic [7:0] x, logic [7:0] y, logic [15:0] zi);
    int unsigned fb, s;
    @(negedge clk);
    en = e; clear = c; psum_load = p; a = x; b = y; z_in = zi;
    #1;
    check("product", int'(product), int'(x) * int'(y));
    if (e) begin
      fb = c ? 0 : (p ? int'(zi) : ref_z);
      s  = fb + int'(x) * int'(y);
      ref_z = s & 32'hFFFF;
      ref_c = s[16];
      if (c) n_clear++;
      else if (p) n_psum++;
      else n_acc++;
      if (c && p) n_prio++;
      if (s[16]) n_wrap++;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    check("z", int'(z), ref_z);
    check("z_cout", int'(z_cout), int'(ref_c));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_IN   = 16;  // inputs per neuron
  localparam int N_NEUR = 6;   // neurons
  localparam int N_TILE = 4;   // tiles of inputs per neuron in phase 2

  logic [7:0]  x_vec [N_IN];
  logic [7:0]  w_mat [N_NEUR][N_IN];
  logic [15:0] psum_mem [N_NEUR];

  initial begin
    int unsigned dot;
    en = 1'b0; clear = 1'b0; psum_load = 1'b0; a = '0; b = '0; z_in = '0;
    rst_n = 1'b0;
    ref_z = 0; ref_c = 1'b0;
    n_acc = 0; n_clear = 0; n_psum = 0; n_hold = 0; n_prio = 0; n_wrap = 0;
    repeat (2) @(posedge clk);
    #1;
    check("reset z", int'(z), 0);
    check("reset z_cout", int'(z_cout), 0);
    rst_n = 1'b1;

    // Inputs and weights; neuron 0 uses small values, the last uses
    // all-ones so that its sum wraps.
    for (int i = 0; i < N_IN; i++) x_vec[i] = 8'($urandom);
    for (int n = 0; n < N_NEUR; n++)
      for (int i = 0; i < N_IN; i++)
        w_mat[n][i] = (n == 0) ? 8'($urandom_range(0, 3)) :
                      (n == N_NEUR - 1) ? 8'hFF : 8'($urandom);
    x_vec[0] = 8'hFF;

    // Phase 1: one neuron at a time, clear on the first input.
    for (int n = 0; n < N_NEUR; n++) begin
      dot = 0;
      for (int i = 0; i < N_IN; i++) begin
        step(1'b1, i == 0, 1'b0, x_vec[i], w_mat[n][i], 16'($urandom));
        dot += int'(x_vec[i]) * int'(w_mat[n][i]);
        // An idle clock in the middle must not disturb the sum.
        if (i == N_IN / 2) step(1'b0, 1'($urandom), 1'($urandom), 8'($urandom), 8'($urandom), 16'($urandom));
      end
      check("neuron dot product", int'(z), dot & 32'hFFFF);
    end

    // Phase 2: neurons interleaved tile by tile, partial sums kept in memory.
    for (int n = 0; n < N_NEUR; n++) psum_mem[n] = '0;
    for (int t = 0; t < N_TILE; t++)
      for (int n = 0; n < N_NEUR; n++) begin
        for (int i = t * (N_IN / N_TILE); i < (t + 1) * (N_IN / N_TILE); i++)
          step(1'b1, 1'b0, i == t * (N_IN / N_TILE), x_vec[i], w_mat[n][i], psum_mem[n]);
        psum_mem[n] = z;  // memory write of the updated partial sum
      end
    for (int n = 0; n < N_NEUR; n++) begin
      dot = 0;
      for (int i = 0; i < N_IN; i++) dot += int'(x_vec[i]) * int'(w_mat[n][i]);
      check("memory partial sum", int'(psum_mem[n]), dot & 32'hFFFF);
    end

    // Phase 3: random controls.
    for (int k = 0; k < 3000; k++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 7) == 0),
           1'($urandom_range(0, 5) == 0), 8'($urandom), 8'($urandom), 16'($urandom));

    $display("mechanisms: accumulate=%0d clear=%0d psum_load=%0d hold=%0d clear_over_psum=%0d wrap=%0d",
             n_acc, n_clear, n_psum, n_hold, n_prio, n_wrap);
    if (n_acc == 0)   begin failures++; $display("FAIL accumulate never happened"); end
    if (n_clear == 0) begin failures++; $display("FAIL clear never happened"); end
    if (n_psum == 0)  begin failures++; $display("FAIL psum_load never happened"); end
    if (n_hold == 0)  begin failures++; $display("FAIL hold never happened"); end
    if (n_prio == 0)  begin failures++; $display("FAIL clear over psum_load never happened"); end
    if (n_wrap == 0)  begin failures++; $display("FAIL wrap-around never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
