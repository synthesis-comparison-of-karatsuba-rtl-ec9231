// tb_karatsuba_mult: end-to-end self-check of the Karatsuba multiplier in
// several configurations.
//
//  * N = 2, W = 4  (the default 8x8 size): all 65,536 operand pairs;
//  * N = 3, W = 3  (9x9, three coefficients, so c_2 has both a pair term and
//                   the square term D_1): all 262,144 operand pairs;
//  * N = 4, W = 4  (16x16): random operands plus the extreme values;
//  * N = 2, W = 7  (14x14): the worked decimal example 2178 x 5423 = 11811294.
// The reference is the integer product in 64-bit arithmetic. The testbench
// also counts how often each part of the scheme is really used: a pair sum
// a_p + a_q that carries out of W bits, a middle coefficient c_i wider than
// W bits (so the shifted coefficients overlap in the final addition), and an
// even coefficient that combines pair terms with a square term. Each must be
// seen at least once. A watchdog ends the run with a failure if it does not
// finish in time.
module tb_karatsuba_mult;

  int checks = 0;
  int failures = 0;
  int n_pair_carry = 0;    // a_p + a_q >= 2^W
  int n_wide_coeff = 0;    // some c_i >= 2^W
  int n_even_mixed = 0;    // even c_i with pair and square terms, both nonzero

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  karatsuba_mult #(.N(2), .W(4)) dut8 (.a(a8), .b(b8), .p(p8));

  logic [8:0]  a9, b9;
  logic [17:0] p9;
  karatsuba_mult #(.N(3), .W(3)) dut9 (.a(a9), .b(b9), .p(p9));

  logic [15:0] a16, b16;
  logic [31:0] p16;
  karatsuba_mult #(.N(4), .W(4)) dut16 (.a(a16), .b(b16), .p(p16));

  logic [13:0] a14, b14;
  logic [27:0] p14;
  karatsuba_mult #(.N(2), .W(7)) dut14 (.a(a14), .b(b14), .p(p14));

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint unsigned x, input longint unsigned y,
                       input longint unsigned got);
    checks++;
    if (got != x * y) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: %0d * %0d gave %0d, expected %0d", what, x, y, got, x * y);
    end
  endtask

  // Usage counters, from the operand values alone: n coefficients of w bits.
  task automatic count_usage(input longint unsigned x, input longint unsigned y,
                             input int n, input int w);
    int unsigned ac[4], bc[4], conv;
    int unsigned mask = (1 << w) - 1;
    for (int i = 0; i < n; i++) begin
      ac[i] = int'(x >> (i * w)) & mask;
      bc[i] = int'(y >> (i * w)) & mask;
    end
    for (int p = 0; p < n; p++)
      for (int q = p + 1; q < n; q++)
        if (ac[p] + ac[q] > mask) n_pair_carry++;
    for (int i = 0; i <= 2 * n - 2; i++) begin
      conv = 0;
      for (int p = 0; p < n; p++)
        for (int q = 0; q < n; q++)
          if (p + q == i) conv += ac[p] * bc[q];
      if (conv > mask) n_wide_coeff++;
      if (i % 2 == 0 && i > 0 && i < 2 * n - 2 && ac[i / 2] * bc[i / 2] != 0 && conv != ac[i / 2] * bc[i / 2])
        n_even_mixed++;
    end
  endtask

  initial begin
    // 8x8, exhaustive
    for (int v = 0; v < 65536; v++) begin
      a8 = 8'(v);
      b8 = 8'(v >> 8);
      #1;
      check("8x8", 64'(a8), 64'(b8), 64'(p8));
      count_usage(64'(a8), 64'(b8), 2, 4);
    end
    // 9x9 with three coefficients, exhaustive
    for (int v = 0; v < 262144; v++) begin
      a9 = 9'(v);
      b9 = 9'(v >> 9);
      #1;
      check("9x9", 64'(a9), 64'(b9), 64'(p9));
      count_usage(64'(a9), 64'(b9), 3, 3);
    end
    // 16x16 with four coefficients: corners, then random
    for (int t = 0; t < 4; t++) begin
      a16 = ((t & 1) != 0) ? 16'hffff : 16'h0000;
      b16 = ((t & 2) != 0) ? 16'hffff : 16'h0000;
      #1;
      check("16x16", 64'(a16), 64'(b16), 64'(p16));
    end
    for (int t = 0; t < 100000; t++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      check("16x16", 64'(a16), 64'(b16), 64'(p16));
      count_usage(64'(a16), 64'(b16), 4, 4);
    end
    // the worked example
    a14 = 14'd2178;
    b14 = 14'd5423;
    #1;
    check("14x14 example", 64'(a14), 64'(b14), 64'(p14));
    checks++;
    if (p14 != 28'd11811294) begin
      failures++;
      if (failures <= 10) $display("FAIL: 2178 * 5423 gave %0d", 64'(p14));
    end

    $display("pair-sum carries: %0d, wide coefficients: %0d, mixed even coefficients: %0d",
             n_pair_carry, n_wide_coeff, n_even_mixed);
    checks += 3;
    if (n_pair_carry == 0) begin failures++; if (failures <= 10) $display("FAIL: no pair-sum carry seen"); end
    if (n_wide_coeff == 0) begin failures++; if (failures <= 10) $display("FAIL: no wide coefficient seen"); end
    if (n_even_mixed == 0) begin failures++; if (failures <= 10) $display("FAIL: no mixed even coefficient seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_karatsuba_mult
