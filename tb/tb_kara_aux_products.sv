// tb_kara_aux_products: self-check of the auxiliary products D_i and
// D_{p,q}.
//
// The default configuration (N = 2, W = 4) is checked over all 2^16
// coefficient combinations; an N = 3, W = 3 instance is checked with random
// coefficients so that several pairs, and the pair ordering, are exercised.
// The reference walks the pairs (p,q), q > p, in its own counter order and
// computes the products in integer arithmetic. A watchdog ends the run with
// a failure if it does not finish in time.
module tb_kara_aux_products;

  int checks = 0;
  int failures = 0;
  int pair_carries = 0;  // cases where a pair sum needed the extra bit

  // default configuration
  logic [1:0][3:0] a2, b2;
  logic [1:0][7:0] d2;
  logic [0:0][9:0] dpq2;
  kara_aux_products #(.N(2), .W(4)) dut2 (.a_coef(a2), .b_coef(b2), .d(d2), .dpq(dpq2));

  // three coefficients of three bits
  logic [2:0][2:0] a3, b3;
  logic [2:0][5:0] d3;
  logic [2:0][7:0] dpq3;
  kara_aux_products #(.N(3), .W(3)) dut3 (.a_coef(a3), .b_coef(b3), .d(d3), .dpq(dpq3));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a2 = 8'(v);
      b2 = 8'(v >> 8);
      #1;
      for (int i = 0; i < 2; i++) check("N2 D_i", int'(d2[i]), int'(a2[i]) * int'(b2[i]));
      check("N2 D_01", int'(dpq2[0]), (int'(a2[0]) + int'(a2[1])) * (int'(b2[0]) + int'(b2[1])));
      if (int'(a2[0]) + int'(a2[1]) > 15) pair_carries++;
    end
    for (int t = 0; t < 20000; t++) begin
      int k;
      a3 = 9'($urandom);
      b3 = 9'($urandom);
      #1;
      for (int i = 0; i < 3; i++) check("N3 D_i", int'(d3[i]), int'(a3[i]) * int'(b3[i]));
      k = 0;
      for (int p = 0; p < 3; p++) begin
        for (int q = p + 1; q < 3; q++) begin
          check("N3 D_pq", int'(dpq3[k]),
                (int'(a3[p]) + int'(a3[q])) * (int'(b3[p]) + int'(b3[q])));
          k++;
        end
      end
    end
    checks++;
    if (pair_carries == 0) begin
      failures++;
      if (failures <= 10) $display("FAIL: no pair sum overflowed W bits");
    end
    $display("pair-sum carries seen: %0d", pair_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_kara_aux_products
