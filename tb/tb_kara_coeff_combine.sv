// tb_kara_coeff_combine: self-check of the product-coefficient network.
//
// Two kinds of stimulus, for N = 2, W = 4 and N = 3, W = 3:
//  * consistent: D_i and D_{p,q} are formed from random coefficients, and
//    each c_i must equal the schoolbook convolution sum_{p+q=i} a_p b_q;
//  * arbitrary: D values are random bit patterns, and c_i must equal the
//    Karatsuba combination formula evaluated modulo 2^CW.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_kara_coeff_combine;

  int checks = 0;
  int failures = 0;

  localparam int CW2 = 2 * 4 + 2 + 1;  // coeff_width(4, 2)
  localparam int CW3 = 2 * 3 + 2 + 2;  // coeff_width(3, 3)

  logic [1:0][7:0]     d2;
  logic [0:0][9:0]     dpq2;
  logic [2:0][CW2-1:0] c2;
  kara_coeff_combine #(.N(2), .W(4)) dut2 (.d(d2), .dpq(dpq2), .c(c2));

  logic [2:0][5:0]     d3;
  logic [2:0][7:0]     dpq3;
  logic [4:0][CW3-1:0] c3;
  kara_coeff_combine #(.N(3), .W(3)) dut3 (.d(d3), .dpq(dpq3), .c(c3));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int i, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s c_%0d: got %0d expected %0d", what, i, got, exp);
    end
  endtask

  initial begin
    int a[3], b[3], dd[3], pp[3], ref_c, k;

    // N = 2, consistent stimulus
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 2; i++) begin a[i] = $urandom_range(15); b[i] = $urandom_range(15); end
      for (int i = 0; i < 2; i++) d2[i] = 8'(a[i] * b[i]);
      dpq2[0] = 10'((a[0] + a[1]) * (b[0] + b[1]));
      #1;
      for (int i = 0; i < 3; i++) begin
        ref_c = 0;
        for (int p = 0; p < 2; p++) for (int q = 0; q < 2; q++) if (p + q == i) ref_c += a[p] * b[q];
        check("N2 conv", i, int'(c2[i]), ref_c);
      end
    end

    // N = 3, consistent stimulus
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 3; i++) begin a[i] = $urandom_range(7); b[i] = $urandom_range(7); end
      for (int i = 0; i < 3; i++) d3[i] = 6'(a[i] * b[i]);
      k = 0;
      for (int p = 0; p < 3; p++) for (int q = p + 1; q < 3; q++) begin
        dpq3[k] = 8'((a[p] + a[q]) * (b[p] + b[q]));
        k++;
      end
      #1;
      for (int i = 0; i < 5; i++) begin
        ref_c = 0;
        for (int p = 0; p < 3; p++) for (int q = 0; q < 3; q++) if (p + q == i) ref_c += a[p] * b[q];
        check("N3 conv", i, int'(c3[i]), ref_c);
      end
    end

    // N = 3, arbitrary D patterns against the formula mod 2^CW
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 3; i++) begin dd[i] = $urandom_range(63); d3[i] = 6'(dd[i]); end
      for (int i = 0; i < 3; i++) begin pp[i] = $urandom_range(255); dpq3[i] = 8'(pp[i]); end
      #1;
      // pairs in order: (0,1) -> 0, (0,2) -> 1, (1,2) -> 2
      check("N3 formula", 0, int'(c3[0]), dd[0]);
      check("N3 formula", 1, int'(c3[1]), (pp[0] - dd[0] - dd[1]) & ((1 << CW3) - 1));
      check("N3 formula", 2, int'(c3[2]), (pp[1] - dd[0] - dd[2] + dd[1]) & ((1 << CW3) - 1));
      check("N3 formula", 3, int'(c3[3]), (pp[2] - dd[1] - dd[2]) & ((1 << CW3) - 1));
      check("N3 formula", 4, int'(c3[4]), dd[2]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_kara_coeff_combine
