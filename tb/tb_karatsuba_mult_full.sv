// tb_karatsuba_mult_full: the multiplier at its default size (8x8 -> 16
// bits, two 4-bit coefficients per operand), with no parameter changed,
// checked against the integer product for every one of the 65,536 operand
// pairs. A watchdog ends the run with a failure if it does not finish in
// time.
module tb_karatsuba_mult_full;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p;

  karatsuba_mult dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x);
        b = 8'(y);
        #1;
        checks++;
        if (int'(p) != x * y) begin
          failures++;
          if (failures < 10) if (failures <= 10) $display("FAIL: %0d * %0d gave %0d", x, y, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_karatsuba_mult_full
