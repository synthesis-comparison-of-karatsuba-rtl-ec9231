// tb_kara_digit_mult: exhaustive self-check of the coefficient multiplier.
//
// Two instances are checked over every input pair: the W x W size (4x4)
// used for D_i and the (W+1) x (W+1) size (5x5) used for D_{p,q} in the
// default 8x8 multiplier. The expected product is formed by repeated
// addition, not by the multiply operator. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_kara_digit_mult;

  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] p4;
  logic [4:0] a5, b5;
  logic [9:0] p5;

  kara_digit_mult #(.AW(4), .BW(4)) dut4 (.a(a4), .b(b4), .p(p4));
  kara_digit_mult #(.AW(5), .BW(5)) dut5 (.a(a5), .b(b5), .p(p5));

  function automatic int unsigned ref_mult(input int unsigned x, input int unsigned y);
    int unsigned s = 0;
    for (int unsigned k = 0; k < y; k++) s += x;
    return s;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(ref_mult(i, j))) begin
          failures++;
          if (failures <= 10) $display("FAIL 4x4: %0d*%0d gave %0d", i, j, p4);
        end
      end
    end
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if (p5 !== 10'(ref_mult(i, j))) begin
          failures++;
          if (failures <= 10) $display("FAIL 5x5: %0d*%0d gave %0d", i, j, p5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_kara_digit_mult
