// tb_kara_recombine: self-check of the polynomial evaluation at x = 2^W.
//
// Random coefficient words c_i of full width CW are applied for N = 2, W = 4
// and N = 3, W = 3; the expected output is sum c_i * 2^(i*W) in 64-bit
// arithmetic, cut to the 2*N*W output bits. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_kara_recombine;

  int checks = 0;
  int failures = 0;

  localparam int CW2 = 11;
  localparam int CW3 = 10;

  logic [2:0][CW2-1:0] c2;
  logic [15:0]         p2;
  kara_recombine #(.N(2), .W(4)) dut2 (.c(c2), .p(p2));

  logic [4:0][CW3-1:0] c3;
  logic [17:0]         p3;
  kara_recombine #(.N(3), .W(3)) dut3 (.c(c3), .p(p3));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expv;
    for (int t = 0; t < 10000; t++) begin
      expv = 0;
      for (int i = 0; i < 3; i++) begin
        c2[i] = CW2'($urandom);
        expv += longint'(c2[i]) * (64'd1 << (4 * i));
      end
      #1;
      checks++;
      if (p2 !== 16'(expv)) begin
        failures++;
        if (failures <= 10) $display("FAIL N2: got %h expected %h", p2, 16'(expv));
      end
    end
    for (int t = 0; t < 10000; t++) begin
      expv = 0;
      for (int i = 0; i < 5; i++) begin
        c3[i] = CW3'($urandom);
        expv += longint'(c3[i]) * (64'd1 << (3 * i));
      end
      #1;
      checks++;
      if (p3 !== 18'(expv)) begin
        failures++;
        if (failures <= 10) $display("FAIL N3: got %h expected %h", p3, 18'(expv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_kara_recombine
