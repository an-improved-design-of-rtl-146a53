// tb_lcg_mul_trunc: exhaustive test of the truncating multiplier at its
// default widths (8-bit x, 3-bit a): every pair is checked against
// (x*a) mod 256 computed with integers in the testbench. Counts how many
// products overflowed 8 bits, to show the truncation was exercised.
module tb_lcg_mul_trunc;
  localparam int unsigned W = 8, AW = 3;
  logic [W-1:0]  x, p;
  logic [AW-1:0] a;
  int checks = 0, failures = 0, overflows = 0;

  lcg_mul_trunc #(.W(W), .AW(AW)) dut (.x(x), .a(a), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < (1 << W); xi++) begin
      for (int ai = 0; ai < (1 << AW); ai++) begin
        int prod;
        x = W'(xi); a = AW'(ai);
        #1;
        prod = xi * ai;
        if (prod >= (1 << W)) overflows++;
        checks++;
        if (int'(p) != prod % (1 << W)) begin
          failures++;
          if (failures < 10) $display("x=%0d a=%0d p=%0d expected %0d", xi, ai, p, prod % (1 << W));
        end
      end
    end
    checks++;
    if (overflows == 0) failures++;
    $display("products wider than %0d bits: %0d", W, overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
