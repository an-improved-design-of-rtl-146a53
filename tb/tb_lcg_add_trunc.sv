// tb_lcg_add_trunc: exhaustive test of the truncating adder at its default
// widths (8-bit x, 2-bit c) against (x+c) mod 256 computed with integers.
// Counts the sums whose carry out was dropped.
module tb_lcg_add_trunc;
  localparam int unsigned W = 8, CW = 2;
  logic [W-1:0]  x, m;
  logic [CW-1:0] c;
  int checks = 0, failures = 0, carries = 0;

  lcg_add_trunc #(.W(W), .CW(CW)) dut (.x(x), .c(c), .m(m));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < (1 << W); xi++) begin
      for (int ci = 0; ci < (1 << CW); ci++) begin
        int sum;
        x = W'(xi); c = CW'(ci);
        #1;
        sum = xi + ci;
        if (sum >= (1 << W)) carries++;
        checks++;
        if (int'(m) != sum % (1 << W)) begin
          failures++;
          if (failures < 10) $display("x=%0d c=%0d m=%0d expected %0d", xi, ci, m, sum % (1 << W));
        end
      end
    end
    checks++;
    if (carries == 0) failures++;
    $display("sums with dropped carry: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
