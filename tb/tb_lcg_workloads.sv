// tb_lcg_workloads: runs the generator at the two larger wordlengths it is
// characterised at, modulus 2^16 and 2^31, each with seed=7, a=3, c=1
// (3-bit multiplier and 2-bit increment as in the default design).
// Both instances are loaded together and compared every clock with a
// 64-bit integer reference model. For N=31 the numbers X11..X18
// (1328602 ... 758170019, the last one after the first wrap past 2^31)
// are also checked against constants worked out by hand.
module tb_lcg_workloads;
  logic        clock = 1'b0;
  logic        reset, enable;
  logic [15:0] o16;
  logic [30:0] o31;
  int checks = 0, failures = 0, wraps16 = 0, wraps31 = 0;

  lcg_top #(.N(16), .AW(3), .CW(2)) dut16 (.clock(clock), .reset(reset), .enable(enable),
    .seed(16'd7), .a_in(3'd3), .c_in(2'd1), .o(o16));
  lcg_top #(.N(31), .AW(3), .CW(2)) dut31 (.clock(clock), .reset(reset), .enable(enable),
    .seed(31'd7), .a_in(3'd3), .c_in(2'd1), .o(o31));

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x16 = 7, x31 = 7;
    longint unsigned known31[11:18] = '{1328602, 3985807, 11957422, 35872267,
                                        107616802, 322850407, 968551222, 758170019};
    reset = 1'b1; enable = 1'b0;
    repeat (2) @(posedge clock);
    reset = 1'b0; enable = 1'b1;
    @(posedge clock); #1;
    enable = 1'b0;
    for (int k = 0; k <= 5000; k++) begin
      @(posedge clock); #1;
      // o shows X(k) after the k-th edge with enable low
      checks += 2;
      if (o16 !== 16'(x16)) begin
        failures++;
        if (failures < 10) $display("N=16 X%0d: o=%0d expected %0d", k, o16, x16);
      end
      if (o31 !== 31'(x31)) begin
        failures++;
        if (failures < 10) $display("N=31 X%0d: o=%0d expected %0d", k, o31, x31);
      end
      if (k >= 11 && k <= 18) begin
        checks++;
        if (o31 !== 31'(known31[k])) begin
          failures++;
          $display("N=31 X%0d: o=%0d expected %0d", k, o31, known31[k]);
        end
      end
      if (3 * x16 + 1 >= 64'd1 << 16) wraps16++;
      if (3 * x31 + 1 >= 64'd1 << 31) wraps31++;
      x16 = (3 * x16 + 1) % (64'd1 << 16);
      x31 = (3 * x31 + 1) % (64'd1 << 31);
    end
    checks++;
    if (wraps16 == 0 || wraps31 == 0) begin
      failures++;
      $display("modulus wrap never happened");
    end
    $display("wraps: N=16 %0d, N=31 %0d", wraps16, wraps31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
