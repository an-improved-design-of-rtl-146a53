// tb_lcg_en_buffer: self-checking test of the clock-enabled buffer.
// Drives random data with a random clock enable for many cycles and checks
// that q follows d one edge after ce was high and otherwise holds, against
// a reference register kept in the testbench. Uses W=8 (the default).
module tb_lcg_en_buffer;
  localparam int unsigned W = 8;
  logic         clk = 1'b0;
  logic         ce;
  logic [W-1:0] d, q, expected;
  int checks = 0, failures = 0;

  lcg_en_buffer #(.W(W)) dut (.clk(clk), .ce(ce), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int holds = 0, loads = 0;
    ce = 1'b1; d = 8'hA5;
    @(posedge clk); #1;
    expected = 8'hA5;
    for (int i = 0; i < 500; i++) begin
      ce = ($urandom_range(0, 2) != 0);
      d  = W'($urandom);
      @(posedge clk); #1;
      if (ce) begin expected = d; loads++; end
      else holds++;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: ce=%b q=%h expected %h", i, ce, q, expected);
      end
    end
    checks++;
    if (holds == 0 || loads == 0) begin
      failures++;
      $display("hold or load never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
