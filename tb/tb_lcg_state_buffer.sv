// tb_lcg_state_buffer: self-checking test of the state register.
// Checks that q loads d on every rising edge with no enable, that clr
// clears it at once (before the next clock edge, since the clear is
// asynchronous) and that the register stays zero while clr is held.
module tb_lcg_state_buffer;
  localparam int unsigned W = 8;
  logic         clk = 1'b0;
  logic         clr;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  lcg_state_buffer #(.W(W)) dut (.clk(clk), .clr(clr), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("%s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b0; d = '0;
    for (int i = 0; i < 300; i++) begin
      d = W'($urandom) | W'(1);   // never zero, so a clear is visible
      @(posedge clk); #1;
      check(d, "load");
      if (i % 37 == 5) begin
        // asynchronous clear in the middle of a clock period
        #1 clr = 1'b1;
        #1 check('0, "clear before edge");
        @(posedge clk); #1;
        check('0, "held clear");
        clr = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
