// tb_lcg_ctrl: checks the four enable/reset combinations of the control
// logic against the protocol table:
//   reset enable | ce1 ce2
//     1     0    |  0   0    (clear)
//     0     1    |  1   0    (load seed, a, c)
//     0     0    |  0   1    (run)
//     1     1    |  0   0    (not used; nothing loads)
module tb_lcg_ctrl;
  logic enable, reset, ce1, ce2;
  int checks = 0, failures = 0;

  lcg_ctrl dut (.enable(enable), .reset(reset), .ce1(ce1), .ce2(ce2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_ce [4];
    // index = {reset, enable}, value = {ce1, ce2}
    exp_ce[0] = 2'b01;
    exp_ce[1] = 2'b10;
    exp_ce[2] = 2'b00;
    exp_ce[3] = 2'b00;
    for (int i = 0; i < 4; i++) begin
      {reset, enable} = 2'(i);
      #1;
      checks++;
      if ({ce1, ce2} !== exp_ce[i]) begin
        failures++;
        $display("reset=%b enable=%b: ce1=%b ce2=%b expected %b", reset, enable, ce1, ce2, exp_ce[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
