// tb_lcg_seed_mux: self-checking test of the seed multiplexer. Random
// seed/next values with both select values; y must be the seed when
// sel_seed is 1 and next when it is 0.
module tb_lcg_seed_mux;
  localparam int unsigned W = 8;
  logic         sel_seed;
  logic [W-1:0] seed, next, y;
  int checks = 0, failures = 0;

  lcg_seed_mux #(.W(W)) dut (.sel_seed(sel_seed), .seed(seed), .next(next), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel_seed = i[0];
      seed = W'($urandom);
      next = W'($urandom);
      if (next == seed) next = ~seed;
      #1;
      checks++;
      if (y !== (sel_seed ? seed : next)) begin
        failures++;
        $display("sel=%b seed=%h next=%h y=%h", sel_seed, seed, next, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
