// tb_lcg_top: end-to-end test of the generator at its default size
// (8-bit state, 3-bit multiplier, 2-bit increment, no parameter override).
//
// 1. reset with enable low, then release: the output must show the cleared
//    state 0 and then the sequence that starts from 0.
// 2. load seed=7, a=3, c=1 with a one-clock enable pulse and compare the
//    output with the sequence 7, 22, 67, 202, 95, ... worked out by hand for
//    this seed (the same numbers appear in the design's published
//    simulation), then with a reference model for 600 more clocks.
// 3. reload with random seeds, multipliers and increments, including
//    enable held for several clocks, and compare with the reference model.
// Checks that the first number (the seed) appears exactly one edge after
// enable falls and that one new number follows every clock; that the
// output holds while enable or reset is high; and counts every mechanism
// (clear, seed load, output hold, product bits dropped, adder carry
// dropped), failing if one never happened.
module tb_lcg_top;
  localparam int unsigned N = 8, AW = 3, CW = 2;
  localparam logic [N-1:0] MASK = '1;

  logic          clock = 1'b0;
  logic          reset, enable;
  logic [N-1:0]  seed, o;
  logic [AW-1:0] a_in;
  logic [CW-1:0] c_in;

  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_hold = 0, n_mul_trunc = 0, n_add_carry = 0;

  lcg_top dut (.clock(clock), .reset(reset), .enable(enable), .seed(seed),
               .a_in(a_in), .c_in(c_in), .o(o));

  always #5 clock = ~clock;

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint unsigned ref_x, ref_a, ref_c;

  function automatic longint unsigned ref_step(longint unsigned x);
    longint unsigned prod = ref_a * x;
    if (prod > MASK) n_mul_trunc++;
    prod &= MASK;
    if (prod + ref_c > MASK) n_add_carry++;
    return (prod + ref_c) & MASK;
  endfunction

  task automatic expect_o(input longint unsigned exp, input string what);
    checks++;
    if (o !== N'(exp)) begin
      failures++;
      $display("%s: o=%0d expected %0d (t=%0t)", what, o, exp, $time);
    end
  endtask

  // Load a parameter set: enable high for 'len' clocks, then low.
  // Returns with enable low, just after the first edge with enable low,
  // where o must already show the seed.
  task automatic load(input logic [N-1:0] s, input logic [AW-1:0] a,
                      input logic [CW-1:0] c, input int len);
    logic [N-1:0] o_before;
    seed = s; a_in = a; c_in = c;
    enable = 1'b1;
    o_before = o;
    repeat (len) begin
      @(posedge clock); #1;
      checks++;
      if (o !== o_before) begin
        failures++;
        $display("output changed while enable was high");
      end else n_hold++;
    end
    enable = 1'b0;
    seed = ~s;               // the seed must have been captured already
    a_in = ~a; c_in = ~c;    // so must a and c
    n_load++;
    ref_x = s; ref_a = a; ref_c = c;
    @(posedge clock); #1;
    expect_o(ref_x, "seed one edge after enable falls");
  endtask

  task automatic run(input int cycles, input string what);
    repeat (cycles) begin
      @(posedge clock); #1;
      ref_x = ref_step(ref_x);
      expect_o(ref_x, what);
    end
  endtask

  initial begin
    int fig_seq[17] = '{7, 22, 67, 202, 95, 30, 91, 18, 55, 166, 243, 218, 143, 174, 11, 34, 103};
    reset = 1'b1; enable = 1'b0;
    seed = '0; a_in = '0; c_in = '0;
    repeat (3) @(posedge clock);

    // --- 1. clear --------------------------------------------------------
    // give B1/B2 known values first (a=1, c=1), then clear the state
    reset = 1'b0; enable = 1'b1; a_in = 1; c_in = 1; seed = 8'h5A;
    @(posedge clock); #1;
    enable = 1'b0; reset = 1'b1;
    #1;
    begin
      logic [N-1:0] o_held = o;
      repeat (3) begin
        @(posedge clock); #1;
        checks++;
        if (o !== o_held) begin failures++; $display("output changed during reset"); end
        else n_hold++;
      end
    end
    reset = 1'b0;
    @(posedge clock); #1;
    expect_o(0, "cleared state");
    n_clear++;
    ref_x = 0; ref_a = 1; ref_c = 1;
    run(5, "count up from cleared state");

    // --- 2. published example: seed 7, a 3, c 1 ---------------------------
    load(8'd7, 3'd3, 2'd1, 1);
    for (int i = 1; i < 17; i++) begin
      @(posedge clock); #1;
      ref_x = ref_step(ref_x);
      expect_o(fig_seq[i], "seed=7 a=3 c=1 sequence");
      checks++;
      if (ref_x != longint'(fig_seq[i])) begin
        failures++;
        $display("reference model disagrees with hand-worked sequence");
      end
    end
    run(600, "seed=7 a=3 c=1 long run");

    // --- 3. random parameter sets --------------------------------------
    for (int k = 0; k < 40; k++) begin
      load(N'($urandom), AW'($urandom), CW'($urandom), $urandom_range(1, 3));
      run($urandom_range(20, 300), "random parameters");
    end

    // a reset in the middle of a run, then a new seed
    reset = 1'b1; @(posedge clock); #1;
    reset = 1'b0; @(posedge clock); #1;
    expect_o(0, "cleared mid-run");
    n_clear++;
    load(8'd255, 3'd7, 2'd3, 1);
    run(300, "seed=255 a=7 c=3");

    $display("clears=%0d loads=%0d holds=%0d product_truncations=%0d carries_dropped=%0d",
             n_clear, n_load, n_hold, n_mul_trunc, n_add_carry);
    checks++; if (n_clear == 0)     begin failures++; $display("clear never happened"); end
    checks++; if (n_load == 0)      begin failures++; $display("seed load never happened"); end
    checks++; if (n_hold == 0)      begin failures++; $display("output hold never happened"); end
    checks++; if (n_mul_trunc == 0) begin failures++; $display("product truncation never happened"); end
    checks++; if (n_add_carry == 0) begin failures++; $display("adder carry drop never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
