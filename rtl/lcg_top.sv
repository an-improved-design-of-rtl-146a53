// lcg_top: reduced-wordlength linear congruential generator,
//   X(k+1) = (a * X(k) + c) mod 2^N,
// with an N-bit state but only an AW-bit multiplier a and a CW-bit
// increment c (defaults N=8, AW=3, CW=2).
//
// Datapath (one number per clock):
//   a_in -> B1 (AW bits, CE1) --+
//                               x  (N x AW multiplier, low N bits kept)
//   B4 (state, N bits) ---------+--> +  (add c from B2, carry dropped)
//   c_in -> B2 (CW bits, CE1) -------+--> mux (seed while enable) --> B4
//   B4 -> B3 (N bits, CE2) -> o
// Because the modulus is a power of two, dropping the high product bits and
// the adder carry is exactly the mod operation, so narrowing the multiplier
// input costs no accuracy: the sequence equals the textbook LCG.
//
// Operation:
//   1. reset=1, enable=0 : B4 is cleared.
//   2. reset=0, enable=1 : for one (or more) clocks; B1 <- a_in, B2 <- c_in,
//                          B4 <- seed. Inputs must be stable before the edge.
//   3. reset=0, enable=0 : every rising edge B4 <- a*B4 + c and B3 <- B4,
//                          so o shows seed, X1, X2, ... one per clock, the
//                          first (the seed) one edge after enable falls.
// Outside step 3 the output buffer holds its last value.
//
// The block structure, widths, truncations and control inputs follow the
// design; the asynchronous clear of B4, the select polarity of the mux and
// the enable equations are this implementation's own choices (see lcg_ctrl,
// lcg_seed_mux, lcg_state_buffer).
module lcg_top #(
  parameter int unsigned N  = lcg_pkg::N_DEFAULT,
  parameter int unsigned AW = lcg_pkg::AW_DEFAULT,
  parameter int unsigned CW = lcg_pkg::CW_DEFAULT
) (
  input  logic          clock,
  input  logic          reset,
  input  logic          enable,
  input  logic [N-1:0]  seed,
  input  logic [AW-1:0] a_in,
  input  logic [CW-1:0] c_in,
  output logic [N-1:0]  o
);
  logic          ce1, ce2;
  logic [AW-1:0] b1_q;     // multiplier a
  logic [CW-1:0] b2_q;     // increment c
  logic [N-1:0]  b4_q;     // state X(k)
  logic [N-1:0]  x_prod;   // (a*X) mod 2^N
  logic [N-1:0]  m_sum;    // (a*X + c) mod 2^N
  logic [N-1:0]  mux_y;

  lcg_ctrl u_ctrl (
    .enable (enable),
    .reset  (reset),
    .ce1    (ce1),
    .ce2    (ce2)
  );

  lcg_en_buffer #(.W(AW)) u_b1 (.clk(clock), .ce(ce1), .d(a_in), .q(b1_q));
  lcg_en_buffer #(.W(CW)) u_b2 (.clk(clock), .ce(ce1), .d(c_in), .q(b2_q));

  lcg_mul_trunc #(.W(N), .AW(AW)) u_mul (.x(b4_q), .a(b1_q), .p(x_prod));
  lcg_add_trunc #(.W(N), .CW(CW)) u_add (.x(x_prod), .c(b2_q), .m(m_sum));

  lcg_seed_mux #(.W(N)) u_mux (
    .sel_seed (enable),
    .seed     (seed),
    .next     (m_sum),
    .y        (mux_y)
  );

  lcg_state_buffer #(.W(N)) u_b4 (.clk(clock), .clr(reset), .d(mux_y), .q(b4_q));

  lcg_en_buffer #(.W(N)) u_b3 (.clk(clock), .ce(ce2), .d(b4_q), .q(o));
endmodule
