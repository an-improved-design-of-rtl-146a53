// lcg_seed_mux: W-bit 2-to-1 multiplexer in front of the state register.
//
// With sel_seed high (the generator's enable input) the seed is passed to
// the state register, so the sequence starts from X(0) = seed; with
// sel_seed low the adder's output X(k+1) is passed and the generator runs.
// Which select value picks which input is this design's reading of the
// start-up protocol (data ready before enable goes high; numbers produced
// while enable is low).
//
// Purely combinational.
module lcg_seed_mux #(
  parameter int unsigned W = lcg_pkg::N_DEFAULT
) (
  input  logic         sel_seed,
  input  logic [W-1:0] seed,
  input  logic [W-1:0] next,
  output logic [W-1:0] y
);
  always_comb y = sel_seed ? seed : next;
endmodule
