// lcg_add_trunc: reduced-wordlength adder, m = (x + c) mod 2^W.
//
// Adds the CW-bit increment c to the W-bit truncated product. The sum
// needs W+1 bits; its top bit (the carry out, M(W)) is left unconnected,
// which is the mod-2^W reduction of the generator.
//
// Purely combinational; unsigned operands.
module lcg_add_trunc #(
  parameter int unsigned W  = lcg_pkg::N_DEFAULT,
  parameter int unsigned CW = lcg_pkg::CW_DEFAULT
) (
  input  logic [W-1:0]  x,
  input  logic [CW-1:0] c,
  output logic [W-1:0]  m
);
  logic [W:0] full;        // W+1-bit sum; bit W (carry out) is dropped

  always_comb begin
    full = {1'b0, x} + (W+1)'(c);
    m    = full[W-1:0];
  end
endmodule
