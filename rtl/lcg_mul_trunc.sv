// lcg_mul_trunc: reduced-wordlength multiplier, p = (x * a) mod 2^W.
//
// The state x is W bits and the multiplier a only AW bits, so a W x AW
// multiplier replaces the W x W one a general generator would need. The
// full product is W+AW bits wide, but the modulus is 2^W, so every product
// bit at position W and above is simply left unconnected and only the low
// W bits leave the block. This truncation is exact for a power-of-two
// modulus: no reduction step is needed.
//
// Purely combinational; unsigned operands.
module lcg_mul_trunc #(
  parameter int unsigned W  = lcg_pkg::N_DEFAULT,
  parameter int unsigned AW = lcg_pkg::AW_DEFAULT
) (
  input  logic [W-1:0]  x,
  input  logic [AW-1:0] a,
  output logic [W-1:0]  p
);
  logic [W+AW-1:0] full;   // complete product; bits W and up are dropped

  always_comb begin
    full = (W+AW)'(x) * (W+AW)'(a);
    p    = full[W-1:0];
  end
endmodule
