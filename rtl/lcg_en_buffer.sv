// lcg_en_buffer: W-bit register with a clock enable (buffers B1, B2, B3).
//
// On every rising clock edge with ce high the register takes d; with ce low
// it holds. There is no reset: the generator's reset only clears the state
// register, and these buffers are always loaded before they are read.
// In the generator it is used three times: B1 holds the multiplier a and
// B2 the increment c (both enabled by CE1), B3 holds the output word
// (enabled by CE2). Having one module at three widths is this design's own
// choice; the pins (D, Q, clock, CE) follow the generator's block diagram.
//
// Timing: q changes one clock edge after d is presented with ce high.
module lcg_en_buffer #(
  parameter int unsigned W = lcg_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (ce) q <= d;
  end
endmodule
