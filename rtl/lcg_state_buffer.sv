// lcg_state_buffer: W-bit state register X(k) of the generator (buffer B4).
//
// It has no clock enable: it takes the multiplexer output on every rising
// clock edge, so the generator advances one step per clock. clr, driven by
// the generator's reset input, clears it to zero. Loading every cycle and
// having a clear follow the block diagram; making the clear asynchronous
// and active high is this design's own choice (the pin is called CLR, as
// the asynchronous clear is on the target FPGA's flip-flops).
//
// Timing: q = d one edge later; q = 0 as soon as clr is high.
module lcg_state_buffer #(
  parameter int unsigned W = lcg_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
