// lcg_ctrl: clock-enable logic of the generator.
//
// Two control inputs drive the whole generator:
//   reset  high (enable low): the state register is cleared;
//   enable high (reset low) : seed, multiplier a and increment c are taken
//                              in (CE1 loads the a and c buffers, the
//                              multiplexer passes the seed);
//   both low               : the generator runs and the output buffer
//                              takes one new number per clock (CE2).
// ce1 = enable & ~reset, ce2 = ~enable & ~reset. That CE1 and CE2 are
// derived from enable and reset alone follows the design; the exact
// equations are this design's own, chosen to give the protocol above. With
// both inputs high neither buffer is enabled.
//
// Purely combinational.
module lcg_ctrl (
  input  logic enable,
  input  logic reset,
  output logic ce1,
  output logic ce2
);
  always_comb begin
    ce1 =  enable && !reset;
    ce2 = !enable && !reset;
  end
endmodule
