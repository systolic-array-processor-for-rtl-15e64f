// clkgen: selects the PE's local clock phi.
//
// In normal operation phi follows the system clock SCK; with the Test pin
// high the external test clock drives the PE instead, so the tester can step
// it.  Written as a plain 2:1 clock multiplexer; a production version would
// use a glitch-free clock switch, and Test is only expected to change while
// both clocks are stopped.  The source selection is the thesis'; the
// implementation is this design's.
module clkgen (
  input  logic sck,
  input  logic test_clk,
  input  logic test,
  output logic phi
);

  always_comb phi = test ? test_clk : sck;

endmodule
