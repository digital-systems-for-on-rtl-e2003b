// mux8_9312 -- 8-input digital multiplexer with output enable (9312 type).
//
// One of eight inputs is switched to the output by the binary select code
// S2..S0: code 0 selects input 1 (d[0]) up to code 7 for input 8 (d[7]).
// With the output enable low all inputs are off and the output is 0, so the
// outputs of several multiplexers can be combined with an OR.  The select
// code comes from the control counter, so stepping the counter commutates
// the eight parallel bits onto one serial line, LSB first.
//
// Interface: d[7:0], s[2:0], oe, y.  Purely combinational.
// The truth table is the published one; the low level when disabled is a
// choice of this design.
module mux8_9312 (
  input  logic [7:0] d,
  input  logic [2:0] s,
  input  logic       oe,
  output logic       y
);
  always_comb y = oe & d[s];
endmodule
