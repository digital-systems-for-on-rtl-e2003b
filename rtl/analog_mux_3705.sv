// analog_mux_3705 -- behavioural model of the 8-channel MOS analog multiplex switch.
//
// Behavioural model (kind: analog part).  The real switch is a monolithic
// P-channel MOS array with an on-chip one-of-eight decoder and output enable.
// The analog voltages are carried here as unsigned integer codes of W bits
// (0.1 mV per code in this design), so the model is a W-bit wide selector:
// select code 0 switches channel 1 (ain[0]) on, code 7 channel 8, and with
// the output enable low all channels are off and the output is 0 (the switch
// output would float onto the converter input).
//
// Interface: ain[8][W], sel[2:0] (A2..A0 of the control counter), oe, aout[W].
// Purely combinational.  Decoder truth table as published; the code
// representation of voltages is this model's own.
module analog_mux_3705 #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] ain [8],
  input  logic [2:0]   sel,
  input  logic         oe,
  output logic [W-1:0] aout
);
  always_comb aout = oe ? ain[sel] : '0;
endmodule
