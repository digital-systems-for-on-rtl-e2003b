// conv_cmd_detect -- A-D conversion command recogniser.
//
// Four counts after each analog channel is switched on, the control counter
// shows E2,E1,S2,S1,S0 = 0,0,1,0,0.  This pattern lasts one count and recurs
// every 32 counts; the decoder turns it into the conversion command of the
// panel-meter A-D converter.  The four-count delay lets switching transients
// settle before the reading is taken.
//
// Interface: e2, e1, s[2:0] (S2..S0), convert.  Purely combinational; the
// command is high for exactly one control count.  Pattern as published.
module conv_cmd_detect (
  input  logic       e2,
  input  logic       e1,
  input  logic [2:0] s,
  output logic       convert
);
  always_comb convert = !e2 && !e1 && s[2] && !s[1] && !s[0];
endmodule
