// record_control -- recorder motor and clutch pattern recogniser (record mode).
//
// The eight most significant bits of the control counter (X1..X4, Y1..Y4)
// count full sweeps of the eight channels; 256 of their counts make the
// 15-minute recording interval.  The motor is started after count 3 and runs
// through count 7 (X3 = 1, all higher bits 0), which gives it two counts to
// reach speed; the clutch is engaged during count 6 only (X3,X2,X1 = 1,1,0),
// the sweep in which all eight readings and the time of day are recorded.
// A low level on `record_enable` (the record-disable line, driven by the
// playback logic) blocks both, so a playback overrides a due recording.
//
// Interface: x[3:0] (X4..X1), y[3:0] (Y4..Y1), record_enable, motor, clutch.
// Purely combinational.  Motor window as published; clutch during count 6
// follows the text (see the README for the disagreement with the table).
module record_control (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       record_enable,
  output logic       motor,
  output logic       clutch
);
  always_comb begin
    motor  = (y == 4'b0000) && !x[3] && x[2] && record_enable;
    clutch = motor && x[1] && !x[0];
  end
endmodule
