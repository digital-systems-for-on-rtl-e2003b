// tape_model -- behavioural model of the endless-loop cartridge recorder.
//
// Testbench model, not part of the design.  The tape is a loop of LOOP_LEN
// positions; it advances one position per clock while the motor is on and
// the clutch engaged.  In record mode the audio input (the monitor's FSK
// tone) is written at the current position, so the tape keeps the tone
// waveform sample by sample.  In play mode the sample at the current
// position is replayed, and passed to the audio output while audio_on is
// high.  The control track carries one cue marker, CUE_LEN positions long,
// at position 0 of the loop; `cue` is high while it passes the head.  When
// the motor stops the tape coasts on for COAST positions without recording
// or playing, so it comes to rest beyond the marker that stopped it.
module tape_model #(
  parameter int unsigned LOOP_LEN = 600000,
  parameter int unsigned CUE_LEN  = 200,
  parameter int unsigned COAST    = 400
) (
  input  logic clk,
  input  logic motor_on,
  input  logic clutch_on,
  input  logic mode_record,
  input  logic audio_on,
  input  logic audio_in,
  output logic cue,
  output logic audio_out,
  output int unsigned pos,
  output int unsigned samples_written
);
  bit tape [LOOP_LEN];
  logic moving;
  int unsigned coast_left;

  initial begin
    pos = 0;
    coast_left = 0;
    samples_written = 0;
  end

  assign moving    = motor_on && clutch_on;
  assign cue       = moving && (pos < CUE_LEN);
  assign audio_out = moving && !mode_record && audio_on && tape[pos];

  always @(posedge clk) begin
    if (moving) begin
      if (mode_record) begin
        tape[pos] <= audio_in;
        samples_written <= samples_written + 1;
      end
      coast_left <= COAST;
    end else if (coast_left != 0) begin
      coast_left <= coast_left - 1;
    end
    if (moving || coast_left != 0)
      pos <= (pos == LOOP_LEN - 1) ? 0 : pos + 1;
  end
endmodule
