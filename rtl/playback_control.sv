// playback_control -- playback-mode logic of the monitor.
//
// A playback command (a switch closure, active low) clears two toggle
// flip-flops.  With flip-flop 2 clear the recorder is in playback: motor on,
// clutch engaged, electronics switched to play, and with flip-flop 1 clear the
// audio output is muted.  The tape runs until the cue marker on the control
// track; the cue toggles flip-flop 1 and the audio turns on.  After one full
// loop the cue comes again, flip-flop 1 falls (audio off) and its falling
// output toggles flip-flop 2, which stops the motor, releases the clutch and
// puts the electronics back into record mode.
//
// Flip-flop 2 also drives the record-disable line, so a recording that falls
// due during a playback is skipped.  The motor and clutch outputs are the OR
// of the record-mode requests and the playback request.
//
// Interface: clk, rst_n (synchronous, active low; resets into record mode,
// audio off), cue_in, playback_cmd_n (both asynchronous, filtered by
// `deglitch`), rec_motor, rec_clutch (from record_control), audio_on,
// mode_record (1 record, 0 play), motor_on, clutch_on, record_enable.
// Timing: a command or cue acts DEGLITCH + 3 cycles after it becomes stable.
// Flip-flop structure as published; the filters, the cue's active edge and
// the reset state are this design's choices.
module playback_control #(
  parameter int unsigned DEGLITCH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cue_in,
  input  logic playback_cmd_n,
  input  logic rec_motor,
  input  logic rec_clutch,
  output logic audio_on,
  output logic mode_record,
  output logic motor_on,
  output logic clutch_on,
  output logic record_enable
);
  logic cue_f, cue_q;
  logic cmd_n_f;
  logic q1, q2;

  deglitch #(.N(DEGLITCH), .INIT(1'b0)) u_cue (
    .clk, .rst_n, .din(cue_in), .dout(cue_f)
  );
  deglitch #(.N(DEGLITCH), .INIT(1'b1)) u_cmd (
    .clk, .rst_n, .din(playback_cmd_n), .dout(cmd_n_f)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cue_q <= 1'b0;
      q1    <= 1'b0;
      q2    <= 1'b1;
    end else begin
      cue_q <= cue_f;
      if (!cmd_n_f) begin                // direct clear of both flip-flops
        q1 <= 1'b0;
        q2 <= 1'b0;
      end else if (cue_f && !cue_q) begin  // cue edge toggles flip-flop 1
        q1 <= !q1;
        if (q1) q2 <= !q2;                 // flip-flop 1 falling toggles 2
      end
    end
  end

  always_comb begin
    audio_on      = q1;
    mode_record   = q2;
    record_enable = q2;
    motor_on      = rec_motor  | !q2;
    clutch_on     = rec_clutch | !q2;
  end
endmodule
