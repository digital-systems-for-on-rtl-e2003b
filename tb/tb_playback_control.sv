// tb_playback_control -- walks the playback logic through its sequence:
// record mode after reset (record requests pass to motor/clutch), playback
// command (motor, clutch, play mode, audio muted, recording disabled), a short
// cue glitch that must be ignored, first cue (audio on), second cue (audio off,
// motor and clutch off, back to record mode), and a bouncing command switch.
module tb_playback_control;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, cue_in = 0, playback_cmd_n = 1, rec_motor = 0, rec_clutch = 0;
  logic audio_on, mode_record, motor_on, clutch_on, record_enable;
  int checks = 0, failures = 0;

  playback_control #(.DEGLITCH(N)) dut (
    .clk, .rst_n, .cue_in, .playback_cmd_n, .rec_motor, .rec_clutch,
    .audio_on, .mode_record, .motor_on, .clutch_on, .record_enable
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_state(bit aud, bit rec, bit mot, bit clu, string where);
    check(audio_on == aud,    {where, ": audio_on"});
    check(mode_record == rec, {where, ": mode_record"});
    check(record_enable == rec, {where, ": record_enable"});
    check(motor_on == mot,    {where, ": motor_on"});
    check(clutch_on == clu,   {where, ": clutch_on"});
  endtask

  task automatic pulse_cue(int len);
    cue_in <= 1;
    repeat (len) @(posedge clk);
    cue_in <= 0;
    repeat (N + 8) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (N + 5) @(posedge clk); #1;
    expect_state(0, 1, 0, 0, "idle");
    rec_motor <= 1; rec_clutch <= 1;
    @(posedge clk); #1;
    expect_state(0, 1, 1, 1, "record request");
    rec_motor <= 0; rec_clutch <= 0;
    // bouncing command: short closures must not act
    repeat (3) begin
      playback_cmd_n <= 0; repeat (N / 2) @(posedge clk);
      playback_cmd_n <= 1; repeat (N / 2) @(posedge clk);
    end
    repeat (N + 5) @(posedge clk); #1;
    expect_state(0, 1, 0, 0, "after bounce");
    // real command
    playback_cmd_n <= 0;
    repeat (N + 5) @(posedge clk); #1;
    expect_state(0, 0, 1, 1, "command held");
    playback_cmd_n <= 1;
    repeat (N + 5) @(posedge clk); #1;
    expect_state(0, 0, 1, 1, "tape running to cue");
    pulse_cue(N / 2); #1;
    expect_state(0, 0, 1, 1, "cue glitch ignored");
    pulse_cue(N * 3); #1;
    expect_state(1, 0, 1, 1, "first cue: audio on");
    rec_motor <= 1;                       // a record window during playback
    @(posedge clk); #1;
    check(record_enable == 0, "record disabled during playback");
    rec_motor <= 0;
    pulse_cue(N * 3); #1;
    expect_state(0, 1, 0, 0, "second cue: stopped, record mode");
    pulse_cue(N * 3); #1;                 // stray cue while idle: toggles audio only
    check(mode_record == 1, "stays in record mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
