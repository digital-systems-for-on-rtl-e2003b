// tb_monitor_top -- end-to-end test of the field unit at its default sizes.
//
// Drives eight fixed analog inputs, the two tone oscillators (2015 Hz and
// 2330 Hz square waves made from the 149.131 kHz clock) and a model of the
// cartridge recorder, and runs the monitor through two 15-minute periods:
//   period 0: the sweep at recorder count 6 is recorded; every serial bit
//             (time of day, BCD data, overrange, parity) is compared with a
//             word worked out here from the input voltages, both as a logic
//             level and after demodulating the tone.  A playback follows: the
//             tape runs to the cue, plays one loop with the audio on, and stops
//             at the second cue; every played bit is compared with the
//             recorded one.
//   period 1: new input voltages and spare bits (checked on the serial line
//             in every sweep, with time of day 1); a playback is commanded
//             just before the recording is due, so the recording must be
//             skipped (nothing written to the tape).
// Mechanism counters (conversions, time-of-day transfers, data-switch
// commutations, overrange readings, record windows, skipped recordings, cue
// events, time-of-day advances) must each be seen at least once.
// Timing checks: one count is 2048 clocks, a sweep 256 counts (3.516 s),
// the clutch is engaged for exactly one sweep, and the period is 2^27 clocks
// (15 minutes).
module tb_monitor_top;
  import wqm_pkg::*;

  localparam int unsigned COUNT_CYC  = 2048;
  localparam int unsigned PERIOD_CYC = 65536 * COUNT_CYC;
  localparam int HALF_LO = 37;   // 149131 / 74 = 2015 Hz
  localparam int HALF_HI = 32;   // 149131 / 64 = 2330 Hz

  logic clk = 0, rst_n = 0;
  logic [14:0] ain [8];
  logic [1:0]  spare_bits = 2'b00;
  logic tone_lo = 0, tone_hi = 0, cue_in, playback_cmd_n = 1;
  logic tone_out, motor_on, clutch_on, mode_record, audio_on;
  logic [15:0] ctrl_count, tod;
  logic ctrl_tick, convert, conv_done, tod_select_o, serial_bit;
  data_word_t data_word;

  logic audio_out;
  int unsigned tape_pos, tape_written;

  monitor_top dut (
    .clk, .rst_n, .ain, .spare_bits, .tone_lo, .tone_hi, .cue_in, .playback_cmd_n,
    .tone_out, .motor_on, .clutch_on, .mode_record, .audio_on,
    .ctrl_count, .ctrl_tick, .tod, .convert, .conv_done, .tod_select_o, .serial_bit, .data_word
  );

  tape_model #(.LOOP_LEN(600000), .CUE_LEN(200)) u_tape (
    .clk, .motor_on, .clutch_on, .mode_record, .audio_on, .audio_in(tone_out),
    .cue(cue_in), .audio_out, .pos(tape_pos), .samples_written(tape_written)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---- tone oscillators ---------------------------------------------------
  int lo_cnt = 0, hi_cnt = 0;
  always @(posedge clk) begin
    if (lo_cnt == HALF_LO - 1) begin lo_cnt <= 0; tone_lo <= !tone_lo; end else lo_cnt <= lo_cnt + 1;
    if (hi_cnt == HALF_HI - 1) begin hi_cnt <= 0; tone_hi <= !tone_hi; end else hi_cnt <= hi_cnt + 1;
  end

  // ---- FSK demodulators: the last half period decides the bit ---------------
  int rec_half = 0, rec_run = 0, pb_half = 0, pb_run = 0;
  logic rec_prev = 0, pb_prev = 0;
  always @(posedge clk) begin
    if (tone_out != rec_prev) begin rec_half <= rec_run + 1; rec_run <= 0; end
    else rec_run <= rec_run + 1;
    rec_prev <= tone_out;
    if (audio_out != pb_prev) begin pb_half <= pb_run + 1; pb_run <= 0; end
    else pb_run <= pb_run + 1;
    pb_prev <= audio_out;
  end
  function automatic bit demod(int half);
    return half < (HALF_LO + HALF_HI) / 2;
  endfunction

  // ---- expected words, worked out from the input voltages ---------------------
  function automatic logic [15:0] expected_word(int code);
    int mv = (code + 9) / 10;                  // t2 count: input in mV, rounded up
    logic [15:0] w;
    if (mv > 1999) mv = 1999;
    w[3:0]   = 4'(mv % 10);
    w[7:4]   = 4'(mv / 10 % 10);
    w[11:8]  = 4'(mv / 100 % 10);
    w[12]    = (mv >= 1000);
    w[14:13] = spare_bits;
    w[15]    = ~(^w[14:0]);                    // odd parity
    return w;
  endfunction

  function automatic bit expected_bit(logic [15:0] c, logic [15:0] todv);
    int slot = int'(c[4:0]);
    logic [15:0] w = expected_word(int'(ain[c[7:5]]));
    if (slot < 8)       return todv[slot];
    else if (slot < 24) return w[slot - 8];
    else                return todv[slot - 16];
  endfunction

  // ---- per-count checks and mechanism counters --------------------------------
  int n_conv = 0, n_todxfer = 0, n_dmux = 0, n_ovr = 0, n_rec_windows = 0, n_skipped = 0;
  int n_cue = 0, n_tod_inc = 0, n_par1 = 0, n_par0 = 0, n_recorded_bits = 0, n_played_bits = 0;
  int clutch_cycles = 0, rec_clutch_run = 0;
  bit recorded_bit [int unsigned];     // tape position (mid-bit) -> bit
  int unsigned cyc = 0, last_wrap_cyc = 0;
  logic [15:0] prev_tod = 0;
  logic prev_audio = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (conv_done) n_conv++;
    if (tod != prev_tod) begin
      n_tod_inc++;
      check(cyc - last_wrap_cyc == PERIOD_CYC || last_wrap_cyc == 0 && cyc == PERIOD_CYC,
            $sformatf("time of day advanced after %0d clocks", cyc - last_wrap_cyc));
      last_wrap_cyc = cyc;
    end
    prev_tod <= tod;
    if (audio_on && !prev_audio) n_cue++;
    prev_audio <= audio_on;
    if (clutch_on && mode_record) rec_clutch_run++;
    else if (rec_clutch_run != 0) begin
      check(rec_clutch_run == 256 * COUNT_CYC, $sformatf("clutch window %0d clocks", rec_clutch_run));
      rec_clutch_run = 0;
    end
  end

  // mid-bit sampling: half a count after each count change
  initial begin
    forever begin
      @(posedge clk iff ctrl_tick);
      repeat (COUNT_CYC / 2) @(posedge clk);
      #1;
      begin
        automatic logic [15:0] c = ctrl_count;
        automatic bit exp_b = expected_bit(c, tod);
        automatic int slot = int'(c[4:0]);
        // the serial line follows the schedule in every sweep
        if (slot >= 8 && slot < 24) begin
          check(serial_bit == exp_b, $sformatf("serial bit count %0d", c));
          n_dmux++;
        end else begin
          check(serial_bit == exp_b, $sformatf("time bit count %0d", c));
          n_todxfer++;
        end
        if (slot == 20 && data_word.overrange) n_ovr++;
        if (slot == 23) begin
          if (serial_bit) n_par1++; else n_par0++;
        end
        // recording: demodulated tone must carry the same bit
        if (clutch_on && mode_record) begin
          check(demod(rec_half) == exp_b, $sformatf("recorded tone, count %0d", c));
          recorded_bit[tape_pos] = exp_b;
          n_recorded_bits++;
        end
        // record window in the recorder counter half
        if (c[15:8] == 6 && slot == 0 && c[7:5] == 0) begin
          if (mode_record) n_rec_windows++;
          else begin
            n_skipped++;
            check(!mode_record && tape_written == tape_written_at_cmd, "recording blocked during playback");
          end
        end
      end
    end
  end

  // playback comparison at the stored mid-bit tape positions
  always @(posedge clk) begin
    if (audio_on && !mode_record && motor_on && clutch_on && recorded_bit.exists(tape_pos)) begin
      check(demod(pb_half) == recorded_bit[tape_pos], $sformatf("played bit at tape %0d", tape_pos));
      n_played_bits++;
    end
  end

  int unsigned tape_written_at_cmd = 0;

  task automatic playback_command();
    tape_written_at_cmd = tape_written;
    playback_cmd_n <= 0;
    repeat (200) @(posedge clk);
    playback_cmd_n <= 1;
    @(posedge clk); #1;
    check(!mode_record && motor_on && clutch_on && !audio_on, "playback started, audio muted");
  endtask

  task automatic wait_count(longint target);
    while ((longint'(cyc) / COUNT_CYC) < target) @(posedge clk);
  endtask

  task automatic wait_playback_end(int max_cycles);
    int n = 0;
    while (!mode_record && n < max_cycles) begin @(posedge clk); n++; end
    #1;
    // back in record mode; the motor and clutch now follow the record logic only
    check(mode_record && !audio_on &&
          motor_on == (ctrl_count[15:8] >= 4 && ctrl_count[15:8] <= 7) &&
          clutch_on == (ctrl_count[15:8] == 6), "playback ended in record mode");
  endtask

  initial begin
    int played_before, written_before;
    ain = '{0, 10, 1234, 5678, 9999, 12345, 15000, 20000};
    repeat (4) @(posedge clk);
    rst_n <= 1;

    // ---- period 0: recording, then playback ------------------------------------
    wait_count(7 * 256 + 2);
    check(n_recorded_bits == 256, $sformatf("recorded bits %0d", n_recorded_bits));
    check(tape_written == 256 * COUNT_CYC, $sformatf("tape samples %0d", tape_written));
    played_before = n_played_bits;
    playback_command();
    wait_playback_end(2000000);
    check(n_played_bits - played_before == 256, $sformatf("played bits %0d", n_played_bits - played_before));

    // ---- period 1: new inputs; playback overrides the due recording ----------------
    wait_count(65536 + 2);
    check(tod == 1, $sformatf("time of day %0d", tod));
    ain = '{32767, 1, 999, 1000, 4321, 8765, 19990, 50};
    spare_bits = 2'b10;
    wait_count(65536 + 5 * 256);
    written_before = tape_written;
    recorded_bit.delete();
    playback_command();
    wait_playback_end(3000000);
    wait_count(65536 + 8 * 256 + 2);
    check(tape_written == written_before, "nothing recorded during playback");

    // ---- every mechanism seen --------------------------------------------------------
    check(n_conv > 0, "conversions");
    check(n_todxfer > 0, "time-of-day transfers");
    check(n_dmux > 0, "data-switch commutations");
    check(n_ovr > 0, "overrange readings");
    check(n_par0 > 0 && n_par1 > 0, "parity bit both values");
    check(n_rec_windows == 1, $sformatf("record windows %0d", n_rec_windows));
    check(n_skipped == 1, $sformatf("skipped recordings %0d", n_skipped));
    check(n_cue == 2, $sformatf("playbacks with audio %0d", n_cue));
    check(n_tod_inc == 1, $sformatf("time-of-day advances %0d", n_tod_inc));
    $display("mechanisms: conversions=%0d tod_transfers=%0d data_commutations=%0d overrange=%0d record_windows=%0d skipped=%0d playbacks=%0d tod_advances=%0d recorded_bits=%0d played_bits=%0d",
             n_conv, n_todxfer, n_dmux, n_ovr, n_rec_windows, n_skipped, n_cue, n_tod_inc, n_recorded_bits, n_played_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * PERIOD_CYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
