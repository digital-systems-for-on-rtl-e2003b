// monitor_top -- field unit of the unattended water-quality monitor.
//
// Every 15 minutes the unit records eight analog transducer readings, each
// followed by the time of day, on an endless-loop tape cartridge as
// frequency-shift-keyed audio, and on command plays the tape back once over
// a telephone line.  Everything is timed by one crystal time base: a
// prescaler and a 16-stage control counter whose bit patterns are decoded
// into all commands.
//
// Data path, per 32-count channel slot (one count = 2048 clocks, 13.7 ms):
//   analog switch (A2..A0 select the channel for the whole slot)
//   -> panel-meter A-D converter (command at count 4; dual slope, result in
//      BCD: three digits plus the overrange digit)
//   -> odd-parity tree -> 16-bit data word (units, tens, hundreds, overrange,
//      two spares, parity)
//   -> two 8-input multiplexers, bits 0-7 in counts 8-15, bits 8-15 in 16-23
//   -> FSK keyer, which in counts 0-7 and 24-31 sends instead the low and
//      high byte of the time-of-day word through two more multiplexers
//   -> 2.3 kHz tone for a 1, 2.0 kHz tone for a 0 -> recorder audio input.
// Recorder: the upper eight counter bits start the motor at count 4 of the
// 256-count (15-minute) cycle and engage the clutch during count 6, the sweep
// that is recorded (3.516 s).  The playback logic can override both.
// INTERVAL_SHIFT scales the recording interval to 15 min x 2**INTERVAL_SHIFT
// (2 = hourly); the time-of-day step stays 15 minutes.
//
// Ports: clk (149.131 kHz time base), rst_n (synchronous, active low),
// ain (8 analog inputs as 0.1 mV codes), spare_bits, tone_lo / tone_hi (the
// two tone oscillators), cue_in and playback_cmd_n (recorder cue track and
// playback command), and the recorder controls tone_out, motor_on,
// clutch_on, mode_record, audio_on.  The remaining outputs expose internal
// state for observation; the two spare bits of data_word are spare_bits
// passed through, as the word format reserves them for external use.
//
// Analog quantities are integer codes; the integrator of the A-D converter
// and the analog switch are behavioural models on those codes.  The A-D
// counting clock is the time base itself, a choice of this design so that a
// conversion (at most 3000 counts, 20 ms) ends before serialisation starts.
module monitor_top
  import wqm_pkg::*;
#(
  parameter int unsigned PRESCALE_DIV = PRESCALE_DIV_DEFAULT,
  parameter int unsigned AIN_W        = 15,
  parameter int unsigned DPM_VREF     = 10000,
  parameter int unsigned DEGLITCH     = 16,
  parameter int          INTERVAL_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AIN_W-1:0]  ain [8],
  input  logic [1:0]        spare_bits,
  input  logic              tone_lo,
  input  logic              tone_hi,
  input  logic              cue_in,
  input  logic              playback_cmd_n,
  output logic              tone_out,
  output logic              motor_on,
  output logic              clutch_on,
  output logic              mode_record,
  output logic              audio_on,
  output logic [CNT_W-1:0]  ctrl_count,
  output logic              ctrl_tick,
  output logic [15:0]       tod,
  output logic              convert,
  output logic              conv_done,
  output logic              tod_select_o,
  output logic              serial_bit,
  output data_word_t        data_word
);
  logic             record_enable;
  logic             wrap;
  logic             rec_motor, rec_clutch;
  logic [AIN_W-1:0] vsel;
  logic             int_input, int_ref, comp_zero;
  logic [11:0]      bcd;
  logic             overrange, dpm_busy;
  logic             parity;
  logic [1:0]       data_ser, time_ser;
  logic             e1, e2;
  logic [2:0]       s_sel, a_sel;

  // ---- control logic --------------------------------------------------------
  control_logic #(.PRESCALE_DIV(PRESCALE_DIV), .INTERVAL_SHIFT(INTERVAL_SHIFT)) u_ctrl (
    .clk, .rst_n, .record_enable,
    .count(ctrl_count), .tick(ctrl_tick), .wrap, .convert,
    .tod_sel(tod_select_o), .rec_motor, .rec_clutch
  );

  assign s_sel = ctrl_count[BIT_S0 +: 3];
  assign e1    = ctrl_count[BIT_E1];
  assign e2    = ctrl_count[BIT_E2];
  assign a_sel = ctrl_count[BIT_A0 +: 3];

  // ---- time of day ------------------------------------------------------------
  tod_generator #(.WIDTH(16)) u_tod (
    .clk, .rst_n, .inc(wrap), .tod
  );

  // ---- analog switch and A-D converter ----------------------------------------
  analog_mux_3705 #(.W(AIN_W)) u_amux (
    .ain, .sel(a_sel), .oe(1'b1), .aout(vsel)
  );

  dpm_integrator #(.VIN_W(AIN_W), .VREF(DPM_VREF)) u_integ (
    .clk, .rst_n, .cnt_en(1'b1), .vin(vsel), .int_input, .int_ref, .comp_zero
  );

  dpm_converter u_dpm (
    .clk, .rst_n, .cnt_en(1'b1), .convert, .comp_zero,
    .int_input, .int_ref, .bcd, .overrange, .busy(dpm_busy), .done(conv_done)
  );

  // ---- parity and data word ----------------------------------------------------
  parity_tree u_parity (
    .data({spare_bits, overrange, bcd}), .parity
  );

  always_comb begin
    data_word.units     = bcd[3:0];
    data_word.tens      = bcd[7:4];
    data_word.hundreds  = bcd[11:8];
    data_word.overrange = overrange;
    data_word.spare     = spare_bits;
    data_word.parity    = parity;
  end

  // ---- parallel to serial -------------------------------------------------------
  mux8_9312 u_dmux1 (.d(data_word[7:0]),  .s(s_sel), .oe(e1),        .y(data_ser[0]));
  mux8_9312 u_dmux2 (.d(data_word[15:8]), .s(s_sel), .oe(e2),        .y(data_ser[1]));
  mux8_9312 u_tmux1 (.d(tod[7:0]),        .s(s_sel), .oe(!e1 && !e2), .y(time_ser[0]));
  mux8_9312 u_tmux2 (.d(tod[15:8]),       .s(s_sel), .oe(e1 && e2),   .y(time_ser[1]));

  // ---- frequency shift keyer ------------------------------------------------------
  fsk_keyer u_fsk (
    .data_in(data_ser), .time_in(time_ser), .tod_sel(tod_select_o),
    .tone_lo, .tone_hi, .logic_bit(serial_bit), .tone_out
  );

  // ---- playback logic and recorder drive ------------------------------------------
  playback_control #(.DEGLITCH(DEGLITCH)) u_pb (
    .clk, .rst_n, .cue_in, .playback_cmd_n, .rec_motor, .rec_clutch,
    .audio_on, .mode_record, .motor_on, .clutch_on, .record_enable
  );

  // The conversion must be finished before the data word is serialised.
  property p_conv_done_before_data;
    @(posedge clk) disable iff (!rst_n) (e1 || e2) |-> !dpm_busy;
  endproperty
  assert property (p_conv_done_before_data);
endmodule
