// control_logic -- the control section of the monitor.
//
// Holds the time-base prescaler and the 16-stage control counter, and the
// three pattern recognisers that derive every command from the counter:
// the A-D conversion command, the time-of-day transfer gate and the
// record-mode motor and clutch requests.  The counter outputs themselves
// drive the multiplexers: A2..A0 the analog switch, S2..S0 the bit select of
// the digital switches, E1 and E2 the enables of the first and second data
// switch.
//
// One channel slot is 32 counts: 0-7 time-of-day low byte, 4 conversion
// command, 8-15 data bits 0-7, 16-23 data bits 8-15, 24-31 time-of-day high
// byte.  Eight slots (256 counts, 3.516 s) make one sweep; the sweep during
// second-section count 6 is recorded.
//
// Recording interval: the interval is 15 minutes x 2**INTERVAL_SHIFT.  A
// positive shift adds that many divider stages after the counter and lets
// the recorder run only while they are all 0 (INTERVAL_SHIFT = 2 records
// hourly); a negative shift leaves the top |INTERVAL_SHIFT| counter bits out
// of the recorder pattern, so the pattern recurs 2, 4, ... times per
// counter cycle.  This stands in for the rewiring of the command
// connections the original used for other intervals; the counter, the
// channel schedule and the 15-minute time-of-day step are unchanged.
//
// Interface: clk (149.131 kHz time base), rst_n (synchronous, active low),
// record_enable (low blocks recording), count[15:0], tick (count enable),
// wrap (15-minute pulse), convert, tod_sel, rec_motor, rec_clutch.
module control_logic
  import wqm_pkg::*;
#(
  parameter int unsigned PRESCALE_DIV   = PRESCALE_DIV_DEFAULT,
  parameter int          INTERVAL_SHIFT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              record_enable,
  output logic [CNT_W-1:0]  count,
  output logic              tick,
  output logic              wrap,
  output logic              convert,
  output logic              tod_sel,
  output logic              rec_motor,
  output logic              rec_clutch
);
  time_base_prescaler #(.DIV(PRESCALE_DIV)) u_prescale (
    .clk, .rst_n, .tick
  );

  control_counter #(.WIDTH(CNT_W)) u_counter (
    .clk, .rst_n, .tick, .count, .wrap
  );

  conv_cmd_detect u_conv (
    .e2(count[BIT_E2]), .e1(count[BIT_E1]), .s(count[BIT_S0 +: 3]), .convert
  );

  tod_select u_todsel (
    .e1(count[BIT_E1]), .e2(count[BIT_E2]), .tod_sel
  );

  // Recorder pattern byte and the interval gate.
  logic [7:0] rec_pattern;
  logic       interval_due;

  if (INTERVAL_SHIFT > 0) begin : g_longer
    logic [INTERVAL_SHIFT-1:0] periods;
    always_ff @(posedge clk) begin
      if (!rst_n)    periods <= '0;
      else if (wrap) periods <= periods + 1'b1;
    end
    assign rec_pattern  = count[BIT_X1 +: 8];
    assign interval_due = (periods == '0);
  end else if (INTERVAL_SHIFT < 0) begin : g_shorter
    localparam int KEEP = 8 + INTERVAL_SHIFT;
    assign rec_pattern  = {{(-INTERVAL_SHIFT){1'b0}}, count[BIT_X1 +: KEEP]};
    assign interval_due = 1'b1;
  end else begin : g_nominal
    assign rec_pattern  = count[BIT_X1 +: 8];
    assign interval_due = 1'b1;
  end

  initial begin
    if (INTERVAL_SHIFT < -5 || INTERVAL_SHIFT > 16)
      $error("INTERVAL_SHIFT %0d out of range -5..16", INTERVAL_SHIFT);
  end

  record_control u_rec (
    .x(rec_pattern[3:0]), .y(rec_pattern[7:4]),
    .record_enable(record_enable && interval_due),
    .motor(rec_motor), .clutch(rec_clutch)
  );
endmodule
