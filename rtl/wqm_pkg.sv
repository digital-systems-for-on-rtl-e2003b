// wqm_pkg -- constants shared by the water-quality monitor field unit.
//
// The field unit records, every 15 minutes, eight analog readings and the
// time of day on an endless-loop tape as frequency-shift-keyed audio.  This
// package holds the layout of the 16-bit data word, the bit positions of the
// 16-stage control counter and the default prescale ratio.  Word layout and counter bit order follow the monitor's
// published word format and clock chain; the numeric encodings of the
// patterns are derived from the counter timing tables.
package wqm_pkg;

  // ---- data word (LSB is sent first) --------------------------------------
  // [3:0] units digit, [7:4] tens digit, [11:8] hundreds digit,
  // [12] overrange (the "1" half digit), [14:13] spares, [15] odd parity.
  typedef struct packed {
    logic       parity;
    logic [1:0] spare;
    logic       overrange;
    logic [3:0] hundreds;
    logic [3:0] tens;
    logic [3:0] units;
  } data_word_t;

  // ---- control counter bit positions --------------------------------------
  // First section (changes fastest): S0 S1 S2 E1 E2 A0 A1 A2.
  // Second section (recorder timing): X1 X2 X3 X4 Y1 Y2 Y3 Y4.
  localparam int unsigned CNT_W = 16;
  localparam int unsigned BIT_S0 = 0;
  localparam int unsigned BIT_E1 = 3;
  localparam int unsigned BIT_E2 = 4;
  localparam int unsigned BIT_A0 = 5;
  localparam int unsigned BIT_X1 = 8;

  // The second section X1..Y4 is bits 15:8.  Within a 32-count channel slot
  // the conversion command is count 4 (E2,E1,S2,S1,S0 = 0,0,1,0,0); in the
  // second section the motor runs counts 4..7 and the clutch is engaged in
  // count 6.  These patterns are decoded in conv_cmd_detect and
  // record_control.

  // Oscillator cycles per control count: 149.131 kHz / 2048 = 72.8 counts/s,
  // so 256 counts take 3.516 s and 65536 counts take 15 minutes.
  localparam int unsigned PRESCALE_DIV_DEFAULT = 2048;

endpackage
