// fsk_keyer -- serial line selection and frequency-shift keying.
//
// Two serial sources reach the keyer: the data word (outputs of the two data
// multiplexers) and the time-of-day word (outputs of the two time-of-day
// multiplexers).  The control line from the time-of-day gate selects one of
// them: 1 passes the time inputs, 0 the data inputs.  The selected logic
// level then gates one of two continuously running tones onto the recorder
// input: the 2.3 kHz tone for a 1 and the 2.0 kHz tone for a 0.
//
// Interface: data_in[1:0], time_in[1:0], tod_sel, tone_lo (2.0 kHz square
// wave), tone_hi (2.3 kHz square wave), logic_bit, tone_out.
// Purely combinational; tone_out follows the tone inputs without a clock.
// Function as published (tone frequencies per the text).
module fsk_keyer (
  input  logic [1:0] data_in,
  input  logic [1:0] time_in,
  input  logic       tod_sel,
  input  logic       tone_lo,
  input  logic       tone_hi,
  output logic       logic_bit,
  output logic       tone_out
);
  always_comb begin
    logic_bit = tod_sel ? (|time_in) : (|data_in);
    tone_out  = logic_bit ? tone_hi : tone_lo;
  end
endmodule
