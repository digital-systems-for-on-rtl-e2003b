// tod_select -- time-of-day transfer gate.
//
// Between analog readings the time-of-day word, instead of the data word, is
// gated to the frequency-shift keyer.  This is the case while the two enable
// columns E2 and E1 of the control counter are equal: counts 0-7 (both 0)
// and 24-31 (both 1) of every 32-count channel slot.  The output is the
// exclusive-NOR of E1 and E2.
//
// Interface: e1, e2, tod_sel (1 = time of day to the keyer).  Combinational.
// Truth table as published.
module tod_select (
  input  logic e1,
  input  logic e2,
  output logic tod_sel
);
  always_comb tod_sel = ~(e1 ^ e2);
endmodule
