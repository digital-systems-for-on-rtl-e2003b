// time_base_prescaler -- divides the crystal time base to the control count rate.
//
// The monitor's 149.131 kHz crystal oscillator is divided by a binary ripple
// chain before it reaches the control counter.  Here the chain is one
// synchronous counter of $clog2(DIV) stages that emits a one-cycle `tick`
// each time it rolls over, i.e. once every DIV clock cycles.  The tick is the
// count enable of the control counter.
//
// Interface: clk (time base), rst_n (synchronous, active low), tick (out).
// Timing: first tick DIV cycles after reset is released, then every DIV cycles.
//
// The default DIV = 2048 is this design's reading of the clock chain: it is
// the ratio that makes 256 control counts last 3.516 s and the 16-stage
// control counter wrap every 15 minutes (149131 * 900 = 2^27).  The chain as
// drawn (three divide-by-16 stages) would be 4096.
module time_base_prescaler #(
  parameter int unsigned DIV = 2048     // power of two
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] stage;

  always_ff @(posedge clk) begin
    if (!rst_n) stage <= '0;
    else        stage <= stage + 1'b1;
  end

  // Rollover of all stages: every stage at 1.
  assign tick = rst_n && (stage == W'(DIV - 1));

  initial assert (DIV >= 2 && (DIV & (DIV - 1)) == 0)
    else $error("DIV must be a power of two");
endmodule
