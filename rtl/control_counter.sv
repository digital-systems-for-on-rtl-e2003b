// control_counter -- the sixteen-stage binary counter of the control logic.
//
// All monitor timing is derived by recognising patterns on this counter.
// Bits 7:0 are the first section (S0,S1,S2,E1,E2,A0,A1,A2): S selects a bit
// of the digital multiplexers, E enables one of them, A selects the analog
// channel.  Bits 15:8 (X1..X4,Y1..Y4) time the recorder.  The counter
// advances once per `tick`; when it rolls over from all ones to zero (every
// 65536 counts, i.e. every 15 minutes at the default count rate) it pulses
// `wrap`, which advances the time-of-day word.
//
// Interface: clk, rst_n (synchronous, active low), tick (count enable),
// count[15:0], wrap.  Timing: `count` changes on the clock edge where tick is
// high; `wrap` is high in the same cycle as the tick that rolls it over.
// The original counter is an asynchronous ripple chain; here it is a
// synchronous counter with the same state sequence (a design choice).
module control_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  output logic [WIDTH-1:0] count,
  output logic             wrap
);
  always_ff @(posedge clk) begin
    if (!rst_n)    count <= '0;
    else if (tick) count <= count + 1'b1;
  end

  assign wrap = tick && (&count);
endmodule
