// tod_generator -- the 16-bit time-of-day word.
//
// A binary counter of sixteen stages advanced once per recording interval
// (one pulse on `inc` every 15 minutes, from the control counter's rollover).
// Its least significant bit therefore stands for 15 minutes and its most
// significant bit first sets after 2^15 * 15 min = 8192 hours.  The word is
// sent, through two 8-input multiplexers, after every analog reading so that
// each record is identifiable.
//
// Interface: clk, rst_n (synchronous, active low, clears the word; setting
// the clock is not described and is left out), inc, tod[15:0].
// Timing: tod changes on the clock edge where inc is high.
module tod_generator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  output logic [WIDTH-1:0] tod
);
  always_ff @(posedge clk) begin
    if (!rst_n)   tod <= '0;
    else if (inc) tod <= tod + 1'b1;
  end
endmodule
