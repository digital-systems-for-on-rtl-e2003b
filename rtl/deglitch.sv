// deglitch -- input synchroniser and spurious-pulse filter.
//
// Brings an asynchronous control input (switch closure, cue detector) into
// the clock domain with two flip-flops, then lets the filtered output follow
// it only after the input has differed from the output for N consecutive
// clock cycles.  Pulses shorter than N cycles (contact bounce, line
// transients) are ignored.
//
// Interface: clk, rst_n (synchronous, active low; output resets to INIT),
// din (asynchronous), dout.  Latency: N + 2 cycles for a clean edge.
// The filter stands in for the RC and transistor suppression networks of the
// original; its form and length are this design's choice.
module deglitch #(
  parameter int unsigned N    = 16,
  parameter bit          INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [1:0]    sync;
  logic [CW-1:0] run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync <= {2{INIT}};
      run  <= '0;
      dout <= INIT;
    end else begin
      sync <= {sync[0], din};
      if (sync[1] == dout) begin
        run <= '0;
      end else if (run == CW'(N - 1)) begin
        run  <= '0;
        dout <= sync[1];
      end else begin
        run <= run + 1'b1;
      end
    end
  end
endmodule
