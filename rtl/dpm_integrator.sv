// dpm_integrator -- behavioural model of the panel meter's integrator and comparator.
//
// Behavioural model (kind: analog part).  The real circuit is an operational
// integrator with a clamp switch and a zero-crossing comparator.  Charge is
// modelled as a signed integer: while the input is switched in (t1) each
// counting clock adds the input code, while the reference is switched in
// (t2) each counting clock subtracts VREF, and otherwise the clamp holds the
// integrator at zero.  `comp_zero` reports the integrator at or below zero.
// With VREF = 10000 (1.0000 V in 0.1 mV codes) and a t1 of 1000 counts, the
// t2 count is the input voltage in millivolts, rounded up.
//
// Interface: clk, rst_n (synchronous, active low), cnt_en, vin[VIN_W]
// (input voltage code), int_input, int_ref, comp_zero.
// Timing: the integrator changes on enabled clock edges; comp_zero is
// combinational from the integrator state.  The integer model is this
// design's own.
module dpm_integrator #(
  parameter int unsigned VIN_W = 15,
  parameter int unsigned VREF  = 10000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cnt_en,
  input  logic [VIN_W-1:0] vin,
  input  logic             int_input,
  input  logic             int_ref,
  output logic             comp_zero
);
  logic signed [31:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n)                  acc <= '0;
    else if (!int_input && !int_ref) acc <= '0;    // clamp closed
    else if (cnt_en) begin
      if (int_input) acc <= acc + 32'(signed'({1'b0, vin}));
      else           acc <= acc - 32'(VREF);
    end
  end

  assign comp_zero = (acc <= 0);
endmodule
