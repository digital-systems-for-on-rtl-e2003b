// dpm_converter -- digital section of the dual-slope digital panel meter.
//
// The monitor's A-D converter is a 3 1/2 digit panel meter that works by dual
// slope integration.  On a conversion command the clamp across the integrator
// is opened and the input is integrated while three BCD decade counters
// count 1000 clock counts (t1).  The carry out of the counters ends t1: the
// input is switched off and a reference of opposite sign discharges the
// integrator (t2) while the counters, restarted from 000, count on.  When the
// comparator reports the integrator back at zero the count is proportional
// to the input; it is strobed into the output register (hundreds, tens,
// units and the overrange "1" digit) and the clamp closes again.
//
// Interface: clk, rst_n (synchronous, active low), cnt_en (counting clock
// enable), convert (command; a rising edge starts a conversion while idle),
// comp_zero (comparator), int_input (t1), int_ref (t2), bcd[11:0]
// ({hundreds,tens,units}), overrange, busy, done (one-cycle strobe).
// Timing: 1000 enabled counts of t1, then one enabled count per unit of the
// result plus one; the outputs hold the last result between conversions.
// The sequence follows the published theory of operation; stopping an
// over-scale count at 1999 is this design's choice.
module dpm_converter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cnt_en,
  input  logic        convert,
  input  logic        comp_zero,
  output logic        int_input,
  output logic        int_ref,
  output logic [11:0] bcd,
  output logic        overrange,
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {IDLE, T1, T2} dpm_state_t;

  dpm_state_t state;
  typedef logic [3:0] decades_t [3];
  decades_t   dig;          // decade counters: 0 units, 1 tens, 2 hundreds
  logic       thou;         // thousands (overrange) digit during t2
  logic       conv_q;
  logic       all_nine;

  // Three cascaded decade counters: each advances when all below it are at 9.
  function automatic decades_t decade_inc(decades_t d);
    decades_t n = d;
    logic     carry = 1'b1;
    for (int i = 0; i < 3; i++) begin
      if (carry) n[i] = (d[i] == 4'd9) ? 4'd0 : d[i] + 4'd1;
      carry = carry && (d[i] == 4'd9);
    end
    return n;
  endfunction

  assign all_nine = (dig[0] == 4'd9) && (dig[1] == 4'd9) && (dig[2] == 4'd9);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      dig       <= '{default: '0};
      thou      <= 1'b0;
      conv_q    <= 1'b0;
      bcd       <= '0;
      overrange <= 1'b0;
      done      <= 1'b0;
    end else begin
      conv_q <= convert;
      done   <= 1'b0;
      unique case (state)
        IDLE: begin
          if (convert && !conv_q) begin
            state <= T1;
            dig   <= '{default: '0};
            thou  <= 1'b0;
          end
        end
        T1: if (cnt_en) begin
          // the carry out of 999 ends t1 and leaves the counters at 000
          dig <= decade_inc(dig);
          if (all_nine) state <= T2;
        end
        T2: if (cnt_en) begin
          if (comp_zero || (thou && all_nine)) begin
            bcd       <= {dig[2], dig[1], dig[0]};
            overrange <= thou;
            done      <= 1'b1;
            state     <= IDLE;
          end else begin
            dig <= decade_inc(dig);
            if (all_nine) thou <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    int_input = (state == T1);
    int_ref   = (state == T2);
    busy      = (state != IDLE);
  end
endmodule
