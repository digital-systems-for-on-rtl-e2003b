// tb_fsk_keyer -- exhaustive check of the keyer: time or data line selected by
// the control input, 2.3 kHz tone for a 1 and 2.0 kHz tone for a 0.
module tb_fsk_keyer;
  logic [1:0] data_in, time_in;
  logic tod_sel, tone_lo, tone_hi, logic_bit, tone_out;
  int checks = 0, failures = 0;

  fsk_keyer dut (.data_in, .time_in, .tod_sel, .tone_lo, .tone_hi, .logic_bit, .tone_out);

  initial begin
    for (int v = 0; v < 128; v++) begin
      {data_in, time_in, tod_sel, tone_lo, tone_hi} = 7'(v);
      #1;
      begin
        logic b;
        b = tod_sel ? (time_in != 0) : (data_in != 0);
        checks += 2;
        if (logic_bit !== b) begin failures++; $display("FAIL: bit v=%0d", v); end
        if (tone_out !== (b ? tone_hi : tone_lo)) begin failures++; $display("FAIL: tone v=%0d", v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
