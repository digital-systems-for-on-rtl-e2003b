// tb_tod_select -- checks the time-of-day gate over a 32-count slot: it must be
// high in counts 0-7 and 24-31 and low in 8-23, plus the four-row truth table.
module tb_tod_select;
  logic e1, e2, tod_sel;
  int checks = 0, failures = 0;

  tod_select dut (.e1, .e2, .tod_sel);

  initial begin
    for (int c = 0; c < 32; c++) begin
      e1 = c[3];
      e2 = c[4];
      #1;
      checks++;
      if (tod_sel !== (c < 8 || c >= 24)) begin
        failures++; $display("FAIL: count %0d tod_sel %0b", c, tod_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
