// tb_conv_cmd_detect -- exhaustive check of the conversion command pattern:
// high only for E2,E1,S2,S1,S0 = 0,0,1,0,0, i.e. count 4 of each 32-count slot.
module tb_conv_cmd_detect;
  logic e2, e1, convert;
  logic [2:0] s;
  int checks = 0, failures = 0, hits = 0;

  conv_cmd_detect dut (.e2, .e1, .s, .convert);

  initial begin
    for (int c = 0; c < 32; c++) begin
      {e2, e1, s} = 5'(c);
      #1;
      checks++;
      if (convert !== (c == 4)) begin
        failures++; $display("FAIL: count %0d convert %0b", c, convert);
      end
      if (convert) hits++;
    end
    checks++;
    if (hits != 1) failures++;
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
