// tb_record_control -- exhaustive check of the recorder patterns over the 256
// counts of the upper counter half, with recording enabled and disabled:
// motor in counts 4-7, clutch in count 6, nothing when disabled.
module tb_record_control;
  logic [3:0] x, y;
  logic record_enable, motor, clutch;
  int checks = 0, failures = 0, motor_counts = 0, clutch_counts = 0;

  record_control dut (.x, .y, .record_enable, .motor, .clutch);

  initial begin
    for (int en = 0; en < 2; en++) begin
      for (int c = 0; c < 256; c++) begin
        record_enable = en[0];
        {y, x} = 8'(c);
        #1;
        checks += 2;
        if (motor !== (en == 1 && c >= 4 && c <= 7)) begin
          failures++; $display("FAIL: en %0d count %0d motor %0b", en, c, motor);
        end
        if (clutch !== (en == 1 && c == 6)) begin
          failures++; $display("FAIL: en %0d count %0d clutch %0b", en, c, clutch);
        end
        motor_counts += motor;
        clutch_counts += clutch;
      end
    end
    checks += 2;
    if (motor_counts != 4) failures++;
    if (clutch_counts != 1) failures++;
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
