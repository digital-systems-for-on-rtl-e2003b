// tb_mux8_9312 -- checks the published truth table of the 8-input digital
// multiplexer: code k selects input k+1 while enabled, output low when not.
module tb_mux8_9312;
  logic [7:0] d;
  logic [2:0] s;
  logic oe, y;
  int checks = 0, failures = 0;

  mux8_9312 dut (.d, .s, .oe, .y);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d  = 8'($urandom);
      s  = 3'($urandom);
      oe = (i % 5 != 0);
      #1;
      checks++;
      if (y !== (oe && ((d >> s) & 1))) begin
        failures++; $display("FAIL: d %h s %0d oe %0b y %0b", d, s, oe, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
