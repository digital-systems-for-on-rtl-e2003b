// tb_analog_mux_3705 -- checks the analog switch model: channel code k passes
// input k+1, all channels off (output 0) when the output enable is low.
module tb_analog_mux_3705;
  logic [14:0] ain [8];
  logic [2:0] sel;
  logic oe;
  logic [14:0] aout;
  int checks = 0, failures = 0;

  analog_mux_3705 #(.W(15)) dut (.ain, .sel, .oe, .aout);

  initial begin
    for (int i = 0; i < 500; i++) begin
      foreach (ain[k]) ain[k] = 15'($urandom);
      sel = 3'($urandom);
      oe  = (i % 4 != 0);
      #1;
      checks++;
      if (aout !== (oe ? ain[sel] : 15'd0)) begin
        failures++; $display("FAIL: sel %0d oe %0b", sel, oe);
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
