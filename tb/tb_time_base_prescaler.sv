// tb_time_base_prescaler -- checks the tick spacing of the time-base prescaler.
// At the default DIV = 2048 the first tick must come 2048 cycles after reset
// and every following tick 2048 cycles later (72.8 counts/s at 149.131 kHz).
module tb_time_base_prescaler;
  localparam int DIV = 2048;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nticks = 0;

  time_base_prescaler dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check(!tick, "no tick during reset");
    rst_n <= 1;
    forever begin
      @(posedge clk);
      cyc++;
      if (tick) begin
        nticks++;
        check(cyc - last == DIV, $sformatf("tick spacing %0d", cyc - last));
        last = cyc;
        if (nticks == 10) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (DIV * 12) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
