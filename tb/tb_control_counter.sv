// tb_control_counter -- checks counting, hold without tick, and the 15-minute
// wrap pulse of the 16-stage control counter over one full cycle plus a bit.
module tb_control_counter;
  logic clk = 0, rst_n = 0, tick = 0, wrap;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int unsigned model = 0, wraps = 0;

  control_counter dut (.clk, .rst_n, .tick, .count, .wrap);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(count == 0, "reset value");
    for (int i = 0; model != 40 || wraps == 0; i++) begin
      tick <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
      #1;
      if (tick) begin
        model = (model + 1) & 32'hFFFF;
      end
      if (i % 97 == 0 || model < 3 || model > 65533)
        check(count == 16'(model), $sformatf("count %0d expected %0d", count, model));
    end
    check(wraps == 1, $sformatf("wraps %0d", wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wrap must coincide with the tick that rolls 0xFFFF over
  always @(posedge clk) if (rst_n) begin
    if (wrap) wraps++;
    if (wrap != (tick && count == 16'hFFFF)) begin
      failures++; checks++; $display("FAIL: wrap at count %0d", count);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
