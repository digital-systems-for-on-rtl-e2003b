// tb_tod_generator -- checks that the time-of-day word counts 15-minute pulses,
// holds between them, and that bit 15 first sets after 2^15 pulses (8192 h).
module tb_tod_generator;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [15:0] tod;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  tod_generator dut (.clk, .rst_n, .inc, .tod);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(tod == 0, "reset");
    for (int i = 0; i < 32768 + 5; i++) begin
      inc <= 1;
      @(posedge clk);
      inc <= 0;
      @(posedge clk); #1;
      model++;
      if (model == 32767) check(tod[15] == 0, "bit 15 before 2^15 periods");
      if (model == 32768) check(tod[15] == 1, "bit 15 at 2^15 periods (8192 h)");
      if (i % 211 == 0) check(tod == 16'(model), $sformatf("tod %0d exp %0d", tod, model));
    end
    repeat (5) @(posedge clk);
    check(tod == 16'(model), "hold without pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
