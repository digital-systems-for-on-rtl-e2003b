// tb_dpm_integrator -- checks the integrator model: after 1000 counts of input
// integration the reference discharge must take ceil(1000 * vin / VREF) counts
// to reach zero, and the clamp must return it to zero.
module tb_dpm_integrator;
  localparam int VREF = 10000;
  logic clk = 0, rst_n = 0, cnt_en = 1, int_input = 0, int_ref = 0, comp_zero;
  logic [14:0] vin;
  int checks = 0, failures = 0;

  dpm_integrator #(.VIN_W(15), .VREF(VREF)) dut (
    .clk, .rst_n, .cnt_en, .vin, .int_input, .int_ref, .comp_zero
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic measure(int v);
    int n = 0, expn;
    vin <= 15'(v);
    int_input <= 1;
    repeat (1000) @(posedge clk);
    int_input <= 0;
    int_ref <= 1;
    #1;
    while (!comp_zero && n < 5000) begin
      @(posedge clk); #1;
      n++;
    end
    int_ref <= 0;
    expn = (1000 * v + VREF - 1) / VREF;
    check(n == expn, $sformatf("vin %0d: %0d counts, expected %0d", v, n, expn));
    @(posedge clk); #1;
    check(comp_zero, "clamped to zero");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(comp_zero, "zero after reset");
    measure(0);
    measure(10);
    measure(15);
    measure(12345);
    measure(32767);
    for (int i = 0; i < 5; i++) measure($urandom_range(0, 32767));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
