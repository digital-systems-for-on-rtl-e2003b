// tb_dpm_converter -- checks the dual-slope sequencing and BCD counting of the
// panel-meter digital section.  The testbench plays the comparator: it reports
// zero after exactly the number of t2 counts the input should give, so the
// latched BCD value, the overrange digit and the conversion length
// (1000 t1 counts + result + 1 t2 counts) are known in advance.  The counting
// enable is randomised; over-scale inputs must stop at 1999.
module tb_dpm_converter;
  logic clk = 0, rst_n = 0, cnt_en = 0, convert = 0, comp_zero;
  logic int_input, int_ref, overrange, busy, done;
  logic [11:0] bcd;
  int checks = 0, failures = 0;
  int t2_counts = 0, target = 0;

  dpm_converter dut (
    .clk, .rst_n, .cnt_en, .convert, .comp_zero, .int_input, .int_ref,
    .bcd, .overrange, .busy, .done
  );

  always #5 clk = ~clk;

  assign comp_zero = int_ref && (t2_counts >= target);

  always @(posedge clk) begin
    if (!int_ref) t2_counts <= 0;
    else if (cnt_en) t2_counts <= t2_counts + 1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(int value, int en_pct);
    int t1 = 0, t2 = 0, expv;
    target = value;
    expv   = (value > 1999) ? 1999 : value;
    @(posedge clk);
    convert <= 1;
    @(posedge clk);
    while (!done) begin
      cnt_en <= ($urandom_range(1, 100) <= en_pct);
      @(posedge clk);
      if (cnt_en && int_input) t1++;
      if (cnt_en && int_ref)   t2++;
      if (t1 == 3) convert <= 0;       // command is a pulse of a few counts
    end
    #1;
    check(t1 == 1000, $sformatf("t1 length %0d", t1));
    check(t2 == ((value > 1999) ? 2000 : value + 1), $sformatf("t2 length %0d for %0d", t2, value));
    check(overrange == (expv >= 1000), $sformatf("overrange for %0d", value));
    check(bcd == {4'(expv / 100 % 10), 4'(expv / 10 % 10), 4'(expv % 10)},
          $sformatf("bcd %h for %0d", bcd, value));
    @(posedge clk); #1;
    check(!busy && !int_input && !int_ref, "clamp closed after conversion");
    cnt_en <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(!busy && bcd == 0, "idle after reset");
    run(0, 100);
    run(1, 100);
    run(999, 70);
    run(1000, 100);
    run(1500, 50);
    run(1999, 100);
    run(2500, 100);
    for (int i = 0; i < 8; i++) run($urandom_range(0, 1999), 60);
    // a command held high starts only one conversion
    convert <= 1; cnt_en <= 1;
    repeat (4000) @(posedge clk); #1;
    check(!busy, "level command does not retrigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
