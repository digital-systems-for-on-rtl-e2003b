// tb_control_logic -- runs the control section through a full 65536-count
// cycle (prescaler shortened to 4 clocks per count) and checks, count by
// count, the conversion command (count 4 of each 32), the time-of-day gate
// (counts 0-7 and 24-31), the recorder motor (upper counts 4-7) and clutch
// (upper count 6, 256 counts = one sweep), the wrap, and that a low
// record_enable blocks the recorder.  Two more instances check the
// recording-interval option over two counter cycles: INTERVAL_SHIFT = 2
// (hourly, records only in the first of four periods) and -1 (7.5 minutes,
// records at upper counts 6 and 134).
module tb_control_logic;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0, record_enable = 1;
  logic [15:0] count;
  logic tick, wrap, convert, tod_sel, rec_motor, rec_clutch;
  int checks = 0, failures = 0;
  int n_convert = 0, n_clutch_cycles = 0, n_wrap = 0, cyc = 0, last_tick = 0;

  control_logic #(.PRESCALE_DIV(DIV)) dut (
    .clk, .rst_n, .record_enable, .count, .tick, .wrap, .convert, .tod_sel,
    .rec_motor, .rec_clutch
  );

  logic [15:0] count_h, count_s;
  logic tick_h, wrap_h, convert_h, tod_sel_h, motor_h, clutch_h;
  logic tick_s, wrap_s, convert_s, tod_sel_s, motor_s, clutch_s;
  int n_clutch_h = 0, n_clutch_s = 0;

  control_logic #(.PRESCALE_DIV(DIV), .INTERVAL_SHIFT(2)) dut_hourly (
    .clk, .rst_n, .record_enable, .count(count_h), .tick(tick_h), .wrap(wrap_h),
    .convert(convert_h), .tod_sel(tod_sel_h), .rec_motor(motor_h), .rec_clutch(clutch_h)
  );
  control_logic #(.PRESCALE_DIV(DIV), .INTERVAL_SHIFT(-1)) dut_short (
    .clk, .rst_n, .record_enable, .count(count_s), .tick(tick_s), .wrap(wrap_s),
    .convert(convert_s), .tod_sel(tod_sel_s), .rec_motor(motor_s), .rec_clutch(clutch_s)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // Expected decodes, from the count alone.
  function automatic bit exp_convert(logic [15:0] c);
    return c[4:0] == 5'd4;
  endfunction
  function automatic bit exp_tod(logic [15:0] c);
    return c[4:0] < 8 || c[4:0] >= 24;
  endfunction

  initial begin
    int unsigned expect_count = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 2 * 65536 + 300; k++) begin
      // look at the settled outputs once per count
      @(posedge clk iff tick);
      #1;
      expect_count = (expect_count + 1) & 16'hFFFF;
      check(count == 16'(expect_count), $sformatf("count %0d exp %0d", count, expect_count));
      check(convert == exp_convert(count), $sformatf("convert at %0d", count));
      check(tod_sel == exp_tod(count), $sformatf("tod_sel at %0d", count));
      check(rec_motor == (record_enable && count[15:8] >= 4 && count[15:8] <= 7),
            $sformatf("motor at %0d", count));
      check(rec_clutch == (record_enable && count[15:8] == 6),
            $sformatf("clutch at %0d", count));
      // interval options: same counter, different recorder gating
      check(count_h == count && count_s == count, "interval variants count");
      check(motor_h == (record_enable && k < 65535 && count[15:8] >= 4 && count[15:8] <= 7),
            $sformatf("hourly motor at %0d (k %0d)", count, k));
      check(clutch_h == (motor_h && count[15:8] == 6), $sformatf("hourly clutch at %0d", count));
      check(motor_s == (record_enable && count[14:8] >= 4 && count[14:8] <= 7),
            $sformatf("7.5 min motor at %0d", count));
      check(clutch_s == (motor_s && count[14:8] == 6), $sformatf("7.5 min clutch at %0d", count));
      n_convert += convert;
      // last counts: recording disabled, recorder must stay off
      if (k == 2 * 65536) record_enable <= 0;
    end
    check(n_convert == 4096 + 10, $sformatf("conversion commands %0d", n_convert));
    check(n_clutch_cycles == 2 * 256 * DIV, $sformatf("clutch cycles %0d exp %0d", n_clutch_cycles, 2 * 256 * DIV));
    check(n_clutch_h == 256 * DIV, $sformatf("hourly clutch cycles %0d", n_clutch_h));
    check(n_clutch_s == 4 * 256 * DIV, $sformatf("7.5 min clutch cycles %0d", n_clutch_s));
    check(n_wrap == 2, $sformatf("wraps %0d", n_wrap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rec_clutch) n_clutch_cycles++;
    if (clutch_h) n_clutch_h++;
    if (clutch_s) n_clutch_s++;
    if (wrap) n_wrap++;
    if (tick) begin
      if (last_tick != 0 && cyc - last_tick != DIV) begin
        checks++; failures++; $display("FAIL: tick spacing");
      end
      last_tick = cyc;
    end
  end

  initial begin
    repeat (DIV * 140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
