// tb_digital_clock: runs a clock with 2 ticks per second and a 2-day month
// for a little over two months and compares the time, the segment patterns
// (active low {g..a}), the day count, the one-cycle month_end pulses and the
// month LED with a seconds counter kept in the testbench. A second instance
// at the default 100 ticks per second must show 00:00:03 after 300 ticks.
module tb_digital_clock;
  logic clk = 0, rst = 1, tick = 0;
  logic [23:0] t, t_d;
  logic [4:0] days, days_d;
  logic [6:0] segs [6], segs_d [6];
  logic me, led, me_d, led_d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  digital_clock #(.TICKS_PER_SEC(2), .DAYS_PER_MONTH(2)) dut (
    .clk, .rst, .tick, .time_bcd(t), .days, .unit_seg(segs), .month_end(me), .month_indicator(led));
  digital_clock dut_d (
    .clk, .rst, .tick, .time_bcd(t_d), .days(days_d), .unit_seg(segs_d), .month_end(me_d),
    .month_indicator(led_d));

  localparam logic [6:0] LOW_GA [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                         7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [23:0] hms(longint s);
    int sod, h, m, x;
    sod = int'(s % 86400);
    h = sod / 3600; m = (sod / 60) % 60; x = sod % 60;
    return {4'(h / 10), 4'(h % 10), 4'(m / 10), 4'(m % 10), 4'(x / 10), 4'(x % 10)};
  endfunction

  longint ticks = 0, secs = 0;
  int month_pulses = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(t == 0 && segs[0] == 7'h40 && segs[5] == 7'h40, "reset shows 00:00:00");
    tick = 1;
    for (longint c = 0; c < 2 * 86400 * 2 * 2 + 10000; c++) begin
      @(posedge clk); #1;
      ticks++;
      secs = ticks / 2;
      if (ticks % 2 == 0 || ticks % 7919 == 1) begin
        longint day;
        day = secs / 86400;
        check(t == hms(secs), $sformatf("time %h expected %h", t, hms(secs)));
        check(days == 5'(day % 2), $sformatf("days %0d", days));
        check(led == (day >= 2 && day % 2 == 0), "month LED");
        for (int i = 0; i < 6; i++)
          check(segs[i] == LOW_GA[t[4*i +: 4]], $sformatf("digit %0d segments %h", i, segs[i]));
      end
      if (me) begin
        month_pulses++;
        check(secs % (2 * 86400) == 0 && ticks % 2 == 0, $sformatf("month end at %0d s", secs));
      end
      if (ticks == 300) check(t_d == 24'h000003 && days_d == 0 && !me_d, "default rate: 3 s after 300 ticks");
    end
    check(month_pulses == 2, $sformatf("month ends %0d", month_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
