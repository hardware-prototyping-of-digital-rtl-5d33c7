// tb_energy_meter_top: end-to-end test of the whole meter at reduced rates.
//
// The meter runs with an 8-cycle sample tick, one tick per clock second,
// one-day months, a unit of 2,000,000 energy steps, a rate of 3 per unit and
// 4-cycle digit scanning. The testbench changes the load current right after
// ticks, keeps its own model of the metering rule (current/10 x voltage,
// runs of equal power summed and counted, a segment closed on a change or
// before its 16-bit total or count would overflow, energy = total x count,
// one unit per UNIT_ENERGY, months ending at midnight) and, at quiet points,
// reads the scanned unit and cost displays and the clock digits back from
// the segment and enable lines and compares them with the model. It covers
// two month ends, the toggle to the previous month, the Power button and
// clamping of currents above 15 A, and counts how often each mechanism
// happened.
module tb_energy_meter_top;
  localparam int unsigned DIV = 8;
  localparam longint unsigned UNIT = 2000000;
  localparam int unsigned RATE = 3;
  localparam int DAY = 86400;        // ticks per day (one tick per second)

  logic clk = 0, rst = 1, power_on = 1, toggle = 0;
  logic [15:0] current_in = '0;
  logic [4:0] voltage_in = 5'd5;
  logic [6:0] unit_seg, bill_seg;
  logic [7:0] unit_en, bill_en;
  logic [6:0] time_seg [6];
  logic month_led;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  energy_meter_top #(.CLK_DIVISOR(DIV), .TICKS_PER_SEC(1), .DAYS_PER_MONTH(1),
                     .UNIT_ENERGY(UNIT), .RATE(RATE), .SCAN_W(2)) dut (
    .clk, .rst, .power_on, .toggle, .current_in, .voltage_in,
    .unit_seg, .unit_en, .bill_seg, .bill_en, .time_seg, .month_led);

  localparam logic [6:0] HI [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33,
                                     7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};
  localparam logic [6:0] LOW_GA [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                         7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- reference model, advanced once per tick ----------------
  longint m_prev = 0, m_sum = 0, m_cnt = 0, m_acc = 0, m_cur = 0, m_last = 0;
  longint m_ticks = 0;
  logic [15:0] applied = '0;    // current seen by the next sample

  // mechanism counters
  int n_change = 0, n_overflow = 0, n_units = 0, n_month = 0, n_toggle = 0;
  int n_poweroff = 0, n_clamp = 0, n_bcd = 0, n_scan = 0;

  function automatic void model_sample(logic [15:0] ma);
    longint p, i;
    i = (ma > 15000) ? 15000 : ma;
    p = (i / 10) * 5;
    m_ticks++;
    if (p == m_prev && m_sum + p <= 65535 && m_cnt < 65535) begin
      m_sum += p; m_cnt++;
    end else begin
      m_acc += m_sum * m_cnt;
      while (m_acc >= longint'(UNIT)) begin m_acc -= longint'(UNIT); m_cur++; end
      m_sum = p; m_cnt = 1;
    end
    m_prev = p;
    // the month ends at the midnight tick; its own sample still belongs to it
    if (m_ticks % DAY == 0) begin m_last = m_cur; m_cur = 0; end
  endfunction

  // DUT tick drives the model; the current is changed only just after a tick
  always @(posedge clk) if (!rst && dut.tick) model_sample(applied);

  // watch internal strobes to count mechanisms
  always @(posedge clk) if (!rst) begin
    if (dut.seg_valid && !dut.seg_overflow) n_change++;
    if (dut.seg_overflow) n_overflow++;
    if (dut.unit_inc) n_units++;
    if (dut.month_end) n_month++;
    if (dut.unit_ready) n_bcd++;
    if (unit_en == 8'h80 && dut.u_display_unit.scan == 2'd3) n_scan++;
  end

  // ---------------- display readers ----------------
  function automatic int seg2dig(logic [6:0] s);
    for (int d = 0; d < 10; d++) if (HI[d] == s) return d;
    return -1;
  endfunction

  // Reads both multiplexed displays over two full scans.
  task automatic read_displays(output longint units, output longint cost);
    int ud [8], bd [8];
    for (int k = 0; k < 8; k++) begin ud[k] = -1; bd[k] = -1; end
    repeat (64) begin
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        if (unit_en[k]) ud[k] = seg2dig(unit_seg);
        if (bill_en[k]) bd[k] = seg2dig(bill_seg);
      end
    end
    units = 0; cost = 0;
    for (int k = 7; k >= 0; k--) begin
      if (ud[k] < 0 || bd[k] < 0) begin
        failures++; checks++; $display("FAIL: digit %0d not readable", k);
      end
      units = units * 10 + ud[k];
      cost  = cost * 10 + bd[k];
    end
  endtask

  function automatic longint read_time();
    longint v = 0;
    for (int i = 5; i >= 0; i--) begin
      int d = -1;
      for (int x = 0; x < 10; x++) if (LOW_GA[x] == time_seg[i]) d = x;
      v = v * 10 + d;
    end
    return v;   // HHMMSS as a decimal number
  endfunction

  function automatic longint hhmmss(longint t);
    longint s = t % DAY;
    return (s / 3600) * 10000 + ((s / 60) % 60) * 100 + s % 60;
  endfunction

  // Waits for the next tick, then applies a new current after it.
  task automatic next_tick(logic [15:0] ma);
    do @(posedge clk); while (!dut.tick);
    #1;
    current_in = ma;
    applied = ma;
    if (ma > 15000) n_clamp++;
  endtask

  // Holds the load at zero for a few ticks so that all energy is counted,
  // then compares both displays (current month, and previous with toggle).
  task automatic checkpoint(string where);
    longint u, c;
    repeat (3) next_tick(16'd0);
    repeat (100) @(posedge clk);
    #1;
    read_displays(u, c);
    check(u == m_cur && c == m_cur * RATE,
          $sformatf("%s: shows %0d units / %0d cost, expected %0d / %0d", where, u, c, m_cur, m_cur * RATE));
    toggle = 1;
    repeat (100) @(posedge clk);
    read_displays(u, c);
    check(u == m_last && c == m_last * RATE,
          $sformatf("%s: previous month shows %0d / %0d, expected %0d / %0d", where, u, c, m_last, m_last * RATE));
    if (m_last != 0) n_toggle++;
    toggle = 0;
    repeat (100) @(posedge clk);
    #1;
    check(read_time() == hhmmss(m_ticks), $sformatf("%s: clock %0d expected %0d", where, read_time(), hhmmss(m_ticks)));
  endtask

  // Random load for n ticks: runs of 1..40 ticks at one current.
  task automatic random_load(int n);
    int left = n;
    while (left > 0) begin
      int run;
      logic [15:0] ma;
      run = $urandom_range(1, 40);
      if (run > left) run = left;
      case ($urandom_range(0, 5))
        0: ma = 16'd15000;
        1: ma = 16'd0;
        2: ma = 16'($urandom_range(15001, 40000));   // clamped to 15 A
        default: ma = 16'($urandom_range(0, 15000));
      endcase
      repeat (run) next_tick(ma);
      left -= run;
    end
  endtask

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // first conversion after reset shows zeros; clock shows 00:00:00
    repeat (200) @(posedge clk);
    begin
      longint u, c;
      read_displays(u, c);
      check(u == 0 && c == 0, "zero after reset");
      check(read_time() == 0 || read_time() == hhmmss(m_ticks), "clock starts at 00:00:00");
      check(!month_led, "LED off after reset");
    end
    // the load profile used in the Part 1 simulation: 15000, 4291, 1, 832 mA
    repeat (3) next_tick(16'd15000);
    repeat (5) next_tick(16'd4291);
    repeat (2) next_tick(16'd1);
    repeat (6) next_tick(16'd832);
    checkpoint("profile");
    // Power button off: no ticks, clock stands still
    power_on = 0;
    t0 = m_ticks;
    repeat (50 * DIV) @(posedge clk);
    check(m_ticks == t0, "no samples while powered off");
    if (m_ticks == t0) n_poweroff++;
    power_on = 1;
    // rest of day 1
    while (m_ticks < DAY - 200) begin
      random_load(4000);
      if (m_ticks % 20000 < 4000) checkpoint("day 1");
    end
    while (m_ticks < DAY + 100) next_tick(16'd0);   // quiet across midnight
    check(month_led, "LED on after the month end");
    checkpoint("after month 1");
    while (m_ticks < 2 * DAY - 200) begin
      random_load(4000);
      if (m_ticks % 30000 < 4000) checkpoint("day 2");
    end
    while (m_ticks < 2 * DAY + 100) next_tick(16'd0);
    checkpoint("after month 2");
    random_load(500);
    checkpoint("end");

    $display("segments closed on change %0d, early closes %0d, units %0d, month ends %0d",
             n_change, n_overflow, n_units, n_month);
    $display("toggle views %0d, power-off %0d, clamped currents %0d, BCD conversions %0d, scans %0d",
             n_toggle, n_poweroff, n_clamp, n_bcd, n_scan);
    check(n_change > 0, "segment closed on a change");
    check(n_overflow > 0, "segment closed before overflow");
    check(n_units > 0, "units counted");
    check(n_month == 2, "two month ends");
    check(n_toggle > 0, "previous month shown");
    check(n_poweroff > 0, "power off");
    check(n_clamp > 0, "current clamped");
    check(n_bcd > 0, "BCD conversions");
    check(n_scan > 0, "display scans");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
