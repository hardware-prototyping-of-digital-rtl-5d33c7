// tb_display_chain: the display half of the meter on its own, with fixed
// inputs of 150 units and a charge of 150 (binary 0x96), as in the meter's
// display-level simulation. Two status_check + bin2bcd pairs convert the
// values continuously, two display scanners (default 14-bit scan counter)
// show them, and a digital clock runs one second per clock tick with a
// one-day month. Checks: both displays show 0,0,0,0,0,1,5,0 as 7E, 30, 5B;
// the converters restart every 26 cycles; the clock passes 23:39:xx and
// 23:59:59 with the right active-low codes; the month indicator comes on at
// midnight.
module tb_display_chain;
  logic clk = 0, rst = 1;
  logic [23:0] unit_in = 24'h000096, cost_in = 24'h000096;
  logic [31:0] bcd_u, bcd_b;
  logic rdy_u, rdy_b, st_u, st_b, busy_u, busy_b;
  logic [6:0] seg_u, seg_b;
  logic [7:0] en_u, en_b;
  logic [23:0] t;
  logic [4:0] days;
  logic [6:0] tseg [6];
  logic me, led;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  status_check sc_u (.clk, .rst, .ready(rdy_u), .status(st_u));
  status_check sc_b (.clk, .rst, .ready(rdy_b), .status(st_b));
  bin2bcd b_u (.clk, .rst, .indicator(st_u), .dual(unit_in), .bcd(bcd_u), .ready(rdy_u), .busy(busy_u));
  bin2bcd b_b (.clk, .rst, .indicator(st_b), .dual(cost_in), .bcd(bcd_b), .ready(rdy_b), .busy(busy_b));
  display d_u (.clk, .rst, .bcd(bcd_u), .seg(seg_u), .digit_en(en_u));
  display d_b (.clk, .rst, .bcd(bcd_b), .seg(seg_b), .digit_en(en_b));
  digital_clock #(.TICKS_PER_SEC(1), .DAYS_PER_MONTH(1)) clk_u (
    .clk, .rst, .tick(1'b1), .time_bcd(t), .days, .unit_seg(tseg), .month_end(me), .month_indicator(led));

  // expected pattern per digit position for 00000150, active high {a..g}
  localparam logic [6:0] EXP [8] = '{7'h7E, 7'h5B, 7'h30, 7'h7E, 7'h7E, 7'h7E, 7'h7E, 7'h7E};
  localparam logic [6:0] LOW_GA [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                         7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  longint cyc = 0, last_rdy = -1;
  int seen_digits = 0, bad_seg = 0, restarts = 0, bad_period = 0;
  logic [7:0] seen = '0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (rdy_u) begin
      if (last_rdy >= 0 && cyc - last_rdy != 26) bad_period++;
      last_rdy = cyc; restarts++;
    end
    if (cyc > 100) begin
      for (int k = 0; k < 8; k++) if (en_u[k]) begin
        seen[k] = 1'b1;
        if (seg_u != EXP[k] || en_b != en_u || seg_b != EXP[k]) bad_seg++;
      end
    end
  end

  function automatic bit shows(int h, int m, int s);
    int d [6];
    d[0] = s % 10; d[1] = s / 10; d[2] = m % 10; d[3] = m / 10; d[4] = h % 10; d[5] = h / 10;
    for (int i = 0; i < 6; i++) if (tseg[i] != LOW_GA[d[i]]) return 0;
    return 1;
  endfunction

  initial begin
    bit saw_2339 = 0, saw_last = 0, led_at_midnight = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(shows(0, 0, 0), "clock shows 00:00:00 after reset");
    // run past midnight: 86400 seconds at one second per cycle
    for (int c = 0; c < 86400 + 200; c++) begin
      @(posedge clk); #1;
      if (t == 24'h233900) saw_2339 = shows(23, 39, 0);
      if (t == 24'h235959) begin
        saw_last = shows(23, 59, 59);
        check(!led, "LED off before midnight");
      end
      if (t == 24'h000000 && saw_last && led) led_at_midnight = 1;
    end
    check(saw_2339, "23:39:00 shown");
    check(saw_last, "23:59:59 shown");
    check(led_at_midnight, "month indicator on after midnight");
    check(days == 0, "day counter restarted");
    repeat (50000) @(posedge clk);   // complete a full scan at 16384 cycles per digit
    #1;
    check(seen == 8'hFF, $sformatf("digits scanned %b", seen));
    check(bad_seg == 0, $sformatf("%0d wrong segment cycles", bad_seg));
    check(bcd_u == 32'h00000150 && bcd_b == 32'h00000150, "BCD of 0x96 is 150");
    check(restarts > 1000 && bad_period == 0, $sformatf("%0d conversions, %0d off period", restarts, bad_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
