// tb_energy_meter_full: one complete metering operation with every parameter
// of the meter at its default (20 MHz clock divided by 200000, 100 samples per
// second, 1 kWh units, 14-bit display scanning).
//
// The load is 15 A for three samples and 4.291 A for five, then zero, at a
// voltage code of 5: the meter must close the segments 7500 x 3 = 22500 over
// 3 samples and 2145 x 5 = 10725 over 5, so its energy accumulator must hold
// 22500*3 + 10725*5 = 121125. That is far below one unit, so the unit and cost
// displays must read 00000000. After 101 samples (just over one second of
// meter time, about 20 million clock cycles) the clock must show 00:00:01.
module tb_energy_meter_full;
  logic clk = 0, rst = 1, power_on = 1, toggle = 0;
  logic [15:0] current_in = '0;
  logic [4:0] voltage_in = 5'd5;
  logic [6:0] unit_seg, bill_seg;
  logic [7:0] unit_en, bill_en;
  logic [6:0] time_seg [6];
  logic month_led;
  int checks = 0, failures = 0;
  always #25 clk = ~clk;   // 20 MHz

  energy_meter_top dut (
    .clk, .rst, .power_on, .toggle, .current_in, .voltage_in,
    .unit_seg, .unit_en, .bill_seg, .bill_en, .time_seg, .month_led);

  localparam logic [6:0] LOW_GA [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                         7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int ticks = 0, segments = 0;
  longint seg_sum [$], seg_cnt [$];
  always @(posedge clk) if (!rst) begin
    if (dut.tick) ticks++;
    if (dut.seg_valid) begin
      segments++;
      seg_sum.push_back(dut.power_tot);
      seg_cnt.push_back(dut.count_tot);
    end
  end

  task automatic next_tick(logic [15:0] ma);
    do @(posedge clk); while (!dut.tick);
    #1 current_in = ma;
  endtask

  initial begin
    int lit;
    logic [7:0] seen;
    current_in = 16'd15000;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) next_tick(16'd15000);   // after these 3 samples, 4.291 A
    current_in = 16'd4291;
    repeat (5) next_tick(16'd4291);
    current_in = 16'd0;
    while (ticks < 101) next_tick(16'd0);
    repeat (10) @(posedge clk);
    #1;
    // segments: (0,0) at the first sample, then 22500/3, then 10725/5
    check(segments == 3, $sformatf("%0d segments", segments));
    if (segments == 3) begin
      check(seg_sum[1] == 22500 && seg_cnt[1] == 3, $sformatf("15 A segment %0d/%0d", seg_sum[1], seg_cnt[1]));
      check(seg_sum[2] == 10725 && seg_cnt[2] == 5, $sformatf("4.291 A segment %0d/%0d", seg_sum[2], seg_cnt[2]));
    end
    check(dut.u_energy_storage.acc == 121125, $sformatf("energy %0d", dut.u_energy_storage.acc));
    // clock: 101 samples at 100 per second = 00:00:01
    for (int i = 0; i < 6; i++)
      check(time_seg[i] == LOW_GA[(i == 0) ? 1 : 0], $sformatf("clock digit %0d = %h", i, time_seg[i]));
    check(!month_led, "no month end");
    // displays: scan all eight digits (8 x 16384 cycles), all must read 0
    seen = '0;
    lit = 0;
    repeat (8 * 16384 + 10) begin
      @(posedge clk); #1;
      seen |= unit_en;
      if (unit_seg != 7'h7E || bill_seg != 7'h7E) lit++;
    end
    check(seen == 8'hFF, $sformatf("digits scanned %b", seen));
    check(lit == 0, "displays read 00000000");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
