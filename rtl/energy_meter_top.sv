// energy_meter_top: single-phase digital residential energy meter.
//
// Metering path, sampled at the clk_div tick (100 Hz at 20 MHz):
//   current (mA) -> scale_down (/10) -> power_calc (x voltage) ->
//   power_store (runs of equal power -> total, duration) ->
//   energy_calc (total x duration) -> energy_storage (kWh units, current and
//   previous month, toggle select) -> billing (units x rate).
// Display path: the selected units and their charge each go through a
// bin2bcd converter kept running by a status_check, and a display scanner
// that drives 7 segment lines and 8 digit enables. digital_clock shows the
// time on six active-low digits, counts days and ends the month every 30
// days, which moves the month's units to the previous-month register and
// lights the supervisory LED.
//
// Everything runs on the one clock `clk`; the 100 Hz rate is a clock enable.
// `rst` is a synchronous active-high reset (the Reset button). `power_on` is
// the Power button: while it is 0 the tick stops, so neither metering nor the
// clock advances, and the displays keep showing the last values. `toggle`
// high shows the previous month's units and charge. The parameters exist so
// that simulations can run the meter faster; their defaults are the real
// meter's (UNIT_ENERGY and RATE are this design's, see energy_storage and
// billing).
module energy_meter_top #(
  parameter int unsigned     CLK_DIVISOR    = 200000,
  parameter int unsigned     TICKS_PER_SEC  = 100,
  parameter int unsigned     DAYS_PER_MONTH = 30,
  parameter longint unsigned UNIT_ENERGY    = 64'd36000000000,
  parameter int unsigned     RATE           = 1,
  parameter int unsigned     SCAN_W         = 14
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        power_on,
  input  logic        toggle,
  input  logic [15:0] current_in,
  input  logic [4:0]  voltage_in,
  output logic [6:0]  unit_seg,
  output logic [7:0]  unit_en,
  output logic [6:0]  bill_seg,
  output logic [7:0]  bill_en,
  output logic [6:0]  time_seg [6],
  output logic        month_led
);
  import meter_pkg::*;

  localparam int unsigned DIV_W = $clog2(CLK_DIVISOR);

  logic                tick, clk_slow;
  logic [10:0]         current_s;
  logic [POWER_W-1:0]  power;
  logic [SUM_W-1:0]    power_tot;
  logic [COUNT_W-1:0]  count_tot;
  logic                seg_valid, seg_overflow;
  logic [ENERGY_W-1:0] energy;
  logic                energy_valid;
  unit_t               unit, price;
  logic                unit_inc;
  logic                month_end;
  logic [23:0]         time_bcd;
  logic [4:0]          days;
  logic [4*BCD_DIGITS-1:0] unit_bcd, bill_bcd;
  logic                unit_ready, bill_ready, unit_start, bill_start;
  logic                unit_busy, bill_busy;

  clk_div #(.DIVISOR(CLK_DIVISOR), .CNT_W(DIV_W)) u_clk_div (
    .clk, .rst, .en(power_on), .tick, .clk_out(clk_slow)
  );

  scale_down u_scale_down (
    .clk, .rst, .current_ma(current_in), .current_s
  );

  power_calc u_power_calc (
    .clk, .rst, .voltage(voltage_in), .current(current_s), .power
  );

  power_store #(.P_W(POWER_W), .SUM_W(SUM_W), .CNT_W(COUNT_W)) u_power_store (
    .clk, .rst, .sample(tick), .power, .power_tot, .count_tot,
    .valid(seg_valid), .overflow(seg_overflow)
  );

  energy_calc #(.SUM_W(SUM_W), .CNT_W(COUNT_W), .E_W(ENERGY_W)) u_energy_calc (
    .clk, .rst, .in_valid(seg_valid), .power_tot, .count_tot,
    .energy, .out_valid(energy_valid)
  );

  energy_storage #(.E_W(ENERGY_W), .UNIT_W(UNIT_W), .UNIT_ENERGY(UNIT_ENERGY)) u_energy_storage (
    .clk, .rst, .in_valid(energy_valid), .energy, .month_end, .toggle,
    .unit, .unit_inc
  );

  billing #(.UNIT_W(UNIT_W), .RATE(RATE)) u_billing (
    .clk, .rst, .unit, .price
  );

  // Units: converter, its restart loop and the display scanner.
  status_check u_status_unit (.clk, .rst, .ready(unit_ready), .status(unit_start));
  bin2bcd #(.DUALBITS(UNIT_W), .BCDBITS(4*BCD_DIGITS), .BCDBLKS(BCD_DIGITS)) u_bcd_unit (
    .clk, .rst, .indicator(unit_start), .dual(unit), .bcd(unit_bcd),
    .ready(unit_ready), .busy(unit_busy)
  );
  display #(.SCAN_W(SCAN_W), .DIGITS(BCD_DIGITS)) u_display_unit (
    .clk, .rst, .bcd(unit_bcd), .seg(unit_seg), .digit_en(unit_en)
  );

  // Charge: the same chain.
  status_check u_status_bill (.clk, .rst, .ready(bill_ready), .status(bill_start));
  bin2bcd #(.DUALBITS(UNIT_W), .BCDBITS(4*BCD_DIGITS), .BCDBLKS(BCD_DIGITS)) u_bcd_bill (
    .clk, .rst, .indicator(bill_start), .dual(price), .bcd(bill_bcd),
    .ready(bill_ready), .busy(bill_busy)
  );
  display #(.SCAN_W(SCAN_W), .DIGITS(BCD_DIGITS)) u_display_bill (
    .clk, .rst, .bcd(bill_bcd), .seg(bill_seg), .digit_en(bill_en)
  );

  digital_clock #(.TICKS_PER_SEC(TICKS_PER_SEC), .DAYS_PER_MONTH(DAYS_PER_MONTH)) u_digital_clock (
    .clk, .rst, .tick, .time_bcd, .days, .unit_seg(time_seg),
    .month_end, .month_indicator(month_led)
  );
endmodule
