// digital_clock: time of day, day count and end-of-month signal.
//
// Six BCD counters hold HH:MM:SS: seconds and minutes count 0-9, ten-seconds
// and ten-minutes 0-5, hours 0-9 (0-3 while ten-hours is 2) and ten-hours
// 0-2, so the time runs from 00:00:00 to 23:59:59. They advance once a
// second, which a prescaler makes from TICKS_PER_SEC strobes of `tick`
// (100 Hz from clk_div). Each digit feeds a seven_seg_decoder wired for
// active-low segments in the order {g,f,e,d,c,b,a}; unit_seg[0] is the
// seconds digit and unit_seg[5] ten-hours. These six patterns are the 42
// clock display lines.
//
// A day counter goes up each time 23:59:59 rolls over to 00:00:00. When it
// reaches DAYS_PER_MONTH (30) it restarts at 0, `month_end` is 1 for one clock
// cycle (it starts a new billing month), and `month_indicator`, the LED, goes
// to 1 and stays on until the next midnight, i.e. for the first day of the new
// month. The counter ranges, the 30-day month, the active-low segments and
// reset to 00:00:00 are the meter's; the prescaler and how long the LED stays
// on are this design's choices. `time_bcd` = {H1,H0,M1,M0,S1,S0}, 4 bits each.
module digital_clock #(
  parameter int unsigned TICKS_PER_SEC  = 100,
  parameter int unsigned DAYS_PER_MONTH = 30
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  output logic [23:0] time_bcd,
  output logic [4:0] days,
  output logic [6:0] unit_seg [6],
  output logic       month_end,
  output logic       month_indicator
);
  localparam int unsigned PW = (TICKS_PER_SEC > 1) ? $clog2(TICKS_PER_SEC) : 1;

  logic [PW-1:0] pre;
  logic [3:0]    s0, s1, m0, m1, h0, h1;
  logic          sec;
  logic          s0_w, s1_w, m0_w, m1_w, day_w;

  always_comb begin
    sec   = tick && (pre == PW'(TICKS_PER_SEC - 1));
    s0_w  = sec  && (s0 == 4'd9);
    s1_w  = s0_w && (s1 == 4'd5);
    m0_w  = s1_w && (m0 == 4'd9);
    m1_w  = m0_w && (m1 == 4'd5);
    day_w = m1_w && (h1 == 4'd2) && (h0 == 4'd3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0;
      {s0, s1, m0, m1, h0, h1} <= '0;
      days            <= '0;
      month_end       <= 1'b0;
      month_indicator <= 1'b0;
    end else begin
      month_end <= 1'b0;
      if (tick) pre <= (pre == PW'(TICKS_PER_SEC - 1)) ? '0 : pre + 1'b1;
      if (sec)  s0 <= s0_w ? 4'd0 : s0 + 4'd1;
      if (s0_w) s1 <= s1_w ? 4'd0 : s1 + 4'd1;
      if (s1_w) m0 <= m0_w ? 4'd0 : m0 + 4'd1;
      if (m0_w) m1 <= m1_w ? 4'd0 : m1 + 4'd1;
      if (m1_w) begin
        if (day_w) begin
          h0 <= 4'd0;
          h1 <= 4'd0;
        end else if (h0 == 4'd9) begin
          h0 <= 4'd0;
          h1 <= h1 + 4'd1;
        end else begin
          h0 <= h0 + 4'd1;
        end
      end
      if (day_w) begin
        month_indicator <= 1'b0;
        if (days == 5'(DAYS_PER_MONTH - 1)) begin
          days            <= '0;
          month_end       <= 1'b1;
          month_indicator <= 1'b1;
        end else begin
          days <= days + 1'b1;
        end
      end
    end
  end

  assign time_bcd = {h1, h0, m1, m0, s1, s0};

  for (genvar i = 0; i < 6; i++) begin : g_dec
    seven_seg_decoder #(.ACTIVE_LOW(1'b1), .A_MSB(1'b0)) u_dec (
      .digit(time_bcd[4*i +: 4]),
      .seg  (unit_seg[i])
    );
  end

  initial assert (DAYS_PER_MONTH >= 1 && DAYS_PER_MONTH <= 32)
    else $error("digital_clock: DAYS_PER_MONTH out of range");
endmodule
