// meter_pkg: types and constants shared by the energy meter modules.
//
// The meter samples current at a fixed rate, turns it into power, groups runs
// of equal power into (total power, duration) segments, converts each segment
// into energy, and counts kWh units and their cost. The widths below are the
// ones the design uses between those stages: 16-bit power, 16-bit segment
// totals and counts, 24-bit unit and cost values, and 8 BCD digits of 4 bits
// for the displays. The 32-bit energy width is this design's own choice (a
// 16 x 16 product).
package meter_pkg;
  localparam int unsigned POWER_W = 16;   // power sample width
  localparam int unsigned SUM_W   = 16;   // running power total of a segment
  localparam int unsigned COUNT_W = 16;   // samples in a segment
  localparam int unsigned ENERGY_W = 32;  // energy of one segment
  localparam int unsigned UNIT_W  = 24;   // kWh units and cost
  localparam int unsigned BCD_DIGITS = 8;

  typedef logic [3:0] bcd_digit_t;
  typedef logic [6:0] seg_t;               // one seven-segment pattern
  typedef logic [UNIT_W-1:0] unit_t;
endpackage
