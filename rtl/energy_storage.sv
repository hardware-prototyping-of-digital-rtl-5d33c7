// energy_storage: accumulates energy and counts units (kWh).
//
// Each energy value from energy_calc is added to an accumulator. Whenever the
// accumulator holds at least UNIT_ENERGY, one unit is counted and UNIT_ENERGY
// is taken off; at most one unit is counted per clock cycle, so a large energy
// value is worked off over several cycles while new values keep arriving.
// The remainder below one unit carries over.
//
// Energy arrives in units of (10 mA) x (voltage code) x (sample). Dividing by
// 100 gives amperes, and with 100 samples per second one kWh is
// 100 x 100 x 3600 x 1000 = 3.6e10 of these units, the default UNIT_ENERGY,
// taking the voltage code as volts. The factor of 100 for amperes and the
// counting of one unit per kWh are the meter's; the value of UNIT_ENERGY as a
// threshold is this design's reading of them.
//
// On `month_end` the units of the month that ends (including one counted in
// that same cycle) move to the previous-month register and the current count
// restarts at 0. `toggle` high selects the previous month for `unit`,
// low the current month; `unit` is registered (one cycle). Unit counters wrap
// at 2^UNIT_W like an odometer. Reset clears everything.
module energy_storage #(
  parameter int unsigned  E_W         = 32,
  parameter int unsigned  UNIT_W      = 24,
  parameter longint unsigned UNIT_ENERGY = 64'd36000000000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [E_W-1:0]    energy,
  input  logic              month_end,
  input  logic              toggle,
  output logic [UNIT_W-1:0] unit,
  output logic              unit_inc    // one-cycle strobe per unit counted
);
  localparam int unsigned UE_W  = $clog2(UNIT_ENERGY + 1);
  localparam int unsigned ACC_W = ((UE_W > E_W) ? UE_W : E_W) + 4;

  logic [ACC_W-1:0]  acc, acc_next;
  logic [ACC_W:0]    acc_wide;      // one extra bit to catch a wrap
  logic [UNIT_W-1:0] cur_units, prev_units, cur_next;
  logic              take;

  always_comb begin
    take     = (acc >= ACC_W'(UNIT_ENERGY));
    acc_wide = {1'b0, acc} - (take ? (ACC_W+1)'(UNIT_ENERGY) : '0)
                           + (in_valid ? (ACC_W+1)'(energy) : '0);
    acc_next = acc_wide[ACC_W-1:0];
    cur_next = cur_units + (take ? UNIT_W'(1) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      cur_units  <= '0;
      prev_units <= '0;
      unit       <= '0;
      unit_inc   <= 1'b0;
    end else begin
      acc      <= acc_next;
      unit_inc <= take;
      if (month_end) begin
        prev_units <= cur_next;
        cur_units  <= '0;
      end else begin
        cur_units  <= cur_next;
      end
      unit <= toggle ? prev_units : cur_units;
    end
  end

  // The accumulator must never wrap: energy may not arrive faster than units
  // can be worked off.
  assert property (@(posedge clk) disable iff (rst) !acc_wide[ACC_W])
    else $error("energy_storage: accumulator overflow");

  initial assert (UNIT_ENERGY > 0) else $error("energy_storage: UNIT_ENERGY must be > 0");
endmodule
