// billing: charge for a number of units.
//
// Multiplies the unit count it receives by a flat RATE per unit and registers
// the result (one cycle of latency). A result above the 24-bit output range
// is held at the maximum. Computing a charge from the units is the meter's;
// the flat rate, its default of 1 (the units and charge shown side by side in
// the meter's simulation are equal) and the saturation are this design's
// choices. Which month is billed follows the unit count it is given.
module billing #(
  parameter int unsigned UNIT_W = 24,
  parameter int unsigned RATE   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [UNIT_W-1:0] unit,
  output logic [UNIT_W-1:0] price
);
  localparam int unsigned PROD_W = UNIT_W + 32;
  logic [PROD_W-1:0] product;

  always_comb product = PROD_W'(unit) * PROD_W'(RATE);

  always_ff @(posedge clk) begin
    if (rst) price <= '0;
    else if (product > PROD_W'({UNIT_W{1'b1}})) price <= '1;
    else price <= product[UNIT_W-1:0];
  end
endmodule
