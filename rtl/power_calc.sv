// power_calc: instantaneous power P = v x i.
//
// Multiplies the 5-bit voltage by the 11-bit scaled current (10 mA units)
// and registers the 16-bit product, which is wide enough for the full
// 31 x 2047 range. One cycle of latency; reset clears the output.
module power_calc #(
  parameter int unsigned V_W = 5,
  parameter int unsigned I_W = 11,
  parameter int unsigned P_W = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [V_W-1:0] voltage,
  input  logic [I_W-1:0] current,
  output logic [P_W-1:0] power
);
  always_ff @(posedge clk) begin
    if (rst) power <= '0;
    else     power <= P_W'(voltage) * P_W'(current);
  end

  initial assert (P_W >= V_W + I_W) else $error("power_calc: P_W too narrow");
endmodule
