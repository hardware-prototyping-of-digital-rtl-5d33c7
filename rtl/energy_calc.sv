// energy_calc: energy of one constant-power segment.
//
// When `in_valid` pulses, the segment's total power and its duration in
// samples, both from power_store, are multiplied and the product is
// registered; `out_valid` pulses one cycle later. The product of total power
// and duration is the meter's own rule; note that total power is already a
// sum over the segment, so a constant load of P held for n samples gives
// P*n*n. The 32-bit result width (16 x 16) is this design's choice. Reset
// clears the output.
module energy_calc #(
  parameter int unsigned SUM_W = 16,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned E_W   = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [SUM_W-1:0] power_tot,
  input  logic [CNT_W-1:0] count_tot,
  output logic [E_W-1:0]   energy,
  output logic             out_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      energy    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) energy <= E_W'(power_tot) * E_W'(count_tot);
    end
  end

  initial assert (E_W >= SUM_W + CNT_W) else $error("energy_calc: E_W too narrow");
endmodule
