// scale_down: converts the measured current from mA to units of 10 mA.
//
// The current input spans 0 to 15000 mA; dividing by 10 gives 0 to 1500,
// which fits the 11-bit output. Inputs above I_MAX_MA are clamped to the
// 15 A maximum (the clamp is this design's choice; the range and the factor
// of 10 are the meter's). The result is registered: one cycle of latency.
// Reset clears the output to 0.
module scale_down #(
  parameter int unsigned IN_W     = 16,
  parameter int unsigned OUT_W    = 11,
  parameter int unsigned I_MAX_MA = 15000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  current_ma,
  output logic [OUT_W-1:0] current_s
);
  logic [IN_W-1:0] clamped;
  logic [IN_W-1:0] quotient;

  always_comb begin
    clamped  = (current_ma > IN_W'(I_MAX_MA)) ? IN_W'(I_MAX_MA) : current_ma;
    quotient = clamped / IN_W'(10);
  end

  always_ff @(posedge clk) begin
    if (rst) current_s <= '0;
    else     current_s <= OUT_W'(quotient);
  end

  initial assert (I_MAX_MA / 10 < (1 << OUT_W))
    else $error("scale_down: OUT_W too narrow for I_MAX_MA/10");
endmodule
