// clk_div: divides the system clock into the meter's sample rate.
//
// A CNT_W-bit counter runs from 0 to DIVISOR-1 and wraps. At the wrap it
// raises `tick` for one system clock cycle and flips `clk_out`. With the
// default 20 MHz clock and DIVISOR = 200000 (an 18-bit counter), `tick` comes
// at 100 Hz and `clk_out` changes level 100 times a second. Following the
// single-clock style of the meter, other modules use `tick` as a clock enable
// rather than clocking from `clk_out`; `clk_out` is kept as the square-wave
// output. `en` low freezes the counter (the meter's Power button).
// Reset is synchronous and active high; counter and `clk_out` clear to 0.
module clk_div #(
  parameter int unsigned DIVISOR = 200000,
  parameter int unsigned CNT_W   = 18
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick,
  output logic clk_out
);
  logic [CNT_W-1:0] count;
  logic             wrap;

  assign wrap = (count == CNT_W'(DIVISOR - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      tick    <= 1'b0;
      clk_out <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (wrap) begin
          count   <= '0;
          tick    <= 1'b1;
          clk_out <= ~clk_out;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  initial assert (DIVISOR >= 2 && 64'(DIVISOR) <= (64'd1 << CNT_W))
    else $error("clk_div: DIVISOR does not fit CNT_W");
endmodule
