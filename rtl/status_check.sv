// status_check: restarts the BCD converter after every conversion.
//
// Watches the converter's `ready` and drives `status`, which goes back to the
// converter's capture input. `status` is 1 for exactly one clock cycle in
// the cycle after `ready` rises, and 0 otherwise, so the converter captures
// a fresh binary value as soon as it has finished the previous one and
// the displayed value follows its input continuously. During reset and in the
// first cycle after it, `status` is 1, which starts the first conversion.
// The loop and the reset pulse are the meter's; detecting the rising edge of
// `ready`, so that a held `ready` gives one pulse, is this design's choice.
module status_check (
  input  logic clk,
  input  logic rst,
  input  logic ready,
  output logic status
);
  logic ready_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_q <= 1'b0;
      status  <= 1'b1;
    end else begin
      ready_q <= ready;
      status  <= ready && !ready_q;
    end
  end
endmodule
