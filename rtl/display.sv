// display: time-multiplexed driver for eight seven-segment digits.
//
// The 32-bit input holds eight BCD digits, digit 0 in bits 3:0 (the rightmost
// display). A SCAN_W-bit counter runs on every clock; each time it rolls
// over, a 3-bit selector moves on to the next digit. The selected digit goes
// through a seven_seg_decoder (active high, a in bit 6) onto the shared
// segment lines, and the one enable line of that digit is 1. Seven segment
// lines plus eight enables drive all eight displays; with a 20 MHz clock and
// a 14-bit counter each digit is lit for about 0.8 ms and the whole display
// is refreshed about 150 times a second, fast enough not to flicker.
// The scanning scheme and counter width are the meter's; active-high digit
// enables and the digit order are this design's choices. Reset selects
// digit 0. Outputs are combinational from registers.
module display #(
  parameter int unsigned SCAN_W = 14,
  parameter int unsigned DIGITS = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [4*DIGITS-1:0]   bcd,
  output logic [6:0]            seg,
  output logic [DIGITS-1:0]     digit_en
);
  localparam int unsigned SEL_W = (DIGITS > 1) ? $clog2(DIGITS) : 1;

  logic [SCAN_W-1:0] scan;
  logic [SEL_W-1:0]  sel;
  logic [3:0]        cur_digit;

  always_ff @(posedge clk) begin
    if (rst) begin
      scan <= '0;
      sel  <= '0;
    end else begin
      scan <= scan + 1'b1;
      if (&scan) sel <= (sel == SEL_W'(DIGITS - 1)) ? '0 : sel + 1'b1;
    end
  end

  always_comb begin
    cur_digit = bcd[4*sel +: 4];
    digit_en  = '0;
    digit_en[sel] = 1'b1;
  end

  seven_seg_decoder #(.ACTIVE_LOW(1'b0), .A_MSB(1'b1)) u_hex_display (
    .digit(cur_digit),
    .seg  (seg)
  );
endmodule
