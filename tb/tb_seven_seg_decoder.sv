// tb_seven_seg_decoder: checks both wirings of the decoder against the
// patterns of the meter's displays: active high {a..g} (0 = 7E, 1 = 30,
// 5 = 5B) and active low {g..a} (0 = 40, 1 = 79, 2 = 24, 3 = 30, 4 = 19,
// 5 = 12, 6 = 02, 7 = 78, 8 = 00, 9 = 10), for all ten decimal digits.
module tb_seven_seg_decoder;
  logic [3:0] digit;
  logic [6:0] seg_hi, seg_lo;
  int checks = 0, failures = 0;

  seven_seg_decoder dut_hi (.digit, .seg(seg_hi));
  seven_seg_decoder #(.ACTIVE_LOW(1'b1), .A_MSB(1'b0)) dut_lo (.digit, .seg(seg_lo));

  // Active-low {g,f,e,d,c,b,a} codes, indexed by digit.
  localparam logic [6:0] LOW_GA [10] = '{7'h40, 7'h79, 7'h24, 7'h30, 7'h19,
                                         7'h12, 7'h02, 7'h78, 7'h00, 7'h10};

  function automatic logic [6:0] reverse7(logic [6:0] v);
    logic [6:0] r;
    for (int b = 0; b < 7; b++) r[b] = v[6-b];
    return r;
  endfunction

  initial begin
    for (int d = 0; d < 10; d++) begin
      logic [6:0] exp_hi;
      digit = 4'(d);
      #1;
      // same segments, other polarity and bit order
      exp_hi = reverse7(~LOW_GA[d]);
      checks++;
      if (seg_lo != LOW_GA[d]) begin failures++; $display("FAIL: low %0d -> %h", d, seg_lo); end
      checks++;
      if (seg_hi != exp_hi) begin failures++; $display("FAIL: high %0d -> %h", d, seg_hi); end
    end
    digit = 0; #1; checks++; if (seg_hi != 7'h7E) failures++;
    digit = 1; #1; checks++; if (seg_hi != 7'h30) failures++;
    digit = 5; #1; checks++; if (seg_hi != 7'h5B) failures++;
    // letters A..F must light something and differ from each other and the digits
    for (int d = 10; d < 16; d++) begin
      digit = 4'(d); #1;
      checks++;
      if (seg_hi == 0 || seg_lo != reverse7(~seg_hi)) begin failures++; $display("FAIL: hex %0d", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
