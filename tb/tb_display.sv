// tb_display: checks that the scanner lights exactly one digit at a time,
// steps through all eight in order, shows each BCD digit with the active-high
// {a..g} pattern, and keeps each digit lit for 2^SCAN_W cycles: 8 cycles for
// a 3-bit instance and 16384 cycles for the default 14-bit one.
module tb_display;
  logic clk = 0, rst = 1;
  logic [31:0] bcd = 32'h0015_0798;
  logic [6:0] seg, seg_d;
  logic [7:0] en, en_d;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  display #(.SCAN_W(3)) dut (.clk, .rst, .bcd, .seg, .digit_en(en));
  display dut_d (.clk, .rst, .bcd, .seg(seg_d), .digit_en(en_d));

  // active-high {a,b,c,d,e,f,g}
  localparam logic [6:0] HI [10] = '{7'h7E, 7'h30, 7'h6D, 7'h79, 7'h33,
                                     7'h5B, 7'h5F, 7'h70, 7'h7F, 7'h7B};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int run_len = 0, runs = 0, run_len_d = 0, runs_d = 0;
  logic [7:0] en_prev = 8'h01, en_prev_d = 8'h01;

  always @(posedge clk) if (!rst) begin
    int idx;
    check($onehot(en), "one digit enabled");
    idx = $clog2(en);
    check(seg == HI[bcd[4*idx +: 4]], $sformatf("digit %0d shows %h", idx, seg));
    if (en != en_prev) begin
      check(en == {en_prev[6:0], en_prev[7]}, "next digit in order");
      if (runs > 0) check(run_len == 8, $sformatf("dwell %0d", run_len));
      runs++; run_len = 0;
    end
    run_len++;
    en_prev = en;
    if (en_d != en_prev_d) begin
      if (runs_d > 0) check(run_len_d == 16384, $sformatf("default dwell %0d", run_len_d));
      runs_d++; run_len_d = 0;
    end
    run_len_d++;
    en_prev_d = en_d;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (200) @(posedge clk);
    #1 bcd = 32'h9876_5432;
    repeat (200) @(posedge clk);
    #1 bcd = $urandom & 32'h7777_7777;
    repeat (131072 * 2) @(posedge clk);
    #1;
    check(runs_d >= 15, $sformatf("default scanned %0d digits", runs_d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
