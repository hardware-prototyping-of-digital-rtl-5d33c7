// tb_clk_div: checks the tick period, the square-wave toggling and the
// enable of clk_div at a small divisor, and the default 18-bit / 200000
// configuration for one full period (200000 cycles = 10 ms at 20 MHz).
module tb_clk_div;
  logic clk = 0, rst = 1, en = 0;
  logic tick, clk_out, tick_big, clk_out_big;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clk_div #(.DIVISOR(7), .CNT_W(3)) dut (.clk, .rst, .en, .tick, .clk_out);
  clk_div dut_big (.clk, .rst, .en, .tick(tick_big), .clk_out(clk_out_big));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0, last_tick = -1, ticks = 0, big_last = -1, big_ticks = 0;
  logic prev_out;
  always @(posedge clk) begin
    if (!rst) cyc++;
    if (tick && !rst) begin
      if (last_tick >= 0) check(cyc - last_tick == 7, $sformatf("tick period %0d", cyc - last_tick));
      check(clk_out != prev_out, "clk_out toggles at tick");
      last_tick = cyc; ticks++;
    end
    if (tick_big && !rst) begin
      if (big_last >= 0) check(cyc - big_last == 200000, $sformatf("default period %0d", cyc - big_last));
      big_last = cyc; big_ticks++;
    end
    prev_out = clk_out;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    check(ticks == 0 && !clk_out, "no tick while disabled");
    en = 1;
    repeat (420500) @(posedge clk);
    check(ticks >= 60000, $sformatf("tick count %0d", ticks));
    check(big_ticks == 2, $sformatf("default ticks %0d", big_ticks));
    en = 0;
    ticks = 0;
    repeat (30) @(posedge clk);
    check(ticks == 0, "tick stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
