// tb_energy_storage: accumulates random energy values with a small unit
// size (1000) and checks the unit count against a reference model after each
// value has been worked off, including energy values worth several units
// at once. It ends months, checks that the ended month's units move to the
// previous-month register and that toggle selects it. A second instance at
// the default unit size (3.6e10) must count exactly one unit after 36e9 of
// energy and not before.
module tb_energy_storage;
  logic clk = 0, rst = 1, in_valid = 0, month_end = 0, toggle = 0;
  logic [31:0] energy = '0;
  logic [23:0] unit, unit_big;
  logic inc, inc_big;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  energy_storage #(.UNIT_ENERGY(1000)) dut (.clk, .rst, .in_valid, .energy, .month_end,
                                            .toggle, .unit, .unit_inc(inc));
  energy_storage dut_big (.clk, .rst, .in_valid, .energy, .month_end(1'b0), .toggle(1'b0),
                          .unit(unit_big), .unit_inc(inc_big));

  longint total = 0;      // energy given this month plus carried remainder
  longint cur = 0, prev = 0;
  longint big_total = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic give(longint e);
    energy = 32'(e); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    total += e;
    big_total += e;
  endtask

  task automatic settle_and_check();
    // worst case one unit per cycle: wait long enough
    repeat (1500) @(posedge clk);
    #1;
    toggle = 0;
    @(posedge clk); #1;
    check(unit == 24'(cur + total / 1000), $sformatf("current units %0d expected %0d", unit, cur + total / 1000));
    toggle = 1;
    @(posedge clk); #1;
    check(unit == 24'(prev), $sformatf("previous units %0d expected %0d", unit, prev));
    toggle = 0;
  endtask

  task automatic end_month();
    month_end = 1;
    @(posedge clk); #1;
    month_end = 0;
    prev = cur + total / 1000;
    cur = 0;
    total = total % 1000;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    settle_and_check();
    give(999); settle_and_check();
    give(1);   settle_and_check();
    give(22500); settle_and_check();     // 22 units at once
    for (int m = 0; m < 3; m++) begin
      for (int i = 0; i < 20; i++) begin
        give($urandom_range(0, 60000));
        if ($urandom_range(0, 3) == 0) settle_and_check();
      end
      settle_and_check();
      end_month();
      settle_and_check();
    end
    // default unit size: 9 x 4e9 = 3.6e10 exactly
    in_valid = 0;
    check(unit_big == 24'(big_total / 64'd36000000000), "default size before");
    for (int i = 0; i < 8; i++) give(64'd4000000000);
    repeat (5) @(posedge clk);
    #1 check(unit_big == 24'(big_total / 64'd36000000000), $sformatf("default size after 8: %0d", unit_big));
    give(64'd4000000000);
    repeat (5) @(posedge clk);
    #1 check(unit_big == 24'(big_total / 64'd36000000000), $sformatf("default size after 9: %0d", unit_big));
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
