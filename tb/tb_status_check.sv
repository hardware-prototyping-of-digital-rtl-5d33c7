// tb_status_check: checks the one-cycle start pulse after reset, one pulse
// in the cycle after each rising edge of ready (also when ready is held for
// several cycles), and no pulse otherwise.
module tb_status_check;
  logic clk = 0, rst = 1, ready = 0, status;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  status_check dut (.clk, .rst, .ready, .status);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic ready_d = 0;
  int exp_pulses = 0, pulses = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 check(status, "status high in reset");
    rst = 0;
    @(posedge clk); #1;    // first edge after reset: status drops
    check(!status, "reset pulse lasts one cycle");
    for (int i = 0; i < 400; i++) begin
      logic r;
      r = ($urandom_range(0, 3) == 0);
      ready = r;
      @(posedge clk); #1;
      check(status == (r && !ready_d), $sformatf("cycle %0d status %0b", i, status));
      if (status) pulses++;
      ready_d = r;
    end
    ready = 1;
    repeat (5) begin @(posedge clk); #1; if (status) exp_pulses++; end
    check(exp_pulses <= 1, "held ready gives one pulse");
    check(pulses > 10, "pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
