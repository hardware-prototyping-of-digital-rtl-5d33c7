// tb_billing: checks price = units x rate, saturated to 24 bits, for the
// default rate of 1 and for a rate of 23, on corner and random unit counts.
module tb_billing;
  logic clk = 0, rst = 1;
  logic [23:0] unit = '0, p1, p23;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  billing dut1 (.clk, .rst, .unit, .price(p1));
  billing #(.RATE(23)) dut23 (.clk, .rst, .unit, .price(p23));

  task automatic try(int unsigned u);
    longint e1, e23;
    e1 = u; e23 = longint'(u) * 23;
    if (e23 > 24'hFFFFFF) e23 = 24'hFFFFFF;
    unit = 24'(u);
    @(posedge clk); #1;
    checks++;
    if (p1 != 24'(e1) || p23 != 24'(e23)) begin
      failures++; $display("FAIL: %0d units -> %0d, %0d", u, p1, p23);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (p1 != 0) failures++;
    rst = 0;
    try(150); try(0); try(1); try(729444); try(729445); try(24'hFFFFFF);
    for (int i = 0; i < 300; i++) try($urandom_range(0, 24'hFFFFFF));
    for (int i = 0; i < 300; i++) try($urandom_range(0, 800000));
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
