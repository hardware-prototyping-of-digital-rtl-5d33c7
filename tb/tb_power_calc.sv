// tb_power_calc: checks P = v * i on corner and random values, including
// the full 15 A at 5 V (1500 x 5 = 7500), with one cycle of latency.
module tb_power_calc;
  logic clk = 0, rst = 1;
  logic [4:0] voltage = '0;
  logic [10:0] current = '0;
  logic [15:0] power;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  power_calc dut (.clk, .rst, .voltage, .current, .power);

  task automatic try(int v, int i);
    voltage = 5'(v); current = 11'(i);
    @(posedge clk); #1;
    checks++;
    if (power != 16'(v * i)) begin
      failures++; $display("FAIL: %0d x %0d -> %0d", v, i, power);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    try(5, 1500); try(5, 429); try(5, 0); try(31, 2047); try(1, 1); try(0, 2047);
    for (int k = 0; k < 500; k++) try($urandom_range(0, 31), $urandom_range(0, 2047));
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
