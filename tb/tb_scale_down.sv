// tb_scale_down: drives mA values across and beyond the 0..15000 range and
// compares the registered output with floor(min(mA,15000)/10).
module tb_scale_down;
  logic clk = 0, rst = 1;
  logic [15:0] current_ma = '0;
  logic [10:0] current_s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scale_down dut (.clk, .rst, .current_ma, .current_s);

  task automatic try(int ma);
    int exp;
    exp = ((ma > 15000) ? 15000 : ma) / 10;
    current_ma = 16'(ma);
    @(posedge clk); #1;
    checks++;
    if (current_s != 11'(exp)) begin
      failures++; $display("FAIL: %0d mA -> %0d, expected %0d", ma, current_s, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (current_s != 0) failures++;
    rst = 0;
    try(15000); try(4291); try(1); try(832); try(0); try(9); try(10); try(14999);
    try(15001); try(65535);
    for (int i = 0; i < 500; i++) try($urandom_range(0, 20000));
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
