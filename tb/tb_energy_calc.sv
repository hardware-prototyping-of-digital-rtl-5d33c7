// tb_energy_calc: checks energy = total power x duration for corner and
// random segments, the one-cycle latency of out_valid, and that the output
// holds between segments.
module tb_energy_calc;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [15:0] ptot = '0, ctot = '0;
  logic [31:0] energy;
  logic out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  energy_calc dut (.clk, .rst, .in_valid, .power_tot(ptot), .count_tot(ctot), .energy, .out_valid);

  task automatic try(int unsigned p, int unsigned c);
    longint unsigned exp;
    exp = longint'(p) * longint'(c);
    ptot = 16'(p); ctot = 16'(c); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || energy != 32'(exp)) begin
      failures++; $display("FAIL: %0d x %0d -> %0d (valid %0b)", p, c, energy, out_valid);
    end
    ptot = '1; ctot = '1;
    @(posedge clk); #1;
    checks++;
    if (out_valid || energy != 32'(exp)) begin failures++; $display("FAIL: output not held"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    try(22500, 3); try(10725, 5); try(0, 7); try(65535, 65535); try(1, 1);
    for (int i = 0; i < 300; i++) try($urandom_range(0, 65535), $urandom_range(0, 65535));
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
