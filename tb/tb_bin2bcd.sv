// tb_bin2bcd: converts corner and random 24-bit values and compares the
// eight BCD digits with a decimal conversion done in the testbench. Checks
// that ready comes exactly 24 cycles after the capture edge, that the result
// holds afterwards, and that an indicator during a conversion is ignored.
module tb_bin2bcd;
  logic clk = 0, rst = 1, indicator = 0;
  logic [23:0] dual = '0;
  logic [31:0] bcd;
  logic ready, busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bin2bcd dut (.clk, .rst, .indicator, .dual, .bcd, .ready, .busy);

  function automatic logic [31:0] to_bcd(int unsigned v);
    logic [31:0] r = '0;
    for (int d = 0; d < 8; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v /= 10;
    end
    return r;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic convert(int unsigned v, bit disturb);
    int lat = 0;
    dual = 24'(v); indicator = 1;
    @(posedge clk); #1;
    indicator = 0;
    dual = 24'($urandom);
    if (disturb) begin
      repeat (3) @(posedge clk);
      #1 indicator = 1;
      @(posedge clk); #1 indicator = 0;
      lat = 4;
    end
    while (!ready && lat < 100) begin @(posedge clk); #1; lat++; end
    check(lat == 24, $sformatf("latency %0d", lat));
    check(bcd == to_bcd(v), $sformatf("%0d -> %h expected %h", v, bcd, to_bcd(v)));
    repeat (2) @(posedge clk);
    #1 check(!ready && !busy && bcd == to_bcd(v), "result held, idle");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    convert(150, 0); convert(0, 0); convert(9, 0); convert(99999, 1);
    convert(16777215, 0); convert(10, 0); convert(5555555, 1);
    for (int i = 0; i < 200; i++) convert($urandom_range(0, 24'hFFFFFF), i % 5 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
