// tb_power_store: feeds runs of equal power samples and checks every
// segment that comes out against a reference model in the testbench.
// The first runs are the 15 A and 4.291 A loads at 5 V (power 7500 for three
// samples -> total 22500, count 3; power 2145 for five samples -> 10725, 5).
// Long runs of high power force the total to close early before it would
// pass 16 bits; a second instance with a 4-bit counter checks the same for
// the duration counter.
module tb_power_store;
  logic clk = 0, rst = 1, sample = 0;
  logic [15:0] power = '0;
  logic [15:0] ptot, ptot_s;
  logic [15:0] ctot;
  logic [3:0]  ctot_s;
  logic valid, ovf, valid_s, ovf_s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  power_store dut (.clk, .rst, .sample, .power, .power_tot(ptot), .count_tot(ctot),
                   .valid, .overflow(ovf));
  power_store #(.CNT_W(4)) dut_s (.clk, .rst, .sample, .power, .power_tot(ptot_s),
                   .count_tot(ctot_s), .valid(valid_s), .overflow(ovf_s));

  // Reference model for one instance: sums and counts, closing a segment on
  // a change of value or when either would exceed its maximum.
  typedef struct { longint sum; longint cnt; longint prev; } ref_t;
  ref_t r [2];
  longint exp_sum [2][$], exp_cnt [2][$];
  int n_valid [2], n_ovf [2];

  function automatic void model(int k, longint p, longint cmax);
    if (p == r[k].prev && r[k].sum + p <= 65535 && r[k].cnt < cmax) begin
      r[k].sum += p; r[k].cnt++;
    end else begin
      exp_sum[k].push_back(r[k].sum); exp_cnt[k].push_back(r[k].cnt);
      r[k].sum = p; r[k].cnt = 1;
    end
    r[k].prev = p;
  endfunction

  task automatic step(int p);
    power = 16'(p);
    sample = 1;
    model(0, p, 65535);
    model(1, p, 15);
    @(posedge clk); #1;
    sample = 0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
  endtask

  task automatic run(int p, int n);
    repeat (n) step(p);
  endtask

  always @(posedge clk) begin
    if (valid && !rst) begin
      checks++; n_valid[0]++;
      if (ovf) n_ovf[0]++;
      if (exp_sum[0].size() == 0) begin failures++; $display("FAIL: unexpected segment"); end
      else begin
        longint es, ec;
        es = exp_sum[0].pop_front(); ec = exp_cnt[0].pop_front();
        if (ptot != 16'(es) || ctot != 16'(ec)) begin
          failures++; $display("FAIL: segment %0d/%0d expected %0d/%0d", ptot, ctot, es, ec);
        end
      end
    end
    if (valid_s && !rst) begin
      checks++; n_valid[1]++;
      if (ovf_s) n_ovf[1]++;
      if (exp_sum[1].size() == 0) begin failures++; $display("FAIL: unexpected segment (small)"); end
      else begin
        longint es, ec;
        es = exp_sum[1].pop_front(); ec = exp_cnt[1].pop_front();
        if (ptot_s != 16'(es) || ctot_s != 4'(ec)) begin
          failures++; $display("FAIL: small segment %0d/%0d expected %0d/%0d", ptot_s, ctot_s, es, ec);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 2; k++) r[k] = '{0, 0, 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(7500, 3);
    run(2145, 5);
    // The two segments after reset are (0,0) then (22500,3); look at the third.
    run(0, 2);
    repeat (3) @(posedge clk);
    #1 checks++;
    if (ptot != 16'd10725 || ctot != 16'd5) begin
      failures++; $display("FAIL: 4.291 A segment %0d/%0d, expected 10725/5", ptot, ctot);
    end
    run(415, 4);
    run(7500, 20);           // 20 x 7500 passes 65535: closes early
    run(1, 40);              // passes the 4-bit counter of the small instance
    for (int i = 0; i < 300; i++) run($urandom_range(0, 3) * 2000, $urandom_range(1, 12));
    step(12345);
    repeat (4) @(posedge clk);
    #1;
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (exp_sum[k].size() != 0) begin failures++; $display("FAIL: %0d segments missing", exp_sum[k].size()); end
      checks++;
      if (n_ovf[k] == 0) begin failures++; $display("FAIL: no early close in instance %0d", k); end
    end
    $display("segments %0d/%0d, early closes %0d/%0d", n_valid[0], n_valid[1], n_ovf[0], n_ovf[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
