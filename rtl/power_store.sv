// power_store: groups runs of equal power samples into segments.
//
// On every `sample` strobe the incoming power is compared with the previous
// sample. If it is equal, it is added to the running total and the sample
// counter goes up by one, so the counter is the duration, in samples, for
// which the power has been constant. If it differs, the finished segment's
// total and duration are copied to `power_tot`/`count_tot`, `valid` pulses
// for one cycle, and a new segment starts with total = the new sample and
// count = 1. A segment therefore holds the sum of all its samples and the
// number of them (for example three samples of 7500 give 22500 and 3).
//
// The comparator, adder, counter and the output registers are the meter's;
// the 16-bit total and count follow its register widths. What happens when
// the total or count would overflow is this design's choice: the segment is
// closed early and sent on (`valid` pulses) and a new one starts with the
// current sample, so no sum is ever wrapped. After reset the previous value,
// total and count are 0, so a leading run of zero power forms an ordinary
// segment. `valid` comes one cycle after the sample that ends a segment.
module power_store #(
  parameter int unsigned P_W   = 16,
  parameter int unsigned SUM_W = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sample,
  input  logic [P_W-1:0]   power,
  output logic [SUM_W-1:0] power_tot,
  output logic [CNT_W-1:0] count_tot,
  output logic             valid,
  output logic             overflow   // one-cycle strobe: segment closed early
);
  logic [P_W-1:0]   power_prev;
  logic [SUM_W-1:0] sum_q;
  logic [CNT_W-1:0] cnt_q;
  logic [SUM_W:0]   sum_next;        // one extra bit to see a carry out
  logic             same, sum_full, cnt_full;

  always_comb begin
    same     = (power == power_prev);
    sum_next = {1'b0, sum_q} + (SUM_W+1)'(power);
    sum_full = sum_next[SUM_W];
    cnt_full = &cnt_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      power_prev <= '0;
      sum_q      <= '0;
      cnt_q      <= '0;
      power_tot  <= '0;
      count_tot  <= '0;
      valid      <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      valid    <= 1'b0;
      overflow <= 1'b0;
      if (sample) begin
        power_prev <= power;
        if (same && !sum_full && !cnt_full) begin
          sum_q <= sum_next[SUM_W-1:0];
          cnt_q <= cnt_q + 1'b1;
        end else begin
          power_tot <= sum_q;
          count_tot <= cnt_q;
          valid     <= 1'b1;
          overflow  <= same;
          sum_q     <= SUM_W'(power);
          cnt_q     <= CNT_W'(1);
        end
      end
    end
  end

  initial assert (SUM_W >= P_W) else $error("power_store: SUM_W < P_W");
endmodule
