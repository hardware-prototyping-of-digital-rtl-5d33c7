// bin2bcd: sequential binary to BCD converter ("add-3" / double dabble).
//
// A DUALBITS-bit binary number is captured from `dual` at the rising clock
// edge where `indicator` is 1; that edge starts a conversion. Register B holds
// the binary number and register A, cleared at the capture, builds the BCD
// result. On each following clock, every 4-bit digit of A that is 5 or more
// gets 3 added, and then A and B are shifted left together by one bit, so the
// top bit of B enters A. After DUALBITS shifts B is empty and A holds the
// BCDBLKS-digit result: it is copied to `bcd` and `ready` is 1 for one cycle.
// So `ready` comes DUALBITS cycles after the capture edge, and `bcd` then
// holds its value until the next result. A new `indicator` is ignored until
// the running conversion is done; `indicator` is meant to be 1 for a single
// edge. The algorithm, the capture/ready handshake and the three generics are
// the meter's; the one-cycle `ready` pulse and the `busy` output are this
// design's choices. Reset clears all registers.
module bin2bcd #(
  parameter int unsigned DUALBITS = 24,
  parameter int unsigned BCDBITS  = 32,
  parameter int unsigned BCDBLKS  = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                indicator,
  input  logic [DUALBITS-1:0] dual,
  output logic [BCDBITS-1:0]  bcd,
  output logic                ready,
  output logic                busy
);
  localparam int unsigned CW = $clog2(DUALBITS + 1);

  logic [DUALBITS-1:0] reg_b;
  logic [BCDBITS-1:0]  reg_a, adjusted, shifted;
  logic [CW-1:0]       shifts;

  // Add 3 to each digit of A that is 5..9, then shift A:B left by one.
  always_comb begin
    for (int d = 0; d < BCDBLKS; d++) begin
      if (reg_a[4*d +: 4] >= 4'd5) adjusted[4*d +: 4] = reg_a[4*d +: 4] + 4'd3;
      else                         adjusted[4*d +: 4] = reg_a[4*d +: 4];
    end
    shifted = {adjusted[BCDBITS-2:0], reg_b[DUALBITS-1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a  <= '0;
      reg_b  <= '0;
      shifts <= '0;
      busy   <= 1'b0;
      ready  <= 1'b0;
      bcd    <= '0;
    end else begin
      ready <= 1'b0;
      if (!busy) begin
        if (indicator) begin
          reg_b  <= dual;
          reg_a  <= '0;
          shifts <= '0;
          busy   <= 1'b1;
        end
      end else begin
        reg_a  <= shifted;
        reg_b  <= {reg_b[DUALBITS-2:0], 1'b0};
        shifts <= shifts + 1'b1;
        if (shifts == CW'(DUALBITS - 1)) begin
          busy  <= 1'b0;
          ready <= 1'b1;
          bcd   <= shifted;
        end
      end
    end
  end

  initial assert (BCDBITS == 4 * BCDBLKS) else $error("bin2bcd: BCDBITS must be 4*BCDBLKS");
endmodule
