// cycle_counter: system timestamp and test-vector generator.
//
// 'count' increments on every rising clock edge and serves as the timestamp
// of the fault reports. Its LSB drives the alternating test signal: the chain
// input vector is {1, 0, ~count[0]}, so monitored sensor 0 shows count[0],
// sensor 1 its inverse, and so on. The counter returns to zero after
// WRAP_CYCLES cycles (15 minutes at 25 MHz) to bound its width, and
// 'time_check' pulses for one cycle every CHECK_CYCLES cycles (5 minutes),
// telling the reporter to send the timestamp even when nothing failed. Both
// periods and the 40 ns clock follow the document; the exact vector bit
// order is this design's choice.
module cycle_counter
  import asn_pkg::*;
#(
  parameter longint unsigned WRAP_CYCLES  = 64'd22_500_000_000,
  parameter longint unsigned CHECK_CYCLES = 64'd7_500_000_000
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [CNT_W-1:0] count,
  output vec_t             vec,
  output logic             time_check
);
  logic [CNT_W-1:0] check_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      check_cnt  <= '0;
      time_check <= 1'b0;
    end else begin
      count      <= (count == CNT_W'(WRAP_CYCLES - 1)) ? '0 : count + 1'b1;
      time_check <= (check_cnt == CNT_W'(CHECK_CYCLES - 1));
      check_cnt  <= (check_cnt == CNT_W'(CHECK_CYCLES - 1)) ? '0 : check_cnt + 1'b1;
    end
  end

  assign vec = {1'b1, 1'b0, ~count[0]};

  initial begin
    assert (WRAP_CYCLES <= (64'd1 << CNT_W)) else $error("WRAP_CYCLES exceeds the counter width");
    assert (CHECK_CYCLES >= 2) else $error("CHECK_CYCLES too small");
  end
endmodule
