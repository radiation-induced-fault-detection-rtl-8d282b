// tb_cycle_counter: counter, wrap-around, time-check pulse and test vector.
// Uses short periods (wrap after 12 cycles, time-check every 4) and checks,
// cycle by cycle, against a reference count kept in the testbench: the
// count, its return to zero, a single-cycle time_check pulse one cycle
// after every 4th count, and the vector {1, 0, ~count[0]}.
module tb_cycle_counter;
  import asn_pkg::*;
  localparam int WRAP = 12, CHK = 4;

  logic clk = 0, rst_n = 0;
  logic [CNT_W-1:0] count;
  vec_t vec;
  logic time_check;
  int checks = 0, failures = 0, pulses = 0;

  cycle_counter #(.WRAP_CYCLES(WRAP), .CHECK_CYCLES(CHK)) dut (.clk, .rst_n, .count, .vec, .time_check);

  always #20 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;  // cycles since reset
    for (int i = 0; i < 100; i++) begin
      #1;
      checks++;
      if (count !== CNT_W'(n % WRAP)) begin failures++; $display("FAIL count %0d exp %0d", count, n % WRAP); end
      checks++;
      if (vec !== {1'b1, 1'b0, ~count[0]}) failures++;
      checks++;
      if (time_check !== (n > 0 && (n % CHK) == 0)) begin failures++; $display("FAIL pulse at n=%0d", n); end
      if (time_check) pulses++;
      @(posedge clk);
      n++;
    end
    checks++;
    if (pulses != 24) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
