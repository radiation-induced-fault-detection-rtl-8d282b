// tb_delay_sweep: delay value against chain slowdown.
//
// A behavioural chain (slow_chain) with a stage delay of 0.67 ns, i.e.
// 29 stages = 19.43 ns, just inside the 20 ns half period of the 25 MHz
// clock, feeds a network_analyzer. The stage delay is then raised step by
// step to model slowdowns of 0 % to 25 %, including the 6 %, 9.9 %, 16.3 %
// and 20.7 % reported in heating experiments. For each step the testbench
// works out which monitored sensor is the first whose toggling edge arrives
// at or after the falling clock edge, and expects the delay value to be that
// sensor's 1-based number (no code at all when every edge is in time).
module tb_delay_sweep;
  import asn_pkg::*;
  localparam int NM = 25;
  localparam int MON_POS [NM] = '{0, 3, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 17, 18,
                                  19, 20, 21, 22, 23, 24, 25, 26, 27, 28};
  localparam int BASE_PS = 670;
  localparam int HALF_PS = 20000;
  localparam int SLOW_PERMILLE [10] = '{0, 20, 34, 60, 99, 130, 163, 207, 250, 400};

  logic clk = 0, rst_n = 0;
  logic [CNT_W-1:0] count;
  vec_t vec;
  logic time_check;
  vec_t mon [NM];
  int stage_ps = BASE_PS;
  logic hold = 0, clear = 0;
  logic [31:0] code;
  logic seu_now, tid_now;
  int checks = 0, failures = 0, delays_seen = 0;

  cycle_counter u_cnt (.clk, .rst_n, .count, .vec, .time_check);
  slow_chain u_chain (.vin(vec), .stage_ps, .mon);
  network_analyzer #(.NET_ID(4'hD)) dut (.clk, .rst_n, .vin(vec), .lsb(count[0]), .mon,
                                         .hold, .clear, .code, .seu_now, .tid_now);

  always #20 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (SLOW_PERMILLE[i]) begin
      int first_late;
      logic [31:0] expc;
      stage_ps = BASE_PS * (1000 + SLOW_PERMILLE[i]) / 1000;
      repeat (5) @(posedge clk);          // let the chain settle at the new speed
      #1 clear = 1;
      @(posedge clk); #1 clear = 0;
      repeat (10) @(posedge clk);
      #1;
      first_late = -1;
      for (int m = NM - 1; m >= 0; m--)
        if ((MON_POS[m] + 1) * stage_ps >= HALF_PS) first_late = m;
      expc = (first_late < 0) ? 32'h0 : {4'hD, 2'b11, 1'b0, 5'(first_late + 1), 20'd10};
      checks++;
      if (code !== expc) begin
        failures++;
        $display("FAIL slowdown %0d.%0d %%: code %08X expected %08X", SLOW_PERMILLE[i] / 10,
                 SLOW_PERMILLE[i] % 10, code, expc);
      end
      if (code != 0) delays_seen++;
      $display("slowdown %0d.%0d %%  stage %0d ps  code %08X", SLOW_PERMILLE[i] / 10,
               SLOW_PERMILLE[i] % 10, stage_ps, code);
    end
    checks++;
    if (delays_seen < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
