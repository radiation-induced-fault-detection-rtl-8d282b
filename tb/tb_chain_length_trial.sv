// tb_chain_length_trial: delay value against chain length.
//
// Calibration trial for the delay measurement. Four chains of 29, 31, 33
// and 35 sensors run side by side from one cycle counter, each feeding its
// own network_analyzer. The extra unmonitored sensors sit in pairs after the
// first monitored sensors, as in sensor_network, so only the spacing of the
// first monitored sensors grows. Every stage takes 0.67 ns (the calibrated
// stage delay of the original Virtex-4 build), so the 29-sensor chain fits
// into the 20 ns half period and the longer ones do not.
//
// For each chain the testbench works out, from the stage positions alone,
// the first monitored sensor whose edge arrives at or after the falling
// clock edge, and expects that sensor's 1-based number as the delay value
// (no code at all for the 29-sensor chain). It also checks the ideal
// calibration figure: with equal stage delays, removing two sensors raises
// the reported position by exactly two. Real chains on the original device
// gave less than one per sensor because routing changed between builds; this
// model has no routing, so it shows the ideal case only.
module tb_chain_length_trial;
  import asn_pkg::*;
  localparam int NM       = 25;
  localparam int N_TRIALS = 4;
  localparam int LENGTHS [N_TRIALS] = '{29, 31, 33, 35};
  localparam int STAGE_PS = 670;
  localparam int HALF_PS  = 20000;

  logic clk = 0, rst_n = 0;
  logic [CNT_W-1:0] count;
  vec_t vec;
  logic time_check;
  logic hold = 0, clear = 0;
  logic [31:0] code [N_TRIALS];
  int checks = 0, failures = 0;

  cycle_counter u_cnt (.clk, .rst_n, .count, .vec, .time_check);

  for (genvar t = 0; t < N_TRIALS; t++) begin : g_trial
    vec_t mon [NM];
    logic seu_now, tid_now;
    slow_chain #(.NUM_SENSORS(LENGTHS[t]), .NUM_MON(NM)) u_chain (
      .vin(vec), .stage_ps(STAGE_PS), .mon);
    network_analyzer #(.NET_ID(4'(t))) u_ana (
      .clk, .rst_n, .vin(vec), .lsb(count[0]), .mon, .hold, .clear,
      .code(code[t]), .seu_now, .tid_now);
  end

  always #20 clk = ~clk;

  // position in the chain of monitored sensor m for a chain of s sensors
  function automatic int chain_pos(int s, int m);
    int pairs = (s - NM) / 2;
    return m + 2 * ((m < pairs) ? m : pairs);
  endfunction

  // expected delay value: 1-based number of the first late monitored sensor
  function automatic int expected_dv(int s);
    for (int m = 0; m < NM; m++)
      if ((chain_pos(s, m) + 1) * STAGE_PS >= HALF_PS) return m + 1;
    return 0;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv [N_TRIALS];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk);
    #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    repeat (10) @(posedge clk);
    #1;
    for (int t = 0; t < N_TRIALS; t++) begin
      logic [31:0] expc;
      dv[t] = expected_dv(LENGTHS[t]);
      expc = (dv[t] == 0) ? 32'h0 : {4'(t), 2'b11, 1'b0, 5'(dv[t]), 20'd10};
      checks++;
      if (code[t] !== expc) begin
        failures++;
        $display("FAIL %0d sensors: code %08X expected %08X", LENGTHS[t], code[t], expc);
      end
      $display("%0d sensors  chain %0d ps  code %08X", LENGTHS[t], LENGTHS[t] * STAGE_PS,
               code[t]);
    end
    // the shortest chain must be clean, every longer one must report a delay
    checks++;
    if (code[0] != 0) failures++;
    for (int t = 1; t < N_TRIALS; t++) begin
      checks++;
      if (code[t][24:20] == 0) begin
        failures++;
        $display("FAIL %0d sensors: no delay value", LENGTHS[t]);
      end
    end
    // two sensors fewer: the reported position moves two sensors later
    for (int t = 2; t < N_TRIALS; t++) begin
      checks++;
      if (int'(code[t-1][24:20]) - int'(code[t][24:20]) != 2) begin
        failures++;
        $display("FAIL %0d -> %0d sensors: value %0d -> %0d", LENGTHS[t], LENGTHS[t-1],
                 code[t][24:20], code[t-1][24:20]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
