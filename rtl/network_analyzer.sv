// network_analyzer: fault detection and characterisation for one sensor chain.
//
// Upsets. At every rising edge the static bits of all monitored sensors are
// compared with their expected values (monitored sensor m carries the input
// inverted m+1 times). Any mismatch means an upset is present: the upset
// duration counter counts that cycle. To count faulty sensors rather than
// every sensor downstream of one bad wire, each sensor is also compared with
// the sensor before it (sensor 0 with the chain input): two equal static
// bits mark that sensor faulty. The flag stays set until the reporter clears
// the network; the upset amount is the number of flagged sensors.
//
// Delay. The alternating bits are sampled on the falling edge, half a clock
// period after they were launched, and checked at the next rising edge
// against the counter LSB (sensor m should show lsb ^ m[0]). Only when no
// upset is present or pending is a mismatch counted as a delay fault, so an
// upset never shows up as a false delay. The delay value is found by scanning
// from the end of the chain for the first two consecutive sensors with equal
// alternating bits: it is the 1-based number of the later sensor of that pair
// (NUM_MON = only the last sensor missed the edge), or 0 if no pair is found.
// The worst (smallest non-zero) value since the last report is kept.
//
// With ASYNC_CAPTURE (the default) the upset flags are also set the moment
// a comparison fails, between clock edges, so an upset lasting only a few
// nanoseconds is still reported (with a duration of zero cycles, since
// durations count rising edges). With ASYNC_CAPTURE = 0 everything is
// sampled at rising edges.
//
// Reporting. 'code' is the 32-bit fault code of asn_pkg (all zeros when no
// fault). While 'hold' is high nothing updates, so the code stays steady
// while it is sent; 'clear' resets flags, amounts and durations. Durations
// saturate at 2^DUR_W - 1. The 'keep worst delay' rule and the way a
// glitch is caught (asynchronously set flip-flops) are this design's
// choices; the rest follows the document.
module network_analyzer
  import asn_pkg::*;
#(
  parameter int unsigned NUM_MON = ASN_MON,
  parameter logic [3:0]  NET_ID  = 4'd0,
  parameter bit          ASYNC_CAPTURE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  vec_t         vin,            // vector at the chain input
  input  logic         lsb,            // counter LSB (reference for the alternating bit)
  input  vec_t         mon [NUM_MON],  // monitored sensor outputs
  input  logic         hold,
  input  logic         clear,
  output logic [31:0]  code,
  output logic         seu_now,        // upset visible this cycle
  output logic         tid_now         // delay fault counted this cycle
);
  localparam int unsigned AW = 5;

  // ---- rising-edge upset checks (combinational) ----
  logic [NUM_MON-1:0] pair_bad;
  logic               static_bad;
  always_comb begin
    static_bad = 1'b0;
    for (int unsigned m = 0; m < NUM_MON; m++) begin
      vec_t prev;
      vec_t expv;
      prev = (m == 0) ? vin : mon[m-1];
      expv = m[0] ? vin : ~vin;
      pair_bad[m] = (mon[m][B_HI] == prev[B_HI]) || (mon[m][B_LO] == prev[B_LO]);
      if (mon[m][B_HI] != expv[B_HI] || mon[m][B_LO] != expv[B_LO]) static_bad = 1'b1;
    end
  end
  assign seu_now = static_bad;

  // ---- falling-edge sample of the alternating path ----
  logic [NUM_MON-1:0] tog_s;
  logic               lsb_s;
  logic               samp_ok;
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_s   <= '0;
      lsb_s   <= 1'b0;
      samp_ok <= 1'b0;
    end else begin
      for (int unsigned m = 0; m < NUM_MON; m++) tog_s[m] <= mon[m][B_TOG];
      lsb_s   <= lsb;
      samp_ok <= 1'b1;
    end
  end

  logic          tog_bad;
  logic [AW-1:0] dv_now;
  always_comb begin
    logic prev;
    tog_bad = 1'b0;
    dv_now  = '0;
    for (int unsigned m = 0; m < NUM_MON; m++) begin
      if (tog_s[m] != (lsb_s ^ m[0])) tog_bad = 1'b1;
      prev = (m == 0) ? ~lsb_s : tog_s[m-1];
      if (tog_s[m] == prev) dv_now = AW'(m + 1);  // last hit = nearest the end
    end
    tog_bad = tog_bad & samp_ok;
  end

  // ---- state ----
  logic [NUM_MON-1:0] seu_flag;
  logic               seu_seen, tid_seen;
  logic [DUR_W-1:0]   seu_dur, tid_dur;
  logic [AW-1:0]      tid_dv;

  assign tid_now = tog_bad && !static_bad && !seu_seen && !hold;

  // Upset flags. They are set at a rising edge, or, with ASYNC_CAPTURE, the
  // moment the comparison fails, so that a glitch between two edges is kept.
  // Nothing is set while the network is held; 'clear' always comes while
  // held, so it is never overridden by a set.
  logic [NUM_MON-1:0] flag_set;
  logic               seen_set;
  assign flag_set = hold ? '0 : pair_bad;
  assign seen_set = static_bad && !hold;

  for (genvar m = 0; m <= NUM_MON; m++) begin : g_flag
    logic set_m, q;
    if (m < NUM_MON) begin : g_sensor
      assign set_m       = flag_set[m];
      assign seu_flag[m] = q;
    end else begin : g_seen
      assign set_m    = seen_set;
      assign seu_seen = q;
    end
    if (ASYNC_CAPTURE) begin : g_async
      // one asynchronous load: reset loads 0, a failed comparison loads 1
      logic set_ok, aload;
      assign set_ok = set_m && rst_n;
      assign aload  = set_ok || !rst_n;
      always_ff @(posedge clk or posedge aload) begin
        if (aload)      q <= set_ok;
        else if (clear) q <= 1'b0;
      end
    end else begin : g_sync
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     q <= 1'b0;
        else if (clear) q <= 1'b0;
        else if (set_m) q <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tid_seen <= 1'b0;
      seu_dur  <= '0;
      tid_dur  <= '0;
      tid_dv   <= '0;
    end else if (clear) begin
      tid_seen <= 1'b0;
      seu_dur  <= '0;
      tid_dur  <= '0;
      tid_dv   <= '0;
    end else if (!hold) begin
      if (static_bad) begin
        if (seu_dur != '1) seu_dur <= seu_dur + 1'b1;
      end
      if (tid_now) begin
        tid_seen <= 1'b1;
        if (tid_dur != '1) tid_dur <= tid_dur + 1'b1;
        if (dv_now != '0 && (tid_dv == '0 || dv_now < tid_dv)) tid_dv <= dv_now;
      end
    end
  end

  logic [AW-1:0] seu_amount;
  always_comb begin
    seu_amount = '0;
    for (int unsigned m = 0; m < NUM_MON; m++) seu_amount = seu_amount + AW'(seu_flag[m]);
  end

  always_comb begin
    if (seu_seen)      code = make_code(NET_ID, 1'b1, seu_amount, seu_dur);
    else if (tid_seen) code = make_code(NET_ID, 1'b0, tid_dv, tid_dur);
    else               code = '0;
  end

  initial assert (NUM_MON < 32) else $error("amount field is five bits wide");
endmodule
